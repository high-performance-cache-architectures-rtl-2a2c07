// tb_ip_route_cache_top: end-to-end test of the top level at its default (full)
// sizes: a 512-set direct-mapped cache with a 16-entry victim cache, 64-entry miss
// buffer and randomized set indexing, and a 128-entry TCAM route cache split into
// sets of 70/42/9/7 entries, both on 128-bit IPv6 addresses.
//
// The two engines run at the same time, each against its own routing-table model.
// Pipeline results are checked against the address-to-port function of the table
// model; TCAM results are checked against longest-prefix match wherever the cache
// cannot hold a stale covering entry. Each mechanism of the design is counted and
// one that never occurred counts as a failure.
module tb_ip_route_cache_top;
  import rc_pkg::*;
  logic clk = 0, rst_n = 0;
  // pipeline side
  logic p_in_valid = 0, p_in_ready, p_out_valid;
  logic [15:0] p_in_id = '0, p_out_id;
  logic [127:0] p_in_addr = '0;
  logic [7:0] p_out_port;
  logic [1:0] p_out_kind;
  logic p_rt_req_valid, p_rt_req_ready, p_rt_rsp_valid, p_rt_rsp_ready;
  logic [127:0] p_rt_req_addr;
  logic [7:0] p_rt_rsp_port;
  logic p_end_period = 0, p_period_busy, p_period_start, p_predictor_en;
  logic [8:0] p_predictor;
  logic [31:0] p_stat [7];
  // TCAM side
  logic [1:0] t_repl_mode = 2'(REPL_LRU);
  logic [2:0] t_samp_mode = 3'(SAMP_NONE);
  logic t_flush = 0, t_in_valid = 0, t_in_ready, t_out_valid, t_out_hit;
  logic [127:0] t_in_addr = '0;
  logic [7:0] t_out_port;
  logic t_rt_req_valid, t_rt_req_ready, t_rt_rsp_valid, t_rt_rsp_ready, t_rt_rsp_label, t_rt_rsp_hp;
  logic [127:0] t_rt_req_addr, t_rt_rsp_value, t_rt_rsp_mask;
  logic [7:0] t_rt_rsp_port, t_rt_rsp_n;
  logic [31:0] t_stat [5];
  int checks = 0, failures = 0;

  ip_route_cache_top dut (
    .clk, .rst_n,
    .p_seed(32'h1234_5678), .p_in_valid, .p_in_ready, .p_in_id, .p_in_addr,
    .p_out_valid, .p_out_id, .p_out_port, .p_out_kind,
    .p_rt_req_valid, .p_rt_req_ready, .p_rt_req_addr, .p_rt_rsp_valid, .p_rt_rsp_ready,
    .p_rt_rsp_port, .p_end_period, .p_period_busy, .p_period_start, .p_predictor,
    .p_predictor_en, .p_stat,
    .t_repl_mode, .t_samp_mode, .t_flush, .t_in_valid, .t_in_ready, .t_in_addr,
    .t_out_valid, .t_out_port, .t_out_hit, .t_rt_req_valid, .t_rt_req_ready, .t_rt_req_addr,
    .t_rt_rsp_valid, .t_rt_rsp_ready, .t_rt_rsp_value, .t_rt_rsp_mask, .t_rt_rsp_port,
    .t_rt_rsp_n, .t_rt_rsp_label, .t_rt_rsp_hp, .t_stat);

  rt_port_model #(.PENALTY(8)) u_prt (
    .clk, .rst_n, .req_valid(p_rt_req_valid), .req_ready(p_rt_req_ready),
    .req_addr(p_rt_req_addr), .rsp_valid(p_rt_rsp_valid), .rsp_ready(p_rt_rsp_ready),
    .rsp_port(p_rt_rsp_port));

  rt_lpm_model #(.PENALTY(6)) u_lpm (
    .clk, .rst_n, .req_valid(t_rt_req_valid), .req_ready(t_rt_req_ready),
    .req_addr(t_rt_req_addr), .rsp_valid(t_rt_rsp_valid), .rsp_ready(t_rt_rsp_ready),
    .rsp_value(t_rt_rsp_value), .rsp_mask(t_rt_rsp_mask), .rsp_port(t_rt_rsp_port),
    .rsp_n(t_rt_rsp_n), .rsp_label(t_rt_rsp_label), .rsp_hp(t_rt_rsp_hp));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ------------------------------------------------------------------ pipeline
  logic [127:0] id_addr [65536];
  bit           id_out  [65536];
  int           next_id = 0, n_out = 0;
  int           kind_cnt [4];
  int           periods = 0;

  always @(posedge clk) if (rst_n && p_out_valid) begin
    chk(!id_out[p_out_id], $sformatf("id %0d returned once", p_out_id));
    chk(p_out_port == u_prt.port_of(id_addr[p_out_id]), $sformatf("port of id %0d", p_out_id));
    id_out[p_out_id] = 1;
    kind_cnt[p_out_kind]++;
    n_out++;
  end
  always @(posedge clk) if (rst_n && p_period_start) periods++;

  task automatic p_send(input logic [127:0] a);
    @(negedge clk);
    p_in_valid = 1; p_in_addr = a; p_in_id = 16'(next_id);
    id_addr[next_id] = a; id_out[next_id] = 0;
    next_id++;
    @(posedge clk);
    while (!p_in_ready) @(posedge clk);
    #1 p_in_valid = 0;
  endtask

  task automatic p_drain();
    int guard = 0;
    while (n_out != next_id && guard < 20000) begin @(posedge clk); guard++; end
    chk(n_out == next_id, "all pipeline lookups answered");
  endtask

  // address with a chosen original set index (top 9 bits) and a chosen host part
  function automatic logic [127:0] mk(input int set, input int host);
    return {9'(set), 23'($urandom_range(0, 3)), 64'h2001_0db8_0000_0000, 32'(host)};
  endfunction

  // a trace-like stream: a working set of hot destinations re-visited with a skew,
  // a few sets shared by several hot destinations, and a trickle of new ones
  task automatic p_trace(input int n, input int seed_host);
    logic [127:0] hot [64];
    for (int k = 0; k < 64; k++)
      hot[k] = {9'((k < 48) ? k * 7 : 300 + (k % 4)), 23'(k), 64'h2001_0db8_0000_0000,
                32'(seed_host + k)};
    for (int k = 0; k < n; k++) begin
      int r;
      r = $urandom_range(0, 99);
      if (r < 70)      p_send(hot[$urandom_range(0, 15)]);
      else if (r < 90) p_send(hot[$urandom_range(16, 63)]);
      else             p_send(mk($urandom_range(0, 511), seed_host + 1000 + k));
    end
  endtask

  task automatic pipeline_run();
    // steady trace
    p_trace(3000, 0);
    p_drain();
    // the same new destination twice back to back
    p_send(mk(450, 777)); p_send(id_addr[next_id - 1]);
    // a burst of conflicts on one set, then a new prediction period
    for (int r = 0; r < 3; r++)
      for (int k = 0; k < 30; k++) p_send({9'd123, 23'(k), 64'h2001_0db8_0000_0000, 32'(k)});
    p_drain();
    @(negedge clk); p_end_period = 1; @(negedge clk); p_end_period = 0;
    while (!p_period_start) @(posedge clk);
    @(posedge clk);
    chk(p_predictor_en && p_predictor == 9'd123, $sformatf("predictor %0d", p_predictor));
    for (int r = 0; r < 3; r++)
      for (int k = 0; k < 30; k++) p_send({9'd123, 23'(k), 64'h2001_0db8_0000_0000, 32'(k)});
    p_trace(2000, 50000);
    p_drain();
  endtask

  // ------------------------------------------------------------------ TCAM side
  int t_mismatch [5];     // wrong ports returned, per sampling technique
  int t_lk_mode  [3];     // lookups per replacement policy
  int t_chk_mode [5];     // sampling checks per sampling technique
  int t_err_mode [5];     // port errors found per sampling technique

  task automatic t_lookup(input logic [127:0] a, output logic [7:0] p, output logic h);
    @(negedge clk);
    t_in_valid = 1; t_in_addr = a;
    @(posedge clk);
    while (!t_in_ready) @(posedge clk);
    #1 t_in_valid = 0;
    while (!t_out_valid) begin @(posedge clk); #1; end
    p = t_out_port; h = t_out_hit;
    @(posedge clk); #1;
    while (!t_in_ready) begin @(posedge clk); #1; end
  endtask

  task automatic t_flush_cache();
    @(negedge clk); t_flush = 1; @(negedge clk); t_flush = 0;
  endtask

  // routing table: 200 /16 prefixes (no nesting, set 0), 8 /20 prefixes (set 1),
  // 4 /22 prefixes (set 2), 16 /24 prefixes (set 3) and a labeled default route
  // (set 3) that covers everything
  function automatic logic [127:0] pfx16(input int k);
    return {16'(16'h2000 + k), 112'h0};
  endfunction
  function automatic logic [127:0] t_addr(input int cls, input int k);
    logic [127:0] a;
    a = {$urandom, $urandom, $urandom, $urandom};
    case (cls)
      0: a[127:112] = 16'(16'h2000 + k);
      1: a[127:108] = {16'h4000, 4'(k)};
      2: a[127:106] = {16'h4100, 6'(k)};
      3: a[127:104] = {16'h3000, 8'(k)};
      default: a[127:112] = 16'hF000;      // only the default route matches
    endcase
    return a;
  endfunction

  // traffic without default-route hits: every port must be exact
  task automatic t_clean(input int n, input int md);
    logic [7:0] p; logic h;
    for (int k = 0; k < n; k++) begin
      logic [127:0] a;
      int r;
      r = $urandom_range(0, 99);
      if (r < 60)      a = t_addr(0, $urandom_range(0, 39));
      else if (r < 80) a = t_addr(0, $urandom_range(40, 199));
      else if (r < 88) a = t_addr(1, $urandom_range(0, 7));
      else if (r < 92) a = t_addr(2, $urandom_range(0, 3));
      else             a = t_addr(3, $urandom_range(0, 15));
      t_lookup(a, p, h);
      t_lk_mode[md]++;
      chk(p == u_lpm.lpm_port(a), $sformatf("TCAM port for %h", a));
    end
  endtask

  task automatic tcam_run();
    logic [7:0] p; logic h;
    u_lpm.add_entry('0, '0, 8'd1, 3, 1'b1, 1'b0);
    for (int k = 0; k < 200; k++)
      u_lpm.add_entry(pfx16(k), {16'hFFFF, 112'h0}, 8'(2 + k), 0, 1'b0, 1'b0);
    for (int k = 0; k < 8; k++)
      u_lpm.add_entry({16'h4000, 4'(k), 108'h0}, {20'hFFFFF, 108'h0}, 8'(230 + k), 1, 1'b0, 1'b0);
    for (int k = 0; k < 4; k++)
      u_lpm.add_entry({16'h4100, 6'(k), 106'h0}, {22'h3FFFFF, 106'h0}, 8'(240 + k), 2, 1'b0, 1'b0);
    for (int k = 0; k < 16; k++)
      u_lpm.add_entry({16'h3000, 8'(k), 104'h0}, {24'hFFFFFF, 104'h0}, 8'(205 + k), 4, 1'b0, 1'b0);
    // each replacement policy on the same kind of traffic
    for (int md = 0; md < 3; md++) begin
      int h0, l0, e0;
      t_repl_mode = 2'(md);
      t_flush_cache();
      h0 = int'(t_stat[1]); l0 = int'(t_stat[0]); e0 = int'(t_stat[4]);
      t_clean(1500, md);
      $display("policy %0d: %0d lookups, %0d hits, %0d evictions", md,
               int'(t_stat[0]) - l0, int'(t_stat[1]) - h0, int'(t_stat[4]) - e0);
    end
    // each sampling technique with the default route cached, so that destinations
    // whose own prefix is not cached hit the default route with the wrong port
    t_repl_mode = 2'(REPL_LRU);
    for (int sm = 0; sm < 5; sm++) begin
      int s0, l0, h0, e0;
      t_samp_mode = 3'(sm);
      t_flush_cache();
      t_lookup(t_addr(4, 0), p, h);
      s0 = int'(t_stat[2]); l0 = int'(t_stat[0]); h0 = int'(t_stat[1]); e0 = int'(t_stat[3]);
      for (int k = 0; k < 1000; k++) begin
        logic [127:0] a;
        int r;
        r = $urandom_range(0, 99);
        if (r < 60)      a = t_addr(0, $urandom_range(0, 29));
        else if (r < 85) a = t_addr(0, $urandom_range(30, 199));
        else             a = t_addr(4, 0);
        t_lookup(a, p, h);
        if (p != u_lpm.lpm_port(a)) t_mismatch[sm]++;
      end
      // searches beyond the misses are sampling checks
      t_chk_mode[sm] = (int'(t_stat[2]) - s0) - ((int'(t_stat[0]) - l0) - (int'(t_stat[1]) - h0));
      t_err_mode[sm] = int'(t_stat[3]) - e0;
      $display("sampling %0d: %0d checks, %0d port errors found, %0d wrong ports returned",
               sm, t_chk_mode[sm], t_err_mode[sm], t_mismatch[sm]);
    end
  endtask

  // ------------------------------------------------------------------ main
  initial begin
    for (int i = 0; i < 4; i++) kind_cnt[i] = 0;
    for (int i = 0; i < 5; i++) begin t_mismatch[i] = 0; t_chk_mode[i] = 0; t_err_mode[i] = 0; end
    for (int i = 0; i < 3; i++) t_lk_mode[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      pipeline_run();
      tcam_run();
    join
    $display("pipeline: %0d lookups, hit %0d victim %0d miss %0d pseudo %0d, stalls %0d, redirects %0d, swaps %0d, periods %0d",
             next_id, kind_cnt[RES_HIT], kind_cnt[RES_VC_HIT], kind_cnt[RES_MISS],
             kind_cnt[RES_PSEUDO], p_stat[4], p_stat[5], p_stat[6], periods);
    chk(int'(p_stat[0]) == kind_cnt[RES_HIT] && int'(p_stat[1]) == kind_cnt[RES_VC_HIT] &&
        int'(p_stat[2]) == kind_cnt[RES_MISS] && int'(p_stat[3]) == kind_cnt[RES_PSEUDO],
        "pipeline counters agree with the results");
    // mechanisms that must have happened
    chk(kind_cnt[RES_HIT] > 0,    "mechanism: direct-mapped hit");
    chk(kind_cnt[RES_VC_HIT] > 0, "mechanism: victim cache hit");
    chk(kind_cnt[RES_MISS] > 0,   "mechanism: miss to the routing table");
    chk(kind_cnt[RES_PSEUDO] > 0, "mechanism: pseudo-miss merged in the miss buffer");
    chk(p_stat[4] > 0,            "mechanism: pipeline stall");
    chk(p_stat[5] > 0,            "mechanism: randomized index redirect");
    chk(p_stat[6] > 0,            "mechanism: victim swap");
    chk(periods > 0,              "mechanism: new prediction period");
    chk(t_stat[1] > 0,            "mechanism: TCAM hit");
    chk(t_stat[0] > t_stat[1],    "mechanism: TCAM miss");
    chk(t_stat[4] > 0,            "mechanism: TCAM eviction");
    chk(t_stat[3] > 0,            "mechanism: port error found");
    for (int md = 0; md < 3; md++)
      chk(t_lk_mode[md] > 0, $sformatf("mechanism: replacement policy %0d", md));
    chk(t_chk_mode[SAMP_NONE] == 0 && t_err_mode[SAMP_NONE] == 0, "no checks without sampling");
    for (int sm = 1; sm < 5; sm++)
      chk(t_chk_mode[sm] > 0 && t_err_mode[sm] > 0,
          $sformatf("mechanism: sampling technique %0d checks and finds errors", sm));
    chk(t_mismatch[SAMP_EVERY_HIT] < t_mismatch[SAMP_NONE],
        "checking every hit returns fewer wrong ports than no sampling");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
