// tb_vc_rsi_pipeline: end-to-end test of the pipelined IPv6 lookup cache at its
// default sizes (512 sets, 16-entry victim cache, 64-entry miss buffer) against
// a routing-table model with a 6-cycle penalty. Every result is compared with
// the model's port for that lookup id, and every lookup must come back exactly
// once. Directed phases make each mechanism happen: cold misses, hits,
// pseudo-misses, victim hits with swaps, a prediction period that redirects the
// conflicting set, and stalls; a run of hits checks one lookup per cycle with a
// two-cycle latency to the result.
module tb_vc_rsi_pipeline;
  import rc_pkg::*;
  localparam int PEN = 6;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready;
  logic [15:0] in_id = '0;
  logic [127:0] in_addr = '0;
  logic out_valid;
  logic [15:0] out_id;
  logic [7:0] out_port;
  res_kind_e out_kind;
  logic rt_req_valid, rt_req_ready, rt_rsp_valid, rt_rsp_ready;
  logic [127:0] rt_req_addr;
  logic [7:0] rt_rsp_port;
  logic end_period = 0, period_busy, period_start, predictor_en;
  logic [8:0] predictor;
  logic [31:0] st_hits, st_vc, st_miss, st_pseudo, st_stall, st_redir, st_swap;
  int checks = 0, failures = 0;

  vc_rsi_pipeline dut (
    .clk, .rst_n, .seed(32'hACE1_2345), .in_valid, .in_ready, .in_id, .in_addr,
    .out_valid, .out_id, .out_port, .out_kind,
    .rt_req_valid, .rt_req_ready, .rt_req_addr, .rt_rsp_valid, .rt_rsp_ready, .rt_rsp_port,
    .end_period, .period_busy, .period_start, .predictor, .predictor_en,
    .stat_hits(st_hits), .stat_vc_hits(st_vc), .stat_misses(st_miss), .stat_pseudo(st_pseudo),
    .stat_stalls(st_stall), .stat_redirects(st_redir), .stat_swaps(st_swap));

  rt_port_model #(.PENALTY(PEN)) u_rt (
    .clk, .rst_n, .req_valid(rt_req_valid), .req_ready(rt_req_ready), .req_addr(rt_req_addr),
    .rsp_valid(rt_rsp_valid), .rsp_ready(rt_rsp_ready), .rsp_port(rt_rsp_port));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  // scoreboard
  logic [127:0] id_addr [65536];
  bit           id_out  [65536];
  res_kind_e    id_kind [65536];
  int           next_id = 0;
  int           n_out = 0;
  int           kind_cnt [4];
  longint       cyc = 0;
  longint       last_out_cyc = 0;

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n && out_valid) begin
    chk(!id_out[out_id], $sformatf("id %0d returned once", out_id));
    chk(out_port == u_rt.port_of(id_addr[out_id]), $sformatf("port of id %0d", out_id));
    id_out[out_id]  = 1;
    id_kind[out_id] = out_kind;
    kind_cnt[out_kind]++;
    n_out++;
    last_out_cyc = cyc;
  end

  task automatic send(input logic [127:0] a);
    @(negedge clk);
    in_valid = 1; in_addr = a; in_id = 16'(next_id);
    id_addr[next_id] = a; id_out[next_id] = 0;
    next_id++;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    #1 in_valid = 0;
  endtask

  task automatic drain();
    int guard = 0;
    while (n_out != next_id && guard < 5000) begin @(posedge clk); guard++; end
    chk(n_out == next_id, "all lookups answered");
  endtask

  function automatic logic [127:0] mk(input int top, input int low);
    return {9'(top), 87'h0, 32'(low)};
  endfunction

  initial begin
    int first;
    longint t0;
    for (int i = 0; i < 4; i++) kind_cnt[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (520) @(posedge clk);   // conflict counters are cleared after reset
    // 1. cold misses and hits on 32 addresses in 32 different sets
    for (int r = 0; r < 3; r++)
      for (int k = 0; k < 32; k++) send(mk(k, 1000 + k));
    drain();
    chk(st_miss == 32 && st_hits + st_pseudo >= 64 - 32, "cold misses, later hits");
    // 2. pseudo-miss: the same new address twice in a row
    first = next_id;
    send(mk(40, 77)); send(mk(40, 77));
    drain();
    chk(id_kind[first] == RES_MISS && id_kind[first + 1] == RES_PSEUDO, "pseudo-miss");
    // 3. two addresses sharing set 50: the second evicts the first to the victim
    //    cache; alternating then hits the victim cache and swaps
    send(mk(50, 1)); drain();
    send(mk(50, 2)); drain();
    first = next_id;
    for (int k = 0; k < 6; k++) send(mk(50, 1 + (k % 2)));
    drain();
    for (int k = 0; k < 6; k++)
      chk(id_kind[first + k] == RES_VC_HIT, $sformatf("victim hit %0d", k));
    chk(st_swap >= 6, "swaps counted");
    // 4. throughput: 200 hits back to back, one per cycle, results 2 cycles later
    @(negedge clk);
    t0 = cyc;
    first = next_id;
    for (int k = 0; k < 200; k++) begin
      in_valid = 1; in_addr = mk(k % 32, 1000 + (k % 32)); in_id = 16'(next_id);
      id_addr[next_id] = in_addr; id_out[next_id] = 0; next_id++;
      @(posedge clk);
      chk(in_ready, "no stall on hits");
      #1;
    end
    in_valid = 0;
    drain();
    chk(last_out_cyc - t0 == 200 + 1, $sformatf("200 hits in %0d cycles", last_out_cyc - t0));
    // 5. conflicts concentrated on set 77, then a new prediction period
    for (int r = 0; r < 2; r++)
      for (int k = 0; k < 40; k++) send(mk(77, 5000 + k));
    drain();
    @(negedge clk); end_period = 1; @(negedge clk); end_period = 0;
    while (!period_start) @(posedge clk);
    @(posedge clk);
    chk(predictor_en && predictor == 9'd77, $sformatf("predictor %0d", predictor));
    first = next_id;
    send(mk(3, 1003));
    for (int k = 0; k < 20; k++) send(mk(77, 5000 + k));
    for (int k = 0; k < 20; k++) send(mk(77, 5000 + k));
    drain();
    chk(id_kind[first] == RES_MISS, "caches flushed at the new period");
    chk(st_redir >= 40, $sformatf("redirected lookups %0d", st_redir));
    // 6. a burst of distinct misses mixed with hits: the buffer and the result port
    //    cause stalls
    for (int k = 0; k < 300; k++) send((k % 2) ? mk(k % 32, 1000 + (k % 32)) : mk(200 + (k % 100), 9000 + k));
    drain();
    chk(st_stall > 0, "stalls happened");
    chk(kind_cnt[RES_HIT] > 0 && kind_cnt[RES_VC_HIT] > 0 && kind_cnt[RES_MISS] > 0 &&
        kind_cnt[RES_PSEUDO] > 0, "all result kinds seen");
    $display("lookups %0d: hit %0d vc %0d miss %0d pseudo %0d stalls %0d redirects %0d",
             next_id, kind_cnt[0], kind_cnt[1], kind_cnt[2], kind_cnt[3], st_stall, st_redir);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
