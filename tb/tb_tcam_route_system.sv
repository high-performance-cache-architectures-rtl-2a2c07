// tb_tcam_route_system: lookups through the TCAM route cache system (8 entries in
// sets of 5 and 3, 16-bit addresses) against a longest-prefix routing-table
// model. Checks every result port where no port error is possible, evictions
// under each replacement policy, a port error caused by a cached covering entry
// and its repair by sampling, and the number of table searches of each sampling
// technique.
module tb_tcam_route_system;
  import rc_pkg::*;
  localparam int W = 16;
  logic clk = 0, rst_n = 0, flush = 0;
  repl_mode_e repl_mode = REPL_LRU;
  samp_mode_e samp_mode = SAMP_NONE;
  logic in_valid = 0, in_ready, out_valid, out_hit;
  logic [W-1:0] in_addr = '0;
  logic [7:0] out_port;
  logic rt_req_valid, rt_req_ready, rt_rsp_valid, rt_rsp_ready, rt_rsp_label, rt_rsp_hp;
  logic [W-1:0] rt_req_addr, rt_rsp_value, rt_rsp_mask;
  logic [7:0] rt_rsp_port, rt_rsp_n;
  logic [31:0] st_lk, st_hit, st_srch, st_perr, st_evict;
  int checks = 0, failures = 0;

  tcam_route_system #(.ENTRIES(8), .NUM_SETS(2), .SET_SIZE('{0: 5, 1: 3, default: 0}),
                      .ADDR_W(W)) dut (
    .clk, .rst_n, .repl_mode, .samp_mode, .flush, .in_valid, .in_ready, .in_addr,
    .out_valid, .out_port, .out_hit, .rt_req_valid, .rt_req_ready, .rt_req_addr,
    .rt_rsp_valid, .rt_rsp_ready, .rt_rsp_value, .rt_rsp_mask, .rt_rsp_port, .rt_rsp_n,
    .rt_rsp_label, .rt_rsp_hp, .stat_lookups(st_lk), .stat_hits(st_hit),
    .stat_searches(st_srch), .stat_port_errors(st_perr), .stat_evictions(st_evict));

  rt_lpm_model #(.ADDR_W(W), .PENALTY(3)) u_rt (
    .clk, .rst_n, .req_valid(rt_req_valid), .req_ready(rt_req_ready), .req_addr(rt_req_addr),
    .rsp_valid(rt_rsp_valid), .rsp_ready(rt_rsp_ready), .rsp_value(rt_rsp_value),
    .rsp_mask(rt_rsp_mask), .rsp_port(rt_rsp_port), .rsp_n(rt_rsp_n), .rsp_label(rt_rsp_label),
    .rsp_hp(rt_rsp_hp));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  // one lookup, waits for its result
  task automatic lookup(input logic [W-1:0] a, output logic [7:0] p, output logic h);
    @(negedge clk);
    in_valid = 1; in_addr = a;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    #1 in_valid = 0;
    while (!out_valid) begin @(posedge clk); #1; end
    p = out_port; h = out_hit;
    @(posedge clk); #1;
    while (!in_ready) begin @(posedge clk); #1; end   // let a sampling check finish
  endtask

  task automatic do_flush();
    @(negedge clk); flush = 1; @(negedge clk); flush = 0;
  endtask

  initial begin
    logic [7:0] p; logic h;
    int s0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    u_rt.add_entry(16'h0000, 16'h0000, 8'd1, 3, 1'b1, 1'b0);          // default route
    for (int k = 0; k < 16; k++)
      u_rt.add_entry(16'(16'h1000 + (k << 8)), 16'hFF00, 8'(16 + k), 0, 1'b0, 1'b0);
    // A: 8 prefixes over a 5-entry set, each policy; no port error possible
    for (int md = 0; md < 3; md++) begin
      repl_mode = repl_mode_e'(md);
      do_flush();
      for (int k = 0; k < 150; k++) begin
        logic [W-1:0] a;
        a = {4'h1, 4'(($urandom_range(0, 3) == 0) ? $urandom_range(0, 7) : $urandom_range(0, 2)),
             8'($urandom)};
        lookup(a, p, h);
        chk(p == u_rt.lpm_port(a), $sformatf("mode %0d port for %h", md, a));
      end
    end
    chk(st_evict > 0 && st_hit > 0 && st_hit < st_lk, "hits, misses and evictions");
    // B: the default route cached, a more specific entry not: a port error
    do_flush();
    samp_mode = SAMP_EVERY_HIT;
    s0 = int'(st_perr);
    lookup(16'h9000, p, h); chk(!h && p == 8'd1, "default route fetched");
    lookup(16'h1855, p, h); chk(h && p == 8'd1, "covering entry hit with the wrong port");
    chk(int'(st_perr) == s0 + 1, "sampling found the port error");
    lookup(16'h1855, p, h); chk(h && p == 8'd24, "repaired entry gives the right port");
    // C: sampling techniques: number of table searches for the same traffic
    begin
      int srch [5];
      for (int sm = 0; sm < 5; sm++) begin
        samp_mode = samp_mode_e'(sm);
        repl_mode = REPL_LRU;
        do_flush();
        s0 = int'(st_srch);
        for (int k = 0; k < 120; k++) begin
          logic [W-1:0] a;
          a = {4'h1, 4'(k % 3), 8'(k)};
          lookup(a, p, h);
        end
        srch[sm] = int'(st_srch) - s0;
      end
      $display("searches: none %0d interval %0d selective %0d adaptive %0d every-hit %0d",
               srch[0], srch[1], srch[2], srch[3], srch[4]);
      chk(srch[0] == 3, "no sampling: only the 3 cold misses search");
      chk(srch[1] == 3 + 40 - 1 || srch[1] == 3 + 40, "interval: one search in three lookups");
      chk(srch[2] == 3, "selective: unlabeled entries are never checked");
      chk(srch[4] == 120, "every hit checked");
    end
    // D: adaptive sampling on labeled entries (default route) checks less and less
    begin
      int s_ad, s_eh;
      for (int pass = 0; pass < 2; pass++) begin
        samp_mode = pass ? SAMP_EVERY_HIT : SAMP_ADAPTIVE;
        do_flush();
        s0 = int'(st_srch);
        for (int k = 0; k < 60; k++) lookup(16'h9000 + 16'(k), p, h);
        if (pass) s_eh = int'(st_srch) - s0; else s_ad = int'(st_srch) - s0;
      end
      $display("labeled entry: adaptive %0d searches, every-hit %0d", s_ad, s_eh);
      chk(s_ad > 1 && s_ad < 20 && s_eh == 60, "adaptive checks a quiet labeled entry rarely");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
