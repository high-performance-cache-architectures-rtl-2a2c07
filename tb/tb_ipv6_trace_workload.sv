// tb_ipv6_trace_workload: the pipelined IPv6 route cache at full size (512-set
// direct-mapped cache, 16-entry victim cache, randomized index, 64-slot miss
// buffer) on a synthetic destination trace shaped like the IPv6 traces the
// scheme was evaluated on: a few thousand distinct destinations (3,700 here)
// re-used with a strong skew, so that each destination appears hundreds of
// times on average.
//
// The trace is generated here: destination k is a fixed 128-bit address. With
// probability 0.85 a lookup repeats one of the last 32 destinations (temporal
// locality of packet trains); otherwise it picks k = floor(U^4 * 3700) for a
// uniform U in [0,1), which gives a heavy head and a long tail. The trace is split in two prediction periods; the
// end of the first one selects the conflict predictor for the second. The
// routing table answers after 20 cycles. Every returned port is checked, and the
// hit rate, victim-cache share and cycles per lookup are reported and checked
// against loose bounds: a skewed trace must hit mostly, and the pipeline must
// stay well under the 20+ cycles per lookup of an unpipelined lookup on a miss.
module tb_ipv6_trace_workload;
  import rc_pkg::*;
  localparam int UNIQUE  = 3700;
  localparam int LOOKUPS = 40000;
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
    .clk, .rst_n, .seed(32'h0BAD_F00D), .in_valid, .in_ready, .in_id, .in_addr,
    .out_valid, .out_id, .out_port, .out_kind,
    .rt_req_valid, .rt_req_ready, .rt_req_addr, .rt_rsp_valid, .rt_rsp_ready, .rt_rsp_port,
    .end_period, .period_busy, .period_start, .predictor, .predictor_en,
    .stat_hits(st_hits), .stat_vc_hits(st_vc), .stat_misses(st_miss), .stat_pseudo(st_pseudo),
    .stat_stalls(st_stall), .stat_redirects(st_redir), .stat_swaps(st_swap));

  rt_port_model #(.PENALTY(20)) u_rt (
    .clk, .rst_n, .req_valid(rt_req_valid), .req_ready(rt_req_ready), .req_addr(rt_req_addr),
    .rsp_valid(rt_rsp_valid), .rsp_ready(rt_rsp_ready), .rsp_port(rt_rsp_port));

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  // destination k: a documentation-prefix address with a per-destination part
  function automatic logic [127:0] dest(input int k);
    logic [31:0] h;
    h = 32'(k) * 32'h9E37_79B9;
    return {h[31:23], 23'(k * 7), 64'h2001_0db8_0000_0000, h ^ 32'(k)};
  endfunction

  logic [127:0] id_addr [65536];
  int n_out = 0, n_in = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n && out_valid) begin
    chk(out_port == u_rt.port_of(id_addr[out_id]), $sformatf("port of lookup %0d", out_id));
    n_out++;
  end

  task automatic send(input logic [127:0] a);
    id_addr[16'(n_in)] = a;
    in_valid = 1; in_addr = a; in_id = 16'(n_in);
    n_in++;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    #1;
  endtask

  task automatic drain();
    int guard = 0;
    in_valid = 0;
    while (n_out != n_in && guard < 100000) begin @(posedge clk); guard++; end
    chk(n_out == n_in, "every lookup answered");
  endtask

  int recent [32];
  int rec_n = 0;
  function automatic int pick();
    real u;
    int k;
    if (rec_n > 0 && $urandom_range(0, 99) < 85) begin
      k = recent[$urandom_range(0, (rec_n < 32 ? rec_n : 32) - 1)];
    end else begin
      u = real'($urandom) / 4294967296.0;
      k = int'($floor(u * u * u * u * real'(UNIQUE)));
    end
    recent[rec_n % 32] = k;
    rec_n++;
    return k;
  endfunction

  initial begin
    longint t0, t1;
    int h0, v0, m0, p0;
    real hr;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (520) @(posedge clk);
    @(negedge clk);
    t0 = cyc;
    for (int k = 0; k < LOOKUPS / 2; k++) send(dest(pick()));
    drain();
    @(negedge clk); end_period = 1; @(negedge clk); end_period = 0;
    while (!period_start) @(posedge clk);
    @(negedge clk);
    h0 = int'(st_hits); v0 = int'(st_vc); m0 = int'(st_miss); p0 = int'(st_pseudo);
    for (int k = 0; k < LOOKUPS / 2; k++) send(dest(pick()));
    drain();
    t1 = cyc;
    hr = 100.0 * real'(st_hits + st_vc) / real'(n_in);
    $display("trace: %0d lookups over %0d destinations in %0d cycles (%0.3f cycles per lookup)",
             n_in, UNIQUE, t1 - t0, real'(t1 - t0) / real'(n_in));
    $display("  hits %0d, victim hits %0d, misses %0d, pseudo-misses %0d: hit rate %0.2f %%",
             st_hits, st_vc, st_miss, st_pseudo, hr);
    $display("  stall cycles %0d, swaps %0d, redirected lookups %0d, predictor %0d (%0s)",
             st_stall, st_swap, st_redir, predictor, predictor_en ? "on" : "off");
    $display("  second period: hits %0d, victim hits %0d, misses %0d, pseudo %0d",
             int'(st_hits) - h0, int'(st_vc) - v0, int'(st_miss) - m0, int'(st_pseudo) - p0);
    chk(n_in == LOOKUPS, "whole trace sent");
    chk(hr > 70.0, "a skewed trace hits mostly");
    chk(st_vc > 0 && st_redir > 0, "victim cache and randomized index both at work");
    chk(real'(t1 - t0) / real'(n_in) < 6.0, "pipelined cycles per lookup");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
