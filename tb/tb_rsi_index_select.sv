// tb_rsi_index_select: checks index selection without a predictor (original top
// bits), with a predictor (redirection to bits 89..118, then 30..88), stability of
// the chosen bits inside a period, and that a disarmed predictor restores the
// original index.
module tb_rsi_index_select;
  logic clk = 0, rst_n = 0, new_period = 0, pv = 0;
  logic [8:0]   pin = '0;
  logic [127:0] addr = '0;
  logic [8:0]   index;
  logic         redirected;
  int checks = 0, failures = 0;

  rsi_index_select dut (.clk, .rst_n, .new_period, .predictor_in(pin), .predictor_valid_in(pv),
                        .seed(32'h1234_5678), .addr, .index, .redirected);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [127:0] rnd128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  task automatic start_period(input logic [8:0] p, input logic v);
    @(negedge clk); pin = p; pv = v; new_period = 1;
    @(negedge clk); new_period = 0;
  endtask

  initial begin
    logic [8:0] i1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // no predictor: original index = bits 127..119
    for (int k = 0; k < 50; k++) begin
      @(negedge clk); addr = rnd128(); #1;
      chk(index == addr[127:119] && !redirected, "original index without predictor");
    end
    // predictor 9'h0A5
    start_period(9'h0A5, 1'b1);
    for (int k = 0; k < 50; k++) begin
      @(negedge clk); addr = rnd128(); #1;
      if (addr[127:119] != 9'h0A5)
        chk(index == addr[127:119] && !redirected, "non-predictor address keeps its index");
    end
    for (int k = 0; k < 50; k++) begin
      @(negedge clk);
      addr = rnd128(); addr[127:119] = 9'h0A5;
      addr[118:89] = '0; #1;
      chk(redirected && index == 9'h000, "redirected to range 89..118 (all zero)");
      addr[118:89] = '1; #1;
      chk(index == 9'h1FF, "redirected to range 89..118 (all one)");
      addr[118:89] = {$urandom, $urandom}; #1;
      i1 = index;
      chk(i1 != 9'h0A5, "redirected index differs from predictor");
      addr[88:0] = ~addr[88:0]; #1;
      if (i1 != 9'h0A5) chk(index == i1, "bits 0..88 do not affect range-2 index");
      repeat (3) @(negedge clk); #1;
      chk(index == i1, "positions stay fixed within a period");
    end
    // predictor 0: candidate 2 all-zero equals predictor -> candidate 3 (30..88)
    start_period(9'h000, 1'b1);
    for (int k = 0; k < 20; k++) begin
      @(negedge clk);
      addr = rnd128(); addr[127:119] = 9'h000; addr[118:89] = '0;
      addr[88:30] = '1; #1;
      chk(index == 9'h1FF, "falls to range 30..88");
      addr[88:30] = '0; addr[29:0] = '1; #1;
      chk(index == 9'h1FF, "falls to range 0..29");
    end
    // disarmed
    start_period(9'h000, 1'b0);
    for (int k = 0; k < 20; k++) begin
      @(negedge clk); addr = rnd128(); addr[127:119] = 9'h000; #1;
      chk(index == 9'h000 && !redirected, "disarmed predictor");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
