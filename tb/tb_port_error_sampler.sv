// tb_port_error_sampler: hit sequences for each sampling technique with the
// expected pattern of checks worked out by hand (M = 3).
module tb_port_error_sampler;
  import rc_pkg::*;
  logic clk = 0, rst_n = 0;
  samp_mode_e mode = SAMP_NONE;
  logic lookup = 0, hit = 0, hit_label = 0, fill = 0, check_done = 0, check_error = 0;
  logic [2:0] hit_idx = '0, fill_idx = '0, check_idx = '0;
  logic sample;
  int checks = 0, failures = 0;

  port_error_sampler #(.ENTRIES(8), .M(3)) dut (.clk, .rst_n, .mode, .lookup, .hit, .hit_idx,
    .hit_label, .fill, .fill_idx, .check_done, .check_idx, .check_error, .sample);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  // one lookup; returns whether a check was requested; optional check result
  task automatic lk(input logic h, input int idx, input logic lbl, input logic exp,
                    input string what, input logic err = 0);
    @(negedge clk);
    lookup = 1; hit = h; hit_idx = 3'(idx); hit_label = lbl; #1;
    chk(sample == exp, what);
    @(negedge clk);
    lookup = 0;
    if (exp && h) begin
      check_done = 1; check_idx = 3'(idx); check_error = err;
      @(negedge clk);
      check_done = 0; check_error = 0;
    end
  endtask

  task automatic reset_dut();
    @(negedge clk); rst_n = 0; @(negedge clk); rst_n = 1;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // none
    mode = SAMP_NONE;
    for (int k = 0; k < 6; k++) lk(1, 1, 1, 0, "none never samples");
    // interval: every 3rd lookup, only if it hit
    reset_dut(); mode = SAMP_INTERVAL;
    lk(1, 0, 0, 0, "interval 1"); lk(1, 0, 0, 0, "interval 2"); lk(1, 0, 0, 1, "interval 3");
    lk(1, 0, 0, 0, "interval 4"); lk(1, 0, 0, 0, "interval 5"); lk(0, 0, 0, 0, "interval 6 miss");
    lk(1, 0, 0, 0, "interval 7"); lk(1, 0, 0, 0, "interval 8"); lk(1, 0, 0, 1, "interval 9");
    // selective: every 3rd hit on a labeled entry
    reset_dut(); mode = SAMP_SELECTIVE;
    lk(1, 2, 1, 0, "sel L1"); lk(1, 3, 0, 0, "sel unlabeled"); lk(1, 2, 1, 0, "sel L2");
    lk(1, 3, 0, 0, "sel unlabeled"); lk(1, 4, 1, 1, "sel L3"); lk(1, 2, 1, 0, "sel L4");
    // adaptive, entry 2 labeled
    reset_dut(); mode = SAMP_ADAPTIVE;
    lk(1, 2, 1, 1, "ad hit1 checked");            // L=1 C=1
    lk(1, 2, 1, 0, "ad hit2 skipped");            // C=0
    lk(1, 2, 1, 1, "ad hit3 checked");            // L=2 C=2
    lk(1, 2, 1, 0, "ad hit4 skipped");            // C=1
    lk(1, 5, 0, 0, "ad unlabeled never");
    lk(1, 2, 1, 0, "ad hit5 skipped");            // C=0
    lk(1, 2, 1, 1, "ad hit6 checked, error", 1);  // L=0 C=0
    lk(1, 2, 1, 1, "ad hit7 checked after error"); // L=1 C=1
    lk(1, 2, 1, 0, "ad hit8 skipped");
    @(negedge clk); fill = 1; fill_idx = 3'd2; @(negedge clk); fill = 0;
    lk(1, 2, 1, 1, "ad refilled entry checked");
    // every hit
    reset_dut(); mode = SAMP_EVERY_HIT;
    lk(1, 1, 0, 1, "eh 1"); lk(1, 2, 1, 1, "eh 2"); lk(0, 2, 1, 0, "eh miss");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
