// tb_rsi_predictor: feeds known conflict counts, checks that the set with the
// most conflicts (lowest index on a tie) is named, that the scan takes SETS
// cycles, and that counters are cleared for the next period.
module tb_rsi_predictor;
  localparam int SETS = 512;
  logic clk = 0, rst_n = 0, conflict = 0, end_period = 0;
  logic [8:0] conflict_idx = '0;
  logic busy, done, predictor_en;
  logic [8:0] predictor;
  int checks = 0, failures = 0;

  rsi_predictor dut (.clk, .rst_n, .conflict, .conflict_idx, .end_period, .busy, .done,
                     .predictor, .predictor_en);
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

  task automatic hit_set(input int s, input int n);
    for (int k = 0; k < n; k++) begin
      @(negedge clk); conflict = 1; conflict_idx = 9'(s);
    end
    @(negedge clk); conflict = 0;
  endtask

  task automatic close_period(output int cycles);
    @(negedge clk); end_period = 1;
    @(negedge clk); end_period = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
  endtask

  initial begin
    int cyc;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (520) @(posedge clk);   // counter clearing pass after reset
    hit_set(5, 3); hit_set(300, 7); hit_set(200, 7); hit_set(511, 6); hit_set(0, 2);
    close_period(cyc);
    chk(predictor == 9'd200 && predictor_en, "max conflicts, lowest index on tie");
    chk(cyc == SETS + 1, $sformatf("scan length %0d", cyc));
    // next period: only set 511
    hit_set(511, 1);
    close_period(cyc);
    chk(predictor == 9'd511 && predictor_en, "counters cleared, last set found");
    // empty period
    close_period(cyc);
    chk(!predictor_en, "no conflicts gives no predictor");
    // random period against a model
    begin
      int cnt [SETS];
      int best, bi;
      for (int i = 0; i < SETS; i++) cnt[i] = 0;
      for (int k = 0; k < 400; k++) begin
        int s;
        s = $urandom_range(0, 63) * 8;
        @(negedge clk); conflict = 1; conflict_idx = 9'(s); cnt[s]++;
      end
      @(negedge clk); conflict = 0;
      best = 0; bi = 0;
      for (int i = 0; i < SETS; i++) if (cnt[i] > best) begin best = cnt[i]; bi = i; end
      close_period(cyc);
      chk(predictor == 9'(bi), $sformatf("random period: got %0d expected %0d", predictor, bi));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
