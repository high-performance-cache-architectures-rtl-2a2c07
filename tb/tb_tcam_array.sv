// tb_tcam_array: the longest-prefix example (1011001*, 10110***, 101*****, key
// 10110010) and random keys against a reference ternary match with priority.
module tb_tcam_array;
  localparam int E = 8, W = 8;
  logic clk = 0, rst_n = 0, flush = 0;
  logic [W-1:0] key = '0, wr_value = '0, wr_mask = '0;
  logic hit;
  logic [2:0] hit_idx, wr_idx = '0;
  logic [7:0] hit_port, wr_port = '0;
  logic [3:0] wr_prio = '0;
  logic wr_en = 0;
  logic [E-1:0] valid_vec;
  logic [W-1:0] ev [E], em [E];
  int checks = 0, failures = 0;

  tcam_array #(.ENTRIES(E), .ADDR_W(W), .PORT_W(8), .PRIO_W(4)) dut (
    .clk, .rst_n, .flush, .key, .hit, .hit_idx, .hit_port, .wr_en, .wr_idx, .wr_value,
    .wr_mask, .wr_port, .wr_prio, .valid_vec, .entry_value(ev), .entry_mask(em));
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

  logic [W-1:0] mv [E], mm [E];
  logic [7:0]   mp [E];
  logic [3:0]   mr [E];
  logic         mval [E];

  task automatic wr(input int i, input logic [W-1:0] v, input int plen, input logic [7:0] p);
    @(negedge clk);
    wr_en = 1; wr_idx = 3'(i); wr_value = v; wr_mask = ~(8'hFF >> plen); wr_port = p;
    wr_prio = 4'(plen);
    mv[i] = v; mm[i] = wr_mask; mp[i] = p; mr[i] = 4'(plen); mval[i] = 1;
    @(negedge clk); wr_en = 0;
  endtask

  initial begin
    for (int i = 0; i < E; i++) mval[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wr(5, 8'b1010_0000, 3, 8'd3);
    wr(2, 8'b1011_0000, 5, 8'd2);
    wr(6, 8'b1011_0010, 7, 8'd1);
    @(negedge clk); key = 8'b1011_0010; #1;
    chk(hit && hit_idx == 3'd6 && hit_port == 8'd1, "longest of three matching prefixes");
    key = 8'b1011_0101; #1;
    chk(hit && hit_idx == 3'd2 && hit_port == 8'd2, "10110*** wins");
    key = 8'b0000_0000; #1;
    chk(!hit, "no match");
    for (int i = 0; i < E; i++)
      if (i != 2 && i != 5 && i != 6)
        wr(i, 8'($urandom), $urandom_range(0, 8), 8'($urandom));
    for (int k = 0; k < 300; k++) begin
      logic eh; int ei; logic [3:0] er;
      @(negedge clk); key = 8'($urandom); #1;
      eh = 0; ei = 0; er = 0;
      for (int i = 0; i < E; i++)
        if (mval[i] && ((key ^ mv[i]) & mm[i]) == 0 && (!eh || mr[i] > er)) begin
          eh = 1; ei = i; er = mr[i];
        end
      chk(hit == eh && (!eh || (hit_idx == 3'(ei) && hit_port == mp[ei])),
          $sformatf("random key %b", key));
    end
    @(negedge clk); flush = 1; @(negedge clk); flush = 0; #1;
    chk(valid_vec == '0, "flush clears all");
    // equal priorities: the lower index wins, wherever it sits in the array
    wr(4, 8'b1100_0000, 2, 8'd40);
    wr(7, 8'b1100_0000, 2, 8'd70);
    wr(1, 8'b1100_0000, 2, 8'd10);
    @(negedge clk); key = 8'b1101_0110; #1;
    chk(hit && hit_idx == 3'd1 && hit_port == 8'd10, "tie goes to the lowest index");
    wr(0, 8'b1100_0000, 2, 8'd5);
    @(negedge clk); #1;
    chk(hit && hit_idx == 3'd0 && hit_port == 8'd5, "tie goes to index 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
