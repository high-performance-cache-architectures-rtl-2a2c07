// tb_miss_buffer: primary and secondary (pseudo-miss) slots, in-order answers
// from the routing table, fills, in-order retirement, the full flag, and a
// secondary allocated in the same cycle as its answer.
module tb_miss_buffer;
  localparam int D = 8;
  logic clk = 0, rst_n = 0;
  logic [127:0] probe_addr = '0, alloc_addr = '0;
  logic probe_hit, full;
  logic alloc = 0, alloc_primary = 0;
  logic [15:0] alloc_id = '0;
  logic [8:0]  alloc_idx = '0;
  logic rt_req_valid, rt_rsp_ready;
  logic [127:0] rt_req_addr;
  logic rt_rsp_valid = 0;
  logic [7:0] rt_rsp_port = '0;
  logic fill_valid;
  logic [127:0] fill_addr;
  logic [8:0] fill_idx;
  logic [7:0] fill_port;
  logic ret_valid, ret_ready = 0, ret_pseudo;
  logic [15:0] ret_id;
  logic [7:0] ret_port;
  int checks = 0, failures = 0;

  miss_buffer #(.DEPTH(D)) dut (
    .clk, .rst_n, .probe_addr, .probe_hit, .alloc, .alloc_primary, .alloc_id, .alloc_addr,
    .alloc_idx, .full, .rt_req_valid, .rt_req_ready(1'b1), .rt_req_addr,
    .rt_rsp_valid, .rt_rsp_ready, .rt_rsp_port, .fill_ready(1'b1), .fill_valid, .fill_addr,
    .fill_idx, .fill_port, .ret_valid, .ret_ready, .ret_id, .ret_port, .ret_pseudo);
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

  localparam logic [127:0] A = 128'hA, B = 128'hB, C = 128'hC;

  // allocate: probe decides primary/secondary like the pipeline does
  task automatic do_alloc(input logic [127:0] a, input int id, input int idx,
                          input logic exp_primary);
    @(negedge clk);
    probe_addr = a; #1;
    chk(probe_hit == !exp_primary, $sformatf("probe of id %0d", id));
    alloc = 1; alloc_primary = !probe_hit; alloc_addr = a; alloc_id = 16'(id);
    alloc_idx = 9'(idx); #1;
    chk(rt_req_valid == exp_primary && (!exp_primary || rt_req_addr == a),
        $sformatf("search request for id %0d", id));
    @(negedge clk); alloc = 0;
  endtask

  task automatic answer(input logic [7:0] p, input logic [127:0] exp_a, input int exp_idx);
    @(negedge clk); rt_rsp_valid = 1; rt_rsp_port = p; #1;
    chk(fill_valid && fill_addr == exp_a && fill_idx == 9'(exp_idx) && fill_port == p,
        "fill of answered search");
    @(negedge clk); rt_rsp_valid = 0;
  endtask

  task automatic expect_ret(input int id, input logic [7:0] p, input logic pseudo);
    @(negedge clk); #1;
    chk(ret_valid && ret_id == 16'(id) && ret_port == p && ret_pseudo == pseudo,
        $sformatf("retire id %0d (got v=%0d id=%0d port=%0d ps=%0d)", id, ret_valid, ret_id,
                  ret_port, ret_pseudo));
    ret_ready = 1;
    @(negedge clk); ret_ready = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    do_alloc(A, 1, 10, 1'b1);
    do_alloc(A, 2, 10, 1'b0);
    do_alloc(B, 3, 11, 1'b1);
    #1 chk(!ret_valid, "nothing ready before an answer");
    answer(8'd7, A, 10);
    expect_ret(1, 8'd7, 1'b0);
    expect_ret(2, 8'd7, 1'b1);
    #1 chk(!ret_valid, "B still waiting");
    answer(8'd9, B, 11);
    expect_ret(3, 8'd9, 1'b0);
    // secondary allocated in the cycle its answer arrives
    do_alloc(C, 4, 12, 1'b1);
    @(negedge clk);
    probe_addr = C; #1;
    chk(probe_hit, "probe C");
    alloc = 1; alloc_primary = 0; alloc_addr = C; alloc_id = 16'd5;
    rt_rsp_valid = 1; rt_rsp_port = 8'd3;
    @(negedge clk); alloc = 0; rt_rsp_valid = 0;
    expect_ret(4, 8'd3, 1'b0);
    expect_ret(5, 8'd3, 1'b1);
    // fill to full
    for (int k = 0; k < D; k++) begin
      chk(!full, "not full yet");
      do_alloc(128'h100 + 128'(k), 10 + k, k, 1'b1);
    end
    #1 chk(full, "full after DEPTH allocations");
    for (int k = 0; k < D; k++) answer(8'(k + 20), 128'h100 + 128'(k), k);
    for (int k = 0; k < D; k++) expect_ret(10 + k, 8'(k + 20), 1'b0);
    #1 chk(!full && !ret_valid, "drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
