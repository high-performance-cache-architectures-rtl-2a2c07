// tb_victim_cache: random writes (replacement and swap) and lookups against a
// reference model that tracks, per way, the time it was last written; the model
// picks the first invalid way, else the way written longest ago.
module tb_victim_cache;
  localparam int E = 16;
  logic clk = 0, rst_n = 0, flush = 0;
  logic [127:0] lk_addr = '0, wr_addr = '0;
  logic lk_hit;
  logic [3:0] lk_way, wr_way = '0;
  logic [7:0] lk_port, wr_port = '0;
  logic wr_en = 0, wr_use_way = 0, wr_valid = 0;
  int checks = 0, failures = 0;

  victim_cache dut (.clk, .rst_n, .flush, .lk_addr, .lk_hit, .lk_way, .lk_port,
                    .wr_en, .wr_use_way, .wr_way, .wr_addr, .wr_port, .wr_valid);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  // model
  logic [127:0] m_tag [E];
  logic [7:0]   m_port [E];
  logic         m_vld [E];
  int           m_time [E];
  int           now = 0;

  function automatic int m_pick();
    int w = -1, oldest = 0;
    for (int i = 0; i < E; i++) if (!m_vld[i] && w < 0) w = i;
    if (w >= 0) return w;
    w = 0; oldest = m_time[0];
    for (int i = 1; i < E; i++) if (m_time[i] < oldest) begin oldest = m_time[i]; w = i; end
    return w;
  endfunction

  function automatic logic [127:0] a_of(input int k);
    return {96'hCAFE_0000_0000_0000_0000_0000, 32'(k)};
  endfunction

  initial begin
    for (int i = 0; i < E; i++) begin m_vld[i] = 0; m_time[i] = -E + i; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int step = 0; step < 600; step++) begin
      int w, k;
      @(negedge clk);
      // lookup a random known address
      k = $urandom_range(0, 39);
      lk_addr = a_of(k); #1;
      begin
        logic exp_hit; logic [7:0] exp_port; int exp_way;
        exp_hit = 0; exp_port = 0; exp_way = 0;
        for (int i = 0; i < E; i++) if (m_vld[i] && m_tag[i] == lk_addr && !exp_hit) begin
          exp_hit = 1; exp_port = m_port[i]; exp_way = i; end
        chk(lk_hit == exp_hit && (!exp_hit || (lk_port == exp_port && lk_way == 4'(exp_way))),
            $sformatf("lookup %0d: hit %0d/%0d port %0d/%0d way %0d/%0d", k, lk_hit, exp_hit, lk_port, exp_port, lk_way, exp_way));
      end
      // write
      if (step % 97 == 96) begin
        flush = 1; wr_en = 0;
        for (int i = 0; i < E; i++) m_vld[i] = 0;
      end else begin
        flush = 0;
        wr_en = 1;
        wr_use_way = ($urandom_range(0, 3) == 0);
        wr_way = 4'($urandom_range(0, E - 1));
        k = $urandom_range(0, 39);
        wr_addr = a_of(k); wr_port = 8'($urandom); wr_valid = ($urandom_range(0, 9) != 0);
        w = wr_use_way ? int'(wr_way) : m_pick();
        m_tag[w] = wr_addr; m_port[w] = wr_port; m_vld[w] = wr_valid; m_time[w] = now;
      end
      now++;
      @(posedge clk); #1;
      wr_en = 0; flush = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
