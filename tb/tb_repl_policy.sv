// tb_repl_policy: random touches and fills with the policy switched between LRU,
// LAR and RLAI every cycle; the victim is compared with a reference model that
// orders entries by the time of their last use.
module tb_repl_policy;
  import rc_pkg::*;
  localparam int E = 8, N = 2;
  logic clk = 0, rst_n = 0;
  repl_mode_e mode = REPL_LRU;
  logic [31:0] now = '0;
  logic touch = 0, fill = 0;
  logic [2:0] touch_idx = '0, fill_idx = '0, victim;
  logic [E-1:0] valid_vec = '1;
  logic victim_is_free;
  int checks = 0, failures = 0;
  int n_lar_diff = 0, n_rlai_diff = 0;

  repl_policy #(.ENTRIES(E), .N_WIN(N)) dut (.clk, .rst_n, .mode, .now, .touch, .touch_idx,
    .fill, .fill_idx, .valid_vec, .victim, .victim_is_free);
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

  int seq [E], acc [E];
  longint last [E], avg [E];
  bit hist [E];
  int order = 0;

  function automatic int m_lru();
    int w = 0;
    for (int i = 1; i < E; i++) if (seq[i] < seq[w]) w = i;
    return w;
  endfunction

  function automatic bit in_window(input int i);
    int older = 0;
    for (int j = 0; j < E; j++) if (seq[j] < seq[i]) older++;
    return older < N;
  endfunction

  function automatic int m_victim(input repl_mode_e md);
    int w;
    longint best;
    bit found;
    for (int i = 0; i < E; i++) if (!valid_vec[i]) return i;
    w = m_lru();
    found = 0; best = 0;
    if (md == REPL_LAR) begin
      for (int i = 0; i < E; i++)
        if (in_window(i) && (!found || acc[i] < best || (acc[i] == best && seq[i] < seq[w]))) begin
          found = 1; w = i; best = acc[i];
        end
    end else if (md == REPL_RLAI) begin
      for (int i = 0; i < E; i++) begin
        longint idle = longint'(now) - last[i];
        if (in_window(i) && idle > avg[i] && (!found || idle - avg[i] > best)) begin
          found = 1; w = i; best = idle - avg[i];
        end
      end
    end
    return w;
  endfunction

  initial begin
    for (int i = 0; i < E; i++) begin
      seq[i] = -i; acc[i] = 0; last[i] = 0; avg[i] = 0; hist[i] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int step = 0; step < 3000; step++) begin
      int k;
      @(negedge clk);
      now = now + 32'($urandom_range(1, 3));
      valid_vec = '1;
      if ($urandom_range(0, 19) == 0) valid_vec[$urandom_range(0, E - 1)] = 1'b0;
      for (int md = 0; md < 3; md++) begin
        mode = repl_mode_e'(md); #1;
        chk(int'(victim) == m_victim(mode) && victim_is_free == (valid_vec != '1),
            $sformatf("step %0d mode %0d victim %0d expected %0d", step, md, victim, m_victim(mode)));
      end
      if (m_victim(REPL_LAR) != m_lru()) n_lar_diff++;
      if (m_victim(REPL_RLAI) != m_lru()) n_rlai_diff++;
      mode = repl_mode_e'($urandom_range(0, 2));
      // skewed accesses: low entries are hot
      k = ($urandom_range(0, 3) == 0) ? $urandom_range(0, E - 1) : $urandom_range(0, 2);
      touch = 0; fill = 0;
      if ($urandom_range(0, 5) == 0) begin
        fill = 1; fill_idx = 3'(m_victim(mode)); k = int'(fill_idx);
        acc[k] = 1; avg[k] = 0; hist[k] = 0;
      end else begin
        touch = 1; touch_idx = 3'(k);
        acc[k] = acc[k] + 1;
        avg[k] = hist[k] ? (avg[k] + (longint'(now) - last[k])) / 2 : longint'(now) - last[k];
        hist[k] = 1;
      end
      last[k] = longint'(now);
      order++; seq[k] = order;
      @(posedge clk); #1;
      touch = 0; fill = 0;
    end
    chk(n_lar_diff > 0 && n_rlai_diff > 0, "LAR and RLAI differ from LRU at least once");
    $display("LAR differs from LRU %0d times, RLAI %0d times", n_lar_diff, n_rlai_diff);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
