// tb_tcam_route_cache: set choice by overlap count, LRU replacement inside a set
// only, match priority (high-priority mark, then lower set, then longer prefix),
// overwrite of an identical entry, and flush. Small configuration: 8 entries,
// two sets of 5 and 3, 16-bit addresses.
module tb_tcam_route_cache;
  import rc_pkg::*;
  localparam int E = 8, W = 16;
  logic clk = 0, rst_n = 0, flush = 0;
  repl_mode_e repl_mode = REPL_LRU;
  logic lk_valid = 0, lk_hit, lk_label;
  logic [W-1:0] lk_key = '0, fill_value = '0, fill_mask = '0;
  logic [2:0] lk_idx, fill_idx;
  logic [7:0] lk_port, fill_port = '0, fill_n = '0;
  logic fill_valid = 0, fill_hp = 0, fill_label = 0, fill_evict;
  logic [31:0] lookups;
  int checks = 0, failures = 0;

  tcam_route_cache #(.ENTRIES(E), .NUM_SETS(2), .SET_SIZE('{0: 5, 1: 3, default: 0}), .ADDR_W(W)) dut (
    .clk, .rst_n, .flush, .repl_mode, .lk_valid, .lk_key, .lk_hit, .lk_idx, .lk_port, .lk_label,
    .fill_valid, .fill_value, .fill_mask, .fill_port, .fill_n, .fill_hp, .fill_label,
    .fill_idx, .fill_evict, .lookups);
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

  task automatic put(input logic [W-1:0] v, input int plen, input int p, input int n,
                     input logic hp, output int idx, output logic ev);
    @(negedge clk);
    fill_valid = 1; fill_value = v; fill_mask = ~(16'hFFFF >> plen); fill_port = 8'(p);
    fill_n = 8'(n); fill_hp = hp; fill_label = (n > 0); #1;
    idx = int'(fill_idx); ev = fill_evict;
    @(negedge clk); fill_valid = 0; fill_hp = 0;
  endtask

  task automatic look(input logic [W-1:0] k, output logic h, output int p, output int idx);
    @(negedge clk);
    lk_valid = 1; lk_key = k; #1;
    h = lk_hit; p = int'(lk_port); idx = int'(lk_idx);
    @(negedge clk); lk_valid = 0;
  endtask

  initial begin
    int idx, p, li; logic ev, h;
    int set1_idx [3];
    repeat (3) @(posedge clk);
    rst_n = 1;
    // three entries with N >= 1 go to set 1 (entries 5..7)
    for (int k = 0; k < 3; k++) begin
      put(16'h1000 + 16'(k << 8), 8, 10 + k, 1 + k, 0, idx, ev);
      chk(idx >= 5 && !ev, $sformatf("N>=1 entry %0d placed in set 1 (idx %0d)", k, idx));
      set1_idx[k] = idx;
    end
    // touch entries 1 and 2 of set 1; entry 0 becomes LRU
    look(16'h1155, h, p, li); chk(h && p == 11, "hit 11xx");
    look(16'h1255, h, p, li); chk(h && p == 12, "hit 12xx");
    // a fourth N>=1 entry must evict 10xx, staying in set 1
    put(16'h1300, 8, 13, 5, 0, idx, ev);
    chk(idx == set1_idx[0] && ev, "LRU victim of set 1 replaced");
    look(16'h1001, h, p, li); chk(!h, "evicted entry gone");
    look(16'h1301, h, p, li); chk(h && p == 13, "new entry hits");
    // N = 0 entries go to set 0
    put(16'h2000, 4, 20, 0, 0, idx, ev);
    chk(idx < 5 && !ev, "N=0 entry placed in set 0");
    // priority: short set-0 prefix 2*** vs long set-1 prefix 2100
    put(16'h2100, 8, 21, 2, 0, idx, ev);
    look(16'h2155, h, p, li); chk(h && p == 20, "set 0 beats set 1 despite shorter prefix");
    // within set 0 the longer prefix wins
    put(16'h2200, 8, 22, 0, 0, idx, ev);
    look(16'h2255, h, p, li); chk(h && p == 22, "longer prefix wins inside a set");
    // high-priority mark wins over everything
    put(16'h2150, 12, 23, 3, 1, idx, ev);
    look(16'h2155, h, p, li); chk(h && p == 23, "high-priority entry wins");
    // identical value/mask overwrites (port correction)
    put(16'h2200, 8, 30, 0, 0, li, ev);
    look(16'h2201, h, p, idx); chk(h && p == 30 && idx == li, "identical entry overwritten");
    chk(lookups == 32'd8, $sformatf("lookup counter %0d", lookups));
    @(negedge clk); flush = 1; @(negedge clk); flush = 0;
    look(16'h2201, h, p, idx); chk(!h, "flush empties the cache");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
