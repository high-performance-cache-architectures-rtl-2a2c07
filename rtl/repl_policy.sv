// repl_policy: replacement bookkeeping and victim choice for one group of cache
// entries (the whole cache, or one set of a set-partitioned cache).
//
// Per entry it keeps a recency rank (0 = most recently used; the ranks of all
// entries form a permutation), an access count, the time of the last access and
// the average interval between accesses. Time is the lookup counter `now`.
// A touch (hit) or fill makes the entry most recent; a touch also increments its
// access count and updates its average interval to (old + new interval) / 2; a
// fill restarts the count at 1 with no interval history.
//
// Victim choice (combinational): the first invalid entry if there is one;
// otherwise, by `mode`:
//   LRU   the entry with the largest rank;
//   LAR   among the N_WIN least recently used entries, the one with the fewest
//         accesses (the less recent one on a tie);
//   RLAI  among the N_WIN least recently used entries, those idle for longer than
//         their average interval are inactive; the one exceeding its average by
//         most is evicted; if none is inactive, the LRU entry.
// LAR's "lowest access count among the bottom N recently used", N = 1/4 of the
// cache, and RLAI's average interval counted in lookups follow the policies as
// published. The halving average, the tie rules and RLAI's ordering by excess
// idle time are this design's readings.
//
// Timing: touch and fill are applied at the clock edge; if both name the same
// entry in one cycle, the fill wins.
module repl_policy
  import rc_pkg::*;
#(
  parameter int ENTRIES = 128,
  parameter int N_WIN   = (ENTRIES / 4 > 0) ? ENTRIES / 4 : 1,
  parameter int CNT_W   = 16,
  parameter int T_W     = 32
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  repl_mode_e                 mode,
  input  logic [T_W-1:0]             now,
  input  logic                       touch,
  input  logic [$clog2(ENTRIES)-1:0] touch_idx,
  input  logic                       fill,
  input  logic [$clog2(ENTRIES)-1:0] fill_idx,
  input  logic [ENTRIES-1:0]         valid_vec,
  output logic [$clog2(ENTRIES)-1:0] victim,
  output logic                       victim_is_free
);
  localparam int IW = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;

  logic [IW-1:0]    rank  [ENTRIES];
  logic [CNT_W-1:0] acc   [ENTRIES];
  logic [T_W-1:0]   last  [ENTRIES];
  logic [T_W-1:0]   avg   [ENTRIES];
  logic             hist  [ENTRIES];

  // which entry becomes most recent this cycle
  logic          upd;
  logic [IW-1:0] upd_idx;
  assign upd     = touch || fill;
  assign upd_idx = fill ? IW'(fill_idx) : IW'(touch_idx);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) begin
        rank[i] <= IW'(i);
        acc[i]  <= '0;
        last[i] <= '0;
        avg[i]  <= '0;
        hist[i] <= 1'b0;
      end
    end else if (upd) begin
      for (int i = 0; i < ENTRIES; i++)
        if (rank[i] < rank[upd_idx]) rank[i] <= rank[i] + 1'b1;
      rank[upd_idx] <= '0;
      last[upd_idx] <= now;
      if (fill) begin
        acc[upd_idx]  <= CNT_W'(1);
        avg[upd_idx]  <= '0;
        hist[upd_idx] <= 1'b0;
      end else begin
        if (acc[upd_idx] != '1) acc[upd_idx] <= acc[upd_idx] + 1'b1;
        avg[upd_idx]  <= hist[upd_idx] ? T_W'(({1'b0, avg[upd_idx]} + {1'b0, now - last[upd_idx]}) >> 1)
                                       : now - last[upd_idx];
        hist[upd_idx] <= 1'b1;
      end
    end
  end

  always_comb begin
    logic          found;
    logic [IW-1:0] lru, pick;
    logic [CNT_W-1:0] best_acc;
    logic [T_W-1:0]   best_ex, idle;
    logic [IW-1:0]    best_rank;
    lru = '0;
    for (int i = 0; i < ENTRIES; i++)
      if (rank[i] == IW'(ENTRIES - 1)) lru = IW'(i);
    pick      = lru;
    found     = 1'b0;
    best_acc  = '1;
    best_ex   = '0;
    best_rank = '0;
    idle      = '0;
    case (mode)
      REPL_LAR: begin
        for (int i = 0; i < ENTRIES; i++)
          if (rank[i] >= IW'(ENTRIES - N_WIN)) begin
            if (!found || acc[i] < best_acc || (acc[i] == best_acc && rank[i] > best_rank)) begin
              found     = 1'b1;
              pick      = IW'(i);
              best_acc  = acc[i];
              best_rank = rank[i];
            end
          end
      end
      REPL_RLAI: begin
        for (int i = 0; i < ENTRIES; i++) begin
          idle = now - last[i];
          if (rank[i] >= IW'(ENTRIES - N_WIN) && idle > avg[i]) begin
            if (!found || (idle - avg[i]) > best_ex) begin
              found   = 1'b1;
              pick    = IW'(i);
              best_ex = idle - avg[i];
            end
          end
        end
      end
      default: ;
    endcase
    victim_is_free = 1'b0;
    for (int i = ENTRIES - 1; i >= 0; i--)
      if (!valid_vec[i]) begin
        victim_is_free = 1'b1;
        pick           = IW'(i);
      end
    victim = pick;
  end

endmodule
