// rsi_predictor: conflict-miss statistics for the randomly selected index scheme.
//
// One saturating counter per direct-mapped set counts the conflict misses of the
// current prediction period (a fill that displaces a valid entry of that set).
// end_period starts a scan that reads one counter per cycle, clears it, and keeps
// the set with the largest count (lowest index on a tie). After SETS cycles it
// pulses done; predictor is that set and predictor_en says whether any conflict
// was counted at all. The set becomes the predictor of the next period, whose
// index selection steers addresses away from it. The published scheme says only
// that the predictor comes from conflict-miss statistics of the previous period;
// the counters and the sequential scan are this design's choice.
//
// The counters are a RAM-style array without reset (two read and two write
// ports). After reset the block spends SETS cycles writing zero to every counter;
// conflicts in that time are not counted and an end_period is held until the
// clearing pass is over.
//
// Timing: conflict is sampled every cycle, also during a scan (a conflict on a
// set already scanned counts toward the next period). end_period is ignored while
// busy. done is a one-cycle pulse SETS+1 cycles after end_period (later if
// end_period came during the clearing pass after reset).
module rsi_predictor #(
  parameter int SETS  = 512,
  parameter int CNT_W = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    conflict,
  input  logic [$clog2(SETS)-1:0] conflict_idx,
  input  logic                    end_period,
  output logic                    busy,
  output logic                    done,
  output logic [$clog2(SETS)-1:0] predictor,
  output logic                    predictor_en
);
  localparam int IW = $clog2(SETS);

  logic [CNT_W-1:0] cnt [SETS];
  logic             init;        // clearing pass after reset
  logic             pend;        // end_period seen during the clearing pass
  logic [IW-1:0]    scan_i;
  logic [CNT_W-1:0] best_cnt;
  logic [IW-1:0]    best_idx;

  logic             count;
  logic [CNT_W-1:0] cnt_c, cnt_s;
  assign count = conflict && !init;
  assign cnt_c = cnt[conflict_idx];
  assign cnt_s = cnt[scan_i];

  // counter array: increment port and read-and-clear port (the clear wins, and
  // keeps a conflict of the same cycle on the same set)
  always_ff @(posedge clk) begin
    if (count && cnt_c != '1)
      cnt[conflict_idx] <= cnt_c + 1'b1;
    if (busy || init)
      cnt[scan_i] <= (count && conflict_idx == scan_i) ? CNT_W'(1) : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init         <= 1'b1;
      pend         <= 1'b0;
      busy         <= 1'b0;
      done         <= 1'b0;
      scan_i       <= '0;
      best_cnt     <= '0;
      best_idx     <= '0;
      predictor    <= '0;
      predictor_en <= 1'b0;
    end else begin
      done <= 1'b0;
      if (init) begin
        if (end_period) pend <= 1'b1;
        if (scan_i == IW'(SETS - 1)) begin
          init   <= 1'b0;
          scan_i <= '0;
        end else begin
          scan_i <= scan_i + 1'b1;
        end
      end else if (busy) begin
        if (cnt_s > best_cnt) begin
          best_cnt <= cnt_s;
          best_idx <= scan_i;
        end
        if (scan_i == IW'(SETS - 1)) begin
          busy         <= 1'b0;
          done         <= 1'b1;
          predictor    <= (cnt_s > best_cnt) ? scan_i : best_idx;
          predictor_en <= (cnt_s > best_cnt) || (best_cnt != '0);
        end else begin
          scan_i <= scan_i + 1'b1;
        end
      end else if (end_period || pend) begin
        pend     <= 1'b0;
        busy     <= 1'b1;
        scan_i   <= '0;
        best_cnt <= '0;
        best_idx <= '0;
      end
    end
  end

endmodule
