// port_error_sampler: decides which cache hits are also checked against the
// routing table, to find port errors (the cached entry gives another port than
// the longest matching entry of the full table would).
//
// For each decided lookup (lookup = 1, hit says whether it hit the cache) the
// combinational output sample asks for a routing-table search of a hit:
//   SAMP_NONE       never;
//   SAMP_INTERVAL   one search every M lookups: the M-th lookup is checked if it
//                   hit (a miss searches the table anyway);
//   SAMP_SELECTIVE  only hits on labeled entries (entries likely to cause port
//                   errors), every M-th of those hits;
//   SAMP_ADAPTIVE   only hits on labeled entries, with a per-entry rate: each
//                   entry has an interval L and a countdown C (both 0 when the
//                   entry is written). A hit with C = 0 is checked; a hit with
//                   C > 0 is not, and C decreases by 1. A clean check sets
//                   L = L + 1 (saturating) and C = L, so a quiet entry is checked
//                   less and less often; a port error sets L = C = 0;
//   SAMP_EVERY_HIT  every hit (the ideal reference).
// check_done/check_idx/check_error report the outcome of a search this block
// asked for. fill/fill_idx report an entry written into the cache.
// The techniques, M = 3 and the adaptive rule (rate up by one after a clean
// check, down by one for each unchecked hit) follow the published schemes; the
// two-register form of the adaptive rate and the counter for selective sampling
// are this design's readings.
//
// Timing: sample is combinational in the lookup cycle; the counters update at the
// clock edge of that cycle.
module port_error_sampler
  import rc_pkg::*;
#(
  parameter int ENTRIES = 128,
  parameter int M       = 3,
  parameter int RATE_W  = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  samp_mode_e                 mode,
  input  logic                       lookup,
  input  logic                       hit,
  input  logic [$clog2(ENTRIES)-1:0] hit_idx,
  input  logic                       hit_label,
  input  logic                       fill,
  input  logic [$clog2(ENTRIES)-1:0] fill_idx,
  input  logic                       check_done,
  input  logic [$clog2(ENTRIES)-1:0] check_idx,
  input  logic                       check_error,
  output logic                       sample
);
  localparam int MW = (M > 1) ? $clog2(M) : 1;

  logic [MW-1:0]     icnt;   // lookups since the last interval sample
  logic [MW-1:0]     scnt;   // labeled hits since the last selective sample
  logic [RATE_W-1:0] L [ENTRIES];
  logic [RATE_W-1:0] C [ENTRIES];

  always_comb begin
    sample = 1'b0;
    if (lookup && hit) begin
      unique case (mode)
        SAMP_INTERVAL:  sample = (icnt == MW'(M - 1));
        SAMP_SELECTIVE: sample = hit_label && (scnt == MW'(M - 1));
        SAMP_ADAPTIVE:  sample = hit_label && (C[hit_idx] == '0);
        SAMP_EVERY_HIT: sample = 1'b1;
        default:        sample = 1'b0;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      icnt <= '0;
      scnt <= '0;
      for (int i = 0; i < ENTRIES; i++) begin
        L[i] <= '0;
        C[i] <= '0;
      end
    end else begin
      if (lookup)
        icnt <= (icnt == MW'(M - 1)) ? '0 : icnt + 1'b1;
      if (lookup && hit && hit_label)
        scnt <= (scnt == MW'(M - 1)) ? '0 : scnt + 1'b1;
      if (mode == SAMP_ADAPTIVE && lookup && hit && hit_label && C[hit_idx] != '0)
        C[hit_idx] <= C[hit_idx] - 1'b1;
      if (check_done) begin
        if (check_error) begin
          L[check_idx] <= '0;
          C[check_idx] <= '0;
        end else begin
          L[check_idx] <= (L[check_idx] == '1) ? L[check_idx] : L[check_idx] + 1'b1;
          C[check_idx] <= (L[check_idx] == '1) ? L[check_idx] : L[check_idx] + 1'b1;
        end
      end
      if (fill) begin
        L[fill_idx] <= '0;
        C[fill_idx] <= '0;
      end
    end
  end

endmodule
