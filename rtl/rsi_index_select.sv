// rsi_index_select: Index Selection (IS) stage of the randomly selected index
// (RSI) scheme for a direct-mapped IPv6 route cache.
//
// Four candidate indexes of IDX_W bits are formed from the destination address:
//   candidate 1: the original index, address bits [ADDR_W-1 -: IDX_W]
//                (bits 127..119 for IPv6 and a 512-entry cache);
//   candidate 2: IDX_W bits at random positions in [ADDR_W-IDX_W-30, ADDR_W-IDX_W-1]
//                (89..118);
//   candidate 3: IDX_W bits at random positions in [30, ADDR_W-IDX_W-31] (30..88);
//   candidate 4: IDX_W bits at random positions in [0, 29].
// When a predictor (the set that suffered most conflict misses in the last
// period) is armed, the first candidate that differs from the predictor is used;
// with no predictor the original index is always used. The ranges, the priority
// order 1..4 and keeping the chosen bit positions fixed for a whole period follow
// the scheme as published; taking the original index from the top bits, the
// first-non-matching reading of the priority and the LFSR that draws the
// positions are this design's choices.
//
// Timing: index/redirected are combinational from addr. new_period (one cycle)
// loads predictor_in/predictor_valid_in and draws new bit positions from a
// free-running 32-bit LFSR, effective from the next cycle. seed is loaded into
// the LFSR at reset (0 is replaced by a fixed non-zero value).
module rsi_index_select #(
  parameter int ADDR_W = 128,
  parameter int IDX_W  = 9
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              new_period,
  input  logic [IDX_W-1:0]  predictor_in,
  input  logic              predictor_valid_in,
  input  logic [31:0]       seed,
  input  logic [ADDR_W-1:0] addr,
  output logic [IDX_W-1:0]  index,
  output logic              redirected
);
  localparam int POS_W = $clog2(ADDR_W);
  // bounds of the three random ranges (candidates 2, 3, 4)
  localparam int LO [3] = '{ADDR_W - IDX_W - 30, 30, 0};
  localparam int LEN[3] = '{30, ADDR_W - IDX_W - 60, 30};

  logic [31:0]      lfsr;
  logic [POS_W-1:0] pos [3][IDX_W];
  logic [IDX_W-1:0] predictor;
  logic             pred_valid;

  // Galois LFSR, polynomial x^32 + x^22 + x^2 + x + 1
  function automatic logic [31:0] lfsr_next(input logic [31:0] s);
    return s[0] ? ((s >> 1) ^ 32'h8020_0003) : (s >> 1);
  endfunction

  // random position for range k, bit b, derived from the current LFSR state
  function automatic logic [POS_W-1:0] draw(input logic [31:0] s, input int k, input int b);
    logic [31:0] r;
    int          slot;
    slot = k * IDX_W + b;
    r = 32'({s, s} >> (slot % 32)) ^ (32'h9E37_79B9 * 32'(slot + 1));
    r = r ^ (r >> 13);
    return POS_W'(LO[k] + int'(r % 32'(LEN[k])));
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr       <= (seed == 32'd0) ? 32'h1 : seed;
      predictor  <= '0;
      pred_valid <= 1'b0;
      for (int k = 0; k < 3; k++)
        for (int b = 0; b < IDX_W; b++)
          pos[k][b] <= POS_W'(LO[k] + b);
    end else begin
      lfsr <= lfsr_next(lfsr);
      if (new_period) begin
        predictor  <= predictor_in;
        pred_valid <= predictor_valid_in;
        for (int k = 0; k < 3; k++)
          for (int b = 0; b < IDX_W; b++)
            pos[k][b] <= draw(lfsr, k, b);
      end
    end
  end

  logic [IDX_W-1:0] cand [4];
  always_comb begin
    cand[0] = addr[ADDR_W-1 -: IDX_W];
    for (int k = 0; k < 3; k++)
      for (int b = 0; b < IDX_W; b++)
        cand[k+1][b] = addr[pos[k][b]];
    index      = cand[0];
    redirected = 1'b0;
    if (pred_valid && cand[0] == predictor) begin
      redirected = 1'b1;
      if (cand[1] != predictor)      index = cand[1];
      else if (cand[2] != predictor) index = cand[2];
      else                           index = cand[3];
    end
  end

endmodule
