// tcam_array: ternary CAM of routing entries with a priority encoder.
//
// Each entry stores a value, a care mask (1 = bit compared, 0 = don't care),
// an output port, a priority and a valid bit. A search compares key with every
// valid entry in parallel: an entry matches when (key ^ value) & mask is zero.
// Among the matches the entry with the largest priority wins, the lower index
// on a tie. In a plain longest-prefix TCAM the priority is the prefix length; the
// route cache above builds it from more fields. One entry is written per cycle.
// Parallel ternary match plus priority selection is the TCAM behaviour the
// design relies on; the priority-as-number encoding is this design's choice.
// The priority encoder is a binary tree of pairwise compares. Entry storage has
// no reset (only the valid bits do), so it is plain registers with an enable;
// outputs that come from an invalid entry are qualified by hit or valid_vec.
//
// Timing: hit, hit_idx and hit_port are combinational from key; writes and
// flush take effect at the clock edge.
module tcam_array #(
  parameter int ENTRIES = 128,
  parameter int ADDR_W  = 128,
  parameter int PORT_W  = 8,
  parameter int PRIO_W  = 10
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       flush,
  input  logic [ADDR_W-1:0]          key,
  output logic                       hit,
  output logic [$clog2(ENTRIES)-1:0] hit_idx,
  output logic [PORT_W-1:0]          hit_port,
  input  logic                       wr_en,
  input  logic [$clog2(ENTRIES)-1:0] wr_idx,
  input  logic [ADDR_W-1:0]          wr_value,
  input  logic [ADDR_W-1:0]          wr_mask,
  input  logic [PORT_W-1:0]          wr_port,
  input  logic [PRIO_W-1:0]          wr_prio,
  output logic [ENTRIES-1:0]         valid_vec,
  output logic [ADDR_W-1:0]          entry_value [ENTRIES],
  output logic [ADDR_W-1:0]          entry_mask  [ENTRIES]
);
  localparam int IW = $clog2(ENTRIES);

  logic [ADDR_W-1:0] value [ENTRIES];
  logic [ADDR_W-1:0] mask  [ENTRIES];
  logic [PORT_W-1:0] port  [ENTRIES];
  logic [PRIO_W-1:0] prio  [ENTRIES];
  logic [ENTRIES-1:0] vld;

  assign valid_vec   = vld;
  assign entry_value = value;
  assign entry_mask  = mask;

  logic [ENTRIES-1:0] match;
  always_comb
    for (int i = 0; i < ENTRIES; i++)
      match[i] = vld[i] && (((key ^ value[i]) & mask[i]) == '0);

  // priority encoder: a binary tree of pairwise comparisons; at equal priority the
  // left (lower-index) side wins
  localparam int NP = 1 << IW;
  logic              t_hit [2*NP];
  logic [PRIO_W-1:0] t_pr  [2*NP];
  logic [IW-1:0]     t_ix  [2*NP];

  for (genvar i = 0; i < NP; i++) begin : g_leaf
    if (i < ENTRIES) begin : g_e
      assign t_hit[NP+i] = match[i];
      assign t_pr[NP+i]  = prio[i];
    end else begin : g_pad
      assign t_hit[NP+i] = 1'b0;
      assign t_pr[NP+i]  = '0;
    end
    assign t_ix[NP+i] = IW'(i);
  end
  for (genvar n = 1; n < NP; n++) begin : g_node
    logic take_r;
    assign take_r   = t_hit[2*n+1] && (!t_hit[2*n] || t_pr[2*n+1] > t_pr[2*n]);
    assign t_hit[n] = t_hit[2*n] || t_hit[2*n+1];
    assign t_pr[n]  = take_r ? t_pr[2*n+1] : t_pr[2*n];
    assign t_ix[n]  = take_r ? t_ix[2*n+1] : t_ix[2*n];
  end
  assign t_hit[0] = 1'b0;
  assign t_pr[0]  = '0;
  assign t_ix[0]  = '0;

  assign hit      = t_hit[1];
  assign hit_idx  = t_ix[1];
  assign hit_port = port[hit_idx];

  // entry storage: no reset, an entry is only used while its valid bit is set
  always_ff @(posedge clk) begin
    if (wr_en && !flush) begin
      value[wr_idx] <= wr_value;
      mask[wr_idx]  <= wr_mask;
      port[wr_idx]  <= wr_port;
      prio[wr_idx]  <= wr_prio;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      vld <= '0;
    else if (flush)  vld <= '0;
    else if (wr_en)  vld[wr_idx] <= 1'b1;
  end

endmodule
