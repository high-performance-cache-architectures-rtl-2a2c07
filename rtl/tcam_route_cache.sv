// tcam_route_cache: TCAM route cache divided into sets by overlap count.
//
// Cached items are routing entries (value, care mask, port) as held in a
// compacted routing table. Each entry comes with N, the number of other table
// entries whose address space it overlaps; N selects the set (N = 0, 1, 2 and
// >2 for the IPv6 configuration, so set s holds N = s and the last set N >= s).
// Set sizes follow the hit distribution over N (division D3: 55 %, 33 %, 7 %,
// 5 % of 128 entries, rounded to 70/42/9/7). All entries are searched at once;
// among several matches the winner is, in order: an entry marked high priority
// (the entry a C3/C4 compaction had to give precedence over the compacted
// entry that covers it), then the lower set (priority opposite to N), then the
// longer prefix (more care bits), then the lower index.
//
// A fill goes into a free entry of its set or replaces the entry that the set's
// repl_policy names (LRU in the published set-associative scheme; LAR and RLAI,
// the policies proposed for the fully associative cache, can be chosen with
// repl_mode). A fill whose value and mask equal a cached entry overwrites that
// entry (a port correction after a port error) instead of adding a duplicate.
// With NUM_SETS = 1 this is the fully associative cache the replacement
// policies were evaluated on.
//
// SET_SIZE lists the set sizes in its first NUM_SETS elements (up to 32 sets,
// enough for the 21-set IPv4 partition); the rest are ignored.
//
// Timing: lk_* results are combinational from lk_key; lk_valid marks a lookup
// that counts (advances the lookup clock and touches the hit entry). fill_valid
// writes at the clock edge; fill_idx and fill_evict are valid in that cycle.
// Lookup and fill may happen in the same cycle. Requires every set size >= 2.
module tcam_route_cache
  import rc_pkg::*;
#(
  parameter int ENTRIES  = 128,
  parameter int NUM_SETS = 4,
  parameter int SET_SIZE [32] = '{0: 70, 1: 42, 2: 9, 3: 7, default: 0},
  parameter int ADDR_W   = 128,
  parameter int PORT_W   = 8,
  parameter int N_W      = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       flush,
  input  repl_mode_e                 repl_mode,
  // lookup
  input  logic                       lk_valid,
  input  logic [ADDR_W-1:0]          lk_key,
  output logic                       lk_hit,
  output logic [$clog2(ENTRIES)-1:0] lk_idx,
  output logic [PORT_W-1:0]          lk_port,
  output logic                       lk_label,
  // fill
  input  logic                       fill_valid,
  input  logic [ADDR_W-1:0]          fill_value,
  input  logic [ADDR_W-1:0]          fill_mask,
  input  logic [PORT_W-1:0]          fill_port,
  input  logic [N_W-1:0]             fill_n,
  input  logic                       fill_hp,
  input  logic                       fill_label,
  output logic [$clog2(ENTRIES)-1:0] fill_idx,
  output logic                       fill_evict,
  output logic [31:0]                lookups
);
  localparam int IW     = $clog2(ENTRIES);
  localparam int SW     = (NUM_SETS > 1) ? $clog2(NUM_SETS) : 1;
  localparam int CW     = $clog2(ADDR_W + 1);
  localparam int PRIO_W = 1 + SW + CW;

  function automatic int set_base(input int s);
    int b = 0;
    for (int k = 0; k < s; k++) b += SET_SIZE[k];
    return b;
  endfunction

  function automatic int set_total();
    return set_base(NUM_SETS);
  endfunction

  if (set_total() != ENTRIES) begin : g_bad_sizes
    $error("tcam_route_cache: SET_SIZE must add up to ENTRIES");
  end

  function automatic logic [SW-1:0] set_of(input logic [IW-1:0] idx);
    logic [SW-1:0] s = '0;
    for (int k = 1; k < NUM_SETS; k++)
      if (int'(idx) >= set_base(k)) s = SW'(k);
    return s;
  endfunction

  // ------------------------------------------------------------------ TCAM
  logic [ENTRIES-1:0] valid_vec;
  logic [ADDR_W-1:0]  e_value [ENTRIES];
  logic [ADDR_W-1:0]  e_mask  [ENTRIES];
  logic               wr_en;
  logic [IW-1:0]      wr_idx;
  logic [PRIO_W-1:0]  wr_prio;
  logic [ENTRIES-1:0] label;

  tcam_array #(.ENTRIES(ENTRIES), .ADDR_W(ADDR_W), .PORT_W(PORT_W), .PRIO_W(PRIO_W)) u_tcam (
    .clk, .rst_n, .flush,
    .key(lk_key),
    .hit(lk_hit),
    .hit_idx(lk_idx),
    .hit_port(lk_port),
    .wr_en,
    .wr_idx,
    .wr_value(fill_value),
    .wr_mask(fill_mask),
    .wr_port(fill_port),
    .wr_prio,
    .valid_vec,
    .entry_value(e_value),
    .entry_mask(e_mask)
  );
  assign lk_label = label[lk_idx];

  // lookup clock
  logic [31:0] now;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)        now <= '0;
    else if (lk_valid) now <= now + 1;
  assign lookups = now;

  // ------------------------------------------------------------------ fill
  logic          same_found;
  logic [IW-1:0] same_idx;
  always_comb begin
    same_found = 1'b0;
    same_idx   = '0;
    for (int i = ENTRIES - 1; i >= 0; i--)
      if (valid_vec[i] && e_value[i] == fill_value && e_mask[i] == fill_mask) begin
        same_found = 1'b1;
        same_idx   = IW'(i);
      end
  end

  logic [SW-1:0] fill_set;
  always_comb begin
    fill_set = SW'(NUM_SETS - 1);
    if (fill_n < N_W'(NUM_SETS - 1)) fill_set = SW'(fill_n);
  end

  logic [IW-1:0] set_victim [NUM_SETS];
  logic          set_free   [NUM_SETS];

  logic [CW-1:0] care_bits;
  always_comb begin
    care_bits = '0;
    for (int b = 0; b < ADDR_W; b++) care_bits += CW'(fill_mask[b]);
  end

  assign wr_en      = fill_valid && !flush;
  assign wr_idx     = same_found ? same_idx : set_victim[fill_set];
  assign fill_idx   = wr_idx;
  assign fill_evict = wr_en && !same_found && !set_free[fill_set];
  assign wr_prio    = {fill_hp, SW'(NUM_SETS - 1) - set_of(wr_idx), care_bits};

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)     label <= '0;
    else if (wr_en) label[wr_idx] <= fill_label;

  // ------------------------------------------------------------------ per-set replacement
  for (genvar s = 0; s < NUM_SETS; s++) begin : g_set
    localparam int BASE = set_base(s);
    localparam int SZ   = SET_SIZE[s];
    localparam int LW   = $clog2(SZ);
    logic          touch, fill;
    logic [LW-1:0] touch_idx, fill_idx_l, victim_l;
    logic          free_l;

    assign touch      = lk_valid && lk_hit && int'(lk_idx) >= BASE && int'(lk_idx) < BASE + SZ;
    assign touch_idx  = LW'(int'(lk_idx) - BASE);
    assign fill       = wr_en && int'(wr_idx) >= BASE && int'(wr_idx) < BASE + SZ;
    assign fill_idx_l = LW'(int'(wr_idx) - BASE);

    repl_policy #(.ENTRIES(SZ)) u_repl (
      .clk, .rst_n,
      .mode(repl_mode),
      .now,
      .touch, .touch_idx,
      .fill, .fill_idx(fill_idx_l),
      .valid_vec(valid_vec[BASE +: SZ]),
      .victim(victim_l),
      .victim_is_free(free_l)
    );
    assign set_victim[s] = IW'(BASE + int'(victim_l));
    assign set_free[s]   = free_l;
  end

endmodule
