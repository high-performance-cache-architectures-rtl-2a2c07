// vc_rsi_pipeline: pipelined IPv6 route-lookup cache combining a direct-mapped
// main cache, a victim cache and randomly selected indexing.
//
// Each lookup carries a destination address and an id and goes through three
// stages:
//   IS  index selection: rsi_index_select forms the 9-bit set index, moving
//       addresses whose original index is the conflict predictor to another set;
//   CA  cache access: the direct-mapped entry at that index (full address as tag)
//       and all victim-cache ways are compared. On a victim-cache hit the entry
//       swaps places with the direct-mapped entry of that set;
//   PT  get port: a hit returns its port at once. A miss goes to miss_buffer:
//       a real miss starts a routing-table search, a pseudo-miss (address already
//       being searched) waits for that search. Completed searches write the entry
//       into the direct-mapped set chosen at IS, and the displaced valid entry
//       moves into the victim cache (a conflict miss for rsi_predictor).
// end_period closes a prediction period: rsi_predictor picks the set with most
// conflict misses, and when it is done the new predictor is loaded, new random
// index bits are drawn and both caches are flushed.
//
// Throughput is one lookup per cycle. The pipeline stalls (structural hazards)
// when a miss finds the buffer full or the routing table not ready, and when a
// buffered result and a hit in PT want the single result port in the same cycle
// (the buffered result goes first). A routing-table answer is held off for one
// cycle if a victim swap writes the main cache in that cycle. Results of misses
// therefore leave after younger hits; out_id identifies them.
//
// The stages, the three lookup outcomes, swapping, LRU in the victim cache,
// flushing at a new prediction, and hit/miss/pseudo-miss follow the published
// scheme. The stall rules, result ordering, buffer organisation and the handshake
// on every port are this design's choices.
module vc_rsi_pipeline
  import rc_pkg::*;
#(
  parameter int ADDR_W     = 128,
  parameter int IDX_W      = 9,
  parameter int VC_ENTRIES = 16,
  parameter int BUF_DEPTH  = 64,
  parameter int PORT_W     = 8,
  parameter int ID_W       = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [31:0]       seed,
  // lookups
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [ID_W-1:0]   in_id,
  input  logic [ADDR_W-1:0] in_addr,
  // results
  output logic              out_valid,
  output logic [ID_W-1:0]   out_id,
  output logic [PORT_W-1:0] out_port,
  output res_kind_e         out_kind,
  // routing table
  output logic              rt_req_valid,
  input  logic              rt_req_ready,
  output logic [ADDR_W-1:0] rt_req_addr,
  input  logic              rt_rsp_valid,
  output logic              rt_rsp_ready,
  input  logic [PORT_W-1:0] rt_rsp_port,
  // prediction periods
  input  logic              end_period,
  output logic              period_busy,
  output logic              period_start,
  output logic [IDX_W-1:0]  predictor,
  output logic              predictor_en,
  // event counters
  output logic [31:0]       stat_hits,
  output logic [31:0]       stat_vc_hits,
  output logic [31:0]       stat_misses,
  output logic [31:0]       stat_pseudo,
  output logic [31:0]       stat_stalls,
  output logic [31:0]       stat_redirects,
  output logic [31:0]       stat_swaps
);
  localparam int SETS = 1 << IDX_W;
  localparam int VW   = $clog2(VC_ENTRIES);

  // ------------------------------------------------------------------ storage
  logic [ADDR_W-1:0] dm_tag  [SETS];
  logic [PORT_W-1:0] dm_port [SETS];
  logic [SETS-1:0]   dm_vld;

  // ------------------------------------------------------------------ IS stage
  logic [IDX_W-1:0] is_idx;
  logic             is_redirected;
  logic             pred_done;
  logic [IDX_W-1:0] pred_idx;
  logic             pred_en;
  logic             conflict;
  logic [IDX_W-1:0] conflict_idx;

  rsi_index_select #(.ADDR_W(ADDR_W), .IDX_W(IDX_W)) u_is (
    .clk, .rst_n,
    .new_period(pred_done),
    .predictor_in(pred_idx),
    .predictor_valid_in(pred_en),
    .seed,
    .addr(in_addr),
    .index(is_idx),
    .redirected(is_redirected)
  );

  rsi_predictor #(.SETS(SETS)) u_pred (
    .clk, .rst_n,
    .conflict, .conflict_idx,
    .end_period,
    .busy(period_busy),
    .done(pred_done),
    .predictor(pred_idx),
    .predictor_en(pred_en)
  );
  assign period_start = pred_done;
  assign predictor    = pred_idx;
  assign predictor_en = pred_en;

  // pipeline registers
  logic              ca_v;
  logic [ID_W-1:0]   ca_id;
  logic [ADDR_W-1:0] ca_addr;
  logic [IDX_W-1:0]  ca_idx;

  logic              pt_v;
  logic [ID_W-1:0]   pt_id;
  logic [ADDR_W-1:0] pt_addr;
  logic [IDX_W-1:0]  pt_idx;
  logic              pt_hit;
  res_kind_e         pt_kind;
  logic [PORT_W-1:0] pt_port;

  // ------------------------------------------------------------------ CA stage
  logic              dm_hit;
  logic              vc_hit;
  logic [VW-1:0]     vc_way;
  logic [PORT_W-1:0] vc_port;

  assign dm_hit = dm_vld[ca_idx] && dm_tag[ca_idx] == ca_addr;

  // victim cache write port, shared by swaps and fills
  logic              vc_wr_en;
  logic              vc_wr_use_way;
  logic [ADDR_W-1:0] vc_wr_addr;
  logic [PORT_W-1:0] vc_wr_port;
  logic              vc_wr_valid;

  victim_cache #(.ENTRIES(VC_ENTRIES), .ADDR_W(ADDR_W), .PORT_W(PORT_W)) u_vc (
    .clk, .rst_n,
    .flush(pred_done),
    .lk_addr(ca_addr),
    .lk_hit(vc_hit),
    .lk_way(vc_way),
    .lk_port(vc_port),
    .wr_en(vc_wr_en),
    .wr_use_way(vc_wr_use_way),
    .wr_way(vc_way),
    .wr_addr(vc_wr_addr),
    .wr_port(vc_wr_port),
    .wr_valid(vc_wr_valid)
  );

  // ------------------------------------------------------------------ PT stage
  logic              mb_probe_hit, mb_full;
  logic              mb_alloc, mb_alloc_primary;
  logic              mb_fill_ready, mb_fill_valid;
  logic [ADDR_W-1:0] mb_fill_addr;
  logic [IDX_W-1:0]  mb_fill_idx;
  logic [PORT_W-1:0] mb_fill_port;
  logic              mb_ret_valid;
  logic [ID_W-1:0]   mb_ret_id;
  logic [PORT_W-1:0] mb_ret_port;
  logic              mb_ret_pseudo;

  miss_buffer #(.DEPTH(BUF_DEPTH), .ADDR_W(ADDR_W), .PORT_W(PORT_W), .ID_W(ID_W),
                .IDX_W(IDX_W)) u_mb (
    .clk, .rst_n,
    .probe_addr(pt_addr),
    .probe_hit(mb_probe_hit),
    .alloc(mb_alloc),
    .alloc_primary(mb_alloc_primary),
    .alloc_id(pt_id),
    .alloc_addr(pt_addr),
    .alloc_idx(pt_idx),
    .full(mb_full),
    .rt_req_valid, .rt_req_ready, .rt_req_addr,
    .rt_rsp_valid, .rt_rsp_ready, .rt_rsp_port,
    .fill_ready(mb_fill_ready),
    .fill_valid(mb_fill_valid),
    .fill_addr(mb_fill_addr),
    .fill_idx(mb_fill_idx),
    .fill_port(mb_fill_port),
    .ret_valid(mb_ret_valid),
    .ret_ready(1'b1),
    .ret_id(mb_ret_id),
    .ret_port(mb_ret_port),
    .ret_pseudo(mb_ret_pseudo)
  );

  // PT completes when: hit and the result port is free; or miss and the buffer
  // can take it (plus, for a real miss, the routing table takes the search).
  logic pt_done, pt_adv, ca_adv;
  always_comb begin
    mb_alloc         = 1'b0;
    mb_alloc_primary = 1'b0;
    pt_done          = 1'b1;
    if (pt_v) begin
      if (pt_hit) begin
        pt_done = !mb_ret_valid;
      end else if (mb_probe_hit) begin
        pt_done          = !mb_full;
        mb_alloc         = 1'b1;
      end else begin
        pt_done          = !mb_full && rt_req_ready;
        mb_alloc         = rt_req_ready;
        mb_alloc_primary = 1'b1;
      end
    end
  end
  assign pt_adv   = pt_done;                 // PT register may load
  assign ca_adv   = ca_v && pt_adv;           // CA moves into PT
  assign in_ready = !ca_v || pt_adv;

  // result port: buffered results first
  always_comb begin
    out_valid = 1'b0;
    out_id    = pt_id;
    out_port  = pt_port;
    out_kind  = pt_kind;
    if (mb_ret_valid) begin
      out_valid = 1'b1;
      out_id    = mb_ret_id;
      out_port  = mb_ret_port;
      out_kind  = mb_ret_pseudo ? RES_PSEUDO : RES_MISS;
    end else if (pt_v && pt_hit) begin
      out_valid = 1'b1;
    end
  end

  // swap on a victim hit (when the lookup leaves CA); fill otherwise
  logic swap;
  assign swap          = ca_adv && !dm_hit && vc_hit;
  assign mb_fill_ready = !swap;

  always_comb begin
    vc_wr_en      = 1'b0;
    vc_wr_use_way = 1'b0;
    vc_wr_addr    = '0;
    vc_wr_port    = '0;
    vc_wr_valid   = 1'b0;
    conflict      = 1'b0;
    conflict_idx  = mb_fill_idx;
    if (swap) begin
      vc_wr_en      = 1'b1;
      vc_wr_use_way = 1'b1;
      vc_wr_addr    = dm_tag[ca_idx];
      vc_wr_port    = dm_port[ca_idx];
      vc_wr_valid   = dm_vld[ca_idx];
    end else if (mb_fill_valid && dm_vld[mb_fill_idx]
                 && dm_tag[mb_fill_idx] != mb_fill_addr) begin
      vc_wr_en     = 1'b1;
      vc_wr_addr   = dm_tag[mb_fill_idx];
      vc_wr_port   = dm_port[mb_fill_idx];
      vc_wr_valid  = 1'b1;
      conflict     = 1'b1;
    end
  end

  // direct-mapped tag and port arrays: RAM style, no reset; an entry is only
  // used when its valid bit (which is reset) is set
  logic              dm_we;
  logic [IDX_W-1:0]  dm_wi;
  logic [ADDR_W-1:0] dm_wt;
  logic [PORT_W-1:0] dm_wp;
  always_comb begin
    dm_we = !pred_done && (swap || mb_fill_valid);
    dm_wi = swap ? ca_idx : mb_fill_idx;
    dm_wt = swap ? ca_addr : mb_fill_addr;
    dm_wp = swap ? vc_port : mb_fill_port;
  end

  always_ff @(posedge clk) begin
    if (dm_we) begin
      dm_tag[dm_wi]  <= dm_wt;
      dm_port[dm_wi] <= dm_wp;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         dm_vld <= '0;
    else if (pred_done) dm_vld <= '0;
    else if (dm_we)     dm_vld[dm_wi] <= 1'b1;
  end

  // pipeline registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ca_v    <= 1'b0;
      ca_id   <= '0;
      ca_addr <= '0;
      ca_idx  <= '0;
      pt_v    <= 1'b0;
      pt_id   <= '0;
      pt_addr <= '0;
      pt_idx  <= '0;
      pt_hit  <= 1'b0;
      pt_kind <= RES_HIT;
      pt_port <= '0;
    end else begin
      if (in_ready) begin
        ca_v    <= in_valid;
        ca_id   <= in_id;
        ca_addr <= in_addr;
        ca_idx  <= is_idx;
      end
      if (pt_adv) begin
        pt_v    <= ca_v;
        pt_id   <= ca_id;
        pt_addr <= ca_addr;
        pt_idx  <= ca_idx;
        pt_hit  <= dm_hit || vc_hit;
        pt_kind <= dm_hit ? RES_HIT : RES_VC_HIT;
        pt_port <= dm_hit ? dm_port[ca_idx] : vc_port;
      end
    end
  end

  // event counters
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stat_hits      <= '0;
      stat_vc_hits   <= '0;
      stat_misses    <= '0;
      stat_pseudo    <= '0;
      stat_stalls    <= '0;
      stat_redirects <= '0;
      stat_swaps     <= '0;
    end else begin
      if (ca_adv && dm_hit)                 stat_hits    <= stat_hits + 1;
      if (ca_adv && !dm_hit && vc_hit)      stat_vc_hits <= stat_vc_hits + 1;
      if (pt_v && !pt_hit && pt_done && !mb_probe_hit) stat_misses <= stat_misses + 1;
      if (pt_v && !pt_hit && pt_done && mb_probe_hit)  stat_pseudo <= stat_pseudo + 1;
      if (pt_v && !pt_done)                 stat_stalls  <= stat_stalls + 1;
      if (in_valid && in_ready && is_redirected) stat_redirects <= stat_redirects + 1;
      if (swap)                             stat_swaps   <= stat_swaps + 1;
    end
  end

endmodule
