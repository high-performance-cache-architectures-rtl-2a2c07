// tcam_route_system: route lookup with the set-partitioned TCAM route cache,
// the routing table behind it, and port-error sampling.
//
// A lookup (in_valid/in_ready, destination address) is searched in the cache.
//   Hit:  the cached port is returned at once (out_hit = 1). If the sampler asks
//         for a check, the address is also searched in the routing table; if the
//         table's longest matching entry gives another port (a port error), that
//         entry is written into the cache so later lookups find it.
//   Miss: the address is searched in the routing table; the returned entry is
//         written into the cache (set chosen by its overlap count N) and its port
//         returned (out_hit = 0).
// The routing table answers each search with the longest matching entry of the
// (compacted) table: value, care mask, port, N, the "error-prone" label used by
// selective and adaptive sampling, and the high-priority mark.
//
// One lookup is handled at a time: a lookup that needs the routing table blocks
// the next until the table answers. A hit with no check takes one cycle, and a
// new lookup is accepted in the same cycle. Cache, sets, priorities, replacement
// policies and sampling techniques follow the published schemes; the blocking
// control and the handshakes are this design's choices. Counters report
// lookups, hits, table searches and port errors found.
module tcam_route_system
  import rc_pkg::*;
#(
  parameter int ENTRIES  = 128,
  parameter int NUM_SETS = 4,
  parameter int SET_SIZE [32] = '{0: 70, 1: 42, 2: 9, 3: 7, default: 0},
  parameter int ADDR_W   = 128,
  parameter int PORT_W   = 8,
  parameter int N_W      = 8,
  parameter int M        = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  repl_mode_e        repl_mode,
  input  samp_mode_e        samp_mode,
  input  logic              flush,
  // lookups
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [ADDR_W-1:0] in_addr,
  output logic              out_valid,
  output logic [PORT_W-1:0] out_port,
  output logic              out_hit,
  // routing table
  output logic              rt_req_valid,
  input  logic              rt_req_ready,
  output logic [ADDR_W-1:0] rt_req_addr,
  input  logic              rt_rsp_valid,
  output logic              rt_rsp_ready,
  input  logic [ADDR_W-1:0] rt_rsp_value,
  input  logic [ADDR_W-1:0] rt_rsp_mask,
  input  logic [PORT_W-1:0] rt_rsp_port,
  input  logic [N_W-1:0]    rt_rsp_n,
  input  logic              rt_rsp_label,
  input  logic              rt_rsp_hp,
  // counters
  output logic [31:0]       stat_lookups,
  output logic [31:0]       stat_hits,
  output logic [31:0]       stat_searches,
  output logic [31:0]       stat_port_errors,
  output logic [31:0]       stat_evictions
);
  localparam int IW = $clog2(ENTRIES);

  typedef enum logic [1:0] {S_IDLE, S_LOOK, S_REQ, S_WAIT} state_e;
  state_e state;

  logic [ADDR_W-1:0] addr_r;
  logic              is_check;     // outstanding search is a sampling check
  logic [IW-1:0]     chk_idx;
  logic [PORT_W-1:0] chk_port;

  logic              lk_valid, lk_hit, lk_label;
  logic [IW-1:0]     lk_idx;
  logic [PORT_W-1:0] lk_port;
  logic              fill_valid, fill_evict;
  logic [IW-1:0]     fill_idx;
  logic              sample;
  logic              port_err;

  assign lk_valid = (state == S_LOOK);

  tcam_route_cache #(.ENTRIES(ENTRIES), .NUM_SETS(NUM_SETS), .SET_SIZE(SET_SIZE),
                     .ADDR_W(ADDR_W), .PORT_W(PORT_W), .N_W(N_W)) u_cache (
    .clk, .rst_n, .flush, .repl_mode,
    .lk_valid,
    .lk_key(addr_r),
    .lk_hit, .lk_idx, .lk_port, .lk_label,
    .fill_valid,
    .fill_value(rt_rsp_value),
    .fill_mask(rt_rsp_mask),
    .fill_port(rt_rsp_port),
    .fill_n(rt_rsp_n),
    .fill_hp(rt_rsp_hp),
    .fill_label(rt_rsp_label),
    .fill_idx,
    .fill_evict,
    .lookups(stat_lookups)
  );

  port_error_sampler #(.ENTRIES(ENTRIES), .M(M)) u_samp (
    .clk, .rst_n,
    .mode(samp_mode),
    .lookup(lk_valid),
    .hit(lk_hit),
    .hit_idx(lk_idx),
    .hit_label(lk_label),
    .fill(fill_valid),
    .fill_idx,
    .check_done(state == S_WAIT && rt_rsp_valid && is_check),
    .check_idx(chk_idx),
    .check_error(port_err),
    .sample
  );

  logic rsp_fire;
  assign rsp_fire     = (state == S_WAIT) && rt_rsp_valid;
  assign port_err     = is_check && rt_rsp_port != chk_port;
  assign fill_valid   = rsp_fire && (!is_check || port_err) && !flush;
  assign rt_req_valid = (state == S_REQ);
  assign rt_req_addr  = addr_r;
  assign rt_rsp_ready = (state == S_WAIT);

  assign in_ready  = (state == S_IDLE) || (state == S_LOOK && lk_hit && !sample);
  assign out_valid = (state == S_LOOK && lk_hit) || (rsp_fire && !is_check);
  assign out_port  = (state == S_LOOK) ? lk_port : rt_rsp_port;
  assign out_hit   = (state == S_LOOK);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      addr_r   <= '0;
      is_check <= 1'b0;
      chk_idx  <= '0;
      chk_port <= '0;
    end else begin
      unique case (state)
        S_IDLE:
          if (in_valid) begin
            addr_r <= in_addr;
            state  <= S_LOOK;
          end
        S_LOOK:
          if (lk_hit && !sample) begin
            if (in_valid) addr_r <= in_addr;
            else          state  <= S_IDLE;
          end else begin
            is_check <= lk_hit;
            chk_idx  <= lk_idx;
            chk_port <= lk_port;
            state    <= S_REQ;
          end
        S_REQ:
          if (rt_req_ready) state <= S_WAIT;
        S_WAIT:
          if (rt_rsp_valid) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stat_hits        <= '0;
      stat_searches    <= '0;
      stat_port_errors <= '0;
      stat_evictions   <= '0;
    end else begin
      if (lk_valid && lk_hit)            stat_hits        <= stat_hits + 1;
      if (rt_req_valid && rt_req_ready)  stat_searches    <= stat_searches + 1;
      if (rsp_fire && port_err)          stat_port_errors <= stat_port_errors + 1;
      if (fill_valid && fill_evict)      stat_evictions   <= stat_evictions + 1;
    end
  end

endmodule
