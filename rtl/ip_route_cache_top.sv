// ip_route_cache_top: the two route-lookup cache organisations side by side.
//
//   p_*  vc_rsi_pipeline: three-stage pipelined lookup cache for IPv6
//        destination addresses (512-entry direct-mapped cache keyed by whole
//        addresses, 16-entry victim cache, randomly selected index driven by
//        conflict-miss prediction, miss buffer with pseudo-miss detection).
//   t_*  tcam_route_system: 128-entry TCAM cache of (compacted) routing entries,
//        four sets chosen by overlap count, LRU/LAR/RLAI replacement, and
//        interval/selective/adaptive/every-hit port-error sampling.
// The two do not share state; each has its own lookup port and its own port to a
// routing table, which lies outside this design (main memory searched by longest
// prefix match). Mode inputs use the encodings of rc_pkg (p_out_kind:
// res_kind_e, t_repl_mode: repl_mode_e, t_samp_mode: samp_mode_e).
//
// Timing is that of the two blocks; see their headers.
module ip_route_cache_top
  import rc_pkg::*;
#(
  parameter int ADDR_W = 128,
  parameter int PORT_W = 8,
  parameter int ID_W   = 16,
  parameter int IDX_W  = 9,
  parameter int N_W    = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // ---------------- pipelined direct-mapped cache with victim cache and RSI
  input  logic [31:0]       p_seed,
  input  logic              p_in_valid,
  output logic              p_in_ready,
  input  logic [ID_W-1:0]   p_in_id,
  input  logic [ADDR_W-1:0] p_in_addr,
  output logic              p_out_valid,
  output logic [ID_W-1:0]   p_out_id,
  output logic [PORT_W-1:0] p_out_port,
  output logic [1:0]        p_out_kind,
  output logic              p_rt_req_valid,
  input  logic              p_rt_req_ready,
  output logic [ADDR_W-1:0] p_rt_req_addr,
  input  logic              p_rt_rsp_valid,
  output logic              p_rt_rsp_ready,
  input  logic [PORT_W-1:0] p_rt_rsp_port,
  input  logic              p_end_period,
  output logic              p_period_busy,
  output logic              p_period_start,
  output logic [IDX_W-1:0]  p_predictor,
  output logic              p_predictor_en,
  output logic [31:0]       p_stat [7],
  // ---------------- TCAM route cache with sets, replacement and sampling
  input  logic [1:0]        t_repl_mode,
  input  logic [2:0]        t_samp_mode,
  input  logic              t_flush,
  input  logic              t_in_valid,
  output logic              t_in_ready,
  input  logic [ADDR_W-1:0] t_in_addr,
  output logic              t_out_valid,
  output logic [PORT_W-1:0] t_out_port,
  output logic              t_out_hit,
  output logic              t_rt_req_valid,
  input  logic              t_rt_req_ready,
  output logic [ADDR_W-1:0] t_rt_req_addr,
  input  logic              t_rt_rsp_valid,
  output logic              t_rt_rsp_ready,
  input  logic [ADDR_W-1:0] t_rt_rsp_value,
  input  logic [ADDR_W-1:0] t_rt_rsp_mask,
  input  logic [PORT_W-1:0] t_rt_rsp_port,
  input  logic [N_W-1:0]    t_rt_rsp_n,
  input  logic              t_rt_rsp_label,
  input  logic              t_rt_rsp_hp,
  output logic [31:0]       t_stat [5]
);
  res_kind_e kind;
  assign p_out_kind = kind;

  // p_stat: hits, victim hits, misses, pseudo-misses, stall cycles,
  //         redirected indexes, swaps
  vc_rsi_pipeline #(.ADDR_W(ADDR_W), .IDX_W(IDX_W), .PORT_W(PORT_W), .ID_W(ID_W)) u_pipe (
    .clk, .rst_n,
    .seed(p_seed),
    .in_valid(p_in_valid), .in_ready(p_in_ready), .in_id(p_in_id), .in_addr(p_in_addr),
    .out_valid(p_out_valid), .out_id(p_out_id), .out_port(p_out_port), .out_kind(kind),
    .rt_req_valid(p_rt_req_valid), .rt_req_ready(p_rt_req_ready), .rt_req_addr(p_rt_req_addr),
    .rt_rsp_valid(p_rt_rsp_valid), .rt_rsp_ready(p_rt_rsp_ready), .rt_rsp_port(p_rt_rsp_port),
    .end_period(p_end_period),
    .period_busy(p_period_busy),
    .period_start(p_period_start),
    .predictor(p_predictor),
    .predictor_en(p_predictor_en),
    .stat_hits(p_stat[0]),
    .stat_vc_hits(p_stat[1]),
    .stat_misses(p_stat[2]),
    .stat_pseudo(p_stat[3]),
    .stat_stalls(p_stat[4]),
    .stat_redirects(p_stat[5]),
    .stat_swaps(p_stat[6])
  );

  // t_stat: lookups, hits, routing-table searches, port errors found, evictions
  tcam_route_system #(.ADDR_W(ADDR_W), .PORT_W(PORT_W), .N_W(N_W)) u_tcam (
    .clk, .rst_n,
    .repl_mode(repl_mode_e'(t_repl_mode)),
    .samp_mode(samp_mode_e'(t_samp_mode)),
    .flush(t_flush),
    .in_valid(t_in_valid), .in_ready(t_in_ready), .in_addr(t_in_addr),
    .out_valid(t_out_valid), .out_port(t_out_port), .out_hit(t_out_hit),
    .rt_req_valid(t_rt_req_valid), .rt_req_ready(t_rt_req_ready), .rt_req_addr(t_rt_req_addr),
    .rt_rsp_valid(t_rt_rsp_valid), .rt_rsp_ready(t_rt_rsp_ready),
    .rt_rsp_value(t_rt_rsp_value), .rt_rsp_mask(t_rt_rsp_mask), .rt_rsp_port(t_rt_rsp_port),
    .rt_rsp_n(t_rt_rsp_n), .rt_rsp_label(t_rt_rsp_label), .rt_rsp_hp(t_rt_rsp_hp),
    .stat_lookups(t_stat[0]),
    .stat_hits(t_stat[1]),
    .stat_searches(t_stat[2]),
    .stat_port_errors(t_stat[3]),
    .stat_evictions(t_stat[4])
  );

endmodule
