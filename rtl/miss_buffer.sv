// miss_buffer: lookups of the pipelined route cache that wait for the routing
// table.
//
// Slots form an in-order queue. A real miss allocates a primary slot and sends
// its address to the routing table in the same cycle (rt_req_valid follows
// alloc && alloc_primary, so the caller allocates a primary only when
// rt_req_ready is high). A lookup whose address is already in the buffer is a
// pseudo-miss: it allocates a secondary slot and issues no search. probe_* tells
// the caller, combinationally, whether probe_addr is in the buffer and, if that
// search has already returned, its port.
//
// The routing table answers in request order; a queue of primary slot numbers
// matches each answer to its slot. An answer is accepted when fill_ready is high:
// fill_* presents the address, cache index and port for writing into the cache
// in that cycle, and every waiting slot with the same address (its primary and
// secondaries, including one being allocated in that cycle) takes the port and
// becomes ready. The oldest slot leaves through ret_* once it is ready, so
// results come out in lookup order among the buffered lookups.
//
// The published design only says that a buffer holds the entries being searched
// and that a lookup matching the buffer is a pseudo-miss with a smaller penalty;
// the queue organisation is this design's choice. DEPTH 64 covers the largest
// occupancy reported (57).
//
// Because a search is issued in the cycle its slot is allocated, rt_req_addr is
// alloc_addr itself; likewise fill_port is rt_rsp_port and rt_rsp_ready is
// fill_ready. The handshake assertions sample rst_n synchronously (disable iff)
// while the registers use it as an asynchronous reset; lint tools note that
// double use, which is intended.
module miss_buffer #(
  parameter int DEPTH  = 64,
  parameter int ADDR_W = 128,
  parameter int PORT_W = 8,
  parameter int ID_W   = 16,
  parameter int IDX_W  = 9
) (
  input  logic              clk,
  input  logic              rst_n,
  // pseudo-miss detection
  input  logic [ADDR_W-1:0] probe_addr,
  output logic              probe_hit,
  // allocation
  input  logic              alloc,
  input  logic              alloc_primary,
  input  logic [ID_W-1:0]   alloc_id,
  input  logic [ADDR_W-1:0] alloc_addr,
  input  logic [IDX_W-1:0]  alloc_idx,
  output logic              full,
  // routing table
  output logic              rt_req_valid,
  input  logic              rt_req_ready,
  output logic [ADDR_W-1:0] rt_req_addr,
  input  logic              rt_rsp_valid,
  output logic              rt_rsp_ready,
  input  logic [PORT_W-1:0] rt_rsp_port,
  // cache fill
  input  logic              fill_ready,
  output logic              fill_valid,
  output logic [ADDR_W-1:0] fill_addr,
  output logic [IDX_W-1:0]  fill_idx,
  output logic [PORT_W-1:0] fill_port,
  // completed lookups, oldest first
  output logic              ret_valid,
  input  logic              ret_ready,
  output logic [ID_W-1:0]   ret_id,
  output logic [PORT_W-1:0] ret_port,
  output logic              ret_pseudo
);
  localparam int PW = $clog2(DEPTH);

  logic [ADDR_W-1:0] s_addr  [DEPTH];
  logic [ID_W-1:0]   s_id    [DEPTH];
  logic [IDX_W-1:0]  s_idx   [DEPTH];
  logic [PORT_W-1:0] s_port  [DEPTH];
  logic              s_vld   [DEPTH];
  logic              s_rdy   [DEPTH];
  logic              s_prim  [DEPTH];

  logic [PW-1:0] head, tail;
  logic [PW:0]   count;
  // queue of primary slots in request order
  logic [PW-1:0] pq [DEPTH];
  logic [PW-1:0] pq_head, pq_tail;

  assign full  = (count == (PW+1)'(DEPTH));

  // probe: any slot holding the same address
  logic              probe_rdy;
  logic [PORT_W-1:0] probe_port;
  always_comb begin
    probe_hit  = 1'b0;
    probe_rdy  = 1'b0;
    probe_port = '0;
    for (int i = 0; i < DEPTH; i++)
      if (s_vld[i] && s_addr[i] == probe_addr) begin
        probe_hit = 1'b1;
        if (s_rdy[i]) begin
          probe_rdy  = 1'b1;
          probe_port = s_port[i];
        end
      end
  end

  logic do_alloc;
  assign do_alloc     = alloc && !full;
  assign rt_req_valid = do_alloc && alloc_primary;
  assign rt_req_addr  = alloc_addr;

  // answer from the routing table
  logic [PW-1:0] rsp_slot;
  logic          do_rsp;
  assign rsp_slot     = pq[pq_head];
  assign rt_rsp_ready = fill_ready;
  assign do_rsp       = rt_rsp_valid && fill_ready;
  assign fill_valid   = do_rsp;
  assign fill_addr    = s_addr[rsp_slot];
  assign fill_idx     = s_idx[rsp_slot];
  assign fill_port    = rt_rsp_port;

  // retirement
  assign ret_valid  = s_vld[head] && s_rdy[head];
  assign ret_id     = s_id[head];
  assign ret_port   = s_port[head];
  assign ret_pseudo = !s_prim[head];
  logic do_ret;
  assign do_ret = ret_valid && ret_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head    <= '0;
      tail    <= '0;
      count   <= '0;
      pq_head <= '0;
      pq_tail <= '0;
      for (int i = 0; i < DEPTH; i++) begin
        s_vld[i]  <= 1'b0;
        s_rdy[i]  <= 1'b0;
        s_prim[i] <= 1'b0;
        s_addr[i] <= '0;
        s_id[i]   <= '0;
        s_idx[i]  <= '0;
        s_port[i] <= '0;
        pq[i]     <= '0;
      end
    end else begin
      if (do_rsp) begin
        for (int i = 0; i < DEPTH; i++)
          if (s_vld[i] && !s_rdy[i] && s_addr[i] == s_addr[rsp_slot]) begin
            s_rdy[i]  <= 1'b1;
            s_port[i] <= rt_rsp_port;
          end
        pq_head <= pq_head + 1'b1;
      end
      if (do_ret) begin
        s_vld[head] <= 1'b0;
        head        <= head + 1'b1;
      end
      if (do_alloc) begin
        s_vld[tail]  <= 1'b1;
        s_prim[tail] <= alloc_primary;
        s_addr[tail] <= alloc_addr;
        s_id[tail]   <= alloc_id;
        s_idx[tail]  <= alloc_idx;
        if (do_rsp && alloc_addr == s_addr[rsp_slot]) begin
          s_rdy[tail]  <= 1'b1;
          s_port[tail] <= rt_rsp_port;
        end else if (!alloc_primary && probe_rdy && probe_addr == alloc_addr) begin
          s_rdy[tail]  <= 1'b1;
          s_port[tail] <= probe_port;
        end else begin
          s_rdy[tail]  <= 1'b0;
        end
        tail <= tail + 1'b1;
        if (alloc_primary) begin
          pq[pq_tail] <= tail;
          pq_tail     <= pq_tail + 1'b1;
        end
      end
      count <= count + (PW+1)'(do_alloc) - (PW+1)'(do_ret);
    end
  end

  // a primary slot is only allocated when its search can be issued
  assert property (@(posedge clk) disable iff (!rst_n)
                   (alloc && alloc_primary && !full) |-> rt_req_ready)
    else $error("miss_buffer: primary allocated while the routing table is not ready");

  // the routing table must not answer a search that was never issued
  assert property (@(posedge clk) disable iff (!rst_n)
                   rt_rsp_valid |-> (pq_head != pq_tail) || (count == (PW+1)'(DEPTH)))
    else $error("miss_buffer: answer with no search outstanding");

endmodule
