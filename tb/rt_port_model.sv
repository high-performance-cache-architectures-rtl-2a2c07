// rt_port_model: behavioural model of the routing table seen by the pipelined
// cache. Searches are answered in order, PENALTY cycles after they were
// accepted; with SINGLE = 1 only one search is in flight at a time. The port of
// an address is a fixed function of it (port_of), which the testbenches use as
// the expected answer. Not synthesizable.
module rt_port_model #(
  parameter int ADDR_W  = 128,
  parameter int PORT_W  = 8,
  parameter int PENALTY = 4,
  parameter bit SINGLE  = 0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req_valid,
  output logic              req_ready,
  input  logic [ADDR_W-1:0] req_addr,
  output logic              rsp_valid,
  input  logic              rsp_ready,
  output logic [PORT_W-1:0] rsp_port
);
  function automatic logic [PORT_W-1:0] port_of(input logic [ADDR_W-1:0] a);
    return PORT_W'(a[7:0] ^ a[ADDR_W-1 -: 8] ^ a[71:64] ^ 8'h5A);
  endfunction

  longint           t = 0;
  longint           due [$];
  logic [PORT_W-1:0] pq [$];

  assign req_ready = !SINGLE || (due.size() == 0);
  assign rsp_valid = (due.size() != 0) && (due[0] <= t);
  assign rsp_port  = (pq.size() != 0) ? pq[0] : '0;

  always @(posedge clk) begin
    if (!rst_n) begin
      due.delete(); pq.delete();
    end else begin
      if (rsp_valid && rsp_ready) begin
        void'(due.pop_front()); void'(pq.pop_front());
      end
      if (req_valid && req_ready) begin
        due.push_back(t + PENALTY);
        pq.push_back(port_of(req_addr));
      end
    end
    t <= t + 1;
  end
endmodule
