// rt_lpm_model: behavioural model of the (compacted) routing table behind the
// TCAM route cache. The testbench loads entries with add_entry (value, care mask,
// port, overlap count N, error-prone label, high-priority mark). A search returns
// the matching entry with the most care bits (the first one on a tie) PENALTY
// cycles after it was accepted; one search is in flight at a time. lpm_port gives
// the same answer at once, as the testbench's reference. Not synthesizable.
module rt_lpm_model #(
  parameter int ADDR_W  = 128,
  parameter int PORT_W  = 8,
  parameter int N_W     = 8,
  parameter int PENALTY = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req_valid,
  output logic              req_ready,
  input  logic [ADDR_W-1:0] req_addr,
  output logic              rsp_valid,
  input  logic              rsp_ready,
  output logic [ADDR_W-1:0] rsp_value,
  output logic [ADDR_W-1:0] rsp_mask,
  output logic [PORT_W-1:0] rsp_port,
  output logic [N_W-1:0]    rsp_n,
  output logic              rsp_label,
  output logic              rsp_hp
);
  logic [ADDR_W-1:0] tv [$];
  logic [ADDR_W-1:0] tm [$];
  logic [PORT_W-1:0] tp [$];
  logic [N_W-1:0]    tn [$];
  logic              tl [$];
  logic              th [$];

  task automatic add_entry(input logic [ADDR_W-1:0] v, input logic [ADDR_W-1:0] m,
                           input logic [PORT_W-1:0] p, input int n, input logic lbl,
                           input logic hp);
    tv.push_back(v & m); tm.push_back(m); tp.push_back(p); tn.push_back(N_W'(n));
    tl.push_back(lbl); th.push_back(hp);
  endtask

  function automatic int lpm(input logic [ADDR_W-1:0] a);
    int best = -1, bl = -1;
    for (int i = 0; i < tv.size(); i++)
      if (((a ^ tv[i]) & tm[i]) == '0 && $countones(tm[i]) > bl) begin
        best = i; bl = $countones(tm[i]);
      end
    return best;
  endfunction

  function automatic logic [PORT_W-1:0] lpm_port(input logic [ADDR_W-1:0] a);
    int i = lpm(a);
    return (i < 0) ? '0 : tp[i];
  endfunction

  longint t = 0, due = 0;
  bit     busy = 0;
  int     sel = 0;

  assign req_ready = !busy;
  assign rsp_valid = busy && (t >= due);
  always_comb begin
    rsp_value = '0; rsp_mask = '0; rsp_port = '0; rsp_n = '0; rsp_label = 0; rsp_hp = 0;
    if (busy && sel >= 0 && sel < tv.size()) begin
      rsp_value = tv[sel]; rsp_mask = tm[sel]; rsp_port = tp[sel]; rsp_n = tn[sel];
      rsp_label = tl[sel]; rsp_hp = th[sel];
    end
  end

  always @(posedge clk) begin
    if (!rst_n) busy <= 0;
    else begin
      if (rsp_valid && rsp_ready) busy <= 0;
      if (req_valid && req_ready) begin
        busy <= 1; due <= t + PENALTY; sel <= lpm(req_addr);
      end
    end
    t <= t + 1;
  end
endmodule
