// victim_cache: small fully associative cache that keeps the entries the
// direct-mapped route cache discards.
//
// Each way holds a whole destination address, its output port and a valid bit.
// A lookup compares lk_addr with every way at once (combinational lk_hit,
// lk_way, lk_port). One write per cycle: with wr_use_way the entry goes into
// wr_way (the swap after a victim hit, where the main cache's displaced entry
// takes the place of the entry that moved up); otherwise into the first invalid
// way, or else the least recently used way. Recency is a rank per way (0 = most
// recent) kept as a permutation; a written way becomes most recent. A victim
// cache next to a direct-mapped cache, whole-address compare, swap on a victim
// hit and LRU replacement follow the published organisation; the rank encoding
// is this design's choice.
//
// Timing: writes and flush take effect at the clock edge; flush wins over a
// write in the same cycle.
module victim_cache #(
  parameter int ENTRIES = 16,
  parameter int ADDR_W  = 128,
  parameter int PORT_W  = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       flush,
  input  logic [ADDR_W-1:0]          lk_addr,
  output logic                       lk_hit,
  output logic [$clog2(ENTRIES)-1:0] lk_way,
  output logic [PORT_W-1:0]          lk_port,
  input  logic                       wr_en,
  input  logic                       wr_use_way,
  input  logic [$clog2(ENTRIES)-1:0] wr_way,
  input  logic [ADDR_W-1:0]          wr_addr,
  input  logic [PORT_W-1:0]          wr_port,
  input  logic                       wr_valid
);
  localparam int WW = $clog2(ENTRIES);

  logic [ADDR_W-1:0] tag  [ENTRIES];
  logic [PORT_W-1:0] port [ENTRIES];
  logic              vld  [ENTRIES];
  logic [WW-1:0]     rank [ENTRIES];

  // lookup
  always_comb begin
    lk_hit  = 1'b0;
    lk_way  = '0;
    lk_port = '0;
    for (int i = ENTRIES - 1; i >= 0; i--)
      if (vld[i] && tag[i] == lk_addr) begin
        lk_hit  = 1'b1;
        lk_way  = WW'(i);
        lk_port = port[i];
      end
  end

  // replacement choice: first invalid way, else the LRU way
  logic [WW-1:0] repl_way;
  always_comb begin
    repl_way = '0;
    for (int i = ENTRIES - 1; i >= 0; i--)
      if (rank[i] == WW'(ENTRIES - 1)) repl_way = WW'(i);
    for (int i = ENTRIES - 1; i >= 0; i--)
      if (!vld[i]) begin
        repl_way = WW'(i);
      end
  end

  logic [WW-1:0] w;
  assign w = wr_use_way ? wr_way : repl_way;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) begin
        vld[i]  <= 1'b0;
        tag[i]  <= '0;
        port[i] <= '0;
        rank[i] <= WW'(i);
      end
    end else if (flush) begin
      for (int i = 0; i < ENTRIES; i++) vld[i] <= 1'b0;
    end else if (wr_en) begin
      tag[w]  <= wr_addr;
      port[w] <= wr_port;
      vld[w]  <= wr_valid;
      for (int i = 0; i < ENTRIES; i++)
        if (rank[i] < rank[w]) rank[i] <= rank[i] + 1'b1;
      rank[w] <= '0;
    end
  end

endmodule
