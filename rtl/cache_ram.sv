// cache_ram: the on-chip memory of one cache, an embedded block RAM of DEPTH
// lines. A line holds the address tag and the packed clause. One synchronous
// read port (data one cycle after the address) and one write port. The cache
// depth (44, the most clauses sharing one index in the mutagenesis data) is the
// published architecture's; the single-port organisation is a choice of this design.
module cache_ram #(
  parameter int DEPTH = 44,
  parameter int W     = 64
) (
  input  logic                     clk,
  input  logic                     rd_en,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output logic [W-1:0]             rd_data,
  input  logic                     wr_en,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  logic [W-1:0]             wr_data
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en && int'(wr_addr) < DEPTH) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= (int'(rd_addr) < DEPTH) ? mem[rd_addr] : '0;
  end
endmodule
