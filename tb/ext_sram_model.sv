// ext_sram_model: behavioural model of one external memory bank holding the
// packed background data (tb_ilp_pkg::bg_mem). A read sampled on a rising edge
// is presented on rdata LAT cycles later, through a LAT-stage pipeline, so one
// read can start every cycle.
module ext_sram_model
  import ilp_pkg::*;
#(
  parameter int LAT = 4
) (
  input  logic  clk,
  input  logic  rd_en,
  input  addr_t addr,
  output word_t rdata
);
  word_t stage [LAT];
  always_ff @(posedge clk) begin
    stage[0] <= rd_en ? tb_ilp_pkg::bg_mem[int'(addr) % tb_ilp_pkg::MEMSZ] : '0;
    for (int s = 1; s < LAT; s++) stage[s] <= stage[s-1];
  end
  assign rdata = stage[LAT-1];
endmodule
