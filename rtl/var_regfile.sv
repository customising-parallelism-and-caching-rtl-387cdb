// var_regfile: the variable register file of a hypothesis evaluation processor.
// Each variable of the hypothesis owns one register. Parallel unification needs
// one read and one write port per lane, so every argument of a clause can be
// compared with, or bound to, its variable in the same cycle; the published architecture asks
// for this parallel access. A further write port lets the processor control bind
// the head argument (the example) before the search starts; it has priority.
// Reads are combinational; writes take effect on the rising clock edge. If two
// lanes write one register the higher lane wins (compiled hypotheses never do
// this). Port structure and priorities are choices of this design.
module var_regfile
  import ilp_pkg::*;
#(
  parameter int NREGS  = ilp_pkg::NVARS,
  parameter int NPORTS = ilp_pkg::MAX_ARITY
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // lane read ports
  input  logic [$clog2(NREGS)-1:0]    rd_idx [NPORTS],
  output arg_t                        rd_val [NPORTS],
  // lane write ports
  input  logic                        wr_en  [NPORTS],
  input  logic [$clog2(NREGS)-1:0]    wr_idx [NPORTS],
  input  arg_t                        wr_val [NPORTS],
  // control write port (argument data)
  input  logic                        ctl_wr_en,
  input  logic [$clog2(NREGS)-1:0]    ctl_wr_idx,
  input  arg_t                        ctl_wr_val
);
  arg_t regs [NREGS];

  always_comb
    for (int p = 0; p < NPORTS; p++) rd_val[p] = regs[rd_idx[p]];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int r = 0; r < NREGS; r++) regs[r] <= '0;
    end else begin
      for (int p = 0; p < NPORTS; p++)
        if (wr_en[p]) regs[wr_idx[p]] <= wr_val[p];
      if (ctl_wr_en) regs[ctl_wr_idx] <= ctl_wr_val;
    end
  end
endmodule
