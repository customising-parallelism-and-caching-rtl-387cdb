// hyp_regs: the hypothesis data registers. For every body literal they hold the
// predicate it calls and, for each argument, a type register (output, input,
// void variable or constant) and a data register (the constant, or the number of
// the variable). A literal-count register says how many body literals the
// current hypothesis has. This organisation is the published architecture's; the write format
// (one argument, or one literal header, per cycle) and reset clearing the count
// are choices of this design. The unifier reads one whole literal at a time
// (combinational read), so all its arguments are available to the parallel
// unification lanes in the same cycle.
module hyp_regs
  import ilp_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  wr_en,
  input  hyp_wr_t               wr,
  input  logic [LIT_W-1:0]      rd_lit,
  output logic [PRED_W-1:0]     rd_pred,
  output arg_type_e             rd_type [MAX_ARITY],
  output arg_t                  rd_data [MAX_ARITY],
  output logic [LIT_W:0]        nlits
);
  logic [PRED_W-1:0] pred_r [MAX_LITS];
  arg_type_e         type_r [MAX_LITS][MAX_ARITY];
  arg_t              data_r [MAX_LITS][MAX_ARITY];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      nlits <= '0;
      for (int l = 0; l < MAX_LITS; l++) begin
        pred_r[l] <= '0;
        for (int a = 0; a < MAX_ARITY; a++) begin
          type_r[l][a] <= ARG_VOID;
          data_r[l][a] <= '0;
        end
      end
    end else if (wr_en) begin
      if (wr.is_header) begin
        pred_r[wr.lit] <= wr.pred;
        nlits          <= wr.nlits;
      end else if (int'(wr.arg) < MAX_ARITY) begin
        type_r[wr.lit][wr.arg] <= wr.atype;
        data_r[wr.lit][wr.arg] <= wr.data;
      end
    end
  end

  // A hypothesis has at most MAX_LITS body literals.
  a_nlits: assert property (@(posedge clk) disable iff (!rst_n)
    (wr_en && wr.is_header) |-> int'(wr.nlits) <= MAX_LITS);

  always_comb begin
    rd_pred = pred_r[rd_lit];
    for (int a = 0; a < MAX_ARITY; a++) begin
      rd_type[a] = type_r[rd_lit][a];
      rd_data[a] = data_r[rd_lit][a];
    end
  end
endmodule
