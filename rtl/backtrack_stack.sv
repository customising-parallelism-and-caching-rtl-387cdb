// backtrack_stack: the small LIFO of the failure-driven search loop. When a
// literal matches, the unifier pushes the address of the next clause of that
// literal's section; when a later literal runs out of clauses, the address is
// popped and the search resumes the previous literal from it. One entry per
// literal level is enough, so DEPTH defaults to the maximum number of body
// literals. The stack itself is the published architecture's; its depth, the clear input and
// the rule that pop wins over push are choices of this design.
// Interface: push/pop/clear are sampled on the rising clock edge; top is the
// most recently pushed entry, valid while empty is low.
module backtrack_stack #(
  parameter int DEPTH = ilp_pkg::MAX_LITS,
  parameter int W     = ilp_pkg::ADDR_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         push,
  input  logic [W-1:0] push_data,
  input  logic         pop,
  output logic [W-1:0] top,
  output logic         empty,
  output logic         full
);
  localparam int PW = $clog2(DEPTH + 1);
  localparam int LW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [PW-1:0] sp;             // number of entries held

  assign empty = (sp == '0);
  assign full  = (sp == PW'(DEPTH));
  assign top   = empty ? '0 : mem[LW'(sp - PW'(1))];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sp <= '0;
    end else if (clear) begin
      sp <= '0;
    end else if (pop) begin
      if (!empty) sp <= sp - PW'(1);
    end else if (push && !full) begin
      sp <= sp + PW'(1);
    end
  end

  always_ff @(posedge clk) begin
    if (!clear && !pop && push && !full) mem[LW'(sp)] <= push_data;
  end

  // The search never pops an empty stack nor overfills it.
  property p_no_underflow; @(posedge clk) disable iff (!rst_n) (pop && !clear) |-> !empty; endproperty
  property p_no_overflow;  @(posedge clk) disable iff (!rst_n) (push && !pop && !clear) |-> !full; endproperty
  a_no_underflow: assert property (p_no_underflow);
  a_no_overflow:  assert property (p_no_overflow);
endmodule
