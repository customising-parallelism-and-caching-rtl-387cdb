// proc_ctrl: the control block of a hypothesis evaluation processor.
//
// It links the processor to the main controller. Hypothesis data arriving from
// the host are written into the hypothesis data registers. An example query is
// accepted only while the processor is idle: its key (the example, the head
// argument of the hypothesis) is written into variable register 0, the section
// bounds of each predicate for that example are held for the unifier, and the
// unifier is started. When the unifier finishes, the result is offered, with the
// host's query tag, until the main controller takes it.
//
// The block's role is the published architecture's; binding the head argument to variable 0,
// the query format and the handshakes are choices of this design.
// Timing: query accepted in cycle t, unifier started in t+1, result offered the
// cycle after the unifier's done.
module proc_ctrl
  import ilp_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  // from the main controller
  input  logic      hyp_wr_valid,
  input  hyp_wr_t   hyp_wr_in,
  input  logic      q_valid,
  output logic      q_ready,
  input  query_t    q,
  output logic      r_valid,
  input  logic      r_ready,
  output result_t   r,
  // to the hypothesis data registers
  output logic      hr_wr_en,
  output hyp_wr_t   hr_wr,
  // argument data to the variable register file
  output logic      arg_wr_en,
  output logic [VAR_W-1:0] arg_wr_idx,
  output arg_t      arg_wr_val,
  // unifier
  output logic      u_start,
  output section_t  u_sect [NPRED],
  input  logic      u_done,
  input  logic      u_success
);
  typedef enum logic [1:0] {P_IDLE, P_START, P_RUN, P_RESULT} state_e;
  state_e           state;
  logic [TAG_W-1:0] tag_q;
  logic             succ_q;

  assign q_ready    = (state == P_IDLE);
  assign hr_wr_en   = hyp_wr_valid && (state == P_IDLE);
  assign hr_wr      = hyp_wr_in;
  assign arg_wr_en  = q_valid && q_ready;
  assign arg_wr_idx = '0;
  assign arg_wr_val = q.key;
  assign u_start    = (state == P_START);
  assign r_valid    = (state == P_RESULT);
  assign r.tag      = tag_q;
  assign r.success  = succ_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= P_IDLE;
      tag_q  <= '0;
      succ_q <= 1'b0;
      for (int p = 0; p < NPRED; p++) u_sect[p] <= '0;
    end else begin
      unique case (state)
        P_IDLE: if (q_valid && q_ready) begin
          tag_q <= q.tag;
          for (int p = 0; p < NPRED; p++) u_sect[p] <= q.sect[p];
          state <= P_START;
        end
        P_START: state <= P_RUN;
        P_RUN: if (u_done) begin
          succ_q <= u_success;
          state  <= P_RESULT;
        end
        P_RESULT: if (r_ready) state <= P_IDLE;
        default: state <= P_IDLE;
      endcase
    end
  end

  // Hypothesis data only change while no query is being evaluated.
  a_hyp_idle: assert property (@(posedge clk) disable iff (!rst_n)
    hyp_wr_valid |-> state == P_IDLE);
endmodule
