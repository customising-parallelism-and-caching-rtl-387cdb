// main_ctrl: the main controller between the host and the processors.
//
// The host sends the hypothesis to test, encoded as hypothesis-register writes,
// and then one query per example. Hypothesis writes are broadcast to every
// processor; they are accepted only while all processors are idle, so each
// processor's hypothesis data change only between examples. Each query is
// passed to the lowest-numbered idle processor in the cycle it arrives. Results
// are collected round robin and returned to the host with their query tag.
//
// Broadcasting hypotheses and dispatching examples to parallel processors is the
// published architecture's; the dispatch and collection orders and the handshakes are
// choices of this design. The published architecture's tree of controllers for many
// processors is not built.
module main_ctrl
  import ilp_pkg::*;
#(
  parameter int NPROC = 8
) (
  input  logic    clk,
  input  logic    rst_n,
  // host
  input  logic    h_hyp_valid,
  output logic    h_hyp_ready,
  input  hyp_wr_t h_hyp,
  input  logic    h_q_valid,
  output logic    h_q_ready,
  input  query_t  h_q,
  output logic    h_r_valid,
  input  logic    h_r_ready,
  output result_t h_r,
  output logic    all_idle,
  // processors
  output logic    p_hyp_valid,
  output hyp_wr_t p_hyp,
  output logic    p_q_valid [NPROC],
  input  logic    p_q_ready [NPROC],
  output query_t  p_q,
  input  logic    p_r_valid [NPROC],
  output logic    p_r_ready [NPROC],
  input  result_t p_r       [NPROC]
);
  localparam int IW = (NPROC > 1) ? $clog2(NPROC) : 1;

  // ---- idle tracking and query dispatch ----
  logic          any_idle, sel_any;
  logic [IW-1:0] q_sel;
  always_comb begin
    all_idle = 1'b1;
    sel_any  = 1'b0;
    q_sel    = '0;
    for (int i = 0; i < NPROC; i++) begin
      if (!p_q_ready[i] || p_r_valid[i]) all_idle = 1'b0;
      if (!sel_any && p_q_ready[i]) begin
        sel_any = 1'b1;
        q_sel   = IW'(i);
      end
    end
    any_idle = sel_any;
  end

  assign h_hyp_ready = all_idle && !h_q_valid;
  assign p_hyp_valid = h_hyp_valid && h_hyp_ready;
  assign p_hyp       = h_hyp;
  assign h_q_ready   = any_idle;
  assign p_q         = h_q;
  always_comb
    for (int i = 0; i < NPROC; i++)
      p_q_valid[i] = h_q_valid && any_idle && (q_sel == IW'(i));

  // ---- result collection, round robin ----
  logic [IW-1:0] r_last_q;
  logic          r_any;
  logic [IW-1:0] r_sel;
  always_comb begin
    r_any = 1'b0;
    r_sel = '0;
    for (int k = 1; k <= NPROC; k++)
      if (!r_any && p_r_valid[(int'(r_last_q) + k) % NPROC]) begin
        r_any = 1'b1;
        r_sel = IW'((int'(r_last_q) + k) % NPROC);
      end
    for (int i = 0; i < NPROC; i++) p_r_ready[i] = h_r_ready && r_any && (r_sel == IW'(i));
  end
  assign h_r_valid = r_any;
  assign h_r       = p_r[r_sel];

  always_ff @(posedge clk) begin
    if (!rst_n) r_last_q <= IW'(NPROC - 1);
    else if (h_r_valid && h_r_ready) r_last_q <= r_sel;
  end
endmodule
