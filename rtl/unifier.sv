// unifier: the search engine of a hypothesis evaluation processor.
//
// It runs the failure-driven loop of Prolog over the background data for one
// example. Each body literal calls one predicate; the clauses of that predicate
// that share the example's index are stored consecutively (a "section", given by
// base address and clause count). For the current literal the unifier reads the
// section clause by clause through the cache and unifies every argument with the
// hypothesis argument (arg_unify lanes). When a clause matches, the address of
// the next clause is pushed on the backtrack stack and the next literal starts at
// the beginning of its own section; when the last literal matches, the example
// is covered. When a literal runs out of clauses, the search backtracks: the
// previous literal's resume address is popped and its search continues. If the
// first literal runs out, the example is not covered.
//
// LANES arguments are unified per cycle. LANES = MAX_ARITY is parallel
// unification (a whole clause per cycle); LANES = 1 is sequential unification,
// one argument per cycle, stopping at the first failing argument.
//
// The loop, the stack and the four unification rules follow the published architecture. The
// section bounds arriving with the start request, the cache line being the
// clause's offset inside its section, and the handshakes are choices of this
// design. Timing: a clause that fails, read from a hitting cache, costs 2
// cycles (the next read is issued in the cycle the data arrive); a clause that
// matches costs one cycle more before the next literal's first read; a
// backtrack costs one cycle.
//
// Interface: start (one cycle, while idle) begins a search with sect[] held
// stable; done pulses for one cycle with success. Memory requests use a
// valid/ready handshake; the response is a one-cycle rsp_valid with the word.
module unifier
  import ilp_pkg::*;
#(
  parameter int LANES = ilp_pkg::MAX_ARITY
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // control
  input  logic                  start,
  input  section_t              sect [NPRED],
  output logic                  busy,
  output logic                  done,
  output logic                  success,
  // hypothesis data registers
  output logic [LIT_W-1:0]      hyp_lit,
  input  logic [PRED_W-1:0]     hyp_pred,
  input  arg_type_e             hyp_type [MAX_ARITY],
  input  arg_t                  hyp_data [MAX_ARITY],
  input  logic [LIT_W:0]        nlits,
  // variable register file
  output logic [VAR_W-1:0]      vr_idx [LANES],
  input  arg_t                  vr_val [LANES],
  output logic                  vw_en  [LANES],
  output logic [VAR_W-1:0]      vw_idx [LANES],
  output arg_t                  vw_val [LANES],
  // background memory (cache control)
  output logic                  mreq_valid,
  input  logic                  mreq_ready,
  output addr_t                 mreq_addr,
  output logic [PRED_W-1:0]     mreq_pred,
  output cnt_t                  mreq_line,
  input  logic                  mrsp_valid,
  input  word_t                 mrsp_data,
  // events, for performance counting
  output logic                  ev_backtrack
);
  localparam int NSTEP  = (MAX_ARITY + LANES - 1) / LANES;
  localparam int STEP_W = (NSTEP > 1) ? $clog2(NSTEP) : 1;

  typedef enum logic [2:0] {S_IDLE, S_BEGIN, S_FETCH, S_WAIT, S_STEP, S_DONE} state_e;
  state_e state;

  logic [LIT_W:0]    lit;          // current literal (one extra bit for compare)
  addr_t             addr;         // clause being unified
  word_t             word_q;       // held clause for sequential steps
  logic [STEP_W-1:0] step;
  logic              result_q;

  // Section of the current literal.
  addr_t sec_base, sec_end;
  always_comb begin
    sec_base = '0;
    sec_end  = '0;
    for (int p = 0; p < NPRED; p++)
      if (hyp_pred == PRED_W'(p)) begin
        sec_base = sect[p].base;
        sec_end  = sect[p].base + addr_t'(sect[p].count);
      end
  end
  assign hyp_lit = lit[LIT_W-1:0];

  // Arity of the current literal's predicate.
  int arity;
  always_comb begin
    arity = 0;
    for (int p = 0; p < NPRED; p++)
      if (hyp_pred == PRED_W'(p)) arity = pred_arity(p);
  end

  // ---------------- unification lanes ----------------
  word_t cur_word;
  arg_t  field [MAX_ARITY];
  assign cur_word = (state == S_STEP) ? word_q : mrsp_data;
  always_comb
    for (int a = 0; a < MAX_ARITY; a++) field[a] = unpack_arg(cur_word, hyp_pred, a);

  logic      lane_act   [LANES];
  arg_type_e lane_type  [LANES];
  arg_t      lane_hdata [LANES];
  arg_t      lane_bg    [LANES];
  logic      lane_match [LANES];
  logic      lane_bind  [LANES];

  always_comb begin
    for (int j = 0; j < LANES; j++) begin
      lane_act[j]   = (int'(step) * LANES + j < arity);
      lane_type[j]  = ARG_VOID;
      lane_hdata[j] = '0;
      lane_bg[j]    = '0;
      for (int a = 0; a < MAX_ARITY; a++)
        if (a == int'(step) * LANES + j) begin
          lane_type[j]  = hyp_type[a];
          lane_hdata[j] = hyp_data[a];
          lane_bg[j]    = field[a];
        end
      vr_idx[j] = lane_hdata[j][VAR_W-1:0];
    end
  end

  for (genvar j = 0; j < LANES; j++) begin : g_lane
    arg_unify u_arg (
      .atype   (lane_type[j]),
      .hyp_data(lane_hdata[j]),
      .var_val (vr_val[j]),
      .bg_val  (lane_bg[j]),
      .match   (lane_match[j]),
      .do_bind (lane_bind[j])
    );
  end

  // Outcome of the step being evaluated this cycle.
  logic eval, step_ok, last_step, clause_done, clause_ok;
  always_comb begin
    eval    = (state == S_WAIT && mrsp_valid) || (state == S_STEP);
    step_ok = 1'b1;
    for (int j = 0; j < LANES; j++)
      if (lane_act[j] && !lane_match[j]) step_ok = 1'b0;
    last_step   = ((int'(step) + 1) * LANES >= arity);
    clause_done = eval && (!step_ok || last_step);
    clause_ok   = step_ok;
  end

  always_comb
    for (int j = 0; j < LANES; j++) begin
      vw_en[j]  = eval && step_ok && lane_act[j] && lane_bind[j];
      vw_idx[j] = lane_hdata[j][VAR_W-1:0];
      vw_val[j] = lane_bg[j];
    end

  // ---------------- backtrack stack ----------------
  logic  stk_push, stk_pop;
  addr_t stk_top;
  backtrack_stack #(.DEPTH(MAX_LITS), .W(ADDR_W)) u_stack (
    .clk, .rst_n,
    .clear    (start && state == S_IDLE),
    .push     (stk_push),
    .push_data(addr + addr_t'(1)),
    .pop      (stk_pop),
    .top      (stk_top),
    .empty    (),
    .full     ()
  );

  logic last_lit, sec_left, next_left;
  assign last_lit  = (lit + 1'b1 >= nlits);
  assign sec_left  = (addr < sec_end);
  assign next_left = (addr + addr_t'(1) < sec_end);

  // Fast path: a failing clause with more clauses left issues the next read at once.
  logic fast_issue;
  assign fast_issue = clause_done && !clause_ok && next_left;

  always_comb begin
    mreq_valid = 1'b0;
    mreq_addr  = addr;
    if (state == S_FETCH && sec_left) mreq_valid = 1'b1;
    if (state == S_BEGIN) begin
      mreq_valid = (sec_base < sec_end);
      mreq_addr  = sec_base;
    end
    if (fast_issue) begin
      mreq_valid = 1'b1;
      mreq_addr  = addr + addr_t'(1);
    end
    mreq_pred = hyp_pred;
    mreq_line = cnt_t'(mreq_addr - sec_base);
  end

  assign stk_push     = clause_done && clause_ok && !last_lit;
  assign stk_pop      = (state == S_FETCH) && !sec_left && (lit != '0);
  assign ev_backtrack = stk_pop;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      lit      <= '0;
      addr     <= '0;
      step     <= '0;
      word_q   <= '0;
      result_q <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          lit  <= '0;
          step <= '0;
          if (nlits == '0) begin
            result_q <= 1'b1;           // empty body: trivially true
            state    <= S_DONE;
          end else begin
            state <= S_BEGIN;
          end
        end
        S_BEGIN: begin                  // first clause of the literal's section
          addr  <= sec_base;
          step  <= '0;
          state <= (sec_base < sec_end && mreq_ready) ? S_WAIT : S_FETCH;
        end
        S_FETCH: begin
          if (!sec_left) begin
            if (lit == '0) begin
              result_q <= 1'b0;
              state    <= S_DONE;
            end else begin
              lit  <= lit - 1'b1;       // backtrack to the previous literal
              addr <= stk_top;
            end
          end else if (mreq_ready) begin
            step  <= '0;
            state <= S_WAIT;
          end
        end
        S_WAIT, S_STEP: begin
          if (state == S_WAIT && mrsp_valid) word_q <= mrsp_data;
          if (eval) begin
            if (!clause_done) begin
              step  <= step + 1'b1;
              state <= S_STEP;
            end else if (clause_ok) begin
              if (last_lit) begin
                result_q <= 1'b1;
                state    <= S_DONE;
              end else begin
                lit   <= lit + 1'b1;
                state <= S_BEGIN;
              end
            end else begin
              addr <= addr + addr_t'(1);
              step <= '0;
              state <= (fast_issue && mreq_ready) ? S_WAIT : S_FETCH;
            end
          end
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy    = (state != S_IDLE);
  assign done    = (state == S_DONE);
  assign success = result_q;
endmodule
