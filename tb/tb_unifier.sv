// tb_unifier: the unifier with hypothesis and variable registers, against the
// reference search of tb_ilp_pkg. The background memory is an ideal cache that
// answers every read 2 cycles after it is accepted. For each example it checks
// the result, the number of clauses read, and that a run of failing clauses is
// read at one clause every 2 cycles.
module tb_unifier;
  import ilp_pkg::*;
  import tb_ilp_pkg::*;

  parameter int LANES = MAX_ARITY;

  logic clk = 0, rst_n = 0, start = 0;
  section_t sect [NPRED];
  logic busy, done, success;
  logic [LIT_W-1:0] h_lit;
  logic [PRED_W-1:0] h_pred;
  arg_type_e h_type [MAX_ARITY];
  arg_t h_data [MAX_ARITY];
  logic [LIT_W:0] h_nlits;
  logic [VAR_W-1:0] vr_idx [LANES], vw_idx [LANES];
  arg_t vr_val [LANES], vw_val [LANES];
  logic vw_en [LANES];
  logic mreq_valid, mreq_ready, mrsp_valid, ev_backtrack;
  addr_t mreq_addr;
  logic [PRED_W-1:0] mreq_pred;
  cnt_t mreq_line;
  word_t mrsp_data;
  logic hw_en = 0;
  hyp_wr_t hw;
  logic ctl_en = 0;
  arg_t ctl_val;

  int checks = 0, failures = 0;

  hyp_regs u_h (.clk, .rst_n, .wr_en(hw_en), .wr(hw), .rd_lit(h_lit), .rd_pred(h_pred),
                .rd_type(h_type), .rd_data(h_data), .nlits(h_nlits));
  var_regfile #(.NREGS(NVARS), .NPORTS(LANES)) u_v (.clk, .rst_n, .rd_idx(vr_idx), .rd_val(vr_val),
                .wr_en(vw_en), .wr_idx(vw_idx), .wr_val(vw_val),
                .ctl_wr_en(ctl_en), .ctl_wr_idx('0), .ctl_wr_val(ctl_val));
  unifier #(.LANES(LANES)) dut (.clk, .rst_n, .start, .sect, .busy, .done, .success,
    .hyp_lit(h_lit), .hyp_pred(h_pred), .hyp_type(h_type), .hyp_data(h_data), .nlits(h_nlits),
    .vr_idx, .vr_val, .vw_en, .vw_idx, .vw_val,
    .mreq_valid, .mreq_ready, .mreq_addr, .mreq_pred, .mreq_line, .mrsp_valid, .mrsp_data, .ev_backtrack);

  always #5 clk = ~clk;

  // Ideal 2-cycle, non-pipelined memory.
  int    mstate = 0;
  addr_t ma;
  int    nreads;
  int    line_err = 0;
  int    gap_ok = 0, gap_bad = 0;
  longint last_accept = -10;
  longint cyc = 0;
  assign mreq_ready = (mstate == 0) || (mstate == 2);
  assign mrsp_valid = (mstate == 2);
  assign mrsp_data  = bg_mem[int'(ma)];
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (mreq_valid && mreq_ready) begin
      ma <= mreq_addr;
      mstate <= 1;
      nreads <= nreads + 1;
      if (int'(mreq_line) != int'(mreq_addr) - int'(sect[mreq_pred].base)) line_err <= line_err + 1;
      // consecutive reads inside a failing run are 2 cycles apart
      if (cyc - last_accept == 2) gap_ok <= gap_ok + 1;
      else if (cyc - last_accept < 2) gap_bad <= gap_bad + 1;
      last_accept <= cyc;
    end else if (mstate == 1) mstate <= 2;
    else if (mstate == 2) mstate <= 0;
  end

  task automatic load_hyp();
    hyp_wr_t s [MAX_LITS * (MAX_ARITY + 1)];
    int n = hyp_stream(s);
    for (int i = 0; i < n; i++) begin
      @(negedge clk); hw_en = 1; hw = s[i];
    end
    @(negedge clk); hw_en = 0;
  endtask

  task automatic run_example(int k);
    int reads, r0;
    bit exp;
    exp = ref_eval(k, reads);
    @(negedge clk);
    ctl_en = 1; ctl_val = arg_t'(k);
    for (int p = 0; p < NPRED; p++) begin
      sect[p].base = addr_t'(sec_base[k][p]); sect[p].count = cnt_t'(sec_cnt[k][p]);
    end
    @(negedge clk);
    ctl_en = 0; start = 1; r0 = nreads;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    if (exp) nsucc++;
    checks++;
    if (success != exp) begin failures++; $display("FAIL example %0d: success %0b exp %0b", k, success, exp); end
    checks++;
    if (nreads - r0 != reads) begin failures++; $display("FAIL example %0d: %0d reads, ref %0d", k, nreads - r0, reads); end
  endtask

  int nsucc = 0, nbt = 0;
  always @(posedge clk) if (ev_backtrack) nbt++;

  initial begin
    hw = '0; ctl_val = '0;
    for (int p = 0; p < NPRED; p++) sect[p] = '0;
    nreads = 0;
    gen_background(NKEYS, 20, 7);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int h = 0; h < 3; h++) begin
      if (h == 0) hyp_rule3(27, 1, 7);
      else if (h == 1) hyp_rule2(27, 27, 3);
      else hyp_rule1(27);
      load_hyp();
      for (int k = 0; k < 60; k++) begin
        run_example(k);
      end
    end
    // both outcomes must have occurred
    checks++;
    if (nsucc == 0 || nsucc == 180) begin failures++; $display("FAIL only one outcome seen"); end
    checks++;
    if (line_err != 0) begin failures++; $display("FAIL %0d wrong cache lines", line_err); end
    checks++;
    if (LANES == MAX_ARITY && (gap_ok == 0 || gap_bad != 0)) begin
      failures++; $display("FAIL read spacing: %0d at 2 cycles, %0d closer", gap_ok, gap_bad);
    end
    checks++;
    if (nbt == 0) begin failures++; $display("FAIL no backtracking happened"); end
    $display("reads=%0d backtracks=%0d two-cycle reads=%0d covered=%0d", nreads, nbt, gap_ok, nsucc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (2000000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
