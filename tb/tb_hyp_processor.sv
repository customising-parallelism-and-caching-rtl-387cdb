// tb_hyp_processor: one processor with its own RAM control and a bank model
// (external read: 6 cycles). Loads the hypotheses of rules 3, 2 and 1, runs
// examples and compares each result with the reference search. Checks that the
// caches work: no clause misses twice within one example (the whole section
// stays resident), later reads hit, backtracking occurs, and an external read
// takes 6 cycles from the miss to the word.
module tb_hyp_processor;
  import ilp_pkg::*;
  import tb_ilp_pkg::*;
  parameter int LANES = MAX_ARITY;
  localparam int LAT = 4;

  logic clk = 0, rst_n = 0, flush = 0;
  logic hyp_wr_valid = 0, q_valid = 0, q_ready, r_valid, r_ready = 0;
  hyp_wr_t hyp_wr;
  query_t q;
  result_t r;
  logic m_req_valid, m_req_ready, m_rsp_valid, ev_hit, ev_miss, ev_backtrack;
  addr_t m_req_addr;
  word_t m_rsp_data;
  logic rv [1], rr [1], sv [1], mem_rd_en;
  addr_t ra [1], mem_addr;
  word_t mem_rdata;
  int checks = 0, failures = 0;

  hyp_processor #(.LANES(LANES)) dut (.clk, .rst_n, .flush, .hyp_wr_valid, .hyp_wr, .q_valid, .q_ready, .q,
    .r_valid, .r_ready, .r, .m_req_valid, .m_req_ready, .m_req_addr, .m_rsp_valid, .m_rsp_data,
    .ev_hit, .ev_miss, .ev_backtrack);
  assign rv[0] = m_req_valid;
  assign ra[0] = m_req_addr;
  assign m_req_ready = rr[0];
  assign m_rsp_valid = sv[0];
  ram_ctrl #(.NREQ(1), .RD_LAT(LAT)) u_rc (.clk, .rst_n, .req_valid(rv), .req_ready(rr), .req_addr(ra),
    .rsp_valid(sv), .rsp_data(m_rsp_data), .mem_rd_en, .mem_addr, .mem_rdata);
  ext_sram_model #(.LAT(LAT)) u_mem (.clk, .rd_en(mem_rd_en), .addr(mem_addr), .rdata(mem_rdata));
  always #5 clk = ~clk;

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  // external read latency: cycles from the cache's miss request to the word
  int xlat = -1, xlat_ok = 0, xlat_bad = 0;
  always @(posedge clk) if (rst_n) begin
    if (ev_miss) xlat = 0;
    else if (xlat >= 0) xlat++;
    if (dut.x_rsp_valid) begin
      if (xlat == 6) xlat_ok++; else xlat_bad++;
      xlat = -1;
    end
  end

  int nhit = 0, nmiss = 0, nbt = 0;
  always @(posedge clk) begin
    if (ev_hit) nhit++;
    if (ev_miss) nmiss++;
    if (ev_backtrack) nbt++;
  end

  task automatic load_hyp();
    hyp_wr_t s [MAX_LITS * (MAX_ARITY + 1)];
    int n = hyp_stream(s);
    for (int i = 0; i < n; i++) begin
      @(negedge clk); hyp_wr_valid = 1; hyp_wr = s[i];
    end
    @(negedge clk); hyp_wr_valid = 0;
  endtask

  longint total_cycles = 0;
  int ncov = 0, nq = 0;
  task automatic run_example(int k);
    int reads, m0, c0;
    bit exp;
    exp = ref_eval(k, reads);
    @(negedge clk);
    q = make_query(k, k % 256); q_valid = 1;
    m0 = nmiss;
    #1 while (!q_ready) begin @(negedge clk); #1; end
    @(negedge clk); q_valid = 0;
    c0 = 0;
    while (!r_valid) begin @(negedge clk); c0++; end
    total_cycles += c0;
    chk(r.success == exp && r.tag == TAG_W'(k % 256), "result");
    chk(nmiss - m0 <= sec_cnt[k][0] + sec_cnt[k][1], "each clause misses at most once per example");
    if (exp) ncov++;
    nq++;
    r_ready = 1; @(negedge clk); r_ready = 0;
  endtask

  initial begin
    hyp_wr = '0; q = '0;
    gen_background(NKEYS, 30, 11);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int h = 0; h < 3; h++) begin
      if (h == 0) hyp_rule3(27, 1, 7);
      else if (h == 1) hyp_rule2(27, 27, 3);
      else hyp_rule1(27);
      load_hyp();
      for (int k = 0; k < 50; k++) run_example(k);
    end
    chk(nhit > nmiss, "cache hits outnumber misses");
    chk(nbt > 0, "backtracking occurred");
    chk(xlat_ok > 0 && xlat_bad == 0, "external read latency of 6 cycles");
    $display("external reads at 6 cycles: %0d, other: %0d", xlat_ok, xlat_bad);
    chk(ncov > 0 && ncov < nq, "both outcomes");
    $display("queries=%0d covered=%0d cycles=%0d hits=%0d misses=%0d backtracks=%0d", nq, ncov, total_cycles, nhit, nmiss, nbt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (3000000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
