// tb_ilp_top: end-to-end test of the multi-processor system at its default
// size (8 processors, 4 banks shared by 2 processors each, parallel
// unification, two 44-line caches per processor).
//
// A background knowledge base of 188 compounds (the size of the mutagenesis
// example set used for the rule-3 benchmark) is generated, with up to 44 atm/5
// and 44 bond/4 clauses per compound; every bank holds a copy. The host then
// tests nine hypotheses (variants of rules 1, 2 and 3) against all 188
// examples: 1692 queries, streamed as fast as the system accepts them, with the
// host stalling results at random. Every result is compared with the reference
// search. The test counts and requires each mechanism of the design: cache
// hits and misses, backtracking, bank sharing conflicts resolved by the
// semaphore, all processors busy at once, a hypothesis reload, a cache flush,
// covered and uncovered examples. It reports the total cycle count.
module tb_ilp_top;
  import ilp_pkg::*;
  import tb_ilp_pkg::*;
  localparam int NPROC = 8, NBANK = 4, LAT = 4, NEX = 188;

  logic clk = 0, rst_n = 0, flush = 0;
  logic h_hyp_valid = 0, h_hyp_ready, h_q_valid = 0, h_q_ready, h_r_valid, h_r_ready = 0, all_idle;
  hyp_wr_t h_hyp;
  query_t h_q;
  result_t h_r;
  logic ev_hit [NPROC], ev_miss [NPROC], ev_backtrack [NPROC];
  logic mem_rd_en [NBANK];
  addr_t mem_addr [NBANK];
  word_t mem_rdata [NBANK];
  int checks = 0, failures = 0;

  ilp_top dut (.clk, .rst_n, .flush, .h_hyp_valid, .h_hyp_ready, .h_hyp, .h_q_valid, .h_q_ready, .h_q,
    .h_r_valid, .h_r_ready, .h_r, .all_idle, .ev_hit, .ev_miss, .ev_backtrack, .mem_rd_en, .mem_addr, .mem_rdata);

  for (genvar b = 0; b < NBANK; b++) begin : g_mem
    ext_sram_model #(.LAT(LAT)) u_mem (.clk, .rd_en(mem_rd_en[b]), .addr(mem_addr[b]), .rdata(mem_rdata[b]));
  end
  always #5 clk = ~clk;

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  // mechanism counters
  longint nhit = 0, nmiss = 0, nbt = 0, nconflict = 0, nbankrd = 0, max_busy = 0, nreload = 0, nflush = 0;
  always @(posedge clk) if (rst_n) begin
    int busy;
    busy = 0;
    for (int i = 0; i < NPROC; i++) begin
      if (ev_hit[i]) nhit++;
      if (ev_miss[i]) nmiss++;
      if (ev_backtrack[i]) nbt++;
      if (!dut.p_q_ready[i]) busy++;
    end
    if (busy > max_busy) max_busy = busy;
    for (int b = 0; b < NBANK; b++) begin
      if (mem_rd_en[b]) nbankrd++;
      if (dut.m_req_valid[2*b] && dut.m_req_valid[2*b+1]) nconflict++;
    end
  end

  bit exp_res [256];
  int nres = 0, ncov = 0;
  always @(posedge clk) if (h_r_valid && h_r_ready) begin
    chk(h_r.success == exp_res[h_r.tag], "result matches reference search");
    if (h_r.success) ncov++;
    nres++;
  end

  task automatic load_hyp();
    hyp_wr_t s [MAX_LITS * (MAX_ARITY + 1)];
    int n = hyp_stream(s);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      h_hyp_valid = 1; h_hyp = s[i];
      #1 while (!h_hyp_ready) begin @(negedge clk); #1; end
      @(posedge clk); #1 h_hyp_valid = 0;
    end
    nreload++;
  endtask

  longint t0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    int reads;
    h_hyp = '0; h_q = '0;
    gen_background(NEX, 44, 21);
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      forever begin @(negedge clk); h_r_ready = ($urandom_range(0, 7) != 0); end
    join_none
    t0 = cyc;
    for (int h = 0; h < 9; h++) begin
      int base_res;
      case (h % 3)
        0: hyp_rule3(27 + h / 3, 1, 7 - h / 3);
        1: hyp_rule2(27, 27 - h / 3, 3);
        default: hyp_rule1(27 - h / 3);
      endcase
      load_hyp();
      base_res = nres;
      for (int k = 0; k < NEX; k++) begin
        exp_res[k] = ref_eval(k, reads);
        @(negedge clk);
        h_q_valid = 1; h_q = make_query(k, k);
        #1 while (!h_q_ready) begin @(negedge clk); #1; end
        @(posedge clk); #1 h_q_valid = 0;
      end
      while (nres != base_res + NEX || !all_idle) @(negedge clk);
      if (h == 4) begin
        @(negedge clk); flush = 1; @(negedge clk); flush = 0; nflush++;
      end
    end
    $display("cycles=%0d results=%0d covered=%0d hits=%0d misses=%0d backtracks=%0d bank_reads=%0d bank_conflicts=%0d max_busy=%0d",
             cyc - t0, nres, ncov, nhit, nmiss, nbt, nbankrd, nconflict, max_busy);
    chk(nres == 9 * NEX, "all results returned");
    chk(nhit > 0, "cache hits happened");
    chk(nmiss > 0, "cache misses happened");
    chk(nhit > nmiss, "hits outnumber misses");
    chk(nbt > 0, "backtracking happened");
    chk(nconflict > 0, "bank sharing conflicts happened");
    chk(max_busy == NPROC, "all processors busy at once");
    chk(nreload == 9, "hypothesis reloads");
    chk(nflush == 1, "cache flush");
    chk(ncov > 0 && ncov < nres, "covered and uncovered examples");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
