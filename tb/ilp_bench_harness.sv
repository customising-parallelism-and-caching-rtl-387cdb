// ilp_bench_harness: one ilp_top configuration with its bank models and a host
// driver. When go rises it loads the rule-3 hypothesis, streams queries for
// examples 0..NEX-1, compares every result with the reference search and
// reports the cycles from the first hypothesis write to the last result, the
// reads of the external banks and the cache hits.
module ilp_bench_harness
  import ilp_pkg::*;
  import tb_ilp_pkg::*;
#(
  parameter int NPROC   = 8,
  parameter int NBANK   = 4,
  parameter int LANES   = ilp_pkg::MAX_ARITY,
  parameter int MEM_LAT = 4,
  parameter int NEX     = 188
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   go,
  output logic   finished,
  output longint cycles,
  output int     checks,
  output int     failures,
  output longint bank_reads,
  output longint hits
);
  logic h_hyp_valid, h_hyp_ready, h_q_valid, h_q_ready, h_r_valid, all_idle;
  hyp_wr_t h_hyp;
  query_t h_q;
  result_t h_r;
  logic ev_hit [NPROC], ev_miss [NPROC], ev_backtrack [NPROC];
  logic mem_rd_en [NBANK];
  addr_t mem_addr [NBANK];
  word_t mem_rdata [NBANK];

  ilp_top #(.NPROC(NPROC), .NBANK(NBANK), .LANES(LANES), .MEM_LAT(MEM_LAT)) u_top (
    .clk, .rst_n, .flush(1'b0), .h_hyp_valid, .h_hyp_ready, .h_hyp, .h_q_valid, .h_q_ready, .h_q,
    .h_r_valid, .h_r_ready(1'b1), .h_r, .all_idle, .ev_hit, .ev_miss, .ev_backtrack,
    .mem_rd_en, .mem_addr, .mem_rdata);
  for (genvar b = 0; b < NBANK; b++) begin : g_mem
    ext_sram_model #(.LAT(MEM_LAT)) u_mem (.clk, .rd_en(mem_rd_en[b]), .addr(mem_addr[b]), .rdata(mem_rdata[b]));
  end

  bit exp_res [256];
  int nres;
  longint cyc;
  always @(posedge clk) begin
    int nrd, nht;
    nrd = 0;
    nht = 0;
    cyc <= cyc + 1;
    for (int b = 0; b < NBANK; b++) if (rst_n && mem_rd_en[b]) nrd++;
    for (int p = 0; p < NPROC; p++) if (rst_n && ev_hit[p]) nht++;
    bank_reads <= bank_reads + longint'(nrd);
    hits <= hits + longint'(nht);
    if (rst_n && h_r_valid) begin
      checks <= checks + 1;
      if (h_r.success != exp_res[h_r.tag]) failures <= failures + 1;
      nres <= nres + 1;
    end
  end

  initial begin
    hyp_wr_t s [MAX_LITS * (MAX_ARITY + 1)];
    int n, reads;
    longint t0;
    finished = 0; cycles = 0; checks = 0; failures = 0; nres = 0; cyc = 0; bank_reads = 0; hits = 0;
    h_hyp_valid = 0; h_q_valid = 0; h_hyp = '0; h_q = '0;
    wait (go);
    for (int k = 0; k < NEX; k++) exp_res[k] = ref_eval(k, reads);
    n = hyp_stream(s);
    @(negedge clk);
    t0 = cyc;
    for (int i = 0; i < n; i++) begin
      h_hyp_valid = 1; h_hyp = s[i];
      #1 while (!h_hyp_ready) begin @(negedge clk); #1; end
      @(negedge clk);
    end
    h_hyp_valid = 0;
    for (int k = 0; k < NEX; k++) begin
      h_q_valid = 1; h_q = make_query(k, k);
      #1 while (!h_q_ready) begin @(negedge clk); #1; end
      @(negedge clk);
    end
    h_q_valid = 0;
    while (nres != NEX || !all_idle) @(negedge clk);
    cycles = cyc - t0;
    finished = 1;
  end
endmodule
