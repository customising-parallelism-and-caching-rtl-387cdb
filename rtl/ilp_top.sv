// ilp_top: the multi-processor hypothesis tester.
//
// NPROC hypothesis evaluation processors test the examples of one hypothesis in
// parallel (query-level parallelism), each unifying all arguments of a clause
// at once (unification parallelism) and keeping the clauses of its current
// example in its own caches. Every RAM control shares one external memory bank
// between NPROC/NBANK processors. The main controller broadcasts the hypothesis
// and hands each example to an idle processor. Eight processors and four banks,
// two processors per bank, follow the published architecture's system diagram; every bank
// must hold the same packed background data.
//
// Ports: host hypothesis, query and result streams (valid/ready), a cache flush,
// per-processor event strobes for performance counting, and one read port per external bank (address/strobe out, data in MEM_LAT
// cycles after the sampling edge).
module ilp_top
  import ilp_pkg::*;
#(
  parameter int NPROC       = 8,
  parameter int NBANK       = 4,
  parameter int LANES       = ilp_pkg::MAX_ARITY,
  parameter int CACHE_DEPTH = 44,
  parameter int NCACHE      = ilp_pkg::NPRED,
  parameter int MEM_LAT     = 4
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    flush,
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
  // per-processor events: cache hit, cache miss, backtrack
  output logic    ev_hit       [NPROC],
  output logic    ev_miss      [NPROC],
  output logic    ev_backtrack [NPROC],
  output logic    mem_rd_en [NBANK],
  output addr_t   mem_addr  [NBANK],
  input  word_t   mem_rdata [NBANK]
);
  localparam int PPB = NPROC / NBANK;   // processors per bank

  logic    p_hyp_valid;
  hyp_wr_t p_hyp;
  logic    p_q_valid [NPROC];
  logic    p_q_ready [NPROC];
  query_t  p_q;
  logic    p_r_valid [NPROC];
  logic    p_r_ready [NPROC];
  result_t p_r       [NPROC];

  logic    m_req_valid [NPROC];
  logic    m_req_ready [NPROC];
  addr_t   m_req_addr  [NPROC];
  logic    m_rsp_valid [NPROC];
  word_t   m_rsp_data  [NBANK];

  main_ctrl #(.NPROC(NPROC)) u_main (
    .clk, .rst_n,
    .h_hyp_valid, .h_hyp_ready, .h_hyp,
    .h_q_valid, .h_q_ready, .h_q,
    .h_r_valid, .h_r_ready, .h_r, .all_idle,
    .p_hyp_valid, .p_hyp, .p_q_valid, .p_q_ready, .p_q,
    .p_r_valid, .p_r_ready, .p_r
  );

  for (genvar i = 0; i < NPROC; i++) begin : g_proc
    hyp_processor #(.LANES(LANES), .CACHE_DEPTH(CACHE_DEPTH), .NCACHE(NCACHE)) u_p (
      .clk, .rst_n, .flush,
      .hyp_wr_valid(p_hyp_valid), .hyp_wr(p_hyp),
      .q_valid(p_q_valid[i]), .q_ready(p_q_ready[i]), .q(p_q),
      .r_valid(p_r_valid[i]), .r_ready(p_r_ready[i]), .r(p_r[i]),
      .m_req_valid(m_req_valid[i]), .m_req_ready(m_req_ready[i]), .m_req_addr(m_req_addr[i]),
      .m_rsp_valid(m_rsp_valid[i]), .m_rsp_data(m_rsp_data[i / PPB]),
      .ev_hit(ev_hit[i]), .ev_miss(ev_miss[i]), .ev_backtrack(ev_backtrack[i])
    );
  end

  for (genvar b = 0; b < NBANK; b++) begin : g_bank
    logic  rv [PPB], rr [PPB], sv [PPB];
    addr_t ra [PPB];
    for (genvar k = 0; k < PPB; k++) begin : g_port
      assign rv[k] = m_req_valid[b*PPB + k];
      assign ra[k] = m_req_addr[b*PPB + k];
      assign m_req_ready[b*PPB + k] = rr[k];
      assign m_rsp_valid[b*PPB + k] = sv[k];
    end
    ram_ctrl #(.NREQ(PPB), .RD_LAT(MEM_LAT)) u_ram (
      .clk, .rst_n,
      .req_valid(rv), .req_ready(rr), .req_addr(ra),
      .rsp_valid(sv), .rsp_data(m_rsp_data[b]),
      .mem_rd_en(mem_rd_en[b]), .mem_addr(mem_addr[b]), .mem_rdata(mem_rdata[b])
    );
  end

  initial assert (NPROC % NBANK == 0) else $error("NPROC must be a multiple of NBANK");
endmodule
