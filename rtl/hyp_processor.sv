// hyp_processor: one hypothesis evaluation processor.
//
// A datapath that tests one example against the current hypothesis without
// instructions: the control takes the query, the hypothesis data registers
// describe the body literals, the unifier runs the failure-driven search,
// unifying LANES arguments per cycle against the variable register file, and
// the background data come through the cache control, its per-predicate caches
// and the external memory control from an external bank shared with other
// processors. The structure is the published architecture's (its processor block diagram);
// parameter values other than those of ilp_pkg are choices of this design.
//
// Interface: hypothesis writes (accepted only while idle), queries and results
// with valid/ready handshakes; one read port towards a RAM control.
module hyp_processor
  import ilp_pkg::*;
#(
  parameter int LANES       = ilp_pkg::MAX_ARITY,
  parameter int CACHE_DEPTH = 44,
  parameter int NCACHE      = ilp_pkg::NPRED
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    flush,
  input  logic    hyp_wr_valid,
  input  hyp_wr_t hyp_wr,
  input  logic    q_valid,
  output logic    q_ready,
  input  query_t  q,
  output logic    r_valid,
  input  logic    r_ready,
  output result_t r,
  // to the RAM control
  output logic    m_req_valid,
  input  logic    m_req_ready,
  output addr_t   m_req_addr,
  input  logic    m_rsp_valid,
  input  word_t   m_rsp_data,
  // events
  output logic    ev_hit,
  output logic    ev_miss,
  output logic    ev_backtrack
);
  // control <-> hypothesis registers, variable registers, unifier
  logic             hr_wr_en;
  hyp_wr_t          hr_wr;
  logic             arg_wr_en;
  logic [VAR_W-1:0] arg_wr_idx;
  arg_t             arg_wr_val;
  logic             u_start, u_done, u_success, u_busy;
  section_t         u_sect [NPRED];

  logic [LIT_W-1:0]  h_lit;
  logic [PRED_W-1:0] h_pred;
  arg_type_e         h_type [MAX_ARITY];
  arg_t              h_data [MAX_ARITY];
  logic [LIT_W:0]    h_nlits;

  logic [VAR_W-1:0]  vr_idx [LANES];
  arg_t              vr_val [LANES];
  logic              vw_en  [LANES];
  logic [VAR_W-1:0]  vw_idx [LANES];
  arg_t              vw_val [LANES];

  logic              mreq_valid, mreq_ready, mrsp_valid;
  addr_t             mreq_addr;
  logic [PRED_W-1:0] mreq_pred;
  cnt_t              mreq_line;
  word_t             mrsp_data;

  logic              x_req_valid, x_req_ready, x_rsp_valid;
  addr_t             x_req_addr;
  word_t             x_rsp_data;

  proc_ctrl u_ctrl (
    .clk, .rst_n,
    .hyp_wr_valid, .hyp_wr_in(hyp_wr),
    .q_valid, .q_ready, .q,
    .r_valid, .r_ready, .r,
    .hr_wr_en, .hr_wr,
    .arg_wr_en, .arg_wr_idx, .arg_wr_val,
    .u_start, .u_sect, .u_done, .u_success
  );

  hyp_regs u_hregs (
    .clk, .rst_n,
    .wr_en  (hr_wr_en),
    .wr     (hr_wr),
    .rd_lit (h_lit),
    .rd_pred(h_pred),
    .rd_type(h_type),
    .rd_data(h_data),
    .nlits  (h_nlits)
  );

  var_regfile #(.NREGS(NVARS), .NPORTS(LANES)) u_vrf (
    .clk, .rst_n,
    .rd_idx(vr_idx), .rd_val(vr_val),
    .wr_en(vw_en), .wr_idx(vw_idx), .wr_val(vw_val),
    .ctl_wr_en(arg_wr_en), .ctl_wr_idx(arg_wr_idx), .ctl_wr_val(arg_wr_val)
  );

  unifier #(.LANES(LANES)) u_unify (
    .clk, .rst_n,
    .start(u_start), .sect(u_sect), .busy(u_busy), .done(u_done), .success(u_success),
    .hyp_lit(h_lit), .hyp_pred(h_pred), .hyp_type(h_type), .hyp_data(h_data), .nlits(h_nlits),
    .vr_idx, .vr_val, .vw_en, .vw_idx, .vw_val,
    .mreq_valid, .mreq_ready, .mreq_addr, .mreq_pred, .mreq_line,
    .mrsp_valid, .mrsp_data,
    .ev_backtrack
  );

  cache_ctrl #(.DEPTH(CACHE_DEPTH), .NCACHE(NCACHE)) u_cache (
    .clk, .rst_n, .flush,
    .req_valid(mreq_valid), .req_ready(mreq_ready), .req_addr(mreq_addr),
    .req_pred(mreq_pred), .req_line(mreq_line),
    .rsp_valid(mrsp_valid), .rsp_data(mrsp_data),
    .ext_req_valid(x_req_valid), .ext_req_ready(x_req_ready), .ext_req_addr(x_req_addr),
    .ext_rsp_valid(x_rsp_valid), .ext_rsp_data(x_rsp_data),
    .ev_hit, .ev_miss
  );

  ext_mem_ctrl u_ext (
    .clk, .rst_n,
    .c_req_valid(x_req_valid), .c_req_ready(x_req_ready), .c_req_addr(x_req_addr),
    .c_rsp_valid(x_rsp_valid), .c_rsp_data(x_rsp_data),
    .m_req_valid, .m_req_ready, .m_req_addr, .m_rsp_valid, .m_rsp_data
  );

  // The unifier runs only between the control's start and its result.
  a_busy_start: assert property (@(posedge clk) disable iff (!rst_n)
    u_start |-> !u_busy);
endmodule
