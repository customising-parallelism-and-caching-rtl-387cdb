// ext_mem_ctrl: the external memory control of a hypothesis evaluation
// processor. It takes a cache miss, registers the address, and holds the read
// request towards the shared RAM control until the bank is granted; the word
// that comes back is passed on to the cache control. A processor has at most one
// read outstanding, since its cache is not pipelined. The block is named in the
// published architecture; the register stage and the valid/ready handshakes are choices of
// this design. Timing: one cycle from the cache request to the request at the
// RAM control, then whatever the bank and its sharing cost.
module ext_mem_ctrl
  import ilp_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  // cache side
  input  logic  c_req_valid,
  output logic  c_req_ready,
  input  addr_t c_req_addr,
  output logic  c_rsp_valid,
  output word_t c_rsp_data,
  // RAM control side
  output logic  m_req_valid,
  input  logic  m_req_ready,
  output addr_t m_req_addr,
  input  logic  m_rsp_valid,
  input  word_t m_rsp_data
);
  typedef enum logic [1:0] {E_IDLE, E_REQ, E_WAIT} state_e;
  state_e state;
  addr_t  addr_q;

  assign c_req_ready = (state == E_IDLE);
  assign m_req_valid = (state == E_REQ);
  assign m_req_addr  = addr_q;
  assign c_rsp_valid = (state == E_WAIT) && m_rsp_valid;
  assign c_rsp_data  = m_rsp_data;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= E_IDLE;
      addr_q <= '0;
    end else begin
      unique case (state)
        E_IDLE: if (c_req_valid) begin
          addr_q <= c_req_addr;
          state  <= E_REQ;
        end
        E_REQ:  if (m_req_ready) state <= E_WAIT;
        E_WAIT: if (m_rsp_valid) state <= E_IDLE;
        default: state <= E_IDLE;
      endcase
    end
  end

  a_rsp_expected: assert property (@(posedge clk) disable iff (!rst_n)
    m_rsp_valid |-> state == E_WAIT);
endmodule
