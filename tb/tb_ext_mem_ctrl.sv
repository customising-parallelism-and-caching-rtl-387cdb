// tb_ext_mem_ctrl: cache-side reads through the external memory control to a
// RAM-control model that grants after a random wait and answers a few cycles
// later. Checks the address passed on, the data returned, one outstanding
// request at a time, and the one-cycle register stage.
module tb_ext_mem_ctrl;
  import ilp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic c_req_valid = 0, c_req_ready, c_rsp_valid;
  addr_t c_req_addr;
  word_t c_rsp_data;
  logic m_req_valid, m_req_ready, m_rsp_valid;
  addr_t m_req_addr;
  word_t m_rsp_data;
  int checks = 0, failures = 0;

  ext_mem_ctrl dut (.clk, .rst_n, .c_req_valid, .c_req_ready, .c_req_addr, .c_rsp_valid, .c_rsp_data,
    .m_req_valid, .m_req_ready, .m_req_addr, .m_rsp_valid, .m_rsp_data);
  always #5 clk = ~clk;

  function automatic word_t f(addr_t a); return {a, ~a, a ^ 16'h5a5a, 16'h1234}; endfunction

  // RAM control model
  int gwait, rcnt = -1, outstanding = 0;
  addr_t ga;
  assign m_req_ready = (gwait == 0) && (rcnt < 0);
  assign m_rsp_valid = (rcnt == 0);
  assign m_rsp_data  = f(ga);
  always_ff @(posedge clk) begin
    if (!rst_n) begin rcnt <= -1; gwait <= 0; end
    else begin
      gwait <= int'($urandom_range(0, 2));
      if (m_req_valid && m_req_ready) begin ga <= m_req_addr; rcnt <= int'($urandom_range(1, 5)); end
      else if (rcnt >= 0) rcnt <= rcnt - 1;
    end
  end

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  int first_req_delay;
  initial begin
    c_req_addr = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      addr_t a = addr_t'($urandom);
      @(negedge clk);
      chk(c_req_ready, "idle before request");
      c_req_valid = 1; c_req_addr = a;
      @(negedge clk);
      c_req_valid = 0; c_req_addr = ~a;
      chk(m_req_valid && m_req_addr == a, "request registered after one cycle");
      chk(!c_req_ready, "busy while outstanding");
      while (!c_rsp_valid) @(negedge clk);
      chk(c_rsp_data == f(a), "data");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
