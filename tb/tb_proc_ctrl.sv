// tb_proc_ctrl: the processor control with a unifier model that finishes a
// random number of cycles after start with a random result. Checks hypothesis
// writes pass through while idle, the example key is bound to variable 0 in the
// accept cycle, sections are held, the start follows one cycle after the
// accept, and the result and tag are returned until taken.
module tb_proc_ctrl;
  import ilp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic hyp_wr_valid = 0, q_valid = 0, q_ready, r_valid, r_ready = 0;
  hyp_wr_t hyp_wr_in, hr_wr;
  query_t q;
  result_t r;
  logic hr_wr_en, arg_wr_en, u_start, u_done, u_success;
  logic [VAR_W-1:0] arg_wr_idx;
  arg_t arg_wr_val;
  section_t u_sect [NPRED];
  int checks = 0, failures = 0;

  proc_ctrl dut (.clk, .rst_n, .hyp_wr_valid, .hyp_wr_in, .q_valid, .q_ready, .q, .r_valid, .r_ready, .r,
    .hr_wr_en, .hr_wr, .arg_wr_en, .arg_wr_idx, .arg_wr_val, .u_start, .u_sect, .u_done, .u_success);
  always #5 clk = ~clk;

  // unifier model
  int ucnt = -1; bit ures;
  assign u_done = (ucnt == 0);
  assign u_success = ures;
  always_ff @(posedge clk) begin
    if (!rst_n) ucnt <= -1;
    else if (u_start) begin ucnt <= int'($urandom_range(0, 20)); ures <= 1'($urandom); end
    else if (ucnt >= 0) ucnt <= ucnt - 1;
  end

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    hyp_wr_in = '0; q = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      query_t qq;
      // hypothesis write while idle
      @(negedge clk);
      hyp_wr_valid = 1; hyp_wr_in = hyp_wr_t'({$urandom, $urandom, $urandom});
      #1 chk(hr_wr_en && hr_wr == hyp_wr_in, "hypothesis write passed on");
      @(negedge clk);
      hyp_wr_valid = 0;
      qq = query_t'({$urandom, $urandom, $urandom, $urandom});
      q = qq; q_valid = 1;
      #1 chk(q_ready && arg_wr_en && arg_wr_idx == '0 && arg_wr_val == qq.key, "key bound to variable 0");
      @(negedge clk);
      q_valid = 0; q = '0;
      chk(u_start, "start one cycle after accept");
      chk(!q_ready, "busy");
      for (int p = 0; p < NPRED; p++) chk(u_sect[p] == qq.sect[p], "section held");
      while (!r_valid) @(negedge clk);
      repeat ($urandom_range(0, 3)) begin chk(r_valid, "result held"); @(negedge clk); end
      chk(r.tag == qq.tag && r.success == ures, "result and tag");
      r_ready = 1;
      @(negedge clk);
      r_ready = 0;
      chk(!r_valid && q_ready, "idle after result taken");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
