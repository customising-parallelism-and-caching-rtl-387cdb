// tb_main_ctrl: the main controller with NPROC processor models that take a
// random time per query and return success = parity of the key. Checks that
// every query goes to the lowest-numbered idle processor, that every tag comes
// back exactly once with the right result, that hypothesis writes are
// broadcast and accepted only when all processors are idle, and that the host
// may stall results.
module tb_main_ctrl;
  import ilp_pkg::*;
  localparam int NPROC = 8;
  logic clk = 0, rst_n = 0;
  logic h_hyp_valid = 0, h_hyp_ready, h_q_valid = 0, h_q_ready, h_r_valid, h_r_ready = 0, all_idle;
  hyp_wr_t h_hyp, p_hyp;
  query_t h_q, p_q;
  result_t h_r;
  logic p_hyp_valid;
  logic p_q_valid [NPROC], p_q_ready [NPROC], p_r_valid [NPROC], p_r_ready [NPROC];
  result_t p_r [NPROC];
  int checks = 0, failures = 0;

  main_ctrl #(.NPROC(NPROC)) dut (.clk, .rst_n, .h_hyp_valid, .h_hyp_ready, .h_hyp, .h_q_valid, .h_q_ready, .h_q,
    .h_r_valid, .h_r_ready, .h_r, .all_idle, .p_hyp_valid, .p_hyp, .p_q_valid, .p_q_ready, .p_q,
    .p_r_valid, .p_r_ready, .p_r);
  always #5 clk = ~clk;

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  // processor models
  int pst [NPROC];   // -2 idle, -1 result pending, >=0 busy countdown
  result_t pres [NPROC];
  always_comb for (int i = 0; i < NPROC; i++) begin
    p_q_ready[i] = (pst[i] == -2);
    p_r_valid[i] = (pst[i] == -1);
    p_r[i] = pres[i];
  end
  always @(posedge clk) begin
    if (!rst_n) for (int i = 0; i < NPROC; i++) pst[i] <= -2;
    else begin
      int lowest;
      lowest = -1;
      for (int i = 0; i < NPROC; i++) if (lowest < 0 && pst[i] == -2) lowest = i;
      for (int i = 0; i < NPROC; i++) begin
        if (p_q_valid[i]) begin
          chk(p_q_ready[i] && i == lowest, "query to lowest idle processor");
          pst[i] <= int'($urandom_range(0, 40));
          pres[i] <= '{tag: p_q.tag, success: p_q.key[0]};
        end else if (pst[i] >= 0) pst[i] <= pst[i] - 1;
        else if (pst[i] == -1 && p_r_ready[i]) pst[i] <= -2;
      end
      if (p_hyp_valid) begin
        for (int i = 0; i < NPROC; i++) chk(pst[i] == -2, "hypothesis write only when idle");
        chk(p_hyp == h_hyp, "hypothesis broadcast");
        nhyp++;
      end
    end
  end

  int got [256];
  int nres = 0, nhyp = 0;
  always @(posedge clk) if (h_r_valid && h_r_ready) begin
    got[h_r.tag]++;
    chk(h_r.success == exp_res[h_r.tag], "result value");
    nres++;
  end
  bit exp_res [256];

  initial begin
    h_hyp = '0; h_q = '0;
    for (int t = 0; t < 256; t++) got[t] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      // host result side, randomly stalling
      forever begin @(negedge clk); h_r_ready = ($urandom_range(0, 3) != 0); end
      begin
        for (int round = 0; round < 4; round++) begin
          // hypothesis writes
          for (int w = 0; w < 6; w++) begin
            @(negedge clk);
            h_hyp_valid = 1; h_hyp = hyp_wr_t'({$urandom, $urandom, $urandom});
            #1;
            while (!h_hyp_ready) begin @(negedge clk); #1; end
            @(negedge clk); h_hyp_valid = 0;
          end
          for (int n = 0; n < 64; n++) begin
            automatic int tag = round * 64 + n;
            @(negedge clk);
            h_q_valid = 1; h_q = '0; h_q.tag = TAG_W'(tag); h_q.key = arg_t'($urandom);
            exp_res[tag] = h_q.key[0];
            #1;
            while (!h_q_ready) begin @(negedge clk); #1; end
            @(posedge clk); #1 h_q_valid = 0;
          end
        end
        wait (nres == 256);
        repeat (5) @(posedge clk);
      end
    join_any
    for (int t = 0; t < 256; t++) chk(got[t] == 1, "each tag returned once");
    chk(nhyp == 24, "all hypothesis writes broadcast");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (200000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
