// tb_var_regfile: random writes on all lane ports and the control port, reads
// on all lane ports, against an array model with the published architectureed priorities.
module tb_var_regfile;
  import ilp_pkg::*;
  localparam int N = NVARS, P = MAX_ARITY;
  logic clk = 0, rst_n = 0;
  logic [VAR_W-1:0] rd_idx [P], wr_idx [P], ctl_idx;
  arg_t rd_val [P], wr_val [P], ctl_val;
  logic wr_en [P], ctl_en;
  arg_t model [N];
  int checks = 0, failures = 0;

  var_regfile #(.NREGS(N), .NPORTS(P)) dut (.clk, .rst_n, .rd_idx, .rd_val, .wr_en, .wr_idx, .wr_val,
    .ctl_wr_en(ctl_en), .ctl_wr_idx(ctl_idx), .ctl_wr_val(ctl_val));
  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < N; i++) model[i] = '0;
    for (int p = 0; p < P; p++) begin wr_en[p] = 0; wr_idx[p] = '0; wr_val[p] = '0; rd_idx[p] = '0; end
    ctl_en = 0; ctl_idx = '0; ctl_val = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      for (int p = 0; p < P; p++) begin
        rd_idx[p] = VAR_W'($urandom_range(0, N - 1));
        wr_en[p]  = ($urandom_range(0, 2) == 0);
        wr_idx[p] = VAR_W'($urandom_range(0, N - 1));
        wr_val[p] = arg_t'($urandom);
      end
      ctl_en = ($urandom_range(0, 4) == 0);
      ctl_idx = VAR_W'($urandom_range(0, N - 1));
      ctl_val = arg_t'($urandom);
      #1;
      for (int p = 0; p < P; p++) begin
        checks++;
        if (rd_val[p] != model[rd_idx[p]]) begin
          failures++;
          if (failures < 10) $display("FAIL port %0d reg %0d got %h exp %h", p, rd_idx[p], rd_val[p], model[rd_idx[p]]);
        end
      end
      @(posedge clk);
      for (int p = 0; p < P; p++) if (wr_en[p]) model[wr_idx[p]] = wr_val[p];
      if (ctl_en) model[ctl_idx] = ctl_val;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
