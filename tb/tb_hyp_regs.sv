// tb_hyp_regs: writes random literal headers and arguments, reads every
// literal back and compares with a model.
module tb_hyp_regs;
  import ilp_pkg::*;
  logic clk = 0, rst_n = 0, wr_en = 0;
  hyp_wr_t wr;
  logic [LIT_W-1:0] rd_lit;
  logic [PRED_W-1:0] rd_pred;
  arg_type_e rd_type [MAX_ARITY];
  arg_t rd_data [MAX_ARITY];
  logic [LIT_W:0] nlits;
  logic [PRED_W-1:0] m_pred [MAX_LITS];
  arg_type_e m_type [MAX_LITS][MAX_ARITY];
  arg_t m_data [MAX_LITS][MAX_ARITY];
  logic [LIT_W:0] m_n;
  int checks = 0, failures = 0;

  hyp_regs dut (.clk, .rst_n, .wr_en, .wr, .rd_lit, .rd_pred, .rd_type, .rd_data, .nlits);
  always #5 clk = ~clk;

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    wr = '0; rd_lit = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    m_n = '0;
    for (int l = 0; l < MAX_LITS; l++) begin
      m_pred[l] = '0;
      for (int a = 0; a < MAX_ARITY; a++) begin m_type[l][a] = ARG_VOID; m_data[l][a] = '0; end
    end
    for (int round = 0; round < 50; round++) begin
      for (int n = 0; n < 20; n++) begin
        @(negedge clk);
        wr = '0;
        wr.is_header = ($urandom_range(0, 3) == 0);
        wr.lit = LIT_W'($urandom_range(0, MAX_LITS - 1));
        wr.arg = ARGI_W'($urandom_range(0, MAX_ARITY - 1));
        wr.atype = arg_type_e'($urandom_range(0, 3));
        wr.data = arg_t'($urandom);
        wr.pred = PRED_W'($urandom_range(0, NPRED - 1));
        wr.nlits = (LIT_W+1)'($urandom_range(0, MAX_LITS));
        wr_en = 1;
        @(posedge clk);
        if (wr.is_header) begin m_pred[wr.lit] = wr.pred; m_n = wr.nlits; end
        else begin m_type[wr.lit][wr.arg] = wr.atype; m_data[wr.lit][wr.arg] = wr.data; end
      end
      @(negedge clk);
      wr_en = 0;
      for (int l = 0; l < MAX_LITS; l++) begin
        rd_lit = LIT_W'(l);
        #1;
        chk(rd_pred == m_pred[l], "pred");
        chk(nlits == m_n, "nlits");
        for (int a = 0; a < MAX_ARITY; a++) begin
          chk(rd_type[a] == m_type[l][a], "type");
          chk(rd_data[a] == m_data[l][a], "data");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
