// tb_cache_ram: random writes and reads of the 44-line cache memory, checking
// the one-cycle synchronous read against a model.
module tb_cache_ram;
  localparam int DEPTH = 44, W = 80;
  logic clk = 0, rd_en = 0, wr_en = 0;
  logic [$clog2(DEPTH)-1:0] ra, wa;
  logic [W-1:0] rd, wd, model [DEPTH], exp_q;
  bit written [DEPTH];
  bit exp_v;
  int checks = 0, failures = 0;

  cache_ram #(.DEPTH(DEPTH), .W(W)) dut (.clk, .rd_en, .rd_addr(ra), .rd_data(rd), .wr_en, .wr_addr(wa), .wr_data(wd));
  always #5 clk = ~clk;

  initial begin
    ra = '0; wa = '0; wd = '0; exp_v = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if (exp_v) begin
        checks++;
        if (rd !== exp_q) begin failures++; if (failures < 10) $display("FAIL read got %h exp %h", rd, exp_q); end
      end
      wr_en = ($urandom_range(0, 1) == 1);
      wa = $clog2(DEPTH)'($urandom_range(0, DEPTH - 1));
      wd = {$urandom, $urandom, $urandom};
      rd_en = ($urandom_range(0, 1) == 1);
      ra = $clog2(DEPTH)'($urandom_range(0, DEPTH - 1));
      exp_v = rd_en && written[ra] && !(wr_en && wa == ra);
      exp_q = model[ra];
      @(posedge clk);
      if (wr_en) begin model[wa] = wd; written[wa] = 1; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
