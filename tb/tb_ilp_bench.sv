// tb_ilp_bench: the rule-3 benchmark (188 examples) on several system
// configurations side by side: one processor with parallel and with sequential
// unification, 8 processors on 4 banks (the default system), 24 processors on
// 4 banks, 32 and 64 processors sharing a single bank, and 8 processors on a
// single bank with parallel and with sequential unification (the published
// architecture plots both kinds against the processor count on one bank).
// Every result is checked against the reference search. It reports the cycle counts and the
// speedups, and checks that parallel unification beats sequential, that more
// processors are faster than one, and that the gain flattens as processors are
// added on a single bank.
module tb_ilp_bench;
  import ilp_pkg::*;
  import tb_ilp_pkg::*;
  localparam int NCFG = 8;
  logic clk = 0, rst_n = 0, go = 0;
  logic   fin [NCFG];
  longint cyc [NCFG], brd [NCFG], hit [NCFG];
  int     chk_n [NCFG], fail_n [NCFG];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  ilp_bench_harness #(.NPROC(1),  .NBANK(1), .LANES(MAX_ARITY)) c0 (.clk, .rst_n, .go, .finished(fin[0]), .cycles(cyc[0]), .checks(chk_n[0]), .failures(fail_n[0]), .bank_reads(brd[0]), .hits(hit[0]));
  ilp_bench_harness #(.NPROC(1),  .NBANK(1), .LANES(1))         c1 (.clk, .rst_n, .go, .finished(fin[1]), .cycles(cyc[1]), .checks(chk_n[1]), .failures(fail_n[1]), .bank_reads(brd[1]), .hits(hit[1]));
  ilp_bench_harness #(.NPROC(8),  .NBANK(4), .LANES(MAX_ARITY)) c2 (.clk, .rst_n, .go, .finished(fin[2]), .cycles(cyc[2]), .checks(chk_n[2]), .failures(fail_n[2]), .bank_reads(brd[2]), .hits(hit[2]));
  ilp_bench_harness #(.NPROC(24), .NBANK(4), .LANES(MAX_ARITY)) c3 (.clk, .rst_n, .go, .finished(fin[3]), .cycles(cyc[3]), .checks(chk_n[3]), .failures(fail_n[3]), .bank_reads(brd[3]), .hits(hit[3]));
  ilp_bench_harness #(.NPROC(32), .NBANK(1), .LANES(MAX_ARITY)) c4 (.clk, .rst_n, .go, .finished(fin[4]), .cycles(cyc[4]), .checks(chk_n[4]), .failures(fail_n[4]), .bank_reads(brd[4]), .hits(hit[4]));
  ilp_bench_harness #(.NPROC(64), .NBANK(1), .LANES(MAX_ARITY)) c5 (.clk, .rst_n, .go, .finished(fin[5]), .cycles(cyc[5]), .checks(chk_n[5]), .failures(fail_n[5]), .bank_reads(brd[5]), .hits(hit[5]));
  ilp_bench_harness #(.NPROC(8),  .NBANK(1), .LANES(MAX_ARITY)) c6 (.clk, .rst_n, .go, .finished(fin[6]), .cycles(cyc[6]), .checks(chk_n[6]), .failures(fail_n[6]), .bank_reads(brd[6]), .hits(hit[6]));
  ilp_bench_harness #(.NPROC(8),  .NBANK(1), .LANES(1))         c7 (.clk, .rst_n, .go, .finished(fin[7]), .cycles(cyc[7]), .checks(chk_n[7]), .failures(fail_n[7]), .bank_reads(brd[7]), .hits(hit[7]));

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    string name [NCFG] = '{"1 proc, parallel", "1 proc, sequential", "8 procs, 4 banks", "24 procs, 4 banks", "32 procs, 1 bank", "64 procs, 1 bank", "8 procs, 1 bank", "8 procs, 1 bank, seq"};
    gen_background(188, 44, 21);
    hyp_rule3(27, 1, 7);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    go = 1;
    for (int c = 0; c < NCFG; c++) wait (fin[c]);
    for (int c = 0; c < NCFG; c++) begin
      $display("%-20s cycles=%0d speedup=%0.2f bank_reads=%0d bank_reads_per_cycle=%0.3f", name[c], cyc[c], real'(cyc[0]) / real'(cyc[c]), brd[c], real'(brd[c]) / real'(cyc[c]));
      checks += chk_n[c];
      failures += fail_n[c];
      chk(chk_n[c] == 188, "all 188 results");
    end
    $display("sequential/parallel cycle ratio %0.2f", real'(cyc[1]) / real'(cyc[0]));
    chk(cyc[1] > cyc[0], "parallel unification takes fewer cycles than sequential");
    chk(cyc[2] * 2 < cyc[0], "8 processors at least twice as fast as one");
    chk(cyc[3] < cyc[2], "24 processors faster than 8");
    chk(real'(cyc[4]) / real'(cyc[5]) < 2.0, "64 vs 32 processors on one bank gains less than 2x");
    chk(cyc[7] > cyc[6], "with 8 processors on one bank, parallel unification still beats sequential");
    chk(cyc[6] >= cyc[2], "8 processors on one bank are no faster than on 4 banks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (400000) @(posedge clk); failures++; for (int c = 0; c < NCFG; c++) $display("cfg %0d finished=%0b checks=%0d", c, fin[c], chk_n[c]); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
