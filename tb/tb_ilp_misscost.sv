// tb_ilp_misscost: the rule-3 benchmark (188 examples) on one processor with
// parallel unification, while the external read latency is swept. The
// published architecture evaluates the cached processor for miss costs from 1
// to 30 cycles and finds the run time nearly flat, because the inner loop runs
// from the cache once a section is loaded. Here the cost of an external read is
// MEM_LAT + 2 cycles, so MEM_LAT = 1, 4, 13 and 28 give 3, 6, 15 and 30 cycles;
// the sweep points are this testbench's own choice. Every result is checked
// against the reference search. The testbench also checks that only misses pay
// the latency: with one processor there is no bank contention, so each extra
// cycle of latency must add exactly one cycle per external read, and cache
// hits must cost the same at every latency. How flat the curve is depends on
// how often the data reuse the cached sections, so on the generated data it is
// reported, not checked.
//
// The published architecture compares with an uncached processor, which is not
// built here. The testbench estimates it from the cached run: every cache hit
// (2 cycles) would instead be an external read (MEM_LAT + 2 cycles), so the
// uncached run takes about cycles + hits * MEM_LAT. This ignores the lookup
// cycles a miss also spends, so it slightly understates the gain. It checks
// that this estimated speedup grows with the miss cost.
module tb_ilp_misscost;
  import ilp_pkg::*;
  import tb_ilp_pkg::*;
  localparam int NCFG = 4;
  localparam int LAT [NCFG] = '{1, 4, 13, 28};
  logic clk = 0, rst_n = 0, go = 0;
  logic   fin [NCFG];
  longint cyc [NCFG], brd [NCFG], hit [NCFG];
  real    unc [NCFG];
  int     chk_n [NCFG], fail_n [NCFG];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    ilp_bench_harness #(.NPROC(1), .NBANK(1), .LANES(MAX_ARITY), .MEM_LAT(LAT[c])) u_h (
      .clk, .rst_n, .go, .finished(fin[c]), .cycles(cyc[c]), .checks(chk_n[c]),
      .failures(fail_n[c]), .bank_reads(brd[c]), .hits(hit[c]));
  end

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    gen_background(188, 44, 21);
    hyp_rule3(27, 1, 7);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    go = 1;
    for (int c = 0; c < NCFG; c++) wait (fin[c]);
    for (int c = 0; c < NCFG; c++) begin
      unc[c] = real'(cyc[c] + hit[c] * longint'(LAT[c]));
      $display("miss cost %2d cycles: cycles=%0d relative=%0.3f external_reads=%0d hits=%0d est_speedup_over_uncached=%0.2f",
               LAT[c] + 2, cyc[c], real'(cyc[c]) / real'(cyc[0]), brd[c], hit[c], unc[c] / real'(cyc[c]));
      checks += chk_n[c];
      failures += fail_n[c];
      chk(chk_n[c] == 188, "all 188 results");
      chk(brd[c] == brd[0], "the same external reads whatever the latency");
      chk(hit[c] == hit[0], "the same cache hits whatever the latency");
      if (c > 0) chk(cyc[c] > cyc[c-1], "run time grows with the miss cost");
      if (c > 0) chk(unc[c] / real'(cyc[c]) > unc[c-1] / real'(cyc[c-1]), "the gain from the cache grows with the miss cost");
      chk(cyc[c] - cyc[0] == brd[0] * longint'(LAT[c] - LAT[0]), "latency is paid once per external read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    for (int c = 0; c < NCFG; c++) $display("cfg %0d finished=%0b checks=%0d", c, fin[c], chk_n[c]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
