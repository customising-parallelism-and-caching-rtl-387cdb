// tb_cache_ctrl: random reads, grouped like a search (runs through one section,
// with repeats), through the cache controller. The external side is a tb model
// answering EXT_LAT cycles after the request, sometimes with extra wait. Checks
// every returned word against the memory, the 2-cycle hit latency, that a
// repeated read of a resident line hits, and that reads of two predicates with
// the same line do not evict each other. A 64-clause section checks that lines
// past the cache depth wrap around and still return the right data.
module tb_cache_ctrl;
  import ilp_pkg::*;
  import tb_ilp_pkg::*;
  localparam int EXT_LAT = 6;

  logic clk = 0, rst_n = 0, flush = 0;
  logic req_valid = 0, req_ready, rsp_valid;
  addr_t req_addr;
  logic [PRED_W-1:0] req_pred;
  cnt_t req_line;
  word_t rsp_data;
  logic ext_req_valid, ext_req_ready, ext_rsp_valid;
  addr_t ext_req_addr;
  word_t ext_rsp_data;
  logic ev_hit, ev_miss;
  int checks = 0, failures = 0;

  cache_ctrl #(.DEPTH(44), .NCACHE(NPRED)) dut (.clk, .rst_n, .flush, .req_valid, .req_ready, .req_addr, .req_pred, .req_line,
    .rsp_valid, .rsp_data, .ext_req_valid, .ext_req_ready, .ext_req_addr, .ext_rsp_valid, .ext_rsp_data, .ev_hit, .ev_miss);
  always #5 clk = ~clk;

  // external memory model
  int xcnt = -1;
  addr_t xa;
  int xwait = 0;
  assign ext_req_ready = (xcnt < 0) && (xwait == 0);
  assign ext_rsp_valid = (xcnt == 0);
  assign ext_rsp_data  = bg_mem[int'(xa)];
  always_ff @(posedge clk) begin
    xwait <= ($urandom_range(0, 3) == 0) ? 1 : 0;
    if (!rst_n) xcnt <= -1;
    else if (ext_req_valid && ext_req_ready) begin xa <= ext_req_addr; xcnt <= EXT_LAT - 1; end
    else if (xcnt >= 0) xcnt <= xcnt - 1;
  end

  int nhit = 0, nmiss = 0;
  always @(posedge clk) begin if (ev_hit) nhit++; if (ev_miss) nmiss++; end

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  // one read; returns latency in cycles and whether it hit
  task automatic rd(int a, int p, int base, output int lat, output bit was_hit);
    int h0 = nhit;
    @(negedge clk);
    req_valid = 1; req_addr = addr_t'(a); req_pred = PRED_W'(p); req_line = cnt_t'(a - base);
    while (!req_ready) @(negedge clk);
    @(posedge clk); #1;
    req_valid = 0;
    lat = 0;
    do begin @(negedge clk); lat++; end while (!rsp_valid);
    was_hit = (nhit != h0);
    chk(rsp_data == bg_mem[a], "data");
    if (rsp_data != bg_mem[a] && failures < 4) $display("a=%0d p=%0d hit=%0b lat=%0d got %h exp %h", a, p, was_hit, lat, rsp_data, bg_mem[a]);
  endtask

  initial begin
    int lat; bit h;
    req_addr = '0; req_pred = '0; req_line = '0;
    gen_background(45, 44, 3);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 40; k++) begin
      for (int rep = 0; rep < 3; rep++) begin
        for (int p = 0; p < NPRED; p++) begin
          for (int i = 0; i < sec_cnt[k][p]; i++) begin
            rd(sec_base[k][p] + i, p, sec_base[k][p], lat, h);
            if (rep == 0) chk(!h, "first read misses");
            else begin
              chk(h, "repeat read hits (per-predicate caches keep both sections)");
              chk(lat == 2, "hit latency 2");
            end
            if (!h) chk(lat >= 2 + EXT_LAT, "miss latency");
          end
        end
      end
    end
    // a section longer than the cache (lines 44..63 wrap onto 0..19)
    for (int rep = 0; rep < 2; rep++)
      for (int i = 0; i < 64; i++) begin
        rd(200 + i, 0, 200, lat, h);
        if (rep == 1) chk(h == (i >= 20 && i < 44), "long section: only lines not shared stay resident");
      end
    // flush empties the caches
    @(negedge clk); flush = 1; @(negedge clk); flush = 0;
    rd(sec_base[39][0], 0, sec_base[39][0], lat, h);
    chk(!h || sec_cnt[39][0] == 0, "miss after flush");
    $display("hits=%0d misses=%0d", nhit, nmiss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (500000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
