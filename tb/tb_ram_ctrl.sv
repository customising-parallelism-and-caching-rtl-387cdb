// tb_ram_ctrl: two requesters issue random reads to one bank through the RAM
// control. Checks that each requester gets exactly the word it asked for, that
// an uncontended read returns RD_LAT+1 cycles after the request is granted, that
// the semaphore alternates between two requesters that both keep asking (one
// grant per cycle), and that the bank then delivers a word every cycle.
module tb_ram_ctrl;
  import ilp_pkg::*;
  import tb_ilp_pkg::*;
  localparam int NREQ = 2, LAT = 4;

  logic clk = 0, rst_n = 0;
  logic req_valid [NREQ], req_ready [NREQ], rsp_valid [NREQ];
  addr_t req_addr [NREQ];
  word_t rsp_data;
  logic mem_rd_en;
  addr_t mem_addr;
  word_t mem_rdata;
  int checks = 0, failures = 0;

  ram_ctrl #(.NREQ(NREQ), .RD_LAT(LAT)) dut (.clk, .rst_n, .req_valid, .req_ready, .req_addr, .rsp_valid, .rsp_data,
    .mem_rd_en, .mem_addr, .mem_rdata);
  ext_sram_model #(.LAT(LAT)) u_mem (.clk, .rd_en(mem_rd_en), .addr(mem_addr), .rdata(mem_rdata));
  always #5 clk = ~clk;

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  // Each requester: one outstanding read, like a processor.
  addr_t exp_a [NREQ][$];
  int    nrsp [NREQ];
  int    busy_cycles = 0, rsp_cycles = 0, alternations = 0, both_granted_wait = 0;
  int    last_gnt = -1;
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < NREQ; i++) begin
      if (rsp_valid[i]) begin
        addr_t a;
        chk(exp_a[i].size() > 0, "response expected");
        if (exp_a[i].size() > 0) begin
          a = exp_a[i].pop_front();
          chk(rsp_data == bg_mem[int'(a)], "routed data");
        end
        nrsp[i]++;
      end
      if (req_valid[i] && req_ready[i]) begin
        exp_a[i].push_back(req_addr[i]);
        if (last_gnt >= 0 && last_gnt != i) alternations++;
        last_gnt = i;
      end
    end
    if (req_valid[0] && req_valid[1]) chk(req_ready[0] ^ req_ready[1], "one grant per cycle");
    if (rsp_valid[0] || rsp_valid[1]) rsp_cycles++;
  end

  task automatic single_read(int i, int a, output int lat);
    @(negedge clk);
    req_valid[i] = 1; req_addr[i] = addr_t'(a);
    #1;
    lat = 0;
    while (!req_ready[i]) begin @(negedge clk); lat++; end
    @(negedge clk); req_valid[i] = 0; lat++;
    while (!rsp_valid[i]) begin @(negedge clk); lat++; end
  endtask

  initial begin
    int lat;
    for (int i = 0; i < NREQ; i++) begin req_valid[i] = 0; req_addr[i] = '0; nrsp[i] = 0; end
    gen_background(NKEYS, 20, 5);
    repeat (3) @(posedge clk);
    rst_n = 1;
    // uncontended latency
    for (int n = 0; n < 10; n++) begin
      single_read(n % 2, n * 7, lat);
      chk(lat == LAT + 1, "uncontended latency");
      if (lat != LAT + 1) $display("latency %0d", lat);
    end
    // both requesters stream back-to-back requests (no outstanding limit here)
    fork
      for (int i = 0; i < NREQ; i++) begin
        automatic int ii = i;
        fork
          for (int n = 0; n < 200; n++) begin
            @(negedge clk);
            req_valid[ii] = 1; req_addr[ii] = addr_t'($urandom_range(0, mem_used - 1));
            #1;
            while (!req_ready[ii]) @(negedge clk);
            @(posedge clk);
            #1 req_valid[ii] = 0;
          end
        join_none
      end
    join_none
    repeat (500) @(posedge clk);
    for (int i = 0; i < NREQ; i++) chk(nrsp[i] == 205, "all responses");
    chk(alternations > 300, "semaphore alternates between waiting requesters");
    $display("responses %0d %0d alternations %0d", nrsp[0], nrsp[1], alternations);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
