// ram_ctrl: shares one external memory bank between NREQ processors.
//
// A semaphore decides which processor owns the bank in each cycle: it is taken
// by one requester per cycle, searching round robin from the one after the last
// owner, and released when the access has been issued. Accesses from different
// processors therefore follow each other in the bank's read pipeline, and the
// bank can deliver one word per cycle. The requester of each access travels
// along a RD_LAT-deep pipeline next to the bank's, so the returning word is
// handed to the right processor.
//
// Sharing a bank between two processors, the semaphore and the one word per
// cycle are the published architecture's; the round-robin order and the bank interface are
// choices of this design. With the defaults a read takes 6 cycles from the
// processor's request to its data, the external latency the published architecture assumes.
//
// Bank interface: mem_rd_en/mem_addr are registered outputs; the bank must
// present the word on mem_rdata RD_LAT cycles after the clock edge that sampled
// them.
module ram_ctrl
  import ilp_pkg::*;
#(
  parameter int NREQ   = 2,
  parameter int RD_LAT = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  req_valid [NREQ],
  output logic  req_ready [NREQ],
  input  addr_t req_addr  [NREQ],
  output logic  rsp_valid [NREQ],
  output word_t rsp_data,
  // external bank
  output logic  mem_rd_en,
  output addr_t mem_addr,
  input  word_t mem_rdata
);
  localparam int IW = (NREQ > 1) ? $clog2(NREQ) : 1;

  logic [IW-1:0] last_q;     // last owner of the semaphore
  logic          gnt_any;
  logic [IW-1:0] gnt_id;

  always_comb begin
    gnt_any = 1'b0;
    gnt_id  = '0;
    for (int k = 1; k <= NREQ; k++)
      if (!gnt_any && req_valid[(int'(last_q) + k) % NREQ]) begin
        gnt_any = 1'b1;
        gnt_id  = IW'((int'(last_q) + k) % NREQ);
      end
    for (int i = 0; i < NREQ; i++) req_ready[i] = gnt_any && (gnt_id == IW'(i));
  end

  logic          pv  [RD_LAT];
  logic [IW-1:0] pid [RD_LAT];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      last_q    <= IW'(NREQ - 1);
      mem_rd_en <= 1'b0;
      mem_addr  <= '0;
      for (int s = 0; s < RD_LAT; s++) begin
        pv[s]  <= 1'b0;
        pid[s] <= '0;
      end
    end else begin
      mem_rd_en <= gnt_any;
      if (gnt_any) begin
        mem_addr <= req_addr[gnt_id];
        last_q   <= gnt_id;
      end
      pv[0]  <= mem_rd_en;
      pid[0] <= last_q;
      for (int s = 1; s < RD_LAT; s++) begin
        pv[s]  <= pv[s-1];
        pid[s] <= pid[s-1];
      end
    end
  end

  always_comb
    for (int i = 0; i < NREQ; i++)
      rsp_valid[i] = pv[RD_LAT-1] && (pid[RD_LAT-1] == IW'(i));
  assign rsp_data = mem_rdata;
endmodule
