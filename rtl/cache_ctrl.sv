// cache_ctrl: the cache control of a hypothesis evaluation processor.
//
// Background clauses are kept in small on-chip caches, one per predicate, so
// that a literal calling bond/4 in the inner loop cannot evict the atm/5 clauses
// a backtrack will need again. Each cache is direct mapped with DEPTH lines
// (44: the most clauses that share one index in the mutagenesis data, so the
// whole section of the inner loop stays resident). The line is the clause's
// offset inside its section (modulo DEPTH for a longer section), and the full
// address is kept as the tag. Misses are
// served on demand: the word is read through the external memory control and
// written into the line while it is returned.
//
// One cache per predicate, the depth of 44 and the 2-cycle, non-pipelined hit
// are the published architecture's. Demand fetching (rather than prefetching), the tag format,
// the flush input and predicate-to-cache mapping (pred mod NCACHE; NCACHE = 1
// gives one shared cache) are choices of this design.
//
// Timing: a request accepted in cycle t returns rsp_valid in cycle t+2 on a hit;
// on a miss the external request is raised in t+1 and the word is returned the
// cycle after it arrives. A new request may be accepted in the response cycle.
module cache_ctrl
  import ilp_pkg::*;
#(
  parameter int DEPTH  = 44,
  parameter int NCACHE = ilp_pkg::NPRED
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              flush,
  // from the unifier
  input  logic              req_valid,
  output logic              req_ready,
  input  addr_t             req_addr,
  input  logic [PRED_W-1:0] req_pred,
  input  cnt_t              req_line,
  output logic              rsp_valid,
  output word_t             rsp_data,
  // to the external memory control
  output logic              ext_req_valid,
  input  logic              ext_req_ready,
  output addr_t             ext_req_addr,
  input  logic              ext_rsp_valid,
  input  word_t             ext_rsp_data,
  // events
  output logic              ev_hit,
  output logic              ev_miss
);
  localparam int LW = $clog2(DEPTH);
  localparam int CI_W = (NCACHE > 1) ? $clog2(NCACHE) : 1;

  // Width of the packed clauses held by cache c.
  function automatic int cache_w(int c);
    int w = 1;
    for (int p = 0; p < NPRED; p++)
      if (p % NCACHE == c && packed_width(p) > w) w = packed_width(p);
    return w;
  endfunction

  typedef enum logic [2:0] {C_IDLE, C_LOOKUP, C_MISS, C_EXT, C_RESP} state_e;
  state_e state;

  addr_t             a_q;
  logic [LW-1:0]     line_q;
  logic [CI_W-1:0]   ci_q;
  logic [DEPTH-1:0]  valid_q [NCACHE];
  word_t             rsp_q;

  logic [CI_W-1:0]   req_ci;
  logic [LW-1:0]     req_l;
  logic              accept;
  assign req_ci    = CI_W'(int'(req_pred) % NCACHE);
  // Sections longer than the cache wrap around (the tag keeps them apart).
  assign req_l     = LW'(int'(req_line) % DEPTH);
  assign req_ready = (state == C_IDLE) || (state == C_RESP);
  assign accept    = req_valid && req_ready;

  // Per-cache RAMs: tag + data.
  addr_t rd_tag  [NCACHE];
  word_t rd_word [NCACHE];
  logic  fill;
  assign fill = (state == C_EXT) && ext_rsp_valid;

  for (genvar c = 0; c < NCACHE; c++) begin : g_cache
    localparam int CW = cache_w(c);
    logic [ADDR_W+CW-1:0] rd_line;
    cache_ram #(.DEPTH(DEPTH), .W(ADDR_W + CW)) u_ram (
      .clk,
      .rd_en  (accept && req_ci == CI_W'(c)),
      .rd_addr(req_l),
      .rd_data(rd_line),
      .wr_en  (fill && ci_q == CI_W'(c)),
      .wr_addr(line_q),
      .wr_data({a_q, ext_rsp_data[CW-1:0]})
    );
    assign rd_tag[c]  = rd_line[ADDR_W+CW-1:CW];
    assign rd_word[c] = word_t'(rd_line[CW-1:0]);
  end

  logic hit;
  assign hit = valid_q[ci_q][line_q] && (rd_tag[ci_q] == a_q);

  assign ext_req_valid = (state == C_LOOKUP && !hit) || (state == C_MISS);
  assign ext_req_addr  = a_q;
  assign ev_hit        = (state == C_LOOKUP) && hit;
  assign ev_miss       = (state == C_LOOKUP) && !hit;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= C_IDLE;
      a_q    <= '0;
      line_q <= '0;
      ci_q   <= '0;
      rsp_q  <= '0;
      for (int c = 0; c < NCACHE; c++) valid_q[c] <= '0;
    end else begin
      if (flush) for (int c = 0; c < NCACHE; c++) valid_q[c] <= '0;
      unique case (state)
        C_IDLE, C_RESP: begin
          if (accept) begin
            a_q    <= req_addr;
            line_q <= req_l;
            ci_q   <= req_ci;
            state  <= C_LOOKUP;
          end else begin
            state  <= C_IDLE;
          end
        end
        C_LOOKUP: begin
          if (hit) begin
            rsp_q <= rd_word[ci_q];
            state <= C_RESP;
          end else begin
            state <= ext_req_ready ? C_EXT : C_MISS;
          end
        end
        C_MISS: if (ext_req_ready) state <= C_EXT;
        C_EXT: if (ext_rsp_valid) begin
          rsp_q <= ext_rsp_data;
          if (!flush) valid_q[ci_q][line_q] <= 1'b1;
          state <= C_RESP;
        end
        default: state <= C_IDLE;
      endcase
    end
  end

  assign rsp_valid = (state == C_RESP);
  assign rsp_data  = rsp_q;

  // A response is only produced for an accepted request.
  a_ext_one: assert property (@(posedge clk) disable iff (!rst_n)
    ext_rsp_valid |-> state == C_EXT);
endmodule
