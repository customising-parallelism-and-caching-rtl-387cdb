// ilp_pkg: types and constants shared by the hypothesis evaluation processors.
//
// The background knowledge consists of ground unit clauses of a few predicates
// (here atm/5 and bond/4 of the mutagenesis data). Each clause is packed into one
// memory word, argument 0 in the least significant bits, with a per-predicate
// field width found by bit-width analysis of the data. The bond/4 widths
// (8,6,6,3 bits) and the 58-bit atm/5 entry with its 32-bit floating point field
// are the published architecture's; the split of the remaining atm/5 bits (8,6,4,8,32), the
// word width, the address width and the argument type encoding are choices of
// this design.
package ilp_pkg;

  // Widest argument: the 32-bit floating point charge of atm/5.
  localparam int ARG_W     = 32;
  // Largest arity of a background predicate (atm/5).
  localparam int MAX_ARITY = 5;
  // Number of background predicates.
  localparam int NPRED     = 2;
  localparam int PRED_W    = 1;
  // One packed clause per memory word.
  localparam int WORD_W    = 64;
  localparam int ADDR_W    = 16;
  // Clause count of one index section (at most 44 in mutagenesis).
  localparam int CNT_W     = 6;
  localparam int NVARS     = 8;
  localparam int VAR_W     = $clog2(NVARS);
  localparam int MAX_LITS  = 4;
  localparam int LIT_W     = $clog2(MAX_LITS);
  localparam int ARGI_W    = $clog2(MAX_ARITY);
  localparam int TAG_W     = 8;   // host's query tag

  localparam logic [PRED_W-1:0] PRED_ATM  = 1'd0;
  localparam logic [PRED_W-1:0] PRED_BOND = 1'd1;

  // Type of a hypothesis argument, fixed when the hypothesis is compiled.
  typedef enum logic [1:0] {
    ARG_OUT   = 2'd0,   // output variable: bind it, always succeeds
    ARG_IN    = 2'd1,   // input variable: compare with its register
    ARG_VOID  = 2'd2,   // void variable: matches anything
    ARG_CONST = 2'd3    // constant: compare with the hypothesis data
  } arg_type_e;

  typedef logic [ARG_W-1:0]  arg_t;
  typedef logic [WORD_W-1:0] word_t;
  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [CNT_W-1:0]  cnt_t;

  // Field widths of each predicate's packing scheme; 0 = argument absent.
  localparam int FIELD_W [NPRED][MAX_ARITY] = '{
    '{8, 6, 4, 8, 32},   // atm(Compound, Atom, Element, Type, Charge)
    '{8, 6, 6, 3, 0}     // bond(Compound, Atom1, Atom2, BondType)
  };

  function automatic int pred_arity(int p);
    int n = 0;
    for (int i = 0; i < MAX_ARITY; i++) if (FIELD_W[p][i] != 0) n = i + 1;
    return n;
  endfunction

  function automatic int field_lsb(int p, int a);
    int s = 0;
    for (int i = 0; i < a; i++) s += FIELD_W[p][i];
    return s;
  endfunction

  function automatic int packed_width(int p);
    return field_lsb(p, MAX_ARITY);
  endfunction

  // Extract argument a of predicate p from a packed word, zero-extended.
  function automatic arg_t unpack_arg(word_t w, logic [PRED_W-1:0] p, int a);
    arg_t r = '0;
    for (int pp = 0; pp < NPRED; pp++) begin
      if (p == PRED_W'(pp)) begin
        for (int b = 0; b < ARG_W; b++)
          if (b < FIELD_W[pp][a]) r[b] = w[field_lsb(pp, a) + b];
      end
    end
    return r;
  endfunction

  // Pack a list of arguments into a word (used by testbenches and models).
  function automatic word_t pack_clause(int p, arg_t a0, arg_t a1, arg_t a2, arg_t a3, arg_t a4);
    arg_t  a [MAX_ARITY];
    word_t w = '0;
    a = '{a0, a1, a2, a3, a4};
    for (int i = 0; i < MAX_ARITY; i++)
      for (int b = 0; b < ARG_W; b++)
        if (b < FIELD_W[p][i]) w[field_lsb(p, i) + b] = a[i][b];
    return w;
  endfunction

  // Section of the background data holding one index value for one predicate:
  // found by the host in the preprocessing index table.
  typedef struct packed {
    addr_t base;
    cnt_t  count;
  } section_t;

  // Hypothesis write from the host: either one literal header or one argument.
  typedef struct packed {
    logic                  is_header;  // 1: literal header / literal count
    logic [LIT_W-1:0]      lit;
    logic [ARGI_W-1:0]     arg;
    arg_type_e             atype;
    arg_t                  data;       // constant, or variable number
    logic [PRED_W-1:0]     pred;       // header: predicate of lit
    logic [LIT_W:0]        nlits;      // header: number of body literals
  } hyp_wr_t;

  // One example query.
  typedef struct packed {
    logic [TAG_W-1:0] tag;
    arg_t             key;                 // example key, e.g. the compound
    section_t [NPRED-1:0] sect;            // per predicate
  } query_t;

  typedef struct packed {
    logic [TAG_W-1:0] tag;
    logic             success;
  } result_t;

endpackage
