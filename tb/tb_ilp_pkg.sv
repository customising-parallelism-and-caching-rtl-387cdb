// tb_ilp_pkg: shared testbench data and reference model.
//
// Holds a generated background knowledge base of atm/5 and bond/4 clauses,
// grouped by compound (the index) as the preprocessing would store it, the index
// table of each predicate, a hypothesis in the form of the published architecture's rule 3
//   active(A) <- atm(A,B,c,27,C), bond(A,D,E,1), bond(A,D,B,7).
// and a reference evaluator that runs the same failure-driven search in plain
// procedural code, independently of the RTL.
package tb_ilp_pkg;
  import ilp_pkg::*;

  localparam int MEMSZ   = 16384;
  localparam int NKEYS   = 200;

  word_t bg_mem [MEMSZ];
  int    sec_base [NKEYS][NPRED];
  int    sec_cnt  [NKEYS][NPRED];
  int    mem_used;

  // Hypothesis as arrays.
  int        h_nlits;
  int        h_pred [MAX_LITS];
  arg_type_e h_type [MAX_LITS][MAX_ARITY];
  arg_t      h_data [MAX_LITS][MAX_ARITY];

  // Element code of carbon, as the preprocessing would map the constant c.
  localparam int ELEM_C = 1;

  // Fill the memory: per compound, atm clauses then bond clauses, each section
  // at most maxcnt clauses; atm section of compound k, then bond section.
  function automatic void gen_background(int nkeys, int maxcnt, int seed);
    int a = 0;
    int s = seed;
    void'($urandom(s));
    for (int k = 0; k < nkeys; k++) begin
      int na, nb;
      na = int'($urandom_range(0, maxcnt));
      nb = int'($urandom_range(0, maxcnt));
      if (a + na + nb > MEMSZ) begin na = 0; nb = 0; end
      sec_base[k][0] = a;  sec_cnt[k][0] = na;
      for (int i = 0; i < na; i++) begin
        bg_mem[a] = pack_clause(0, arg_t'(k), arg_t'(i % 64), arg_t'($urandom_range(0, 3)),
                                arg_t'(($urandom_range(0, 3) == 0) ? 27 : $urandom_range(0, 255)),
                                arg_t'($urandom));
        a++;
      end
      sec_base[k][1] = a;  sec_cnt[k][1] = nb;
      for (int i = 0; i < nb; i++) begin
        bg_mem[a] = pack_clause(1, arg_t'(k), arg_t'($urandom_range(0, 15)), arg_t'($urandom_range(0, 15)),
                                arg_t'($urandom_range(0, 7)), '0);
        a++;
      end
    end
    mem_used = a;
    for (int i = a; i < MEMSZ; i++) bg_mem[i] = '0;
  endfunction

  function automatic void set_arg(int l, int i, arg_type_e t, int d);
    h_type[l][i] = t;
    h_data[l][i] = arg_t'(d);
  endfunction

  // Rule 3 of the mutagenesis hypothesis. Variables A=0 B=1 C=2 D=3 E=4.
  function automatic void hyp_rule3(int atm_type, int bond1, int bond2);
    h_nlits = 3;
    for (int l = 0; l < MAX_LITS; l++) begin
      h_pred[l] = 0;
      for (int i = 0; i < MAX_ARITY; i++) set_arg(l, i, ARG_VOID, 0);
    end
    h_pred[0] = 0;
    set_arg(0, 0, ARG_IN, 0);  set_arg(0, 1, ARG_OUT, 1); set_arg(0, 2, ARG_CONST, ELEM_C);
    set_arg(0, 3, ARG_CONST, atm_type);  set_arg(0, 4, ARG_VOID, 2);
    h_pred[1] = 1;
    set_arg(1, 0, ARG_IN, 0);  set_arg(1, 1, ARG_OUT, 3); set_arg(1, 2, ARG_VOID, 4);
    set_arg(1, 3, ARG_CONST, bond1);
    h_pred[2] = 1;
    set_arg(2, 0, ARG_IN, 0);  set_arg(2, 1, ARG_IN, 3);  set_arg(2, 2, ARG_IN, 1);
    set_arg(2, 3, ARG_CONST, bond2);
  endfunction

  // Rule 2: active(A) <- atm(A,B,c,10,C), atm(A,D,c,22,E), bond(A,D,B,1).
  function automatic void hyp_rule2(int t1, int t2, int b);
    h_nlits = 3;
    for (int l = 0; l < MAX_LITS; l++) begin
      h_pred[l] = 0;
      for (int i = 0; i < MAX_ARITY; i++) set_arg(l, i, ARG_VOID, 0);
    end
    h_pred[0] = 0;
    set_arg(0, 0, ARG_IN, 0); set_arg(0, 1, ARG_OUT, 1); set_arg(0, 2, ARG_CONST, ELEM_C); set_arg(0, 3, ARG_CONST, t1);
    h_pred[1] = 0;
    set_arg(1, 0, ARG_IN, 0); set_arg(1, 1, ARG_OUT, 3); set_arg(1, 2, ARG_CONST, ELEM_C); set_arg(1, 3, ARG_CONST, t2);
    h_pred[2] = 1;
    set_arg(2, 0, ARG_IN, 0); set_arg(2, 1, ARG_IN, 3); set_arg(2, 2, ARG_IN, 1); set_arg(2, 3, ARG_CONST, b);
  endfunction

  // Rule 1: active(A) <- atm(A,B,c,195,C).
  function automatic void hyp_rule1(int t);
    h_nlits = 1;
    for (int l = 0; l < MAX_LITS; l++) begin
      h_pred[l] = 0;
      for (int i = 0; i < MAX_ARITY; i++) set_arg(l, i, ARG_VOID, 0);
    end
    set_arg(0, 0, ARG_IN, 0); set_arg(0, 1, ARG_VOID, 1); set_arg(0, 2, ARG_CONST, ELEM_C); set_arg(0, 3, ARG_CONST, t);
  endfunction

  // Field of a packed word, computed with the field table (independent of the
  // RTL's unpacking).
  function automatic arg_t field_of(word_t w, int p, int a);
    int lsb = 0;
    arg_t r = '0;
    for (int i = 0; i < a; i++) lsb += FIELD_W[p][i];
    for (int b = 0; b < FIELD_W[p][a]; b++) r[b] = w[lsb + b];
    return r;
  endfunction

  // Reference search. Returns 1 if the hypothesis covers example k; reads is the
  // number of clauses examined.
  function automatic bit ref_eval(int k, output int reads);
    int   ptr [MAX_LITS];
    arg_t vars [NVARS];
    int   l = 0;
    reads = 0;
    for (int v = 0; v < NVARS; v++) vars[v] = '0;
    vars[0] = arg_t'(k);
    if (h_nlits == 0) return 1'b1;
    ptr[0] = sec_base[k][h_pred[0]];
    forever begin
      int p = h_pred[l];
      if (ptr[l] >= sec_base[k][p] + sec_cnt[k][p]) begin
        if (l == 0) return 1'b0;
        l--;
      end else begin
        word_t w = bg_mem[ptr[l]];
        bit ok = 1'b1;
        arg_t nv [NVARS];
        nv = vars;
        ptr[l]++;
        reads++;
        for (int i = 0; i < MAX_ARITY; i++) begin
          if (FIELD_W[p][i] == 0) continue;
          case (h_type[l][i])
            ARG_OUT:   nv[h_data[l][i]] = field_of(w, p, i);
            ARG_IN:    if (vars[h_data[l][i]] != field_of(w, p, i)) ok = 1'b0;
            ARG_CONST: if (h_data[l][i] != field_of(w, p, i)) ok = 1'b0;
            default: ;
          endcase
        end
        if (ok) begin
          vars = nv;
          if (l == h_nlits - 1) return 1'b1;
          l++;
          ptr[l] = sec_base[k][h_pred[l]];
        end
      end
    end
  endfunction

  // Encoded hypothesis writes: one header per literal, then its arguments.
  function automatic int hyp_stream(output hyp_wr_t s [MAX_LITS * (MAX_ARITY + 1)]);
    int n = 0;
    for (int l = 0; l < MAX_LITS; l++) begin
      hyp_wr_t w;
      w = '0;
      w.is_header = 1'b1;
      w.lit   = LIT_W'(l);
      w.pred  = PRED_W'(h_pred[l]);
      w.nlits = (LIT_W+1)'(h_nlits);
      s[n++] = w;
      for (int i = 0; i < MAX_ARITY; i++) begin
        w = '0;
        w.lit   = LIT_W'(l);
        w.arg   = ARGI_W'(i);
        w.atype = h_type[l][i];
        w.data  = h_data[l][i];
        s[n++] = w;
      end
    end
    return n;
  endfunction

  function automatic query_t make_query(int k, int tag);
    query_t q;
    q.tag = TAG_W'(tag);
    q.key = arg_t'(k);
    for (int p = 0; p < NPRED; p++) begin
      q.sect[p].base  = addr_t'(sec_base[k][p]);
      q.sect[p].count = cnt_t'(sec_cnt[k][p]);
    end
    return q;
  endfunction
endpackage
