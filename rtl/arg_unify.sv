// arg_unify: unification of one hypothesis argument with one argument of a
// background clause. Because the background knowledge holds only ground terms,
// unification is a single step selected by the argument's compile-time type:
//   output variable - the clause value is written to the variable's register,
//                     always succeeds;
//   input variable  - succeeds if the variable's register equals the clause value;
//   void variable   - always succeeds, nothing is written;
//   constant        - succeeds if the hypothesis constant equals the clause value.
// The four rules are the published architecture's. The block is combinational; one instance
// serves each parallel unification lane.
module arg_unify
  import ilp_pkg::*;
(
  input  arg_type_e atype,     // type of the hypothesis argument
  input  arg_t      hyp_data,  // constant (for ARG_CONST)
  input  arg_t      var_val,   // register value of the variable (for ARG_IN)
  input  arg_t      bg_val,    // argument taken from the background clause
  output logic      match,     // unification succeeds
  output logic      do_bind       // write bg_val to the variable's register
);
  always_comb begin
    match = 1'b1;
    do_bind = 1'b0;
    unique case (atype)
      ARG_OUT:   do_bind = 1'b1;
      ARG_IN:    match = (var_val == bg_val);
      ARG_VOID:  ;
      ARG_CONST: match = (hyp_data == bg_val);
    endcase
  end
endmodule
