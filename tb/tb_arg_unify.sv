// tb_arg_unify: checks the four unification rules on random and equal values.
module tb_arg_unify;
  import ilp_pkg::*;
  arg_type_e t;
  arg_t hd, vv, bg;
  logic m, b;
  int checks = 0, failures = 0;

  arg_unify dut (.atype(t), .hyp_data(hd), .var_val(vv), .bg_val(bg), .match(m), .do_bind(b));

  initial begin
    for (int n = 0; n < 2000; n++) begin
      logic em, eb;
      t  = arg_type_e'($urandom_range(0, 3));
      bg = arg_t'($urandom_range(0, 7));
      hd = ($urandom_range(0, 1) == 1) ? bg : arg_t'($urandom_range(0, 7));
      vv = ($urandom_range(0, 1) == 1) ? bg : arg_t'($urandom_range(0, 7));
      #1;
      case (t)
        ARG_OUT:   begin em = 1; eb = 1; end
        ARG_IN:    begin em = (vv == bg); eb = 0; end
        ARG_VOID:  begin em = 1; eb = 0; end
        default:   begin em = (hd == bg); eb = 0; end
      endcase
      checks++;
      if (m !== em || b !== eb) begin
        failures++;
        if (failures < 10) $display("FAIL type=%0d hd=%0d vv=%0d bg=%0d m=%0b b=%0b", t, hd, vv, bg, m, b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
