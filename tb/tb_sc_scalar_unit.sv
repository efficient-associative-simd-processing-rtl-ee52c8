// tb_sc_scalar_unit: the five scalar structure-code operations on 1220
// (expected 1221, 1230, 1210, 1200, 1000), edge cases, and random codes
// checked against a model that works on the code as a decimal-like number.
module tb_sc_scalar_unit;
  import asc_pkg::*;
  localparam int SD = 4;
  data_t code [SD]; data_t result [SD]; sc_fn_e fn; logic valid; logic [2:0] level;
  int checks = 0, failures = 0;
  sc_scalar_unit #(.SC_DIGITS(SD)) dut (.*);
  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(input int c[SD], input sc_fn_e f, input int e[SD], input bit ev);
    foreach (code[i]) code[i] = data_t'(c[i]);
    fn = f; #1;
    checks++;
    if (valid != ev) begin failures++; $display("valid fn=%0d", f); end
    else if (ev) foreach (e[i]) if (int'(result[i]) != e[i]) begin failures++; $display("fn=%0d digit %0d: %0d != %0d", f, i, result[i], e[i]); break; end
  endtask
  initial begin
    check('{1,2,2,0}, SC_FSTCD,  '{1,2,2,1}, 1);
    check('{1,2,2,0}, SC_NXTCD,  '{1,2,3,0}, 1);
    check('{1,2,2,0}, SC_PRVCD,  '{1,2,1,0}, 1);
    check('{1,2,2,0}, SC_TRNCD,  '{1,2,0,0}, 1);
    check('{1,2,2,0}, SC_TRNACD, '{1,0,0,0}, 1);
    check('{1,2,2,3}, SC_FSTCD,  '{0,0,0,0}, 0);
    check('{1,255,0,0}, SC_NXTCD,'{0,0,0,0}, 0);
    check('{1,1,0,0}, SC_PRVCD,  '{0,0,0,0}, 0);
    check('{3,0,0,0}, SC_TRNCD,  '{0,0,0,0}, 0);
    check('{0,0,0,0}, SC_FSTCD,  '{1,0,0,0}, 1);
    check('{0,0,0,0}, SC_TRNACD, '{0,0,0,0}, 0);
    for (int n = 0; n < 2000; n++) begin
      int c[SD], e[SD], L; bit ev; sc_fn_e f;
      L = $urandom_range(1, SD);
      for (int i = 0; i < SD; i++) c[i] = (i < L) ? $urandom_range(1, 255) : 0;
      e = c; f = sc_fn_e'($urandom_range(0, 4));
      case (f)
        SC_FSTCD:  begin ev = L < SD; if (ev) e[L] = 1; end
        SC_NXTCD:  begin ev = c[L-1] < 255; e[L-1] = c[L-1] + 1; end
        SC_PRVCD:  begin ev = c[L-1] > 1; e[L-1] = c[L-1] - 1; end
        SC_TRNCD:  begin ev = L > 1; e[L-1] = 0; end
        default:   begin ev = 1; for (int i = 1; i < SD; i++) e[i] = 0; end
      endcase
      check(c, f, e, ev);
      checks++; if (int'(level) != L) begin failures++; $display("level"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
