// pe_alu: the 8-bit arithmetic/logic unit of one processing element.
//
// Combinational. `fn` selects one of eight operations (asc_pkg::alu_fn_e)
// on operands a and b, and `cmp_fn` one of the unsigned comparisons
// (asc_pkg::cmp_fn_e) whose one-bit result `cond` drives associative search.
// The ASC processor's PEs receive decoded microcode "as if to an ALU"; the
// exact operation list is this design's choice.
module pe_alu
  import asc_pkg::*;
(
  input  data_t   a,
  input  data_t   b,
  input  alu_fn_e fn,
  input  cmp_fn_e cmp_fn,
  output data_t   y,
  output logic    cond
);
  always_comb begin
    unique case (fn)
      ALU_ADD:  y = a + b;
      ALU_SUB:  y = a - b;
      ALU_AND:  y = a & b;
      ALU_OR:   y = a | b;
      ALU_XOR:  y = a ^ b;
      ALU_MOVB: y = b;
      ALU_NOTA: y = ~a;
      ALU_SHR:  y = a >> 1;
      default:  y = '0;
    endcase
  end

  always_comb begin
    unique case (cmp_fn)
      CMP_EQ:    cond = (a == b);
      CMP_NE:    cond = (a != b);
      CMP_LT:    cond = (a <  b);
      CMP_LE:    cond = (a <= b);
      CMP_GT:    cond = (a >  b);
      CMP_GE:    cond = (a >= b);
      CMP_TRUE:  cond = 1'b1;
      CMP_FALSE: cond = 1'b0;
      default:   cond = 1'b0;
    endcase
  end
endmodule
