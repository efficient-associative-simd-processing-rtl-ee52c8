// tb_pe_alu: every ALU function and comparison on random and corner operands.
module tb_pe_alu;
  import asc_pkg::*;
  data_t a, b, y; logic cond;
  alu_fn_e fn; cmp_fn_e cmp_fn;
  int checks = 0, failures = 0;
  pe_alu dut (.*);
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int n = 0; n < 3000; n++) begin
      int ia, ib, ey; bit ec;
      ia = (n < 4) ? (n % 2) * 255 : $urandom_range(0, 255);
      ib = (n < 4) ? (n / 2) * 255 : ((n % 7 == 0) ? ia : $urandom_range(0, 255));
      a = ia[7:0]; b = ib[7:0];
      fn = alu_fn_e'(n % 8); cmp_fn = cmp_fn_e'((n / 8) % 8);
      #1;
      case (n % 8)
        0: ey = (ia + ib) % 256;  1: ey = (ia - ib + 256) % 256;
        2: ey = ia & ib;          3: ey = ia | ib;
        4: ey = ia ^ ib;          5: ey = ib;
        6: ey = 255 - ia;         default: ey = ia / 2;
      endcase
      case ((n / 8) % 8)
        0: ec = ia == ib; 1: ec = ia != ib; 2: ec = ia < ib; 3: ec = ia <= ib;
        4: ec = ia > ib;  5: ec = ia >= ib; 6: ec = 1; default: ec = 0;
      endcase
      checks++; if (int'(y) != ey) begin failures++; $display("y fn=%0d a=%0d b=%0d y=%0d", n%8, ia, ib, y); end
      checks++; if (cond != ec) begin failures++; $display("cond fn=%0d a=%0d b=%0d", (n/8)%8, ia, ib); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
