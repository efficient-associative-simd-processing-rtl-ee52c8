// sc_scalar_unit: scalar structure-code arithmetic of the instruction stream.
//
// A structure code names a node of a tree or nested list by its path: digit
// 0 (most significant) is the node's position among the roots, digit 1 its
// position among its parent's children, and so on; each digit is one byte
// (1..255, 0 = unused), so a node may have up to 255 children. The level of
// a code is its number of leading non-zero digits. With input 1220 (level 3):
//   fstcd  -> 1221  first child:    set digit L to 1
//   nxtcd  -> 1230  next sibling:   digit L-1 plus one
//   prvcd  -> 1210  previous sibling: digit L-1 minus one
//   trncd  -> 1200  parent:         clear digit L-1
//   trnacd -> 1000  root:           keep digit 0 only
// `valid` is low, and the result meaningless, when the node asked for
// cannot exist: no room for a child, digit 255 has no next sibling, digit 1
// no previous one, a root no parent, and an empty code anything but a first
// child (which becomes the first root, 1000). The operations and the byte
// per digit follow the ASC processor; the `valid` flag is this design's own.
// Combinational.
module sc_scalar_unit
  import asc_pkg::*;
#(
  parameter int unsigned SC_DIGITS = 4
) (
  input  data_t  code   [SC_DIGITS],
  input  sc_fn_e fn,
  output data_t  result [SC_DIGITS],
  output logic   valid,
  output logic [$clog2(SC_DIGITS+1)-1:0] level
);
  always_comb begin
    int lv;
    logic run;
    lv  = 0;
    run = 1'b1;
    for (int d = 0; d < SC_DIGITS; d++) begin
      run = run && (code[d] != '0);
      if (run) lv = d + 1;
    end
    level = lv[$clog2(SC_DIGITS+1)-1:0];

    result = code;
    valid  = 1'b0;
    unique case (fn)
      SC_FSTCD: if (lv < SC_DIGITS) begin
        result[lv] = data_t'(1);
        valid = 1'b1;
      end
      SC_NXTCD: if (lv > 0) begin
        result[lv-1] = code[lv-1] + data_t'(1);
        valid = (code[lv-1] != '1);
      end
      SC_PRVCD: if (lv > 0) begin
        result[lv-1] = code[lv-1] - data_t'(1);
        valid = (code[lv-1] != data_t'(1));
      end
      SC_TRNCD: if (lv > 0) begin
        result[lv-1] = '0;
        valid = (lv > 1);
      end
      SC_TRNACD: begin
        for (int d = 1; d < SC_DIGITS; d++) result[d] = '0;
        valid = (lv > 0);
      end
      default: ;
    endcase
  end
endmodule
