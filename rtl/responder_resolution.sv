// responder_resolution: the responder resolution unit of the PE array.
//
// Combinational. From the responder bits of all PEs it reports whether any
// PE responds and selects exactly one responder (one-hot `sel`, all zero
// when there is none). The ASC processor lets the choice be arbitrary; this
// unit takes the lowest-numbered responder, which matches the order of the
// Step example (PE1 before PE4). The selection is a priority chain: `sel[i]`
// is set when PE i responds and no lower PE does. `sel_idx` is its index.
module responder_resolution #(
  parameter int unsigned NUM_PE = 36
) (
  input  logic [NUM_PE-1:0]         resp,
  output logic [NUM_PE-1:0]         sel,
  output logic [$clog2(NUM_PE)-1:0] sel_idx,
  output logic                      any
);
  always_comb begin
    logic seen;
    seen    = 1'b0;
    sel     = '0;
    sel_idx = '0;
    for (int i = 0; i < NUM_PE; i++) begin
      if (resp[i] && !seen) begin
        sel[i]  = 1'b1;
        sel_idx = i[$clog2(NUM_PE)-1:0];
      end
      seen = seen | resp[i];
    end
    any = seen;
  end
endmodule
