// reduction_network: the reduction half of the broadcast and reduction
// network between the PE array and the instruction stream.
//
// Combinational OR trees. `rd_data` is the OR of the values of the PEs whose
// `sel` bit is set; with the one-hot selection of the responder resolution
// unit it is the value held by the chosen responder, and 0 when there is
// none. `falk_any` is the OR of the PEs' Falkoff votes, fed back to every
// PE in the same cycle. The broadcast half is the fan-out of the micro-
// operation and its data to all PEs and needs no logic. The ASC processor's
// network is described only as more involved than a bus; OR reduction is the
// simplest circuit that gives what this design reads back.
module reduction_network
  import asc_pkg::*;
#(
  parameter int unsigned NUM_PE = 36
) (
  input  data_t             val [NUM_PE],
  input  logic [NUM_PE-1:0] sel,
  input  logic [NUM_PE-1:0] falk_bit,
  output data_t             rd_data,
  output logic              falk_any
);
  always_comb begin
    rd_data = '0;
    for (int i = 0; i < NUM_PE; i++) rd_data |= sel[i] ? val[i] : '0;
  end
  assign falk_any = |falk_bit;
endmodule
