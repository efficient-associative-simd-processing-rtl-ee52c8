// pe_network: the PE interconnection network, a linear array or a 2D mesh.
//
// Combinational. Every PE drives `val` and receives in `nbr` the value of
// one neighbour, chosen by the direction broadcast with the move. In linear
// mode (mesh = 0) the PEs form a chain 0..NUM_PE-1: WEST (and NORTH) take
// the value of PE i-1, EAST (and SOUTH) of PE i+1. In mesh mode the PEs are
// laid out row by row, MESH_COLS to a row: WEST/EAST take i-1/i+1 in the
// same row, NORTH/SOUTH take i-MESH_COLS/i+MESH_COLS. A PE at an edge
// receives 0. The two modes and the mode select from the control unit follow
// the ASC processor; the row-major layout, the 6-column default (36 = 6x6)
// and the zero at the edges are this design's choices.
module pe_network
  import asc_pkg::*;
#(
  parameter int unsigned NUM_PE    = 36,
  parameter int unsigned MESH_COLS = 6
) (
  input  logic  mesh,
  input  dir_e  dir,
  input  data_t val [NUM_PE],
  output data_t nbr [NUM_PE]
);
  always_comb begin
    for (int i = 0; i < NUM_PE; i++) begin
      int src;
      logic ok;
      src = i;
      ok  = 1'b0;
      if (!mesh) begin
        if (dir == DIR_WEST || dir == DIR_NORTH) begin src = i - 1; ok = (i > 0); end
        else begin src = i + 1; ok = (i < NUM_PE - 1); end
      end else begin
        unique case (dir)
          DIR_WEST:  begin src = i - 1; ok = (i % MESH_COLS) != 0; end
          DIR_EAST:  begin src = i + 1; ok = ((i % MESH_COLS) != MESH_COLS - 1) && (i < NUM_PE - 1); end
          DIR_NORTH: begin src = i - MESH_COLS; ok = (i >= MESH_COLS); end
          DIR_SOUTH: begin src = i + MESH_COLS; ok = (i + MESH_COLS < NUM_PE); end
          default: ;
        endcase
      end
      nbr[i] = ok ? val[src] : '0;
    end
  end
endmodule
