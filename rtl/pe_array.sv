// pe_array: the array of processing elements with its networks.
//
// Instantiates NUM_PE PEs (ids 0..NUM_PE-1), the PE interconnection network,
// the responder resolution unit and the reduction network, and fans the
// broadcast micro-operation out to every PE. Outputs to the instruction
// stream: `any_resp` (some PE responds), `rd_data` (uop.ra of the chosen
// responder) and the responder and mask-top vectors for observation. The
// mesh/linear choice `net_mesh` comes from the control unit. All paths from
// the broadcast micro-operation to the outputs are combinational; the PE
// state changes on the clock edge.
module pe_array
  import asc_pkg::*;
#(
  parameter int unsigned NUM_PE     = 36,
  parameter int unsigned MEM_DEPTH  = 256,
  parameter int unsigned MASK_DEPTH = 8,
  parameter int unsigned MESH_COLS  = 6
) (
  input  logic              clk,
  input  logic              rst_n,
  input  pe_uop_t           uop,
  input  logic              net_mesh,
  output logic              any_resp,
  output data_t             rd_data,
  output logic [NUM_PE-1:0] resp_vec,
  output logic [NUM_PE-1:0] active_vec,
  output logic              mask_overflow
);
  data_t             val [NUM_PE];
  data_t             nbr [NUM_PE];
  logic [NUM_PE-1:0] sel, falk_bit, ovf;
  logic              falk_any;
  logic [$clog2(NUM_PE)-1:0] sel_idx;

  for (genvar i = 0; i < NUM_PE; i++) begin : g_pe
    pe #(.MEM_DEPTH(MEM_DEPTH), .MASK_DEPTH(MASK_DEPTH)) u_pe (
      .clk, .rst_n, .pe_id(data_t'(i)), .uop, .step_sel(sel[i]),
      .falk_any, .net_in(nbr[i]), .val_out(val[i]), .resp(resp_vec[i]),
      .active(active_vec[i]), .falk_bit(falk_bit[i]), .mask_overflow(ovf[i])
    );
  end

  pe_network #(.NUM_PE(NUM_PE), .MESH_COLS(MESH_COLS)) u_net (
    .mesh(net_mesh), .dir(dir_e'(uop.fn[1:0])), .val, .nbr
  );

  responder_resolution #(.NUM_PE(NUM_PE)) u_rru (
    .resp(resp_vec), .sel, .sel_idx, .any(any_resp)
  );

  reduction_network #(.NUM_PE(NUM_PE)) u_red (
    .val, .sel, .falk_bit, .rd_data, .falk_any
  );

  assign mask_overflow = |ovf;
endmodule
