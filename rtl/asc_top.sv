// asc_top: the associative SIMD (ASC) processor.
//
// One instruction stream (control_unit) broadcasts micro-operations to an
// array of NUM_PE 8-bit processing elements (pe_array), each with its own
// local memory and mask stack, and reads back through the responder
// resolution unit and the reduction network whether any PE responds and the
// value held by the chosen responder. The PE network runs as a linear array
// or a 6x6 mesh, as the program selects. Besides the associative search,
// Step and Falkoff Max/Min, the processor has structure-code instructions
// that let trees stored one node per PE be walked in constant time.
//
// Ports: the host writes the program (prog_*), pulses `start`, waits for
// `halted` and reads results from the common registers (host_addr/
// host_rdata). The responder and mask-top vectors and the status flags are
// brought out for observation. Timing: one instruction per clock; Max/Min
// take 10 clocks and the parallel structure-code operations 19 to 41.
// NUM_PE = 36 with 8-bit PEs follows the processor this design implements;
// the memory depths and register counts are this design's choices.
module asc_top
  import asc_pkg::*;
#(
  parameter int unsigned NUM_PE     = 36,
  parameter int unsigned MEM_DEPTH  = 256,
  parameter int unsigned MASK_DEPTH = 8,
  parameter int unsigned MESH_COLS  = 6,
  parameter int unsigned PROG_DEPTH = 256,
  parameter int unsigned NUM_CREGS  = 16,
  parameter int unsigned SC_DIGITS  = 4
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          prog_we,
  input  logic [$clog2(PROG_DEPTH)-1:0] prog_addr,
  input  logic [31:0]                   prog_wdata,
  input  logic                          start,
  output logic                          running,
  output logic                          halted,
  output logic [$clog2(PROG_DEPTH)-1:0] pc,
  input  logic [$clog2(NUM_CREGS)-1:0]  host_addr,
  output logic [7:0]                    host_rdata,
  output logic                          any_resp,
  output logic [NUM_PE-1:0]             resp_vec,
  output logic [NUM_PE-1:0]             active_vec,
  output logic                          mask_overflow,
  output logic                          sc_err,
  output logic                          net_mesh,
  output pe_uop_t                       uop
);
  data_t rd_data;

  control_unit #(.PROG_DEPTH(PROG_DEPTH), .NUM_CREGS(NUM_CREGS), .SC_DIGITS(SC_DIGITS)) u_cu (
    .clk, .rst_n, .prog_we, .prog_addr, .prog_wdata, .start, .running, .halted, .pc,
    .sc_err, .host_addr, .host_rdata, .uop, .net_mesh, .any_resp, .rd_data
  );

  pe_array #(.NUM_PE(NUM_PE), .MEM_DEPTH(MEM_DEPTH), .MASK_DEPTH(MASK_DEPTH),
             .MESH_COLS(MESH_COLS)) u_array (
    .clk, .rst_n, .uop, .net_mesh, .any_resp, .rd_data, .resp_vec, .active_vec,
    .mask_overflow
  );
endmodule
