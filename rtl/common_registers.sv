// common_registers: the scalar register file of the instruction stream.
//
// NUM_REGS 8-bit registers hold the shared scalar variables of a program
// (such as a count of responders) and the structure codes the instruction
// stream works on. A structure code occupies a group of SC_DIGITS
// consecutive registers, group g starting at register g*SC_DIGITS with its
// most significant digit. Ports: two register reads (a, b), two group reads
// (ga, gb), one host read, all combinational; one register write and one
// group write per clock (if both hit the same register the single write
// wins). The register count, grouping and ports are this design's choices.
// Registers reset to zero.
module common_registers
  import asc_pkg::*;
#(
  parameter int unsigned NUM_REGS  = 16,
  parameter int unsigned SC_DIGITS = 4,
  localparam int unsigned RW = $clog2(NUM_REGS),
  localparam int unsigned NG = NUM_REGS / SC_DIGITS,
  localparam int unsigned GW = (NG > 1) ? $clog2(NG) : 1
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic [RW-1:0] ra,
  output data_t   rdata_a,
  input  logic [RW-1:0] rb,
  output data_t   rdata_b,
  input  logic [GW-1:0] ga,
  output data_t   gdata_a [SC_DIGITS],
  input  logic [GW-1:0] gb,
  output data_t   gdata_b [SC_DIGITS],
  input  logic [RW-1:0] host_addr,
  output data_t   host_rdata,
  input  logic    we,
  input  logic [RW-1:0] waddr,
  input  data_t   wdata,
  input  logic    gwe,
  input  logic [GW-1:0] gwaddr,
  input  data_t   gwdata [SC_DIGITS]
);
  data_t r [NUM_REGS];

  assign rdata_a    = r[ra];
  assign rdata_b    = r[rb];
  assign host_rdata = r[host_addr];
  always_comb begin
    for (int d = 0; d < SC_DIGITS; d++) begin
      gdata_a[d] = r[int'(ga) * SC_DIGITS + d];
      gdata_b[d] = r[int'(gb) * SC_DIGITS + d];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_REGS; i++) r[i] <= '0;
    end else begin
      if (gwe)
        for (int d = 0; d < SC_DIGITS; d++) r[int'(gwaddr) * SC_DIGITS + d] <= gwdata[d];
      if (we) r[waddr] <= wdata;
    end
  end
endmodule
