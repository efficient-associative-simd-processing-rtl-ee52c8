// control_unit: the instruction stream (IS) of the ASC processor.
//
// Holds the program memory, the program counter, the common registers, the
// scalar structure-code unit and the macro sequencer. Each clock it decodes
// the instruction at `pc` and either acts on its own state (jumps, branches
// on "some PE responds", scalar arithmetic on the common registers, scalar
// structure-code operations, the network mode) or broadcasts a micro-
// operation to the PE array on `uop`, with a common register or the
// instruction's immediate as broadcast data. `RDR` takes the value that the
// chosen responder drives on the reduction network into a common register.
// Max/Min and the parallel structure-code operations are handed to the macro
// sequencer: one cycle to start it, then its micro-operations, during which
// the program counter waits. Unpipelined: the PE array answers in the same
// cycle, so a branch sees the responders written by the instruction before it.
//
// Host side: the program memory is written through prog_we/prog_addr/
// prog_wdata while the processor is stopped; `start` clears pc and runs;
// `HALT` stops and raises `halted`. The common registers can be read through
// host_addr/host_rdata. The encoding (see asc_pkg) and everything about the
// host side are this design's choices; the split between scalar work in the
// instruction stream and broadcast work in the PEs follows the ASC processor.
module control_unit
  import asc_pkg::*;
#(
  parameter int unsigned PROG_DEPTH = 256,
  parameter int unsigned NUM_CREGS  = 16,
  parameter int unsigned SC_DIGITS  = 4,
  localparam int unsigned PW = $clog2(PROG_DEPTH),
  localparam int unsigned CW = $clog2(NUM_CREGS),
  localparam int unsigned NG = NUM_CREGS / SC_DIGITS,
  localparam int unsigned GW = (NG > 1) ? $clog2(NG) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // host
  input  logic          prog_we,
  input  logic [PW-1:0] prog_addr,
  input  logic [31:0]   prog_wdata,
  input  logic          start,
  output logic          running,
  output logic          halted,
  output logic [PW-1:0] pc,
  output logic          sc_err,
  input  logic [CW-1:0] host_addr,
  output data_t         host_rdata,
  // PE array
  output pe_uop_t       uop,
  output logic          net_mesh,
  input  logic          any_resp,
  input  data_t         rd_data
);
  logic [31:0] prog [PROG_DEPTH];
  logic [31:0] ir;
  opcode_e     opc;
  logic [3:0]  f_rd, f_ra, f_rb;
  logic [2:0]  f_fn;
  logic        f_bsel, f_bimm;
  data_t       f_imm;

  assign ir     = prog[pc];
  assign opc    = opcode_e'(ir[31:26]);
  assign f_rd   = ir[25:22];
  assign f_ra   = ir[21:18];
  assign f_rb   = ir[17:14];
  assign f_fn   = ir[13:11];
  assign f_bsel = ir[10];
  assign f_bimm = ir[9];
  assign f_imm  = ir[7:0];

  always_ff @(posedge clk) if (prog_we) prog[prog_addr] <= prog_wdata;

  // Common registers
  data_t c_a, c_b, c_wdata;
  data_t g_a [SC_DIGITS];
  data_t g_b [SC_DIGITS];
  data_t g_wdata [SC_DIGITS];
  logic  c_we, g_we;
  logic [GW-1:0] g_waddr;

  common_registers #(.NUM_REGS(NUM_CREGS), .SC_DIGITS(SC_DIGITS)) u_cregs (
    .clk, .rst_n,
    .ra(CW'(f_ra)), .rdata_a(c_a), .rb(CW'(f_rb)), .rdata_b(c_b),
    .ga(GW'(f_ra)), .gdata_a(g_a), .gb(GW'(f_rb)), .gdata_b(g_b),
    .host_addr, .host_rdata,
    .we(c_we), .waddr(CW'(f_rd)), .wdata(c_wdata),
    .gwe(g_we), .gwaddr(g_waddr), .gwdata(g_wdata)
  );

  // Scalar structure-code unit
  data_t sc_res [SC_DIGITS];
  logic  sc_valid;
  logic [$clog2(SC_DIGITS+1)-1:0] sc_level;
  sc_scalar_unit #(.SC_DIGITS(SC_DIGITS)) u_sc (
    .code(g_a), .fn(sc_fn_e'(f_fn)), .result(sc_res), .valid(sc_valid), .level(sc_level)
  );

  // Macro sequencer
  logic    is_macro, seq_start, seq_busy, seq_done, seq_res_we, macro_started;
  pe_uop_t seq_uop;
  data_t   seq_res [SC_DIGITS];
  assign is_macro = (opc inside {OP_MAX, OP_MIN, OP_PRVDEX, OP_NXTDEX, OP_SIBDEX,
                                 OP_PRVVAL, OP_NXTVAL});
  assign seq_start = running && is_macro && !macro_started;

  macro_sequencer #(.SC_DIGITS(SC_DIGITS)) u_seq (
    .clk, .rst_n, .start(seq_start), .op(opc), .field_reg(RIDX_W'(f_ra)),
    .addr(f_imm), .ref_code(g_b), .rd_data, .busy(seq_busy), .done(seq_done),
    .uop(seq_uop), .res_we(seq_res_we), .res_code(seq_res)
  );

  data_t bcast;
  assign bcast = f_bimm ? f_imm : c_b;

  // Decode
  logic [PW-1:0] pc_next;
  logic          do_halt;
  always_comb begin
    uop     = UOP_NOP;
    pc_next = pc + PW'(1);
    do_halt = 1'b0;
    c_we    = 1'b0;
    c_wdata = '0;
    g_we    = 1'b0;
    g_waddr = GW'(f_rd);
    g_wdata = sc_res;
    uop.rd  = RIDX_W'(f_rd);
    uop.ra  = RIDX_W'(f_ra);
    uop.rb  = RIDX_W'(f_rb);
    uop.fn  = f_fn;
    uop.use_b = f_bsel;
    uop.bval  = bcast;
    uop.addr  = f_imm;
    if (running) begin
      unique case (opc)
        OP_HALT:   begin do_halt = 1'b1; pc_next = pc; end
        OP_JMP:    pc_next = PW'(f_imm);
        OP_BRANY:  if (any_resp)  pc_next = PW'(f_imm);
        OP_BRNONE: if (!any_resp) pc_next = PW'(f_imm);
        OP_CMOVI:  begin c_we = 1'b1; c_wdata = f_imm; end
        OP_CADDI:  begin c_we = 1'b1; c_wdata = c_a + f_imm; end
        OP_CADD:   begin c_we = 1'b1; c_wdata = c_a + c_b; end
        OP_CSUB:   begin c_we = 1'b1; c_wdata = c_a - c_b; end
        OP_RDR:    begin c_we = 1'b1; c_wdata = rd_data; end
        OP_SCOP:   g_we = sc_valid;   // an impossible result leaves the group as it was
        OP_PLD:    uop.op = PE_LD;
        OP_PST:    uop.op = PE_ST;
        OP_PALU:   uop.op = PE_ALU;
        OP_PID:    uop.op = PE_ID;
        OP_PCMP:   uop.op = PE_CMP;
        OP_PCMPAND: uop.op = PE_CMPAND;
        OP_PPUSH1: uop.op = PE_PUSH1;
        OP_PPUSHR: uop.op = PE_PUSHR;
        OP_PPOP:   uop.op = PE_POP;
        OP_PSTEP:  uop.op = PE_STEP;
        OP_PNET:   uop.op = PE_NET;
        OP_PFLAG:  uop.op = PE_FLAG;
        OP_MAX, OP_MIN, OP_PRVDEX, OP_NXTDEX, OP_SIBDEX, OP_PRVVAL, OP_NXTVAL: begin
          uop = macro_started ? seq_uop : UOP_NOP;
          if (!seq_done) pc_next = pc;
          g_we    = seq_res_we;
          g_wdata = seq_res;
        end
        default: ;   // OP_NOP, OP_NETCFG and unused codes
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc <= '0; running <= 1'b0; halted <= 1'b0; sc_err <= 1'b0;
      net_mesh <= 1'b0; macro_started <= 1'b0;
    end else if (start) begin
      pc <= '0; running <= 1'b1; halted <= 1'b0; sc_err <= 1'b0; macro_started <= 1'b0;
    end else if (running) begin
      pc <= pc_next;
      if (do_halt) begin running <= 1'b0; halted <= 1'b1; end
      if (opc == OP_NETCFG) net_mesh <= f_imm[0];
      if (opc == OP_SCOP) sc_err <= !sc_valid;
      if (seq_start) macro_started <= 1'b1;
      else if (seq_done) macro_started <= 1'b0;
    end
  end

  a_prog_write_stopped: assert property (@(posedge clk) disable iff (!rst_n) prog_we |-> !running);
  a_seq_in_step: assert property (@(posedge clk) disable iff (!rst_n) seq_busy |-> macro_started);
endmodule
