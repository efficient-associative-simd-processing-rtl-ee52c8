// asc_pkg: types and constants shared by the associative SIMD (ASC) processor.
//
// The processor is an array of 8-bit processing elements (PEs) driven by one
// instruction stream. The 8-bit data width follows the design this RTL
// implements; the instruction encoding, the PE micro-operation set and the
// field widths below are this implementation's own choices.
//
// Instruction word (32 bits), all fields fixed:
//   [31:26] opcode   [25:22] rd   [21:18] ra   [17:14] rb
//   [13:11] func     [10] bsel (PE operand b = broadcast)  [9] bimm
//   (broadcast value = imm, else common register rb)   [7:0] imm / address
package asc_pkg;

  localparam int unsigned DATA_W   = 8;   // PE and common-register width
  localparam int unsigned ADDR_W   = 8;   // PE local memory address width
  localparam int unsigned NREG     = 8;   // registers per PE
  localparam int unsigned RIDX_W   = 3;
  localparam int unsigned SCRATCH  = 7;   // PE register used by macro operations

  typedef logic [DATA_W-1:0] data_t;
  typedef logic [ADDR_W-1:0] addr_t;

  // ALU functions (func field)
  typedef enum logic [2:0] {
    ALU_ADD = 3'd0, ALU_SUB = 3'd1, ALU_AND = 3'd2, ALU_OR  = 3'd3,
    ALU_XOR = 3'd4, ALU_MOVB = 3'd5, ALU_NOTA = 3'd6, ALU_SHR = 3'd7
  } alu_fn_e;

  // Unsigned comparisons (func field of compare operations)
  typedef enum logic [2:0] {
    CMP_EQ = 3'd0, CMP_NE = 3'd1, CMP_LT = 3'd2, CMP_LE = 3'd3,
    CMP_GT = 3'd4, CMP_GE = 3'd5, CMP_TRUE = 3'd6, CMP_FALSE = 3'd7
  } cmp_fn_e;

  // Responder-flag operations (func field of OP_PFLAG / PE_FLAG)
  typedef enum logic [2:0] {
    FL_ALL = 3'd0,      // resp <= top of mask (every active PE responds)
    FL_SAVE = 3'd1,     // acc  <= resp
    FL_RESTORE = 3'd2,  // resp <= acc
    FL_ORACC = 3'd3,    // resp <= resp | acc
    FL_CLEAR = 3'd4,    // resp <= 0
    FL_MARK = 3'd5      // top of mask <= resp
  } flag_fn_e;

  // Scalar structure-code operations (func field of OP_SCOP)
  typedef enum logic [2:0] {
    SC_FSTCD = 3'd0, SC_NXTCD = 3'd1, SC_PRVCD = 3'd2, SC_TRNCD = 3'd3,
    SC_TRNACD = 3'd4
  } sc_fn_e;

  // Network directions (func[1:0] of OP_PNET): value taken from that neighbour
  typedef enum logic [1:0] {
    DIR_WEST = 2'd0, DIR_EAST = 2'd1, DIR_NORTH = 2'd2, DIR_SOUTH = 2'd3
  } dir_e;

  // Opcodes of the instruction stream
  typedef enum logic [5:0] {
    OP_NOP    = 6'd0,  OP_HALT   = 6'd1,  OP_JMP    = 6'd2,  OP_BRANY  = 6'd3,
    OP_BRNONE = 6'd4,  OP_CMOVI  = 6'd5,  OP_CADDI  = 6'd6,  OP_CADD   = 6'd7,
    OP_CSUB   = 6'd8,  OP_RDR    = 6'd9,  OP_SCOP   = 6'd10, OP_NETCFG = 6'd11,
    OP_PLD    = 6'd16, OP_PST    = 6'd17, OP_PALU   = 6'd18, OP_PID    = 6'd19,
    OP_PCMP   = 6'd20, OP_PCMPAND= 6'd21, OP_PPUSH1 = 6'd22, OP_PPUSHR = 6'd23,
    OP_PPOP   = 6'd24, OP_PSTEP  = 6'd25, OP_PNET   = 6'd26, OP_PFLAG  = 6'd27,
    OP_MAX    = 6'd32, OP_MIN    = 6'd33, OP_PRVDEX = 6'd34, OP_NXTDEX = 6'd35,
    OP_SIBDEX = 6'd36, OP_PRVVAL = 6'd37, OP_NXTVAL = 6'd38
  } opcode_e;

  // Micro-operations broadcast to every PE over the instruction bus
  typedef enum logic [3:0] {
    PE_NOP = 4'd0,  PE_LD = 4'd1,    PE_ST = 4'd2,    PE_ALU = 4'd3,
    PE_ID = 4'd4,   PE_CMP = 4'd5,   PE_CMPAND = 4'd6, PE_PUSH1 = 4'd7,
    PE_PUSHR = 4'd8, PE_POP = 4'd9,  PE_STEP = 4'd10, PE_NET = 4'd11,
    PE_FLAG = 4'd12, PE_FALK = 4'd13
  } pe_op_e;

  typedef struct packed {
    pe_op_e            op;
    logic [RIDX_W-1:0] rd;
    logic [RIDX_W-1:0] ra;     // also selects the value each PE drives out
    logic [RIDX_W-1:0] rb;
    logic [2:0]        fn;     // alu_fn_e / cmp_fn_e / flag_fn_e; FALK: fn[0]=1 max
    logic              use_b;  // operand b is the broadcast value
    data_t             bval;   // broadcast data
    addr_t             addr;   // local memory address
    logic [2:0]        bitidx; // Falkoff bit under test
  } pe_uop_t;

  localparam pe_uop_t UOP_NOP = '{op: PE_NOP, default: '0};

  function automatic logic [31:0] enc(opcode_e op, int rd, int ra, int rb,
                                      int fn, bit bsel, bit bimm, int imm);
    logic [31:0] w;
    w = '0;
    w[31:26] = op;
    w[25:22] = rd[3:0];
    w[21:18] = ra[3:0];
    w[17:14] = rb[3:0];
    w[13:11] = fn[2:0];
    w[10]    = bsel;
    w[9]     = bimm;
    w[7:0]   = imm[7:0];
    return w;
  endfunction

endpackage
