// macro_sequencer: expands the multi-cycle associative operations of the
// instruction stream into PE micro-operations, one per clock.
//
// Max/Min (Falkoff's algorithm): every active PE becomes a candidate; then,
// for each bit of the field from the MSB down, if some candidate holds a 1
// (max) or a 0 (min) in that bit, the candidates that do not are dropped.
// After DATA_W steps the responders are the PEs holding the extreme value,
// in a time that does not depend on the number of PEs. 1 + 8 cycles.
//
// Structure-code operations on codes stored SC_DIGITS bytes from local
// address `addr` in every PE, against the reference code `ref_code` of
// level L (leading non-zero digits):
//   1. candidates = active PEs whose code equals the reference in digits
//      0..L-2, holds a non-zero digit L-1 smaller (prv) or larger (nxt) than
//      the reference's, and zeros beyond: the other children of the same
//      parent on the chosen side;
//   2. Falkoff max (prv) or min (nxt) over digit L-1, the only digit in
//      which candidates differ;
//   3. the single survivor is left as the responder.
// prvdex / nxtdex mark the previous / next sibling; sibdex does both passes
// and ORs them; prvval / nxtval also read the survivor's code back through
// the reduction network into `res_code` (zeros when there is none) and then
// restore the responder bits they found. PE register 7 is scratch. An
// empty reference (L = 0) finds nothing.
// Cycle counts with SC_DIGITS = 4: prvdex/nxtdex 19 (18 for an empty reference), sibdex 40, prv/nxtval
// 29. The operations and the three steps follow the ASC processor; the
// same-parent condition in step 1 and the micro-operation order are this
// design's reading of them.
//
// Interface: pulse `start` with `op` and operands while idle; `busy` is high
// while `uop` carries the sequence; `done` marks its last micro-operation,
// and in that cycle `res_we` writes `res_code` for the *val operations.
module macro_sequencer
  import asc_pkg::*;
#(
  parameter int unsigned SC_DIGITS = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  opcode_e           op,
  input  logic [RIDX_W-1:0] field_reg,
  input  addr_t             addr,
  input  data_t             ref_code [SC_DIGITS],
  input  data_t             rd_data,
  output logic              busy,
  output logic              done,
  output pe_uop_t           uop,
  output logic              res_we,
  output data_t             res_code [SC_DIGITS]
);
  localparam int unsigned DW = $clog2(SC_DIGITS + 1);

  typedef enum logic [3:0] {
    S_IDLE, S_SAVE, S_MMINIT, S_INIT, S_LD, S_CMP, S_NZ, S_FLD, S_FALK,
    S_SIBSAVE, S_SIBOR, S_RLD, S_RCAP, S_REST
  } state_e;

  state_e            st;
  opcode_e           cur_op;
  logic [RIDX_W-1:0] freg;
  addr_t             base;
  data_t             refc [SC_DIGITS];
  logic [DW-1:0]     lvl;
  logic [DW-1:0]     d;
  logic [2:0]        b;
  logic              pass;

  // Level of the incoming reference code
  logic [DW-1:0] in_lvl;
  always_comb begin
    logic run;
    run = 1'b1;
    in_lvl = '0;
    for (int i = 0; i < SC_DIGITS; i++) begin
      run = run && (ref_code[i] != '0);
      if (run) in_lvl = DW'(i + 1);
    end
  end

  logic is_mm, is_prv, last_digit, at_level;
  assign is_mm      = (cur_op == OP_MAX) || (cur_op == OP_MIN);
  assign is_prv     = (cur_op == OP_PRVDEX) || (cur_op == OP_PRVVAL) ||
                      ((cur_op == OP_SIBDEX) && !pass);
  assign last_digit = (d == DW'(SC_DIGITS - 1));
  assign at_level   = (d == lvl - DW'(1));

  // Micro-operation of the current state
  always_comb begin
    uop    = UOP_NOP;
    done   = 1'b0;
    res_we = 1'b0;
    unique case (st)
      S_SAVE, S_SIBSAVE: begin uop.op = PE_FLAG; uop.fn = 3'(FL_SAVE); end
      S_MMINIT, S_INIT:  begin uop.op = PE_FLAG; uop.fn = 3'(FL_ALL); end
      S_LD, S_RLD: begin
        uop.op = PE_LD; uop.rd = RIDX_W'(SCRATCH); uop.addr = base + addr_t'(d);
      end
      S_CMP: begin
        uop.op = PE_CMPAND; uop.ra = RIDX_W'(SCRATCH); uop.use_b = 1'b1;
        uop.bval = refc[d];
        if (lvl == '0)    uop.fn = 3'(CMP_FALSE);
        else if (at_level) uop.fn = is_prv ? 3'(CMP_LT) : 3'(CMP_GT);
        else               uop.fn = 3'(CMP_EQ);
      end
      S_NZ: begin
        uop.op = PE_CMPAND; uop.ra = RIDX_W'(SCRATCH); uop.use_b = 1'b1;
        uop.bval = '0; uop.fn = 3'(CMP_NE);
      end
      S_FLD: begin
        uop.op = PE_LD; uop.rd = RIDX_W'(SCRATCH);
        uop.addr = base + ((lvl == '0) ? addr_t'(0) : addr_t'(lvl) - addr_t'(1));
      end
      S_FALK: begin
        uop.op = PE_FALK; uop.ra = is_mm ? freg : RIDX_W'(SCRATCH);
        uop.bitidx = b;
        uop.fn = {2'b00, (cur_op == OP_MAX) || (!is_mm && is_prv)};
        done = (b == 3'd0) && (is_mm || cur_op == OP_PRVDEX || cur_op == OP_NXTDEX);
      end
      S_SIBOR: begin uop.op = PE_FLAG; uop.fn = 3'(FL_ORACC); done = 1'b1; end
      S_RCAP:  begin uop.op = PE_NOP; uop.ra = RIDX_W'(SCRATCH); end
      S_REST: begin
        uop.op = PE_FLAG; uop.fn = 3'(FL_RESTORE); done = 1'b1; res_we = 1'b1;
      end
      default: ;
    endcase
  end

  assign busy = (st != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; cur_op <= OP_NOP; freg <= '0; base <= '0; lvl <= '0;
      d <= '0; b <= '0; pass <= 1'b0;
      for (int i = 0; i < SC_DIGITS; i++) begin refc[i] <= '0; res_code[i] <= '0; end
    end else begin
      unique case (st)
        S_IDLE: if (start) begin
          cur_op <= op; freg <= field_reg; base <= addr; refc <= ref_code;
          lvl <= in_lvl; d <= '0; b <= 3'd7; pass <= 1'b0;
          for (int i = 0; i < SC_DIGITS; i++) res_code[i] <= '0;
          if (op == OP_MAX || op == OP_MIN)            st <= S_MMINIT;
          else if (op == OP_PRVVAL || op == OP_NXTVAL) st <= S_SAVE;
          else                                          st <= S_INIT;
        end
        S_SAVE:   st <= S_INIT;
        S_MMINIT: begin b <= 3'd7; st <= S_FALK; end
        S_INIT:   begin d <= '0; st <= S_LD; end
        S_LD:     st <= S_CMP;
        S_CMP: begin
          if (at_level && lvl != '0) st <= S_NZ;
          else if (last_digit)       st <= S_FLD;
          else begin d <= d + DW'(1); st <= S_LD; end
        end
        S_NZ: begin
          if (last_digit) st <= S_FLD;
          else begin d <= d + DW'(1); st <= S_LD; end
        end
        S_FLD: begin b <= 3'd7; st <= S_FALK; end
        S_FALK: begin
          if (b != 3'd0) b <= b - 3'd1;
          else if (is_mm || cur_op == OP_PRVDEX || cur_op == OP_NXTDEX) st <= S_IDLE;
          else if (cur_op == OP_SIBDEX) st <= pass ? S_SIBOR : S_SIBSAVE;
          else begin d <= '0; st <= S_RLD; end
        end
        S_SIBSAVE: begin pass <= 1'b1; st <= S_INIT; end
        S_SIBOR:   st <= S_IDLE;
        S_RLD:     st <= S_RCAP;
        S_RCAP: begin
          res_code[d] <= rd_data;
          if (last_digit) st <= S_REST;
          else begin d <= d + DW'(1); st <= S_RLD; end
        end
        S_REST: st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

  a_no_start_busy: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);
endmodule
