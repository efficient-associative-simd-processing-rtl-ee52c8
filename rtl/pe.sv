// pe: one associative processing element (PE) with its local memory.
//
// Each PE holds a record in its own local memory and obeys the micro-
// operation broadcast by the instruction stream (asc_pkg::pe_uop_t). It has
// eight 8-bit registers, a responder bit, a saved copy of the responder bit
// (`acc`, used to combine two searches) and a mask stack whose top bit
// enables the masked operations (load, store, ALU, id, network move,
// compare). Per the ASC processor: a compare sets both the responder bit and
// the top of the mask stack; a Step pushes 1 in the selected responder and 0
// in every other PE, and clears the selected PE's responder bit; Falkoff's
// max/min search removes, one bit at a time from the MSB, the candidates
// whose bit differs from the extreme that some candidate holds.
//
// Interface: `uop` is the broadcast instruction and `step_sel` tells this PE
// it was chosen by the responder resolution unit. The PE drives register
// uop.ra on `val_out` (used by the reduction network and the PE network),
// its responder bit and mask top, and `falk_bit`, its vote for the current
// Falkoff step; `falk_any` is the OR of all votes. Register widths, the
// register count, the memory depth and the micro-operation set are this
// design's choices.
// Timing: every micro-operation completes in one clock; the memory is
// written and read synchronously to that clock edge (reads are combinational
// into the register write).
module pe
  import asc_pkg::*;
#(
  parameter int unsigned MEM_DEPTH  = 256,
  parameter int unsigned MASK_DEPTH = 8
) (
  input  logic    clk,
  input  logic    rst_n,
  input  data_t   pe_id,
  input  pe_uop_t uop,
  input  logic    step_sel,
  input  logic    falk_any,
  input  data_t   net_in,
  output data_t   val_out,
  output logic    resp,
  output logic    active,
  output logic    falk_bit,
  output logic    mask_overflow
);
  data_t regs [NREG];
  data_t mem  [MEM_DEPTH];
  logic  acc;

  data_t   opa, opb, alu_y;
  logic    cond;
  logic    fbit;
  logic    ms_push, ms_push_bit, ms_pop, ms_wr, ms_top_bit;

  assign opa = regs[uop.ra];
  assign opb = uop.use_b ? uop.bval : regs[uop.rb];
  assign val_out = opa;
  assign fbit = opa[uop.bitidx];

  pe_alu u_alu (
    .a(opa), .b(opb), .fn(alu_fn_e'(uop.fn)), .cmp_fn(cmp_fn_e'(uop.fn)),
    .y(alu_y), .cond(cond)
  );

  // Falkoff vote: max looks for a 1 among candidates, min for a 0.
  assign falk_bit = (uop.op == PE_FALK) && resp && (uop.fn[0] ? fbit : ~fbit);

  always_comb begin
    ms_push = 1'b0; ms_push_bit = 1'b0; ms_pop = 1'b0; ms_wr = 1'b0; ms_top_bit = 1'b0;
    unique case (uop.op)
      PE_PUSH1: begin ms_push = 1'b1; ms_push_bit = 1'b1; end
      PE_PUSHR: begin ms_push = 1'b1; ms_push_bit = resp; end
      PE_POP:   ms_pop = 1'b1;
      PE_STEP:  begin ms_push = 1'b1; ms_push_bit = step_sel; end
      PE_CMP:   begin ms_wr = 1'b1; ms_top_bit = active & cond; end
      PE_FLAG:  if (flag_fn_e'(uop.fn) == FL_MARK) begin ms_wr = 1'b1; ms_top_bit = resp; end
      default: ;
    endcase
  end

  mask_stack #(.DEPTH(MASK_DEPTH)) u_mask (
    .clk, .rst_n, .push(ms_push), .push_bit(ms_push_bit), .pop(ms_pop),
    .wr_top(ms_wr), .top_bit(ms_top_bit), .top(active), .overflow(mask_overflow)
  );

  // Registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREG; i++) regs[i] <= '0;
    end else if (active) begin
      unique case (uop.op)
        PE_LD:  regs[uop.rd] <= mem[uop.addr[$clog2(MEM_DEPTH)-1:0]];
        PE_ALU: regs[uop.rd] <= alu_y;
        PE_ID:  regs[uop.rd] <= pe_id;
        PE_NET: regs[uop.rd] <= net_in;
        default: ;
      endcase
    end
  end

  // Local memory (no reset: every location is written before it is read)
  always_ff @(posedge clk) begin
    if (active && uop.op == PE_ST) mem[uop.addr[$clog2(MEM_DEPTH)-1:0]] <= opa;
  end

  // Responder bit and its saved copy
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      resp <= 1'b0;
      acc  <= 1'b0;
    end else begin
      unique case (uop.op)
        PE_CMP:    resp <= active & cond;
        PE_CMPAND: resp <= resp & active & cond;
        PE_STEP:   if (step_sel) resp <= 1'b0;
        PE_FALK:   if (falk_any && resp && ((uop.fn[0] ? fbit : ~fbit) == 1'b0)) resp <= 1'b0;
        PE_FLAG: begin
          unique case (flag_fn_e'(uop.fn))
            FL_ALL:     resp <= active;
            FL_SAVE:    acc  <= resp;
            FL_RESTORE: resp <= acc;
            FL_ORACC:   resp <= resp | acc;
            FL_CLEAR:   resp <= 1'b0;
            default: ;
          endcase
        end
        default: ;
      endcase
    end
  end

  // A Step may only select a responder.
  a_step_sel_resp: assert property (@(posedge clk) disable iff (!rst_n)
    (uop.op == PE_STEP && step_sel) |-> resp);
endmodule
