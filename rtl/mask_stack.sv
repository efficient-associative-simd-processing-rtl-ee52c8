// mask_stack: the per-PE stack of mask bits.
//
// The top bit decides whether the PE obeys masked instructions. A push shifts
// every bit down one place and puts the new bit on top; a pop shifts up and
// refills the bottom with 1. A write replaces only the top bit, which is how
// an associative compare sets the mask. Push, pop and write are mutually
// exclusive; if several are asserted push wins, then pop, then write.
// The stack is a shift register, so a push on a full stack loses the bottom
// bit (reported on `overflow` for that cycle). Reset fills the stack with 1
// so that every PE listens. Depth, reset value and overflow handling are this
// design's choices; the stack itself and its use follow the ASC processor.
// Timing: one operation per clock; `top` shows the new value the next cycle.
module mask_stack #(
  parameter int unsigned DEPTH = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic push,
  input  logic push_bit,
  input  logic pop,
  input  logic wr_top,
  input  logic top_bit,
  output logic top,
  output logic overflow
);
  logic [DEPTH-1:0] stk;   // stk[0] is the top
  logic [DEPTH-1:0] zeros_above; // bottom bits that have been pushed past

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stk <= '1;
      zeros_above <= '0;
    end else if (push) begin
      stk <= {stk[DEPTH-2:0], push_bit};
      zeros_above <= {zeros_above[DEPTH-2:0], 1'b1};
    end else if (pop) begin
      stk <= {1'b1, stk[DEPTH-1:1]};
      zeros_above <= {1'b0, zeros_above[DEPTH-1:1]};
    end else if (wr_top) begin
      stk[0] <= top_bit;
    end
  end

  assign top = stk[0];
  // Pushing when every level is already in use drops the bottom entry.
  assign overflow = push && zeros_above[DEPTH-1];
endmodule
