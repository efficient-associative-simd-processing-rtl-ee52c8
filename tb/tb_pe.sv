// tb_pe: one processing element driven micro-operation by micro-operation:
// register moves, store/load to local memory, id, network input, compare
// (sets responder and mask top), masking of inactive PEs, push/pop, Step,
// Falkoff steps with the feedback driven by the testbench, and flag ops.
module tb_pe;
  import asc_pkg::*;
  logic clk = 0, rst_n = 0;
  data_t pe_id = 8'd23, net_in, val_out;
  pe_uop_t uop; logic step_sel, falk_any, resp, active, falk_bit, mask_overflow;
  int checks = 0, failures = 0;
  pe #(.MEM_DEPTH(64), .MASK_DEPTH(4)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic issue(pe_op_e op, int rd = 0, int ra = 0, int fn = 0, int bv = 0, int addr = 0, int bidx = 0);
    @(negedge clk);
    uop = UOP_NOP; uop.op = op; uop.rd = 3'(rd); uop.ra = 3'(ra); uop.fn = 3'(fn);
    uop.use_b = 1'b1; uop.bval = data_t'(bv); uop.addr = addr_t'(addr); uop.bitidx = 3'(bidx);
    @(posedge clk); #1;
    uop = UOP_NOP; #1;
  endtask
  task automatic expect_reg(int r, int v, string what);
    @(negedge clk); uop = UOP_NOP; uop.ra = 3'(r); #1;
    checks++; if (int'(val_out) != v) begin failures++; $display("%s: r%0d=%0d exp %0d", what, r, val_out, v); end
  endtask
  task automatic expect_flags(bit er, bit ea, string what);
    checks++; if (resp != er || active != ea) begin failures++; $display("%s: resp=%0d active=%0d exp %0d %0d", what, resp, active, er, ea); end
  endtask

  initial begin
    uop = UOP_NOP; step_sel = 0; falk_any = 0; net_in = 8'h5a;
    repeat (2) @(posedge clk); rst_n = 1;
    issue(PE_ALU, 1, 0, ALU_MOVB, 95);            expect_reg(1, 95, "movb");
    issue(PE_ST, 0, 1, 0, 0, 10);
    issue(PE_ALU, 2, 1, ALU_ADD, 10);             expect_reg(2, 105, "add");
    issue(PE_LD, 3, 0, 0, 0, 10);                 expect_reg(3, 95, "load");
    issue(PE_ID, 4);                              expect_reg(4, 23, "id");
    issue(PE_NET, 5);                             expect_reg(5, 8'h5a, "net");
    issue(PE_CMP, 0, 3, CMP_GT, 90);              expect_flags(1, 1, "cmp gt 90");
    issue(PE_CMP, 0, 3, CMP_GT, 100);             expect_flags(0, 0, "cmp gt 100");
    issue(PE_ALU, 1, 0, ALU_MOVB, 7);             expect_reg(1, 95, "masked off");
    issue(PE_PUSH1);                              expect_flags(0, 1, "push1");
    issue(PE_ALU, 1, 0, ALU_MOVB, 7);             expect_reg(1, 7, "active again");
    issue(PE_POP);                                expect_flags(0, 0, "pop");
    issue(PE_POP);                                expect_flags(0, 1, "pop to reset level");
    issue(PE_FLAG, 0, 0, FL_ALL);                 expect_flags(1, 1, "flag all");
    step_sel = 1; issue(PE_STEP); step_sel = 0;   expect_flags(0, 1, "step selected");
    issue(PE_FLAG, 0, 0, FL_ALL);
    issue(PE_STEP);                               expect_flags(1, 0, "step not selected");
    issue(PE_POP);
    // Falkoff: r3 = 95 = 0101_1111. Max step on bit 7 with some other PE
    // holding a 1 there: this PE drops out.
    issue(PE_FLAG, 0, 0, FL_ALL);
    @(negedge clk); uop = UOP_NOP; uop.op = PE_FALK; uop.ra = 3; uop.fn = 1; uop.bitidx = 6; #1;
    checks++; if (falk_bit != 1) begin failures++; $display("falk vote bit6"); end
    falk_any = 1; @(posedge clk); #1; expect_flags(1, 1, "falk keep");
    @(negedge clk); uop.op = PE_FALK; uop.ra = 3; uop.fn = 1; uop.bitidx = 7; #1;
    checks++; if (falk_bit != 0) begin failures++; $display("falk vote bit7"); end
    @(posedge clk); #1; expect_flags(0, 1, "falk drop");
    // Min step: bit 5 is 0, no other zero needed -> stays
    issue(PE_FLAG, 0, 0, FL_ALL);
    @(negedge clk); uop.op = PE_FALK; uop.ra = 3; uop.fn = 0; uop.bitidx = 0; falk_any = 1;
    @(posedge clk); #1; expect_flags(0, 1, "min drops a 1");
    falk_any = 0;
    issue(PE_FLAG, 0, 0, FL_ALL);
    issue(PE_FLAG, 0, 0, FL_SAVE);
    issue(PE_FLAG, 0, 0, FL_CLEAR);               expect_flags(0, 1, "clear");
    issue(PE_FLAG, 0, 0, FL_ORACC);               expect_flags(1, 1, "oracc");
    issue(PE_FLAG, 0, 0, FL_CLEAR);
    issue(PE_FLAG, 0, 0, FL_RESTORE);             expect_flags(1, 1, "restore");
    issue(PE_CMPAND, 0, 3, CMP_EQ, 94);           expect_flags(0, 1, "cmpand");
    issue(PE_FLAG, 0, 0, FL_MARK);                expect_flags(0, 0, "mark");
    issue(PE_POP);
    for (int i = 0; i < 4; i++) issue(PE_PUSH1);
    checks++; if (mask_overflow != 0) begin failures++; $display("early overflow"); end
    @(negedge clk); uop = UOP_NOP; uop.op = PE_PUSH1; #1;
    checks++; if (mask_overflow != 1) begin failures++; $display("no overflow"); end
    @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
