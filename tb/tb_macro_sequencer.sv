// tb_macro_sequencer: the sequencer driving a PE array that holds the
// address-book tree (person 1000; name 1100 with children last 1110 and
// first 1120; email 1200; phone 1300 and 1400), one node per PE, with
// empty PEs in between. Checks prvdex, nxtdex, sibdex, prvval, nxtval,
// Max and Min, and the number of cycles each takes.
module tb_macro_sequencer;
  import asc_pkg::*;
  localparam int N = 12, SD = 4;
  logic clk = 0, rst_n = 0;
  logic start, busy, done, res_we, net_mesh = 0, any_resp, mask_overflow;
  opcode_e op; logic [2:0] field_reg; addr_t addr;
  data_t ref_code [SD]; data_t res_code [SD]; data_t rd_data;
  pe_uop_t seq_uop, tb_uop, uop;
  logic [N-1:0] resp_vec, active_vec;
  int checks = 0, failures = 0;
  // node codes per PE (0 = empty PE) and key values at address 4
  int codes [N] = '{1000, 0, 1100, 1110, 0, 1120, 1200, 0, 1300, 1400, 0, 0};
  int keys  [N] = '{  40, 0,   17,   99, 0,   23,    3, 0,   99,   61, 0, 0};

  macro_sequencer #(.SC_DIGITS(SD)) dut (.clk, .rst_n, .start, .op, .field_reg, .addr,
    .ref_code, .rd_data, .busy, .done, .uop(seq_uop), .res_we, .res_code);
  pe_array #(.NUM_PE(N), .MEM_DEPTH(16)) u_arr (.clk, .rst_n, .uop, .net_mesh, .any_resp,
    .rd_data, .resp_vec, .active_vec, .mask_overflow);
  assign uop = busy ? seq_uop : tb_uop;
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  function automatic int digit(int c, int d); return (c / (10 ** (SD - 1 - d))) % 10; endfunction
  task automatic issue(pe_op_e o, int rd = 0, int ra = 0, int fn = 0, int bv = 0, int a = 0);
    @(negedge clk);
    tb_uop = UOP_NOP; tb_uop.op = o; tb_uop.rd = 3'(rd); tb_uop.ra = 3'(ra); tb_uop.fn = 3'(fn);
    tb_uop.use_b = 1'b1; tb_uop.bval = data_t'(bv); tb_uop.addr = addr_t'(a);
    @(posedge clk); #1; tb_uop = UOP_NOP; #1;
  endtask
  // run one macro op; returns the cycles it was busy
  task automatic run(opcode_e o, int refc, int fr, output int cycles, output int result);
    @(negedge clk);
    op = o; field_reg = 3'(fr); addr = 8'd0; start = 1;
    for (int d = 0; d < SD; d++) ref_code[d] = data_t'(digit(refc, d));
    @(posedge clk); #1; start = 0;
    cycles = 0; result = -1;
    while (busy) begin
      @(negedge clk);
      if (done && res_we) begin result = 0; end
      @(posedge clk); #1; cycles++;
    end
    if (result == 0) for (int d = 0; d < SD; d++) result = result * 10 + int'(res_code[d]);
  endtask
  function automatic logic [N-1:0] pes_with(int c);
    logic [N-1:0] e = '0; for (int i = 0; i < N; i++) e[i] = (codes[i] == c) && (c != 0); return e;
  endfunction
  task automatic expect_op(opcode_e o, int refc, logic [N-1:0] e, int ecyc, int eres = -1);
    int cyc, res;
    run(o, refc, 0, cyc, res);
    checks++; if (resp_vec !== e) begin failures++; $display("%s %0d: resp %h exp %h", o.name(), refc, resp_vec, e); end
    checks++; if (cyc != ecyc) begin failures++; $display("%s: %0d cycles exp %0d", o.name(), cyc, ecyc); end
    if (eres >= 0) begin checks++; if (res != eres) begin failures++; $display("%s %0d: code %0d exp %0d", o.name(), refc, res, eres); end end
  endtask
  initial begin
    int cyc, res;
    start = 0; op = OP_NOP; field_reg = 0; addr = 0; tb_uop = UOP_NOP;
    foreach (ref_code[i]) ref_code[i] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    issue(PE_ID, 0);
    for (int k = 0; k < N; k++) begin
      issue(PE_PUSH1);
      issue(PE_CMP, 0, 0, CMP_EQ, k);
      for (int d = 0; d < SD; d++) begin
        issue(PE_ALU, 1, 0, ALU_MOVB, digit(codes[k], d));
        issue(PE_ST, 0, 1, 0, 0, d);
      end
      issue(PE_ALU, 1, 0, ALU_MOVB, keys[k]);
      issue(PE_ST, 0, 1, 0, 0, 4);
      issue(PE_POP);
    end
    expect_op(OP_PRVDEX, 1120, pes_with(1110), 19);
    expect_op(OP_NXTDEX, 1110, pes_with(1120), 19);
    expect_op(OP_PRVDEX, 1110, '0, 19);
    expect_op(OP_NXTDEX, 1100, pes_with(1200), 19);
    expect_op(OP_PRVDEX, 1400, pes_with(1300), 19);
    expect_op(OP_NXTDEX, 1000, '0, 19);
    expect_op(OP_SIBDEX, 1200, pes_with(1100) | pes_with(1300), 40);
    expect_op(OP_SIBDEX, 1400, pes_with(1300), 40);
    // *val leave the responders as they were before
    issue(PE_FLAG, 0, 0, FL_CLEAR);
    expect_op(OP_PRVVAL, 1300, '0, 29, 1200);
    expect_op(OP_NXTVAL, 1100, '0, 29, 1200);
    expect_op(OP_NXTVAL, 1400, '0, 29, 0);
    expect_op(OP_PRVVAL, 1120, '0, 29, 1110);
    expect_op(OP_PRVDEX, 0, '0, 18);
    // Max / Min over the key field (r2 = key), active PEs only
    issue(PE_LD, 2, 0, 0, 0, 4);
    run(OP_MAX, 0, 2, cyc, res);
    checks++; if (resp_vec !== 12'b0000_0000_1000 + 12'b0001_0000_0000) begin failures++; $display("max resp %b", resp_vec); end
    checks++; if (cyc != 9) begin failures++; $display("max cycles %0d", cyc); end
    run(OP_MIN, 0, 2, cyc, res);
    checks++; if (resp_vec !== 12'b1100_1001_0010) begin failures++; $display("min resp %b", resp_vec); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
