// tb_control_unit: the instruction stream alone, with the PE array's
// answers (any responder, read-back value) driven by the testbench. Runs a
// program of scalar arithmetic, branches on "any responder", jumps, the
// scalar structure-code operations on 1220, a read-back, a network mode
// switch and a prvval macro, and checks the common registers, the
// broadcast micro-operations, the stall during the macro and the halt.
module tb_control_unit;
  import asc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic prog_we = 0, start = 0, running, halted, sc_err, net_mesh, any_resp;
  logic [7:0] prog_addr, pc; logic [31:0] prog_wdata;
  logic [3:0] host_addr; data_t host_rdata, rd_data;
  pe_uop_t uop;
  int checks = 0, failures = 0;
  logic [31:0] prog [$];
  int n_pcmp = 0, n_seq = 0, cyc = 0, macro_cycles = 0;
  logic sc_err_seen = 0;

  control_unit dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // testbench's view of the PE array: responders exist while rd_data != 0
  assign any_resp = (rd_data != 0);
  always @(posedge clk) if (running) begin
    cyc++;
    if (uop.op == PE_CMP) begin
      n_pcmp++;
      checks++;
      if (!(uop.ra == 3'd2 && uop.fn == 3'(CMP_GT) && uop.use_b && uop.bval == 8'd90)) begin
        failures++; $display("PCMP fields wrong"); end
    end
    if (pc == 8'd21 && uop.op != PE_NOP) n_seq++;
    if (pc == 8'd21) macro_cycles++;
    if (sc_err) sc_err_seen = 1;
  end

  int cr [16];
  int cr_pre [16];
  // read all common registers through the host port
  task automatic read_cregs();
    for (int a = 0; a < 16; a++) begin host_addr = 4'(a); #1; cr[a] = int'(host_rdata); end
  endtask

  initial begin
    prog = '{
      enc(OP_CMOVI, 0, 0, 0, 0, 0, 0, 5),            // 0: c0 = 5
      enc(OP_CADDI, 1, 0, 0, 0, 0, 0, 10),           // 1: c1 = c0 + 10 = 15
      enc(OP_CADD,  2, 1, 0, 0, 0, 0, 0),            // 2: c2 = c1 + c0 = 20
      enc(OP_CSUB,  3, 2, 1, 0, 0, 0, 0),            // 3: c3 = c2 - c1 = 5
      enc(OP_BRANY, 0, 0, 0, 0, 0, 0, 6),            // 4: rd_data=0 -> not taken
      enc(OP_CADDI, 3, 3, 0, 0, 0, 0, 1),            // 5: c3 = 6
      enc(OP_BRNONE,0, 0, 0, 0, 0, 0, 8),            // 6: taken
      enc(OP_CMOVI, 3, 0, 0, 0, 0, 0, 99),           // 7: skipped
      enc(OP_PCMP,  0, 2, 0, CMP_GT, 1, 1, 90),      // 8: broadcast compare
      enc(OP_CMOVI, 4, 0, 0, 0, 0, 0, 1),            // 9: c4..c7 = 1220
      enc(OP_CMOVI, 5, 0, 0, 0, 0, 0, 2),            // 10
      enc(OP_CMOVI, 6, 0, 0, 0, 0, 0, 2),            // 11
      enc(OP_SCOP,  2, 1, 0, SC_FSTCD, 0, 0, 0),     // 12: g2 = fstcd(g1) = 1221
      enc(OP_SCOP,  3, 1, 0, SC_TRNACD, 0, 0, 0),    // 13: g3 = 1000
      enc(OP_SCOP,  1, 1, 0, SC_NXTCD, 0, 0, 0),     // 14: g1 = 1230
      enc(OP_SCOP,  3, 3, 0, SC_TRNCD, 0, 0, 0),     // 15: trncd(1000): invalid, g3 kept
      enc(OP_NETCFG,0, 0, 0, 0, 0, 0, 1),            // 16: mesh
      enc(OP_JMP,   0, 0, 0, 0, 0, 0, 19),           // 17
      enc(OP_HALT,  0, 0, 0, 0, 0, 0, 0),            // 18: skipped
      enc(OP_RDR,   0, 2, 0, 0, 0, 0, 0),            // 19: c0 = rd_data (0)
      enc(OP_CMOVI, 1, 0, 0, 0, 0, 0, 0),            // 20
      enc(OP_PRVVAL,0, 0, 1, 0, 0, 0, 0),            // 21: g0 = prvval(ref g1 = 1230)
      enc(OP_HALT,  0, 0, 0, 0, 0, 0, 0)             // 22
    };
    rd_data = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    foreach (prog[i]) begin
      @(negedge clk); prog_we = 1; prog_addr = 8'(i); prog_wdata = prog[i];
    end
    @(negedge clk); prog_we = 0; start = 1;
    @(negedge clk); start = 0;
    // rd_data returns 7 during the macro so that prvval reads 7777
    wait (pc == 8'd21); read_cregs(); cr_pre = cr; @(negedge clk); rd_data = 7;
    wait (halted); #1 rd_data = 0;
    read_cregs();
    checks++; if (cr_pre[0] != 0 || cr_pre[1] != 0 || cr_pre[2] != 20 || cr_pre[3] != 6) begin failures++; $display("scalar regs %0d %0d %0d", cr_pre[1], cr_pre[2], cr_pre[3]); end
    checks++; if (cr[8] != 1 || cr[9] != 2 || cr[10] != 2 || cr[11] != 1) begin failures++; $display("fstcd"); end
    checks++; if (cr[12] != 1 || cr[13] != 0 || cr[14] != 0 || cr[15] != 0) begin failures++; $display("trnacd"); end
    checks++; if (cr[5] != 2 || cr[6] != 3 || cr[7] != 0) begin failures++; $display("nxtcd %0d %0d %0d", cr[5], cr[6], cr[7]); end
    for (int d = 0; d < 4; d++) begin checks++; if (cr[d] != 7) begin failures++; $display("prvval digit %0d = %0d", d, cr[d]); end end
    checks++; if (!sc_err_seen) begin failures++; $display("invalid trncd not flagged"); end
    checks++; if (!net_mesh) begin failures++; $display("netcfg"); end
    checks++; if (n_pcmp != 1) begin failures++; $display("pcmp count %0d", n_pcmp); end
    checks++; if (macro_cycles != 30) begin failures++; $display("macro took %0d cycles", macro_cycles); end
    checks++; if (n_seq != 25) begin failures++; $display("macro uops %0d", n_seq); end
    checks++; if (pc != 8'd22) begin failures++; $display("halt pc %0d", pc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
