// tb_xml_lookup: the address-book lookup on the full-size processor.
//
// The parse tree of one address-book record (person; name with children
// last and first; email; two phone numbers) is stored one node per PE, in
// scattered PEs, as a structure code (digits at addresses 0..3) and the
// first character of the node's value (address 4). The program finds the
// e-mail of the person whose last name starts with 'W' in a fixed number
// of steps: an associative search for the value, read-back of the
// responder's structure code, trncd to get its parent, and nxtdex to mark
// the parent's right sibling, whose value and PE are then read back.
module tb_xml_lookup;
  import asc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic prog_we = 0, start = 0, running, halted, any_resp, mask_overflow, sc_err, net_mesh;
  logic [7:0] prog_addr, pc; logic [31:0] prog_wdata;
  logic [3:0] host_addr; logic [7:0] host_rdata;
  logic [35:0] resp_vec, active_vec;
  pe_uop_t uop;
  int checks = 0, failures = 0;
  logic [31:0] prog [$];
  int cr [16];
  int cycles = 0, search_pc, done_pc, lookup_cycles = 0;

  asc_top dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  always @(posedge clk) if (running && int'(pc) >= search_pc && int'(pc) < done_pc) lookup_cycles++;

  task automatic p(logic [31:0] w); prog.push_back(w); endtask
  task automatic put(int a, int v); p(enc(OP_PALU,1,0,0,ALU_MOVB,1,1,v)); p(enc(OP_PST,0,1,0,0,0,0,a)); endtask

  //                     person name  last  first email ph-1  ph-2
  int pe_of [7]  = '{     3,    8,   12,   17,   21,   30,   35};
  int code  [7]  = '{  1000, 1100, 1110, 1120, 1200, 1300, 1400};
  int value [7]  = '{     0,    0,   87,   74,  106,   49,   49};  // 'W' 'J' 'j' '1' '1'

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    p(enc(OP_PID, 0, 0, 0, 0, 0, 0, 0));
    for (int a = 0; a < 5; a++) put(a, 0);
    for (int n = 0; n < 7; n++) begin
      p(enc(OP_PPUSH1, 0, 0, 0, 0, 0, 0, 0));
      p(enc(OP_PCMP, 0, 0, 0, CMP_EQ, 1, 1, pe_of[n]));
      for (int d = 0; d < 4; d++) if ((code[n] / (10 ** (3-d))) % 10 != 0) put(d, (code[n] / (10 ** (3-d))) % 10);
      put(4, value[n]);
      p(enc(OP_PPOP, 0, 0, 0, 0, 0, 0, 0));
    end
    p(enc(OP_PLD, 4, 0, 0, 0, 0, 0, 4));                       // r4 = value
    search_pc = prog.size();
    p(enc(OP_PPUSH1, 0, 0, 0, 0, 0, 0, 0));
    p(enc(OP_PCMP, 0, 4, 0, CMP_EQ, 1, 1, 87));                // last = "W..."
    for (int d = 0; d < 4; d++) begin                          // g1 = its code
      p(enc(OP_PLD, 5, 0, 0, 0, 0, 0, d));
      p(enc(OP_RDR, 4 + d, 5, 0, 0, 0, 0, 0));
    end
    p(enc(OP_PPOP, 0, 0, 0, 0, 0, 0, 0));
    p(enc(OP_SCOP, 2, 1, 0, SC_TRNCD, 0, 0, 0));               // g2 = parent (name)
    p(enc(OP_NXTDEX, 0, 0, 2, 0, 0, 0, 0));                    // mark right sibling (email)
    p(enc(OP_RDR, 0, 4, 0, 0, 0, 0, 0));                       // c0 = its value
    p(enc(OP_RDR, 1, 0, 0, 0, 0, 0, 0));                       // c1 = its PE
    done_pc = prog.size();
    p(enc(OP_HALT, 0, 0, 0, 0, 0, 0, 0));
    foreach (prog[i]) begin @(negedge clk); prog_we = 1; prog_addr = 8'(i); prog_wdata = prog[i]; end
    @(negedge clk); prog_we = 0; start = 1;
    @(negedge clk); start = 0;
    wait (halted);
    @(negedge clk);
    for (int a = 0; a < 16; a++) begin host_addr = 4'(a); #1; cr[a] = int'(host_rdata); end
    checks++; if (cr[0] != 106) begin failures++; $display("email value %0d", cr[0]); end
    checks++; if (cr[1] != 21)  begin failures++; $display("email PE %0d", cr[1]); end
    checks++; if (cr[4] != 1 || cr[5] != 1 || cr[6] != 1 || cr[7] != 0) begin failures++; $display("last code"); end
    checks++; if (cr[8] != 1 || cr[9] != 1 || cr[10] != 0) begin failures++; $display("parent code"); end
    checks++; if (resp_vec != (36'd1 << 21)) begin failures++; $display("responders %h", resp_vec); end
    // search 2 + 8 read-back + pop + trncd + (1 + 19) nxtdex + 2 reads = 34 cycles
    checks++; if (lookup_cycles != 34) begin failures++; $display("lookup took %0d cycles", lookup_cycles); end
    $display("lookup cycles=%0d", lookup_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
