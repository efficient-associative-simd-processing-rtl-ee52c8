// tb_asc_top: the whole processor at its default size (36 PEs), running
// two programs written through the host port.
//
// Program 1, the student table: clears every PE's record, loads twelve
// (id, grade) records into PEs 0..11, then counts the students with a grade
// above 90 with a search, a Step loop and a scalar add; the Step order must
// be PE1 then PE4, with PE4 still a responder after the first Step. Then
// Max and Min of the grade over the twelve records and the id of each.
// Program 2, a tree of six nodes (keys 10, 5, 11, 3, 8, 15 with codes 1000,
// 1100, 1200, 1110, 1120, 1210) in PEs 0..5: prvdex, a scalar trncd
// followed by nxtdex, sibdex, nxtval, fstcd, and network moves in mesh
// and linear mode, each result read back through the reduction network.
// Every mechanism is counted and must have happened.
module tb_asc_top;
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
  // mechanism counters
  int n_search = 0, n_step = 0, n_falk_max = 0, n_falk_min = 0, n_sc_par = 0, n_stall = 0,
      n_net_mesh = 0, n_net_lin = 0, n_branch = 0, n_rdr = 0;
  int step_no = 0;
  logic [7:0] last_pc;

  asc_top dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---- monitors ----
  always @(posedge clk) if (running) begin
    if (uop.op == PE_CMP) n_search++;
    if (uop.op == PE_FALK && uop.fn[0]) n_falk_max++;
    if (uop.op == PE_FALK && !uop.fn[0]) n_falk_min++;
    if (uop.op == PE_CMPAND) n_sc_par++;
    if (uop.op == PE_NET) begin if (net_mesh) n_net_mesh++; else n_net_lin++; end
    if (pc == last_pc && !halted) n_stall++;
    if (pc != last_pc && pc != last_pc + 8'd1) n_branch++;
    last_pc <= pc;
  end
  // Step order of the student table: after step 1 only PE1 is enabled and
  // PE4 still responds; after step 2 only PE4 is enabled and nobody responds.
  always @(posedge clk) if (running && uop.op == PE_STEP) begin
    n_step++;
    step_no++;
    #1;
    checks++;
    if (step_no == 1 && !(active_vec == 36'h2 && resp_vec == 36'h10)) begin failures++; $display("step 1: active %h resp %h", active_vec, resp_vec); end
    if (step_no == 2 && !(active_vec == 36'h10 && resp_vec == 36'h0)) begin failures++; $display("step 2: active %h resp %h", active_vec, resp_vec); end
  end

  task automatic p(logic [31:0] w); prog.push_back(w); endtask
  // select PE k (push a scope, compare id in r0)
  task automatic sel(int k); p(enc(OP_PPUSH1,0,0,0,0,0,0,0)); p(enc(OP_PCMP,0,0,0,CMP_EQ,1,1,k)); endtask
  task automatic put(int a, int v); p(enc(OP_PALU,1,0,0,ALU_MOVB,1,1,v)); p(enc(OP_PST,0,1,0,0,0,0,a)); endtask
  task automatic rdr(int c, int r); p(enc(OP_RDR,c,r,0,0,0,0,0)); n_rdr++; endtask
  task automatic cset(int g, int code);
    for (int d = 0; d < 4; d++) p(enc(OP_CMOVI, g*4+d, 0, 0, 0, 0, 0, (code / (10 ** (3-d))) % 10));
  endtask

  task automatic run_program();
    if (prog.size() > 256) begin failures++; $display("program too long: %0d", prog.size()); end
    foreach (prog[i]) begin @(negedge clk); prog_we = 1; prog_addr = 8'(i); prog_wdata = prog[i]; end
    @(negedge clk); prog_we = 0; start = 1;
    @(negedge clk); start = 0;
    wait (halted);
    @(negedge clk);
    for (int a = 0; a < 16; a++) begin host_addr = 4'(a); #1; cr[a] = int'(host_rdata); end
    prog.delete();
  endtask
  task automatic expect_c(int a, int v, string what);
    checks++; if (cr[a] != v) begin failures++; $display("%s: c%0d = %0d, expected %0d", what, a, cr[a], v); end
  endtask

  int ids    [12] = '{7, 5, 11, 4, 2, 1, 6, 13, 9, 10, 3, 8};
  int grades [12] = '{66, 95, 87, 78, 100, 84, 64, 88, 75, 83, 83, 26};
  int tcode  [6]  = '{1000, 1100, 1200, 1110, 1120, 1210};
  int tkey   [6]  = '{10, 5, 11, 3, 8, 15};

  initial begin
    int loop_pc, end_pc;
    repeat (2) @(posedge clk); rst_n = 1;
    last_pc = 0;
    // ---------------- program 1: student table ----------------
    p(enc(OP_PID, 0, 0, 0, 0, 0, 0, 0));                        // r0 = PE id
    for (int a = 0; a < 10; a++) put(a, 0);                     // clear records
    for (int k = 0; k < 12; k++) begin
      sel(k); put(8, ids[k]); put(9, grades[k]); p(enc(OP_PPOP,0,0,0,0,0,0,0));
    end
    p(enc(OP_CMOVI, 0, 0, 0, 0, 0, 0, 0));                      // count = 0
    p(enc(OP_PPUSH1, 0, 0, 0, 0, 0, 0, 0));                     // setscope all
    p(enc(OP_PLD, 2, 0, 0, 0, 0, 0, 9));                        // r2 = grade
    p(enc(OP_PCMP, 0, 2, 0, CMP_GT, 1, 1, 90));                 // for xx in grade > 90
    loop_pc = prog.size();
    end_pc  = loop_pc + 5;
    p(enc(OP_BRNONE, 0, 0, 0, 0, 0, 0, end_pc));
    p(enc(OP_PSTEP, 0, 0, 0, 0, 0, 0, 0));
    p(enc(OP_CADDI, 0, 0, 0, 0, 0, 0, 1));                      //   count = count + 1
    p(enc(OP_PPOP, 0, 0, 0, 0, 0, 0, 0));
    p(enc(OP_JMP, 0, 0, 0, 0, 0, 0, loop_pc));                  // endfor
    p(enc(OP_PPOP, 0, 0, 0, 0, 0, 0, 0));                       // endscope
    p(enc(OP_PPUSH1, 0, 0, 0, 0, 0, 0, 0));
    p(enc(OP_PCMP, 0, 0, 0, CMP_LT, 1, 1, 12));                 // scope: the 12 records
    p(enc(OP_MAX, 0, 2, 0, 0, 0, 0, 0)); rdr(1, 2); rdr(2, 0);  // highest grade and its PE
    p(enc(OP_PLD, 3, 0, 0, 0, 0, 0, 8)); rdr(5, 3);             // its student id
    p(enc(OP_MIN, 0, 2, 0, 0, 0, 0, 0)); rdr(3, 2); rdr(4, 0);
    p(enc(OP_PPOP, 0, 0, 0, 0, 0, 0, 0));
    p(enc(OP_HALT, 0, 0, 0, 0, 0, 0, 0));
    run_program();
    expect_c(0, 2, "count grade > 90");
    expect_c(1, 100, "max grade"); expect_c(2, 4, "max PE"); expect_c(5, 2, "max student id");
    expect_c(3, 26, "min grade"); expect_c(4, 11, "min PE");
    checks++; if (step_no != 2) begin failures++; $display("steps %0d", step_no); end

    // ---------------- program 2: structure codes ----------------
    for (int k = 0; k < 6; k++) begin
      sel(k);
      for (int d = 0; d < 4; d++) if ((tcode[k] / (10 ** (3-d))) % 10 != 0) put(d, (tcode[k] / (10 ** (3-d))) % 10);
      put(4, tkey[k]);
      p(enc(OP_PPOP, 0, 0, 0, 0, 0, 0, 0));
    end
    p(enc(OP_PLD, 4, 0, 0, 0, 0, 0, 4));                        // r4 = key
    cset(1, 1120);
    p(enc(OP_PRVDEX, 0, 0, 1, 0, 0, 0, 0)); rdr(0, 4);          // left sibling of 1120: key 3
    p(enc(OP_SCOP, 2, 1, 0, SC_TRNCD, 0, 0, 0));                // g2 = parent(1120) = 1100
    p(enc(OP_NXTDEX, 0, 0, 2, 0, 0, 0, 0)); rdr(1, 4);          // right sibling of 1100: key 11
    cset(1, 1110);
    p(enc(OP_SIBDEX, 0, 0, 1, 0, 0, 0, 0)); rdr(2, 4);          // siblings of 1110: key 8
    p(enc(OP_NXTVAL, 3, 0, 1, 0, 0, 0, 0));                     // g3 = code after 1110 = 1120
    cset(1, 1200);
    p(enc(OP_SCOP, 1, 1, 0, SC_FSTCD, 0, 0, 0));                // g1 = 1210
    p(enc(OP_PPUSH1, 0, 0, 0, 0, 0, 0, 0));
    p(enc(OP_NETCFG, 0, 0, 0, 0, 0, 0, 1));
    p(enc(OP_PNET, 6, 0, 0, DIR_NORTH, 0, 0, 0));               // r6 = id of the PE above
    p(enc(OP_PCMP, 0, 6, 0, CMP_EQ, 1, 1, 3)); rdr(3, 0);       // PE 9 holds 3
    p(enc(OP_PPOP, 0, 0, 0, 0, 0, 0, 0));
    p(enc(OP_PPUSH1, 0, 0, 0, 0, 0, 0, 0));
    p(enc(OP_NETCFG, 0, 0, 0, 0, 0, 0, 0));
    p(enc(OP_PNET, 6, 0, 0, DIR_WEST, 0, 0, 0));                // r6 = id of the PE to the left
    p(enc(OP_PCMP, 0, 6, 0, CMP_EQ, 1, 1, 3)); rdr(8, 0);       // PE 4 holds 3
    p(enc(OP_PPOP, 0, 0, 0, 0, 0, 0, 0));
    p(enc(OP_HALT, 0, 0, 0, 0, 0, 0, 0));
    run_program();
    expect_c(0, 3, "prvdex 1120");
    expect_c(1, 11, "trncd + nxtdex");
    expect_c(2, 8, "sibdex 1110");
    expect_c(12, 1, "nxtval d0"); expect_c(13, 1, "nxtval d1"); expect_c(14, 2, "nxtval d2"); expect_c(15, 0, "nxtval d3");
    expect_c(4, 1, "fstcd d0"); expect_c(5, 2, "fstcd d1"); expect_c(6, 1, "fstcd d2"); expect_c(7, 0, "fstcd d3");
    expect_c(3, 9, "mesh north"); expect_c(8, 4, "linear west");

    $display("mechanisms: search=%0d step=%0d falkoff-max=%0d falkoff-min=%0d sc-compare=%0d stall=%0d mesh=%0d linear=%0d branch=%0d readback=%0d",
             n_search, n_step, n_falk_max, n_falk_min, n_sc_par, n_stall, n_net_mesh, n_net_lin, n_branch, n_rdr);
    checks++; if (n_search == 0)   begin failures++; $display("no search"); end
    checks++; if (n_step == 0)     begin failures++; $display("no step"); end
    checks++; if (n_falk_max == 0) begin failures++; $display("no max"); end
    checks++; if (n_falk_min == 0) begin failures++; $display("no min"); end
    checks++; if (n_sc_par == 0)   begin failures++; $display("no structure-code search"); end
    checks++; if (n_stall == 0)    begin failures++; $display("no macro stall"); end
    checks++; if (n_net_mesh == 0) begin failures++; $display("no mesh move"); end
    checks++; if (n_net_lin == 0)  begin failures++; $display("no linear move"); end
    checks++; if (n_branch == 0)   begin failures++; $display("no branch"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
