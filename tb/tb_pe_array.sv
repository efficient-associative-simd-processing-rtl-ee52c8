// tb_pe_array: the 36-PE array driven by hand-built micro-operations.
// Loads a random byte into every PE (one PE at a time, selected by an
// associative compare on its id), then checks: a compare against a
// broadcast key, Falkoff max and min, reading the chosen responder's value
// back, Step order (lowest PE first), and network moves in linear and
// mesh mode.
module tb_pe_array;
  import asc_pkg::*;
  localparam int N = 36;
  logic clk = 0, rst_n = 0;
  pe_uop_t uop; logic net_mesh, any_resp, mask_overflow; data_t rd_data;
  logic [N-1:0] resp_vec, active_vec;
  int checks = 0, failures = 0;
  int v [N];
  pe_array #(.NUM_PE(N), .MEM_DEPTH(16)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic issue(pe_op_e op, int rd = 0, int ra = 0, int fn = 0, int bv = 0, int addr = 0, int bidx = 0);
    @(negedge clk);
    uop = UOP_NOP; uop.op = op; uop.rd = 3'(rd); uop.ra = 3'(ra); uop.fn = 3'(fn);
    uop.use_b = 1'b1; uop.bval = data_t'(bv); uop.addr = addr_t'(addr); uop.bitidx = 3'(bidx);
    @(posedge clk); #1;
    uop = UOP_NOP; uop.ra = 3'(ra); #1;
  endtask
  task automatic expect_resp(logic [N-1:0] e, string what);
    checks++; if (resp_vec !== e) begin failures++; $display("%s: resp %h exp %h", what, resp_vec, e); end
  endtask
  initial begin
    int mx, mn, key;
    logic [N-1:0] e;
    uop = UOP_NOP; net_mesh = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    issue(PE_ID, 0);
    for (int k = 0; k < N; k++) begin
      v[k] = $urandom_range(0, 255);
      issue(PE_PUSH1);
      issue(PE_CMP, 0, 0, CMP_EQ, k);
      issue(PE_ALU, 1, 0, ALU_MOVB, v[k]);
      issue(PE_ST, 0, 1, 0, 0, 5);
      issue(PE_POP);
    end
    checks++; if (active_vec !== '1) begin failures++; $display("mask not restored"); end
    issue(PE_LD, 2, 0, 0, 0, 5);
    // associative search
    key = v[7];
    issue(PE_CMP, 0, 2, CMP_GE, key);
    e = '0; for (int i = 0; i < N; i++) e[i] = v[i] >= key;
    expect_resp(e, "search >=");
    checks++; if (active_vec !== e) begin failures++; $display("mask top after search"); end
    issue(PE_POP);
    // Falkoff max and min
    for (int m = 1; m >= 0; m--) begin
      mx = 0; mn = 255; for (int i = 0; i < N; i++) begin if (v[i] > mx) mx = v[i]; if (v[i] < mn) mn = v[i]; end
      issue(PE_FLAG, 0, 0, FL_ALL);
      for (int b = 7; b >= 0; b--) issue(PE_FALK, 0, 2, m, 0, 0, b);
      e = '0; for (int i = 0; i < N; i++) e[i] = (v[i] == (m ? mx : mn));
      expect_resp(e, m ? "max" : "min");
      checks++; if (int'(rd_data) != (m ? mx : mn)) begin failures++; $display("read-back %0d", rd_data); end
    end
    // Step visits responders lowest first
    issue(PE_CMP, 0, 2, CMP_GE, 128);
    e = '0; for (int i = 0; i < N; i++) e[i] = v[i] >= 128;
    for (int i = 0; i < N; i++) if (e[i]) begin
      issue(PE_STEP);
      checks++; if (active_vec !== (N'(1) << i)) begin failures++; $display("step picked %h exp PE %0d", active_vec, i); end
      e[i] = 0; expect_resp(e, "after step");
      issue(PE_POP);
    end
    checks++; if (any_resp) begin failures++; $display("responders left"); end
    issue(PE_POP);
    // network: r3 <- id of west (linear) / north (mesh) neighbour
    for (int m = 0; m < 2; m++) begin
      net_mesh = m[0];
      issue(PE_NET, 3, 0, m ? DIR_NORTH : DIR_WEST);
      for (int k = 1; k < 8; k++) begin
        issue(PE_CMP, 0, 3, CMP_EQ, k);
        e = '0; e[k + (m ? 6 : 1)] = 1'b1;
        expect_resp(e, m ? "mesh north" : "linear west");
        issue(PE_POP);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
