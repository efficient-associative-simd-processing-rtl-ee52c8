// tb_common_registers: random single and group writes against an array
// model, checked through every read port.
module tb_common_registers;
  import asc_pkg::*;
  localparam int NR = 16, SD = 4;
  logic clk = 0, rst_n = 0;
  logic [3:0] ra, rb, host_addr, waddr; logic [1:0] ga, gb, gwaddr;
  data_t rdata_a, rdata_b, host_rdata, wdata; data_t gdata_a [SD]; data_t gdata_b [SD]; data_t gwdata [SD];
  logic we, gwe;
  int checks = 0, failures = 0;
  data_t model [NR];
  common_registers #(.NUM_REGS(NR), .SC_DIGITS(SD)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    we = 0; gwe = 0; waddr = 0; wdata = 0; gwaddr = 0; foreach (gwdata[i]) gwdata[i] = 0;
    foreach (model[i]) model[i] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      ra = 4'($urandom); rb = 4'($urandom); host_addr = 4'($urandom); ga = 2'($urandom); gb = 2'($urandom);
      #1;
      checks++; if (rdata_a != model[ra] || rdata_b != model[rb] || host_rdata != model[host_addr]) begin failures++; $display("read n=%0d", n); end
      for (int d = 0; d < SD; d++) begin
        checks++; if (gdata_a[d] != model[ga*SD+d] || gdata_b[d] != model[gb*SD+d]) begin failures++; $display("group read n=%0d", n); end
      end
      we = $urandom_range(0, 1); waddr = 4'($urandom); wdata = data_t'($urandom);
      gwe = $urandom_range(0, 1); gwaddr = 2'($urandom); foreach (gwdata[i]) gwdata[i] = data_t'($urandom);
      @(posedge clk); #1;
      if (gwe) for (int d = 0; d < SD; d++) model[gwaddr*SD+d] = gwdata[d];
      if (we) model[waddr] = wdata;
      we = 0; gwe = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
