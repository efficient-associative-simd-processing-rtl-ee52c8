// tb_mask_stack: random push/pop/write sequences against a list model of
// the mask stack (reset fills with 1, pop refills the bottom with 1, a push
// on a full stack drops the bottom entry and flags overflow).
module tb_mask_stack;
  localparam int D = 4;
  logic clk = 0, rst_n = 0;
  logic push, push_bit, pop, wr_top, top_bit, top, overflow;
  int checks = 0, failures = 0;
  bit model [D];
  int used;

  mask_stack #(.DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    push = 0; push_bit = 0; pop = 0; wr_top = 0; top_bit = 0;
    foreach (model[i]) model[i] = 1;
    used = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      int r;
      bit exp_ovf;
      @(negedge clk);
      r = $urandom_range(0, 3);
      push = (r == 0); pop = (r == 1); wr_top = (r == 2);
      push_bit = $urandom_range(0, 1); top_bit = $urandom_range(0, 1);
      #1;
      exp_ovf = push && (used == D);
      checks++; if (overflow !== exp_ovf) begin failures++; $display("ovf mismatch n=%0d", n); end
      @(posedge clk); #1;
      if (push) begin
        for (int i = D-1; i > 0; i--) model[i] = model[i-1];
        model[0] = push_bit; if (used < D) used++;
      end else if (pop) begin
        for (int i = 0; i < D-1; i++) model[i] = model[i+1];
        model[D-1] = 1; if (used > 0) used--;
      end else if (wr_top) model[0] = top_bit;
      checks++; if (top !== model[0]) begin failures++; $display("top mismatch n=%0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
