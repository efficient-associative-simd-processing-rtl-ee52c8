// tb_reduction_network: the read-back value is the selected PE's value
// (0 with no selection) and the Falkoff feedback is the OR of all votes.
module tb_reduction_network;
  import asc_pkg::*;
  localparam int N = 36;
  data_t val [N]; logic [N-1:0] sel, falk_bit; data_t rd_data; logic falk_any;
  int checks = 0, failures = 0;
  reduction_network #(.NUM_PE(N)) dut (.*);
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int n = 0; n < 1000; n++) begin
      int k;
      foreach (val[i]) val[i] = data_t'($urandom);
      k = $urandom_range(0, N);
      sel = (k == N) ? '0 : (N'(1) << k);
      falk_bit = (n % 3 == 0) ? '0 : (N'(1) << $urandom_range(0, N-1));
      #1;
      checks++; if (rd_data != ((k == N) ? data_t'(0) : val[k])) begin failures++; $display("rd_data wrong k=%0d", k); end
      checks++; if (falk_any != (n % 3 != 0)) begin failures++; $display("falk_any wrong"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
