// tb_responder_resolution: random and sparse responder vectors; the unit
// must pick exactly the lowest-numbered responder and report "any".
module tb_responder_resolution;
  localparam int N = 36;
  logic [N-1:0] resp, sel; logic [$clog2(N)-1:0] sel_idx; logic any;
  int checks = 0, failures = 0;
  responder_resolution #(.NUM_PE(N)) dut (.*);
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int n = 0; n < 2000; n++) begin
      int first;
      case (n % 4)
        0: resp = '0;
        1: begin resp = '0; resp[$urandom_range(0, N-1)] = 1'b1; end
        default: resp = {$urandom, $urandom} & {$urandom, $urandom};
      endcase
      #1;
      first = -1;
      for (int i = N-1; i >= 0; i--) if (resp[i]) first = i;
      checks++; if (any != (first >= 0)) begin failures++; $display("any wrong"); end
      checks++;
      if (first < 0) begin if (sel != '0) begin failures++; $display("sel not zero"); end end
      else if (sel != (N'(1) << first) || int'(sel_idx) != first) begin failures++; $display("sel wrong %h", resp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
