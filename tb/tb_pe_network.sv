// tb_pe_network: each PE's received value in linear and 6x6 mesh mode, all
// four directions, against a model written in row/column coordinates.
module tb_pe_network;
  import asc_pkg::*;
  localparam int N = 36, C = 6;
  logic mesh; dir_e dir; data_t val [N]; data_t nbr [N];
  int checks = 0, failures = 0;
  pe_network #(.NUM_PE(N), .MESH_COLS(C)) dut (.*);
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int n = 0; n < 80; n++) begin
      foreach (val[i]) val[i] = data_t'($urandom_range(1, 255));
      mesh = n[0]; dir = dir_e'(n[2:1]);
      #1;
      for (int i = 0; i < N; i++) begin
        int row, col, r2, c2, exp;
        row = i / C; col = i % C;
        if (!mesh) begin
          int s; s = (dir == DIR_WEST || dir == DIR_NORTH) ? i - 1 : i + 1;
          exp = (s >= 0 && s < N) ? int'(val[s]) : 0;
        end else begin
          r2 = row; c2 = col;
          case (dir) DIR_WEST: c2--; DIR_EAST: c2++; DIR_NORTH: r2--; default: r2++; endcase
          exp = (r2 >= 0 && r2 < N / C && c2 >= 0 && c2 < C) ? int'(val[r2 * C + c2]) : 0;
        end
        checks++; if (int'(nbr[i]) != exp) begin failures++; $display("pe %0d mesh %0d dir %0d", i, mesh, dir); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
