// tb_output_perm: checks the output permutation for the three TU sizes. Every
// unit output carries a distinct value; the expected order is derived from
// the even/odd split of each recursive DCT stage.
module tb_output_perm;
  import hevc_dct_pkg::*;
  localparam int W = 16;
  tu_size_e            tu;
  logic signed [W-1:0] d [4][8];
  logic signed [W-1:0] f [32];
  int checks = 0, failures = 0;

  output_perm #(.W(W)) dut (.tu(tu), .d(d), .f(f));

  // expected (unit, output) feeding F(n)
  function automatic int src(tu_size_e s, int n);
    int h, m;
    case (s)
      TU8:  return 8 * (n / 8) + n % 8;
      TU16: begin
        h = n / 16; m = n % 16;
        return (m % 2 == 0) ? 8 * (2*h) + m / 2 : 8 * (2*h + 1) + m / 2;
      end
      default: begin
        if (n % 2 == 0) begin            // even: first 16-point half
          m = n / 2;
          return (m % 2 == 0) ? 8 * 0 + m / 2 : 8 * 1 + m / 2;
        end else begin                   // odd: second 16-point half
          m = (n - 1) / 2;
          return (m % 2 == 0) ? 8 * 2 + m / 2 : 8 * 3 + m / 2;
        end
      end
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static tu_size_e sizes [3] = '{TU8, TU16, TU32};
    for (int rep = 0; rep < 4; rep++) begin
      foreach (sizes[s]) begin
        tu = sizes[s];
        for (int k = 0; k < 4; k++)
          for (int j = 0; j < 8; j++) d[k][j] = W'(100 * rep + 8 * k + j + 1);
        #1;
        for (int n = 0; n < 32; n++) begin
          checks++;
          if (int'(f[n]) != 100 * rep + src(tu, n) + 1) begin
            failures++;
            if (failures < 10) $display("%s F%0d: got %0d exp %0d", tu.name(), n, f[n], 100*rep + src(tu, n) + 1);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
