// tb_dct32_approx: checks the reconfigurable approximate DCT in all three
// modes (four 8-point, two 16-point, one 32-point) against the recursively
// built coefficient matrices, with random and extreme 9-bit inputs.
module tb_dct32_approx;
  import hevc_dct_pkg::*;
  import dct_ref_pkg::*;
  localparam int W = 9;
  tu_size_e            tu;
  logic signed [W-1:0] x [32];
  logic signed [W+4:0] f [32];
  int checks = 0, failures = 0;
  int mode_tests [3];

  dct32_approx #(.W(W)) dut (.tu(tu), .x(x), .f(f));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static tu_size_e sizes [3] = '{TU8, TU16, TU32};
    int n, exp_v;
    init_tables();
    for (int t = 0; t < 200; t++) begin
      foreach (sizes[s]) begin
        tu = sizes[s];
        n = 8 << s;
        for (int i = 0; i < 32; i++) begin
          case (t)
            0: x[i] = -(1 <<< (W-1));
            1: x[i] = (1 << (W-1)) - 1;
            2: x[i] = (coef(n, 1, i % n) >= 0) ? (1 << (W-1)) - 1 : -(1 <<< (W-1));
            default: x[i] = (t < 35) ? ((i == t - 3) ? 1 : 0) : rand_signed(W);
          endcase
        end
        #1;
        mode_tests[s]++;
        for (int g = 0; g < 32 / n; g++) begin
          for (int k = 0; k < n; k++) begin
            exp_v = 0;
            for (int i = 0; i < n; i++) exp_v += coef(n, k, i) * int'(x[g*n + i]);
            checks++;
            if (int'(f[g*n + k]) != exp_v) begin
              failures++;
              if (failures < 10) $display("t=%0d N=%0d g=%0d F%0d: got %0d exp %0d", t, n, g, k, f[g*n+k], exp_v);
            end
          end
        end
      end
    end
    $display("mode tests: 8-point %0d, 16-point %0d, 32-point %0d", mode_tests[0], mode_tests[1], mode_tests[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
