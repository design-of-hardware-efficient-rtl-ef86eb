// tb_dct8_approx: checks the 8-point approximate DCT unit against the
// -1/0/+1 coefficient matrix, with random and extreme 11-bit inputs.
module tb_dct8_approx;
  import dct_ref_pkg::*;
  localparam int W = 11;
  logic signed [W-1:0] x [8];
  logic signed [W+2:0] f [8];
  int checks = 0, failures = 0;

  dct8_approx #(.W(W)) dut (.x(x), .f(f));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_v;
    for (int t = 0; t < 500; t++) begin
      for (int i = 0; i < 8; i++) begin
        case (t)
          0: x[i] = -(1 <<< (W-1));
          1: x[i] = (1 << (W-1)) - 1;
          2: x[i] = (T8[3][i] >= 0) ? (1 << (W-1)) - 1 : -(1 <<< (W-1));
          3: x[i] = (i == t % 8) ? 1 : 0;
          default: x[i] = (t < 11) ? ((i == t - 3) ? 1 : 0) : rand_signed(W);
        endcase
      end
      #1;
      for (int k = 0; k < 8; k++) begin
        exp_v = 0;
        for (int i = 0; i < 8; i++) exp_v += T8[k][i] * int'(x[i]);
        checks++;
        if (int'(f[k]) != exp_v) begin
          failures++;
          if (failures < 10) $display("t=%0d F%0d: got %0d exp %0d", t, k, f[k], exp_v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
