// tb_iau: checks the input adder unit (32-point, 9-bit samples) against the
// butterfly definition: sums x(i)+x(31-i), differences x(15-j)-x(16+j).
module tb_iau;
  import dct_ref_pkg::*;
  localparam int N = 32, W = 9;
  logic signed [W-1:0] x [N];
  logic signed [W:0]   y [N];
  int checks = 0, failures = 0;

  iau #(.N(N), .W(W)) dut (.x(x), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      for (int i = 0; i < N; i++)
        x[i] = (t == 0) ? -(1 <<< (W-1)) : (t == 1) ? (1 << (W-1)) - 1 : rand_signed(W);
      if (t == 2) for (int i = 0; i < N; i++) x[i] = (i < N/2) ? (1 << (W-1)) - 1 : -(1 <<< (W-1));
      #1;
      for (int i = 0; i < N/2; i++) begin
        checks += 2;
        if (int'(y[i]) != int'(x[i]) + int'(x[N-1-i])) begin
          failures++;
          if (failures < 10) $display("sum %0d: got %0d", i, y[i]);
        end
        if (int'(y[N/2+i]) != int'(x[N/2-1-i]) - int'(x[N/2+i])) begin
          failures++;
          if (failures < 10) $display("diff %0d: got %0d", i, y[N/2+i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
