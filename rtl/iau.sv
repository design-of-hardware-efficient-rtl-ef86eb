// iau: input adder unit (N-point butterfly) of the approximate DCT.
//
// Output i (i < N/2) is the sum x(i) + x(N-1-i); output N/2+j is the
// difference x(N/2-1-j) - x(N/2+j), so the lower half of the outputs lists
// the differences starting from the two middle inputs and moving outward.
// This is the input adder unit of the 16-point and 32-point approximate DCT
// and also the first adder column of the 8-point unit. The output is one
// bit wider than the input so that nothing overflows. Purely combinational.
// The butterfly and its output order follow the published architecture;
// the width rule is this design's.
module iau #(
  parameter int unsigned N = 16,  // butterfly length, even
  parameter int unsigned W = 9    // input sample width (signed)
) (
  input  logic signed [W-1:0] x [N],
  output logic signed [W:0]   y [N]
);
  localparam int unsigned H = N / 2;

  always_comb begin
    for (int unsigned i = 0; i < H; i++) begin
      y[i]     = (W+1)'(x[i]) + (W+1)'(x[N-1-i]);
      y[H + i] = (W+1)'(x[H-1-i]) - (W+1)'(x[H + i]);
    end
  end
endmodule
