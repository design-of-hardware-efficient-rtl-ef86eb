// dct8_approx: 8-point approximated DCT unit, adders only.
//
// The transform is the orthogonal approximation whose coefficients are all
// 0 or +-1 (rows F0..F7 applied to x0..x7):
//   F0: + + + + + + + +    F1: + + + 0 0 - - -
//   F2: + 0 0 - - 0 0 +    F3: + 0 - - + + 0 -
//   F4: + - - + + - - +    F5: + - 0 + - 0 + -
//   F6: 0 - + 0 0 + - 0    F7: 0 - + - + - + 0
// It is built as three adder columns (8, 8 and 6 adders, 22 in all):
// a butterfly (iau) giving sums a0..a3 and differences b0..b3 with
// b(i) = x(i) - x(7-i); a second column forming a0+-a3, a1+-a2 and four
// pairwise combinations of the b's; a third column that finishes F0, F4 and
// the odd outputs. The column structure and adder count follow the signal
// flow graph of the reference design; which pairs of b's are combined in
// the second column is this design's choice. Output width grows by 3 bits.
// Purely combinational.
module dct8_approx #(
  parameter int unsigned W = 11   // input sample width (signed)
) (
  input  logic signed [W-1:0] x [8],
  output logic signed [W+2:0] f [8]
);
  logic signed [W:0]   u [8];     // stage 1: butterfly
  logic signed [W+1:0] a [4], b [4];
  logic signed [W+1:0] s0, s1, s2, s3, p0, p1, p2, p3;  // stage 2

  iau #(.N(8), .W(W)) u_bfly (.x(x), .y(u));

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      a[i] = (W+2)'(u[i]);
      b[i] = (W+2)'(u[7-i]);      // u[4+j] = x(3-j) - x(4+j)
    end
    // stage 2
    s0 = a[0] + a[3];
    s1 = a[1] + a[2];
    s2 = a[2] - a[1];
    s3 = a[0] - a[3];
    p0 = b[0] + b[1];
    p1 = b[0] + b[3];
    p2 = b[0] - b[3];
    p3 = b[2] - b[3];
    // stage 3
    f[0] = (W+3)'(s0) + (W+3)'(s1);
    f[4] = (W+3)'(s0) - (W+3)'(s1);
    f[2] = (W+3)'(s3);
    f[6] = (W+3)'(s2);
    f[1] = (W+3)'(p0) + (W+3)'(b[2]);
    f[3] = (W+3)'(p2) - (W+3)'(b[2]);
    f[5] = (W+3)'(p1) - (W+3)'(b[1]);
    f[7] = (W+3)'(p3) - (W+3)'(b[1]);
  end
endmodule
