// dct32_approx: reconfigurable approximate DCT of length 32, 16 or 8.
//
// One instance computes, in a single combinational pass, either one
// 32-point DCT of x0..x31, two 16-point DCTs (x0..x15 and x16..x31) or four
// 8-point DCTs (x0..x7, ..., x24..x31). The approximation is recursive:
// an N-point DCT is an N-point input adder unit (butterfly) followed by two
// N/2-point approximate DCTs, one on the sums (giving the even outputs) and
// one on the differences (giving the odd outputs), and an output
// permutation. Only additions are used.
//
// Structure, from input to output:
//   32-point adder unit -> 32/16 computation selection (32 2:1 MUXes, sel32)
//   -> two 16-point adder units -> 16/8 computation selection (32 2:1 MUXes,
//   sel16) -> four 8-point approximate DCT units -> output permutation
//   (30 3:1 MUXes, selected by {sel32, sel16}).
// When a size is not used, its adder unit is bypassed by the MUXes. The
// select bits are the two bits of the TU-size code (see hevc_dct_pkg); the
// reserved code 10 gives no meaningful result and is kept out by the user.
//
// Widths: the input is W bits signed, every adder level adds one bit, and
// the output is W+5 bits, which holds every result exactly. The input is
// never truncated or rounded. The structure and MUX counts follow the
// published architecture; the widths are this design's choice.
module dct32_approx
  import hevc_dct_pkg::*;
#(
  parameter int unsigned W = 9    // input sample width (signed)
) (
  input  tu_size_e              tu,
  input  logic signed [W-1:0]   x [NPT],
  output logic signed [W+4:0]   f [NPT]
);
  logic sel32, sel16;
  assign {sel32, sel16} = tu;

  logic signed [W:0]   y32 [NPT];      // 32-point adder unit
  logic signed [W:0]   v   [NPT];      // after 32/16 selection
  logic signed [W+1:0] w   [NPT];      // two 16-point adder units
  logic signed [W+1:0] z   [NPT];      // after 16/8 selection
  logic signed [W+1:0] zg  [4][8];
  logic signed [W+4:0] d   [4][8];     // four 8-point units

  iau #(.N(32), .W(W)) u_iau32 (.x(x), .y(y32));

  always_comb begin
    for (int i = 0; i < NPT; i++) v[i] = sel32 ? y32[i] : (W+1)'(x[i]);
  end

  for (genvar h = 0; h < 2; h++) begin : g_iau16
    logic signed [W:0]   vin  [16];
    logic signed [W+1:0] vout [16];
    always_comb for (int i = 0; i < 16; i++) vin[i] = v[16*h + i];
    iau #(.N(16), .W(W+1)) u_iau16 (.x(vin), .y(vout));
    always_comb for (int i = 0; i < 16; i++) w[16*h + i] = vout[i];
  end

  always_comb begin
    for (int i = 0; i < NPT; i++) z[i] = sel16 ? w[i] : (W+2)'(v[i]);
    for (int k = 0; k < 4; k++)
      for (int j = 0; j < 8; j++) zg[k][j] = z[8*k + j];
  end

  for (genvar k = 0; k < 4; k++) begin : g_dct8
    dct8_approx #(.W(W+2)) u_dct8 (.x(zg[k]), .f(d[k]));
  end

  output_perm #(.W(W+5)) u_perm (.tu(tu), .d(d), .f(f));

endmodule
