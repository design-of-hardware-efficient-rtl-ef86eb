// output_perm: output permutation block of the reconfigurable 32-point DCT.
//
// The four 8-point units k = 0..3 deliver d[k][j], j = 0..7. Depending on
// the TU-size code {sel32, sel16} they are re-ordered into F0..F31:
//   8-point  (00): F(8k + j)        = d[k][j]   four independent 8-point DCTs
//   16-point (01): F(16h + 2j + q)  = d[2h+q][j] two 16-point DCTs; units 0,2
//                                     give the even and units 1,3 the odd
//                                     coefficients of each 16-point DCT
//   32-point (11): F(4j + r(k))     = d[k][j]   r(k) is k with its two bits
//                                     swapped: 0->0, 1->2, 2->1, 3->3
// F0 and F31 come from the same unit output in every mode; each of the other
// 30 outputs is a 3:1 multiplexer, as in the reference architecture. The
// reserved code 10 is treated like the 8-point mode. Purely combinational.
// The multiplexer count and select coding follow the published architecture;
// the exact mapping is derived from its even/odd recursion.
module output_perm
  import hevc_dct_pkg::*;
#(
  parameter int unsigned W = 16   // sample width (signed)
) (
  input  tu_size_e            tu,
  input  logic signed [W-1:0] d [4][8],
  output logic signed [W-1:0] f [NPT]
);
  always_comb begin
    for (int unsigned k = 0; k < 4; k++) begin
      for (int unsigned j = 0; j < 8; j++) begin
        case (tu)
          TU16:    f[16*(k/2) + 2*j + (k%2)]       = d[k][j];
          TU32:    f[4*j + 2*(k%2) + (k/2)]        = d[k][j];
          default: f[8*k + j]                       = d[k][j];
        endcase
      end
    end
  end
endmodule
