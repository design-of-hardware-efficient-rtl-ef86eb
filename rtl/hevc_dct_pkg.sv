// hevc_dct_pkg: types and constants shared by the approximate HEVC 2D DCT.
//
// The reconfigurable DCT is steered by two select bits, sel32 and sel16.
// The transform-unit size enum is encoded so that its value is exactly
// {sel32, sel16}: 00 = 8-point, 01 = 16-point, 11 = 32-point. The code 10 is
// reserved and never produced by a legal TU size.
//
// A 32-lane datapath processes G = 32/N independent N-point transforms at
// once; the helper functions below give log2(N) and log2(G) for a TU size.
// The reserved code is treated like the 32-point size by these helpers.
package hevc_dct_pkg;

  localparam int unsigned NPT   = 32;  // lanes of the DCT datapath (largest DCT length)
  localparam int unsigned LOG2_NPT = 5;

  typedef enum logic [1:0] {
    TU8  = 2'b00,
    TU16 = 2'b01,
    TU32 = 2'b11
  } tu_size_e;

  // log2 of the transform length N
  function automatic int unsigned tu_log2n(input tu_size_e tu);
    case (tu)
      TU8:     return 3;
      TU16:    return 4;
      default: return 5;
    endcase
  endfunction

  // log2 of the number G = 32/N of transforms that run side by side
  function automatic int unsigned tu_log2g(input tu_size_e tu);
    return LOG2_NPT - tu_log2n(tu);
  endfunction

  // legal TU-size code (the reserved {sel32, sel16} = 10 is not)
  function automatic logic tu_legal(input logic [1:0] code);
    return code != 2'b10;
  endfunction

endpackage
