// hevc_dct2d: hardware-efficient approximate 2D DCT for HEVC transform units.
//
// A 2D DCT is done as N column transforms followed by N row transforms.
// The chain is: input splitter -> column DCT (dct32_approx) -> transpose
// memory -> row DCT (dct32_approx) -> output memory. Both 1D transforms are
// the reconfigurable, multiplier-free approximate DCT, so an 8x8, 16x16 or
// 32x32 TU is handled by the same hardware: a 32-lane pass computes one
// 32-point, two 16-point or four 8-point 1D transforms.
//
// Operation of one NxN TU (G = 32/N transforms per pass, S = N/G passes):
//   COL phase: one TU column per accepted input cycle. Every G columns the
//              splitter presents a packed vector; the column DCT transforms
//              it combinationally and the result is written into the
//              transpose memory in the same cycle.
//   ROW phase: S cycles; each reads G rows from the transpose memory,
//              transforms them with the row DCT and writes them into the
//              output memory. The phase waits while the output memory still
//              holds a result that has not been released with out_ack.
//   Then out_valid rises and stays high until out_ack; the result is read
//   row by row through rd_en / rd_row (one cycle read latency).
// The transpose memory holds one TU, so new input is refused (in_ready low)
// from the last column's write until the ROW phase has finished. A 32x32 TU
// takes 32 + 1 + 32 cycles, a 16x16 TU 16 + 1 + 8, an 8x8 TU 8 + 1 + 2.
//
// Widths: residuals are IN_W bits; every 1D pass adds 5 bits, so the
// transpose memory is IN_W+5 and the coefficients IN_W+10 bits wide, kept
// exactly (no rounding, clipping or scaling between the passes).
// 4x4 TUs are not supported: the approximate transform has no 4-point form.
// The block chain follows the published architecture. The handshakes, the
// single transpose buffer, the out_valid/out_ack protocol, the reset and the
// widths are this design's choices.
module hevc_dct2d
  import hevc_dct_pkg::*;
#(
  parameter int unsigned IN_W  = 9,            // residual width (signed)
  parameter int unsigned MID_W = IN_W + 5,     // after the column DCT
  parameter int unsigned OUT_W = MID_W + 5     // coefficient width
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // residual input: one TU column per cycle, row r in lane r
  input  tu_size_e                in_tu,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic signed [IN_W-1:0]  in_col [NPT],
  // result
  output logic                    out_valid,   // a complete TU is held
  output tu_size_e                out_tu,      // its size
  input  logic                    out_ack,     // release the held result
  input  logic                    rd_en,
  input  logic [4:0]              rd_row,
  output logic signed [OUT_W-1:0] rd_data [NPT]
);
  typedef enum logic {COL, ROW} phase_e;
  phase_e phase;

  // splitter
  logic                   sp_valid, sp_last;
  logic [4:0]             sp_step;
  tu_size_e               sp_tu;
  logic signed [IN_W-1:0] sp_vec [NPT];

  // column DCT and transpose memory
  logic signed [MID_W-1:0] col_out [NPT];
  logic signed [MID_W-1:0] tm_rd   [NPT];
  tu_size_e                row_tu;
  logic [4:0]              row_step, row_last;
  logic                    row_go;

  // row DCT
  logic signed [OUT_W-1:0] row_out [NPT];

  assign in_ready = (phase == COL) && !(sp_valid && sp_last);

  input_splitter #(.W(IN_W)) u_split (
    .clk, .rst_n,
    .in_tu, .in_valid, .in_ready, .in_col,
    .out_valid(sp_valid), .out_last(sp_last), .out_step(sp_step),
    .out_tu(sp_tu), .out_vec(sp_vec)
  );

  dct32_approx #(.W(IN_W)) u_col_dct (.tu(sp_tu), .x(sp_vec), .f(col_out));

  transpose_mem #(.W(MID_W)) u_tmem (
    .clk,
    .wr_tu(sp_tu), .wr_en(sp_valid), .wr_step(sp_step), .wr_data(col_out),
    .rd_tu(row_tu), .rd_step(row_step), .rd_data(tm_rd)
  );

  dct32_approx #(.W(MID_W)) u_row_dct (.tu(row_tu), .x(tm_rd), .f(row_out));

  // a ROW cycle proceeds only when the output memory is free
  assign row_go   = (phase == ROW) && !out_valid;
  assign row_last = 5'((1 << (tu_log2n(row_tu) - tu_log2g(row_tu))) - 1);

  output_mem #(.W(OUT_W)) u_omem (
    .clk, .rst_n,
    .wr_tu(row_tu), .wr_en(row_go), .wr_step(row_step), .wr_data(row_out),
    .rd_en, .rd_row, .rd_data
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= COL;
      row_tu    <= TU32;
      row_step  <= '0;
      out_valid <= 1'b0;
      out_tu    <= TU32;
    end else begin
      if (out_ack) out_valid <= 1'b0;
      case (phase)
        COL: if (sp_valid && sp_last) begin
          phase    <= ROW;
          row_tu   <= sp_tu;
          row_step <= '0;
        end
        ROW: if (row_go) begin
          if (row_step == row_last) begin
            phase     <= COL;
            out_valid <= 1'b1;
            out_tu    <= row_tu;
          end else begin
            row_step <= row_step + 5'd1;
          end
        end
        default: phase <= COL;
      endcase
    end
  end

  // handshake and configuration rules
  assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> tu_legal(in_tu))
    else $error("hevc_dct2d: reserved TU size on the input");
  assert property (@(posedge clk) disable iff (!rst_n)
    sp_valid |-> phase == COL)
    else $error("hevc_dct2d: column write outside the COL phase");
  assert property (@(posedge clk) disable iff (!rst_n)
    phase == ROW |-> tu_legal(row_tu))
    else $error("hevc_dct2d: reserved TU size in the row phase");
endmodule
