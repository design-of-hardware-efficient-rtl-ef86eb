// input_splitter: selects the DCT inputs for each TU size.
//
// The source delivers one column of an NxN transform unit (TU) per accepted
// cycle, residual row r in lane r (lanes N..31 are ignored). The splitter
// packs G = 32/N consecutive columns into one 32-lane vector, column s*G + g
// in lanes g*N .. g*N+N-1, so that the reconfigurable DCT computes G
// N-point column transforms at once. For a 32x32 TU every column passes
// straight through the register.
//
// Interface: valid/ready on the input (in_ready comes from the consumer and
// is simply honoured; the splitter itself never stalls). The TU size is
// sampled with the first column of each TU and held for the whole TU. A
// packed vector is presented for exactly one cycle (out_valid) one clock
// after its last column was accepted, with its step number out_step
// (0 .. N/G-1), out_last on the final step of the TU and the TU size out_tu.
// The published architecture only states that a splitter selects the DCT
// inputs for each TU size; the column-per-cycle input and the packing are
// this design's choices.
module input_splitter
  import hevc_dct_pkg::*;
#(
  parameter int unsigned W = 9    // residual sample width (signed)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  tu_size_e            in_tu,
  input  logic                in_valid,
  input  logic                in_ready,
  input  logic signed [W-1:0] in_col [NPT],
  output logic                out_valid,
  output logic                out_last,
  output logic [4:0]          out_step,
  output tu_size_e            out_tu,
  output logic signed [W-1:0] out_vec [NPT]
);
  logic [4:0] gcnt;      // column within the current group (0 .. G-1)
  logic [4:0] step;      // group within the TU (0 .. N/G-1)
  tu_size_e   tu_q;      // size of the TU in progress
  tu_size_e   tu_cur;
  logic       first;
  logic [4:0] gmax, smax;

  assign first  = (gcnt == 0) && (step == 0);
  assign tu_cur = first ? in_tu : tu_q;
  assign gmax   = 5'((1 << tu_log2g(tu_cur)) - 1);
  assign smax   = 5'((1 << (tu_log2n(tu_cur) - tu_log2g(tu_cur))) - 1);
  assign out_tu = tu_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gcnt      <= '0;
      step      <= '0;
      tu_q      <= TU32;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_step  <= '0;
      for (int l = 0; l < NPT; l++) out_vec[l] <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid && in_ready) begin
        tu_q <= tu_cur;
        for (int unsigned l = 0; l < NPT; l++) begin
          if ((l >> tu_log2n(tu_cur)) == 32'(gcnt))
            out_vec[l] <= in_col[l & ((1 << tu_log2n(tu_cur)) - 1)];
        end
        if (gcnt == gmax) begin
          gcnt      <= '0;
          out_valid <= 1'b1;
          out_step  <= step;
          out_last  <= (step == smax);
          step      <= (step == smax) ? '0 : step + 5'd1;
        end else begin
          gcnt <= gcnt + 5'd1;
        end
      end
    end
  end
endmodule
