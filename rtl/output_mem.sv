// output_mem: result store of the 2D DCT.
//
// Holds the 32x32 (or smaller) coefficient block of the last transformed
// TU. The row DCT writes it in the same packed format the transpose memory
// reads in: lane g*N + k of write vector t is coefficient (row t*G + g,
// column k) of an NxN TU, G = 32/N. A reader fetches one coefficient row
// per cycle: rd_row selects the row, and rd_data holds its 32 coefficients
// (column k in lane k, lanes k >= N unused) one clock after rd_en.
//
// Timing: writes at the rising edge when wr_en is high; synchronous read
// with one cycle of latency. No reset on the storage; rd_data is cleared on
// reset. The published architecture only names an output memory that
// stores the results; the format and read port are this design's choices.
module output_mem
  import hevc_dct_pkg::*;
#(
  parameter int unsigned W = 19   // coefficient width (signed)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  tu_size_e            wr_tu,
  input  logic                wr_en,
  input  logic [4:0]          wr_step,
  input  logic signed [W-1:0] wr_data [NPT],
  input  logic                rd_en,
  input  logic [4:0]          rd_row,
  output logic signed [W-1:0] rd_data [NPT]
);
  logic signed [W-1:0] mem [NPT][NPT];   // mem[row][column]

  always_ff @(posedge clk) begin
    if (wr_en) begin
      for (int unsigned r = 0; r < NPT; r++) begin
        for (int unsigned k = 0; k < NPT; k++) begin
          if ((k >> tu_log2n(wr_tu)) == 0 &&
              (r >> tu_log2g(wr_tu)) == 32'(wr_step))
            mem[r][k] <= wr_data[((r & ((1 << tu_log2g(wr_tu)) - 1)) << tu_log2n(wr_tu)) + k];
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned k = 0; k < NPT; k++) rd_data[k] <= '0;
    end else if (rd_en) begin
      for (int unsigned k = 0; k < NPT; k++) rd_data[k] <= mem[rd_row][k];
    end
  end
endmodule
