// transpose_mem: 32x32 register transpose memory between the column and the
// row DCT.
//
// Register R[r][c] holds the column-DCT result of row r, column c of the
// current transform unit (TU). As in the reference structure, a whole column
// of registers is loaded at once through a column enable, and a row of
// registers is read through one multiplexer per output lane; writes go in
// by columns, reads come out by rows, which performs the transposition.
//
// For an NxN TU (N = 8, 16, 32) the 32-lane vectors carry G = 32/N columns
// or rows side by side: lane g*N + r of write vector s holds row r of TU
// column s*G + g; lane g*N + c of read vector t returns row t*G + g, column
// c. A TU is therefore written in N/G write steps and read in N/G read
// steps (32 for 32x32, 8 for 16x16, 2 for 8x8).
//
// Timing: writes take effect at the rising clock edge when wr_en is high;
// the read port is combinational (registers to multiplexers). The registers
// have no reset: every location that is read was written first. The
// column-enable/row-multiplexer organisation follows the published
// architecture; the packing of small TUs and the synchronous write enables
// are this design's choices.
module transpose_mem
  import hevc_dct_pkg::*;
#(
  parameter int unsigned W = 14   // stored sample width (signed)
) (
  input  logic                clk,
  input  tu_size_e            wr_tu,
  input  logic                wr_en,
  input  logic [4:0]          wr_step,
  input  logic signed [W-1:0] wr_data [NPT],
  input  tu_size_e            rd_tu,
  input  logic [4:0]          rd_step,
  output logic signed [W-1:0] rd_data [NPT]
);
  logic signed [W-1:0] mem [NPT][NPT];   // mem[row][column]

  // write: register (r, c) is enabled when column c belongs to this step
  always_ff @(posedge clk) begin
    if (wr_en) begin
      for (int unsigned r = 0; r < NPT; r++) begin
        for (int unsigned c = 0; c < NPT; c++) begin
          if ((r >> tu_log2n(wr_tu)) == 0 &&
              (c >> tu_log2g(wr_tu)) == 32'(wr_step))
            mem[r][c] <= wr_data[((c & ((1 << tu_log2g(wr_tu)) - 1)) << tu_log2n(wr_tu)) + r];
        end
      end
    end
  end

  // read: one multiplexer per lane selects the register of its row
  always_comb begin
    for (int unsigned l = 0; l < NPT; l++) begin
      rd_data[l] = mem[((32'(rd_step) << tu_log2g(rd_tu)) + (l >> tu_log2n(rd_tu))) % NPT]
                      [l & ((1 << tu_log2n(rd_tu)) - 1)];
    end
  end
endmodule
