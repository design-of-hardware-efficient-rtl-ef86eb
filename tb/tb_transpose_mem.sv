// tb_transpose_mem: writes random NxN blocks column-group by column-group in
// the packed format and reads them back row-group by row-group, for every TU
// size, checking that each read lane returns the transposed element.
module tb_transpose_mem;
  import hevc_dct_pkg::*;
  import dct_ref_pkg::*;
  localparam int W = 14;
  logic                clk = 0;
  tu_size_e            wr_tu, rd_tu;
  logic                wr_en;
  logic [4:0]          wr_step, rd_step;
  logic signed [W-1:0] wr_data [32];
  logic signed [W-1:0] rd_data [32];
  int checks = 0, failures = 0;
  int z [32][32];

  transpose_mem #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static tu_size_e sizes [4] = '{TU32, TU8, TU16, TU32};
    int n, g, s;
    wr_en = 0; wr_step = 0; rd_step = 0; wr_tu = TU32; rd_tu = TU32;
    for (int rep = 0; rep < 3; rep++) begin
      foreach (sizes[q]) begin
        n = (sizes[q] == TU8) ? 8 : (sizes[q] == TU16) ? 16 : 32;
        g = 32 / n; s = n / g;
        for (int r = 0; r < n; r++) for (int c = 0; c < n; c++) z[r][c] = rand_signed(W);
        wr_tu = sizes[q]; rd_tu = sizes[q];
        for (int st = 0; st < s; st++) begin
          @(negedge clk);
          wr_en = 1; wr_step = 5'(st);
          for (int gg = 0; gg < g; gg++)
            for (int r = 0; r < n; r++) wr_data[gg*n + r] = W'(z[r][st*g + gg]);
        end
        @(negedge clk);
        wr_en = 0;
        for (int t = 0; t < s; t++) begin
          rd_step = 5'(t);
          #1;
          for (int gg = 0; gg < g; gg++)
            for (int c = 0; c < n; c++) begin
              checks++;
              if (int'(rd_data[gg*n + c]) != z[t*g + gg][c]) begin
                failures++;
                if (failures < 10) $display("N=%0d row %0d col %0d: got %0d exp %0d", n, t*g+gg, c, rd_data[gg*n+c], z[t*g+gg][c]);
              end
            end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
