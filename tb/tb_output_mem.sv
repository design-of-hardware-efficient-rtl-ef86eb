// tb_output_mem: writes random coefficient blocks in the packed row-group
// format for every TU size and reads them back one row per cycle, checking
// data and the one-cycle read latency.
module tb_output_mem;
  import hevc_dct_pkg::*;
  import dct_ref_pkg::*;
  localparam int W = 19;
  logic                clk = 0, rst_n = 0;
  tu_size_e            wr_tu;
  logic                wr_en, rd_en;
  logic [4:0]          wr_step, rd_row;
  logic signed [W-1:0] wr_data [32];
  logic signed [W-1:0] rd_data [32];
  int checks = 0, failures = 0;
  int y [32][32];

  output_mem #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static tu_size_e sizes [4] = '{TU16, TU32, TU8, TU32};
    int n, g, s;
    wr_en = 0; rd_en = 0; wr_step = 0; rd_row = 0; wr_tu = TU32;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 3; rep++) begin
      foreach (sizes[q]) begin
        n = (sizes[q] == TU8) ? 8 : (sizes[q] == TU16) ? 16 : 32;
        g = 32 / n; s = n / g;
        for (int r = 0; r < n; r++) for (int c = 0; c < n; c++) y[r][c] = rand_signed(W);
        wr_tu = sizes[q];
        for (int st = 0; st < s; st++) begin
          @(negedge clk);
          wr_en = 1; wr_step = 5'(st);
          for (int gg = 0; gg < g; gg++)
            for (int k = 0; k < n; k++) wr_data[gg*n + k] = W'(y[st*g + gg][k]);
        end
        @(negedge clk);
        wr_en = 0;
        for (int r = 0; r < n; r++) begin
          rd_en = 1; rd_row = 5'(r);
          @(negedge clk);
          rd_en = 0; rd_row = 5'(r + 1);   // must not disturb the held row
          for (int k = 0; k < n; k++) begin
            checks++;
            if (int'(rd_data[k]) != y[r][k]) begin
              failures++;
              if (failures < 10) $display("N=%0d row %0d col %0d: got %0d exp %0d", n, r, k, rd_data[k], y[r][k]);
            end
          end
          @(negedge clk);
          checks++;
          if (int'(rd_data[0]) != y[r][0]) begin
            failures++;
            $display("read data changed without rd_en");
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
