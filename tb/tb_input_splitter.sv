// tb_input_splitter: streams TU columns of every size, with random input
// bubbles and consumer stalls, and checks each packed vector (lane contents,
// step number, last flag, TU size) and that it appears exactly one clock
// after its last column was accepted.
module tb_input_splitter;
  import hevc_dct_pkg::*;
  import dct_ref_pkg::*;
  localparam int W = 9;
  logic                clk = 0, rst_n = 0;
  tu_size_e            in_tu, out_tu;
  logic                in_valid, in_ready;
  logic signed [W-1:0] in_col [32];
  logic                out_valid, out_last;
  logic [4:0]          out_step;
  logic signed [W-1:0] out_vec [32];
  int checks = 0, failures = 0;

  input_splitter #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected stream, filled by the driver
  int exp_lane [$];   // 32 entries per vector
  int exp_step [$], exp_last [$], exp_tu [$];
  int cycle = 0, due_cycle [$];
  int vectors = 0, bubbles = 0, stalls = 0;

  always @(posedge clk) cycle++;

  // monitor
  always @(negedge clk) if (rst_n) begin
    if (out_valid) begin
      vectors++;
      checks++;
      if (exp_step.size() == 0) begin
        failures++; $display("unexpected vector");
      end else begin
        int lanes [32];
        for (int l = 0; l < 32; l++) lanes[l] = exp_lane.pop_front();
        if (int'(out_step) != exp_step.pop_front() || int'(out_last) != exp_last.pop_front() ||
            int'(out_tu) != exp_tu.pop_front() || cycle != due_cycle.pop_front()) begin
          failures++; $display("vector %0d: step/last/tu/timing mismatch", vectors);
        end
        for (int l = 0; l < 32; l++) begin
          checks++;
          if (int'(out_vec[l]) != lanes[l]) begin
            failures++;
            if (failures < 10) $display("vector %0d lane %0d: got %0d exp %0d", vectors, l, out_vec[l], lanes[l]);
          end
        end
      end
    end
  end

  initial begin
    static tu_size_e sizes [4] = '{TU8, TU32, TU16, TU8};
    int n, g, s, lanes [32], col [32];
    in_valid = 0; in_ready = 1; in_tu = TU32;
    for (int l = 0; l < 32; l++) in_col[l] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 4; rep++) begin
      foreach (sizes[q]) begin
        n = (sizes[q] == TU8) ? 8 : (sizes[q] == TU16) ? 16 : 32;
        g = 32 / n; s = n / g;
        for (int st = 0; st < s; st++) begin
          for (int gg = 0; gg < g; gg++) begin
            for (int l = 0; l < 32; l++) col[l] = rand_signed(W);
            for (int r = 0; r < n; r++) lanes[gg*n + r] = col[r];
            // present the column, possibly after a bubble, until accepted
            @(negedge clk);
            while ($urandom % 4 == 0) begin in_valid = 0; bubbles++; @(negedge clk); end
            in_valid = 1;
            // the size input changes freely after the first column
            in_tu = (st == 0 && gg == 0) ? sizes[q] : tu_size_e'(($urandom % 2) ? TU8 : TU32);
            for (int l = 0; l < 32; l++) in_col[l] = W'(col[l]);
            in_ready = ($urandom % 5 != 0);
            while (!in_ready) begin
              stalls++;
              @(negedge clk);
              in_ready = ($urandom % 3 != 0);
            end
            @(posedge clk);   // accepted here
          end
          for (int l = 0; l < 32; l++) exp_lane.push_back(lanes[l]);
          exp_step.push_back(st);
          exp_last.push_back(st == s - 1);
          exp_tu.push_back(int'(sizes[q]));
          due_cycle.push_back(cycle + 1);
        end
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (exp_step.size() != 0 || bubbles == 0 || stalls == 0) begin
      failures++;
      $display("missing vectors %0d, bubbles %0d, stalls %0d", exp_step.size(), bubbles, stalls);
    end
    $display("vectors %0d, bubbles %0d, stalls %0d", vectors, bubbles, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
