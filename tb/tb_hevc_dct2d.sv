// tb_hevc_dct2d: end-to-end test of the 2D approximate DCT at its default
// parameters.
//
// Transform units of all three sizes are fed column by column; each result
// is read back row by row and compared with Y = C X C^T computed from the
// reference coefficient matrix. Phase A sends one TU of each size at full
// rate into an idle design and checks the documented latency N + 1 + N/G
// cycles. Phase B sends random sizes with input bubbles, extreme-valued
// blocks and a slow reader, so that input is refused while the transpose
// memory is busy and the row phase waits for the output memory. Every TU
// also checks the general latency rule. Each mechanism must occur at least
// once.
module tb_hevc_dct2d;
  import hevc_dct_pkg::*;
  import dct_ref_pkg::*;
  localparam int IN_W = 9, OUT_W = 19;

  logic                   clk = 0, rst_n = 0;
  tu_size_e               in_tu, out_tu;
  logic                   in_valid, in_ready;
  logic signed [IN_W-1:0] in_col [32];
  logic                   out_valid, out_ack, rd_en;
  logic [4:0]             rd_row;
  logic signed [OUT_W-1:0] rd_data [32];

  hevc_dct2d dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  int size_count [3];
  int refusals = 0, bubbles = 0, row_stalls = 0, full_rate = 0, tus_done = 0;
  bit slow_reader = 0;

  // expected results: per TU its size and its N*N coefficients, row-major
  int exp_n [$];
  int exp_y [$];

  function automatic int nsize(tu_size_e t);
    return (t == TU8) ? 8 : (t == TU16) ? 16 : 32;
  endfunction

  task automatic fail(string msg);
    failures++;
    if (failures < 12) $display("FAIL: %s", msg);
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- driver
  int pat_x [32][32];

  task automatic send_tu(tu_size_e t, int kind, bit noisy);
    int n, z [32][32], y;
    n = nsize(t);
    for (int r = 0; r < n; r++)
      for (int c = 0; c < n; c++)
        case (kind)
          1: pat_x[r][c] = 255;
          2: pat_x[r][c] = -256;
          3: pat_x[r][c] = (coef(n, 1, r) * coef(n, 1, c) >= 0) ? 255 : -256;
          default: pat_x[r][c] = rand_signed(IN_W);
        endcase
    // reference: columns first, then rows
    for (int k = 0; k < n; k++)
      for (int c = 0; c < n; c++) begin
        z[k][c] = 0;
        for (int r = 0; r < n; r++) z[k][c] += coef(n, k, r) * pat_x[r][c];
      end
    exp_n.push_back(n);
    for (int r = 0; r < n; r++)
      for (int k = 0; k < n; k++) begin
        y = 0;
        for (int c = 0; c < n; c++) y += coef(n, k, c) * z[r][c];
        exp_y.push_back(y);
      end
    for (int c = 0; c < n; c++) begin
      if (noisy) while ($urandom % 5 == 0) begin
        in_valid = 0; bubbles++;
        @(negedge clk);
      end
      in_valid = 1;
      in_tu = (c == 0) ? t : tu_size_e'(($urandom % 2 != 0) ? TU8 : TU16);
      for (int l = 0; l < 32; l++) in_col[l] = (l < n) ? IN_W'(pat_x[l][c]) : IN_W'(rand_signed(IN_W));
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
    end
    in_valid = 0;
  endtask

  // --------------------------------------------------------------- monitor
  int t_first, t_last, waits, cols, cur_n, cur_s;
  bit prev_out_valid = 0, tu_open = 0;
  always @(posedge clk) if (rst_n) begin
    if (in_valid && !in_ready) refusals++;
    if (int'(dut.phase) == 1 && out_valid) begin row_stalls++; waits++; end
    if (out_valid && !prev_out_valid) begin
      checks++;
      if (cyc - t_last != cur_s + 2 + waits)
        fail($sformatf("N=%0d result after %0d cycles from last column, expected %0d",
                       cur_n, cyc - t_last, cur_s + 2 + waits));
      if (cyc - t_first == cur_n + 1 + cur_s) full_rate++;
      tu_open = 0;
    end
    if (in_valid && in_ready) begin
      if (!tu_open) begin
        tu_open = 1; cols = 0; t_first = cyc;
        cur_n = nsize(in_tu); cur_s = cur_n * cur_n / 32;
      end
      cols++;
      if (cols == cur_n) begin t_last = cyc; waits = 0; end
    end
    prev_out_valid = out_valid;
    cyc++;
  end

  // ---------------------------------------------------------------- reader
  initial begin
    int n, y [32][32];
    out_ack = 0; rd_en = 0; rd_row = 0;
    forever begin
      @(negedge clk);
      if (out_valid && !out_ack) begin
        if (slow_reader) repeat ($urandom % 40) @(negedge clk);
        checks++;
        if (exp_n.size() == 0) begin
          fail("result without a TU");
          n = 0;
        end else n = exp_n.pop_front();
        if (nsize(out_tu) != n) fail("out_tu mismatch");
        for (int r = 0; r < n; r++) for (int k = 0; k < n; k++) y[r][k] = exp_y.pop_front();
        for (int r = 0; r <= n; r++) begin
          rd_en = (r < n); rd_row = 5'(r);
          if (r > 0)
            for (int k = 0; k < n; k++) begin
              checks++;
              if (int'(rd_data[k]) != y[r-1][k])
                fail($sformatf("N=%0d Y[%0d][%0d] got %0d exp %0d", n, r-1, k, rd_data[k], y[r-1][k]));
            end
          @(negedge clk);
        end
        rd_en = 0;
        tus_done++;
        size_count[(n == 8) ? 0 : (n == 16) ? 1 : 2]++;
        out_ack = 1;
        @(negedge clk);
        out_ack = 0;
      end
    end
  end

  // ------------------------------------------------------------------ main
  initial begin
    static tu_size_e sizes [3] = '{TU8, TU16, TU32};
    static int sent = 0;
    init_tables();
    in_valid = 0; in_tu = TU32;
    for (int l = 0; l < 32; l++) in_col[l] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // phase A: full rate into an idle design
    foreach (sizes[s]) begin
      send_tu(sizes[s], 0, 0);
      sent++;
      wait (tus_done == sent);
      @(negedge clk);
    end
    // phase B: random sizes, bubbles, extremes, slow reader
    slow_reader = 1;
    for (int i = 0; i < 15; i++) begin
      send_tu(sizes[$urandom % 3], (i < 9) ? (i % 3) + 1 : 0, 1);
      sent++;
    end
    wait (tus_done == sent);
    repeat (5) @(negedge clk);
    checks++;
    if (exp_n.size() != 0) fail("results missing");
    $display("TUs: 8x8 %0d, 16x16 %0d, 32x32 %0d; full-rate TUs %0d; input bubbles %0d; refused cycles %0d; row-phase waits %0d",
             size_count[0], size_count[1], size_count[2], full_rate, bubbles, refusals, row_stalls);
    foreach (size_count[s]) begin checks++; if (size_count[s] == 0) fail("a TU size never ran"); end
    checks += 4;
    if (full_rate < 3)    fail("full-rate latency not seen for every size");
    if (bubbles == 0)     fail("no input bubble");
    if (refusals == 0)    fail("input never refused");
    if (row_stalls == 0)  fail("row phase never waited for the output memory");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
