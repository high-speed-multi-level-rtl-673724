// tb_dwt2d_top: end-to-end test of the multi-level 2-D 5/3 DWT at its default
// size (512 x 512 pixels, 3 levels). Two images are loaded through the pixel
// port and transformed: random 8-bit pixels, then a pattern of vertical
// and horizontal edges and a bright square on a dark background. The whole
// frame buffer is read back and compared with a separable reference
// transform (rows, then columns, then the LL quadrant again, level by level)
// computed with plain integer arithmetic. The cycle count from start to done
// is checked against 1 + sum over levels of 2*(m*(m+4) + 3).
// It also counts, through the hierarchy, how often each mechanism of the
// design happened: row-pass lines, column-pass lines, left and right
// boundary-extension reads, low-pass and high-pass coefficients, pipeline
// drains and level changes; a mechanism that never happened is a failure.
module tb_dwt2d_top;
  import dwt_pkg::*;
  import dwt53_ref_pkg::*;

  localparam int N = 512, LEVELS = 3, PIX_W = 8, DW = 16;
  localparam int LW = $clog2(N), LVW = $clog2(LEVELS + 1);

  logic clk = 0, rst_n = 0;
  logic load_en = 0;
  logic [LW-1:0] load_row = '0, load_col = '0, rd_row = '0, rd_col = '0;
  logic [PIX_W-1:0] load_pix = '0;
  logic start = 0, busy, done;
  logic [LVW-1:0] level;
  logic signed [DW-1:0] rd_data;

  dwt2d_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int img [N][N];
  longint n_row_lines = 0, n_col_lines = 0, n_mirror_left = 0, n_mirror_right = 0;
  longint n_low = 0, n_high = 0, n_drain = 0, n_level_change = 0;

  // Mechanism counters.
  always @(posedge clk) if (rst_n) begin
    if (dut.issue && dut.line_end && dut.state == S_ROW) n_row_lines++;
    if (dut.issue && dut.line_end && dut.state == S_COL) n_col_lines++;
    if (dut.issue && dut.jj < 0) n_mirror_left++;
    if (dut.issue && dut.jj >= int'(dut.m)) n_mirror_right++;
    if (dut.core_valid && !dut.core_hi) n_low++;
    if (dut.core_valid && dut.core_hi) n_high++;
    if (dut.state == S_ROW_DRAIN || dut.state == S_COL_DRAIN) n_drain++;
    if (dut.state == S_COL_DRAIN && dut.drain == 2'(PIPE_DRAIN - 1) && int'(dut.level) != LEVELS - 1)
      n_level_change++;
  end

  function automatic void ref_transform();
    int m;
    int q[$];
    m = N;
    for (int l = 0; l < LEVELS; l++) begin
      for (int r = 0; r < m; r++) begin
        q.delete();
        for (int c = 0; c < m; c++) q.push_back(img[r][c]);
        ref_line(q, DW);
        for (int c = 0; c < m; c++) img[r][c] = q[c];
      end
      for (int c = 0; c < m; c++) begin
        q.delete();
        for (int r = 0; r < m; r++) q.push_back(img[r][c]);
        ref_line(q, DW);
        for (int r = 0; r < m; r++) img[r][c] = q[r];
      end
      m = m / 2;
    end
  endfunction

  task automatic run_image(input int kind);
    longint t0, t1, expc;
    int m, bad;
    // load
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        int p;
        if (kind == 0) p = $urandom % 256;
        else p = ((c >= N / 3) ? 200 : 10) + ((r >= N / 2) ? 40 : 0) +
                 ((r >= N / 4 && r < N / 4 + 37 && c >= N / 8 && c < N / 8 + 53) ? 15 : 0);
        img[r][c] = p;
        @(negedge clk);
        load_en = 1; load_row = LW'(r); load_col = LW'(c); load_pix = PIX_W'(p);
      end
    @(negedge clk);
    load_en = 0;
    ref_transform();
    // run
    start = 1;
    t0 = $time / 10;
    @(negedge clk);
    start = 0;
    checks++;
    if (!busy) begin
      failures++;
      $display("FAIL: busy not raised after start");
    end
    while (!done) @(negedge clk);
    t1 = $time / 10;
    expc = 1;
    m = N;
    for (int l = 0; l < LEVELS; l++) begin
      expc += 2 * (m * (m + 4) + PIPE_DRAIN);
      m /= 2;
    end
    checks++;
    if (t1 - t0 != expc) begin
      failures++;
      $display("FAIL: transform took %0d cycles, expected %0d", t1 - t0, expc);
    end
    $display("image %0d: %0d cycles from start to done", kind, t1 - t0);
    @(negedge clk);
    // read back
    bad = 0;
    for (int k = 0; k <= N * N; k++) begin
      if (k < N * N) begin
        rd_row = LW'(k / N);
        rd_col = LW'(k % N);
      end
      @(negedge clk);
      if (k < N * N) begin
        checks++;
        if (int'(rd_data) != img[k / N][k % N]) begin
          failures++;
          if (bad++ < 10)
            $display("FAIL image %0d (%0d,%0d): got %0d expected %0d",
                     kind, k / N, k % N, rd_data, img[k / N][k % N]);
        end
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    run_image(0);
    run_image(1);
    begin
      longint counts [8];
      string names [8];
      counts = '{n_row_lines, n_col_lines, n_mirror_left, n_mirror_right,
                 n_low, n_high, n_drain, n_level_change};
      names  = '{"row-pass lines", "column-pass lines", "left extension reads",
                 "right extension reads", "low-pass coefficients",
                 "high-pass coefficients", "drain cycles", "level changes"};
      for (int i = 0; i < 8; i++) begin
        $display("%s: %0d", names[i], counts[i]);
        checks++;
        if (counts[i] == 0) begin
          failures++;
          $display("FAIL: %s never happened", names[i]);
        end
      end
      checks++;
      if (n_level_change != 2 * (LEVELS - 1)) begin
        failures++;
        $display("FAIL: %0d level changes, expected %0d", n_level_change, 2 * (LEVELS - 1));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
