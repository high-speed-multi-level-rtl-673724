// tb_dwt53_1d: checks the CSD 1-D 5/3 DWT unit against the integer reference
// model. Lines of random even length (4..64) are sent back to back, each
// extended by two mirrored samples at both ends, sometimes with idle cycles
// inside a line. Every coefficient is checked for value, low/high flag,
// position and arrival exactly two cycles after the sample that completes
// its window; no output may appear anywhere else. Sample values cover small
// pixels and the full signed range, so that saturation is also exercised.
module tb_dwt53_1d;
  import dwt53_ref_pkg::*;

  localparam int unsigned DW = 16, PW = 11;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_first = 0;
  logic signed [DW-1:0] in_data = '0;
  logic out_valid, out_hi;
  logic [PW-1:0] out_pos;
  logic signed [DW-1:0] out_data;

  int checks = 0, failures = 0, n_sat = 0, n_lines = 0;
  longint cycle = 0;

  typedef struct { longint when; bit hi; int pos; int val; } exp_t;
  exp_t expq[$];

  dwt53_1d #(.DW(DW), .PW(PW)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // Output monitor.
  always @(posedge clk) if (rst_n) begin
    if (expq.size() > 0 && expq[0].when == cycle) begin
      exp_t e;
      e = expq.pop_front();
      checks++;
      if (!out_valid || out_hi != e.hi || int'(out_pos) != e.pos || int'(out_data) != e.val) begin
        failures++;
        $display("FAIL cycle %0d: valid=%0b hi=%0b pos=%0d data=%0d, expected hi=%0b pos=%0d data=%0d",
                 cycle, out_valid, out_hi, out_pos, out_data, e.hi, e.pos, e.val);
      end
    end else if (out_valid) begin
      failures++;
      $display("FAIL cycle %0d: unexpected output pos=%0d", cycle, out_pos);
    end
  end

  task automatic send_line(input int m, input bit wide);
    int x[$];
    int y;
    for (int i = 0; i < m; i++)
      x.push_back(wide ? int'($signed(16'($urandom))) : int'($urandom % 256));
    for (int k = 0; k < m + 4; k++) begin
      if ($urandom % 8 == 0) begin
        @(negedge clk); in_valid = 0; in_first = 0;
      end
      @(negedge clk);
      in_valid = 1;
      in_first = (k == 0);
      in_data  = DW'(x[ref_mirror(k - 2, m)]);
      if (k >= 4) begin
        exp_t e;
        int n;
        n = k - 4;
        y = ref_coef(x, n, DW);
        if (y == 32767 || y == -32768) n_sat++;
        // monitor samples at the posedge; this sample enters at the next one
        e.when = cycle + 2; e.hi = n % 2; e.pos = n; e.val = y;
        expq.push_back(e);
      end
    end
    n_lines++;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    send_line(4, 0);
    send_line(8, 0);
    for (int i = 0; i < 60; i++) send_line(2 * (2 + $urandom % 31), i % 3 == 0);
    @(negedge clk); in_valid = 0; in_first = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin
      failures++;
      $display("FAIL: %0d coefficients never came out", expq.size());
    end
    checks++;
    if (n_sat == 0) begin
      failures++;
      $display("FAIL: saturation never exercised");
    end
    $display("lines=%0d saturated=%0d", n_lines, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
