// tb_frame_mem: checks the frame buffer as a one-cycle-latency simple
// dual-port memory: random writes mirrored in a shadow array, random reads
// compared one cycle later, read-during-write returning the old word, and
// re low holding the last read word.
module tb_frame_mem;
  localparam int unsigned W = 16, DEPTH = 1024, AW = 10;

  logic clk = 0, we = 0, re = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [W-1:0]  wdata = '0, rdata;
  logic [W-1:0]  shadow [DEPTH];
  int checks = 0, failures = 0;

  frame_mem #(.W(W), .DEPTH(DEPTH), .AW(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    logic [W-1:0] exp;
    // fill
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = AW'(a); wdata = W'($urandom); shadow[a] = wdata;
    end
    @(negedge clk); we = 0;
    // random mixed traffic
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      we = ($urandom % 2) == 1; waddr = AW'($urandom); wdata = W'($urandom);
      re = ($urandom % 4) != 0; raddr = ($urandom % 8 == 0) ? waddr : AW'($urandom);
      exp = re ? shadow[raddr] : rdata;   // old word on a same-address write
      @(posedge clk); #1;
      if (we) shadow[waddr] = wdata;
      checks++;
      if (rdata !== exp) begin
        failures++;
        $display("FAIL read %0d got %h expected %h", raddr, rdata, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
