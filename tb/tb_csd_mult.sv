// tb_csd_mult: checks the CSD constant multiplier for the three scaled 5/3
// coefficients (-1, 2, 6) and for two wider canonic constants, +21 (16+4+1)
// and -43 (-64+16+4+1), against a
// plain multiplication, with random and extreme inputs.
module tb_csd_mult;
  import dwt_pkg::*;

  localparam int unsigned IW = 17;
  localparam int unsigned SW = 4;

  logic signed [IW-1:0]    x;
  logic signed [IW+SW-1:0] p_m1, p_p2, p_p6;
  logic signed [IW+7-1:0]  p_21, p_m43;
  int checks = 0, failures = 0;
  logic clk = 0;

  csd_mult #(.IW(IW), .SW(SW), .POS(CSD_M1_POS), .NEG(CSD_M1_NEG)) u_m1 (.x, .p(p_m1));
  csd_mult #(.IW(IW), .SW(SW), .POS(CSD_P2_POS), .NEG(CSD_P2_NEG)) u_p2 (.x, .p(p_p2));
  csd_mult #(.IW(IW), .SW(SW), .POS(CSD_P6_POS), .NEG(CSD_P6_NEG)) u_p6 (.x, .p(p_p6));
  csd_mult #(.IW(IW), .SW(7), .POS(7'b0010101), .NEG(7'b0000000)) u_21 (.x, .p(p_21));
  // -43 = -64 + 16 + 4 + 1
  csd_mult #(.IW(IW), .SW(7), .POS(7'b0010101), .NEG(7'b1000000)) u_m43 (.x, .p(p_m43));

  always #5 clk = ~clk;

  task automatic check(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: x=%0d got %0d expected %0d", what, x, got, exp);
    end
  endtask

  task automatic apply(input int v);
    x = IW'(v);
    #1;
    check(p_m1,  -1 * longint'(x), "x*-1");
    check(p_p2,   2 * longint'(x), "x*2");
    check(p_p6,   6 * longint'(x), "x*6");
    check(p_21,  21 * longint'(x), "x*21");
    check(p_m43, -43 * longint'(x), "x*-43");
  endtask

  initial begin
    apply(0);
    apply(1);
    apply(-1);
    apply((1 << (IW - 1)) - 1);
    apply(-(1 << (IW - 1)));
    for (int i = 0; i < 2000; i++) apply(int'($urandom) % (1 << (IW - 1)));
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
