// dwt53_1d: one-dimensional 5/3 discrete wavelet transform in convolution
// form, built from delay flip-flops and CSD shift-add constant multipliers.
//
// Samples of one line enter at one per cycle through a five-stage delay line
// (x[n+2] newest .. x[n-2] oldest). Because both 5/3 filters are symmetric,
// the taps are first folded in pairs (x[n-2]+x[n+2], x[n-1]+x[n+1]), so the
// low-pass filter needs three CSD multipliers (-1, 2, 6 in units of 1/8)
// and the high-pass filter two (-1, 2 in units of 1/2, sharing the inner
// pair sum). For a window centred on an even sample the low-pass value
//   L = (-x[n-2] + 2x[n-1] + 6x[n] + 2x[n+1] - x[n+2] + 4) >>> 3
// is output, for an odd one the high-pass value
//   H = (-x[n-1] + 2x[n] - x[n+1] + 1) >>> 1
// which is the two-to-one downsampling of both filter outputs. Results are
// rounded half up and saturated to DW bits.
//
// Interface: in_valid/in_first/in_data carry the line, already extended by
// two samples at each end (the caller does the boundary extension), so a
// line of m coefficients takes m+4 input samples; in_first marks the first
// sample of a line and restarts the position count. out_valid/out_hi/out_pos/
// out_data give one coefficient per input sample once the window is full:
// out_pos = n is the coefficient's sample position in the line, out_hi says
// whether it is a high-pass (odd n) or low-pass (even n) value.
// Timing: a coefficient leaves two cycles after the sample that completes its
// window entered (one register for the delay line, one output register).
// Lines may follow each other without gaps.
// The filter, the folding into CSD multipliers and the delay line follow the
// CSD 1-D structure; rounding, saturation and the handshake are this
// design's choices.
module dwt53_1d
  import dwt_pkg::*;
#(
  parameter int unsigned DW = 16,  // sample and coefficient width
  parameter int unsigned PW = 11   // width of the in-line position count
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic                 in_first,
  input  logic signed [DW-1:0] in_data,
  output logic                 out_valid,
  output logic                 out_hi,
  output logic [PW-1:0]        out_pos,
  output logic signed [DW-1:0] out_data
);

  localparam int unsigned SW = CSD_DIGITS;
  localparam int unsigned AW = DW + 1 + SW + 1;  // accumulator width
  localparam logic [PW-1:0] CNT_MAX = '1;

  // Delay line: win[0] = x[n+2] (newest) .. win[4] = x[n-2] (oldest).
  logic signed [DW-1:0] win [5];
  logic [PW-1:0]        cnt;   // samples of the current line seen so far
  logic                 upd;   // delay line shifted in the previous cycle

  always_ff @(posedge clk) begin
    if (in_valid) begin
      win[0] <= in_data;
      for (int i = 1; i < 5; i++) win[i] <= win[i-1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      upd <= 1'b0;
    end else begin
      upd <= in_valid;
      if (in_valid) begin
        if (in_first)              cnt <= PW'(1);
        else if (cnt != CNT_MAX)   cnt <= cnt + 1'b1;
      end
    end
  end

  // Folded tap pairs.
  logic signed [DW:0] s_out, s_in, c_ext;
  assign s_out = (DW+1)'(win[0]) + (DW+1)'(win[4]);
  assign s_in  = (DW+1)'(win[1]) + (DW+1)'(win[3]);
  assign c_ext = (DW+1)'(win[2]);

  // CSD partial-product sums.
  logic signed [DW+SW:0] p_l_out, p_l_in, p_l_mid, p_h_in, p_h_mid;

  csd_mult #(.IW(DW+1), .SW(SW), .POS(CSD_M1_POS), .NEG(CSD_M1_NEG))
    u_l_out (.x(s_out), .p(p_l_out));
  csd_mult #(.IW(DW+1), .SW(SW), .POS(CSD_P2_POS), .NEG(CSD_P2_NEG))
    u_l_in  (.x(s_in),  .p(p_l_in));
  csd_mult #(.IW(DW+1), .SW(SW), .POS(CSD_P6_POS), .NEG(CSD_P6_NEG))
    u_l_mid (.x(c_ext), .p(p_l_mid));
  csd_mult #(.IW(DW+1), .SW(SW), .POS(CSD_M1_POS), .NEG(CSD_M1_NEG))
    u_h_in  (.x(s_in),  .p(p_h_in));
  csd_mult #(.IW(DW+1), .SW(SW), .POS(CSD_P2_POS), .NEG(CSD_P2_NEG))
    u_h_mid (.x(c_ext), .p(p_h_mid));

  logic signed [AW-1:0] l_acc, h_acc, l_rnd, h_rnd;
  logic signed [DW-1:0] l_sat, h_sat;

  localparam logic signed [AW-1:0] SAT_MAX = AW'((64'sd1 <<< (DW-1)) - 1);
  localparam logic signed [AW-1:0] SAT_MIN = -AW'(64'sd1 <<< (DW-1));

  always_comb begin
    l_acc = AW'(p_l_out) + AW'(p_l_in) + AW'(p_l_mid);
    h_acc = AW'(p_h_in) + AW'(p_h_mid);
    l_rnd = (l_acc + AW'(1 << (LP_SHIFT-1))) >>> LP_SHIFT;
    h_rnd = (h_acc + AW'(1 << (HP_SHIFT-1))) >>> HP_SHIFT;
    if      (l_rnd > SAT_MAX) l_sat = SAT_MAX[DW-1:0];
    else if (l_rnd < SAT_MIN) l_sat = SAT_MIN[DW-1:0];
    else                      l_sat = l_rnd[DW-1:0];
    if      (h_rnd > SAT_MAX) h_sat = SAT_MAX[DW-1:0];
    else if (h_rnd < SAT_MIN) h_sat = SAT_MIN[DW-1:0];
    else                      h_sat = h_rnd[DW-1:0];
  end

  // Position of the window centre: the fifth sample of a line completes the
  // first window, centred on sample 0.
  logic [PW-1:0] pos;
  assign pos = cnt - PW'(5);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_hi    <= 1'b0;
      out_pos   <= '0;
      out_data  <= '0;
    end else begin
      out_valid <= upd && (cnt >= PW'(5));
      if (upd) begin
        out_hi   <= pos[0];
        out_pos  <= pos;
        out_data <= pos[0] ? h_sat : l_sat;
      end
    end
  end

  // A line start can only come with a sample.
  assert property (@(posedge clk) in_first |-> in_valid)
    else $error("dwt53_1d: in_first without in_valid");

endmodule
