// dwt_pkg: types, constants and small helpers shared by the 5/3 DWT datapath
// and its controller.
//
// The 5/3 (LeGall) analysis filters are applied in convolution form. With the
// coefficients scaled to integers they read
//   low pass  h * 8 = { -1,  2,  6,  2, -1 }   (taps x[n-2] .. x[n+2])
//   high pass g * 2 = { -1,  2, -1 }           (taps x[n-1] .. x[n+1])
// Every scaled coefficient is held as a canonic signed digit (CSD) pair of
// masks: bit i of POS adds x*2^i, bit i of NEG subtracts x*2^i. No two
// neighbouring digits are non-zero, which is the canonic property.
//   -1 = 0,0,0,-1      ->  POS 4'b0000, NEG 4'b0001
//    2 = 0,0,1,0       ->  POS 4'b0010, NEG 4'b0000
//    6 = 1,0,-1,0      ->  POS 4'b1000, NEG 4'b0010   (8 - 2)
// The filter values are the standard 5/3 wavelet; the integer scaling, the
// rounding and the saturation below are choices of this design.
package dwt_pkg;

  // Number of CSD digit positions used for the scaled filter coefficients.
  localparam int unsigned CSD_DIGITS = 4;

  localparam logic [CSD_DIGITS-1:0] CSD_M1_POS = 4'b0000;  // -1
  localparam logic [CSD_DIGITS-1:0] CSD_M1_NEG = 4'b0001;
  localparam logic [CSD_DIGITS-1:0] CSD_P2_POS = 4'b0010;  // +2
  localparam logic [CSD_DIGITS-1:0] CSD_P2_NEG = 4'b0000;
  localparam logic [CSD_DIGITS-1:0] CSD_P6_POS = 4'b1000;  // +6 = 8 - 2
  localparam logic [CSD_DIGITS-1:0] CSD_P6_NEG = 4'b0010;

  // Right shifts that undo the coefficient scaling (8 for h, 2 for g).
  localparam int unsigned LP_SHIFT = 3;
  localparam int unsigned HP_SHIFT = 1;

  // Cycles from the last memory read of a pass to the write of its last
  // coefficient: memory read register, delay line, output register.
  localparam int unsigned PIPE_DRAIN = 3;

  // Controller states of the multi-level 2-D transform.
  typedef enum logic [2:0] {
    S_IDLE      = 3'd0,
    S_ROW       = 3'd1,   // horizontal pass: read rows of the frame buffer
    S_ROW_DRAIN = 3'd2,
    S_COL       = 3'd3,   // vertical pass: read columns of the row-result buffer
    S_COL_DRAIN = 3'd4
  } dwt_state_e;

  // Whole-sample symmetric extension of a line of length m: index -1 maps
  // to 1, index m maps to m-2. Valid for -2 <= j <= m+1 and m >= 3.
  function automatic int mirror_index(input int j, input int m);
    if (j < 0)       return -j;
    else if (j >= m) return 2 * m - 2 - j;
    else             return j;
  endfunction

endpackage
