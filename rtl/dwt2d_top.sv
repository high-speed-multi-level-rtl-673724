// dwt2d_top: multi-level two-dimensional 5/3 discrete wavelet transform of an
// N x N image, built around one CSD 1-D DWT unit that scans the image line
// by line.
//
// Each level is done in two passes over the current low-low region of size
// m x m (m = N at level 0, halved at every level):
//   row pass    - every row of the frame buffer is read, extended by two
//                 mirrored samples at each end, and transformed; low-pass
//                 results go to columns 0..m/2-1 and high-pass results to
//                 columns m/2..m-1 of the same row of the row buffer;
//   column pass - every column of the row buffer is read the same way and
//                 transformed; low-pass results go to rows 0..m/2-1 and
//                 high-pass results to rows m/2..m-1 of the frame buffer.
// After the column pass the frame buffer holds the four sub-bands of the
// level in the usual quadrant layout: LL top left, HL top right (horizontal
// high-pass), LH bottom left, HH bottom right. The next level transforms the
// LL quadrant again, so after LEVELS levels the frame buffer holds the whole
// multi-level decomposition in place.
//
// Boundaries use whole-sample symmetric extension (x[-1] = x[1],
// x[m] = x[m-2]), done by the read address generator, so the 1-D unit only
// sees a plain stream of m+4 samples per line. Lines follow one another
// without gaps; between passes the controller waits PIPE_DRAIN cycles so the
// last results are written before the next pass reads them.
//
// Interface: while idle, load_en writes pixel load_pix (unsigned, PIX_W bits)
// at (load_row, load_col), and rd_row/rd_col read the coefficient there,
// returned signed on rd_data one cycle later. A start pulse while idle runs
// all levels; busy is high meanwhile and done pulses for one cycle at the end.
// level shows the level being computed. Host writes and reads are ignored
// while busy.
// Timing: a level of size m takes 2*(m*(m+4) + PIPE_DRAIN) cycles, plus one
// cycle to leave idle.
// The CSD 1-D unit and the multi-level line-scanning scheme follow the
// published architecture; the frame buffer organisation, the in-place quadrant layout, the
// boundary extension, the image size and the number of levels are this
// design's choices.
module dwt2d_top
  import dwt_pkg::*;
#(
  parameter int unsigned N      = 512,  // image width and height, power of two
  parameter int unsigned LEVELS = 3,    // decomposition levels
  parameter int unsigned PIX_W  = 8,    // input pixel width (unsigned)
  parameter int unsigned DW     = 16,   // coefficient width (signed)
  localparam int unsigned LW    = $clog2(N),
  localparam int unsigned LVW   = $clog2(LEVELS + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // pixel load (idle only)
  input  logic                 load_en,
  input  logic [LW-1:0]        load_row,
  input  logic [LW-1:0]        load_col,
  input  logic [PIX_W-1:0]     load_pix,
  // control
  input  logic                 start,
  output logic                 busy,
  output logic                 done,
  output logic [LVW-1:0]       level,
  // coefficient read-out (idle only, one cycle latency)
  input  logic [LW-1:0]        rd_row,
  input  logic [LW-1:0]        rd_col,
  output logic signed [DW-1:0] rd_data
);

  localparam int unsigned AW    = 2 * LW;
  localparam int unsigned DEPTH = N * N;
  localparam int unsigned PW    = LW + 2;  // holds m + 4

  if ((1 << LW) != N) begin : gen_chk_pow2
    $error("dwt2d_top: N must be a power of two");
  end
  if ((N >> (LEVELS - 1)) < 4) begin : gen_chk_levels
    $error("dwt2d_top: the last level must still be at least 4 x 4");
  end

  // ------------------------------------------------------------------
  // Controller
  // ------------------------------------------------------------------
  dwt_state_e    state;
  logic [LW:0]   m;        // size of the region being transformed
  logic [LW-1:0] line;     // line being read
  logic [PW-1:0] j;        // sample of the extended line being read
  logic [1:0]    drain;
  logic [LW-1:0] wb_line;  // line whose results are being written

  logic          issue, row_pass, col_pass, line_end;
  int            jj;
  logic [LW-1:0] idx;

  assign issue    = (state == S_ROW) || (state == S_COL);
  assign row_pass = (state == S_ROW) || (state == S_ROW_DRAIN);
  assign col_pass = (state == S_COL) || (state == S_COL_DRAIN);
  assign line_end = (j == PW'(m + 3));

  always_comb begin
    jj       = int'(j) - 2;
    idx      = LW'(mirror_index(jj, int'(m)));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      level <= '0;
      m     <= (LW+1)'(N);
      line  <= '0;
      j     <= '0;
      drain <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          state <= S_ROW;
          level <= '0;
          m     <= (LW+1)'(N);
          line  <= '0;
          j     <= '0;
        end
        S_ROW, S_COL: begin
          if (line_end) begin
            j <= '0;
            if (line == LW'(m - 1'b1)) begin
              line  <= '0;
              drain <= '0;
              state <= (state == S_ROW) ? S_ROW_DRAIN : S_COL_DRAIN;
            end else begin
              line <= line + 1'b1;
            end
          end else begin
            j <= j + 1'b1;
          end
        end
        S_ROW_DRAIN: begin
          drain <= drain + 1'b1;
          if (drain == 2'(PIPE_DRAIN - 1)) state <= S_COL;
        end
        S_COL_DRAIN: begin
          drain <= drain + 1'b1;
          if (drain == 2'(PIPE_DRAIN - 1)) begin
            if (level == LVW'(LEVELS - 1)) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              state <= S_ROW;
              level <= level + 1'b1;
              m     <= m >> 1;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // ------------------------------------------------------------------
  // Memories
  // ------------------------------------------------------------------
  logic                 core_valid, core_hi;
  logic [PW-1:0]        core_pos;
  logic signed [DW-1:0] core_in, core_data;

  logic          fm_we, fm_re, tm_we;
  logic [AW-1:0] fm_waddr, fm_raddr, tm_waddr, tm_raddr;
  logic [DW-1:0] fm_wdata, fm_rdata, tm_rdata;

  frame_mem #(.W(DW), .DEPTH(DEPTH), .AW(AW)) u_frame (
    .clk, .we(fm_we), .waddr(fm_waddr), .wdata(fm_wdata),
    .re(fm_re), .raddr(fm_raddr), .rdata(fm_rdata)
  );

  frame_mem #(.W(DW), .DEPTH(DEPTH), .AW(AW)) u_rowbuf (
    .clk, .we(tm_we), .waddr(tm_waddr), .wdata(core_data),
    .re(issue && col_pass), .raddr(tm_raddr), .rdata(tm_rdata)
  );

  // Read side: rows of the frame buffer, or columns of the row buffer.
  assign fm_re    = busy ? (issue && row_pass) : 1'b1;
  assign fm_raddr = busy ? {line, idx} : {rd_row, rd_col};
  assign tm_raddr = {idx, line};
  assign rd_data  = signed'(fm_rdata);

  // Read data arrives one cycle after the address.
  logic iss_v, iss_first, iss_col;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      iss_v     <= 1'b0;
      iss_first <= 1'b0;
      iss_col   <= 1'b0;
    end else begin
      iss_v     <= issue;
      iss_first <= issue && (j == '0);
      iss_col   <= col_pass;
    end
  end

  // ------------------------------------------------------------------
  // CSD 1-D DWT unit
  // ------------------------------------------------------------------
  assign core_in = signed'(iss_col ? tm_rdata : fm_rdata);

  dwt53_1d #(.DW(DW), .PW(PW)) u_dwt1d (
    .clk, .rst_n,
    .in_valid(iss_v), .in_first(iss_first), .in_data(core_in),
    .out_valid(core_valid), .out_hi(core_hi), .out_pos(core_pos),
    .out_data(core_data)
  );

  // ------------------------------------------------------------------
  // Write-back: low-pass results to the first half of the line, high-pass
  // results to the second half.
  // ------------------------------------------------------------------
  logic [LW-1:0] dest;
  assign dest = core_hi ? LW'((m >> 1) + (LW+1)'(core_pos >> 1))
                        : LW'(core_pos >> 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wb_line <= '0;
    end else if (state == S_IDLE ||
                 (state == S_ROW_DRAIN && drain == 2'(PIPE_DRAIN - 1)) ||
                 (state == S_COL_DRAIN && drain == 2'(PIPE_DRAIN - 1))) begin
      wb_line <= '0;  // a new pass starts
    end else if (core_valid && core_pos == PW'(m - 1'b1)) begin
      wb_line <= wb_line + 1'b1;
    end
  end

  assign tm_we    = core_valid && row_pass;
  assign tm_waddr = {wb_line, dest};

  always_comb begin
    if (busy) begin
      fm_we    = core_valid && col_pass;
      fm_waddr = {dest, wb_line};
      fm_wdata = core_data;
    end else begin
      fm_we    = load_en;
      fm_waddr = {load_row, load_col};
      fm_wdata = DW'(load_pix);
    end
  end

endmodule
