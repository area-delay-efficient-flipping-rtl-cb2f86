// dwt2d_flip: one-level 2-D CDF 9/7 DWT of an IMG_W x IMG_H image, built from
// three flipping 1-D units (flip_dwt1d) with fixed-width PEB Booth multipliers.
//
// Data flow. Pixels arrive in raster order, two horizontally adjacent pixels
// per cycle (pix_a = p[r][2k], pix_b = p[r][2k+1]), from an external frame
// buffer. Each pixel is level-shifted by -2^(PIX_W-1) and aligned to the DW-bit
// word by PIX_SHIFT = DW-PIX_W-6 bits (left if positive, right if negative),
// which leaves six bits of headroom for the gain of about 37 of the r4 stage.
//
//  * The row unit (DEPTH 1) filters each row; pix_a takes the role of x(2n-1)
//    and pix_b of x(2n); its delays are treated as zero at the start of each
//    row. It yields one low (L) and one high (H) coefficient per cycle.
//  * Row outputs of even rows are written into a line buffer of IMG_W/2
//    (L,H) entries. During odd rows the buffered even-row value and the new
//    odd-row value of the same column form one input pair for the columns:
//    the even-row value takes the role of x(2n-1), the odd-row one of x(2n).
//  * Two column units process the L and the H columns. Their delays are
//    IMG_W/2-entry memories addressed by the column index, so each unit runs
//    the IMG_W/2 column recursions interleaved; their delays read as zero for
//    the first row pair of the frame.
//
// Outputs: during odd rows one (LL, LH, HL, HH) quadruple per cycle with
// out_valid, two cycles after the input pair, tagged with the row pair index
// out_row and the column index out_col. Inside a row (column) the high band
// output is one position behind the low band, as in the 1-D unit. Average
// throughput is two inputs and two outputs per cycle; in_valid may be held
// low at any time to pause the stream.
//
// The flipping units and their arithmetic follow the document's structure.
// How the 2-D structure is organised (line buffer, interleaved column units),
// the pixel alignment, the zero start and the wrap-around on overflow are
// this design's choices; block size is 2 (two pixels per cycle).
module dwt2d_flip
  import dwt_pkg::*;
#(
  parameter int DW    = 12,
  parameter int PIX_W = 8,
  parameter int IMG_W = 512,
  parameter int IMG_H = 512,
  localparam int CW   = $clog2(IMG_W / 2),
  localparam int RW   = $clog2(IMG_H)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [PIX_W-1:0] pix_a,
  input  logic [PIX_W-1:0] pix_b,
  output logic             out_valid,
  output logic [RW-2:0]    out_row,
  output logic [CW-1:0]    out_col,
  output logic [DW-1:0]    ll,
  output logic [DW-1:0]    lh,
  output logic [DW-1:0]    hl,
  output logic [DW-1:0]    hh,
  output logic             frame_done
);

  localparam int PIX_SHIFT = DW - PIX_W - 6;
  localparam int NCOL      = IMG_W / 2;

  // ---------------------------------------------------------------- input
  logic [DW-1:0] xa, xb;

  function automatic logic [DW-1:0] align(input logic [PIX_W-1:0] p);
    logic signed [PIX_W:0]  v;
    logic signed [DW+PIX_W:0] w;
    v = $signed({1'b0, p}) - $signed((PIX_W+1)'(1) << (PIX_W - 1));
    w = (DW+PIX_W+1)'(v);
    if (PIX_SHIFT >= 0) w = w <<< PIX_SHIFT;
    else                w = w >>> (-PIX_SHIFT);
    return w[DW-1:0];
  endfunction

  assign xa = align(pix_a);
  assign xb = align(pix_b);

  // Position of the incoming pair.
  logic [CW-1:0] in_col;
  logic [RW-1:0] in_row;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_col <= '0;
      in_row <= '0;
    end else if (in_valid) begin
      if (in_col == CW'(NCOL - 1)) begin
        in_col <= '0;
        in_row <= (in_row == RW'(IMG_H - 1)) ? '0 : in_row + 1'b1;
      end else begin
        in_col <= in_col + 1'b1;
      end
    end
  end

  // -------------------------------------------------------------- row unit
  logic          row_valid;
  logic [DW-1:0] row_l, row_h;
  logic [CW-1:0] row_col;
  logic [RW-1:0] row_row;

  flip_dwt1d #(.DW(DW), .DEPTH(1)) u_row (
    .clk, .rst_n,
    .en       (in_valid),
    .first    (in_col == '0),
    .slot     (1'b0),
    .x_2n     (xb),
    .x_2n_1   (xa),
    .out_valid(row_valid),
    .v_l      (row_l),
    .v_h      (row_h)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row_col <= '0;
      row_row <= '0;
    end else if (in_valid) begin
      row_col <= in_col;
      row_row <= in_row;
    end
  end

  // ----------------------------------------------------------- line buffer
  logic [DW-1:0] lbuf_l [NCOL];
  logic [DW-1:0] lbuf_h [NCOL];
  logic          odd_row;

  assign odd_row = row_row[0];

  always_ff @(posedge clk) begin
    if (row_valid && !odd_row) begin
      lbuf_l[row_col] <= row_l;
      lbuf_h[row_col] <= row_h;
    end
  end

  // ---------------------------------------------------------- column units
  logic          col_en, col_first;
  logic          col_l_valid, col_h_valid;
  logic [DW-1:0] even_l, even_h;

  assign col_en    = row_valid && odd_row;
  assign col_first = (row_row[RW-1:1] == '0);
  assign even_l    = lbuf_l[row_col];
  assign even_h    = lbuf_h[row_col];

  flip_dwt1d #(.DW(DW), .DEPTH(NCOL)) u_col_l (
    .clk, .rst_n,
    .en       (col_en),
    .first    (col_first),
    .slot     (row_col),
    .x_2n     (row_l),
    .x_2n_1   (even_l),
    .out_valid(col_l_valid),
    .v_l      (ll),
    .v_h      (lh)
  );

  flip_dwt1d #(.DW(DW), .DEPTH(NCOL)) u_col_h (
    .clk, .rst_n,
    .en       (col_en),
    .first    (col_first),
    .slot     (row_col),
    .x_2n     (row_h),
    .x_2n_1   (even_h),
    .out_valid(col_h_valid),
    .v_l      (hl),
    .v_h      (hh)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_row    <= '0;
      out_col    <= '0;
      frame_done <= 1'b0;
    end else begin
      frame_done <= 1'b0;
      if (col_en) begin
        out_row    <= row_row[RW-1:1];
        out_col    <= row_col;
        frame_done <= (row_row == RW'(IMG_H - 1)) && (row_col == CW'(NCOL - 1));
      end
    end
  end

  assign out_valid = col_l_valid;

  // Both column units are driven by the same enable.
  assert property (@(posedge clk) disable iff (!rst_n) col_l_valid == col_h_valid);

endmodule
