// noise_smoothing: 3x3 binomial low-pass filter on the incoming pixel stream.
//
// Stage one of the engine smooths the frame before it builds the integral
// image.  The kernel is [1 2 1]^T x [1 2 1] / 16 (shifts and adds only); the
// kernel itself is this design's choice, the text only names the step.
// Two line buffers of IMG_W pixels hold the previous rows; three column
// registers hold the window.  Taps that fall above row 0 or left of column 0
// read as zero.
//
// Interface: a pixel is taken when en && in_valid, tagged with its raster
// coordinates.  The output for input (r, c) is the smoothed value centred on
// (r-1, c-1) but tagged (r, c), so the smoothed frame has the input's size and
// is shifted by one pixel down and right.  Latency one accepted cycle; when
// en is low every register holds (stage-one stall).
module noise_smoothing
  import sift_pkg::*;
#(
  parameter int IMG_W = 640
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic               in_valid,
  input  logic [PIX_W-1:0]   in_pix,
  input  logic [COORD_W-1:0] in_row,
  input  logic [COORD_W-1:0] in_col,
  output logic               out_valid,
  output logic [PIX_W-1:0]   out_pix,
  output logic [COORD_W-1:0] out_row,
  output logic [COORD_W-1:0] out_col
);

  logic [PIX_W-1:0] lb_top [IMG_W];   // row r-2
  logic [PIX_W-1:0] lb_mid [IMG_W];   // row r-1

  // window columns: index 0 = column c, 1 = c-1, 2 = c-2; each holds rows r-2, r-1, r
  logic [PIX_W-1:0] w_top [3];
  logic [PIX_W-1:0] w_mid [3];
  logic [PIX_W-1:0] w_bot [3];
  localparam int AW = $clog2(IMG_W);
  logic [AW-1:0] ca;   // line-buffer address
  assign ca = in_col[AW-1:0];

  logic [PIX_W-1:0] c1_top, c1_mid, c1_bot, c2_top, c2_mid, c2_bot;

  always_comb begin
    // current column from the line buffers, masked above the frame
    w_top[0] = (in_row >= 2) ? lb_top[ca] : '0;
    w_mid[0] = (in_row >= 1) ? lb_mid[ca] : '0;
    w_bot[0] = in_pix;
    // previous columns, masked left of the frame
    w_top[1] = (in_col >= 1) ? c1_top : '0;
    w_mid[1] = (in_col >= 1) ? c1_mid : '0;
    w_bot[1] = (in_col >= 1) ? c1_bot : '0;
    w_top[2] = (in_col >= 2) ? c2_top : '0;
    w_mid[2] = (in_col >= 2) ? c2_mid : '0;
    w_bot[2] = (in_col >= 2) ? c2_bot : '0;
  end

  logic [PIX_W+3:0] acc;
  always_comb begin
    acc = (PIX_W+4)'(w_top[0]) + (PIX_W+4)'(w_top[2]) + (PIX_W+4)'(w_bot[0]) + (PIX_W+4)'(w_bot[2])
        + ((PIX_W+4)'(w_top[1]) << 1) + ((PIX_W+4)'(w_bot[1]) << 1)
        + ((PIX_W+4)'(w_mid[0]) << 1) + ((PIX_W+4)'(w_mid[2]) << 1)
        + ((PIX_W+4)'(w_mid[1]) << 2);
  end

  always_ff @(posedge clk) begin
    if (en && in_valid) begin
      lb_top[ca] <= lb_mid[ca];
      lb_mid[ca] <= in_pix;
      c2_top <= c1_top;  c2_mid <= c1_mid;  c2_bot <= c1_bot;
      c1_top <= w_top[0]; c1_mid <= w_mid[0]; c1_bot <= in_pix;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_pix   <= '0;
      out_row   <= '0;
      out_col   <= '0;
    end else if (en) begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_pix <= PIX_W'((acc + 12'd8) >> 4);
        out_row <= in_row;
        out_col <= in_col;
      end
    end
  end

endmodule
