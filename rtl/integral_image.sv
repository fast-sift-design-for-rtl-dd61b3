// integral_image: streaming integral image with a column-organised row buffer.
//
// For each accepted pixel p(r,c) the block forms the running row sum
// s(r,c) = s(r,c-1) + p and the integral value II(r,c) = II(r-1,c) + s(r,c).
// It keeps only the newest DEPTH integral rows, not the frame: the buffer has
// one word per column, and each word holds that column's last DEPTH integral
// values, newest in slot 0.  Writing a pixel reads the word of its column,
// shifts the new value in and writes it back, so one read and one write per
// pixel give the filters a whole column of rows at once.
//
// Values are kept modulo 2**II_W (sift_pkg); box sums formed from four corners
// stay exact as long as they are below 2**II_W.  Row 0 takes II(-1,c) = 0;
// slots older than the current frame still hold stale values, and the
// readers mask every slot above row 0 themselves.
//
// Keeping a few rows of integral image instead of a frame follows the text;
// the column-word layout, the depth and the modular width are this design's
// choices.
//
// Interface: pixels come tagged with raster coordinates and are taken when
// en && in_valid.  col_* is registered (one cycle latency) and carries the
// updated column word of the pixel just written.  rd_col / rd_word is an
// asynchronous second read port used by stage two while stage one is
// stalled; last_row / last_col say which pixel was written last, so the
// reader knows whether a column already holds the current row.
module integral_image
  import sift_pkg::*;
#(
  parameter int IMG_W = 640,
  parameter int DEPTH = 24
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         en,
  input  logic                         in_valid,
  input  logic [PIX_W-1:0]             in_pix,
  input  logic [COORD_W-1:0]           in_row,
  input  logic [COORD_W-1:0]           in_col,
  output logic                         col_valid,
  output logic [DEPTH-1:0][II_W-1:0]   col_word,
  output logic [COORD_W-1:0]           col_row,
  output logic [COORD_W-1:0]           col_col,
  input  logic [COORD_W-1:0]           rd_col,
  output logic [DEPTH-1:0][II_W-1:0]   rd_word,
  output logic [COORD_W-1:0]           last_row,
  output logic [COORD_W-1:0]           last_col
);

  logic [DEPTH-1:0][II_W-1:0] mem [IMG_W];
  // column addresses trimmed to the buffer's address width
  localparam int AW = $clog2(IMG_W);
  logic [AW-1:0] wa, ra;
  assign wa = in_col[AW-1:0];
  assign ra = rd_col[AW-1:0];

  logic [II_W-1:0]            row_sum;
  logic [DEPTH-1:0][II_W-1:0] old_word, new_word;
  logic [II_W-1:0]            s_new, ii_above;

  always_comb begin
    old_word = mem[wa];
    s_new    = ((in_col == '0) ? '0 : row_sum) + II_W'(in_pix);
    ii_above = (in_row == '0) ? '0 : old_word[0];
    new_word = {old_word[DEPTH-2:0], ii_above + s_new};
  end

  assign rd_word = mem[ra];

  always_ff @(posedge clk) begin
    if (en && in_valid) mem[wa] <= new_word;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row_sum   <= '0;
      col_valid <= 1'b0;
      col_word  <= '0;
      col_row   <= '0;
      col_col   <= '0;
      last_row  <= '0;
      last_col  <= '0;
    end else if (en) begin
      col_valid <= in_valid;
      if (in_valid) begin
        row_sum  <= s_new;
        col_word <= new_word;
        col_row  <= in_row;
        col_col  <= in_col;
        last_row <= in_row;
        last_col <= in_col;
      end
    end
  end

endmodule
