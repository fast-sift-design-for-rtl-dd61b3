// gaussian_pyramid: the four layer-parallel scales of one octave and their
// three difference-of-Gaussian (DoG) layers, all from one integral image.
//
// Instead of blurring each scale from the one below, every scale is a single
// merged kernel applied to the octave's base image, so all four scales (and
// the DoG layers between them) come out for the same pixel in the same cycle.
// Each kernel is a sum of centred square boxes of sizes 3, 5 and 7, and each
// box costs four integral-image corners:
//   scale 0 : 3x3 box                      (weight total  9)
//   scale 1 : 5x5 box + inner 3x3 box      (weight total 34, centre 2, ring 1)
//   scale 2 : 7x7 box + inner 5x5 box      (weight total 74)
//   scale 3 : 7x7 box                      (weight total 49)
// Scale 1 is the restructured 5x5 kernel of the text (1s with a 2-valued
// 3x3 centre); the text names box sizes 5, 7 and 3, and the split of those
// sizes over scales 0, 2 and 3 is this design's choice.  Each sum is
// normalised to 8 bits by a constant reciprocal, G = (S*round(2^16/N) + 2^15)
// >> 16, which a synthesiser turns into shifts and adds.
//
// The box sums are built in two steps.  Per input column word the block forms
// vertical strip differences V_h(c) = II(rf+h, c) - II(rf-h-1, c) for the
// filter row rf = r - ROW_LAG; eight column registers per h then give the box
// sum V_h(cf+h) - V_h(cf-h-1) for the filter column cf = c - 3.  Integral
// values above row 0 or left of column 0 read as zero.
//
// Interface: col_* from integral_image, taken when en && col_valid.  Output
// (registered, one cycle) is emitted for rf >= 0 and cf >= 0 only, tagged
// (rf, cf).  Holds when en is low.
module gaussian_pyramid
  import sift_pkg::*;
#(
  parameter int DEPTH   = 24,
  parameter int ROW_LAG = 9
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              en,
  input  logic                              col_valid,
  input  logic [DEPTH-1:0][II_W-1:0]        col_word,
  input  logic [COORD_W-1:0]                col_row,
  input  logic [COORD_W-1:0]                col_col,
  output logic                              out_valid,
  output logic [COORD_W-1:0]                out_row,
  output logic [COORD_W-1:0]                out_col,
  output logic [3:0][PIX_W-1:0]             out_g,
  output logic signed [2:0][DOG_W-1:0]      out_dog
);

  localparam int HMAX = 3;
  localparam int SR   = 2*HMAX + 2;       // columns c .. c-7
  localparam int SW   = 16;               // width of a box sum (7*7*255 < 2^14)

  // strip differences: vs[h-1][k] = V_h at column c-k
  logic [II_W-1:0] vs     [HMAX][SR];
  logic [II_W-1:0] vs_reg [HMAX][1:SR-1];
  logic [SW-1:0]   box    [HMAX];         // box[h-1] : (2h+1) x (2h+1) box sum

  function automatic logic [II_W-1:0] ii_at(input logic [DEPTH-1:0][II_W-1:0] w,
                                            input int idx, input logic [COORD_W-1:0] r);
    return (int'(r) >= idx) ? w[idx] : '0;
  endfunction

  always_comb begin
    for (int h = 1; h <= HMAX; h++) begin
      vs[h-1][0] = ii_at(col_word, ROW_LAG - h, col_row) - ii_at(col_word, ROW_LAG + h + 1, col_row);
      for (int k = 1; k < SR; k++)
        vs[h-1][k] = (int'(col_col) >= k) ? vs_reg[h-1][k] : '0;
      box[h-1] = SW'(vs[h-1][HMAX - h] - vs[h-1][HMAX + 1 + h]);
    end
  end

  always_ff @(posedge clk) begin
    if (en && col_valid) begin
      for (int h = 0; h < HMAX; h++) begin
        vs_reg[h][1] <= vs[h][0];
        for (int k = 2; k < SR; k++) vs_reg[h][k] <= vs_reg[h][k-1];
      end
    end
  end

  function automatic logic [PIX_W-1:0] norm(input logic [SW:0] s, input logic [15:0] recip);
    logic [SW+16:0] p;
    p = (SW+17)'(s) * (SW+17)'(recip) + (SW+17)'(32768);
    p = p >> 16;
    return (p > 255) ? 8'd255 : PIX_W'(p);
  endfunction

  logic [3:0][PIX_W-1:0] g;
  always_comb begin
    g[0] = norm({1'b0, box[0]},           16'd7282);   // 65536/9
    g[1] = norm({1'b0, box[1]} + box[0],  16'd1928);   // 65536/34
    g[2] = norm({1'b0, box[2]} + box[1],  16'd886);    // 65536/74
    g[3] = norm({1'b0, box[2]},           16'd1337);   // 65536/49
  end

  logic emit;
  assign emit = col_valid && (int'(col_row) >= ROW_LAG) && (int'(col_col) >= HMAX);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_row   <= '0;
      out_col   <= '0;
      out_g     <= '0;
      out_dog   <= '0;
    end else if (en) begin
      out_valid <= emit;
      if (emit) begin
        out_row <= col_row - COORD_W'(ROW_LAG);
        out_col <= col_col - COORD_W'(HMAX);
        out_g   <= g;
        for (int k = 0; k < 3; k++)
          out_dog[k] <= DOG_W'($signed({1'b0, g[k+1]}) - $signed({1'b0, g[k]}));
      end
    end
  end

endmodule
