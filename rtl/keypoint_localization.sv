// keypoint_localization: decides whether a DoG sample is a feature point.
//
// The middle DoG layer is tested at every position with all tests in
// parallel; each test raises one bit of a 28-bit reject vector S, and the
// sample is a feature point when S == 0 (the layout of S follows the text):
//   S[25:0]  extremum: one bit per neighbour of the 3x3x3 DoG cube.  The
//            neighbours (layer, row, column), each 0..2 and centre (1,1,1)
//            skipped, are numbered in that order, and neighbour n sets
//            S[25-n] when the centre does not beat it: for a centre >= 0 it
//            must be strictly greater than every neighbour (maximum), for a
//            centre < 0 strictly smaller (minimum).
//   S[26]    edge response: rejects when Det(H) <= 0 or
//            Tr(H)^2 * r >= (r+1)^2 * Det(H), H the 2x2 Hessian of the centre.
//            Dxy is kept scaled by 4 and the test scaled by 16, so the
//            arithmetic is exact integers.
//   S[27]    low brightness: rejects when |DoG| < (2^8 - 1) * BRIGHT_PCT/100,
//            tested as 100*|DoG| < 255*BRIGHT_PCT.
// Picking max or min by the centre's sign and r = 10 are this design's choices.
// A point is also dropped when the 19x19 patch stage two needs around it would
// leave the octave's IMG_W x IMG_H grid (MARGIN pixels on each side).
//
// Two line buffers per DoG layer and three column registers form the cube.
// Input: DoG samples tagged (row, col) in raster order, taken when
// en && in_valid.  Output (registered) is the cube centre (row-1, col-1),
// its reject vector and out_cand.  Holds when en is low.
module keypoint_localization
  import sift_pkg::*;
#(
  parameter int IMG_W      = 640,
  parameter int IMG_H      = 480,
  parameter int MARGIN     = 10,
  parameter int EDGE_R     = 10,
  parameter int BRIGHT_PCT = 4
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         en,
  input  logic                         in_valid,
  input  logic [COORD_W-1:0]           in_row,
  input  logic [COORD_W-1:0]           in_col,
  input  logic signed [2:0][DOG_W-1:0] in_dog,
  output logic                         out_valid,
  output logic                         out_cand,
  output logic [COORD_W-1:0]           out_row,
  output logic [COORD_W-1:0]           out_col,
  output logic [27:0]                  out_s
);

  logic signed [DOG_W-1:0] lb_top [3][IMG_W];
  logic signed [DOG_W-1:0] lb_mid [3][IMG_W];
  localparam int AW = $clog2(IMG_W);
  logic [AW-1:0] ca;   // line-buffer address
  assign ca = in_col[AW-1:0];
  logic signed [DOG_W-1:0] c1 [3][3];   // [layer][row] at column col-1
  logic signed [DOG_W-1:0] c2 [3][3];   // column col-2
  logic signed [DOG_W-1:0] d  [3][3][3]; // [layer][row][column]

  always_comb begin
    for (int s = 0; s < 3; s++) begin
      d[s][0][2] = lb_top[s][ca];
      d[s][1][2] = lb_mid[s][ca];
      d[s][2][2] = in_dog[s];
      for (int y = 0; y < 3; y++) begin
        d[s][y][1] = c1[s][y];
        d[s][y][0] = c2[s][y];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (en && in_valid) begin
      for (int s = 0; s < 3; s++) begin
        lb_top[s][ca] <= lb_mid[s][ca];
        lb_mid[s][ca] <= in_dog[s];
        for (int y = 0; y < 3; y++) begin
          c2[s][y] <= c1[s][y];
          c1[s][y] <= d[s][y][2];
        end
      end
    end
  end

  // ---- the 28 tests -------------------------------------------------------
  logic signed [DOG_W-1:0] ctr;
  logic [27:0]             s_vec;
  logic signed [DOG_W+1:0] dxx, dyy, tr;
  logic signed [DOG_W+2:0] dxy4;
  logic signed [39:0]      det16, lhs, rhs;
  logic [DOG_W-1:0]        mag;

  always_comb begin
    int n;
    ctr = d[1][1][1];
    n = 0;
    s_vec = '0;
    for (int s = 0; s < 3; s++)
      for (int y = 0; y < 3; y++)
        for (int x = 0; x < 3; x++)
          if (!(s == 1 && y == 1 && x == 1)) begin
            s_vec[25-n] = (ctr >= 0) ? !(ctr > d[s][y][x]) : !(ctr < d[s][y][x]);
            n++;
          end
    dxx   = (DOG_W+2)'(d[1][1][2]) + (DOG_W+2)'(d[1][1][0]) - ((DOG_W+2)'(ctr) <<< 1);
    dyy   = (DOG_W+2)'(d[1][2][1]) + (DOG_W+2)'(d[1][0][1]) - ((DOG_W+2)'(ctr) <<< 1);
    dxy4  = (DOG_W+3)'(d[1][2][2]) - (DOG_W+3)'(d[1][2][0]) - (DOG_W+3)'(d[1][0][2]) + (DOG_W+3)'(d[1][0][0]);
    tr    = dxx + dyy;
    det16 = 40'sd16 * 40'(dxx) * 40'(dyy) - 40'(dxy4) * 40'(dxy4);
    lhs   = 40'sd16 * 40'(tr) * 40'(tr) * 40'(EDGE_R);
    rhs   = 40'(EDGE_R + 1) * 40'(EDGE_R + 1) * det16;
    s_vec[26] = (det16 <= 0) || (lhs >= rhs);
    mag   = (ctr < 0) ? DOG_W'(-ctr) : DOG_W'(ctr);
    s_vec[27] = (32'(mag) * 32'd100) < (32'd255 * 32'(BRIGHT_PCT));
  end

  logic             centre_ok, in_margin;
  logic [COORD_W-1:0] crow, ccol;
  assign crow      = in_row - 1'b1;
  assign ccol      = in_col - 1'b1;
  assign centre_ok = in_valid && (in_row >= 2) && (in_col >= 2);
  assign in_margin = (int'(crow) >= MARGIN) && (int'(crow) <= IMG_H - MARGIN) &&
                     (int'(ccol) >= MARGIN) && (int'(ccol) <= IMG_W - MARGIN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_cand  <= 1'b0;
      out_row   <= '0;
      out_col   <= '0;
      out_s     <= '0;
    end else if (en) begin
      out_valid <= centre_ok;
      out_cand  <= centre_ok && in_margin && (s_vec == '0);
      if (centre_ok) begin
        out_row <= crow;
        out_col <= ccol;
        out_s   <= s_vec;
      end
    end
  end

endmodule
