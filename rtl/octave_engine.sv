// octave_engine: stage one of the engine for one octave.
//
// A chain of integral_image -> gaussian_pyramid -> keypoint_localization.
// Pixels of the octave's base image go in; out come all four Gaussian scales
// of every pixel (scale 3 feeds the next octave's down-sampler), and a
// feature-point candidate flag for every DoG sample.  All scales and DoG
// layers of a pixel are produced in the same cycle, so the octave needs only
// DEPTH rows of integral image and two rows per DoG layer, never a frame.
//
// The chain and the all-scales-at-once schedule follow the text; the row
// lag between integral image and filters (ROW_LAG) is this design's choice.
//
// The octave's integral buffer stays readable through rd_col / rd_word so
// that stage two can recompute a patch while the whole of stage one is held
// by en = 0.
//
// Latency from an accepted pixel (r, c): scales for (r-ROW_LAG, c-3) leave
// two accepted cycles later; the candidate decision for (r-ROW_LAG-1, c-4)
// leaves three accepted cycles later.
module octave_engine
  import sift_pkg::*;
#(
  parameter int IMG_W   = 640,
  parameter int IMG_H   = 480,
  parameter int DEPTH   = 24,
  parameter int ROW_LAG = 9
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         en,
  input  logic                         in_valid,
  input  logic [PIX_W-1:0]             in_pix,
  input  logic [COORD_W-1:0]           in_row,
  input  logic [COORD_W-1:0]           in_col,
  // Gaussian scales of one pixel
  output logic                         g_valid,
  output logic [COORD_W-1:0]           g_row,
  output logic [COORD_W-1:0]           g_col,
  output logic [3:0][PIX_W-1:0]        g_pix,
  // keypoint decision
  output logic                         kp_valid,
  output logic                         kp_cand,
  output logic [COORD_W-1:0]           kp_row,
  output logic [COORD_W-1:0]           kp_col,
  output logic [27:0]                  kp_s,
  // integral buffer access for stage two
  input  logic [COORD_W-1:0]           rd_col,
  output logic [DEPTH-1:0][II_W-1:0]   rd_word,
  output logic [COORD_W-1:0]           last_row,
  output logic [COORD_W-1:0]           last_col
);

  logic                         c_valid;
  logic [DEPTH-1:0][II_W-1:0]   c_word;
  logic [COORD_W-1:0]           c_row, c_col;
  logic signed [2:0][DOG_W-1:0] dog;

  integral_image #(.IMG_W(IMG_W), .DEPTH(DEPTH)) u_ii (
    .clk, .rst_n, .en, .in_valid, .in_pix, .in_row, .in_col,
    .col_valid(c_valid), .col_word(c_word), .col_row(c_row), .col_col(c_col),
    .rd_col, .rd_word, .last_row, .last_col
  );

  gaussian_pyramid #(.DEPTH(DEPTH), .ROW_LAG(ROW_LAG)) u_gp (
    .clk, .rst_n, .en,
    .col_valid(c_valid), .col_word(c_word), .col_row(c_row), .col_col(c_col),
    .out_valid(g_valid), .out_row(g_row), .out_col(g_col), .out_g(g_pix), .out_dog(dog)
  );

  keypoint_localization #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_kl (
    .clk, .rst_n, .en,
    .in_valid(g_valid), .in_row(g_row), .in_col(g_col), .in_dog(dog),
    .out_valid(kp_valid), .out_cand(kp_cand), .out_row(kp_row), .out_col(kp_col), .out_s(kp_s)
  );

endmodule
