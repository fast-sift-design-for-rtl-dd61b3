// sift_top: real-time SIFT feature extraction engine, two octaves by four
// scales, with on-the-fly stage one and a stall-based stage two.
//
// Stage one streams the frame in raster order, one pixel per accepted cycle:
// noise_smoothing feeds octave 0 (octave_engine); scale 3 of octave 0,
// decimated to every second row and column, is the base image of octave 1,
// which runs on the same clock at a quarter of the pixel rate.  Both octaves
// compute all scales, DoG layers and keypoint tests for a pixel in the same
// cycle, from a few rows of integral image.
//
// Stage two runs only when stage one finds a feature point.  A candidate
// stops the whole of stage one (in_ready drops and every stage-one register
// holds), orientation_assignment recomputes the patch from that octave's
// integral buffer and finds the dominant orientation, the record goes into
// output_buffer, and stage one resumes.  If both octaves flag a point in the
// same cycle, octave 0 is served first.  Stage two does not compute the
// local descriptor; the record carries position, octave and
// orientation.  The two-octave, four-scale layout, the two-stage schedule
// and the stall follow the text; serving order, the decimation phase, the
// handshakes and the record format are this design's choices.
//
// Coordinates: octave 0 positions are in the smoothed grid, which is the
// input grid shifted by one pixel (input pixel = reported - 1); octave 1
// positions are in its own half-size grid.
//
// Interface: in_valid / in_ready / in_pix carry the frame, IMG_W x IMG_H,
// row after row, with no side-band: the first pixel after reset is the
// top-left one.  kp_valid / kp_ready / kp deliver feature points.
module sift_top
  import sift_pkg::*;
#(
  parameter int IMG_W      = 640,
  parameter int IMG_H      = 480,
  parameter int DEPTH      = 24,
  parameter int ROW_LAG    = 9,
  parameter int FIFO_DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [PIX_W-1:0] in_pix,
  output logic             kp_valid,
  input  logic             kp_ready,
  output keypoint_t        kp,
  output logic             stall
);

  logic en;
  assign en       = !stall;
  assign in_ready = en;

  // ---- raster position of the incoming pixel ------------------------------
  logic [COORD_W-1:0] in_row, in_col;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_row <= '0;
      in_col <= '0;
    end else if (in_valid && in_ready) begin
      if (in_col == COORD_W'(IMG_W-1)) begin
        in_col <= '0;
        in_row <= (in_row == COORD_W'(IMG_H-1)) ? '0 : in_row + 1'b1;
      end else begin
        in_col <= in_col + 1'b1;
      end
    end
  end

  // ---- stage one ------------------------------------------------------------
  logic               s_valid;
  logic [PIX_W-1:0]   s_pix;
  logic [COORD_W-1:0] s_row, s_col;

  noise_smoothing #(.IMG_W(IMG_W)) u_ns (
    .clk, .rst_n, .en, .in_valid, .in_pix, .in_row, .in_col,
    .out_valid(s_valid), .out_pix(s_pix), .out_row(s_row), .out_col(s_col)
  );

  logic                       g0_valid, g1_valid;
  logic [COORD_W-1:0]         g0_row, g0_col, g1_row, g1_col;
  logic [3:0][PIX_W-1:0]      g0_pix, g1_pix;
  logic                       k0_valid, k0_cand, k1_valid, k1_cand;
  logic [COORD_W-1:0]         k0_row, k0_col, k1_row, k1_col;
  logic [27:0]                k0_s, k1_s;
  logic [COORD_W-1:0]         rd_col;
  logic [DEPTH-1:0][II_W-1:0] rd_word0, rd_word1;
  logic [COORD_W-1:0]         last_row0, last_col0, last_row1, last_col1;

  octave_engine #(.IMG_W(IMG_W), .IMG_H(IMG_H), .DEPTH(DEPTH), .ROW_LAG(ROW_LAG)) u_oct0 (
    .clk, .rst_n, .en,
    .in_valid(s_valid), .in_pix(s_pix), .in_row(s_row), .in_col(s_col),
    .g_valid(g0_valid), .g_row(g0_row), .g_col(g0_col), .g_pix(g0_pix),
    .kp_valid(k0_valid), .kp_cand(k0_cand), .kp_row(k0_row), .kp_col(k0_col), .kp_s(k0_s),
    .rd_col, .rd_word(rd_word0), .last_row(last_row0), .last_col(last_col0)
  );

  // down-sample scale 3 of octave 0 by four: keep even rows and even columns
  logic d_valid;
  assign d_valid = g0_valid && !g0_row[0] && !g0_col[0];

  octave_engine #(.IMG_W(IMG_W/2), .IMG_H(IMG_H/2), .DEPTH(DEPTH), .ROW_LAG(ROW_LAG)) u_oct1 (
    .clk, .rst_n, .en,
    .in_valid(d_valid), .in_pix(g0_pix[3]), .in_row(g0_row >> 1), .in_col(g0_col >> 1),
    .g_valid(g1_valid), .g_row(g1_row), .g_col(g1_col), .g_pix(g1_pix),
    .kp_valid(k1_valid), .kp_cand(k1_cand), .kp_row(k1_row), .kp_col(k1_col), .kp_s(k1_s),
    .rd_col, .rd_word(rd_word1), .last_row(last_row1), .last_col(last_col1)
  );

  // ---- stage-two control -----------------------------------------------------
  logic srv0, srv1, sel, ori_start, ori_busy, ori_valid, ori_ready;
  logic pend0, pend1;
  logic [BIN_W-1:0]  ori_bin;
  logic [HIST_W-1:0] ori_peak;
  logic [COORD_W-1:0] cen_row, cen_col;
  keypoint_t          ori_kp;
  logic               serving;

  assign pend0 = k0_cand && !srv0;
  assign pend1 = k1_cand && !srv1;
  assign stall = pend0 || pend1;

  // a new point is started when stage two is free and nothing is in flight
  assign ori_start = !serving && (pend0 || pend1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      srv0    <= 1'b0;
      srv1    <= 1'b0;
      sel     <= 1'b0;
      serving <= 1'b0;
      cen_row <= '0;
      cen_col <= '0;
    end else begin
      if (!stall) begin
        srv0 <= 1'b0;
        srv1 <= 1'b0;
      end
      if (ori_start) begin
        serving <= 1'b1;
        sel     <= !pend0;
        cen_row <= pend0 ? k0_row : k1_row;
        cen_col <= pend0 ? k0_col : k1_col;
      end else if (ori_valid && ori_ready) begin
        serving <= 1'b0;
        if (sel) srv1 <= 1'b1;
        else     srv0 <= 1'b1;
      end
    end
  end

  // the start pulse reaches the unit one cycle later, with the latched centre
  logic ori_go;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ori_go <= 1'b0;
    else        ori_go <= ori_start;
  end

  orientation_assignment #(.DEPTH(DEPTH)) u_ori (
    .clk, .rst_n, .start(ori_go), .cen_row, .cen_col,
    .last_row(sel ? last_row1 : last_row0), .last_col(sel ? last_col1 : last_col0),
    .rd_col, .rd_word(sel ? rd_word1 : rd_word0),
    .busy(ori_busy), .res_valid(ori_valid), .res_ready(ori_ready),
    .res_orient(ori_bin), .res_peak(ori_peak)
  );

  always_comb begin
    ori_kp.octave = sel;
    ori_kp.row    = cen_row;
    ori_kp.col    = cen_col;
    ori_kp.orient = ori_bin;
    ori_kp.peak   = ori_peak;
  end

  output_buffer #(.DEPTH(FIFO_DEPTH)) u_out (
    .clk, .rst_n, .in_valid(ori_valid), .in_ready(ori_ready), .in_kp(ori_kp),
    .out_valid(kp_valid), .out_ready(kp_ready), .out_kp(kp), .level()
  );

  // stage one must stay frozen while stage two works on a point
  a_frozen: assert property (@(posedge clk) disable iff (!rst_n) serving |-> stall);

endmodule
