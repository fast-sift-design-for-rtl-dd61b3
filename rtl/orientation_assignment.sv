// orientation_assignment: dominant gradient orientation of one feature point.
//
// No scale image is stored, so the patch is recomputed from the octave's
// integral buffer while stage one is held.  The block
//   1. FETCH  : reads the 20 integral columns ce-10 .. ce+9 (one per cycle)
//               and keeps, per column and per patch row, the vertical strip
//               differences a 5x5 and a 3x3 box need;
//   2. PATCH  : rebuilds the 15x15 scale-1 patch around (re, ce), one patch
//               row per cycle with 15 column units in parallel, using the
//               same kernel and normalisation as scale 1 of gaussian_pyramid;
//   3. GRAD   : works through the 13x13 inner pixels one patch row at a
//               time with 13 lanes, one per inner column.  Each lane forms
//               the central differences dx, dy, gets the magnitude
//               sqrt(dx^2+dy^2) and then the ratio
//               min(|dx|,|dy|)/max(|dx|,|dy|) from its own pec_unit (the
//               universal unit is shared by the two operations), turns the
//               ratio into an angle bin with a four-entry tangent table plus
//               the signs of dx and dy, and all 13 magnitudes are added into
//               a 36-bin histogram (10 degrees a bin) at the end of the row;
//   4. SELECT : scans the histogram with a counter for its largest bin.
// The text gives steps 1 to 4, the row-at-a-time recomputation with one unit
// per patch column, and the use of a multi-cycle unit and a look-up table
// for the square root, division and inverse tangent.  One lane per gradient
// column (so a point takes a fixed number of cycles), 36 bins, the octant
// folding of the angle, the tangent thresholds and the absence of Gaussian
// weighting are this design's choices.
//
// Integral access: rd_col selects a column; rd_word is that column's buffer
// word, newest integral row in slot 0.  A column at or left of last_col
// already holds row last_row in slot 0, a column right of it row last_row-1.
//
// Interface: start (while idle) latches the centre (re, ce), which must lie
// at least 10 pixels inside the grid.  res_valid rises when the result is
// ready and stays until res_ready.  res_valid rises a fixed
// 1 + 20 + 15 + 13*(2*N_PEC + 3) + 37 = 346 cycles after the start cycle.
module orientation_assignment
  import sift_pkg::*;
#(
  parameter int DEPTH = 24
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  input  logic [COORD_W-1:0]           cen_row,
  input  logic [COORD_W-1:0]           cen_col,
  input  logic [COORD_W-1:0]           last_row,
  input  logic [COORD_W-1:0]           last_col,
  output logic [COORD_W-1:0]           rd_col,
  input  logic [DEPTH-1:0][II_W-1:0]   rd_word,
  output logic                         busy,
  output logic                         res_valid,
  input  logic                         res_ready,
  output logic [BIN_W-1:0]             res_orient,
  output logic [HIST_W-1:0]            res_peak
);

  localparam int P     = 15;           // patch side
  localparam int F     = P + 5;        // integral columns fetched
  localparam int BW    = 16;           // box-sum width
  localparam int N_PEC = MAG_W;
  localparam int LANES = P - 2;        // inner columns, one gradient lane each

  typedef enum logic [2:0] {S_IDLE, S_FETCH, S_PATCH, S_GRAD, S_MAG, S_ANG, S_SELECT, S_DONE} state_e;
  state_e state;

  logic [COORD_W-1:0] re, ce;
  logic [4:0]         cnt;              // fetch column / patch row
  logic [3:0]         gi;               // gradient row 1..13
  logic [BW-1:0]      v5 [P][F];
  logic [BW-1:0]      v3 [P][F];
  logic [PIX_W-1:0]   lp [P][P];
  logic [HIST_W-1:0]  hist [NBINS];
  logic [5:0]         sel_i;
  logic [BIN_W-1:0]   best_bin;
  logic [HIST_W-1:0]  best_val;

  // ---- fetch: strip differences of the column being read -------------------
  logic [COORD_W-1:0] newest;
  logic [BW-1:0]      f5 [P];
  logic [BW-1:0]      f3 [P];

  function automatic logic [II_W-1:0] ii_row(input logic [DEPTH-1:0][II_W-1:0] w,
                                             input logic [COORD_W-1:0] nw,
                                             input int q);
    int idx;
    idx = int'(nw) - q;
    return (idx >= 0 && idx < DEPTH) ? w[idx] : '0;
  endfunction

  assign rd_col = ce - COORD_W'(10) + COORD_W'(cnt);

  always_comb begin
    newest = (rd_col <= last_col) ? last_row : last_row - 1'b1;
    for (int i = 0; i < P; i++) begin
      int r;
      r = int'(re) - 7 + i;
      f5[i] = BW'(ii_row(rd_word, newest, r + 2) - ii_row(rd_word, newest, r - 3));
      f3[i] = BW'(ii_row(rd_word, newest, r + 1) - ii_row(rd_word, newest, r - 2));
    end
  end

  // ---- patch: one row of 15 scale-1 values --------------------------------
  logic [PIX_W-1:0] prow [P];
  logic [3:0]       pr;     // patch row being built (cnt < P in S_PATCH)
  assign pr = cnt[3:0];
  always_comb begin
    for (int j = 0; j < P; j++) begin
      logic [BW:0]    s;
      logic [BW+16:0] p;
      s = {1'b0, BW'(v5[pr][j+5] - v5[pr][j])} + {1'b0, BW'(v3[pr][j+4] - v3[pr][j+1])};
      p = ((BW+17)'(s) * (BW+17)'(16'd1928) + (BW+17)'(32768)) >> 16;
      prow[j] = (p > 255) ? 8'd255 : PIX_W'(p);
    end
  end

  // ---- gradient, magnitude, angle: one lane per inner column --------------
  logic signed [PIX_W+1:0] dx [LANES];
  logic signed [PIX_W+1:0] dy [LANES];
  logic [PIX_W:0]          amin [LANES];
  logic [PIX_W:0]          amax [LANES];
  logic [LANES-1:0]        sx, sy, steep;
  logic [MAG_W-1:0]        mag_q [LANES];
  logic                    pec_start;
  pec_op_e                 pec_op;
  logic [LANES-1:0]        pec_done;
  logic [17:0]             pec_a [LANES];
  logic [17:0]             pec_b [LANES];
  logic [N_PEC-1:0]        pec_y [LANES];
  logic [BIN_W-1:0]        bin [LANES];

  // tangent of 10, 20, 30, 40 degrees in Q8
  localparam logic [8:0] TAN_LUT [4] = '{9'd45, 9'd93, 9'd148, 9'd215};

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    logic [PIX_W:0] ax, ay;
    always_comb begin
      dx[l] = $signed({2'b0, lp[gi][l+2]}) - $signed({2'b0, lp[gi][l]});
      dy[l] = $signed({2'b0, lp[gi+1][l+1]}) - $signed({2'b0, lp[gi-1][l+1]});
      ax    = (PIX_W+1)'(dx[l] < 0 ? -dx[l] : dx[l]);
      ay    = (PIX_W+1)'(dy[l] < 0 ? -dy[l] : dy[l]);
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        amin[l]  <= '0;
        amax[l]  <= '0;
        sx[l]    <= 1'b0;
        sy[l]    <= 1'b0;
        steep[l] <= 1'b0;
        mag_q[l] <= '0;
      end else if (state == S_GRAD) begin
        sx[l]    <= dx[l] < 0;
        sy[l]    <= dy[l] < 0;
        steep[l] <= ax < ay;
        amin[l]  <= (ax < ay) ? ax : ay;
        amax[l]  <= (ax < ay) ? ay : ax;
      end else if (state == S_MAG && pec_done[l]) begin
        mag_q[l] <= pec_y[l];
      end
    end

    always_comb begin
      pec_a[l] = (state == S_GRAD) ? 18'(dx[l] * dx[l]) + 18'(dy[l] * dy[l]) : 18'(amin[l]);
      pec_b[l] = 18'(amax[l]);
    end

    pec_unit #(.A_W(18), .N(N_PEC), .FRAC(8)) u_pec (
      .clk, .rst_n, .start(pec_start), .op(pec_op), .a(pec_a[l]), .b(pec_b[l]),
      .busy(), .done(pec_done[l]), .y(pec_y[l])
    );

    // angle bin from the ratio and the signs
    always_comb begin
      logic [3:0] b, k;
      k = 0;
      for (int t = 0; t < 4; t++) if (pec_y[l] >= N_PEC'(TAN_LUT[t])) k = k + 1'b1;
      b = steep[l] ? 4'd8 - k : k;          // angle bin inside the quadrant, 0..8
      unique case ({sy[l], sx[l]})
        2'b00:   bin[l] = BIN_W'(b);          // dx >= 0, dy >= 0
        2'b01:   bin[l] = BIN_W'(17 - b);     // dx <  0, dy >= 0
        2'b11:   bin[l] = BIN_W'(18 + b);     // dx <  0, dy <  0
        default: bin[l] = BIN_W'(35 - b);     // dx >= 0, dy <  0
      endcase
    end
  end

  // all lanes run in lock step: square roots start in S_GRAD, divisions when
  // the square roots finish (a zero gradient divides by zero and is ignored)
  assign pec_start = (state == S_GRAD) || (state == S_MAG && pec_done[0]);
  assign pec_op    = (state == S_GRAD) ? PEC_SQRT : PEC_DIV;

  // histogram increment of one row: every bin adds the magnitudes of the lanes that fall in it
  logic [HIST_W-1:0] hist_add [NBINS];
  always_comb begin
    for (int k = 0; k < NBINS; k++) begin
      hist_add[k] = '0;
      for (int l = 0; l < LANES; l++)
        if (amax[l] != '0 && bin[l] == BIN_W'(k)) hist_add[k] = hist_add[k] + HIST_W'(mag_q[l]);
    end
  end

  assign busy = (state != S_IDLE);



  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      re         <= '0;
      ce         <= '0;
      cnt        <= '0;
      gi         <= 4'd1;
      sel_i      <= '0;
      best_bin   <= '0;
      best_val   <= '0;
      res_valid  <= 1'b0;
      res_orient <= '0;
      res_peak   <= '0;
      for (int k = 0; k < NBINS; k++) hist[k] <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          re    <= cen_row;
          ce    <= cen_col;
          cnt   <= '0;
          state <= S_FETCH;
          for (int k = 0; k < NBINS; k++) hist[k] <= '0;
        end
        S_FETCH: begin
          for (int i = 0; i < P; i++) begin
            v5[i][cnt] <= f5[i];
            v3[i][cnt] <= f3[i];
          end
          if (cnt == 5'(F-1)) begin cnt <= '0; state <= S_PATCH; end
          else cnt <= cnt + 1'b1;
        end
        S_PATCH: begin
          for (int j = 0; j < P; j++) lp[pr][j] <= prow[j];
          if (cnt == 5'(P-1)) begin
            cnt <= '0; gi <= 4'd1; state <= S_GRAD;
            sel_i <= '0; best_bin <= '0; best_val <= '0;
          end else cnt <= cnt + 1'b1;
        end
        S_GRAD: state <= S_MAG;            // square roots started this cycle
        S_MAG: if (pec_done[0]) state <= S_ANG;  // divisions started this cycle
        S_ANG: if (pec_done[0]) begin
          for (int k = 0; k < NBINS; k++) hist[k] <= hist[k] + hist_add[k];
          gi    <= gi + 1'b1;
          state <= (gi == 4'd13) ? S_SELECT : S_GRAD;
        end
        S_SELECT: begin
          if (sel_i == 6'(NBINS)) begin
            res_orient <= best_bin;
            res_peak   <= best_val;
            res_valid  <= 1'b1;
            state      <= S_DONE;
          end else begin
            if (hist[sel_i] > best_val) begin
              best_val <= hist[sel_i];
              best_bin <= BIN_W'(sel_i);
            end
            sel_i <= sel_i + 1'b1;
          end
        end
        S_DONE: if (res_ready) begin
          res_valid <= 1'b0;
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
