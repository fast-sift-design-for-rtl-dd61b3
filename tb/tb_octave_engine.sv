// tb_octave_engine: self-checking test of one octave of stage one.
// A 48x44 frame of blobs on a noisy background is streamed with gaps and
// stalls.  Every scale value and every keypoint decision (reject vector and
// candidate flag) is compared with the direct model, and the run must find
// at least one feature point.
//
// The expected values are computed here from the rules stated in the block's
// own header, not taken from the block; the stimulus, the sizes and the
// watchdog limit (the run counts a failure and stops after a fixed number
// of clock cycles) are this testbench's choices.
module tb_octave_engine;
  import sift_pkg::*;
  import sift_ref_pkg::*;

  localparam int W = 48, H = 44, DEPTH = 24, ROW_LAG = 9, MARGIN = 10;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, in_valid = 1'b0;
  logic [PIX_W-1:0] in_pix = '0;
  logic [COORD_W-1:0] in_row = '0, in_col = '0, rd_col = '0;
  logic g_valid, kp_valid, kp_cand;
  logic [COORD_W-1:0] g_row, g_col, kp_row, kp_col, last_row, last_col;
  logic [3:0][PIX_W-1:0] g_pix;
  logic [27:0] kp_s;
  logic [DEPTH-1:0][II_W-1:0] rd_word;
  int checks = 0, failures = 0, ng = 0, nk = 0, ncand = 0;
  bit fired = 1'b0;

  octave_engine #(.IMG_W(W), .IMG_H(H), .DEPTH(DEPTH), .ROW_LAG(ROW_LAG)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) fired <= en;
  always @(negedge clk) if (rst_n && fired) begin
    if (g_valid) begin
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (int'(g_pix[k]) != gscale(0, k, int'(g_row), int'(g_col))) begin
          failures++;
          $display("scale %0d at (%0d,%0d) wrong", k, g_row, g_col);
        end
      end
      ng++;
    end
    if (kp_valid) begin
      int r, c;
      logic [27:0] e;
      bit ec;
      r = int'(kp_row);
      c = int'(kp_col);
      e = svec(0, r, c);
      ec = (e == '0) && r >= MARGIN && r <= H - MARGIN && c >= MARGIN && c <= W - MARGIN;
      checks += 2;
      if (kp_s != e || kp_cand != ec) begin
        failures++;
        $display("(%0d,%0d) S=%h cand=%b expected S=%h cand=%b", r, c, kp_s, kp_cand, e, ec);
      end
      if (ec) ncand++;
      nk++;
    end
  end

  initial begin
    real blobs [6][4] = '{'{14.0, 15.0, 1.5, 170.0}, '{22.0, 30.0, 2.0, 150.0}, '{28.0, 18.0, 1.2, -35.0},
                          '{15.0, 33.0, 2.5, 120.0}, '{30.0, 36.0, 1.0, 140.0}, '{20.0, 22.0, 3.0, 90.0}};
    bh[0] = H;
    bw[0] = W;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        real v;
        v = 60.0 + $urandom_range(0, 6);
        foreach (blobs[b]) begin
          real d2;
          d2 = (r - blobs[b][0]) ** 2 + (c - blobs[b][1]) ** 2;
          v += blobs[b][3] * $exp(-d2 / (2.0 * blobs[b][2] ** 2));
        end
        base[0][r][c] = (v < 0.0) ? 0 : (v > 255.0 ? 255 : int'(v));
      end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        forever begin
          @(negedge clk);
          en = ($urandom_range(0, 99) < 85);
          in_valid = ($urandom_range(0, 99) < 80);
          in_pix = PIX_W'(base[0][r][c]);
          in_row = COORD_W'(r);
          in_col = COORD_W'(c);
          @(posedge clk);
          if (en && in_valid) break;
        end
      end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (4) @(posedge clk);
    @(negedge clk);
    checks += 3;
    if (ng != (H - ROW_LAG) * (W - 3)) begin failures++; $display("scale outputs %0d", ng); end
    if (nk != (H - ROW_LAG - 2) * (W - 5)) begin failures++; $display("decisions %0d", nk); end
    if (ncand == 0) begin failures++; $display("no feature point found"); end
    $display("feature points %0d", ncand);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
