// tb_sift_top: end-to-end test of the engine on a 96x80 frame with a two-entry output buffer.
// The frame is blobs of several sizes on a noisy background, streamed with
// random input gaps.  The testbench models the engine directly (smoothing,
// box-kernel scales, DoG, the 28 keypoint tests, the down-sampled second
// octave, the orientation histogram) and compares the set of feature points
// read from the output with the set the model finds, point by point with
// orientation bin and peak.  It also counts how often each mechanism of the
// engine occurred: stage-one stalls for stage two, points of each octave,
// brightness and edge rejections, and a full output buffer.
//
// The expected values are computed here from the rules stated in the block's
// own header, not taken from the block; the stimulus, the sizes and the
// watchdog limit (the run counts a failure and stops after a fixed number
// of clock cycles) are this testbench's choices.
module tb_sift_top;
  import sift_pkg::*;
  import sift_ref_pkg::*;

  localparam int W = 96, H = 80, NBLOB = 14, MARGIN = 10, ROW_LAG = 9;
  localparam longint WATCHDOG = 2000000;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, in_ready, kp_valid, kp_ready = 1'b0, stall;
  logic [PIX_W-1:0] in_pix = '0;
  keypoint_t kp;
  int checks = 0, failures = 0;
  int n_stall = 0, n_switch = 0, n_oct [2] = '{0, 0}, n_bright = 0, n_edge = 0, n_full = 0, n_both = 0;
  int got_bin [string];
  int got_peak [string];
  int exp_bin [string];
  int exp_peak [string];
  bit fired = 1'b0, stall_q = 1'b0;
  bit done_in = 1'b0;
  // stage two holds stage one for a fixed time per point: one cycle to
  // start, 346 in the orientation unit, one to hand the record over
  localparam int STALL_PER_POINT = 348;
  int ep_len = 0, ep_pts = 0, n_ep_checked = 0;
  bit ep_full = 1'b0;
  longint n_pix = 0;

  sift_top #(.IMG_W(W), .IMG_H(H), .FIFO_DEPTH(2)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic string key(int o, int r, int c);
    return $sformatf("%0d:%0d:%0d", o, r, c);
  endfunction

  // ---- monitors -------------------------------------------------------------
  always @(posedge clk) if (rst_n) begin
    fired <= !stall;
    stall_q <= stall;
    if (stall) n_stall++;
    if (stall && !stall_q) n_switch++;
    if (dut.pend0 && dut.pend1 && !dut.serving) n_both++;
    if (dut.ori_valid && !dut.ori_ready) n_full++;
    if (in_valid && in_ready) n_pix++;
    // length of every stall that the output buffer did not stretch
    if (stall) begin
      ep_len++;
      if (dut.ori_valid && dut.ori_ready) ep_pts++;
      if (dut.ori_valid && !dut.ori_ready) ep_full = 1'b1;
    end else if (stall_q) begin
      if (!ep_full) begin
        checks++;
        n_ep_checked++;
        if (ep_len != ep_pts * STALL_PER_POINT) begin
          failures++;
          $display("stall of %0d cycles for %0d points", ep_len, ep_pts);
        end
      end
      ep_len = 0;
      ep_pts = 0;
      ep_full = 1'b0;
    end
    if (kp_valid && kp_ready) begin
      string k;
      k = key(int'(kp.octave), int'(kp.row), int'(kp.col));
      if (got_bin.exists(k)) begin failures++; $display("point %s reported twice", k); end
      got_bin[k] = int'(kp.orient);
      got_peak[k] = int'(kp.peak);
      n_oct[kp.octave]++;
    end
  end
  always @(negedge clk) if (rst_n && fired) begin
    if (dut.k0_valid && dut.k0_s[25:0] == '0) begin
      if (dut.k0_s[27]) n_bright++;
      else if (dut.k0_s[26]) n_edge++;
    end
    if (dut.k1_valid && dut.k1_s[25:0] == '0) begin
      if (dut.k1_s[27]) n_bright++;
      else if (dut.k1_s[26]) n_edge++;
    end
  end

  // output side: hold kp_ready low at first so the buffer fills, then mostly high
  initial begin
    forever begin
      @(negedge clk);
      kp_ready = (n_oct[0] + n_oct[1] == 0 && !done_in) ? (n_full > 20) : ($urandom_range(0, 99) < 70);
    end
  end

  task automatic make_frame();
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) src[r][c] = 60 + $urandom_range(0, 6);
    for (int b = 0; b < NBLOB; b++) begin
      real br, bc, sg, amp;
      br  = $urandom_range(8, H - 9);
      bc  = $urandom_range(8, W - 9);
      sg  = 0.8 + 0.1 * $urandom_range(0, 30);
      amp = ($urandom_range(0, 3) == 0) ? -40.0 : 60.0 + $urandom_range(0, 120);
      for (int r = int'(br - 4 * sg) - 1; r <= int'(br + 4 * sg) + 1; r++)
        for (int c = int'(bc - 4 * sg) - 1; c <= int'(bc + 4 * sg) + 1; c++)
          if (r >= 0 && r < H && c >= 0 && c < W) begin
            real v;
            v = src[r][c] + amp * $exp(-((r - br) ** 2 + (c - bc) ** 2) / (2.0 * sg * sg));
            src[r][c] = (v < 0.0) ? 0 : (v > 255.0 ? 255 : int'(v));
          end
    end
    // long thin blobs: a clear DoG extremum on a ridge, which the edge test rejects
    for (int b = 0; b < 8 + NBLOB / 10; b++) begin
      real br, bc, sx, sy;
      sy = 0.8 + 0.2 * (b % 3);
      sx = 4.0 + 1.0 * ((b / 3) % 3);
      br = $urandom_range(12, H - 13);
      bc = $urandom_range(20, W - 21);
      for (int r = int'(br) - 7; r <= int'(br) + 7; r++)
        for (int c = int'(bc) - 18; c <= int'(bc) + 18; c++) begin
          real v;
          v = src[r][c] + 190.0 * $exp(-((r - br) ** 2) / (2.0 * sy * sy) - ((c - bc) ** 2) / (2.0 * sx * sx));
          src[r][c] = (v > 255.0) ? 255 : int'(v);
        end
    end
  endtask

  task automatic build_expected();
    int r1max, rlim [2], clim [2];
    bh[0] = H;
    bw[0] = W;
    for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) base[0][r][c] = smooth(r, c);
    precompute(0);
    r1max = (H - 1 - ROW_LAG) / 2;
    bh[1] = r1max + 1;
    bw[1] = (W - 4) / 2 + 1;
    for (int r = 0; r < bh[1]; r++) for (int c = 0; c < bw[1]; c++) base[1][r][c] = garr[0][3][2*r][2*c];
    precompute(1);
    // last centre each octave evaluates, and the margin stage two needs
    rlim[0] = (H - ROW_LAG - 2 < H - MARGIN) ? H - ROW_LAG - 2 : H - MARGIN;
    clim[0] = W - MARGIN;
    rlim[1] = (r1max - ROW_LAG - 1 < H / 2 - MARGIN) ? r1max - ROW_LAG - 1 : H / 2 - MARGIN;
    clim[1] = W / 2 - MARGIN;
    for (int o = 0; o < 2; o++)
      for (int r = MARGIN; r <= rlim[o]; r++)
        for (int c = MARGIN; c <= clim[o]; c++)
          if (svec_c(o, r, c) == '0) begin
            int eb, ep;
            orientation(o, r, c, eb, ep);
            exp_bin[key(o, r, c)] = eb;
            exp_peak[key(o, r, c)] = ep;
          end
  endtask

  initial begin
    int idle;
    make_frame();
    build_expected();
    $display("model: %0d feature points", exp_bin.num());
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        forever begin
          @(negedge clk);
          in_valid = ($urandom_range(0, 99) < 90);
          in_pix = PIX_W'(src[r][c]);
          @(posedge clk);
          if (in_valid && in_ready) break;
        end
      end
    @(negedge clk);
    in_valid = 1'b0;
    done_in = 1'b1;
    idle = 0;
    while (idle < 100) begin
      @(negedge clk);
      idle = (stall || kp_valid || dut.serving) ? 0 : idle + 1;
    end
    // compare the two sets
    foreach (exp_bin[k]) begin
      checks++;
      if (!got_bin.exists(k)) begin
        failures++;
        $display("missed point %s", k);
      end else if (got_bin[k] != exp_bin[k] || got_peak[k] != exp_peak[k]) begin
        failures++;
        $display("point %s: bin %0d peak %0d, expected bin %0d peak %0d", k, got_bin[k], got_peak[k],
                 exp_bin[k], exp_peak[k]);
      end
    end
    foreach (got_bin[k]) begin
      checks++;
      if (!exp_bin.exists(k)) begin failures++; $display("unexpected point %s", k); end
    end
    $display("points: octave0 %0d octave1 %0d; stall cycles %0d in %0d stalls; brightness rejects %0d; edge rejects %0d; buffer-full cycles %0d; both octaves pending %0d",
             n_oct[0], n_oct[1], n_stall, n_switch, n_bright, n_edge, n_full, n_both);
    $display("stalls with checked length %0d; engine cycles for the frame %0d (pixels %0d + stall %0d)",
             n_ep_checked, n_pix + n_stall, n_pix, n_stall);
    checks += 7;
    if (n_ep_checked == 0) begin failures++; $display("no stall length checked"); end
    // VGA and HD1080 frames must fit the 30 frames/s budget of a 100 MHz clock
    if (W >= 640) begin
      checks++;
      if (n_pix + n_stall > 64'd3333333) begin failures++; $display("frame exceeds 3333333 cycles"); end
    end
    if (n_switch == 0) begin failures++; $display("stage two never ran"); end
    if (n_oct[0] == 0) begin failures++; $display("no octave-0 point"); end
    if (n_oct[1] == 0) begin failures++; $display("no octave-1 point"); end
    if (n_bright == 0) begin failures++; $display("no brightness rejection"); end
    if (1 && n_edge == 0) begin failures++; $display("no edge rejection"); end
    if (1 && n_full == 0) begin failures++; $display("output buffer never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
