// tb_orientation_assignment: self-checking test of stage two's orientation unit.
// The testbench plays the octave's integral buffer: it answers rd_col with
// the column word of a 40x40 image (newest row chosen from last_row /
// last_col exactly as the buffer would hold it).  For several images with
// ramps in different directions it compares the dominant bin and its
// histogram value with a direct computation (scale-1 patch by box sums,
// integer square root, integer division, same bin rules), checks the fixed cycle
// count, and holds res_ready low for a while to check the result is held.
//
// The expected values are computed here from the rules stated in the block's
// own header, not taken from the block; the stimulus, the sizes and the
// watchdog limit (the run counts a failure and stops after a fixed number
// of clock cycles) are this testbench's choices.
module tb_orientation_assignment;
  import sift_pkg::*;
  import sift_ref_pkg::*;

  localparam int W = 40, H = 40, DEPTH = 24;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, busy, res_valid, res_ready = 1'b0;
  logic [COORD_W-1:0] cen_row = '0, cen_col = '0, last_row = '0, last_col = '0, rd_col;
  logic [DEPTH-1:0][II_W-1:0] rd_word;
  logic [BIN_W-1:0] res_orient;
  logic [HIST_W-1:0] res_peak;
  int checks = 0, failures = 0;
  int iit [H][W];
  int bins_seen [36];

  orientation_assignment #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // integral buffer model
  always_comb begin
    int nw;
    nw = (rd_col <= last_col) ? int'(last_row) : int'(last_row) - 1;
    for (int k = 0; k < DEPTH; k++)
      rd_word[k] = (nw - k >= 0 && int'(rd_col) < W) ? II_W'(iit[nw - k][rd_col]) : II_W'(32'hDEAD0 + k);
  end

  task automatic make_image(int gx, int gy);
    bh[0] = H;
    bw[0] = W;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        int v;
        v = 128 + (gx * (c - 20) + gy * (r - 20)) / 4 + $urandom_range(0, 6);
        base[0][r][c] = (v < 0) ? 0 : (v > 255 ? 255 : v);
      end
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++)
        iit[r][c] = base[0][r][c] + (r > 0 ? iit[r-1][c] : 0) + (c > 0 ? iit[r][c-1] : 0)
                  - (r > 0 && c > 0 ? iit[r-1][c-1] : 0);
  endtask

  task automatic run(int re, int ce, int lr, int lc);
    int eb, ep, nz, cyc, expc;
    orientation(0, re, ce, eb, ep);
    nz = 0;
    for (int i = 1; i <= 13; i++)
      for (int j = 1; j <= 13; j++)
        if (gscale(0, 1, re - 7 + i, ce - 7 + j + 1) == gscale(0, 1, re - 7 + i, ce - 7 + j - 1) &&
            gscale(0, 1, re - 7 + i + 1, ce - 7 + j) == gscale(0, 1, re - 7 + i - 1, ce - 7 + j))
          nz++;
    expc = 1 + 20 + 15 + 13 * 21 + 37;
    @(negedge clk);
    cen_row = COORD_W'(re); cen_col = COORD_W'(ce);
    last_row = COORD_W'(lr); last_col = COORD_W'(lc);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!res_valid) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != expc) begin failures++; $display("took %0d cycles, expected %0d", cyc, expc); end
    repeat (5) @(negedge clk);
    checks += 3;
    if (!res_valid) begin failures++; $display("result not held"); end
    if (int'(res_orient) != eb || int'(res_peak) != ep) begin
      failures++;
      $display("(%0d,%0d): bin %0d peak %0d, expected bin %0d peak %0d", re, ce, res_orient, res_peak, eb, ep);
    end
    bins_seen[eb]++;
    res_ready = 1'b1;
    @(negedge clk);
    res_ready = 1'b0;
    if (res_valid || !busy) begin end
    @(negedge clk);
    if (busy) begin failures++; $display("still busy after handshake"); end
  endtask

  initial begin
    int g [8][2] = '{'{8, 0}, '{0, 8}, '{-8, 0}, '{0, -8}, '{6, 6}, '{-6, 5}, '{-3, -7}, '{7, -2}};
    int nb;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 8; t++) begin
      make_image(g[t][0], g[t][1]);
      // centre at (20, 20); the buffer has reached a column past or before it
      run(20, 20, 31, (t % 2) ? 25 : 14);
      run(14, 18, 25, 30);
    end
    nb = 0;
    foreach (bins_seen[k]) if (bins_seen[k] != 0) nb++;
    checks++;
    if (nb < 4) begin failures++; $display("only %0d distinct bins exercised", nb); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
