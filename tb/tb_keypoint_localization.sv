// tb_keypoint_localization: self-checking test of the 28-flag keypoint test.
// A 32x30 DoG field of small random values is seeded with sharp maxima and
// minima, faint peaks (must fail the brightness test) and ridges (must fail
// the edge test).  Every decision the block emits is compared, flag by
// flag, with a direct evaluation of the same rules, and each kind of
// outcome (accepted, brightness reject, edge reject, margin drop) must occur.
//
// The expected values are computed here from the rules stated in the block's
// own header, not taken from the block; the stimulus, the sizes and the
// watchdog limit (the run counts a failure and stops after a fixed number
// of clock cycles) are this testbench's choices.
module tb_keypoint_localization;
  import sift_pkg::*;
  import sift_ref_pkg::*;

  localparam int W = 32, H = 30, MARGIN = 10;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, in_valid = 1'b0;
  logic [COORD_W-1:0] in_row = '0, in_col = '0;
  logic signed [2:0][DOG_W-1:0] in_dog = '0;
  logic out_valid, out_cand;
  logic [COORD_W-1:0] out_row, out_col;
  logic [27:0] out_s;
  int checks = 0, failures = 0, nout = 0;
  int n_cand = 0, n_bright = 0, n_edge = 0, n_margin = 0;
  int dg [3][H][W];
  bit fired = 1'b0;

  keypoint_localization #(.IMG_W(W), .IMG_H(H), .MARGIN(MARGIN)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) fired <= en;
  always @(negedge clk) if (rst_n && fired && out_valid) begin
    int r, c, d [3][3][3];
    logic [27:0] e;
    bit in_m, ec;
    r = int'(out_row);
    c = int'(out_col);
    for (int l = 0; l < 3; l++) for (int y = 0; y < 3; y++) for (int x = 0; x < 3; x++)
      d[l][y][x] = dg[l][r - 1 + y][c - 1 + x];
    e = svec_of(d, 10, 4);
    in_m = (r >= MARGIN) && (r <= H - MARGIN) && (c >= MARGIN) && (c <= W - MARGIN);
    ec = in_m && (e == '0);
    checks += 2;
    if (out_s != e) begin failures++; $display("(%0d,%0d) S=%h expected %h", r, c, out_s, e); end
    if (out_cand != ec) begin failures++; $display("(%0d,%0d) cand=%b expected %b", r, c, out_cand, ec); end
    if (ec) n_cand++;
    if (in_m && e[27] && e[25:0] == '0) n_bright++;
    if (in_m && e[26] && !e[27] && e[25:0] == '0) n_edge++;
    if (!in_m && e == '0) n_margin++;
    nout++;
  end

  task automatic plant(int r, int c, int v, bit ridge);
    for (int l = 0; l < 3; l++) for (int y = -1; y <= 1; y++) for (int x = -1; x <= 1; x++)
      dg[l][r + y][c + x] = (v > 0) ? v / 3 : v / 3;
    dg[1][r][c] = v;
    if (ridge) begin
      dg[1][r][c - 1] = (v > 0) ? v - 1 : v + 1;
      dg[1][r][c + 1] = (v > 0) ? v - 1 : v + 1;
    end
  endtask

  initial begin
    foreach (dg[l, r, c]) dg[l][r][c] = $urandom_range(0, 12) - 6;
    for (int k = 0; k < 40; k++) begin
      int r, c, kind, v;
      r = $urandom_range(2, H - 3);
      c = $urandom_range(2, W - 3);
      kind = $urandom_range(0, 3);
      v = $urandom_range(30, 120);
      case (kind)
        0: plant(r, c, v, 0);
        1: plant(r, c, -v, 0);
        2: plant(r, c, 9, 0);       // faint: brightness reject
        default: plant(r, c, v, 1); // ridge: edge reject
      endcase
    end
    // make sure each kind sits inside the margin at least once
    plant(12, 12, 80, 0);
    plant(14, 20, 9, 0);
    plant(17, 15, 60, 1);
    plant(5, 5, 70, 0);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        forever begin
          @(negedge clk);
          en = ($urandom_range(0, 99) < 80);
          in_valid = ($urandom_range(0, 99) < 75);
          for (int l = 0; l < 3; l++) in_dog[l] = DOG_W'(dg[l][r][c]);
          in_row = COORD_W'(r);
          in_col = COORD_W'(c);
          @(posedge clk);
          if (en && in_valid) break;
        end
      end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    checks++;
    if (nout != (H - 2) * (W - 2)) begin failures++; $display("outputs %0d", nout); end
    $display("accepted %0d brightness %0d edge %0d margin %0d", n_cand, n_bright, n_edge, n_margin);
    checks += 4;
    if (n_cand == 0 || n_bright == 0 || n_edge == 0 || n_margin == 0) begin
      failures++;
      $display("an outcome never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
