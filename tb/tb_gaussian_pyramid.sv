// tb_gaussian_pyramid: self-checking test of the four layer-parallel scales
// and the DoG layers.  The testbench builds the integral-image column words
// of a random 20x18 frame itself (slots that lie above the frame are filled
// with garbage, which the block must ignore), streams them with gaps and
// stalls, and compares every scale and DoG value with box sums taken
// directly over the frame.  It also checks that exactly the positions with
// rf >= 0 and cf >= 0 are emitted.
//
// The expected values are computed here from the rules stated in the block's
// own header, not taken from the block; the stimulus, the sizes and the
// watchdog limit (the run counts a failure and stops after a fixed number
// of clock cycles) are this testbench's choices.
module tb_gaussian_pyramid;
  import sift_pkg::*;
  import sift_ref_pkg::*;

  localparam int W = 20, H = 18, DEPTH = 24, ROW_LAG = 9;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, col_valid = 1'b0;
  logic [DEPTH-1:0][II_W-1:0] col_word = '0;
  logic [COORD_W-1:0] col_row = '0, col_col = '0;
  logic out_valid;
  logic [COORD_W-1:0] out_row, out_col;
  logic [3:0][PIX_W-1:0] out_g;
  logic signed [2:0][DOG_W-1:0] out_dog;
  int checks = 0, failures = 0, nout = 0;
  bit fired = 1'b0;

  gaussian_pyramid #(.DEPTH(DEPTH), .ROW_LAG(ROW_LAG)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [II_W-1:0] ii(int r, int c);
    longint s = 0;
    for (int y = 0; y <= r; y++) for (int x = 0; x <= c; x++) s += base[0][y][x];
    return II_W'(s);
  endfunction

  function automatic int sx(logic [DOG_W-1:0] v);
    logic signed [DOG_W-1:0] t;
    t = v;
    return int'(t);
  endfunction

  always @(posedge clk) fired <= en;
  always @(negedge clk) if (rst_n && fired && out_valid) begin
    int r, c;
    r = int'(out_row);
    c = int'(out_col);
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (int'(out_g[k]) != gscale(0, k, r, c)) begin
        failures++;
        $display("(%0d,%0d) scale %0d got %0d expected %0d", r, c, k, out_g[k], gscale(0, k, r, c));
      end
    end
    for (int k = 0; k < 3; k++) begin
      checks++;
      if (sx(out_dog[k]) != dog(0, k, r, c)) begin
        failures++;
        $display("(%0d,%0d) dog %0d got %0d expected %0d", r, c, k, out_dog[k], dog(0, k, r, c));
      end
    end
    nout++;
  end

  initial begin
    bh[0] = H;
    bw[0] = W;
    for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) base[0][r][c] = $urandom_range(0, 255);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        logic [DEPTH-1:0][II_W-1:0] wd;
        for (int k = 0; k < DEPTH; k++)
          wd[k] = (r - k >= 0) ? ii(r - k, c) : II_W'($urandom);
        forever begin
          @(negedge clk);
          col_word = wd;
          en = ($urandom_range(0, 99) < 80);
          col_valid = ($urandom_range(0, 99) < 75);
          col_row = COORD_W'(r);
          col_col = COORD_W'(c);
          @(posedge clk);
          if (en && col_valid) break;
        end
      end
    @(negedge clk);
    col_valid = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    checks++;
    if (nout != (H - ROW_LAG) * (W - 3)) begin
      failures++;
      $display("outputs %0d expected %0d", nout, (H - ROW_LAG) * (W - 3));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
