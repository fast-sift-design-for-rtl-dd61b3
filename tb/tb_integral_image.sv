// tb_integral_image: self-checking test of the integral image and its
// column-organised row buffer.  Two random 12x10 frames are streamed with
// random gaps and stalls.  Every column word leaving the block is compared
// slot by slot with integral values summed directly from the frame, and the
// second read port is checked at random columns against the same sums,
// using last_row / last_col to know which row each column holds.
//
// The expected values are computed here from the rules stated in the block's
// own header, not taken from the block; the stimulus, the sizes and the
// watchdog limit (the run counts a failure and stops after a fixed number
// of clock cycles) are this testbench's choices.
module tb_integral_image;
  import sift_pkg::*;
  import sift_ref_pkg::*;

  localparam int W = 12, H = 10, NF = 2, DEPTH = 6;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, in_valid = 1'b0;
  logic [PIX_W-1:0] in_pix = '0;
  logic [COORD_W-1:0] in_row = '0, in_col = '0, rd_col = '0;
  logic col_valid;
  logic [DEPTH-1:0][II_W-1:0] col_word, rd_word;
  logic [COORD_W-1:0] col_row, col_col, last_row, last_col;
  int checks = 0, failures = 0, nout = 0, rd_checks = 0;
  int frames [NF][H][W];
  bit fired = 1'b0;

  integral_image #(.IMG_W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [II_W-1:0] ii(int f, int r, int c);
    longint s = 0;
    for (int y = 0; y <= r; y++) for (int x = 0; x <= c; x++) s += frames[f][y][x];
    return II_W'(s);
  endfunction

  always @(posedge clk) fired <= en;
  always @(negedge clk) if (rst_n && fired && col_valid) begin
    int f;
    f = nout / (W * H);
    for (int k = 0; k < DEPTH; k++)
      if (int'(col_row) - k >= 0) begin
        checks++;
        if (col_word[k] != ii(f, int'(col_row) - k, int'(col_col))) begin
          failures++;
          $display("(%0d,%0d) slot %0d got %0d expected %0d", col_row, col_col, k, col_word[k],
                   ii(f, int'(col_row) - k, int'(col_col)));
        end
      end
    nout++;
    // second port, random column, same frame as the last write
    rd_col = COORD_W'($urandom_range(0, W - 1));
    #1;
    begin
      int nw;
      nw = (rd_col <= last_col) ? int'(last_row) : int'(last_row) - 1;
      for (int k = 0; k < DEPTH; k++)
        if (nw - k >= 0) begin
          checks++;
          rd_checks++;
          if (rd_word[k] != ii(f, nw - k, int'(rd_col))) begin
            failures++;
            $display("read port col %0d slot %0d wrong", rd_col, k);
          end
        end
    end
  end

  initial begin
    foreach (frames[f, r, c]) frames[f][r][c] = $urandom_range(0, 255);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < NF; f++)
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++) begin
          forever begin
            @(negedge clk);
            en = ($urandom_range(0, 99) < 80);
            in_valid = ($urandom_range(0, 99) < 75);
            in_pix = PIX_W'(frames[f][r][c]);
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
    if (nout != NF * W * H) begin failures++; $display("outputs %0d", nout); end
    $display("read-port checks %0d", rd_checks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
