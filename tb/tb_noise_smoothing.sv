// tb_noise_smoothing: self-checking test of the 3x3 smoothing filter.
// Two random 16x12 frames are streamed with random input gaps and random
// stalls (en low); every output is compared with a direct 3x3 binomial sum
// of the frame (zero outside it), and the number of outputs is checked.
//
// The expected values are computed here from the rules stated in the block's
// own header, not taken from the block; the stimulus, the sizes and the
// watchdog limit (the run counts a failure and stops after a fixed number
// of clock cycles) are this testbench's choices.
module tb_noise_smoothing;
  import sift_pkg::*;
  import sift_ref_pkg::*;

  localparam int W = 16, H = 12, NF = 2;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, in_valid = 1'b0;
  logic [PIX_W-1:0] in_pix = '0;
  logic [COORD_W-1:0] in_row = '0, in_col = '0;
  logic out_valid;
  logic [PIX_W-1:0] out_pix;
  logic [COORD_W-1:0] out_row, out_col;
  int checks = 0, failures = 0, nout = 0, stalls = 0;
  int frames [NF][H][W];
  bit fired = 1'b0;

  noise_smoothing #(.IMG_W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(int f);
    for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) src[r][c] = frames[f][r][c];
  endtask

  // an output register changed at an edge where en was high
  always @(posedge clk) fired <= en;
  always @(negedge clk) if (rst_n && fired && out_valid) begin
    int e;
    if (nout == W * H) load(1);
    e = smooth(int'(out_row), int'(out_col));
    checks++;
    if (int'(out_pix) != e) begin
      failures++;
      $display("(%0d,%0d) got %0d expected %0d", out_row, out_col, out_pix, e);
    end
    nout++;
  end

  initial begin
    foreach (frames[f, r, c]) frames[f][r][c] = $urandom_range(0, 255);
    load(0);
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
            if (!en) stalls++;
            @(posedge clk);
            if (en && in_valid) break;
          end
        end
    @(negedge clk);
    in_valid = 1'b0;
    en = 1'b1;
    repeat (4) @(posedge clk);
    @(negedge clk);
    checks++;
    if (nout != NF * W * H) begin failures++; $display("outputs %0d, expected %0d", nout, NF * W * H); end
    checks++;
    if (stalls == 0) begin failures++; $display("no stall exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
