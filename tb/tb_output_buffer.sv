// tb_output_buffer: self-checking test of the keypoint FIFO.
// Random pushes and pops with a reference queue; checks order, contents,
// the full flag at DEPTH entries and that a held record is not lost.
//
// The expected values are computed here from the rules stated in the block's
// own header, not taken from the block; the stimulus, the sizes and the
// watchdog limit (the run counts a failure and stops after a fixed number
// of clock cycles) are this testbench's choices.
module tb_output_buffer;
  import sift_pkg::*;

  localparam int DEPTH = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b0;
  keypoint_t in_kp = '0, out_kp;
  logic [$clog2(DEPTH):0] level;
  int checks = 0, failures = 0, fulls = 0;
  keypoint_t q[$];
  bit accepted = 1'b0;

  output_buffer #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      // outputs before the edge
      checks++;
      if (out_valid != (q.size() != 0) || in_ready != (q.size() < DEPTH)) begin
        failures++;
        $display("flags wrong: size=%0d out_valid=%b in_ready=%b", q.size(), out_valid, in_ready);
      end
      if (out_valid && q.size() != 0) begin
        checks++;
        if (out_kp != q[0]) begin failures++; $display("data mismatch"); end
      end
      if (!in_ready) fulls++;
      // new stimulus; a refused record stays on the inputs
      if (!in_valid || accepted) begin
        accepted = 1'b0;
        in_valid = ($urandom_range(0, 99) < 60);
        in_kp    = keypoint_t'({$urandom, $urandom});
      end
      out_ready = (cyc < 1000) ? ($urandom_range(0, 99) < 30) : ($urandom_range(0, 99) < 70);
      @(posedge clk);
      #1;
    end
    checks++;
    if (fulls == 0) begin failures++; $display("never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model updated on the clock edge
  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready && q.size() != 0) void'(q.pop_front());
    if (in_valid && in_ready) begin q.push_back(in_kp); accepted = 1'b1; end
  end
endmodule
