// tb_pec_unit: self-checking test of the universal operation unit.
// Random and corner operands for square root, division and inverse square
// root; each result is compared with an integer reference computed by
// search, and each operation must take exactly N busy cycles.
//
// The expected values are computed here from the rules stated in the block's
// own header, not taken from the block; the stimulus, the sizes and the
// watchdog limit (the run counts a failure and stops after a fixed number
// of clock cycles) are this testbench's choices.
module tb_pec_unit;
  import sift_pkg::*;

  localparam int A_W = 18, N = 9, FRAC = 8;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, busy, done;
  pec_op_e op = PEC_SQRT;
  logic [A_W-1:0] a = '0, b = '0;
  logic [N-1:0] y;
  int checks = 0, failures = 0;

  pec_unit #(.A_W(A_W), .N(N), .FRAC(FRAC)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // largest y < 2^N with cond(y) true, cond monotone decreasing
  function automatic longint ref_y(pec_op_e o, longint av, longint bv);
    longint best;
    best = 0;
    for (longint t = 0; t < (1 << N); t++) begin
      bit ok;
      case (o)
        PEC_SQRT:    ok = (t * t <= av);
        PEC_DIV:     ok = (t * bv <= (av << FRAC));
        default:     ok = (av * t * t <= (longint'(1) << (2 * FRAC)));
      endcase
      if (ok) best = t;
    end
    return best;
  endfunction

  task automatic run(pec_op_e o, logic [A_W-1:0] av, logic [A_W-1:0] bv);
    int cyc;
    longint exp_y;
    @(negedge clk);
    op = o; a = av; b = bv; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 0;
    while (!done) begin
      if (busy) cyc++;
      @(negedge clk);
    end
    exp_y = ref_y(o, longint'(av), longint'(bv));
    checks += 2;
    if (longint'(y) != exp_y) begin
      failures++;
      $display("op %s a=%0d b=%0d: y=%0d expected %0d", o.name(), av, bv, y, exp_y);
    end
    if (cyc != N) begin
      failures++;
      $display("op %s took %0d busy cycles, expected %0d", o.name(), cyc, N);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(PEC_SQRT, 0, 0);
    run(PEC_SQRT, 130050, 0);
    run(PEC_SQRT, 144, 0);
    run(PEC_DIV, 255, 255);
    run(PEC_DIV, 3, 0);
    run(PEC_DIV, 0, 7);
    run(PEC_INVSQRT, 1, 0);
    run(PEC_INVSQRT, 0, 0);
    run(PEC_INVSQRT, 4, 0);
    for (int k = 0; k < 60; k++) begin
      run(PEC_SQRT, A_W'($urandom_range(0, 130050)), 0);
      begin
        logic [A_W-1:0] m1, m2;
        m1 = A_W'($urandom_range(0, 510));
        m2 = A_W'($urandom_range(1, 510));
        if (m1 > m2) run(PEC_DIV, m2, m1); else run(PEC_DIV, m1, m2);
      end
      run(PEC_INVSQRT, A_W'($urandom_range(1, 70000)), 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
