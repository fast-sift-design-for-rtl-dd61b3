// pec_unit: shared universal operation unit with precision-equivalent cycles.
//
// One multi-cycle unit computes square root, division and inverse square
// root, one result bit per cycle, so a result of N bits always takes N
// cycles.  Each operation is recast as a monotone test on the result Y:
//   PEC_SQRT    : largest Y with Y*Y        <= A           -> floor(sqrt(A))
//   PEC_DIV     : largest Y with Y*B        <= A * 2^FRAC  -> floor(A*2^FRAC/B)
//   PEC_INVSQRT : largest Y with A*Y*Y      <= 2^(2*FRAC)  -> floor(2^FRAC/sqrt(A))
// Y is found from the top bit down: bit i is tried at 1 with the bits below
// at 0, and cleared again if the test fails (the text's flow chart tests
// X*Y^2 > 1 bit by bit the same way; starting from zero bits below the trial
// bit is this design's reading of it).  Results that would exceed N bits
// (B = 0, A = 0 for the inverse square root) saturate to all ones.
//
// Interface: start (one cycle, ignored while busy) latches op, a and b.
// done pulses exactly N cycles after the start cycle, with y valid from then
// until the next start.
module pec_unit
  import sift_pkg::*;
#(
  parameter int A_W  = 18,
  parameter int N    = 9,
  parameter int FRAC = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  pec_op_e        op,
  input  logic [A_W-1:0] a,
  input  logic [A_W-1:0] b,
  output logic           busy,
  output logic           done,
  output logic [N-1:0]   y
);

  localparam int PW = A_W + 2*N + 2*FRAC + 2;

  pec_op_e              op_q;
  logic [A_W-1:0]       a_q, b_q;
  logic [$clog2(N)-1:0] bit_i;
  logic [N-1:0]         trial;
  logic [PW-1:0]        lhs, rhs;
  logic                 fits;

  always_comb begin
    trial = y | (N'(1) << bit_i);
    unique case (op_q)
      PEC_SQRT:    begin lhs = PW'(trial) * PW'(trial);             rhs = PW'(a_q); end
      PEC_DIV:     begin lhs = PW'(trial) * PW'(b_q);               rhs = PW'(a_q) << FRAC; end
      PEC_INVSQRT: begin lhs = PW'(a_q) * PW'(trial) * PW'(trial);  rhs = PW'(1) << (2*FRAC); end
      default:     begin lhs = '1;                                  rhs = '0; end
    endcase
    fits = (lhs <= rhs);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      y     <= '0;
      op_q  <= PEC_SQRT;
      a_q   <= '0;
      b_q   <= '0;
      bit_i <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy  <= 1'b1;
          op_q  <= op;
          a_q   <= a;
          b_q   <= b;
          y     <= '0;
          bit_i <= ($clog2(N))'(N-1);
        end
      end else begin
        if (fits) y[bit_i] <= 1'b1;
        if (bit_i == '0) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          bit_i <= bit_i - 1'b1;
        end
      end
    end
  end

endmodule
