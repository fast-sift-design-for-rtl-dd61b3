// output_buffer: FIFO of finished feature points between stage two and the
// system that reads them.
//
// A plain synchronous FIFO of DEPTH keypoint records with valid/ready on
// both sides.  The text only names the buffer; its depth and handshake are
// this design's choices.  When it is full, in_ready drops and stage two
// holds its result (and with it stage one) until a slot frees up.
//
// Timing: a record written in one cycle can be read in the next; a push and
// a pop may happen in the same cycle.
module output_buffer
  import sift_pkg::*;
#(
  parameter int DEPTH = 16
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  output logic      in_ready,
  input  keypoint_t in_kp,
  output logic      out_valid,
  input  logic      out_ready,
  output keypoint_t out_kp,
  output logic [$clog2(DEPTH):0] level
);

  localparam int AW = $clog2(DEPTH);

  keypoint_t      mem [DEPTH];
  logic [AW-1:0]  wp, rp;
  logic           push, pop;

  assign in_ready  = (level != (AW+1)'(DEPTH));
  assign out_valid = (level != '0);
  assign out_kp    = mem[rp];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  always_ff @(posedge clk) begin
    if (push) mem[wp] <= in_kp;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      level <= '0;
    end else begin
      if (push) wp <= (wp == AW'(DEPTH-1)) ? '0 : wp + 1'b1;
      if (pop)  rp <= (rp == AW'(DEPTH-1)) ? '0 : rp + 1'b1;
      level <= level + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

  // a record offered while full must be held, not dropped
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           in_valid && !in_ready |=> in_valid && $stable(in_kp));

endmodule
