// tud_crossbar: the 2x2 record crossbar of a single-stage sorting element.
//
// Two W-bit buses come in and two go out. When x is true the inputs pass
// straight through (in0 -> out0, in1 -> out1); when x is false they are
// crossed (in0 -> out1, in1 -> out0). In the sorting element one crossbar
// steers the incoming records (left from above, right from below) onto the
// A and B latches, and a second one steers the latch outputs onto the left
// output (down) and the right output (up). Because both crossbars follow the
// same x, a compare-and-swap is done by changing x rather than by moving data.
// Purely combinational.
module tud_crossbar #(
  parameter int unsigned W = 17
) (
  input  logic         x,
  input  logic [W-1:0] in0,
  input  logic [W-1:0] in1,
  output logic [W-1:0] out0,
  output logic [W-1:0] out1
);

  always_comb begin
    if (x) begin
      out0 = in0;
      out1 = in1;
    end else begin
      out0 = in1;
      out1 = in0;
    end
  end

endmodule
