// edge_detector: one-clock pulse on a chosen edge of a signal that is already
// synchronous to clk.
//
// It keeps the value of d seen at the last clk edge and compares it with the
// present d. KIND = EDGE_FALLING flags 1 -> 0, EDGE_RISING flags 0 -> 1.
// In the reciprocal channel it marks the end of a measurement (the fall of the
// synchronised sync gate), which loads the result registers. The published
// design names this block but does not draw its insides; this is the simplest
// circuit that does the job.
//
// Interface: clk, d, edge_o. Timing: edge_o is high for the one clk cycle in
// which d has changed but the stored copy has not yet followed.
module edge_detector
  import fc_pkg::*;
#(
  parameter edge_kind_e KIND = EDGE_FALLING
) (
  input  logic clk,
  input  logic d,
  output logic edge_o
);

  logic d_q;

  always_ff @(posedge clk) d_q <= d;

  always_comb begin
    if (KIND == EDGE_FALLING) edge_o = d_q & ~d;
    else                      edge_o = ~d_q & d;
  end

endmodule
