// pcounter: the up counter used twice in every reciprocal channel, once on
// the input signal and once on the 300 MHz reference clock.
//
// A plain WIDTH-bit binary counter with a count enable and a synchronous
// clear; clear wins over enable. In the published FPGA build each such
// counter is mapped onto a DSP48 slice (a 32-bit DSP48 up counter); here it is
// written as generic logic, and a synthesis tool may still map it to a DSP.
//
// Interface: clk, ce (count enable), sclr (synchronous clear), q (count).
// Timing: q changes one clk edge after ce/sclr are seen high. The count wraps
// at 2**WIDTH; at 300 MHz a 32-bit count lasts 14.3 s, far beyond the 1 s gate.
// There is no reset: the owner clears the counter with sclr before use.
module pcounter #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             ce,
  input  logic             sclr,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk) begin
    if (sclr)    q <= '0;
    else if (ce) q <= q + 1'b1;
  end

endmodule
