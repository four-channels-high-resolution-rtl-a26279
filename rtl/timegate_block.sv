// timegate_block: the time gate that sets the counters' sampling interval.
//
// An up counter on the 100 MHz gate clock runs 0, 1, ..., TIME_GATE_TOP-1 and
// wraps to 0. TIME_GATE_SIGNAL is registered: it is low for the one cycle in
// which the counter shows 0 and high for the other TIME_GATE_TOP-1 cycles, so
// one gate period is exactly TIME_GATE_TOP clocks (100,000,000 clocks = 1 s).
// The reciprocal channels use the fall of the gate as the "finish this
// measurement and start the next" request; the gate need only be about 1 s
// long, since every channel also measures its own interval on the 300 MHz
// reference clock.
//
// Interface: RST (active low, asynchronous), CLK (100 MHz), TIME_GATE_TOP
// (period in CLK cycles, a constant in practice, trimmed against a rubidium
// reference), TIME_GATE_SIGNAL. With TIME_GATE_TOP of 0 or 1 the gate stays
// low. After reset the first gate rises one CLK edge after RST is released.
//
// The counter, the compare and the registered output follow the published
// design; its period follows the published timing diagram (counter reaching
// TIME_GATE_TOP-1 before wrapping). The published listing's unused enable
// input is left out.
module timegate_block
  import fc_pkg::*;
(
  input  logic       RST,
  input  logic       CLK,
  input  cnt_t       TIME_GATE_TOP,
  output logic       TIME_GATE_SIGNAL
);

  cnt_t count;
  cnt_t count_next;

  assign count_next = count + 1'b1;

  always_ff @(posedge CLK or negedge RST) begin
    if (!RST) begin
      count            <= '0;
      TIME_GATE_SIGNAL <= 1'b0;
    end else if (count_next >= TIME_GATE_TOP) begin
      count            <= '0;
      TIME_GATE_SIGNAL <= 1'b0;
    end else begin
      count            <= count_next;
      TIME_GATE_SIGNAL <= 1'b1;
    end
  end

endmodule
