// reciprocal_block: one channel of the reciprocal frequency counter.
//
// A reciprocal counter does not count input cycles in a fixed window; it
// counts a whole number of input periods, N_in, and measures how long they
// took on a fast reference clock, N_ref. The frequency is then
// f_in = N_in / N_ref * f_ref, with a resolution set by the 300 MHz reference
// (one reference count in 3e8, i.e. 0.033 Hz at 10 MHz for a 1 s gate) and
// independent of the input frequency.
//
// How it works. The time gate (about 1 s, from timegate_block) is re-timed to
// the input signal: the sync gate rises on the first input rising edge after
// the gate has risen and falls on the first input rising edge after the gate
// has fallen. While the sync gate is high the input counter counts input
// edges (it is cleared on the edge that opens the sync gate, so it ends equal
// to the number of whole input periods) and the reference counter counts
// 300 MHz clocks (N_ref). When the sync gate falls, an edge detector on the
// reference side loads both counts into the output registers, where they stay
// until the next measurement ends.
//
// Clock domains and synchronisation (this design's own choices, the published
// figures do not give them legibly):
//  * The gate request is held in the REF_CLK domain. It drops when the time
//    gate falls and rises again only once the input side has been seen to
//    close its sync gate, so the one-cycle (10 ns) low pulse of the time gate
//    is never missed, however slow the input signal is.
//  * The request crosses to CH_CLK through two flip-flops; the sync gate is
//    the third. The sync gate crosses back to REF_CLK through two flip-flops
//    (sg_a, sg_b). Both ends of the sync gate see the same delays, so N_ref
//    measures the sync-gate interval to within one reference clock.
//  * The input count is frozen from the sync gate's fall until the next
//    measurement clears it, which can only happen two input edges after the
//    gate request rises again, and the request rises in the same clock in
//    which the results are loaded. So the input count is read in the REF_CLK
//    domain without a further handshake, whatever the input frequency.
//
// Interface: CH_CLK (input signal), REF_CLK (300 MHz), RST (active low,
// asynchronous), TIME_GATE_SIGNAL (from timegate_block), CH_COUNTER (N_in) and
// REF_COUNTER (N_ref), both held until the next result. Both results are zero
// after reset. A measurement lasts the gate period plus up to one input
// period; there is a dead time of a few input periods between measurements.
module reciprocal_block
  import fc_pkg::*;
#(
  parameter int unsigned WIDTH = CNT_W
) (
  input  logic             CH_CLK,
  input  logic             REF_CLK,
  input  logic             RST,
  input  logic             TIME_GATE_SIGNAL,
  output logic [WIDTH-1:0] CH_COUNTER,
  output logic [WIDTH-1:0] REF_COUNTER
);

  // ---------------- REF_CLK side: gate request ----------------
  logic tg_r1, tg_r2, tg_r3;   // time gate synchroniser and its delayed copy
  logic gate_req;              // held gate, handed to the input side
  logic sg_a, sg_b;            // sync gate synchronised back to REF_CLK

  always_ff @(posedge REF_CLK or negedge RST) begin
    if (!RST) begin
      tg_r1    <= 1'b0;
      tg_r2    <= 1'b0;
      tg_r3    <= 1'b0;
      gate_req <= 1'b0;
    end else begin
      tg_r1 <= TIME_GATE_SIGNAL;
      tg_r2 <= tg_r1;
      tg_r3 <= tg_r2;
      if (tg_r3 && !tg_r2)               gate_req <= 1'b0;  // time gate fell
      else if (tg_r2 && !gate_req && !sg_b) gate_req <= 1'b1;  // input side closed
    end
  end

  // ---------------- CH_CLK side: sync gate and input counter ----------------
  logic req_c1, req_c2;        // gate request synchroniser
  logic sync_gate;
  logic [WIDTH-1:0] ch_count;

  always_ff @(posedge CH_CLK or negedge RST) begin
    if (!RST) begin
      req_c1    <= 1'b0;
      req_c2    <= 1'b0;
      sync_gate <= 1'b0;
    end else begin
      req_c1    <= gate_req;
      req_c2    <= req_c1;
      sync_gate <= req_c2;
    end
  end

  pcounter #(.WIDTH(WIDTH)) chx_p_counter (
    .clk  (CH_CLK),
    .ce   (sync_gate),
    .sclr (req_c2 & ~sync_gate),  // the edge that opens the sync gate
    .q    (ch_count)
  );

  // ---------------- REF_CLK side: reference counter and results ----------------
  logic [WIDTH-1:0] ref_count;
  logic             meas_end;

  always_ff @(posedge REF_CLK or negedge RST) begin
    if (!RST) begin
      sg_a <= 1'b0;
      sg_b <= 1'b0;
    end else begin
      sg_a <= sync_gate;
      sg_b <= sg_a;
    end
  end

  pcounter #(.WIDTH(WIDTH)) ref_p_counter (
    .clk  (REF_CLK),
    .ce   (sg_b),
    .sclr (sg_a & ~sg_b),         // one clock before counting starts
    .q    (ref_count)
  );

  edge_detector #(.KIND(EDGE_FALLING)) measurement_end_detector (
    .clk    (REF_CLK),
    .d      (sg_b),
    .edge_o (meas_end)
  );

  // The input count must be settled when it is loaded (guaranteed by the
  // gate-request handshake, see above).
  a_ch_count_settled: assert property (
    @(posedge REF_CLK) disable iff (!RST) meas_end |-> $stable(ch_count))
    else $error("input count changed while being loaded");

  always_ff @(posedge REF_CLK or negedge RST) begin
    if (!RST) begin
      CH_COUNTER  <= '0;
      REF_COUNTER <= '0;
    end else if (meas_end) begin
      CH_COUNTER  <= ch_count;
      REF_COUNTER <= ref_count;
    end
  end

endmodule
