// Control logic of the Loran-C word generator.
//
// Turns the asynchronous 10 us pulse from the Loran-C receiver front end
// (LIRQ) into exactly one capture of the time counter and one interrupt
// request to the host, and withdraws the request when the host has read the
// captured time.
//
//   1. LIRQ is sampled by a flip-flop on the 1 MHz clock (U16A's role in the
//      original) and a second flip-flop holds the previous sample; the rising
//      edge of the sampled pulse is their difference, one clock long however
//      long the pulse is.
//   2. On that edge, if no earlier capture is still waiting to be read,
//      `sample` is high for one clock: the latches take the counter value at
//      the end of that clock (the "sample time" of the timing diagram) and the
//      pending flip-flop is set (U16B's role).
//   3. IRQ_n is low while a capture is pending and the interrupt-enable flag
//      is set.
//   4. A read of 3XX0, the most significant time byte and the last one the
//      host's service routine reads, clears the pending flip-flop and so
//      releases IRQ_n, as the timing diagram shows.
//
// Interface: clk (1 MHz), rst_n (synchronous, active low), lirq (async),
// irq_en (flag), msb_read (decoded read of 3XX0, qualified by phi2),
// sample (latch strobe), pending, irq_n (open-collector request, active low).
// Timing: if LIRQ is first seen high at clock edge k, `sample` is high from
// edge k to edge k+1, the latches load at edge k+1 and irq_n falls at edge
// k+1. msb_read during the clock ending at edge m raises irq_n at edge m.
// Own choices: the two-flip-flop edge detector (the original's gate-level
// one-shot is not legible), ignoring pulses while a capture is pending, and
// the enable flag gating the request output rather than the capture
// ("control the output of the interrupt from the interface").
module control_logic (
  input  logic clk,
  input  logic rst_n,
  input  logic lirq,
  input  logic irq_en,
  input  logic msb_read,
  output logic sample,
  output logic pending,
  output logic irq_n
);

  logic lirq_s;  // sampled LIRQ
  logic lirq_d;  // previous sample

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lirq_s <= 1'b0;
      lirq_d <= 1'b0;
    end else begin
      lirq_s <= lirq;
      lirq_d <= lirq_s;
    end
  end

  assign sample = lirq_s && !lirq_d && !pending;

  always_ff @(posedge clk) begin
    if (!rst_n)        pending <= 1'b0;
    else if (sample)   pending <= 1'b1;
    else if (msb_read) pending <= 1'b0;
  end

  assign irq_n = !(pending && irq_en);

  // One sample per LIRQ pulse: two samples are at least two clocks apart.
  a_one_sample: assert property (@(posedge clk) disable iff (!rst_n) sample |=> !sample);

endmodule
