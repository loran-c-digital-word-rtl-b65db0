// Control flag register of the Loran-C word generator.
//
// An 8-bit write-only register (two 74175 quad flip-flops in the original)
// loaded from the data bus when the host writes address 3XX3. Two of its bits
// are used: bit 2 enables the Loran interrupt, bit 1 enables GRI sync of the
// counter. The other six bits are spare flags and are brought out unused.
// The bit positions follow from the host routine's constants ($06 = interrupt
// on and sync on, $02 = interrupt off and sync on).
//
// Interface: clk, rst_n (synchronous, active low), wr (the decoded write
// strobe, already qualified by phi2), din[7:0], flags[7:0], irq_en, sync_en.
// Timing: loaded on the rising clock edge that ends the write cycle; the
// original clocks the register on a phi2 edge. Outputs come from flip-flops.
// Own choice: reset clears every flag (interrupt and sync off); the
// original design does not say how the flags power up.
module control_flags
  import loran_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       wr,
  input  logic [7:0] din,
  output logic [7:0] flags,
  output logic       irq_en,
  output logic       sync_en
);

  always_ff @(posedge clk) begin
    if (!rst_n)  flags <= '0;
    else if (wr) flags <= din;
  end

  assign irq_en  = flags[FLAG_IRQ_BIT];
  assign sync_en = flags[FLAG_SYNC_BIT];

endmodule
