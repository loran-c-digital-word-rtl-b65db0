// Time latches of the Loran-C word generator.
//
// Holds a copy of the BCD time counter taken on the control logic's sample
// strobe, so the host can read a stable time in three bus cycles while the
// counter keeps running (five 4076 quad latches with tri-state outputs in
// the original). The captured word is offered on the data bus one byte at a
// time: select 0 (address 3XX0) gives the two most significant digits,
// select NBYTES-1 (3XX2) the two least significant, each byte with the
// higher digit in bits 7..4. `dout_oe` is high while a byte is driven; it
// stands for the tri-state enable, and a parent drives the shared bus with
// it.
//
// Interface: clk, rst_n (synchronous, active low), capture, count,
// rd_sel[NBYTES-1:0] (one-hot decoded reads, qualified by phi2), dout[7:0],
// dout_oe, latched (the captured word).
// Timing: the capture loads on the rising clock edge that ends the clock in
// which `capture` is high; the read path is combinational.
// The byte order follows the host routine (3000 = most significant byte,
// 3002 = least significant). Reset clears the latches, an own choice.
module tristate_latches
  import loran_pkg::*;
#(
  parameter int unsigned DIGITS = DIGITS_DEFAULT,
  localparam int unsigned NBYTES = (DIGITS + 1) / 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                capture,
  input  logic [4*DIGITS-1:0] count,
  input  logic [NBYTES-1:0]   rd_sel,
  output logic [7:0]          dout,
  output logic                dout_oe,
  output logic [4*DIGITS-1:0] latched
);

  // The word padded to whole bytes; a missing top digit reads as zero.
  logic [8*NBYTES-1:0] padded;

  always_ff @(posedge clk) begin
    if (!rst_n)       latched <= '0;
    else if (capture) latched <= count;
  end

  assign padded = (8*NBYTES)'(latched);

  always_comb begin
    dout = '0;
    for (int b = 0; b < int'(NBYTES); b++)
      if (rd_sel[b]) dout |= padded[8*(NBYTES-1-b) +: 8];
    dout_oe = |rd_sel;
  end

  // Only one byte may drive the bus at a time.
  a_one_driver: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(rd_sel));

endmodule
