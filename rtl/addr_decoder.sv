// Address decoder of the Loran-C word generator.
//
// The word generator occupies the 4 KiB page 3XXX of the 6502 address space.
// A15..A12 must equal 3 (the original does this with two inverters and two
// NAND gates), and that page match together with phi2 enables a 3-to-8
// decoder (a 74LS138 in the original) driven by A2..A0. Address bits A11..A3
// are ignored, so each register appears many times in the page. Outputs 0..2
// select the three read-only time bytes (3XX0, 3XX1, 3XX2), output 3 the
// write-only control register (3XX3); outputs 4..7 are decoded but unused,
// as in the original. Because reads and writes use different addresses and
// the decoder is only enabled during phi2, no read/write steering is needed.
//
// Interface: phi2 (high during the data half of a bus cycle), addr[15:0],
// sel[7:0] (one-hot, active high; the 74LS138's
// outputs are active low).
// Timing: purely combinational.
module addr_decoder
  import loran_pkg::*;
(
  input  logic        phi2,
  input  logic [15:0] addr,
  output logic [7:0]  sel
);

  logic page_hit;  // A15..A12 == 3

  always_comb begin
    page_hit = (addr[15:12] == PAGE_NIBBLE);
    sel      = '0;
    if (page_hit && phi2)
      sel[addr[2:0]] = 1'b1;
  end

endmodule
