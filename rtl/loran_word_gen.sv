// Loran-C digital word generator: top level.
//
// A memory-mapped peripheral for a 6502 host (KIM-1) that converts the time
// of arrival of Loran-C pulses into a BCD number of microseconds within the
// chain's group repetition interval (GRI). A six-digit BCD counter counts the
// 1 MHz system clock. With GRI sync on it is cleared every GRI_US counts
// (99300 us, the East Coast chain). Each 10 us pulse from the receiver front
// end (lirq) captures the counter into latches and raises one interrupt. The
// host reads the time at 3XX2 (digits 1,0), 3XX1 (digits 3,2) and 3XX0
// (digits 5,4); the read of 3XX0 withdraws the interrupt. Writing 3XX3 sets
// the control flags: bit 2 interrupt enable, bit 1 GRI sync enable.
//
//   addr_decoder -> control_flags (3XX3 write)
//                -> tristate_latches (3XX0..3XX2 read), control_logic (3XX0)
//   bcd_counter <-> gri_logic (clear at the GRI when sync is on)
//   lirq -> control_logic -> sample -> tristate_latches, irq_n
//
// Interface: clk is the host's 1 MHz phi1 clock, used for the counter and for
// all registers. Each host bus cycle is one clk period; phi2 is high for the
// part of it in which the bus carries data, here modelled as a level that is
// high for the whole clock of an access. There is no read/write input: the
// read and write registers sit at different addresses, so the address alone
// says which it is. dout/dout_oe replace the tri-state data drivers (the host
// side merges them onto its bus). irq_n is the active-low interrupt request.
// flags brings out the whole control register, including the six spare bits.
// Timing: reads are combinational from addr/phi2 to dout; writes and the
// interrupt clear take effect at the clock edge ending the access.
// Own choices: the single synchronous clock domain, the synchronous reset and
// the separate dout/dout_oe in place of a tri-state bus.
module loran_word_gen
  import loran_pkg::*;
#(
  parameter int unsigned DIGITS = DIGITS_DEFAULT,
  parameter int unsigned GRI_US = GRI_US_DEFAULT,
  localparam int unsigned NBYTES = (DIGITS + 1) / 2
) (
  input  logic        clk,
  input  logic        rst_n,
  // host bus
  input  logic        phi2,
  input  logic [15:0] addr,
  input  logic [7:0]  din,
  output logic [7:0]  dout,
  output logic        dout_oe,
  output logic        irq_n,
  // receiver front end
  input  logic        lirq,
  // control register contents
  output logic [7:0]  flags
);

  logic [7:0]          sel;
  logic                irq_en, sync_en;
  logic                gri_clr;
  logic [4*DIGITS-1:0] count;
  logic [4*DIGITS-1:0] latched;
  logic                sample, pending;

  addr_decoder u_dec (
    .phi2     (phi2),
    .addr     (addr),
    .sel      (sel)
  );

  control_flags u_flags (
    .clk     (clk),
    .rst_n   (rst_n),
    .wr      (sel[REG_CONTROL]),
    .din     (din),
    .flags   (flags),
    .irq_en  (irq_en),
    .sync_en (sync_en)
  );

  bcd_counter #(.DIGITS(DIGITS)) u_cnt (
    .clk   (clk),
    .rst_n (rst_n),
    .clr   (gri_clr),
    .en    (1'b1),
    .count (count)
  );

  gri_logic #(.DIGITS(DIGITS), .GRI_US(GRI_US)) u_gri (
    .count   (count),
    .sync_en (sync_en),
    .clr     (gri_clr)
  );

  control_logic u_ctl (
    .clk      (clk),
    .rst_n    (rst_n),
    .lirq     (lirq),
    .irq_en   (irq_en),
    .msb_read (sel[REG_TIME_MSB]),
    .sample   (sample),
    .pending  (pending),
    .irq_n    (irq_n)
  );

  tristate_latches #(.DIGITS(DIGITS)) u_lat (
    .clk     (clk),
    .rst_n   (rst_n),
    .capture (sample),
    .count   (count),
    .rd_sel  (sel[NBYTES-1:0]),
    .dout    (dout),
    .dout_oe (dout_oe),
    .latched (latched)
  );

  initial assert (NBYTES <= 3)
    else $error("loran_word_gen: only three read addresses (3XX0..3XX2) exist");

endmodule
