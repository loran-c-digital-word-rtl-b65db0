// Shared constants and types of the Loran-C digital word generator.
//
// The word generator is a memory-mapped peripheral of a 6502 host. It holds a
// free-running BCD microsecond counter, captures it when the Loran-C receiver
// front end signals a pulse, and lets the host read the captured time as three
// bytes. This package gathers the numbers that several modules share:
//   * the default counter width (six BCD digits) and the GRI period of the
//     East Coast chain, 99300 us, both from the original design;
//   * the register map, 3XX0..3XX2 read (most significant byte first) and
//     3XX3 write, as used by the host's verification routine;
//   * the bit positions of the two software flags in the write-only control
//     register: bit 2 enables the interrupt, bit 1 enables GRI sync. They
//     follow from the routine's constants $06 (interrupt on, sync on),
//     $04 (interrupt on, sync off), $02 (interrupt off, sync on) and $00.
package loran_pkg;

  localparam int unsigned DIGITS_DEFAULT    = 6;      // BCD digits in the counter
  localparam int unsigned GRI_US_DEFAULT    = 99300;  // East Coast chain GRI in us

  localparam logic [3:0] PAGE_NIBBLE        = 4'h3;   // A15..A12 of the 3XXX page

  // Low address bits (A2..A0) of the four registers.
  typedef enum logic [2:0] {
    REG_TIME_MSB = 3'd0,  // read:  digits 5,4 (3XX0)
    REG_TIME_NSB = 3'd1,  // read:  digits 3,2 (3XX1)
    REG_TIME_LSB = 3'd2,  // read:  digits 1,0 (3XX2)
    REG_CONTROL  = 3'd3   // write: control flags (3XX3)
  } reg_addr_e;

  localparam int unsigned FLAG_SYNC_BIT = 1;  // GRI sync enable
  localparam int unsigned FLAG_IRQ_BIT  = 2;  // Loran interrupt enable

  // Control register values used by the host routine.
  localparam logic [7:0] CTRL_IRQ_ON_SYNC_ON   = 8'h06;
  localparam logic [7:0] CTRL_IRQ_ON_SYNC_OFF  = 8'h04;
  localparam logic [7:0] CTRL_IRQ_OFF_SYNC_ON  = 8'h02;
  localparam logic [7:0] CTRL_IRQ_OFF_SYNC_OFF = 8'h00;

  // Value of an N-digit BCD word, used by testbenches and assertions.
  function automatic longint unsigned bcd_to_int(input logic [31:0] bcd, input int unsigned digits);
    longint unsigned v = 0;
    for (int i = int'(digits) - 1; i >= 0; i--)
      v = v * 10 + 64'(bcd[4*i +: 4]);
    return v;
  endfunction

  // N-digit BCD word of a binary value (the value is taken modulo 10^N).
  function automatic logic [31:0] int_to_bcd(input longint unsigned v, input int unsigned digits);
    logic [31:0] r = '0;
    for (int i = 0; i < int'(digits); i++) begin
      r[4*i +: 4] = 4'(v % 10);
      v = v / 10;
    end
    return r;
  endfunction

endpackage
