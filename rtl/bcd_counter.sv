// BCD time counter of the Loran-C word generator.
//
// A chain of DIGITS decimal counters counting up by one on every clock edge on
// which `en` is high. With the 1 MHz system clock and `en` tied high it counts
// microseconds, as the original counter does. Each digit runs 0..9
// and carries into the next when it and every lower digit hold 9, so the whole
// word wraps from 99..9 to 0 when nothing clears it (the free-running mode).
// `clr` is the GRI clear: it loads zero on the next clock edge and wins over
// counting. The original counter is cleared asynchronously by a flip-flop the
// moment it reaches the GRI count; here the clear is synchronous and is
// requested one count earlier (see gri_logic), which gives the same sequence
// of values, 0 .. GRI-1, at each clock edge.
//
// Interface: clk, rst_n (synchronous, active low, clears the count), clr, en,
// count[4*DIGITS-1:0] (digit i in bits 4i+3..4i, digit 0 = units).
// Timing: count changes only on the rising clock edge; no combinational path
// from inputs to outputs.
// Following the original design: six BCD digits, count-up, common clear input.
// Own choices: the reset input (the original specifies none), the
// synchronous clear and the count enable.
module bcd_counter #(
  parameter int unsigned DIGITS = loran_pkg::DIGITS_DEFAULT
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clr,
  input  logic                  en,
  output logic [4*DIGITS-1:0]   count
);

  logic [4*DIGITS-1:0] count_next;

  always_comb begin
    logic carry;  // the digit in hand is to advance
    carry = en;
    for (int i = 0; i < int'(DIGITS); i++) begin
      if (carry)
        count_next[4*i +: 4] = (count[4*i +: 4] >= 4'd9) ? 4'd0 : count[4*i +: 4] + 4'd1;
      else
        count_next[4*i +: 4] = count[4*i +: 4];
      carry = carry && (count[4*i +: 4] >= 4'd9);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clr) count <= '0;
    else               count <= count_next;
  end

  // Every digit stays a decimal digit.
  for (genvar g = 0; g < int'(DIGITS); g++) begin : g_digit_check
    a_digit_bcd: assert property (@(posedge clk) disable iff (!rst_n) count[4*g +: 4] <= 4'd9);
  end

endmodule
