// GRI sync logic of the Loran-C word generator.
//
// When the GRI sync flag is set, this block resets the BCD counter once per
// group repetition interval, so that the counter reads the time within the
// current GRI. The default GRI is 99300 us, the East Coast chain's. The
// original circuit decodes the counter reaching 99300 with a diode AND gate,
// sets a flip-flop that clears the counters asynchronously, and lets the
// falling top bit of the counter reset that flip-flop again. This version is
// synchronous: it requests a clear while the counter holds GRI_US-1, so the
// counter goes from GRI_US-1 straight to 0 and every GRI has exactly GRI_US
// counts. It also requests a clear whenever the count is at or above GRI_US
// (possible only after free-running), so that turning sync on pulls the
// counter back into the GRI at once; the diode decoder would instead wait for
// the next count whose decoded bits match. With the flag low the output stays
// low and the counter free-runs.
//
// Interface: count (BCD, digit 0 = units), sync_en, clr (to the counter).
// Timing: purely combinational, count to clr.
module gri_logic
  import loran_pkg::*;
#(
  parameter int unsigned DIGITS = DIGITS_DEFAULT,
  parameter int unsigned GRI_US = GRI_US_DEFAULT
) (
  input  logic [4*DIGITS-1:0] count,
  input  logic                sync_en,
  output logic                clr
);

  // BCD of the last count of a GRI. BCD words with equal digit counts
  // compare like their values, so a plain unsigned compare suffices.
  localparam logic [31:0]         LAST_BCD32 = int_to_bcd(longint'(GRI_US) - 1, DIGITS);
  localparam logic [4*DIGITS-1:0] LAST_BCD   = LAST_BCD32[4*DIGITS-1:0];

  initial begin
    assert (DIGITS >= 1 && DIGITS <= 8) else $error("gri_logic: DIGITS must be 1..8");
    assert (GRI_US >= 2) else $error("gri_logic: GRI_US must be at least 2");
  end

  always_comb clr = sync_en && (count >= LAST_BCD);

endmodule
