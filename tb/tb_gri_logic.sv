// Self-checking testbench of gri_logic at the default GRI of 99300 us.
// Every BCD count from 0 to 199999 is applied with sync off and on. With
// sync off the clear must never be asked for; with sync on it must be asked
// for at 99299 (the last count of a GRI) and at every count beyond the GRI,
// and never below 99299.
module tb_gri_logic;
  import loran_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned DIGITS = 6;
  localparam int unsigned GRI    = 99300;

  logic [4*DIGITS-1:0] count;
  logic sync_en, clr;
  int checks = 0, failures = 0;

  gri_logic dut (.*);

  initial begin : watchdog
    #50ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // BCD built here digit by digit, independently of the package helpers.
  function automatic logic [4*DIGITS-1:0] to_bcd(int unsigned v);
    logic [4*DIGITS-1:0] r;
    for (int i = 0; i < DIGITS; i++) begin
      r[4*i +: 4] = 4'(v % 10);
      v /= 10;
    end
    return r;
  endfunction

  initial begin
    for (int s = 0; s < 2; s++) begin
      for (int unsigned v = 0; v < 200_000; v++) begin
        logic expected;
        sync_en = s[0];
        count   = to_bcd(v);
        #10;
        expected = (s == 1) && (v >= GRI - 1);
        checks++;
        if (clr !== expected) begin
          failures++;
          if (failures < 10) $display("sync=%0d count=%0d clr=%b expected %b", s, v, clr, expected);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
