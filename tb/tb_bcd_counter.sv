// Self-checking testbench of bcd_counter at its default six digits.
// A plain integer model counts alongside; after every clock the counter's
// BCD output, converted digit by digit, must equal the model. The enable is
// mostly high and sometimes low, the clear is pulsed now and then, and the run
// is long enough (over 10^6 enabled clocks) for the full wrap 999999 -> 0.
module tb_bcd_counter;
  import loran_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned DIGITS = 6;
  localparam longint unsigned MODULUS = 1_000_000;

  logic clk = 0, rst_n = 0, clr = 0, en = 0;
  logic [4*DIGITS-1:0] count;
  int checks = 0, failures = 0;
  longint unsigned model = 0;
  int wraps = 0, clears = 0;

  bcd_counter #(.DIGITS(DIGITS)) dut (.*);

  always #500 clk = ~clk;

  initial begin : watchdog
    repeat (1_600_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_value();
    longint unsigned got = 0;
    for (int i = DIGITS - 1; i >= 0; i--) begin
      if (count[4*i +: 4] > 9) begin
        failures++;
        $display("digit %0d not BCD: %h", i, count[4*i +: 4]);
      end
      got = got * 10 + longint'(count[4*i +: 4]);
    end
    checks++;
    if (got != model) begin
      failures++;
      if (failures < 10) $display("count %0d, expected %0d", got, model);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 1_400_000; n++) begin
      @(negedge clk);
      en  = ($urandom_range(0, 15) != 0);
      clr = (n > 200 && n < 300_000 && $urandom_range(0, 49_999) == 0) || (n == 150);
      @(posedge clk);
      if (clr) begin
        model = 0;
        clears++;
      end else if (en) begin
        if (model == MODULUS - 1) wraps++;
        model = (model + 1) % MODULUS;
      end
      #1 check_value();
    end
    checks++;
    if (wraps < 1 || clears < 2) begin
      failures++;
      $display("not exercised: wraps=%0d clears=%0d", wraps, clears);
    end
    $display("wraps=%0d clears=%0d", wraps, clears);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
