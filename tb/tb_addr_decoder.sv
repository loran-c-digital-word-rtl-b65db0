// Self-checking testbench of addr_decoder: all 65536 addresses with phi2 low
// and high. Expected: no select with phi2 low or outside page 3XXX; inside
// it exactly select number A2..A0, whatever A11..A3 hold.
module tb_addr_decoder;
  timeunit 1ns; timeprecision 1ps;

  logic        phi2;
  logic [15:0] addr;
  logic [7:0]  sel;
  int checks = 0, failures = 0;
  int hits[8];

  addr_decoder dut (.*);

  initial begin : watchdog
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 2; p++)
      for (int a = 0; a < 65536; a++) begin
        logic [7:0] expected;
        phi2 = p[0];
        addr = 16'(a);
        #10;
        expected = 8'h00;
        if (p == 1 && a >= 'h3000 && a <= 'h3FFF) expected = 8'h01 << (a % 8);
        checks++;
        if (sel !== expected) begin
          failures++;
          if (failures < 10) $display("phi2=%0d addr=%h sel=%b expected %b", p, a, sel, expected);
        end
        for (int k = 0; k < 8; k++) if (sel[k]) hits[k]++;
      end
    // 4096 addresses of the page alias onto each of the eight selects.
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (hits[k] != 512) begin
        failures++;
        $display("select %0d hit %0d times", k, hits[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
