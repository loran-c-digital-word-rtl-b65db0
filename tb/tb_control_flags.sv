// Self-checking testbench of control_flags. Random writes, with the strobe
// high or low, are checked against a model register; the two named flags
// must follow bits 2 (interrupt enable) and 1 (GRI sync enable).
module tb_control_flags;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 0, rst_n = 0, wr = 0;
  logic [7:0] din = 0, flags;
  logic irq_en, sync_en;
  int checks = 0, failures = 0;
  logic [7:0] model = 0;

  control_flags dut (.*);

  always #500 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (flags !== 8'h00) begin failures++; $display("flags not cleared by reset"); end
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      wr  = $urandom_range(0, 2) == 0;
      din = 8'($urandom);
      @(posedge clk);
      if (wr) model = din;
      #1;
      checks++;
      if (flags !== model || irq_en !== model[2] || sync_en !== model[1]) begin
        failures++;
        if (failures < 10) $display("flags=%h irq_en=%b sync_en=%b, expected %h", flags, irq_en, sync_en, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
