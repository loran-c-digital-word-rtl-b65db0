// Self-checking testbench of tristate_latches at six digits.
// A random BCD word is offered every clock and captured at random; random
// one-hot read selects (or none) must return the right byte of the last
// captured word: select 0 = digits 5,4, select 1 = digits 3,2,
// select 2 = digits 1,0, with the higher digit in the upper nibble.
module tb_tristate_latches;
  timeunit 1ns; timeprecision 1ps;

  localparam int DIGITS = 6;
  logic clk = 0, rst_n = 0, capture = 0;
  logic [4*DIGITS-1:0] count = '0, latched;
  logic [2:0] rd_sel = '0;
  logic [7:0] dout;
  logic dout_oe;
  int checks = 0, failures = 0;
  int digits_model[DIGITS];  // digit values of the last capture, 0 = units

  tristate_latches #(.DIGITS(DIGITS)) dut (.*);

  always #500 clk = ~clk;

  initial begin : watchdog
    repeat (20_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d[DIGITS];
    int reads[3] = '{0, 0, 0};
    foreach (digits_model[i]) digits_model[i] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 10_000; n++) begin
      @(negedge clk);
      foreach (d[i]) begin
        d[i] = $urandom_range(0, 9);
        count[4*i +: 4] = 4'(d[i]);
      end
      capture = $urandom_range(0, 3) == 0;
      case ($urandom_range(0, 3))
        0: rd_sel = 3'b001;
        1: rd_sel = 3'b010;
        2: rd_sel = 3'b100;
        default: rd_sel = 3'b000;
      endcase
      #1;
      // read path shows the word captured before this clock
      begin
        logic [7:0] exp;
        exp = 8'h00;
        for (int b = 0; b < 3; b++)
          if (rd_sel[b]) begin
            exp = {4'(digits_model[5 - 2*b]), 4'(digits_model[4 - 2*b])};
            reads[b]++;
          end
        checks++;
        if (dout !== exp || dout_oe !== (rd_sel != 0)) begin
          failures++;
          if (failures < 10) $display("sel=%b dout=%h oe=%b expected %h", rd_sel, dout, dout_oe, exp);
        end
      end
      @(posedge clk);
      if (capture) foreach (d[i]) digits_model[i] = d[i];
    end
    checks++;
    if (reads[0] == 0 || reads[1] == 0 || reads[2] == 0) begin
      failures++;
      $display("byte not read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
