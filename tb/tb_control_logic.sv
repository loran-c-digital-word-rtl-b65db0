// Self-checking testbench of control_logic.
// The stimulus raises LIRQ for 10 clocks (the front end's 10 us pulse) after
// random gaps, toggles the interrupt-enable flag and issues reads of the most
// significant byte at random. The expected behaviour is worked out from the
// pulse times: a pulse that rises before clock edge k must give exactly one
// `sample` clock, from edge k to k+1, unless an earlier capture has not been
// read yet; irq_n must be low exactly while a capture is pending and the
// enable flag is set; a read of 3XX0 clears the pending capture. The cycle
// latency from LIRQ to irq_n (two clock edges) is checked directly.
module tb_control_logic;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 0, rst_n = 0, lirq = 0, irq_en = 0, msb_read = 0;
  logic sample, pending, irq_n;
  int checks = 0, failures = 0;

  control_logic dut (.*);

  always #500 clk = ~clk;

  initial begin : watchdog
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int  edges_since_rise = -1;  // posedges seen since LIRQ was raised
  bit  model_pending = 0;
  int  n_samples = 0, n_ignored = 0, n_cleared = 0, n_masked = 0, n_latency = 0;

  task automatic expect_eq(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("%t %s=%b expected %b", $time, what, got, exp);
    end
  endtask

  // Stimulus: pulses
  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int p = 0; p < 3000; p++) begin
      repeat ($urandom_range(2, 40)) @(negedge clk);
      lirq = 1;
      edges_since_rise = 0;
      repeat (10) @(negedge clk);
      lirq = 0;
    end
    repeat (5) @(negedge clk);
    checks++;
    if (n_samples < 100 || n_ignored < 10 || n_cleared < 100 || n_masked < 10 || n_latency < 50) begin
      failures++;
      $display("not exercised: samples=%0d ignored=%0d cleared=%0d masked=%0d latency=%0d",
               n_samples, n_ignored, n_cleared, n_masked, n_latency);
    end
    $display("samples=%0d ignored=%0d cleared=%0d masked=%0d", n_samples, n_ignored, n_cleared, n_masked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Stimulus: host side
  initial begin
    forever begin
      @(negedge clk);
      msb_read = ($urandom_range(0, 24) == 0);
      if ($urandom_range(0, 99) == 0) irq_en = ~irq_en;
    end
  end

  // Checks, taken just after each rising edge.
  always @(posedge clk) begin
    bit exp_sample_prev;
    bit read_prev;
    exp_sample_prev = (edges_since_rise == 1) && !model_pending;
    read_prev = msb_read;
    if (edges_since_rise >= 0) edges_since_rise++;
    // state update for the edge that just happened
    if (!rst_n) model_pending = 0;
    else if (exp_sample_prev) model_pending = 1;
    else if (read_prev) begin
      if (model_pending) n_cleared++;
      model_pending = 0;
    end
    #1;
    if (rst_n) begin
      bit exp_sample;
      exp_sample = (edges_since_rise == 1) && !model_pending;
      expect_eq("sample", sample, exp_sample);
      if (exp_sample) n_samples++;
      if (edges_since_rise == 1 && model_pending) n_ignored++;
      expect_eq("pending", pending, model_pending);
      expect_eq("irq_n", irq_n, !(model_pending && irq_en));
      if (model_pending && !irq_en) n_masked++;
      // irq_n falls at the second edge after LIRQ rises when the capture happens
      if (edges_since_rise == 2 && exp_sample_prev && irq_en) begin
        n_latency++;
        expect_eq("irq_n at 2nd edge", irq_n, 1'b0);
      end
    end
  end
endmodule
