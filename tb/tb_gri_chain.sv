// Workload testbench: a Loran-C chain seen by the word generator at its
// default size (GRI 99300 us, six digits), with no parameter overridden.
//
// Three transmitting stations each send a group of eight pulses 1000 us
// apart, once per GRI, at fixed positions within the GRI. The receiver front
// end is modelled as a 10-clock LIRQ pulse per received pulse; the host runs
// the usual service routine (mask, read 3XX2, 3XX1, 3XX0, unmask) on every
// interrupt. Over four GRIs, with GRI sync on from the start, every reading
// must equal the pulse's clock-edge number modulo 99300, the same pulse must
// read the same time in every GRI, and the reading differences between
// stations must equal the scheduled spacings. The station positions here are
// illustrative, not those of any real chain.
module tb_gri_chain;
  import loran_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  localparam int GRI      = 99300;
  localparam int NGRI     = 4;
  localparam int NSTATION = 3;
  localparam int NPULSE   = 8;
  localparam int SPACING  = 1000;                      // us between pulses of a group
  localparam int BASE     = 5000;                      // first pulse of the first GRI
  localparam int STATION_OFFSET[NSTATION] = '{0, 23457, 61111};

  logic clk = 0, rst_n = 0;
  logic phi2 = 0, lirq = 0;
  logic [15:0] addr = 16'hFFFF;
  logic [7:0]  din = 0, dout, flags;
  logic        dout_oe, irq_n;

  loran_word_gen dut (.*);

  always #500 clk = ~clk;

  int checks = 0, failures = 0;
  int unsigned edge_no = 0;   // rising edges since reset was released
  int readings[NGRI][NSTATION][NPULSE];
  int n_read = 0;

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("edge %0d: %s = %0d, expected %0d", edge_no, what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (NGRI * GRI + 200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) edge_no++;

  task automatic bus_write(logic [15:0] a, logic [7:0] d);
    @(negedge clk);
    phi2 = 1; addr = a; din = d;
    @(negedge clk);
    phi2 = 0; addr = 16'hFFFF;
  endtask

  task automatic bus_read(logic [15:0] a, output logic [7:0] d);
    @(negedge clk);
    phi2 = 1; addr = a;
    #1 d = dout;
    @(negedge clk);
    phi2 = 0; addr = 16'hFFFF;
  endtask

  function automatic int bcd2(logic [7:0] b);
    return int'(b[7:4]) * 10 + int'(b[3:0]);
  endfunction

  // Host: service routine. Readings are stored in pulse order.
  initial begin
    logic [7:0] lo, mid, hi;
    int t;
    @(posedge rst_n);
    bus_write(16'h3003, CTRL_IRQ_ON_SYNC_ON);
    forever begin
      @(negedge clk);
      if (!irq_n) begin
        repeat (6) @(negedge clk);  // interrupt entry
        bus_write(16'h3003, CTRL_IRQ_OFF_SYNC_ON);
        bus_read(16'h3002, lo);
        bus_read(16'h3001, mid);
        bus_read(16'h3000, hi);
        bus_write(16'h3003, CTRL_IRQ_ON_SYNC_ON);
        t = bcd2(hi) * 10000 + bcd2(mid) * 100 + bcd2(lo);
        if (n_read < NGRI * NSTATION * NPULSE)
          readings[n_read / (NSTATION*NPULSE)][(n_read / NPULSE) % NSTATION][n_read % NPULSE] = t;
        n_read++;
      end
    end
  end

  // Front end: pulse p of station s in GRI g is first seen at edge k.
  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int g = 0; g < NGRI; g++)
      for (int s = 0; s < NSTATION; s++)
        for (int p = 0; p < NPULSE; p++) begin
          int unsigned k;
          k = g * GRI + BASE + STATION_OFFSET[s] + p * SPACING;
          while (edge_no < k - 1) @(negedge clk);
          lirq = 1;
          repeat (10) @(negedge clk);
          lirq = 0;
        end
    repeat (200) @(negedge clk);

    expect_eq("interrupts serviced", n_read, NGRI * NSTATION * NPULSE);
    for (int g = 0; g < NGRI; g++)
      for (int s = 0; s < NSTATION; s++)
        for (int p = 0; p < NPULSE; p++) begin
          int k;
          k = g * GRI + BASE + STATION_OFFSET[s] + p * SPACING;
          expect_eq($sformatf("reading g%0d s%0d p%0d", g, s, p), readings[g][s][p], k % GRI);
          if (g > 0)
            expect_eq($sformatf("repeat g%0d s%0d p%0d", g, s, p), readings[g][s][p], readings[0][s][p]);
          if (s > 0)
            expect_eq($sformatf("difference g%0d s%0d p%0d", g, s, p),
                      readings[g][s][p] - readings[g][0][p], STATION_OFFSET[s]);
        end
    $display("readings of the first GRI, station 0: %0d %0d ... station 2: %0d",
             readings[0][0][0], readings[0][0][1], readings[0][2][7]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
