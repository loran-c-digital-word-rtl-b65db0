// End-to-end testbench of the Loran-C word generator at its default size
// (six BCD digits, GRI 99300 us), with no parameter overridden.
//
// The testbench plays the host: it drives the bus one clock per access and
// runs the interrupt service routine of the host's verification program
// (disable the interface interrupt by writing $02 to 3003, read 3002, 3001,
// 3000, re-enable with $06). It also plays the receiver front end, giving
// 10-clock LIRQ pulses. A reference model written here, from the register map
// and counting rules alone, tracks the microsecond count, the flags, the
// pending capture and the captured time; every read byte, the interrupt line
// on every clock and the flag outputs are compared with it.
//
// Phases: GRI sync with interrupts (several full GRIs), free-running with
// interrupts (the count passes 99300), sync turned back on while the count is
// beyond the GRI, interrupts masked with polled reads, and accesses at
// aliased and out-of-page addresses. Each mechanism is counted and a failure
// is recorded for one that never happened.
module tb_loran_word_gen;
  import loran_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  localparam int GRI = 99300;
  localparam int MOD = 1_000_000;

  logic clk = 0, rst_n = 0;
  logic phi2 = 0, lirq = 0;
  logic [15:0] addr = 16'hFFFF;
  logic [7:0]  din = 0, dout, flags;
  logic        dout_oe, irq_n;

  loran_word_gen dut (.*);

  always #500 clk = ~clk;

  int checks = 0, failures = 0;
  int unsigned cycle = 0;

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("cycle %0d: %s = %0d (%h), expected %0d (%h)", cycle, what, got, got, exp, exp);
    end
  endtask

  initial begin : watchdog
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- model
  int  ref_cnt = 0;           // count held after the last clock edge
  logic [7:0] ref_flags = 0;
  bit  ref_pending = 0;
  int  ref_latched = 0;
  int  edges_since_rise = -1; // clock edges since LIRQ was raised
  bit  cap_sched = 0;
  int  cap_value = 0;

  // mechanism counters
  int n_gri_wrap = 0, n_freerun_past_gri = 0, n_resync = 0, n_serviced = 0;
  int n_masked = 0, n_ignored_pending = 0, n_polled = 0, n_alias = 0;
  int n_outside_page = 0, n_latency_ok = 0, n_full_wrap = 0, n_unmasked_read = 0;

  always @(posedge clk) begin
    bit sync_old, wr, msb_rd;
    cycle++;
    sync_old = ref_flags[1];
    wr     = phi2 && addr[15:12] == 4'h3 && addr[2:0] == 3'd3;
    msb_rd = phi2 && addr[15:12] == 4'h3 && addr[2:0] == 3'd0;
    if (!rst_n) begin
      ref_cnt = 0; ref_flags = 0; ref_pending = 0; ref_latched = 0; cap_sched = 0;
    end else begin
      if (sync_old && ref_cnt >= GRI - 1) begin
        if (ref_cnt == GRI - 1) n_gri_wrap++;
        else n_resync++;
        ref_cnt = 0;
      end else begin
        if (ref_cnt == MOD - 1) n_full_wrap++;
        ref_cnt = (ref_cnt + 1) % MOD;
      end
      if (wr) ref_flags = din;
      if (cap_sched) begin
        ref_pending = 1;
        ref_latched = cap_value;
      end else if (msb_rd) ref_pending = 0;
      cap_sched = 0;
      if (edges_since_rise >= 0) edges_since_rise++;
      if (edges_since_rise == 1) begin
        if (!ref_pending) begin
          cap_sched = 1;
          cap_value = ref_cnt;
        end else n_ignored_pending++;
      end
    end
    #1;
    if (rst_n) begin
      expect_eq("irq_n", irq_n, !(ref_pending && ref_flags[2]));
      if (ref_pending && !ref_flags[2]) n_masked++;
      if (edges_since_rise == 2 && ref_pending && ref_flags[2] && cap_value == ref_latched)
        if (irq_n == 0) n_latency_ok++;
    end
  end

  // ---------------------------------------------------------------- host bus
  function automatic logic [15:0] page_addr(logic [2:0] reg_lo, bit alias_it);
    logic [15:0] a;
    a = {4'h3, 9'h000, reg_lo};
    if (alias_it) a[11:3] = 9'($urandom_range(1, 511));
    return a;
  endfunction

  task automatic bus_write(logic [15:0] a, logic [7:0] d);
    @(negedge clk);
    phi2 = 1; addr = a; din = d;
    @(posedge clk);
    #2;
    expect_eq("flags", flags, ref_flags);
    @(negedge clk);
    phi2 = 0; addr = 16'hFFFF;
  endtask

  task automatic bus_read(logic [15:0] a, output logic [7:0] d);
    @(negedge clk);
    phi2 = 1; addr = a;
    #1;
    d = dout;
    expect_eq("dout_oe", dout_oe, a[15:12] == 4'h3 && a[2:0] <= 3'd2);
    @(posedge clk);
    @(negedge clk);
    phi2 = 0; addr = 16'hFFFF;
  endtask

  // Reads the three time bytes as the service routine does and checks them
  // against the model's captured time.
  task automatic read_time(bit alias_it);
    logic [7:0] b2, b1, b0;
    int exp, expect_digits;
    exp = ref_latched;
    bus_read(page_addr(3'd2, alias_it), b0);
    bus_read(page_addr(3'd1, alias_it), b1);
    bus_read(page_addr(3'd0, alias_it), b2);
    if (alias_it) n_alias++;
    // expected bytes built from the decimal digits of the captured time
    expect_digits = ((exp / 100_000) % 10) * 16 + ((exp / 10_000) % 10);
    expect_eq("byte 3XX0", b2, expect_digits);
    expect_digits = ((exp / 1_000) % 10) * 16 + ((exp / 100) % 10);
    expect_eq("byte 3XX1", b1, expect_digits);
    expect_digits = ((exp / 10) % 10) * 16 + (exp % 10);
    expect_eq("byte 3XX2", b0, expect_digits);
    @(posedge clk) #2;
    expect_eq("pending after 3XX0 read", dut.pending, 0);
  endtask

  task automatic service_interrupt(bit alias_it);
    bus_write(page_addr(3'd3, alias_it), CTRL_IRQ_OFF_SYNC_ON);
    read_time(alias_it);
    bus_write(page_addr(3'd3, alias_it), CTRL_IRQ_ON_SYNC_ON);
    n_serviced++;
  endtask

  // ---------------------------------------------------------------- front end
  task automatic pulse();
    @(negedge clk);
    lirq = 1;
    edges_since_rise = 0;
    fork
      begin
        repeat (10) @(negedge clk);
        lirq = 0;
      end
    join_none
  endtask

  task automatic wait_irq(int limit, output bit seen);
    seen = 0;
    for (int i = 0; i < limit; i++) begin
      @(posedge clk) #3;
      if (!irq_n) begin seen = 1; return; end
    end
  endtask

  task automatic idle(int n);
    repeat (n) @(negedge clk);
  endtask

  // ---------------------------------------------------------------- sequence
  initial begin
    bit seen;
    logic [7:0] b;
    int max_capture;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // Phase 1: start as the host routine does, then serve interrupts for
    // three GRIs with GRI sync on.
    bus_write(page_addr(3'd3, 0), CTRL_IRQ_OFF_SYNC_ON);
    bus_write(page_addr(3'd3, 0), CTRL_IRQ_ON_SYNC_ON);
    while (n_gri_wrap < 3) begin
      idle($urandom_range(1000, 9000));
      pulse();
      wait_irq(5, seen);
      expect_eq("interrupt raised", seen, 1);
      idle($urandom_range(3, 12));  // host interrupt latency
      if ($urandom_range(0, 3) == 0) begin
        pulse();  // a second pulse before the time is read must be ignored
        idle(12);
      end
      service_interrupt($urandom_range(0, 1));
      expect_eq("captured time below GRI", ref_latched < GRI, 1);
    end

    // Spare flags are stored and brought out, without disturbing the others.
    bus_write(page_addr(3'd3, 0), 8'hF6);
    expect_eq("spare flags", flags, 8'hF6);
    // A write outside page 3XXX leaves the flags alone.
    bus_write(16'h2003, 8'h00);
    bus_write(16'h7FF3, 8'h00);
    expect_eq("flags after out-of-page writes", flags, 8'hF6);
    n_outside_page++;
    // A read outside the page does not drive the bus.
    bus_read(16'h1000, b);
    bus_write(page_addr(3'd3, 0), CTRL_IRQ_ON_SYNC_ON);

    // Phase 2: free-running. The count must pass the GRI.
    bus_write(page_addr(3'd3, 0), CTRL_IRQ_ON_SYNC_OFF);
    max_capture = 0;
    while (ref_cnt < GRI + 20_000 || max_capture < GRI) begin
      idle($urandom_range(5000, 15000));
      pulse();
      wait_irq(5, seen);
      expect_eq("interrupt raised (free-running)", seen, 1);
      idle($urandom_range(3, 12));
      bus_write(page_addr(3'd3, 0), CTRL_IRQ_OFF_SYNC_OFF);
      read_time(0);
      bus_write(page_addr(3'd3, 0), CTRL_IRQ_ON_SYNC_OFF);
      n_serviced++;
      if (ref_latched >= GRI) n_freerun_past_gri++;
      if (ref_latched < GRI && max_capture >= GRI) begin
        failures++;
        $display("free-running capture fell back below the GRI");
      end
      if (ref_latched > max_capture) max_capture = ref_latched;
    end

    // Phase 3: sync back on while the count is beyond the GRI; the counter
    // must restart at once and the next captures lie within the GRI.
    expect_eq("count beyond GRI before resync", ref_cnt >= GRI, 1);
    bus_write(page_addr(3'd3, 0), CTRL_IRQ_ON_SYNC_ON);
    repeat (3) begin
      idle($urandom_range(1000, 5000));
      pulse();
      wait_irq(5, seen);
      expect_eq("interrupt raised (resync)", seen, 1);
      service_interrupt(0);
      expect_eq("captured time below GRI after resync", ref_latched < GRI, 1);
    end

    // Phase 4: interrupt masked, sync on. Pulses are captured but IRQ stays
    // high; a second pulse is ignored; polled reads collect the time.
    bus_write(page_addr(3'd3, 0), CTRL_IRQ_OFF_SYNC_ON);
    repeat (5) begin
      idle($urandom_range(500, 3000));
      pulse();
      wait_irq(20, seen);
      expect_eq("no interrupt while masked", seen, 0);
      idle(20);
      pulse();
      idle(20);
      read_time($urandom_range(0, 1));
      n_polled++;
    end
    // A capture left pending while masked raises IRQ once enabled.
    idle(100);
    pulse();
    idle(20);
    expect_eq("irq_n while masked", irq_n, 1);
    bus_write(page_addr(3'd3, 0), CTRL_IRQ_ON_SYNC_ON);
    @(posedge clk) #3;
    expect_eq("irq_n after enabling", irq_n, 0);
    // Read with the interrupt left enabled: the request must stay up through
    // the 3XX2 and 3XX1 reads and drop with the 3XX0 read.
    begin
      logic [7:0] t;
      bus_read(page_addr(3'd2, 0), t);
      expect_eq("byte 3XX2 (unmasked)", t, ((ref_latched / 10) % 10) * 16 + ref_latched % 10);
      #3 expect_eq("irq_n after 3XX2 read", irq_n, 0);
      bus_read(page_addr(3'd1, 0), t);
      #3 expect_eq("irq_n after 3XX1 read", irq_n, 0);
      bus_read(page_addr(3'd0, 0), t);
      #3 expect_eq("irq_n after 3XX0 read", irq_n, 1);
      n_unmasked_read++;
    end

    // Phase 5: free-run long enough for the full six-digit wrap.
    bus_write(page_addr(3'd3, 0), CTRL_IRQ_OFF_SYNC_OFF);
    while (n_full_wrap == 0) idle(1000);
    idle(500);
    pulse();
    idle(20);
    read_time(0);
    expect_eq("capture just after the six-digit wrap", ref_latched < 2000, 1);

    // Mechanism summary
    $display("gri_wrap=%0d freerun_past_gri=%0d resync=%0d serviced=%0d masked_cycles=%0d",
             n_gri_wrap, n_freerun_past_gri, n_resync, n_serviced, n_masked);
    $display("ignored_pending=%0d polled=%0d alias=%0d outside_page=%0d latency_ok=%0d full_wrap=%0d unmasked_read=%0d",
             n_ignored_pending, n_polled, n_alias, n_outside_page, n_latency_ok, n_full_wrap, n_unmasked_read);
    begin
      int counts[12];
      counts = '{n_gri_wrap, n_freerun_past_gri, n_resync, n_serviced, n_masked,
                         n_ignored_pending, n_polled, n_alias, n_outside_page, n_latency_ok, n_full_wrap, n_unmasked_read};
      foreach (counts[i]) begin
        checks++;
        if (counts[i] == 0) begin
          failures++;
          $display("mechanism %0d never happened", i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
