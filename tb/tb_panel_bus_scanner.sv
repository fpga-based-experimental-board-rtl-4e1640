// tb_panel_bus_scanner: a model of the panel (three switch groups and two LED
// groups behind bus transceivers) is attached to the shared bus. Checks, in
// every clock, that at most one transceiver is enabled, that DIR and the
// FPGA's drivers match the kind of group enabled, that an LED slot carries
// that group's LED value, and that the FPGA never drives while a switch
// group is enabled. It checks the slot sequence (a one-clock gap, then
// SLOT - 1 clocks of one group, groups in order 0..NIN+NOUT-1). Over 30 scans
// with random switch and LED values, changed only right after a scan, it
// checks that every scan reads all switch groups and lights all LED groups
// correctly, and that scans follow each other every (NIN + NOUT) * SLOT clocks.
module tb_panel_bus_scanner;

  localparam int NIN = 3, NOUT = 2, SLOT = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] bus_i, bus_o;
  logic bus_oe, dir, sw_valid, scan_done;
  logic [NIN+NOUT-1:0] oe_n;
  logic [NOUT-1:0][7:0] leds;
  logic [NIN-1:0][7:0] sw;
  logic [NIN-1:0][7:0] panel_sw;
  logic [NOUT-1:0][7:0] panel_led;
  int checks = 0, failures = 0;

  panel_bus_scanner #(.NIN(NIN), .NOUT(NOUT), .SLOT(SLOT)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Panel model: an enabled switch transceiver (DIR = B->A) puts its
  // switches on the bus; an enabled LED transceiver (DIR = A->B) copies the
  // bus to its LEDs.
  always_comb begin
    bus_i = 8'h00;
    for (int g = 0; g < NIN; g++)
      if (!oe_n[g] && !dir) bus_i = panel_sw[g];
  end

  int viol = 0;
  always @(posedge clk) if (rst_n) begin
    if ($countones(~oe_n) > 1) viol++;
    if (bus_oe && (oe_n[NIN-1:0] != '1)) viol++;
    for (int g = 0; g < NOUT; g++)
      if (!oe_n[NIN+g] && dir && bus_oe) panel_led[g] <= bus_o;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // Per-clock schedule monitor: run = clocks the current group has been
  // enabled, prev_g = group enabled in the previous slot.
  int run = 0, prev_g = -1, gaps = 0;
  always @(posedge clk) if (rst_n && sw_valid) begin
    int g;
    g = -1;
    for (int i = 0; i < NIN + NOUT; i++) if (!oe_n[i]) g = i;
    chk($countones(~oe_n) <= 1, "one transceiver at a time");
    if (g < 0) begin
      chk(!bus_oe, "bus undriven in the gap");
      chk(run == 0 || run == SLOT - 1, $sformatf("group %0d enabled %0d clocks", prev_g, run));
      run = 0;
      gaps++;
    end else begin
      if (run == 0 && prev_g >= 0)
        chk(g == (prev_g + 1) % (NIN + NOUT), $sformatf("group %0d follows %0d", g, prev_g));
      run++;
      prev_g = g;
      chk(dir == (g >= NIN), $sformatf("DIR for group %0d", g));
      chk(bus_oe == (g >= NIN), $sformatf("FPGA drivers for group %0d", g));
      if (g >= NIN) chk(bus_o == leds[g-NIN], $sformatf("LED value on the bus for group %0d", g));
    end
  end

  int done_t[$];
  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (scan_done) done_t.push_back(cyc);
  end

  initial begin
    panel_sw  = {8'hA5, 8'h3C, 8'h81};
    panel_led = '0;
    leds      = {8'h5A, 8'hC3};
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    wait (sw_valid);
    @(posedge clk);
    #1;
    chk(sw === panel_sw, $sformatf("switch read %h", sw));
    for (int n = 0; n < 30; n++) begin
      // New values right after a scan has finished; the next scan must
      // read and show them all.
      @(posedge clk iff scan_done);
      #1;
      for (int g = 0; g < NIN; g++) panel_sw[g] = 8'($urandom);
      for (int g = 0; g < NOUT; g++) leds[g] = 8'($urandom);
      @(posedge clk iff scan_done);
      #1;
      chk(sw === panel_sw, $sformatf("switch read %h want %h", sw, panel_sw));
      chk(panel_led === leds, $sformatf("LEDs %h want %h", panel_led, leds));
    end
    chk(viol == 0, $sformatf("%0d bus conflicts", viol));
    chk(gaps >= 30 * (NIN + NOUT), "gap clocks seen");
    for (int i = 1; i < done_t.size(); i++)
      chk(done_t[i] - done_t[i-1] == (NIN + NOUT) * SLOT,
          $sformatf("scan period %0d", done_t[i] - done_t[i-1]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
