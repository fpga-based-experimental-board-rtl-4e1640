// tb_ecc_lab_top: end-to-end run of the laboratory with both control panels
// modelled behind their shared buses. Phases, each set through the panel
// switches with the transmitter stopped and the counters cleared:
//   A  coded, noise off, syndrome decoding: no errors
//   B  deliberate error e3: corrected, syndrome LEDs light, no frame errors
//   C  deliberate errors e1 + e2: every frame wrong, CRC LED lights
//   D  coded, noise at 3 dB, syndrome decoding
//   E  same with maximum-likelihood decoding: fewer bit errors than D
//   F  uncoded at 3 dB: BER near the BPSK value Q(sqrt(2 * 10^0.3)) = 0.0229
//   G  P = 0 on both boards with errors e5 + e6: decoding failure LED lights
// Counts each mechanism (error switch, correction, CRC flag, soft decoding,
// uncoded mode, noise, decoding failure, counter clear, Eb/N0 change,
// transmitter pipeline overlap) and
// fails if one never happened. Runs the top at its default parameters.
module tb_ecc_lab_top;
  import ecc_pkg::*;

  localparam int FRAMES = 600;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] tx_bus_i, tx_bus_o, rx_bus_i, rx_bus_o;
  logic tx_bus_oe, tx_dir, rx_bus_oe, rx_dir;
  logic [4:0] tx_oe_n, rx_oe_n;
  logic tp_src_bit, tp_src_vld, tp_tx_bit, result_vld, led_crc, rx_dec_vld;
  msg_t rx_dec_msg;
  logic [31:0] tx_sessions;
  soft_t tp_tx_bipolar, tp_rx_soft;
  logic [3:0] user_id;
  logic [31:0] frames, bit_errs, frame_errs, crc_errs;
  int checks = 0, failures = 0;

  ecc_lab_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Panel models: switches behind B->A transceivers, LEDs behind A->B ones.
  logic [2:0][7:0] tx_sw, rx_sw;
  logic [1:0][7:0] tx_led, rx_led;

  always_comb begin
    tx_bus_i = 8'h00;
    rx_bus_i = 8'h00;
    for (int g = 0; g < 3; g++) begin
      if (!tx_oe_n[g] && !tx_dir) tx_bus_i = tx_sw[g];
      if (!rx_oe_n[g] && !rx_dir) rx_bus_i = rx_sw[g];
    end
  end

  int n_syn_led = 0, n_fail_led = 0, n_crc_led = 0, n_bus_conflict = 0;
  always @(posedge clk) if (rst_n) begin
    for (int g = 0; g < 2; g++) begin
      if (!tx_oe_n[3+g] && tx_dir && tx_bus_oe) tx_led[g] <= tx_bus_o;
      if (!rx_oe_n[3+g] && rx_dir && rx_bus_oe) begin
        rx_led[g] <= rx_bus_o;
        if (g == 0 && rx_bus_o[6:4] != 0) n_syn_led++;
        if (g == 0 && rx_bus_o[7]) n_fail_led++;
        if (g == 1 && rx_bus_o[7]) n_crc_led++;
      end
    end
    if ((tx_bus_oe && tx_oe_n[2:0] != 3'b111) || (rx_bus_oe && rx_oe_n[2:0] != 3'b111))
      n_bus_conflict++;
  end

  int n_results = 0, n_ml = 0, n_sd = 0, n_unc = 0, n_corr = 0, n_overlap = 0;
  always @(posedge clk) begin
    if (result_vld) n_results++;
    if (dut.u_rx.ml_vld) n_ml++;
    if (dut.u_rx.sd_vld) n_sd++;
    if (dut.u_rx.un_vld) n_unc++;
    if (dut.u_rx.sd_vld && dut.u_rx.sd_corr) n_corr++;
    if (dut.u_tx.sending && dut.u_tx.pstate != dut.u_tx.P_IDLE) n_overlap++;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Panel settings.
  task automatic set_panels(pmat_t p, int db, bit noise, bit coded, bit sdec, cw_t err);
    tx_sw[0] = {p[1], p[0]};
    tx_sw[1] = {4'(db), p[2]};
    tx_sw[2] = {1'b0, 1'b0, noise, coded, 4'd1};
    rx_sw[0] = {p[1], p[0]};
    rx_sw[1] = {2'b00, coded, sdec, p[2]};
    rx_sw[2] = {1'b0, err};
  endtask

  task automatic scans(int n);
    repeat (n * 5 * 4 + 2) @(posedge clk);
  endtask

  int n_clear = 0, n_ebn0_change = 0, last_db = -1;

  // Stop, reconfigure, clear, run FRAMES frames, stop.
  task automatic phase(string name, pmat_t p, int db, bit noise, bit coded, bit sdec, cw_t err,
                       output int f, output int be, output int fe, output int ce);
    int start_n;
    tx_sw[2][6] = 1'b0;
    scans(3);
    set_panels(p, db, noise, coded, sdec, err);
    if (db != last_db) n_ebn0_change++;
    last_db = db;
    rx_sw[1][6] = 1'b1;
    scans(2);
    rx_sw[1][6] = 1'b0;
    scans(2);
    if (frames == 0 && frame_errs == 0) n_clear++;
    start_n = n_results;
    tx_sw[2][6] = 1'b1;
    wait (n_results - start_n >= FRAMES);
    tx_sw[2][6] = 1'b0;
    scans(3);
    f = frames; be = bit_errs; fe = frame_errs; ce = crc_errs;
    $display("%s: frames %0d BER %f FER %f CRC flags %0d", name, f,
             real'(be) / (4.0 * f), real'(fe) / f, ce);
  endtask

  initial begin
    pmat_t ph;
    int f, be, fe, ce, be_hard, f_hard;
    ph = {4'b1011, 4'b1110, 4'b0111};
    set_panels(ph, 0, 0, 1, 0, '0);
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;

    phase("A coded clean", ph, 0, 0, 1, 0, '0, f, be, fe, ce);
    chk(f >= FRAMES && fe == 0 && ce == 0, "clean channel has no errors");
    chk(user_id == 4'd1, "user ID read from the panel");

    phase("B error e3", ph, 0, 0, 1, 0, 7'b0000100, f, be, fe, ce);
    chk(f >= FRAMES && fe == 0, "single deliberate error corrected");
    chk(n_syn_led > 0, "syndrome LEDs lit");

    phase("C errors e1+e2", ph, 0, 0, 1, 0, 7'b0000011, f, be, fe, ce);
    chk(fe == f && ce > 0 && be >= 2 * f, "double deliberate error breaks every frame");
    chk(n_crc_led > 0, "CRC LED lit");

    phase("D hard 3 dB", ph, 3, 1, 1, 0, '0, f, be, fe, ce);
    be_hard = be;
    f_hard = f;
    chk(fe > 0 && ce > 0 && ce <= fe, "noise causes detected frame errors");

    phase("E soft 3 dB", ph, 3, 1, 1, 1, '0, f, be, fe, ce);
    chk(real'(be) / f < 0.75 * real'(be_hard) / f_hard, "ML decoding beats syndrome decoding");

    phase("F uncoded 3 dB", ph, 3, 1, 0, 0, '0, f, be, fe, ce);
    chk(real'(be) / (4.0 * f) > 0.016 && real'(be) / (4.0 * f) < 0.030, "uncoded BER near 0.0229");

    phase("G P=0, e5+e6", pmat_t'(0), 6, 0, 1, 0, 7'b0110000, f, be, fe, ce);
    chk(n_fail_led > 0, "decoding failure LED lit");
    chk(fe == 0, "errors in parity bits leave the message intact");

    chk(n_clear >= 7, "counter clear");
    chk(n_ebn0_change >= 3, "Eb/N0 changed");
    chk(n_ml > 0 && n_sd > 0 && n_unc > 0, "soft, hard and uncoded decoding all used");
    chk(n_corr > 0, "single-error correction");
    chk(n_overlap > 0, "next frame encoded while the current one is sent");
    chk(n_bus_conflict == 0, "no bus conflicts on the panel buses");
    $display("decoded frames: syndrome %0d (corrected %0d), ML %0d, uncoded %0d; overlap clocks %0d",
             n_sd, n_corr, n_ml, n_unc, n_overlap);
    $display("mechanisms: syndrome LED %0d, fail LED %0d, CRC LED %0d, clears %0d, Eb/N0 changes %0d",
             n_syn_led, n_fail_led, n_crc_led, n_clear, n_ebn0_change);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
