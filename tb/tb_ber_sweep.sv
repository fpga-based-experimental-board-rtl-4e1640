// tb_ber_sweep: the BER/FER experiment of the laboratory, end to end through
// the top level at its default parameters. For Eb/N0 = 0..15 dB in 1 dB
// steps it runs FRAMES frames in each of three schemes (uncoded, coded with
// syndrome decoding, coded with maximum-likelihood decoding), setting the
// panels through their buses and clearing the counters before each point,
// and prints the BER/FER table. Checks:
//   - uncoded BER matches Q(sqrt(2 Eb/N0)) (computed here by numerical
//     integration) within five standard deviations of the count plus 10 %,
//     wherever at least 10 errors are expected;
//   - ML decoding has fewer bit errors than syndrome decoding wherever the
//     latter sees at least 30 errors, and fewer than uncoded transmission
//     from 3 dB up (below about 2 dB the (7,4) code costs more in rate than
//     it gains);
//   - each scheme's error count never rises by more than its statistical
//     spread from one Eb/N0 step to the next;
//   - the last (15 dB) point is error-free in every scheme.
module tb_ber_sweep;
  import ecc_pkg::*;

  localparam int FRAMES = 20000;

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


  int n_results = 0;
  always @(posedge clk) if (result_vld) n_results++;

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic set_panels(pmat_t p, int db, bit noise, bit coded, bit sdec);
    tx_sw[0] = {p[1], p[0]};
    tx_sw[1] = {4'(db), p[2]};
    tx_sw[2] = {1'b0, 1'b0, noise, coded, 4'd1};
    rx_sw[0] = {p[1], p[0]};
    rx_sw[1] = {2'b00, coded, sdec, p[2]};
    rx_sw[2] = 8'h00;
  endtask

  task automatic scans(int n);
    repeat (n * 5 * 4 + 2) @(posedge clk);
  endtask

  task automatic point(pmat_t p, int db, bit coded, bit sdec, output int be, output int fe);
    int start_n;
    tx_sw[2][6] = 1'b0;
    scans(3);
    set_panels(p, db, 1'b1, coded, sdec);
    rx_sw[1][6] = 1'b1;
    scans(2);
    rx_sw[1][6] = 1'b0;
    scans(2);
    start_n = n_results;
    tx_sw[2][6] = 1'b1;
    wait (n_results - start_n >= FRAMES);
    tx_sw[2][6] = 1'b0;
    scans(3);
    chk(frames >= FRAMES, "frames counted");
    be = int'(bit_errs) * FRAMES / int'(frames);
    fe = int'(frame_errs) * FRAMES / int'(frames);
  endtask

  // Q(x) = P(N(0,1) > x) by Simpson integration of the density from x to x+12.
  function automatic real qfunc(real x);
    real h, s;
    int  n;
    n = 2000;
    h = 12.0 / n;
    s = 0.0;
    for (int i = 0; i <= n; i++) begin
      real u, w;
      u = x + i * h;
      w = (i == 0 || i == n) ? 1.0 : (i % 2 == 1) ? 4.0 : 2.0;
      s += w * $exp(-u * u / 2.0);
    end
    return s * h / 3.0 / $sqrt(2.0 * 3.14159265358979);
  endfunction

  initial begin
    pmat_t ph;
    int be[3][16], fe[3][16];
    real nbits;
    ph = {4'b1011, 4'b1110, 4'b0111};
    set_panels(ph, 0, 1'b1, 1'b1, 1'b0);
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    nbits = 4.0 * FRAMES;
    $display(" Eb/N0 | uncoded BER    FER    | syndrome BER   FER    | ML BER         FER    | theory uncoded");
    for (int db = 0; db < 16; db++) begin
      real th, expct;
      point(ph, db, 1'b0, 1'b0, be[0][db], fe[0][db]);
      point(ph, db, 1'b1, 1'b0, be[1][db], fe[1][db]);
      point(ph, db, 1'b1, 1'b1, be[2][db], fe[2][db]);
      th = qfunc($sqrt(2.0 * (10.0 ** (db / 10.0))));
      $display("  %2d   | %.6f %.5f | %.6f %.5f | %.6f %.5f | %.6f", db,
               be[0][db] / nbits, real'(fe[0][db]) / FRAMES,
               be[1][db] / nbits, real'(fe[1][db]) / FRAMES,
               be[2][db] / nbits, real'(fe[2][db]) / FRAMES, th);
      expct = th * nbits;
      if (expct >= 10.0)
        chk(real'(be[0][db]) > 0.9 * expct - 5.0 * $sqrt(expct) &&
            real'(be[0][db]) < 1.1 * expct + 5.0 * $sqrt(expct),
            $sformatf("uncoded BER at %0d dB: %0d errors, %.1f expected", db, be[0][db], expct));
      if (be[0][db] >= 30 && db >= 3)
        chk(be[2][db] < be[0][db], $sformatf("ML beats uncoded at %0d dB", db));
      if (be[1][db] >= 30)
        chk(be[2][db] < be[1][db], $sformatf("ML beats syndrome decoding at %0d dB", db));
      if (db > 0)
        for (int s = 0; s < 3; s++)
          chk(real'(be[s][db]) <= real'(be[s][db-1]) + 4.0 * $sqrt(real'(be[s][db-1]) + 1.0),
              $sformatf("scheme %0d: BER does not rise at %0d dB", s, db));
    end
    for (int s = 0; s < 3; s++) chk(be[s][15] == 0, $sformatf("scheme %0d error-free at 15 dB", s));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
