// tb_awgn_channel: with noise off the output must be the bipolar symbol
// 2C - 1 (scaled by 2^SOFT_FRAC) one clock after the input. With noise on,
// for several Eb/N0 settings in coded and uncoded mode, the measured mean and
// standard deviation of R must match +-1 and
// sigma = sqrt(1 / (2 Rc 10^(EbN0/10))) computed here in floating point, and
// the uncoded hard-decision bit error rate at 0 dB and 4 dB must match the
// BPSK values Q(sqrt(2 Eb/N0)) = 0.0786 and 0.0125. Finally 200 000 samples
// at 0 dB check the tails: the rate of deviations beyond about 3 and 3.5
// standard deviations must be within 25 % of the Gaussian value (a plain
// twelve-uniform sum gives only about 75 % and 60 % of it).
module tb_awgn_channel;
  import ecc_pkg::*;

  localparam int NS = 20000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0] ebn0_db = '0;
  logic coded = 1'b0, noise_en = 1'b0, in_vld = 1'b0, c = 1'b0, out_vld;
  soft_t x, r;
  int checks = 0, failures = 0;

  awgn_channel dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
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

  task automatic measure(int db, bit cd, output real mean_dev, output real sd, output real ber);
    real s1, s2;
    int nerr;
    s1 = 0; s2 = 0; nerr = 0;
    ebn0_db  <= 4'(db);
    coded    <= cd;
    noise_en <= 1'b1;
    in_vld   <= 1'b0;
    @(posedge clk);
    for (int i = 0; i < NS; i++) begin
      bit b;
      real d;
      b = 1'($urandom);
      c      <= b;
      in_vld <= 1'b1;
      @(posedge clk);
      #1;
      d = real'(r) / 16.0 - (b ? 1.0 : -1.0);
      s1 += d;
      s2 += d * d;
      if ((r >= 0) != b) nerr++;
    end
    in_vld <= 1'b0;
    mean_dev = s1 / NS;
    sd  = $sqrt(s2 / NS - mean_dev * mean_dev);
    ber = real'(nerr) / NS;
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

  // Counts samples whose deviation from the symbol is at least `lim` LSBs,
  // for two limits, at 0 dB uncoded.
  task automatic tails(int ns, int lim0, int lim1, output int n0, output int n1);
    n0 = 0; n1 = 0;
    ebn0_db  <= 4'd0;
    coded    <= 1'b0;
    noise_en <= 1'b1;
    in_vld   <= 1'b0;
    @(posedge clk);
    for (int i = 0; i < ns; i++) begin
      bit b;
      int d;
      b = 1'($urandom);
      c      <= b;
      in_vld <= 1'b1;
      @(posedge clk);
      #1;
      d = int'(r) - (b ? 16 : -16);
      if (d < 0) d = -d;
      if (d >= lim0) n0++;
      if (d >= lim1) n1++;
    end
    in_vld <= 1'b0;
  endtask

  initial begin
    real md, sd, ber, want;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < 32; i++) begin
      bit b;
      b = 1'($urandom);
      c <= b;
      ebn0_db <= 4'($urandom);
      in_vld <= 1'b1;
      @(posedge clk);
      in_vld <= 1'b0;
      #1;
      chk(out_vld && r == (b ? 8'sd16 : -8'sd16) && x == r, "noise-free bipolar mapping");
      @(posedge clk);
    end
    for (int k = 0; k < 5; k++) begin
      int db;
      db = (k == 0) ? 0 : (k == 1) ? 3 : (k == 2) ? 7 : (k == 3) ? 10 : 15;
      for (int cd = 0; cd < 2; cd++) begin
        measure(db, 1'(cd), md, sd, ber);
        want = $sqrt(1.0 / (2.0 * (cd ? 4.0 / 7.0 : 1.0) * (10.0 ** (db / 10.0))));
        $display("Eb/N0 %0d dB coded %0d: sigma %f want %f mean %f ber %f", db, cd, sd, want, md, ber);
        chk(sd > 0.94 * want && sd < 1.06 * want + 0.02, "noise standard deviation");
        chk(md > -0.03 && md < 0.03, "noise mean");
        if (cd == 0 && db == 0) chk(ber > 0.070 && ber < 0.088, "uncoded BER at 0 dB");
      end
    end
    measure(4, 1'b0, md, sd, ber);
    chk(ber > 0.0095 && ber < 0.0155, $sformatf("uncoded BER at 4 dB %f", ber));
    begin
      // 0 dB uncoded: sigma = sqrt(1/2) = 11.31 LSB. An output deviation of
      // at least 34 (40) LSB is a noise value above 33.5 (39.5) LSB before
      // rounding, i.e. beyond 2.96 (3.49) standard deviations.
      localparam int NT = 200000;
      real sg, e0, e1;
      int n0, n1;
      sg = 16.0 * $sqrt(0.5);
      tails(NT, 34, 40, n0, n1);
      e0 = 2.0 * qfunc(33.5 / sg) * NT;
      e1 = 2.0 * qfunc(39.5 / sg) * NT;
      $display("tails: %0d beyond 2.96 sigma (Gaussian %.1f), %0d beyond 3.49 sigma (Gaussian %.1f)",
               n0, e0, n1, e1);
      chk(n0 > 0.75 * e0 && n0 < 1.25 * e0, "noise tail beyond 2.96 sigma");
      chk(n1 > 0.75 * e1 && n1 < 1.25 * e1, "noise tail beyond 3.49 sigma");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
