// tb_rx_board: feeds the receiver noisy frames in all three modes (coded with
// syndrome decoding, coded with maximum-likelihood decoding, uncoded) and with
// deliberate-error switches. Each decoded message is compared with an
// independent reference: nearest codeword in Hamming distance for the hard
// decoder (the same as syndrome decoding for a perfect code), exhaustive
// correlation for the soft decoder, sign decisions for uncoded frames. The CRC
// LED must light exactly when the decoded message and the sent CRC bits do
// not form a codeword of g(X) = 1 + X + X^3 (a wrong message whose difference
// is a multiple of g(X) goes unnoticed, as it must with three CRC bits), and
// the four counters must match counts kept here.
module tb_rx_board;
  import ecc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  rx_cfg_t cfg;
  logic clr = 1'b0, sym_vld = 1'b0, sym_sof = 1'b0;
  soft_t sym;
  logic [2:0] frm_crc;
  msg_t frm_msg, dec_msg;
  logic dec_vld, led_fail, led_crc, chk_vld;
  cw_t led_cw;
  syn_t led_syn;
  logic [31:0] frames, bit_errs, frame_errs, crc_errs;
  int checks = 0, failures = 0;

  rx_board dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic cw_t ref_enc(msg_t m, pmat_t pm);
    cw_t c;
    c[3:0] = m;
    for (int i = 0; i < 3; i++) begin
      bit a = 0;
      for (int j = 0; j < 4; j++) a ^= m[j] & pm[i][j];
      c[4+i] = a;
    end
    return c;
  endfunction

  function automatic logic [2:0] poly_mod(logic [6:0] a);
    for (int d = 6; d >= 3; d--)
      if (a[d]) a = a ^ (7'b0001011 << (d - 3));
    return a[2:0];
  endfunction

  msg_t exp_q[$], sent_q[$];
  int nf = 0, nb = 0, nfe = 0, nc = 0, n_corr_frames = 0;

  always @(posedge clk) if (rst_n) begin
    if (dec_vld) begin
      msg_t w;
      w = exp_q.pop_front();
      checks++;
      if (dec_msg !== w) begin
        failures++;
        $display("FAIL decoded %b want %b (soft %0d coded %0d)", dec_msg, w, cfg.soft_dec, cfg.coded);
      end
    end
    if (chk_vld) begin
      msg_t s;
      s = sent_q.pop_front();
      checks++;
      if (led_crc !== (poly_mod({dut.chk_msg, poly_mod({s, 3'b000})}) != 3'b000)) begin
        failures++;
        $display("FAIL CRC LED %b for decoded %b sent %b", led_crc, dut.chk_msg, s);
      end
    end
  end

  task automatic send_frame(int amp_noise);
    msg_t m;
    cw_t c;
    soft_word_t w, we;
    cw_t hard;
    msg_t want;
    int len;
    m   = msg_t'($urandom);
    c   = ref_enc(m, cfg.p);
    len = cfg.coded ? N : K;
    for (int j = 0; j < N; j++) begin
      int v;
      v = (c[j] ? 16 : -16) + int'($urandom_range(0, 2 * amp_noise)) - amp_noise;
      w[j] = soft_t'(v);
      we[j] = cfg.err_sw[j] ? soft_t'(-v) : soft_t'(v);
      hard[j] = (we[j] >= 0);
    end
    if (!cfg.coded) want = hard[3:0];
    else if (!cfg.soft_dec) begin
      int best = 99;
      for (int i = 0; i < 16; i++) begin
        int d;
        d = $countones(ref_enc(msg_t'(i), cfg.p) ^ hard);
        if (d < best) begin
          best = d;
          want = msg_t'(i);
        end
      end
      if (best == 1) n_corr_frames++;
    end else begin
      int best = -99999;
      for (int i = 0; i < 16; i++) begin
        int s = 0;
        cw_t ci;
        ci = ref_enc(msg_t'(i), cfg.p);
        for (int j = 0; j < N; j++) s += ci[j] ? int'(we[j]) : -int'(we[j]);
        if (s > best) begin
          best = s;
          want = msg_t'(i);
        end
      end
    end
    exp_q.push_back(want);
    sent_q.push_back(m);
    nf++;
    nb += $countones(want ^ m);
    if (want != m) nfe++;
    if (poly_mod({want, poly_mod({m, 3'b000})}) != 3'b000) nc++;
    frm_msg <= m;
    frm_crc <= poly_mod({m, 3'b000});
    for (int j = 0; j < len; j++) begin
      sym     <= w[j];
      sym_vld <= 1'b1;
      sym_sof <= (j == 0);
      @(posedge clk);
    end
    sym_vld <= 1'b0;
    sym_sof <= 1'b0;
    repeat (12) @(posedge clk);
  endtask

  initial begin
    cfg.p        = {4'b1011, 4'b1110, 4'b0111};
    cfg.err_sw   = '0;
    cfg.soft_dec = 1'b0;
    cfg.coded    = 1'b1;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int ph = 0; ph < 8; ph++) begin
      cfg.coded    = (ph != 6);
      cfg.soft_dec = (ph == 3 || ph == 4 || ph == 5);
      cfg.err_sw   = (ph == 1 || ph == 4) ? 7'b0000100 : (ph == 2 || ph == 5) ? 7'b0000011 : '0;
      for (int t = 0; t < 200; t++) send_frame((ph == 0 || ph == 7 || ph == 3 || ph == 6) ? 24 : 0);
    end
    repeat (20) @(posedge clk);
    checks++;
    if (frames != 32'(nf) || bit_errs != 32'(nb) || frame_errs != 32'(nfe) || crc_errs != 32'(nc)) begin
      failures++;
      $display("FAIL counters %0d %0d %0d %0d want %0d %0d %0d %0d", frames, bit_errs, frame_errs, crc_errs, nf, nb, nfe, nc);
    end
    checks++;
    if (nfe == 0 || n_corr_frames == 0 || exp_q.size() != 0) begin
      failures++;
      $display("FAIL coverage: frame errors %0d corrected %0d left %0d", nfe, n_corr_frames, exp_q.size());
    end
    $display("frames %0d bit errors %0d frame errors %0d", nf, nb, nfe);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
