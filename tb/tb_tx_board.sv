// tb_tx_board: runs the transmitter continuously. With noise off, every
// frame's symbols must be the bipolar image of the Hamming codeword of the
// frame's message (coded) or of the message itself (uncoded), the frame's CRC
// bits must be the remainder of X^3 M(X) by 1 + X + X^3, and the message bits,
// read in order, must follow the LFSR recurrence of
// X^31 + X^22 + X^2 + X + 1. With noise on, samples must differ from the
// noise-free test point. Checks the pipelined frame period of 11 clocks.
module tb_tx_board;
  import ecc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  tx_cfg_t cfg;
  logic start = 1'b0, run = 1'b0, busy, sym_vld, sym_sof, tp_bit, tp_src_bit, tp_src_vld;
  soft_t sym, tp_bipolar;
  logic [2:0] frm_crc, led_crc;
  msg_t frm_msg, led_msg;
  cw_t led_cw;
  logic [31:0] sessions;
  int checks = 0, failures = 0;

  tx_board dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
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

  bit   stream[$];
  soft_t fr[$];
  int   n_frames = 0, n_noisy = 0, n_coded = 0, n_uncoded = 0;
  int   sof_t[$];
  int   cyc = 0;
  msg_t cur_msg;
  logic [2:0] cur_crc;
  bit   cur_coded, cur_noisy;

  task automatic close_frame();
    int len;
    cw_t want;
    len  = cur_coded ? N : K;
    want = ref_enc(cur_msg, cfg.p);
    checks++;
    if (fr.size() != len) begin
      failures++;
      $display("FAIL frame length %0d", fr.size());
    end else if (!cur_noisy) begin
      for (int j = 0; j < len; j++)
        if (fr[j] != (want[j] ? 8'sd16 : -8'sd16)) begin
          failures++;
          $display("FAIL symbol %0d of M=%b", j, cur_msg);
          break;
        end
    end
    checks++;
    if (cur_crc != poly_mod({cur_msg, 3'b000})) begin
      failures++;
      $display("FAIL CRC %b for M=%b", cur_crc, cur_msg);
    end
    for (int j = 0; j < K; j++) stream.push_back(cur_msg[j]);
    if (cur_coded) n_coded++; else n_uncoded++;
    n_frames++;
    fr.delete();
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && sym_vld) begin
      if (sym_sof) begin
        if (fr.size() != 0) close_frame();
        cur_msg = frm_msg;
        cur_crc = frm_crc;
        cur_coded = cfg.coded;
        cur_noisy = cfg.noise_en;
        sof_t.push_back(cyc);
      end
      fr.push_back(sym);
      if (cfg.noise_en && sym != tp_bipolar) n_noisy++;
    end
  end

  initial begin
    cfg.p        = {4'b1011, 4'b1110, 4'b0111};
    cfg.ebn0_db  = 4'd2;
    cfg.noise_en = 1'b0;
    cfg.coded    = 1'b1;
    cfg.user_id  = 4'd1;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    run <= 1'b1;
    wait (sessions == 40);
    checks++;
    if (sof_t.size() < 3 || sof_t[2] - sof_t[1] != 11) begin
      failures++;
      $display("FAIL coded session period %0d", sof_t[2] - sof_t[1]);
    end
    run <= 1'b0;
    wait (!busy);
    repeat (3) @(posedge clk);
    cfg.coded = 1'b0;
    sof_t.delete();
    run <= 1'b1;
    wait (sessions == 80);
    checks++;
    if (sof_t.size() < 3 || sof_t[2] - sof_t[1] != 11) begin
      failures++;
      $display("FAIL uncoded session period %0d", sof_t[2] - sof_t[1]);
    end
    run <= 1'b0;
    wait (!busy);
    repeat (3) @(posedge clk);
    cfg.coded = 1'b1;
    cfg.noise_en = 1'b1;
    run <= 1'b1;
    wait (sessions == 120);
    run <= 1'b0;
    wait (!busy);
    repeat (4) @(posedge clk);
    close_frame();
    // Message bits follow the source recurrence.
    for (int n = 0; n + 31 < stream.size(); n++) begin
      checks++;
      if (stream[n+31] != (stream[n+22] ^ stream[n+2] ^ stream[n+1] ^ stream[n])) begin
        failures++;
        $display("FAIL source recurrence at %0d", n);
      end
    end
    checks++;
    if (n_frames != int'(sessions) || n_coded == 0 || n_uncoded == 0 || n_noisy < 200) begin
      failures++;
      $display("FAIL coverage frames %0d coded %0d uncoded %0d noisy %0d", n_frames, n_coded, n_uncoded, n_noisy);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
