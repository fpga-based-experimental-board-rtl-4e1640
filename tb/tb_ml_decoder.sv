// tb_ml_decoder: the decoded message must be the codeword with the largest
// correlation sum_j X(j) R(j) (X = +-1, lower index on ties), found by an
// independent exhaustive search; noise-free words must decode to themselves.
// Words enter every clock (pipelined); each result must appear two clocks
// after its input.
module tb_ml_decoder;
  import ecc_pkg::*;

  localparam int NW = 3000;

  logic clk = 1'b0, rst_n = 1'b0;
  pmat_t p;
  logic in_vld = 1'b0, out_vld;
  soft_word_t r;
  msg_t msg;
  cw_t cw;
  logic signed [SOFT_W+2:0] best_cor;
  int checks = 0, failures = 0;

  ml_decoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  msg_t want_q[$];
  int   cor_q[$];
  int   sent = 0, got = 0;

  // Results are compared in order. A word driven after edge E0 is taken at
  // E1 and registered as a result at E2 (two stages); the monitor, which
  // samples before the edge's updates, sees it at E3: cyc - t0 = 3.
  int   t_in[$];
  int   cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n && out_vld) begin
    msg_t w;
    int   c, t0;
    w  = want_q.pop_front();
    c  = cor_q.pop_front();
    t0 = t_in.pop_front();
    checks++;
    if (msg !== w || int'(best_cor) != c || cw !== ref_enc(w, p) || cyc - t0 != 3) begin
      failures++;
      $display("FAIL got %0d want %0d cor %0d/%0d lat %0d", msg, w, best_cor, c, cyc - t0);
    end
    got++;
  end

  initial begin
    pmat_t pm;
    pm = {4'b1011, 4'b1110, 4'b0111};
    p  = pm;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int t = 0; t < NW; t++) begin
      soft_word_t w;
      int best, bi;
      msg_t src;
      src = msg_t'($urandom);
      for (int j = 0; j < N; j++) begin
        int x;
        x = ref_enc(src, pm)[j] ? 16 : -16;
        if (t >= 64) x += int'($urandom_range(0, 64)) - 32;
        w[j] = soft_t'(x);
      end
      best = -100000;
      bi = 0;
      for (int i = 0; i < 16; i++) begin
        int c;
        cw_t ci;
        ci = ref_enc(msg_t'(i), pm);
        c = 0;
        for (int j = 0; j < N; j++) c += ci[j] ? int'(w[j]) : -int'(w[j]);
        if (c > best) begin
          best = c;
          bi = i;
        end
      end
      if (t < 64) begin
        checks++;
        if (bi != int'(src)) begin
          failures++;
          $display("FAIL reference model");
        end
      end
      want_q.push_back(msg_t'(bi));
      cor_q.push_back(best);
      t_in.push_back(cyc);
      r      <= w;
      in_vld <= 1'b1;
      sent++;
      @(posedge clk);
    end
    in_vld <= 1'b0;
    repeat (5) @(posedge clk);
    checks++;
    if (got != sent) begin
      failures++;
      $display("FAIL %0d results for %0d words", got, sent);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
