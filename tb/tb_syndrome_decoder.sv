// tb_syndrome_decoder: (a) with a proper Hamming matrix P every message is
// recovered under no error and under each single error, and a double error
// is never reported as clean; (b) for random P and random words, the output
// matches an independent model built on an explicit H = [P I3]: syndrome by
// matrix product, correction of the lowest-numbered bit whose H column equals
// the syndrome, failure when no column does. Checks the one-clock latency.
module tb_syndrome_decoder;
  import ecc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  pmat_t p;
  logic in_vld = 1'b0, out_vld, corrected, fail;
  cw_t r, cw;
  msg_t msg;
  syn_t syn;
  int checks = 0, failures = 0;
  int n_fail_seen = 0;

  syndrome_decoder dut (.*);

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

  task automatic apply(cw_t w, pmat_t pm);
    p <= pm;
    r <= w;
    in_vld <= 1'b1;
    @(posedge clk);
    in_vld <= 1'b0;
    #1;
  endtask

  task automatic check_ref(cw_t w, pmat_t pm);
    bit h[3][7];
    logic [2:0] s;
    cw_t want;
    bit wfail;
    int hit;
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 7; j++)
        h[i][j] = (j < 4) ? pm[i][j] : (j - 4 == i);
    for (int i = 0; i < 3; i++) begin
      s[i] = 0;
      for (int j = 0; j < 7; j++) s[i] ^= w[j] & h[i][j];
    end
    hit = -1;
    if (s != 0)
      for (int j = 6; j >= 0; j--)
        if ({h[2][j], h[1][j], h[0][j]} == s) hit = j;
    want  = w;
    if (hit >= 0) want[hit] = ~want[hit];
    wfail = (s != 0) && (hit < 0);
    checks++;
    if (!out_vld || syn !== s || cw !== want || msg !== want[3:0] || fail !== wfail
        || corrected !== (hit >= 0)) begin
      failures++;
      $display("FAIL P=%h r=%b: syn %b/%b cw %b/%b fail %b/%b", pm, w, syn, s, cw, want, fail, wfail);
    end
    if (fail) n_fail_seen++;
  endtask

  initial begin
    pmat_t ph;
    ph = {4'b1011, 4'b1110, 4'b0111};  // rows P3, P2, P1: distinct weight-2/3 columns
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int m = 0; m < 16; m++) begin
      cw_t c;
      c = ref_enc(msg_t'(m), ph);
      for (int e = -1; e < 7; e++) begin
        cw_t w;
        w = c;
        if (e >= 0) w[e] = ~w[e];
        apply(w, ph);
        checks++;
        if (msg !== msg_t'(m) || cw !== c || fail) begin
          failures++;
          $display("FAIL single error %0d on M=%0d: got %b", e, m, msg);
        end
        @(posedge clk);
      end
      for (int a = 0; a < 7; a++)
        for (int b = a + 1; b < 7; b++) begin
          cw_t w;
          w = c;
          w[a] = ~w[a];
          w[b] = ~w[b];
          apply(w, ph);
          checks++;
          if (syn == 3'b000) begin
            failures++;
            $display("FAIL double error gives zero syndrome");
          end
          @(posedge clk);
        end
    end
    for (int t = 0; t < 2000; t++) begin
      pmat_t pm;
      cw_t w;
      pm = (t < 200) ? pmat_t'(12'h000) : pmat_t'($urandom);
      w  = cw_t'($urandom);
      apply(w, pm);
      check_ref(w, pm);
      @(posedge clk);
    end
    checks++;
    if (n_fail_seen == 0) begin
      failures++;
      $display("FAIL decoding failure never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
