// tb_crc_decoder: for every combination of three CRC bits and four message
// bits the syndrome must equal r(X) mod g(X), g(X) = 1 + X + X^3, by long
// division, and the CRC LED must light exactly when it is non-zero. Checks
// the seven-clock latency.
module tb_crc_decoder;
  import ecc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, busy, done, crc_err;
  logic [2:0] crc_in, syn;
  msg_t msg;
  int checks = 0, failures = 0;
  int n_err = 0;

  crc_decoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (8000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [2:0] poly_mod(logic [6:0] a);
    for (int d = 6; d >= 3; d--)
      if (a[d]) a = a ^ (7'b0001011 << (d - 3));
    return a[2:0];
  endfunction

  initial begin
    int lat;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int w = 0; w < 128; w++) begin
      logic [6:0] r;
      r = 7'(w);
      crc_in <= r[2:0];
      msg    <= r[6:3];
      start  <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
      lat = 0;
      do begin
        @(posedge clk);
        #1;
        lat++;
      end while (!done && lat < 20);
      #1;
      checks++;
      if (syn !== poly_mod(r) || crc_err !== (poly_mod(r) != 0) || lat != N) begin
        failures++;
        $display("FAIL r=%b syn=%b want %b err=%b lat=%0d", r, syn, poly_mod(r), crc_err, lat);
      end
      if (crc_err) n_err++;
      @(posedge clk);
    end
    // 16 of the 128 words are codewords of the cyclic code.
    checks++;
    if (n_err != 112) begin
      failures++;
      $display("FAIL %0d words flagged, want 112", n_err);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
