// tb_hamming_encoder: every message under random coefficient matrices P, with
// codewords formed independently as the vector-matrix product M G over GF(2),
// G = [I4 P^T] built element by element; checks the one-clock latency.
module tb_hamming_encoder;
  import ecc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  pmat_t p;
  logic in_vld = 1'b0, out_vld;
  msg_t msg;
  cw_t cw;
  int checks = 0, failures = 0;

  hamming_encoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic cw_t ref_encode(msg_t m, pmat_t pm);
    bit g[4][7];
    cw_t c;
    for (int r = 0; r < 4; r++) begin
      for (int col = 0; col < 4; col++) g[r][col] = (r == col);
      for (int i = 0; i < 3; i++) g[r][4+i] = pm[i][r];
    end
    for (int col = 0; col < 7; col++) begin
      bit acc = 0;
      for (int r = 0; r < 4; r++) acc = acc ^ (m[r] & g[r][col]);
      c[col] = acc;
    end
    return c;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int t = 0; t < 40; t++) begin
      pmat_t pm;
      pm = (t == 0) ? pmat_t'(12'b1011_1110_0111) : pmat_t'($urandom);
      for (int m = 0; m < 16; m++) begin
        p      <= pm;
        msg    <= msg_t'(m);
        in_vld <= 1'b1;
        @(posedge clk);
        in_vld <= 1'b0;
        #1;
        checks++;
        if (!out_vld || cw !== ref_encode(msg_t'(m), pm)) begin
          failures++;
          $display("FAIL P=%h M=%b got %b want %b vld=%b", pm, m[3:0], cw, ref_encode(msg_t'(m), pm), out_vld);
        end
        @(posedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
