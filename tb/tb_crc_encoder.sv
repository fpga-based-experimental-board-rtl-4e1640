// tb_crc_encoder: for all 16 messages the CRC bits must equal the remainder
// of X^3 M(X) divided by g(X) = 1 + X + X^3, computed by polynomial long
// division; also checks that the resulting 7-bit word is divisible by g(X)
// and that `done` comes four clocks after `start`.
module tb_crc_encoder;
  import ecc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, busy, done;
  msg_t msg;
  logic [2:0] crc;
  int checks = 0, failures = 0;

  crc_encoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Remainder of a degree <= 6 polynomial (bit i = coefficient of X^i) by g.
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
    for (int rep = 0; rep < 2; rep++)
      for (int m = 0; m < 16; m++) begin
        logic [2:0] want;
        want = poly_mod({m[3:0], 3'b000});
        msg   <= msg_t'(m);
        start <= 1'b1;
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
        if (crc !== want) begin
          failures++;
          $display("FAIL M=%b crc=%b want %b", m[3:0], crc, want);
        end
        checks++;
        if (poly_mod({m[3:0], crc}) != 3'b000) begin
          failures++;
          $display("FAIL codeword not divisible for M=%b", m[3:0]);
        end
        checks++;
        if (lat != K) begin
          failures++;
          $display("FAIL latency %0d", lat);
        end
        @(posedge clk);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
