// tb_lfsr_source: checks the pseudo-random source against the recurrence of
// Gp(X) = X^31 + X^22 + X^2 + X + 1, a(n+31) = a(n+22)^a(n+2)^a(n+1)^a(n),
// the seed as the first 31 bits, the grouping of four bits per message
// (first bit = M1), the session latency and the seed load port.
module tb_lfsr_source;
  import ecc_pkg::*;

  localparam logic [30:0] SEED = 31'h1234_5678;
  localparam int SESSIONS = 60;

  logic clk = 1'b0, rst_n = 1'b0;
  logic load = 1'b0, start = 1'b0;
  logic [30:0] seed = '0;
  logic busy, bit_o, bit_vld, msg_vld;
  msg_t msg;
  int checks = 0, failures = 0;

  lfsr_source #(.SEED(SEED)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  bit stream[$];
  bit sess_bits[$];

  always @(posedge clk) if (rst_n && bit_vld) begin
    stream.push_back(bit_o);
    sess_bits.push_back(bit_o);
  end

  initial begin
    int lat;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int s = 0; s < SESSIONS; s++) begin
      start <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
      lat = 1;
      while (!msg_vld) begin
        @(posedge clk);
        #1;
        lat++;
      end
      check(lat == K + 1, $sformatf("session latency %0d, want %0d", lat, K + 1));
      check(sess_bits.size() == K, "four bits per session");
      for (int j = 0; j < K; j++)
        if (j < sess_bits.size()) check(msg[j] == sess_bits[j], $sformatf("M%0d order", j + 1));
      sess_bits.delete();
      @(posedge clk);
    end
    // Recurrence and seed.
    check(stream.size() == SESSIONS * K, "stream length");
    for (int n = 0; n < 31; n++) check(stream[n] == SEED[n], $sformatf("seed bit %0d", n));
    for (int n = 0; n + 31 < stream.size(); n++)
      check(stream[n+31] == (stream[n+22] ^ stream[n+2] ^ stream[n+1] ^ stream[n]),
            $sformatf("recurrence at %0d", n));
    // Seed load.
    seed <= 31'h0000_0005;
    load <= 1'b1;
    @(posedge clk);
    load <= 1'b0;
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    while (!msg_vld) @(posedge clk);
    check(msg == 4'b0101, $sformatf("message after seed load %b", msg));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
