// lfsr_source: pseudo-random binary data source of the transmitter.
//
// A 31-bit Fibonacci linear feedback shift register realises the generator
// polynomial Gp(X) = X^31 + X^22 + X^2 + X + 1, so the bit stream a(n) obeys
// a(n+31) = a(n+22) ^ a(n+2) ^ a(n+1) ^ a(n). The register holds a(n) in bit 0
// and a(n+30) in bit 30; each shift emits bit 0 and enters the feedback bit at
// the top. The polynomial and the four-bit message per session follow the
// document; the seed, the load port and the serial timing are this design's.
//
// Interface: a one-cycle `start` begins a session. The register then shifts
// once per clock for K = 4 clocks, emitting the bits on `bit_o`/`bit_vld`
// (first bit becomes M1). In the cycle after the fourth shift `msg_vld`
// pulses with msg[0] = M1 .. msg[3] = M4. `start` is ignored while `busy`.
// `load` writes `seed` into the register (an all-zero seed is replaced by
// SEED so the register can never lock up). Reset loads SEED.
module lfsr_source
  import ecc_pkg::*;
#(
  parameter logic [30:0] SEED = 31'h1234_5678
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  logic [30:0] seed,
  input  logic        start,
  output logic        busy,
  output logic        bit_o,
  output logic        bit_vld,
  output msg_t        msg,
  output logic        msg_vld
);

  logic [30:0] sr;
  logic [2:0]  cnt;
  logic [K-2:0] acc;  // M1..M3; M4 is taken straight from the register
  logic        fb;

  assign fb      = sr[22] ^ sr[2] ^ sr[1] ^ sr[0];
  assign busy    = (cnt != 0);
  assign bit_o   = sr[0];
  assign bit_vld = busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr      <= SEED;
      cnt     <= '0;
      acc     <= '0;
      msg     <= '0;
      msg_vld <= 1'b0;
    end else begin
      msg_vld <= 1'b0;
      if (load && !busy) begin
        sr <= (seed == '0) ? SEED : seed;
      end else if (busy) begin
        sr           <= {fb, sr[30:1]};
        if (cnt < 3'(K)) acc[2'(cnt - 3'd1)] <= sr[0];
        if (cnt == 3'(K)) begin
          cnt     <= '0;
          msg     <= {sr[0], acc[K-2:0]};
          msg_vld <= 1'b1;
        end else begin
          cnt <= cnt + 3'd1;
        end
      end else if (start) begin
        cnt <= 3'd1;
      end
    end
  end

endmodule
