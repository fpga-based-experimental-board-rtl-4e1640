// crc_encoder: serial LFSR encoder of the (7,4) cyclic code g(X) = 1 + X + X^3.
//
// It computes the parity polynomial B(X) = X^3 M(X) mod g(X), with
// M(X) = M1 + M2 X + M3 X^2 + M4 X^3 and B(X) = CRC1 + CRC2 X + CRC3 X^2, so
// that C(X) = B(X) + X^3 M(X) is a codeword. The three-stage register b0..b2
// with the message entering at the high end (pre-multiplied by X^3) is the
// classic division circuit: per shift, f = m ^ b2, b0 <= f, b1 <= b0 ^ f,
// b2 <= b1. The message is shifted highest degree first (M4 .. M1), so after
// four shifts the register holds the remainder. The polynomial and the LFSR
// form follow the document; the handshake is this design's.
//
// Interface: `start` with `msg` loads the message; four clocks later `done`
// pulses for one clock with `crc` (crc[0] = CRC1) valid and held until the
// next start. `busy` is high while shifting.
module crc_encoder
  import ecc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  msg_t       msg,
  output logic       busy,
  output logic       done,
  output logic [2:0] crc
);

  msg_t       sh;
  logic [2:0] cnt;
  logic [2:0] b;
  logic       f;

  assign f    = sh[K-1] ^ b[2];
  assign busy = (cnt != 0);
  assign crc  = b;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh   <= '0;
      cnt  <= '0;
      b    <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (busy) begin
        b   <= {b[1], b[0] ^ f, f};
        sh  <= {sh[K-2:0], 1'b0};
        cnt <= cnt - 3'd1;
        if (cnt == 3'd1) done <= 1'b1;
      end else if (start) begin
        sh  <= msg;
        b   <= '0;
        cnt <= 3'(K);
      end
    end
  end

endmodule
