// crc_decoder: serial LFSR syndrome checker for g(X) = 1 + X + X^3.
//
// It forms r(X) = CRC1 + CRC2 X + CRC3 X^2 + C1 X^3 + .. + C4 X^6 from the
// three received CRC bits and the four message bits delivered by the Hamming
// decoder, and computes S(X) = r(X) mod g(X) by shifting r6 first through the
// register s0..s2: per shift, s0 <= r ^ s2, s1 <= s0 ^ s2, s2 <= s1. S = 0
// declares the decoded message error-free; otherwise the CRC LED is lit.
// The polynomial and the check follow the document; the serial timing, the
// handshake and the held LED are this design's.
//
// Interface: `start` with `crc_in` and `msg` loads the 7-bit word; seven
// clocks later `done` pulses with `syn` and `crc_err` (= syn != 0) valid;
// `crc_err` and `syn` hold until the next check completes.
module crc_decoder
  import ecc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [2:0] crc_in,
  input  msg_t       msg,
  output logic       busy,
  output logic       done,
  output logic [2:0] syn,
  output logic       crc_err
);

  cw_t        sh;   // r(X) coefficients, r0 in bit 0
  logic [2:0] cnt;
  logic [2:0] s;

  assign busy = (cnt != 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh      <= '0;
      cnt     <= '0;
      s       <= '0;
      syn     <= '0;
      crc_err <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (busy) begin
        s   <= {s[1], s[0] ^ s[2], sh[N-1] ^ s[2]};
        sh  <= {sh[N-2:0], 1'b0};
        cnt <= cnt - 3'd1;
        if (cnt == 3'd1) begin
          syn     <= {s[1], s[0] ^ s[2], sh[N-1] ^ s[2]};
          crc_err <= ({s[1], s[0] ^ s[2], sh[N-1] ^ s[2]} != 3'b000);
          done    <= 1'b1;
        end
      end else if (start) begin
        sh  <= {msg, crc_in};
        s   <= '0;
        cnt <= 3'(N);
      end
    end
  end

endmodule
