// hamming_encoder: systematic (7,4) Hamming encoder with switch-set P.
//
// C = M G with G = [I4 P^T]: the codeword repeats the message in C1..C4 and
// appends three parity bits C5..C7, where C(4+i) is the XOR of the message
// bits Mj selected by row i of P (AND then XOR, as in the document's
// equations). Because P comes from switches, any of the 4096 code sets can be
// tried; a P whose columns are not distinct and of weight two or more gives a
// code that cannot correct every single error, which the receiver reports.
//
// Timing: one register stage. `in_vld` with `msg` produces `cw` and `out_vld`
// one clock later. The register stage is this design's choice.
module hamming_encoder
  import ecc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  pmat_t p,
  input  logic  in_vld,
  input  msg_t  msg,
  output logic  out_vld,
  output cw_t   cw
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_vld <= 1'b0;
      cw      <= '0;
    end else begin
      out_vld <= in_vld;
      if (in_vld) cw <= hamming_encode(msg, p);
    end
  end

endmodule
