// syndrome_decoder: hard-decision single-error-correcting Hamming decoder.
//
// The syndrome S = R H^T, H = [P I3], is compared with every column of H (the
// rows of H^T). S = 0 means no error. If S equals column i, bit Ri is taken to
// be in error and is inverted. If S is non-zero and matches no column, two or
// more errors occurred and `fail` is raised; the received word is then passed
// on uncorrected. These steps are the document's. With a degenerate P several
// columns can match; the lowest-numbered bit is corrected then (this design's
// choice, the document does not treat that case).
//
// Timing: one register stage; `in_vld` with `r` gives `out_vld`, `msg`
// (decoded C1..C4), `cw`, `syn`, `corrected` and `fail` one clock later.
module syndrome_decoder
  import ecc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  pmat_t p,
  input  logic  in_vld,
  input  cw_t   r,
  output logic  out_vld,
  output msg_t  msg,
  output cw_t   cw,
  output syn_t  syn,
  output logic  corrected,
  output logic  fail
);

  syn_t s_c;
  cw_t  e_c;
  logic hit_c;

  always_comb begin
    s_c   = hamming_syndrome(r, p);
    e_c   = '0;
    hit_c = 1'b0;
    if (s_c != '0) begin
      for (int j = 0; j < N; j++) begin
        if (!hit_c && h_column(j, p) == s_c) begin
          e_c[j] = 1'b1;
          hit_c  = 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_vld   <= 1'b0;
      msg       <= '0;
      cw        <= '0;
      syn       <= '0;
      corrected <= 1'b0;
      fail      <= 1'b0;
    end else begin
      out_vld <= in_vld;
      if (in_vld) begin
        cw        <= r ^ e_c;
        msg       <= r[K-1:0] ^ e_c[K-1:0];
        syn       <= s_c;
        corrected <= hit_c;
        fail      <= (s_c != '0) && !hit_c;
      end
    end
  end

endmodule
