// ml_decoder: soft-decision maximum-likelihood decoder of the (7,4) code.
//
// The received soft word R (seven signed samples of R = X + n, X = 2C - 1)
// is correlated with each of the 2^k = 16 bipolar codewords Xi of the code
// set: Cor_i = sum_j Xi(j) R(j), computed as an add or subtract per sample.
// The codeword with the largest correlation is taken as the transmitted one;
// because the code is systematic, its index i is the decoded message. The
// 16 codewords are regenerated from the switch-set matrix P, so the decoder
// follows any code set. Correlation and maximum search are the document's;
// the two-stage pipeline, the comparison tree and the tie rule (the lower
// index wins) are this design's.
//
// Timing: stage 1 registers the 16 correlations, stage 2 registers the
// winner. `in_vld` with `r` gives `out_vld`, `msg`, `cw` and `best_cor` two
// clocks later; a new word can enter every clock.
module ml_decoder
  import ecc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  pmat_t      p,
  input  logic       in_vld,
  input  soft_word_t r,
  output logic       out_vld,
  output msg_t       msg,
  output cw_t        cw,
  output logic signed [SOFT_W+2:0] best_cor
);

  localparam int CW = SOFT_W + 3;   // 7 samples: 3 bits of growth
  typedef logic signed [CW-1:0] cor_t;

  cor_t [NCW-1:0] cor_c, cor_q;
  logic           vld_q;

  always_comb begin
    for (int i = 0; i < NCW; i++) begin
      cw_t ci;
      ci       = hamming_encode(msg_t'(i), p);
      cor_c[i] = '0;
      for (int j = 0; j < N; j++)
        cor_c[i] = ci[j] ? cor_c[i] + cor_t'(r[j]) : cor_c[i] - cor_t'(r[j]);
    end
  end

  // Comparison tree over the registered correlations.
  cor_t       lvl_cor [5][NCW];
  logic [3:0] lvl_idx [5][NCW];

  always_comb begin
    for (int i = 0; i < NCW; i++) begin
      lvl_cor[0][i] = cor_q[i];
      lvl_idx[0][i] = 4'(i);
    end
    for (int l = 1; l < 5; l++) begin
      for (int i = 0; i < NCW; i++) begin
        lvl_cor[l][i] = '0;
        lvl_idx[l][i] = '0;
      end
      for (int i = 0; i < (NCW >> l); i++) begin
        if (lvl_cor[l-1][2*i+1] > lvl_cor[l-1][2*i]) begin
          lvl_cor[l][i] = lvl_cor[l-1][2*i+1];
          lvl_idx[l][i] = lvl_idx[l-1][2*i+1];
        end else begin
          lvl_cor[l][i] = lvl_cor[l-1][2*i];
          lvl_idx[l][i] = lvl_idx[l-1][2*i];
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cor_q    <= '0;
      vld_q    <= 1'b0;
      out_vld  <= 1'b0;
      msg      <= '0;
      cw       <= '0;
      best_cor <= '0;
    end else begin
      vld_q   <= in_vld;
      out_vld <= vld_q;
      if (in_vld) cor_q <= cor_c;
      if (vld_q) begin
        msg      <= lvl_idx[4][0];
        cw       <= hamming_encode(lvl_idx[4][0], p);
        best_cor <= lvl_cor[4][0];
      end
    end
  end

endmodule
