// rx_board: the receiver side of the error-control coding laboratory.
//
// Soft samples from the channel are collected into a frame (seven in coded
// mode, four uncoded). The deliberate-error switches e1..e7 then invert the
// chosen positions (the sign of a soft sample, which also flips its hard
// decision). In coded mode the frame goes to the syndrome decoder (hard
// decisions, one clock) or to the maximum-likelihood decoder (soft samples,
// two clocks), as the hard/soft switch selects; in uncoded mode the hard
// decisions of the four samples are the message. The decoded message and
// the frame's three CRC bits are checked by the CRC decoder (seven clocks),
// whose result lights the CRC LED, and the BER/FER counters compare the
// decoded message with the transmitted one. The parts and their order are
// the document's; the frame assembly, the sign-flip form of the error
// switches, the hard-decision threshold (a sample >= 0 is a one) and the
// timing are this design's.
//
// Inputs `frm_crc` and `frm_msg` are sampled with the first symbol of a
// frame (`sym_sof`). Latency from the last symbol of a frame: 1 clock to
// assemble, 1 (syndrome, uncoded) or 2 (ML) clocks to decode, 7 clocks of CRC
// check, 1 clock to count. The CRC checker is busy for 7 clocks per frame,
// so frames must end at least 8 clocks apart (the transmitter sends one
// every 11); an assertion watches this. The syndrome decoder's `corrected`
// flag, the ML winner's correlation and the CRC syndrome value are not used
// by the panel.
module rx_board
  import ecc_pkg::*;
#(
  parameter int unsigned CNT_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  rx_cfg_t          cfg,
  input  logic             clr,
  input  logic             sym_vld,
  input  logic             sym_sof,
  input  soft_t            sym,
  input  logic [2:0]       frm_crc,
  input  msg_t             frm_msg,
  output logic             dec_vld,
  output msg_t             dec_msg,
  output cw_t              led_cw,
  output syn_t             led_syn,
  output logic             led_fail,
  output logic             led_crc,
  output logic             chk_vld,
  output logic [CNT_W-1:0] frames,
  output logic [CNT_W-1:0] bit_errs,
  output logic [CNT_W-1:0] frame_errs,
  output logic [CNT_W-1:0] crc_errs
);

  soft_word_t  buf_q;
  logic [2:0]  idx;
  logic [2:0]  crc_q, crc_hold;
  msg_t        ref_q, ref_hold;
  logic        frame_vld;
  soft_word_t  word;
  cw_t         hard;

  // Frame assembly.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q     <= '0;
      idx       <= '0;
      crc_q     <= '0;
      ref_q     <= '0;
      frame_vld <= 1'b0;
    end else begin
      frame_vld <= 1'b0;
      if (sym_vld) begin
        logic [2:0] i;
        i = sym_sof ? 3'd0 : idx;
        if (sym_sof) begin
          buf_q <= '0;
          crc_q <= frm_crc;
          ref_q <= frm_msg;
        end
        buf_q[i] <= sym;
        if (i == (cfg.coded ? 3'(N - 1) : 3'(K - 1))) begin
          idx       <= '0;
          frame_vld <= 1'b1;
        end else begin
          idx <= i + 3'd1;
        end
      end
    end
  end

  // Deliberate errors and hard decisions.
  always_comb begin
    for (int j = 0; j < N; j++) begin
      soft_t v;
      v = buf_q[j];
      if (cfg.err_sw[j]) v = (v == soft_t'(-(1 << (SOFT_W - 1)))) ? soft_t'((1 << (SOFT_W - 1)) - 1) : -v;
      if (!cfg.coded && j >= K) v = '0;
      word[j] = v;
      hard[j] = (v >= 0);
    end
  end

  // Decoders.
  logic  sd_vld, sd_corr, sd_fail;
  msg_t  sd_msg;
  cw_t   sd_cw;
  syn_t  sd_syn;
  logic  ml_vld;
  msg_t  ml_msg;
  cw_t   ml_cw;
  logic signed [SOFT_W+2:0] ml_cor;
  logic  un_vld;
  msg_t  un_msg;

  syndrome_decoder u_sd (
    .clk, .rst_n, .p(cfg.p), .in_vld(frame_vld && cfg.coded && !cfg.soft_dec),
    .r(hard), .out_vld(sd_vld), .msg(sd_msg), .cw(sd_cw), .syn(sd_syn),
    .corrected(sd_corr), .fail(sd_fail)
  );

  ml_decoder u_ml (
    .clk, .rst_n, .p(cfg.p), .in_vld(frame_vld && cfg.coded && cfg.soft_dec),
    .r(word), .out_vld(ml_vld), .msg(ml_msg), .cw(ml_cw), .best_cor(ml_cor)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      un_vld   <= 1'b0;
      un_msg   <= '0;
      crc_hold <= '0;
      ref_hold <= '0;
    end else begin
      un_vld <= frame_vld && !cfg.coded;
      if (frame_vld) begin
        un_msg   <= hard[K-1:0];
        crc_hold <= crc_q;
        ref_hold <= ref_q;
      end
    end
  end

  always_comb begin
    dec_vld = sd_vld | ml_vld | un_vld;
    if (sd_vld)      dec_msg = sd_msg;
    else if (ml_vld) dec_msg = ml_msg;
    else             dec_msg = un_msg;
  end

  // Panel LEDs: last decoded word, syndrome and decoding failure.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      led_cw   <= '0;
      led_syn  <= '0;
      led_fail <= 1'b0;
    end else if (sd_vld) begin
      led_cw   <= sd_cw;
      led_syn  <= sd_syn;
      led_fail <= sd_fail;
    end else if (ml_vld) begin
      led_cw   <= ml_cw;
      led_syn  <= '0;
      led_fail <= 1'b0;
    end else if (un_vld) begin
      led_cw   <= {3'b000, un_msg};
      led_syn  <= '0;
      led_fail <= 1'b0;
    end
  end

  // CRC check of the decoded message, then statistics.
  logic       crc_busy, crc_done, crc_err;
  syn_t       crc_syn;
  msg_t       chk_msg, chk_ref;

  crc_decoder u_crc (
    .clk, .rst_n, .start(dec_vld), .crc_in(crc_hold), .msg(dec_msg),
    .busy(crc_busy), .done(crc_done), .syn(crc_syn), .crc_err(crc_err)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      chk_msg <= '0;
      chk_ref <= '0;
    end else if (dec_vld) begin
      chk_msg <= dec_msg;
      chk_ref <= ref_hold;
    end
  end

  assign led_crc = crc_err;
  assign chk_vld = crc_done;

  ber_fer_counter #(.CNT_W(CNT_W)) u_cnt (
    .clk, .rst_n, .clr, .in_vld(crc_done), .msg_ref(chk_ref), .msg_dec(chk_msg),
    .crc_err(crc_err), .frames, .bit_errs, .frame_errs, .crc_errs
  );

  // A decoded frame must not arrive while the previous CRC check runs.
  assert property (@(posedge clk) disable iff (!rst_n) dec_vld |-> !crc_busy)
    else $error("rx_board: frames arrive faster than the CRC check");

endmodule
