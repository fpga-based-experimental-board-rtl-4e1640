// tx_board: the transmitter side of the error-control coding laboratory.
//
// One transmission session draws four message bits from the LFSR source,
// encodes them with the (7,4) Hamming encoder (coefficient matrix P from the
// panel) and, in parallel, with the g(X) = 1 + X + X^3 CRC encoder, and then
// sends the frame symbol by symbol through the Gaussian noise channel: seven
// symbols C1..C7 in coded mode, the four message bits in uncoded mode. The
// soft samples go to the receiver over a parallel link together with the
// frame's CRC bits and its message, which the receiver needs for the CRC
// check and the BER/FER count. The block list and their order are the
// document's; the session timing, the noise-free side link for CRC and
// reference message, and the one-symbol-per-clock rate are this design's.
//
// Pipelining: a producer (source, 5 clocks; encoders, 6 clocks) fills a
// one-frame buffer while the sender is still transmitting the previous
// frame. With `run` held, a frame leaves every 11 clocks in both modes (the
// producer is the slower stage); `start` requests a single session. The
// channel adds one clock of latency.
//
// Outputs: `sym_vld`/`sym_sof`/`sym` carry the noisy samples (sof marks C1);
// `frm_crc` and `frm_msg` hold the current frame's CRC bits and message from
// its first symbol until the next frame starts; `tp_src_bit`/`tp_src_vld`
// (LFSR serial output), `tp_bit` (unipolar code bit) and `tp_bipolar` are the
// oscilloscope test points; `led_*` drive panel LEDs. `cfg.user_id` is not
// used here; the top brings it out with the results.
module tx_board
  import ecc_pkg::*;
#(
  parameter logic [30:0] SEED = 31'h1234_5678
) (
  input  logic       clk,
  input  logic       rst_n,
  input  tx_cfg_t    cfg,
  input  logic       start,
  input  logic       run,
  output logic       busy,
  output logic       sym_vld,
  output logic       sym_sof,
  output soft_t      sym,
  output logic [2:0] frm_crc,
  output msg_t       frm_msg,
  output logic       tp_src_bit,
  output logic       tp_src_vld,
  output logic       tp_bit,
  output soft_t      tp_bipolar,
  output msg_t       led_msg,
  output cw_t        led_cw,
  output logic [2:0] led_crc,
  output logic [31:0] sessions
);

  // Producer: source and encoders fill a one-frame buffer.
  typedef enum logic [1:0] {P_IDLE, P_SRC, P_ENC, P_FULL} pstate_t;
  pstate_t pstate;
  // Sender: empties the buffer into the channel, one symbol per clock.
  logic    sending;

  logic       src_start, src_busy, src_msg_vld;
  msg_t       src_msg;
  logic       enc_vld;
  cw_t        enc_cw;
  logic       crc_busy, crc_done;
  logic [2:0] crc_bits;
  logic       enc_seen;
  cw_t        nxt_cw;
  msg_t       nxt_msg;
  logic [2:0] nxt_crc;
  logic       take;
  cw_t        frame_cw;
  logic [2:0] sym_idx;
  logic       last_sym;
  logic       ch_in_vld, ch_bit, ch_sof_q;

  assign take      = (pstate == P_FULL) && (!sending || last_sym);
  assign src_start = (start || run) && ((pstate == P_IDLE) || take);
  assign busy      = (pstate != P_IDLE) || sending;
  assign last_sym  = sending && (sym_idx == (cfg.coded ? 3'(N - 1) : 3'(K - 1)));

  lfsr_source #(.SEED(SEED)) u_src (
    .clk, .rst_n, .load(1'b0), .seed('0), .start(src_start),
    .busy(src_busy), .bit_o(tp_src_bit), .bit_vld(tp_src_vld),
    .msg(src_msg), .msg_vld(src_msg_vld)
  );

  hamming_encoder u_ham (
    .clk, .rst_n, .p(cfg.p), .in_vld(src_msg_vld), .msg(src_msg),
    .out_vld(enc_vld), .cw(enc_cw)
  );

  crc_encoder u_crc (
    .clk, .rst_n, .start(src_msg_vld), .msg(src_msg),
    .busy(crc_busy), .done(crc_done), .crc(crc_bits)
  );

  assign ch_in_vld = sending;
  assign ch_bit    = frame_cw[sym_idx];

  awgn_channel u_ch (
    .clk, .rst_n, .ebn0_db(cfg.ebn0_db), .coded(cfg.coded),
    .noise_en(cfg.noise_en), .in_vld(ch_in_vld), .c(ch_bit),
    .out_vld(sym_vld), .x(tp_bipolar), .r(sym)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pstate   <= P_IDLE;
      enc_seen <= 1'b0;
      nxt_cw   <= '0;
      nxt_msg  <= '0;
      nxt_crc  <= '0;
    end else begin
      case (pstate)
        P_IDLE: if (src_start) pstate <= P_SRC;
        P_SRC: if (src_msg_vld) begin
          pstate   <= P_ENC;
          nxt_msg  <= src_msg;
          enc_seen <= 1'b0;
        end
        P_ENC: begin
          if (enc_vld) begin
            enc_seen <= 1'b1;
            nxt_cw   <= enc_cw;
          end
          if (crc_done) begin
            nxt_crc <= crc_bits;
            pstate  <= P_FULL;
          end
        end
        P_FULL: if (take) pstate <= src_start ? P_SRC : P_IDLE;
        default: pstate <= P_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sending  <= 1'b0;
      frame_cw <= '0;
      sym_idx  <= '0;
      ch_sof_q <= 1'b0;
      frm_crc  <= '0;
      frm_msg  <= '0;
      tp_bit   <= 1'b0;
      sessions <= '0;
    end else begin
      ch_sof_q <= ch_in_vld && (sym_idx == '0);
      if (ch_in_vld) tp_bit <= ch_bit;
      if (last_sym) sessions <= sessions + 1'b1;
      if (take) begin
        sending  <= 1'b1;
        sym_idx  <= '0;
        frame_cw <= nxt_cw;
        frm_crc  <= nxt_crc;
        frm_msg  <= nxt_msg;
      end else if (last_sym) begin
        sending <= 1'b0;
      end else if (sending) begin
        sym_idx <= sym_idx + 3'd1;
      end
    end
  end

  // The encoder result always precedes the CRC result.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (pstate == P_ENC && crc_done) |-> (enc_seen || enc_vld))
    else $error("tx_board: CRC finished before the Hamming encoder");

  assign sym_sof = ch_sof_q;
  assign led_msg = frm_msg;
  assign led_cw  = frame_cw;
  assign led_crc = frm_crc;

endmodule
