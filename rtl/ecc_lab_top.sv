// ecc_lab_top: transmitter and receiver boards of the error-control coding
// laboratory, joined by the wire channel.
//
// The transmitter generates pseudo-random 4-bit messages, encodes them with
// the switch-set (7,4) Hamming code and the g(X) = 1 + X + X^3 CRC, and adds
// Gaussian noise at the chosen Eb/N0. The receiver decodes each frame with the
// syndrome (hard) or maximum-likelihood (soft) decoder, checks the result
// with the CRC decoder and counts bit and frame errors. Each board reads its
// panel switches and drives its panel LEDs through a panel_bus_scanner over
// one shared 8-bit bus of 74HC245 transceivers. The frame counters and the
// trainee ID are brought out for the processor that prints BER and FER
// (the processor, its memory, UART, OLED display and AXI fabric are outside
// this RTL). Both boards run from one clock here; the wire link carries the
// soft samples in parallel together with each frame's CRC bits and message.
//
// Panel bit map (switch groups are sampled, LED groups are driven):
//   tx group 0: P row 1 [3:0], P row 2 [7:4]    tx group 3 (LED): M [3:0], CRC [6:4]
//   tx group 1: P row 3 [3:0], Eb/N0 dB [7:4]   tx group 4 (LED): C1..C7 [6:0], busy [7]
//   tx group 2: user ID [3:0], coded [4], noise on [5], run [6]
//   rx group 0: P row 1 [3:0], P row 2 [7:4]    rx group 3 (LED): decoded C1..C4 [3:0],
//   rx group 1: P row 3 [3:0], soft [4],                          syndrome [6:4], fail [7]
//               coded [5], clear counters [6]   rx group 4 (LED): C1..C7 [6:0], CRC [7]
//   rx group 2: e1..e7 [6:0]
// The bit map is this design's choice. The transmitter only starts sessions
// once its switches have been read in full.
module ecc_lab_top
  import ecc_pkg::*;
#(
  parameter int unsigned SLOT  = 4,
  parameter int unsigned CNT_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  // transmitter panel bus
  input  logic [7:0]       tx_bus_i,
  output logic [7:0]       tx_bus_o,
  output logic             tx_bus_oe,
  output logic [4:0]       tx_oe_n,
  output logic             tx_dir,
  // receiver panel bus
  input  logic [7:0]       rx_bus_i,
  output logic [7:0]       rx_bus_o,
  output logic             rx_bus_oe,
  output logic [4:0]       rx_oe_n,
  output logic             rx_dir,
  // oscilloscope test points
  output logic             tp_src_bit,
  output logic             tp_src_vld,
  output logic             tp_tx_bit,
  output soft_t            tp_tx_bipolar,
  output soft_t            tp_rx_soft,
  // results for the processor / display
  output logic [3:0]       user_id,
  output logic             rx_dec_vld,
  output msg_t             rx_dec_msg,
  output logic [31:0]      tx_sessions,
  output logic             result_vld,
  output logic             led_crc,
  output logic [CNT_W-1:0] frames,
  output logic [CNT_W-1:0] bit_errs,
  output logic [CNT_W-1:0] frame_errs,
  output logic [CNT_W-1:0] crc_errs
);

  logic [2:0][7:0] tx_sw, rx_sw;
  logic [1:0][7:0] tx_leds, rx_leds;
  logic            tx_sw_valid;
  tx_cfg_t         tx_cfg;
  rx_cfg_t         rx_cfg;

  panel_bus_scanner #(.NIN(3), .NOUT(2), .SLOT(SLOT)) u_tx_panel (
    .clk, .rst_n, .bus_i(tx_bus_i), .bus_o(tx_bus_o), .bus_oe(tx_bus_oe),
    .oe_n(tx_oe_n), .dir(tx_dir), .leds(tx_leds), .sw(tx_sw),
    .sw_valid(tx_sw_valid), .scan_done()
  );

  panel_bus_scanner #(.NIN(3), .NOUT(2), .SLOT(SLOT)) u_rx_panel (
    .clk, .rst_n, .bus_i(rx_bus_i), .bus_o(rx_bus_o), .bus_oe(rx_bus_oe),
    .oe_n(rx_oe_n), .dir(rx_dir), .leds(rx_leds), .sw(rx_sw),
    .sw_valid(), .scan_done()
  );

  always_comb begin
    tx_cfg.p[0]     = tx_sw[0][3:0];
    tx_cfg.p[1]     = tx_sw[0][7:4];
    tx_cfg.p[2]     = tx_sw[1][3:0];
    tx_cfg.ebn0_db  = tx_sw[1][7:4];
    tx_cfg.user_id  = tx_sw[2][3:0];
    tx_cfg.coded    = tx_sw[2][4];
    tx_cfg.noise_en = tx_sw[2][5];
    rx_cfg.p[0]     = rx_sw[0][3:0];
    rx_cfg.p[1]     = rx_sw[0][7:4];
    rx_cfg.p[2]     = rx_sw[1][3:0];
    rx_cfg.soft_dec = rx_sw[1][4];
    rx_cfg.coded    = rx_sw[1][5];
    rx_cfg.err_sw   = rx_sw[2][6:0];
  end

  // Wire link between the boards.
  logic       sym_vld, sym_sof, tx_busy;
  soft_t      sym;
  logic [2:0] frm_crc;
  msg_t       frm_msg;
  msg_t       tx_led_msg;
  cw_t        tx_led_cw;
  logic [2:0] tx_led_crc;

  tx_board u_tx (
    .clk, .rst_n, .cfg(tx_cfg), .start(1'b0), .run(tx_sw_valid && tx_sw[2][6]),
    .busy(tx_busy), .sym_vld, .sym_sof, .sym, .frm_crc, .frm_msg,
    .tp_src_bit, .tp_src_vld, .tp_bit(tp_tx_bit), .tp_bipolar(tp_tx_bipolar),
    .led_msg(tx_led_msg), .led_cw(tx_led_cw), .led_crc(tx_led_crc),
    .sessions(tx_sessions)
  );

  logic rx_fail;
  cw_t  rx_led_cw;
  syn_t rx_led_syn;

  rx_board #(.CNT_W(CNT_W)) u_rx (
    .clk, .rst_n, .cfg(rx_cfg), .clr(rx_sw[1][6]), .sym_vld, .sym_sof, .sym,
    .frm_crc, .frm_msg, .dec_vld(rx_dec_vld), .dec_msg(rx_dec_msg), .led_cw(rx_led_cw),
    .led_syn(rx_led_syn), .led_fail(rx_fail), .led_crc, .chk_vld(result_vld),
    .frames, .bit_errs, .frame_errs, .crc_errs
  );

  assign tx_leds[0] = {1'b0, tx_led_crc, tx_led_msg};
  assign tx_leds[1] = {tx_busy, tx_led_cw};
  assign rx_leds[0] = {rx_fail, rx_led_syn, rx_led_cw[3:0]};
  assign rx_leds[1] = {led_crc, rx_led_cw};

  assign tp_rx_soft = sym;
  assign user_id    = tx_cfg.user_id;

endmodule
