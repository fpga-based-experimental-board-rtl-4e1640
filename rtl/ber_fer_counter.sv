// ber_fer_counter: error statistics of the decoded message stream.
//
// For every decoded frame it compares the four decoded message bits with the
// four transmitted ones and accumulates the number of frames, bit errors,
// frame errors (frames with at least one wrong bit) and frames flagged by the
// CRC checker. BER = bit_errs / (4 * frames) and FER = frame_errs / frames
// are formed by the processor that prints the results; this block only
// counts. The counted quantities are the document's; the counter width and
// the clear input are this design's.
//
// Timing: counters update at the clock edge after `in_vld`; `clr` (or
// reset) zeroes them. Counters saturate at all ones.
module ber_fer_counter
  import ecc_pkg::*;
#(
  parameter int unsigned CNT_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             in_vld,
  input  msg_t             msg_ref,
  input  msg_t             msg_dec,
  input  logic             crc_err,
  output logic [CNT_W-1:0] frames,
  output logic [CNT_W-1:0] bit_errs,
  output logic [CNT_W-1:0] frame_errs,
  output logic [CNT_W-1:0] crc_errs
);

  localparam logic [CNT_W-1:0] MAXC = '1;

  msg_t       diff;
  logic [2:0] nerr;

  always_comb begin
    diff = msg_ref ^ msg_dec;
    nerr = '0;
    for (int j = 0; j < K; j++) nerr = nerr + 3'(diff[j]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frames     <= '0;
      bit_errs   <= '0;
      frame_errs <= '0;
      crc_errs   <= '0;
    end else if (clr) begin
      frames     <= '0;
      bit_errs   <= '0;
      frame_errs <= '0;
      crc_errs   <= '0;
    end else if (in_vld) begin
      if (frames != MAXC) frames <= frames + 1'b1;
      if (bit_errs <= MAXC - CNT_W'(nerr)) bit_errs <= bit_errs + CNT_W'(nerr);
      else                                 bit_errs <= MAXC;
      if (diff != '0 && frame_errs != MAXC) frame_errs <= frame_errs + 1'b1;
      if (crc_err && crc_errs != MAXC)      crc_errs   <= crc_errs + 1'b1;
    end
  end

endmodule
