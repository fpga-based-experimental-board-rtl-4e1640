// tb_ber_fer_counter: random decoded/transmitted message pairs with random
// CRC flags and occasional clears. After every clock the frame, bit-error,
// frame-error and CRC counters of a full-width instance and of a 4-bit
// instance (which must saturate at 15) are compared with counts kept here.
module tb_ber_fer_counter;
  import ecc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic clr = 1'b0, in_vld = 1'b0, crc_err = 1'b0;
  msg_t msg_ref, msg_dec;
  logic [31:0] frames, bit_errs, frame_errs, crc_errs;
  logic [3:0]  s_frames, s_bit_errs, s_frame_errs, s_crc_errs;
  int checks = 0, failures = 0;

  ber_fer_counter dut (.*);
  ber_fer_counter #(.CNT_W(4)) dut_small (
    .clk, .rst_n, .clr, .in_vld, .msg_ref, .msg_dec, .crc_err,
    .frames(s_frames), .bit_errs(s_bit_errs), .frame_errs(s_frame_errs),
    .crc_errs(s_crc_errs)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL: %s", what);
    end
  endtask

  // Reference counts: index 0 for the full-width instance, 1 for the 4-bit
  // one (saturating at 15).
  longint ref_cnt[2][4];

  function automatic longint sat(longint v, longint maxv);
    return (v > maxv) ? maxv : v;
  endfunction

  initial begin
    int nsat = 0, nclr = 0;
    ref_cnt = '{default: 0};
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int t = 0; t < 3000; t++) begin
      msg_t a, b;
      bit ce, v, c;
      int d;
      a = msg_t'($urandom);
      b = ($urandom_range(0, 3) == 0) ? msg_t'($urandom) : a;
      ce = 1'($urandom);
      v = ($urandom_range(0, 4) != 0);
      c = ($urandom_range(0, 199) == 0);
      msg_ref <= a;
      msg_dec <= b;
      crc_err <= ce;
      in_vld  <= v;
      clr     <= c;
      d = $countones(a ^ b);
      for (int k = 0; k < 2; k++) begin
        longint maxv;
        maxv = (k == 0) ? 64'hFFFF_FFFF : 15;
        if (c) ref_cnt[k] = '{default: 0};
        else if (v) begin
          ref_cnt[k][0] = sat(ref_cnt[k][0] + 1, maxv);
          ref_cnt[k][1] = sat(ref_cnt[k][1] + d, maxv);
          ref_cnt[k][2] = sat(ref_cnt[k][2] + (d != 0), maxv);
          ref_cnt[k][3] = sat(ref_cnt[k][3] + ce, maxv);
        end
      end
      if (c) nclr++;
      @(posedge clk);
      #1;
      chk(frames == 32'(ref_cnt[0][0]), $sformatf("frames %0d want %0d", frames, ref_cnt[0][0]));
      chk(bit_errs == 32'(ref_cnt[0][1]), $sformatf("bit errors %0d want %0d", bit_errs, ref_cnt[0][1]));
      chk(frame_errs == 32'(ref_cnt[0][2]), $sformatf("frame errors %0d want %0d", frame_errs, ref_cnt[0][2]));
      chk(crc_errs == 32'(ref_cnt[0][3]), $sformatf("crc errors %0d want %0d", crc_errs, ref_cnt[0][3]));
      chk({s_crc_errs, s_frame_errs, s_bit_errs, s_frames} ==
          {4'(ref_cnt[1][3]), 4'(ref_cnt[1][2]), 4'(ref_cnt[1][1]), 4'(ref_cnt[1][0])},
          $sformatf("4-bit counters %h %h %h %h", s_frames, s_bit_errs, s_frame_errs, s_crc_errs));
      if (s_frames == 4'hF && s_bit_errs == 4'hF) nsat++;
    end
    chk(nsat > 0 && nclr > 0, "stimulus saturates the narrow counters and clears");
    chk(ref_cnt[0][1] > ref_cnt[0][2], "stimulus has multi-bit frame errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
