// awgn_channel: BPSK modulator, Gaussian noise generator and adder.
//
// Each code bit C becomes the bipolar symbol X = 2C - 1 (+-1, scaled to
// +-2**SOFT_FRAC) and zero-mean Gaussian noise of variance sigma^2 = N0/2 is
// added, giving the soft received sample R = X + n. The noise power is set
// by the 4-bit Eb/N0 switch, 0..15 dB in 1 dB steps. With symbol energy 1
// and code rate Rc (4/7 coded, 1 uncoded), Eb = 1/Rc and
//   sigma = sqrt(1 / (2 * Rc * 10^(EbN0/10))).
// The sigma table holds round(1024 * sigma) for each setting. The mapping,
// the variance and the 0..15 dB range are the document's; the fixed-point
// formats, the saturation and the noise source (gauss_clt) are this design's.
//
// Timing: one register stage. `in_vld` with `c` gives `out_vld` and `r` one
// clock later; `x` is the noise-free bipolar symbol of the same sample (the
// bipolar test point). `noise_en` = 0 passes X unchanged.
module awgn_channel
  import ecc_pkg::*;
#(
  parameter logic [31:0] SEED0 = 32'h2545_F491,
  parameter logic [31:0] SEED1 = 32'h9E37_79B9,
  parameter logic [31:0] SEED2 = 32'h7F4A_7C15
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] ebn0_db,
  input  logic       coded,
  input  logic       noise_en,
  input  logic       in_vld,
  input  logic       c,
  output logic       out_vld,
  output soft_t      x,
  output soft_t      r
);

  // round(1024 * sqrt(1 / (2 * Rc * 10^(k/10)))), k = Eb/N0 in dB.
  function automatic logic [9:0] sigma_q10(logic [3:0] k, logic is_coded);
    logic [9:0] uncoded_tab [16];
    logic [9:0] coded_tab   [16];
    uncoded_tab = '{10'd724, 10'd645, 10'd575, 10'd513, 10'd457, 10'd407,
                    10'd363, 10'd323, 10'd288, 10'd257, 10'd229, 10'd204,
                    10'd182, 10'd162, 10'd144, 10'd129};
    coded_tab   = '{10'd958, 10'd854, 10'd761, 10'd678, 10'd604, 10'd539,
                    10'd480, 10'd428, 10'd381, 10'd340, 10'd303, 10'd270,
                    10'd241, 10'd214, 10'd191, 10'd170};
    return is_coded ? coded_tab[k] : uncoded_tab[k];
  endfunction

  localparam int ONE = 1 << SOFT_FRAC;
  localparam int MAXV = (1 << (SOFT_W - 1)) - 1;
  localparam int MINV = -(1 << (SOFT_W - 1));
  localparam logic signed [22:0] RND    = 23'(1 << (17 - SOFT_FRAC));
  localparam logic signed [22:0] SAT_HI = 23'(MAXV);
  localparam logic signed [22:0] SAT_LO = 23'(MINV);

  logic signed [11:0] n_raw;
  logic signed [22:0] prod;
  logic signed [22:0] noise;
  logic signed [22:0] sum;
  soft_t              xs;

  gauss_clt #(.SEED0(SEED0), .SEED1(SEED1), .SEED2(SEED2)) u_gauss (
    .clk, .rst_n, .step(in_vld), .n(n_raw)
  );

  always_comb begin
    xs    = c ? soft_t'(ONE) : soft_t'(-ONE);
    // n_raw has standard deviation 256; sigma is in units of 1/1024; the
    // sample is in units of 1/ONE: noise = n_raw * sigma * ONE / 2^18.
    prod  = 23'(n_raw) * $signed({13'd0, sigma_q10(ebn0_db, coded)});
    // Round to nearest so that the noise keeps a zero mean.
    if (noise_en) noise = (prod + RND) >>> (18 - SOFT_FRAC);
    else          noise = '0;
    sum   = 23'(xs) + noise;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_vld <= 1'b0;
      x       <= '0;
      r       <= '0;
    end else begin
      out_vld <= in_vld;
      if (in_vld) begin
        x <= xs;
        if (sum > SAT_HI)      r <= soft_t'(MAXV);
        else if (sum < SAT_LO) r <= soft_t'(MINV);
        else                      r <= soft_t'(sum);
      end
    end
  end

endmodule
