// gauss_clt: approximately Gaussian random numbers by the central limit
// theorem with a tail correction.
//
// Three 32-bit xorshift generators (x ^= x << 13; x ^= x >> 17; x ^= x << 5)
// supply twelve uniform bytes per step. Their sum minus its mean 12 * 127.5,
// s, has zero mean and a standard deviation of 256 (each byte has variance
// 256^2 / 12). A sum of twelve uniforms has too thin tails (at 3.5 standard
// deviations it gives about half the Gaussian probability), so the
// Cornish-Fisher correction for its kurtosis is applied: with x = s / 256,
//   z = x + (x^3 - 3x) / 240,
// which brings the tail probability to within about 12 % of the Gaussian
// out to 3.5 standard deviations. `n` is z scaled by 256, at most about
// +-1740 (6.8 standard deviations). The generator type is this design's
// choice; only a Gaussian noise generator is specified.
//
// Timing: `n` is a combinational function of the state (two multipliers);
// `step` advances all three generators at the clock edge. Reset loads the
// SEED parameters.
module gauss_clt #(
  parameter logic [31:0] SEED0 = 32'h2545_F491,
  parameter logic [31:0] SEED1 = 32'h9E37_79B9,
  parameter logic [31:0] SEED2 = 32'h7F4A_7C15
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               step,
  output logic signed [11:0] n
);

  logic [2:0][31:0] x;

  function automatic logic [31:0] xorshift32(logic [31:0] v);
    logic [31:0] t;
    t = v ^ (v << 13);
    t = t ^ (t >> 17);
    t = t ^ (t << 5);
    return t;
  endfunction

  logic signed [11:0] s;
  logic signed [35:0] cube;
  logic signed [19:0] t;
  logic signed [29:0] corr;

  always_comb begin
    logic [12:0] sum;
    sum = '0;
    for (int g = 0; g < 3; g++)
      for (int b = 0; b < 4; b++)
        sum = sum + 13'(x[g][8*b +: 8]);
    s    = 12'($signed(sum) - 13'sd1530);
    cube = 36'(s) * 36'(s) * 36'(s);
    // (x^3 - 3x) / 240 in units of 1/256: (s^3 / 2^16 - 3 s) * 273 / 2^16.
    t    = 20'(cube >>> 16) - 20'(s) * 20'sd3;
    corr = 30'(t) * 30'sd273;
    n    = s + 12'(corr >>> 16);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= {SEED2, SEED1, SEED0};
    end else if (step) begin
      for (int g = 0; g < 3; g++) x[g] <= xorshift32(x[g]);
    end
  end

endmodule
