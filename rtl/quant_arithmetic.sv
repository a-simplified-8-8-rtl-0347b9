// quant_arithmetic: the "arithmetic" half of quantization. For every one of
// the 64 coefficients it forms
//     R = |W| * MF + f
// where MF is P0..P5 selected by the coefficient's position group (fixed per
// position, see dctq_pkg::pos_group) and f is the rounding offset. The sign of
// W is carried next to R so the shifter can restore it.
//
// 64 multipliers work in parallel; the results are registered, so a block is
// accepted every clock and leaves 1 clock later with valid_out. Only the valid
// flag is reset (synchronous, active low).
module quant_arithmetic
  import dctq_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  valid_in,
  input  logic signed [W_W-1:0] w [8][8],
  input  mf_t                   p [6],
  input  logic [F_W-1:0]        f,
  output logic [R_W-1:0]        r_mag [8][8],
  output logic                  r_neg [8][8],
  output logic                  valid_out
);

  for (genvar i = 0; i < 8; i++) begin : g_i
    for (genvar j = 0; j < 8; j++) begin : g_j
      localparam pos_group_e G = pos_group(2'(i % 4), 2'(j % 4));
      logic         neg;
      logic [W_W-1:0] mag;
      assign neg = w[i][j][W_W-1];
      assign mag = neg ? W_W'(-w[i][j]) : W_W'(w[i][j]);

      always_ff @(posedge clk) begin
        r_mag[i][j] <= R_W'(mag) * R_W'(p[G]) + R_W'(f);
        r_neg[i][j] <= neg;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) valid_out <= 1'b0;
    else        valid_out <= valid_in;
  end

endmodule
