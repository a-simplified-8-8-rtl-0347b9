// quant_shifter: the "shifter" half of quantization. For every coefficient
//     |Z| = R >> (qbits + 1),   sign(Z) = sign(W)
// A magnitude that shifts down to zero gives Z = 0 whatever the sign.
//
// 64 barrel shifters work in parallel; the results are registered, so a block
// is accepted every clock and leaves 1 clock later with valid_out (the core's
// output valid). Only the valid flag is reset (synchronous, active low).
// Z is 19-bit signed; the largest |Z| the core can produce is below 2^16.
module quant_shifter
  import dctq_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  valid_in,
  input  logic [R_W-1:0]        r_mag [8][8],
  input  logic                  r_neg [8][8],
  input  logic [QB_W-1:0]       qbits,
  output logic signed [Z_W-1:0] z [8][8],
  output logic                  valid_out
);

  logic [QB_W:0] sh;
  assign sh = {1'b0, qbits} + 1'b1;

  for (genvar i = 0; i < 8; i++) begin : g_i
    for (genvar j = 0; j < 8; j++) begin : g_j
      logic [Z_W-1:0] qz;
      assign qz = Z_W'(r_mag[i][j] >> sh);

      always_ff @(posedge clk) begin
        z[i][j] <= r_neg[i][j] ? -qz : qz;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) valid_out <= 1'b0;
    else        valid_out <= valid_in;
  end

endmodule
