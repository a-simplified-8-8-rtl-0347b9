// quantization: second main stage of the core, quant_arithmetic followed by
// quant_shifter. It takes the transform coefficients W with quant_en, and the
// block's P0-P5, f and qbits from qp_processing, all aligned on the same
// clock. P0-P5 and f feed the arithmetic block directly; qbits goes straight
// to the shifter, through one register so it meets its block there.
//
// Latency 2 clocks (arithmetic register, shifter register), one block per
// clock, valid_out is the core's output valid. Only valid flags are reset.
module quantization
  import dctq_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  quant_en,
  input  logic signed [W_W-1:0] w [8][8],
  input  mf_t                   p [6],
  input  logic [F_W-1:0]        f,
  input  logic [QB_W-1:0]       qbits,
  output logic signed [Z_W-1:0] z [8][8],
  output logic                  valid_out
);

  logic [R_W-1:0]  r_mag [8][8];
  logic            r_neg [8][8];
  logic            r_valid;
  logic [QB_W-1:0] qbits_q;

  quant_arithmetic u_arith (
    .clk       (clk),
    .rst_n     (rst_n),
    .valid_in  (quant_en),
    .w         (w),
    .p         (p),
    .f         (f),
    .r_mag     (r_mag),
    .r_neg     (r_neg),
    .valid_out (r_valid)
  );

  always_ff @(posedge clk) qbits_q <= qbits;

  quant_shifter u_shift (
    .clk       (clk),
    .rst_n     (rst_n),
    .valid_in  (r_valid),
    .r_mag     (r_mag),
    .r_neg     (r_neg),
    .qbits     (qbits_q),
    .z         (z),
    .valid_out (valid_out)
  );

endmodule
