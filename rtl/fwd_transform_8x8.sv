// fwd_transform_8x8: 2D 8x8 forward integer transform W = Cf * X * Cf^T of
// H.264 FRExt, computed separably as a row pass (horizontal_transform)
// followed by a column pass (vertical_transform).
//
// Fully parallel and pipelined: one 8x8 block is accepted on every clock with
// valid_in high and its coefficients appear LATENCY = 6 clocks later with
// quant_en high (3 butterfly stages per pass). There is no back-pressure; the
// core never stalls. The valid flag is the only state that is reset
// (synchronous, active low).
//
// Interface: x[i][j] signed 9-bit residual (row i, column j),
// w[u][v] signed 17-bit transform coefficient (vertical frequency u,
// horizontal frequency v). Intermediate S is 13-bit.
module fwd_transform_8x8
  import dctq_pkg::*;
#(
  parameter int unsigned IN_W  = X_W,
  parameter int unsigned MID_W = S_W,
  parameter int unsigned OUT_W = W_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    valid_in,
  input  logic signed [IN_W-1:0]  x [8][8],
  output logic signed [OUT_W-1:0] w [8][8],
  output logic                    quant_en
);

  localparam int unsigned LATENCY = 6;

  logic signed [MID_W-1:0] s [8][8];
  logic [LATENCY-1:0]      vld_q;

  horizontal_transform #(.IN_W(IN_W), .OUT_W(MID_W)) u_hor (
    .clk (clk),
    .x   (x),
    .s   (s)
  );

  vertical_transform #(.IN_W(MID_W), .OUT_W(OUT_W)) u_ver (
    .clk (clk),
    .s   (s),
    .w   (w)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) vld_q <= '0;
    else        vld_q <= {vld_q[LATENCY-2:0], valid_in};
  end

  assign quant_en = vld_q[LATENCY-1];

endmodule
