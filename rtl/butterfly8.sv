// butterfly8: one 8-point 1D forward integer transform of the H.264 8x8
// (FRExt) transform, built as three registered butterfly stages.
//
// Stage I forms the sums and differences of mirrored inputs (a), stage II
// combines them with shift-and-add terms that stand in for the odd-part
// multiplications (b), and stage III produces the eight outputs (w). Only
// additions, subtractions and arithmetic right shifts are used; the equations
// are those of the standard's fast 8x8 transform. Each stage ends in a
// register, so the unit accepts a new vector every clock and its latency is
// 3 cycles. The registers have no reset and no enable: validity is tracked by
// the instantiating module (the core never stalls).
//
// Interface: x[0..7] signed IN_W bits in, w[0..7] signed OUT_W bits out.
// All arithmetic is done at OUT_W bits; OUT_W >= IN_W + 4 keeps every
// intermediate in range (the largest 1D gain is 8). Registering each of the
// three stages is this design's choice.
module butterfly8 #(
  parameter int unsigned IN_W  = 9,
  parameter int unsigned OUT_W = 13
) (
  input  logic                    clk,
  input  logic signed [IN_W-1:0]  x [8],
  output logic signed [OUT_W-1:0] w [8]
);

  typedef logic signed [OUT_W-1:0] val_t;

  val_t xe [8];
  val_t a_n [8], a_q [8];
  val_t b_n [8], b_q [8];
  val_t w_n [8];

  always_comb begin
    for (int k = 0; k < 8; k++) xe[k] = val_t'(x[k]);
  end

  // Stage I
  always_comb begin
    a_n[0] = xe[0] + xe[7];
    a_n[1] = xe[1] + xe[6];
    a_n[2] = xe[2] + xe[5];
    a_n[3] = xe[3] + xe[4];
    a_n[4] = xe[0] - xe[7];
    a_n[5] = xe[1] - xe[6];
    a_n[6] = xe[2] - xe[5];
    a_n[7] = xe[3] - xe[4];
  end

  // Stage II
  always_comb begin
    b_n[0] = a_q[0] + a_q[3];
    b_n[1] = a_q[1] + a_q[2];
    b_n[2] = a_q[0] - a_q[3];
    b_n[3] = a_q[1] - a_q[2];
    b_n[4] = a_q[5] + a_q[6] + ((a_q[4] >>> 1) + a_q[4]);
    b_n[5] = a_q[4] - a_q[7] - ((a_q[6] >>> 1) + a_q[6]);
    b_n[6] = a_q[4] + a_q[7] - ((a_q[5] >>> 1) + a_q[5]);
    b_n[7] = a_q[5] - a_q[6] + ((a_q[7] >>> 1) + a_q[7]);
  end

  // Stage III
  always_comb begin
    w_n[0] = b_q[0] + b_q[1];
    w_n[1] = b_q[2] + (b_q[3] >>> 1);
    w_n[2] = b_q[0] - b_q[1];
    w_n[3] = (b_q[2] >>> 1) - b_q[3];
    w_n[4] = b_q[4] + (b_q[7] >>> 2);
    w_n[5] = b_q[5] + (b_q[6] >>> 2);
    w_n[6] = b_q[6] - (b_q[5] >>> 2);
    w_n[7] = (b_q[4] >>> 2) - b_q[7];
  end

  always_ff @(posedge clk) begin
    a_q <= a_n;
    b_q <= b_n;
    w   <= w_n;
  end

endmodule
