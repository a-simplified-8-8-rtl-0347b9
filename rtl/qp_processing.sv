// qp_processing: derives the quantization parameters of one block from QP.
//
//   qbits = 15 + QP div 6
//   f     = 2^qbits / 3  (intra blocks, INTRA = 1) or 2^qbits / 6 (inter)
//   P0-P5 = the multiplication factors of the six position groups for
//           m = QP mod 6
//
// The core takes a QP with every block, so QP must stay paired with its
// block while the transform works on it. QP is therefore carried through
// LATENCY-1 register stages and the results are computed into a final
// register: the outputs belong to the block whose QP entered LATENCY clocks
// earlier. LATENCY defaults to the 6-clock latency of fwd_transform_8x8.
//
// The intra/inter choice of f is a parameter, not a pin: the core's pins carry
// only the block, QP and valid. The formulas follow the standard's reference
// encoder as quoted for this core (note: f uses 2^qbits, the shift uses
// qbits+1). QP values above 51 are outside the standard; they are not
// trapped here (dctq_top asserts on them).
module qp_processing
  import dctq_pkg::*;
#(
  parameter int unsigned LATENCY = 6,
  parameter bit          INTRA   = 1'b1
) (
  input  logic            clk,
  input  logic [QP_W-1:0] qp,
  output logic [QB_W-1:0] qbits,
  output logic [F_W-1:0]  f,
  output mf_t             p [6]
);

  logic [QP_W-1:0] qp_d [LATENCY];   // qp_d[LATENCY-1] unused when LATENCY = 1

  logic [QP_W-1:0] qp_c;
  logic [3:0]      qp_div6;
  logic [2:0]      qp_mod6;
  logic [QB_W-1:0] qbits_n;
  logic [F_W-1:0]  f_n;

  assign qp_d[0] = qp;
  for (genvar k = 1; k < LATENCY; k++) begin : g_dly
    always_ff @(posedge clk) qp_d[k] <= qp_d[k-1];
  end

  assign qp_c = qp_d[LATENCY-1];

  always_comb begin
    qp_div6 = 4'(qp_c / 6);
    qp_mod6 = 3'(qp_c % 6);
    qbits_n = QB_W'(15 + qp_div6);
    if (INTRA) f_n = F_W'((33'd1 << qbits_n) / 3);
    else       f_n = F_W'((33'd1 << qbits_n) / 6);
  end

  always_ff @(posedge clk) begin
    qbits <= qbits_n;
    f     <= f_n;
    for (int g = 0; g < 6; g++) p[g] <= MF_TABLE[qp_mod6][g];
  end

endmodule
