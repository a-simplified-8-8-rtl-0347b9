// dctq_top: real-time 8x8 forward transform and quantization core for
// H.264/AVC FRExt (High profile) encoders.
//
// A full 8x8 residual block X, its QP and input_valid are taken on one clock
// edge; the quantized coefficient block Z appears LATENCY = 8 clocks later
// with output_valid. A new block can enter on every clock, so in steady state
// one whole 8x8 block is finished per clock, with no stall states and no
// block memory.
//
//   fwd_transform_8x8  (6 clocks)  horizontal then vertical 3-stage butterflies
//   qp_processing      (6 clocks)  qbits, f, P0-P5 for the block's QP
//   quantization       (2 clocks)  |W|*MF + f, then >> (qbits+1) and sign
//
// Ports: x[i][j] 9-bit signed residual (row i, column j), qp 6-bit (0..51),
// input_valid, z[u][v] 19-bit signed quantized coefficient, output_valid.
// The pin widths follow the published I/O count of the core. The synchronous
// active-low reset rst_n (clearing only the valid pipeline) and the INTRA
// parameter choosing the rounding offset f (2^qbits/3 intra, 2^qbits/6 inter)
// are this design's additions.
module dctq_top
  import dctq_pkg::*;
#(
  parameter bit INTRA = 1'b1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  input_valid,
  input  logic signed [X_W-1:0] x [8][8],
  input  logic [QP_W-1:0]       qp,
  output logic signed [Z_W-1:0] z [8][8],
  output logic                  output_valid
);

  localparam int unsigned XFORM_LATENCY = 6;

  logic signed [W_W-1:0] w [8][8];
  logic                  quant_en;
  mf_t                   p [6];
  logic [F_W-1:0]        f;
  logic [QB_W-1:0]       qbits;

  fwd_transform_8x8 u_xform (
    .clk      (clk),
    .rst_n    (rst_n),
    .valid_in (input_valid),
    .x        (x),
    .w        (w),
    .quant_en (quant_en)
  );

  qp_processing #(.LATENCY(XFORM_LATENCY), .INTRA(INTRA)) u_qp (
    .clk   (clk),
    .qp    (qp),
    .qbits (qbits),
    .f     (f),
    .p     (p)
  );

  quantization u_quant (
    .clk       (clk),
    .rst_n     (rst_n),
    .quant_en  (quant_en),
    .w         (w),
    .p         (p),
    .f         (f),
    .qbits     (qbits),
    .z         (z),
    .valid_out (output_valid)
  );

  // Every accepted block leaves exactly LATENCY clocks later, and nothing
  // else leaves.
  localparam int unsigned LATENCY = XFORM_LATENCY + 2;

  a_latency: assert property (@(posedge clk) disable iff (!rst_n)
                              input_valid |-> ##LATENCY output_valid)
    else $error("dctq_top: block lost in the pipeline");
  a_no_spurious: assert property (@(posedge clk) disable iff (!rst_n)
                                  !input_valid |-> ##LATENCY !output_valid)
    else $error("dctq_top: output without an input");

  // QP range of the standard.
  a_qp_range: assert property (@(posedge clk) disable iff (!rst_n)
                               input_valid |-> qp <= QP_W'(QP_MAX))
    else $error("dctq_top: QP %0d above %0d", qp, QP_MAX);

endmodule
