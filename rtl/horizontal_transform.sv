// horizontal_transform: the row pass of the 8x8 forward transform.
//
// Eight butterfly8 units work side by side, one per row: row i of the input
// block x[i][0..7] is transformed into row i of s. A whole 8x8 block enters
// every clock and leaves 3 clocks later (the three butterfly stages).
//
// Interface: x[i][j] signed IN_W bits, s[i][k] signed OUT_W bits. No valid
// handling here; see fwd_transform_8x8.
module horizontal_transform #(
  parameter int unsigned IN_W  = dctq_pkg::X_W,
  parameter int unsigned OUT_W = dctq_pkg::S_W
) (
  input  logic                    clk,
  input  logic signed [IN_W-1:0]  x [8][8],
  output logic signed [OUT_W-1:0] s [8][8]
);

  for (genvar i = 0; i < 8; i++) begin : g_row
    butterfly8 #(.IN_W(IN_W), .OUT_W(OUT_W)) u_bf (
      .clk (clk),
      .x   (x[i]),
      .w   (s[i])
    );
  end

endmodule
