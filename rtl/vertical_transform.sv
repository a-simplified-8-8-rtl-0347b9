// vertical_transform: the column pass of the 8x8 forward transform.
//
// Eight butterfly8 units work side by side, one per column: column j of the
// row-transformed block s[0..7][j] is transformed into column j of w. A whole
// block enters every clock and leaves 3 clocks later.
//
// Interface: s[i][j] signed IN_W bits, w[k][j] signed OUT_W bits.
module vertical_transform #(
  parameter int unsigned IN_W  = dctq_pkg::S_W,
  parameter int unsigned OUT_W = dctq_pkg::W_W
) (
  input  logic                    clk,
  input  logic signed [IN_W-1:0]  s [8][8],
  output logic signed [OUT_W-1:0] w [8][8]
);

  for (genvar j = 0; j < 8; j++) begin : g_col
    logic signed [IN_W-1:0]  col_in  [8];
    logic signed [OUT_W-1:0] col_out [8];

    for (genvar i = 0; i < 8; i++) begin : g_in
      assign col_in[i] = s[i][j];
    end

    butterfly8 #(.IN_W(IN_W), .OUT_W(OUT_W)) u_bf (
      .clk (clk),
      .x   (col_in),
      .w   (col_out)
    );

    for (genvar k = 0; k < 8; k++) begin : g_out
      assign w[k][j] = col_out[k];
    end
  end

endmodule
