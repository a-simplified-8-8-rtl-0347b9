// tb_dctq_top_inter: the core built with the inter-block rounding offset
// (INTRA = 0, f = 2^qbits/6). Random residual blocks with random QP, fed
// every clock with occasional gaps; each output block must equal the
// reference with the inter offset, 8 clocks after its input.
module tb_dctq_top_inter;
  import tb_ref_pkg::*;

  localparam int NBLK = 600;
  localparam int LAT  = 8;

  logic clk = 1'b0, rst_n = 1'b0, input_valid = 1'b0, output_valid;
  logic signed [8:0]  x [8][8];
  logic [5:0]         qp;
  logic signed [18:0] z [8][8];

  int checks = 0, failures = 0, cycle = 0, n_out = 0, n_diff = 0;
  blk_t expq [$];
  int   dueq [$];

  dctq_top #(.INTRA(1'b0)) dut (.clk(clk), .rst_n(rst_n), .input_valid(input_valid), .x(x), .qp(qp),
                                .z(z), .output_valid(output_valid));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (2 * NBLK + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && output_valid) begin
      blk_t e;
      int due;
      n_out++;
      checks++;
      if (expq.size() == 0) failures++;
      else begin
        e = expq[0];
        due = dueq[0];
        expq.delete(0);
        dueq.delete(0);
        if (due != cycle) begin failures++; $display("late/early output at %0d", cycle); end
        for (int i = 0; i < 8; i++)
          for (int j = 0; j < 8; j++) begin
            checks++;
            if (int'(z[i][j]) != e[i][j]) begin
              failures++;
              if (failures < 10) $display("Z[%0d][%0d]=%0d expected %0d", i, j, z[i][j], e[i][j]);
            end
          end
      end
    end
  end

  initial begin
    blk_t b, w, ei, en;
    int q;
    for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++) x[i][j] = '0;
    qp = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < NBLK; n++) begin
      q = int'($urandom % 52);
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++) begin
          b[i][j] = int'($urandom % 511) - 255;
          x[i][j] = 9'(b[i][j]);
        end
      qp = 6'(q);
      w  = fwd2d(b);
      en = quant(w, q, 1'b0);
      ei = quant(w, q, 1'b1);
      if (en != ei) n_diff++;
      expq.push_back(en);
      dueq.push_back(cycle + LAT);
      input_valid = 1'b1;
      @(posedge clk);
      #1;
      if (n % 13 == 12) begin
        input_valid = 1'b0;
        @(posedge clk);
        #1;
      end
    end
    input_valid = 1'b0;
    repeat (LAT + 2) @(posedge clk);
    checks += 2;
    if (n_out != NBLK) begin failures++; $display("%0d outputs", n_out); end
    // The inter offset must have made a difference somewhere.
    if (n_diff == 0) begin failures++; $display("inter and intra offsets never differed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
