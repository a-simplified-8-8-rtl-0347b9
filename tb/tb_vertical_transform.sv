// tb_vertical_transform: one random 13-bit 8x8 block per clock into the
// column pass (including row-pass-like full-scale values); each output block,
// 3 clocks later, must equal the reference column transform.
module tb_vertical_transform;
  import tb_ref_pkg::*;

  localparam int NBLK = 500;
  localparam int LAT  = 3;

  logic clk = 1'b0;
  logic signed [12:0] s [8][8];
  logic signed [16:0] w [8][8];
  int checks = 0, failures = 0;
  blk_t hist [LAT];

  vertical_transform dut (.clk(clk), .s(s), .w(w));

  always #5 clk = ~clk;

  initial begin
    repeat (NBLK + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    blk_t b, e;
    for (int n = 0; n < NBLK + LAT; n++) begin
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++) begin
          b[i][j] = (n % 5 == 0) ? (i % 2 ? -2040 : 2040) : int'($urandom % 4081) - 2040;
          s[i][j] = 13'(b[i][j]);
        end
      for (int h = LAT - 1; h > 0; h--) hist[h] = hist[h-1];
      hist[0] = b;
      @(posedge clk);
      #1;
      if (n >= LAT - 1) begin
        e = cols1d(hist[LAT-1]);
        for (int i = 0; i < 8; i++)
          for (int j = 0; j < 8; j++) begin
            checks++;
            if (int'(w[i][j]) != e[i][j]) begin
              failures++;
              if (failures < 10) $display("w[%0d][%0d]=%0d expected %0d", i, j, w[i][j], e[i][j]);
            end
          end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
