// tb_horizontal_transform: one random 8x8 block per clock into the row pass;
// each output block, 3 clocks later, must equal the reference row transform.
module tb_horizontal_transform;
  import tb_ref_pkg::*;

  localparam int NBLK = 500;
  localparam int LAT  = 3;

  logic clk = 1'b0;
  logic signed [8:0]  x [8][8];
  logic signed [12:0] s [8][8];
  int checks = 0, failures = 0;
  blk_t hist [LAT];

  horizontal_transform dut (.clk(clk), .x(x), .s(s));

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
          b[i][j] = (n % 5 == 0) ? ((i + j) % 2 ? -255 : 255) : int'($urandom % 511) - 255;
          x[i][j] = 9'(b[i][j]);
        end
      for (int h = LAT - 1; h > 0; h--) hist[h] = hist[h-1];
      hist[0] = b;
      @(posedge clk);
      #1;
      if (n >= LAT - 1) begin
        e = rows1d(hist[LAT-1]);
        for (int i = 0; i < 8; i++)
          for (int j = 0; j < 8; j++) begin
            checks++;
            if (int'(s[i][j]) != e[i][j]) begin
              failures++;
              if (failures < 10) $display("s[%0d][%0d]=%0d expected %0d", i, j, s[i][j], e[i][j]);
            end
          end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
