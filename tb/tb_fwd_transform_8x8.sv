// tb_fwd_transform_8x8: random 8x8 residual blocks with valid_in high on most
// clocks and low on some. Checks that quant_en rises exactly 6 clocks after
// each valid input, never otherwise, and that W equals the reference 2D
// transform. Also checks the DC property: a flat block of value c gives
// W[0][0] = 64c and zeros elsewhere.
module tb_fwd_transform_8x8;
  import tb_ref_pkg::*;

  localparam int NCYC = 800;
  localparam int LAT  = 6;

  logic clk = 1'b0, rst_n = 1'b0, valid_in = 1'b0;
  logic signed [8:0]  x [8][8];
  logic signed [16:0] w [8][8];
  logic quant_en;
  int checks = 0, failures = 0, nvalid = 0, nout = 0;

  blk_t hist [LAT];
  bit   vhist [LAT];
  bit   dchist [LAT];

  fwd_transform_8x8 dut (.clk(clk), .rst_n(rst_n), .valid_in(valid_in), .x(x), .w(w), .quant_en(quant_en));

  always #5 clk = ~clk;

  initial begin
    repeat (NCYC + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    blk_t b, e;
    bit v, dc;
    for (int h = 0; h < LAT; h++) begin vhist[h] = 0; dchist[h] = 0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < NCYC; n++) begin
      v  = (n < NCYC - LAT) && ($urandom % 8 != 0);
      dc = (n % 11 == 3);
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++) begin
          b[i][j] = dc ? -77 : int'($urandom % 511) - 255;
          x[i][j] = 9'(b[i][j]);
        end
      valid_in = v;
      nvalid += int'(v);
      for (int h = LAT - 1; h > 0; h--) begin
        hist[h] = hist[h-1]; vhist[h] = vhist[h-1]; dchist[h] = dchist[h-1];
      end
      hist[0] = b; vhist[0] = v; dchist[0] = dc;
      @(posedge clk);
      #1;
      checks++;
      if (quant_en !== vhist[LAT-1]) begin
        failures++;
        $display("cycle %0d: quant_en=%0b expected %0b", n, quant_en, vhist[LAT-1]);
      end
      if (vhist[LAT-1]) begin
        nout++;
        e = fwd2d(hist[LAT-1]);
        for (int i = 0; i < 8; i++)
          for (int j = 0; j < 8; j++) begin
            checks++;
            if (int'(w[i][j]) != e[i][j]) begin
              failures++;
              if (failures < 10) $display("w[%0d][%0d]=%0d expected %0d", i, j, w[i][j], e[i][j]);
            end
          end
        if (dchist[LAT-1]) begin
          checks++;
          if (int'(w[0][0]) != -77 * 64 || w[0][1] != 0 || w[1][0] != 0 || w[7][7] != 0) begin
            failures++;
            $display("DC block: W00=%0d", w[0][0]);
          end
        end
      end
    end
    checks++;
    if (nout != nvalid) begin
      failures++;
      $display("%0d blocks in, %0d out", nvalid, nout);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
