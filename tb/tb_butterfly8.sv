// tb_butterfly8: drives one random 8-point vector per clock into butterfly8
// (9-bit in, 13-bit out) and compares each output vector, exactly 3 clocks
// later, with the integer reference of tb_ref_pkg. Extreme inputs (+-255)
// and a DC vector (all outputs but w[0] = 8c must be zero) are included.
module tb_butterfly8;
  import tb_ref_pkg::*;

  localparam int NVEC = 2000;
  localparam int LAT  = 3;

  logic clk = 1'b0;
  logic signed [8:0]  x [8];
  logic signed [12:0] w [8];
  int checks = 0, failures = 0;

  vec_t hist [LAT+1];

  butterfly8 #(.IN_W(9), .OUT_W(13)) dut (.clk(clk), .x(x), .w(w));

  always #5 clk = ~clk;

  initial begin
    repeat (NVEC + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vec_t v, exp_v;
    for (int n = 0; n < NVEC + LAT; n++) begin
      for (int k = 0; k < 8; k++) begin
        if (n % 7 == 0)      v[k] = (k % 2) ? -255 : 255;
        else if (n % 7 == 1) v[k] = 100;
        else if (n % 7 == 2) v[k] = ($urandom % 2) ? 255 : -255;
        else                 v[k] = int'($urandom % 511) - 255;
        x[k] = 9'(v[k]);
      end
      for (int h = LAT; h > 0; h--) hist[h] = hist[h-1];
      hist[0] = v;
      @(posedge clk);
      #1;
      if (n >= LAT - 1) begin
        exp_v = bf1d(hist[LAT-1]);
        for (int k = 0; k < 8; k++) begin
          checks++;
          if (int'(w[k]) != exp_v[k]) begin
            failures++;
            if (failures < 10) $display("vec %0d: w[%0d]=%0d expected %0d", n - LAT + 1, k, w[k], exp_v[k]);
          end
        end
        if ((n - LAT + 1) % 7 == 1) begin
          checks++;
          if (int'(w[0]) != 800 || w[1] != 0 || w[2] != 0 || w[3] != 0 ||
              w[4] != 0 || w[5] != 0 || w[6] != 0 || w[7] != 0) begin
            failures++;
            $display("DC vector gave wrong spectrum");
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
