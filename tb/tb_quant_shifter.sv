// tb_quant_shifter: random R magnitudes, signs and qbits (15..23) every clock.
// Checks Z = sign * (R >> (qbits+1)) one clock later, that a magnitude that
// rounds to zero gives Z = 0 for either sign, and the valid delay.
module tb_quant_shifter;
  localparam int NCYC = 600;

  logic clk = 1'b0, rst_n = 1'b0, valid_in = 1'b0, valid_out;
  logic [31:0] r_mag [8][8];
  logic        r_neg [8][8];
  logic [4:0]  qbits;
  logic signed [18:0] z [8][8];
  int checks = 0, failures = 0, zero_neg = 0;

  quant_shifter dut (.clk(clk), .rst_n(rst_n), .valid_in(valid_in), .r_mag(r_mag), .r_neg(r_neg),
                     .qbits(qbits), .z(z), .valid_out(valid_out));

  always #5 clk = ~clk;

  initial begin
    repeat (NCYC + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint m [8][8];
    bit     s [8][8];
    int     qb;
    bit     v;
    longint e;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < NCYC; n++) begin
      qb = 15 + int'($urandom % 9);
      v  = ($urandom % 4 != 0);
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++) begin
          m[i][j] = (n % 3 == 0) ? longint'($urandom % (1 << (qb + 1))) : longint'($urandom);
          if (n % 10 == 0 && i == 0) m[i][j] = 32'hFFFF_FFFF;
          s[i][j] = $urandom % 2;
          r_mag[i][j] = 32'(m[i][j]);
          r_neg[i][j] = s[i][j];
        end
      qbits = 5'(qb);
      valid_in = v;
      @(posedge clk);
      #1;
      checks++;
      if (valid_out !== v) begin failures++; $display("valid_out wrong at %0d", n); end
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++) begin
          e = m[i][j] >> (qb + 1);
          if (s[i][j]) e = -e;
          if (e == 0 && s[i][j]) zero_neg++;
          checks++;
          if (longint'(z[i][j]) != e) begin
            failures++;
            if (failures < 10) $display("Z[%0d][%0d]=%0d expected %0d", i, j, z[i][j], e);
          end
        end
    end
    checks++;
    if (zero_neg == 0) begin failures++; $display("negative zero case never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
