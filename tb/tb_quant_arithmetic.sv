// tb_quant_arithmetic: random coefficient blocks, QP and f every clock. Checks
// R = |W| * MF(group of position, QP mod 6) + f and the sign flag one clock
// later, and that valid_out follows valid_in by one clock.
module tb_quant_arithmetic;
  import tb_ref_pkg::*;

  localparam int NCYC = 600;

  logic clk = 1'b0, rst_n = 1'b0, valid_in = 1'b0, valid_out;
  logic signed [16:0] w [8][8];
  logic [14:0] p [6];
  logic [23:0] f;
  logic [31:0] r_mag [8][8];
  logic        r_neg [8][8];
  int checks = 0, failures = 0;

  quant_arithmetic dut (.clk(clk), .rst_n(rst_n), .valid_in(valid_in), .w(w), .p(p), .f(f),
                        .r_mag(r_mag), .r_neg(r_neg), .valid_out(valid_out));

  always #5 clk = ~clk;

  initial begin
    repeat (NCYC + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    blk_t b;
    int qp;
    bit v;
    longint e, mag;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < NCYC; n++) begin
      qp = int'($urandom % 52);
      v  = ($urandom % 4 != 0);
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++) begin
          b[i][j] = (n % 9 == 0) ? ((i + j) % 2 ? -65535 : 65535) : int'($urandom % 40001) - 20000;
          w[i][j] = 17'(b[i][j]);
        end
      for (int g = 0; g < 6; g++) p[g] = 15'(mf_ref(qp % 6, g));
      f = 24'(f_ref(qp, n % 2 == 0));
      valid_in = v;
      @(posedge clk);
      #1;
      checks++;
      if (valid_out !== v) begin failures++; $display("valid_out wrong at %0d", n); end
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++) begin
          mag = (b[i][j] < 0) ? -longint'(b[i][j]) : longint'(b[i][j]);
          e = mag * mf_ref(qp % 6, group_of(i, j)) + f_ref(qp, n % 2 == 0);
          checks++;
          if (longint'(r_mag[i][j]) != e || r_neg[i][j] != (b[i][j] < 0)) begin
            failures++;
            if (failures < 10) $display("R[%0d][%0d]=%0d/%0b expected %0d", i, j, r_mag[i][j], r_neg[i][j], e);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
