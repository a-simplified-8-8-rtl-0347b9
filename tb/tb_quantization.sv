// tb_quantization: random coefficient blocks with their P0..P5, f and qbits
// (as qp_processing would present them, intra and inter offsets alternating)
// every clock; quant_en low on some clocks. Checks that Z equals the
// reference quantization and valid_out follows quant_en exactly 2 clocks later.
module tb_quantization;
  import tb_ref_pkg::*;

  localparam int NCYC = 600;
  localparam int LAT  = 2;

  logic clk = 1'b0, rst_n = 1'b0, quant_en = 1'b0, valid_out;
  logic signed [16:0] w [8][8];
  logic [14:0] p [6];
  logic [23:0] f;
  logic [4:0]  qbits;
  logic signed [18:0] z [8][8];
  int checks = 0, failures = 0;

  blk_t hist [LAT];
  int   qph [LAT];
  bit   vh [LAT];
  bit   ih [LAT];

  quantization dut (.clk(clk), .rst_n(rst_n), .quant_en(quant_en), .w(w), .p(p), .f(f), .qbits(qbits),
                    .z(z), .valid_out(valid_out));

  always #5 clk = ~clk;

  initial begin
    repeat (NCYC + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    blk_t b, e;
    int qp;
    bit v, intra;
    for (int h = 0; h < LAT; h++) vh[h] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < NCYC; n++) begin
      qp = int'($urandom % 52);
      v = (n < NCYC - LAT) && ($urandom % 5 != 0);
      intra = (n % 2 == 0);
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++) begin
          b[i][j] = int'($urandom % 32641) - 16320;
          w[i][j] = 17'(b[i][j]);
        end
      for (int g = 0; g < 6; g++) p[g] = 15'(mf_ref(qp % 6, g));
      f = 24'(f_ref(qp, intra));
      qbits = 5'(qbits_ref(qp));
      quant_en = v;
      for (int h = LAT - 1; h > 0; h--) begin
        hist[h] = hist[h-1]; qph[h] = qph[h-1]; vh[h] = vh[h-1]; ih[h] = ih[h-1];
      end
      hist[0] = b; qph[0] = qp; vh[0] = v; ih[0] = intra;
      @(posedge clk);
      #1;
      checks++;
      if (valid_out !== vh[LAT-1]) begin failures++; $display("valid_out wrong at %0d", n); end
      if (vh[LAT-1]) begin
        e = quant(hist[LAT-1], qph[LAT-1], ih[LAT-1]);
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
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
