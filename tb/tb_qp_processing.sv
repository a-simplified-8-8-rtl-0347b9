// tb_qp_processing: sweeps QP over 0..51 (in order, then random) one value
// per clock and checks that qbits, f and P0..P5 computed for each QP appear
// exactly LATENCY = 6 clocks later. The intra offset (2^qbits/3) is checked on
// the default instance and the inter offset (2^qbits/6) on a second one.
module tb_qp_processing;
  import tb_ref_pkg::*;

  localparam int NCYC = 400;
  localparam int LAT  = 6;

  logic clk = 1'b0;
  logic [5:0]  qp;
  logic [4:0]  qbits_a, qbits_b;
  logic [23:0] f_a, f_b;
  logic [14:0] p_a [6], p_b [6];
  int checks = 0, failures = 0;
  int qh [LAT];

  qp_processing dut_intra (.clk(clk), .qp(qp), .qbits(qbits_a), .f(f_a), .p(p_a));
  qp_processing #(.LATENCY(6), .INTRA(1'b0)) dut_inter (.clk(clk), .qp(qp), .qbits(qbits_b), .f(f_b), .p(p_b));

  always #5 clk = ~clk;

  initial begin
    repeat (NCYC + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, longint got, longint exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 20) $display("%s = %0d expected %0d", what, got, exp_v);
    end
  endtask

  initial begin
    int q, e;
    for (int n = 0; n < NCYC; n++) begin
      q = (n < 52) ? n : int'($urandom % 52);
      qp = 6'(q);
      for (int h = LAT - 1; h > 0; h--) qh[h] = qh[h-1];
      qh[0] = q;
      @(posedge clk);
      #1;
      if (n >= LAT - 1) begin
        e = qh[LAT-1];
        expect_eq("qbits", longint'(qbits_a), qbits_ref(e));
        expect_eq("qbits(inter)", longint'(qbits_b), qbits_ref(e));
        expect_eq("f(intra)", longint'(f_a), f_ref(e, 1'b1));
        expect_eq("f(inter)", longint'(f_b), f_ref(e, 1'b0));
        for (int g = 0; g < 6; g++) begin
          expect_eq($sformatf("P%0d qp=%0d", g, e), longint'(p_a[g]), mf_ref(e % 6, g));
          expect_eq($sformatf("P%0d(inter) qp=%0d", g, e), longint'(p_b[g]), mf_ref(e % 6, g));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
