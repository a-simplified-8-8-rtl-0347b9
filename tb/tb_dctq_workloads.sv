// tb_dctq_workloads: real-time workloads for the core at its default
// parameters. Streams the luma blocks of one SD frame (704x480 = 5280 blocks)
// and one 720p HDTV frame (1280x720 = 14400 blocks) back to back, one block
// per clock, checks every output block against the reference model and
// checks the clock count: a frame of N blocks must finish in N + 8 clocks.
// The frame time at a given clock is then (N + 8) / f_clk, e.g. about 77 us
// for SD and 210 us for 720p at 68.5 MHz, far below a 16.7 ms frame period.
module tb_dctq_workloads;
  import tb_ref_pkg::*;

  localparam int LAT = 8;
  localparam int NSD = (704 / 8) * (480 / 8);
  localparam int NHD = (1280 / 8) * (720 / 8);

  logic clk = 1'b0, rst_n = 1'b0, input_valid = 1'b0, output_valid;
  logic signed [8:0]  x [8][8];
  logic [5:0]         qp;
  logic signed [18:0] z [8][8];

  int checks = 0, failures = 0, cycle = 0;
  blk_t expq [$];

  dctq_top dut (.clk(clk), .rst_n(rst_n), .input_valid(input_valid), .x(x), .qp(qp),
                .z(z), .output_valid(output_valid));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (NSD + NHD + 400) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_out = 0;
  always @(posedge clk) begin
    if (rst_n && output_valid) begin
      blk_t e;
      n_out++;
      checks++;
      if (expq.size() == 0) begin
        failures++;
      end else begin
        e = expq[0];
        expq.delete(0);
        for (int i = 0; i < 8; i++)
          for (int j = 0; j < 8; j++)
            if (int'(z[i][j]) != e[i][j]) begin
              failures++;
              if (failures < 10) $display("Z[%0d][%0d]=%0d expected %0d", i, j, z[i][j], e[i][j]);
            end
      end
    end
  end

  task automatic run_frame(string name, int fw, int fh, int q);
    int nblk, t0, out0;
    blk_t b;
    nblk = (fw / 8) * (fh / 8);
    out0 = n_out;
    t0 = cycle;
    qp = 6'(q);
    for (int by = 0; by < fh / 8; by++)
      for (int bx = 0; bx < fw / 8; bx++) begin
        for (int i = 0; i < 8; i++)
          for (int j = 0; j < 8; j++) begin
            int px, py, v;
            px = bx * 8 + j; py = by * 8 + i;
            // Residual of a moving ramp pattern plus noise.
            v = ((px * 5 + py * 3 + bx * by) % 96) - 48 + int'($urandom % 17) - 8;
            b[i][j] = v;
            x[i][j] = 9'(v);
          end
        input_valid = 1'b1;
        expq.push_back(quant(fwd2d(b), q, 1'b1));
        @(posedge clk);
        #1;
      end
    input_valid = 1'b0;
    wait (n_out == out0 + nblk);
    // Last output seen on the edge that just passed.
    checks++;
    if (cycle - t0 != nblk + LAT) begin
      failures++;
      $display("%s: %0d blocks took %0d clocks, expected %0d", name, nblk, cycle - t0, nblk + LAT);
    end
    $display("%s frame %0dx%0d: %0d blocks in %0d clocks (%0.1f us at 68.5 MHz)",
             name, fw, fh, nblk, cycle - t0, real'(cycle - t0) / 68.5);
    @(posedge clk); #1;
  endtask

  initial begin
    for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++) x[i][j] = '0;
    qp = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    run_frame("SD", 704, 480, 28);
    run_frame("HDTV", 1280, 720, 32);
    checks++;
    if (n_out != NSD + NHD) begin failures++; $display("outputs %0d", n_out); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
