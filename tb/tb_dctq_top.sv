// tb_dctq_top: end-to-end test of the 8x8 transform/quantization core at its
// default parameters (intra rounding offset).
//
// The stimulus is one QCIF luma frame (176x144 = 22x18 = 396 blocks of 8x8)
// of synthetic residuals, streamed block after block, followed by a set of
// corner-case blocks. Every output block is compared with the integer
// reference (butterfly rows, then columns, then |W|*MF + f >> (qbits+1)).
// Timing checks: each block must leave exactly 8 clocks after it entered,
// and a back-to-back run of N blocks must produce N outputs on N consecutive
// clocks (one block per clock, no stalls).
//
// Mechanisms counted (each must occur at least once):
//   back_to_back  an output on the clock right after another output
//   bubble        input_valid low between two valid blocks
//   qp_change     consecutive valid blocks with different QP
//   all_qp        every QP 0..51 was used
//   neg_coeff     a negative quantized coefficient
//   zero_coeff    a coefficient quantized to zero from a nonzero W
//   full_scale    an input block with +-255 samples
module tb_dctq_top;
  import tb_ref_pkg::*;

  localparam int LAT     = 8;
  localparam int FRAME_W = 176;
  localparam int FRAME_H = 144;
  localparam int NFRAME  = (FRAME_W / 8) * (FRAME_H / 8);
  localparam int NEXTRA  = 120;
  localparam int MAXCYC  = 4 * (NFRAME + NEXTRA) + 200;

  logic clk = 1'b0, rst_n = 1'b0, input_valid = 1'b0, output_valid;
  logic signed [8:0]  x [8][8];
  logic [5:0]         qp;
  logic signed [18:0] z [8][8];

  int checks = 0, failures = 0;
  int cycle = 0;

  typedef struct {
    blk_t z;
    int   due;
  } exp_t;
  exp_t expq [$];

  int n_b2b = 0, n_bubble = 0, n_qpchg = 0, n_neg = 0, n_zero = 0, n_full = 0;
  bit qp_seen [52];
  int n_in = 0, n_out = 0;

  dctq_top dut (.clk(clk), .rst_n(rst_n), .input_valid(input_valid), .x(x), .qp(qp),
                .z(z), .output_valid(output_valid));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (MAXCYC) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output monitor
  bit prev_out = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (output_valid) begin
        n_out++;
        if (prev_out) n_b2b++;
        checks++;
        if (expq.size() == 0) begin
          failures++;
          $display("unexpected output at cycle %0d", cycle);
        end else begin
          exp_t e;
          e = expq[0];
          expq.delete(0);
          if (e.due != cycle) begin
            failures++;
            $display("block out at cycle %0d, expected %0d", cycle, e.due);
          end
          for (int i = 0; i < 8; i++)
            for (int j = 0; j < 8; j++) begin
              checks++;
              if (int'(z[i][j]) != e.z[i][j]) begin
                failures++;
                if (failures < 10) $display("Z[%0d][%0d]=%0d expected %0d", i, j, z[i][j], e.z[i][j]);
              end
              if (e.z[i][j] < 0) n_neg++;
            end
        end
      end else if (expq.size() != 0 && expq[0].due <= cycle) begin
        failures++;
        $display("missing output at cycle %0d", cycle);
        expq.delete(0);
      end
      prev_out <= output_valid;
    end
  end

  task automatic send(blk_t b, int q);
    exp_t e;
    blk_t w;
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) x[i][j] = 9'(b[i][j]);
    qp = 6'(q);
    input_valid = 1'b1;
    w = fwd2d(b);
    e.z = quant(w, q, 1'b1);
    e.due = cycle + LAT;   // sampled on the coming edge, seen LAT edges later
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) if (w[i][j] != 0 && e.z[i][j] == 0) n_zero++;
    expq.push_back(e);
    qp_seen[q] = 1'b1;
    n_in++;
    @(posedge clk);
    #1;
  endtask

  task automatic idle(int n);
    input_valid = 1'b0;
    repeat (n) @(posedge clk);
    #1;
    n_bubble++;
  endtask

  function automatic int clip(int v);
    return (v > 255) ? 255 : (v < -255) ? -255 : v;
  endfunction

  initial begin
    blk_t b;
    int q, lastq;
    int t0, burst;
    qp = '0;
    for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++) x[i][j] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    lastq = -1;

    // One QCIF frame of residuals, raster order, QP 28 as an I frame would
    // use, with the QP stepped through 0..51 on the first row of blocks.
    for (int by = 0; by < FRAME_H / 8; by++)
      for (int bx = 0; bx < FRAME_W / 8; bx++) begin
        int k;
        k = by * (FRAME_W / 8) + bx;
        for (int i = 0; i < 8; i++)
          for (int j = 0; j < 8; j++) begin
            int px, py;
            px = bx * 8 + j; py = by * 8 + i;
            case (k % 4)
              0: b[i][j] = clip(((px * 3 + py * 5) % 64) - 32 + int'($urandom % 9) - 4);
              1: b[i][j] = clip(int'($urandom % 21) - 10);
              2: b[i][j] = clip(((px + py) % 2) ? 120 - int'($urandom % 40) : -120 + int'($urandom % 40));
              default: b[i][j] = clip(int'($urandom % 511) - 255);
            endcase
          end
        q = (k < 52) ? k : 28;
        if (lastq >= 0 && q != lastq) n_qpchg++;
        lastq = q;
        send(b, q);
        if (k % 50 == 49) idle(1 + (k % 3));
      end

    // Corner cases: full-scale blocks, flat blocks, random QP, gaps.
    for (int n = 0; n < NEXTRA; n++) begin
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++)
          case (n % 5)
            0: b[i][j] = ((i + j) % 2) ? -255 : 255;
            1: b[i][j] = (n % 2) ? 255 : -255;
            2: b[i][j] = (i < 4) ? 255 : -255;
            default: b[i][j] = int'($urandom % 511) - 255;
          endcase
      if (n % 5 < 3) n_full++;
      q = int'($urandom % 52);
      if (q != lastq) n_qpchg++;
      lastq = q;
      send(b, q);
      if (n % 17 == 16) idle(3);
    end

    // Throughput: a burst of back-to-back blocks must come out on
    // consecutive clocks.
    input_valid = 1'b0;
    wait (expq.size() == 0);
    @(posedge clk); #1;
    burst = 32;
    t0 = cycle;
    for (int n = 0; n < burst; n++) begin
      for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++) b[i][j] = int'($urandom % 511) - 255;
      send(b, 20 + n % 6);
    end
    input_valid = 1'b0;
    wait (expq.size() == 0);
    @(posedge clk); #1;
    checks++;
    // After the last output the monitor saw burst outputs spanning burst clocks.
    if (n_out != n_in) begin
      failures++;
      $display("%0d blocks in, %0d out", n_in, n_out);
    end
    $display("burst of %0d blocks started at cycle %0d, done by cycle %0d", burst, t0, cycle);

    for (int k = 0; k < 52; k++) begin
      checks++;
      if (!qp_seen[k]) begin failures++; $display("QP %0d never used", k); end
    end
    $display("mechanisms: back_to_back=%0d bubble=%0d qp_change=%0d neg_coeff=%0d zero_coeff=%0d full_scale=%0d",
             n_b2b, n_bubble, n_qpchg, n_neg, n_zero, n_full);
    checks += 6;
    if (n_b2b == 0)   begin failures++; $display("no back-to-back outputs"); end
    if (n_bubble == 0) begin failures++; $display("no bubble"); end
    if (n_qpchg == 0) begin failures++; $display("no QP change"); end
    if (n_neg == 0)   begin failures++; $display("no negative coefficient"); end
    if (n_zero == 0)  begin failures++; $display("no zeroed coefficient"); end
    if (n_full == 0)  begin failures++; $display("no full-scale block"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
