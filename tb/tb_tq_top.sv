// tb_tq_top: end-to-end self-checking test of tq_top at its default
// parameters.
//
// Each test loads the residual of a random macroblock, starts it, and
// collects the quantised coefficient stream and the reconstructed residual
// stream.  A reference model written here with plain integer arithmetic
// (tq_ref_pkg: 4x4 integer transform, 4x4 and 2x2 Hadamard transforms, H.264
// quantisation with MF, f and qbits, rescaling with V, inverse transform with
// (x+32)>>6) predicts every coefficient and every reconstructed sample; the
// TQ register file read port is checked against the same values.  The
// macroblock time is checked against the 2564-cycle budget that 39 VGA
// frames per second at 120 MHz leave per macroblock, and against this
// design's exact schedule.  Intra 16x16, intra 4x4 and inter macroblocks at
// low, middle and high QP are run; the test fails if any of the mechanisms
// (luma DC path, chroma DC path, DC diversion, intra and inter rounding,
// non-zero and zero levels) never occurred.
module tb_tq_top;
  import tq_pkg::*;
  import tq_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;
  int checks = 0, failures = 0;

  logic in_we, start, intra, i16, busy, in_ready, done;
  logic [8:0] in_addr;
  logic [RW-1:0] in_data;
  logic [5:0] qp_y, qp_c;
  logic coef_valid, rec_valid;
  logic [4:0] coef_blk, rec_blk;
  logic [3:0] coef_pos, rec_pos;
  logic signed [DW-1:0] coef_data, rec_data;
  logic [6:0] tq_rrow;
  logic [3:0][DW-1:0] tq_rrow_data;

  tq_top dut (.*);

  int res [384];
  int exp_z [27][16];
  int exp_rec [26][16];
  int got_z [27][16];
  int got_rec [26][16];
  int got_z_n, got_rec_n;

  // ---------------- stream monitors ----------------
  always @(posedge clk) begin
    if (coef_valid) begin
      got_z[coef_blk][coef_pos] = coef_data;
      got_z_n++;
    end
    if (rec_valid) begin
      got_rec[rec_blk][rec_pos] = rec_data;
      got_rec_n++;
    end
  end

  // mechanism counters
  int n_lumadc = 0, n_chromadc = 0, n_div = 0, n_intra = 0, n_inter = 0;
  int n_nonzero = 0, n_zero = 0, n_mb = 0, n_skipped = 0;

  task automatic run_mb(input int qy, input int qc, input bit it, input bit m16, input int range);
    int cycles, exp_cycles, nz_exp;
    int tries = 0;
    do begin
      for (int a = 0; a < 384; a++) res[a] = $signed($urandom_range(2*range, 0)) - range;
      reference(res, qy, qc, it, m16, exp_z, exp_rec);
      tries++;
      if (ovf) n_skipped++;
    end while (ovf && tries < 20);
    // load the input register file
    for (int a = 0; a < 384; a++) begin
      @(negedge clk);
      in_we = 1'b1; in_addr = 9'(a); in_data = RW'(res[a]);
    end
    @(negedge clk);
    in_we = 1'b0;
    for (int s = 0; s < 27; s++) for (int p = 0; p < 16; p++) got_z[s][p] = 32'h7fff_0000;
    for (int s = 0; s < 26; s++) for (int p = 0; p < 16; p++) got_rec[s][p] = 32'h7fff_0000;
    got_z_n = 0; got_rec_n = 0;
    qp_y = 6'(qy); qp_c = 6'(qc); intra = it; i16 = m16; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 1;
    while (!done && cycles < 10000) begin
      @(negedge clk);
      cycles++;
    end
    @(negedge clk);
    // counts
    checks++;
    if (got_z_n != (m16 ? 384 + 16 : 384) + 8 - (m16 ? 0 : 0)) begin
      failures++; $display("FAIL coefficient count %0d", got_z_n);
    end
    checks++;
    if (got_rec_n != 384) begin failures++; $display("FAIL reconstructed count %0d", got_rec_n); end
    // values
    for (int s = 0; s < 27; s++) begin
      int np = (s == 16 || s == 17) ? 4 : 16;
      if (s == 26 && !m16) continue;
      for (int p = 0; p < np; p++) begin
        checks++;
        if (got_z[s][p] != exp_z[s][p]) begin
          failures++;
          if (failures < 30) $display("FAIL coef slot %0d pos %0d got %0d exp %0d (qp %0d i16 %0d)",
                                      s, p, got_z[s][p], exp_z[s][p], qy, m16);
        end
        if (exp_z[s][p] != 0) n_nonzero++; else n_zero++;
      end
    end
    for (int b = 0; b < 26; b++) begin
      if (b == 16 || b == 17) continue;
      for (int p = 0; p < 16; p++) begin
        checks++;
        if (got_rec[b][p] != exp_rec[b][p]) begin
          failures++;
          if (failures < 30) $display("FAIL rec blk %0d pos %0d got %0d exp %0d (qp %0d i16 %0d)",
                                      b, p, got_rec[b][p], exp_rec[b][p], qy, m16);
        end
      end
    end
    // TQ register file read port
    for (int s = 0; s < 27; s++) begin
      if (s == 26 && !m16) continue;
      for (int r = 0; r < ((s == 16 || s == 17) ? 1 : 4); r++) begin
        tq_rrow = 7'(4*s + r);
        #1;
        for (int k = 0; k < 4; k++) begin
          checks++;
          if (int'(signed'(tq_rrow_data[k])) != exp_z[s][r*4+k]) begin
            failures++;
            if (failures < 30) $display("FAIL TQ RF slot %0d pos %0d", s, r*4+k);
          end
        end
      end
    end
    // timing: within the real-time budget and on the design's schedule
    exp_cycles = m16 ? 2291 : 2201;
    checks++;
    if (cycles > 2564) begin failures++; $display("FAIL %0d cycles exceed the 2564-cycle budget", cycles); end
    checks++;
    if (cycles != exp_cycles) begin failures++; $display("FAIL %0d cycles, schedule says %0d", cycles, exp_cycles); end
    n_mb++;
    if (m16) n_lumadc++;
    n_chromadc += 2;
    n_div += m16 ? 24 : 8;
    if (it) n_intra++; else n_inter++;
    $display("macroblock %0d: qp_y=%0d qp_c=%0d intra=%0d i16=%0d cycles=%0d", n_mb, qy, qc, it, m16, cycles);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; in_we = 1'b0; in_addr = '0; in_data = '0; start = 1'b0;
    qp_y = '0; qp_c = '0; intra = 1'b0; i16 = 1'b0; tq_rrow = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_mb(28, 28, 1'b1, 1'b1, 40);
    run_mb(28, 27, 1'b1, 1'b0, 255);
    run_mb(20, 20, 1'b0, 1'b0, 255);
    run_mb(0, 0, 1'b1, 1'b1, 6);
    run_mb(51, 39, 1'b0, 1'b1, 40);
    run_mb(36, 34, 1'b1, 1'b1, 30);
    run_mb(12, 12, 1'b0, 1'b0, 100);
    run_mb(45, 43, 1'b1, 1'b0, 255);
    $display("mechanisms: luma DC blocks %0d, chroma DC blocks %0d, DC diversions %0d, intra MBs %0d, inter MBs %0d, non-zero levels %0d, zero levels %0d, regenerated stimuli %0d",
             n_lumadc, n_chromadc, n_div, n_intra, n_inter, n_nonzero, n_zero, n_skipped);
    checks++;
    if (n_lumadc == 0 || n_chromadc == 0 || n_div == 0 || n_intra == 0 || n_inter == 0 ||
        n_nonzero == 0 || n_zero == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
