// tb_tq_stream: sustained-throughput test of tq_top at its default
// parameters, the real-time workload of 39 VGA (640x480) frames per second at
// 120 MHz, i.e. at most 2564 cycles from one macroblock start to the next.
//
// Six macroblocks (Intra 16x16, intra and inter, different QPs) are processed
// back to back.  Each one after the first is loaded into the input register
// file while the previous one is still being reconstructed (in_ready high
// while busy), and is started in the cycle after the previous done.  During
// every forward phase the testbench also tries to overwrite the whole input
// register file with garbage; in_ready is low then, so those writes must be
// ignored.  Every level and reconstructed sample of every macroblock is
// compared with the integer reference model of tq_ref_pkg, and every
// start-to-start interval is checked against the 2564-cycle budget.  The test
// fails if loads never overlapped processing or the blocked writes were never
// attempted.  The 2564-cycle budget comes from the real-time target; the
// overlapped loading it relies on is this design's own addition.
module tb_tq_stream;
  import tq_pkg::*;
  import tq_ref_pkg::*;
  localparam int NMB = 6;
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

  int res [NMB][384];
  int exp_z [NMB][27][16];
  int exp_rec [NMB][26][16];
  int got_z [NMB][27][16];
  int got_rec [NMB][26][16];
  int mb_qy [NMB] = '{28, 30, 24, 40, 16, 33};
  int mb_qc [NMB] = '{28, 29, 24, 36, 16, 32};
  bit mb_it [NMB] = '{1, 1, 0, 1, 0, 1};
  bit mb_16 [NMB] = '{1, 0, 0, 1, 0, 1};
  int cur_mb = 0;
  longint cyc = 0;
  longint start_at [NMB];
  int n_overlap = 0, n_blocked = 0;

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    if (rst_n && cur_mb < NMB) begin
      if (coef_valid) got_z[cur_mb][coef_blk][coef_pos] = coef_data;
      if (rec_valid)  got_rec[cur_mb][rec_blk][rec_pos] = rec_data;
      if (done) cur_mb = cur_mb + 1;
    end
  end

  task automatic load_mb(input int n);
    for (int a = 0; a < 384; a++) begin
      @(negedge clk);
      while (!in_ready) @(negedge clk);
      in_we = 1'b1; in_addr = 9'(a); in_data = RW'(res[n][a]);
      if (busy) n_overlap++;
    end
    @(negedge clk);
    in_we = 1'b0;
  endtask

  // garbage writes during the forward phase, which must be ignored
  task automatic blocked_writes();
    for (int a = 0; a < 384 && !in_ready; a++) begin
      in_we = 1'b1; in_addr = 9'(a); in_data = RW'($urandom);
      n_blocked++;
      @(negedge clk);
    end
    in_we = 1'b0;
  endtask

  task automatic start_mb(input int n);
    qp_y = 6'(mb_qy[n]); qp_c = 6'(mb_qc[n]); intra = mb_it[n]; i16 = mb_16[n];
    start = 1'b1;
    start_at[n] = cyc;
    @(negedge clk);
    start = 1'b0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; in_we = 1'b0; in_addr = '0; in_data = '0; start = 1'b0;
    qp_y = '0; qp_c = '0; intra = 1'b0; i16 = 1'b0; tq_rrow = '0;
    // stimuli and expected results
    for (int n = 0; n < NMB; n++) begin
      automatic int range = mb_16[n] ? 30 : 200;
      automatic int r [384];
      automatic int ez [27][16];
      automatic int er [26][16];
      automatic int tries = 0;
      do begin
        for (int a = 0; a < 384; a++) r[a] = $signed($urandom_range(2*range, 0)) - range;
        reference(r, mb_qy[n], mb_qc[n], mb_it[n], mb_16[n], ez, er);
        tries++;
      end while (ovf && tries < 20);
      res[n] = r; exp_z[n] = ez; exp_rec[n] = er;
      for (int s = 0; s < 27; s++) for (int p = 0; p < 16; p++) got_z[n][s][p] = 32'h7fff_0000;
      for (int s = 0; s < 26; s++) for (int p = 0; p < 16; p++) got_rec[n][s][p] = 32'h7fff_0000;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    load_mb(0);
    start_mb(0);
    for (int n = 1; n < NMB; n++) begin
      blocked_writes();
      load_mb(n);
      while (!done) @(negedge clk);
      @(negedge clk);
      start_mb(n);
    end
    while (cur_mb < NMB) @(negedge clk);
    repeat (2) @(negedge clk);

    // results
    for (int n = 0; n < NMB; n++) begin
      for (int s = 0; s < 27; s++) begin
        automatic int np = (s == 16 || s == 17) ? 4 : 16;
        if (s == 26 && !mb_16[n]) continue;
        for (int p = 0; p < np; p++) begin
          checks++;
          if (got_z[n][s][p] != exp_z[n][s][p]) begin
            failures++;
            if (failures < 20) $display("FAIL mb %0d level slot %0d pos %0d got %0d exp %0d",
                                        n, s, p, got_z[n][s][p], exp_z[n][s][p]);
          end
        end
      end
      for (int b = 0; b < 26; b++) begin
        if (b == 16 || b == 17) continue;
        for (int p = 0; p < 16; p++) begin
          checks++;
          if (got_rec[n][b][p] != exp_rec[n][b][p]) begin
            failures++;
            if (failures < 20) $display("FAIL mb %0d rec blk %0d pos %0d got %0d exp %0d",
                                        n, b, p, got_rec[n][b][p], exp_rec[n][b][p]);
          end
        end
      end
    end
    for (int n = 1; n < NMB; n++) begin
      automatic longint iv = start_at[n] - start_at[n-1];
      checks++;
      $display("macroblock %0d to %0d: %0d cycles (i16=%0d)", n - 1, n, iv, mb_16[n-1]);
      if (iv > 2564) begin failures++; $display("FAIL interval above the 2564-cycle budget"); end
    end
    begin
      automatic real avg = real'(start_at[NMB-1] - start_at[0]) / real'(NMB - 1);
      $display("average %0.1f cycles per macroblock = %0.1f VGA frames/s at 120 MHz",
               avg, 120.0e6 / (avg * 1200.0));
    end
    $display("mechanisms: residual writes overlapped with processing %0d, blocked writes %0d",
             n_overlap, n_blocked);
    checks++;
    if (n_overlap == 0 || n_blocked == 0) begin failures++; $display("FAIL a mechanism never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
