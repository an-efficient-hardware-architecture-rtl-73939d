// tb_transform_datapath: self-checking test of transform_datapath.
// Random 4x4 blocks are transformed in every mode: forward integer transform
// of 9-bit residuals, inverse integer transform (row pass, column pass, then
// (x+32)>>6 as in H.264), 4x4 Hadamard with the >>1 and (x+32)>>6 output
// scalings, and 2x2 Hadamard with the >>5 scaling.  The expected values are
// computed here with plain matrix arithmetic.  The cycle from start to the
// first and to the last output is checked against the documented schedule
// (21 and 36 cycles for 4x4, 4 and 7 for 2x2).  A second instance built with
// ripple-carry adder/subtractors must give the same outputs every cycle.
module tb_transform_datapath;
  import tq_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;
  int checks = 0, failures = 0;

  logic start, src_rf, busy, out_valid, done;
  tmode_e mode;
  oscale_e oscale;
  logic [1:0] row_req;
  logic [3:0][RW-1:0] row_rf;
  logic [3:0][DW-1:0] row_alt;
  logic [3:0] out_idx;
  logic signed [DW-1:0] out_data;

  transform_datapath dut (.*);

  // Same datapath built with ripple-carry adder/subtractors: its outputs must
  // match the carry-save build cycle by cycle.
  logic [1:0] rc_row_req;
  logic rc_busy, rc_valid, rc_done;
  logic [3:0] rc_idx;
  logic signed [DW-1:0] rc_data;
  int rc_cycles = 0;
  transform_datapath #(.CARRY_SAVE(1'b0)) dut_rca (
    .clk, .rst_n, .start, .mode, .oscale, .src_rf, .row_req(rc_row_req), .row_rf, .row_alt,
    .busy(rc_busy), .out_valid(rc_valid), .out_idx(rc_idx), .out_data(rc_data), .done(rc_done));
  always @(negedge clk) begin
    if (rst_n && rc_valid) begin
      rc_cycles++;
      checks++;
      if (!out_valid || rc_idx != out_idx || rc_data != out_data) begin
        failures++;
        $display("FAIL ripple-carry build differs: %0d vs %0d", rc_data, out_data);
      end
    end
  end

  int x [16];
  int exp_y [16];
  int got [16];
  int cyc;

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      row_rf[i]  = RW'(x[row_req*4+i]);
      row_alt[i] = DW'(x[row_req*4+i]);
    end
  end

  function automatic int asr(input int v, input int s);
    return v >>> s;
  endfunction

  task automatic reference(input tmode_e m, input oscale_e o);
    int t [16];
    int cf [4][4] = '{'{1,1,1,1}, '{2,1,-1,-2}, '{1,-1,-1,1}, '{1,-2,2,-1}};
    int hd [4][4] = '{'{1,1,1,1}, '{1,1,-1,-1}, '{1,-1,-1,1}, '{1,-1,1,-1}};
    if (m == TM_FWD || m == TM_HAD4) begin
      for (int r = 0; r < 4; r++)
        for (int k = 0; k < 4; k++) begin
          t[r*4+k] = 0;
          for (int j = 0; j < 4; j++)
            t[r*4+k] += ((m == TM_FWD) ? cf[k][j] : hd[k][j]) * x[r*4+j];
        end
      for (int i = 0; i < 4; i++)
        for (int k = 0; k < 4; k++) begin
          exp_y[i*4+k] = 0;
          for (int r = 0; r < 4; r++)
            exp_y[i*4+k] += ((m == TM_FWD) ? cf[i][r] : hd[i][r]) * t[r*4+k];
        end
    end else if (m == TM_INV) begin
      for (int r = 0; r < 4; r++) begin
        int e0, e1, e2, e3;
        e0 = x[r*4+0] + x[r*4+2];
        e1 = x[r*4+0] - x[r*4+2];
        e2 = asr(x[r*4+1], 1) - x[r*4+3];
        e3 = x[r*4+1] + asr(x[r*4+3], 1);
        t[r*4+0] = e0 + e3; t[r*4+1] = e1 + e2; t[r*4+2] = e1 - e2; t[r*4+3] = e0 - e3;
      end
      for (int c = 0; c < 4; c++) begin
        int e0, e1, e2, e3;
        e0 = t[0*4+c] + t[2*4+c];
        e1 = t[0*4+c] - t[2*4+c];
        e2 = asr(t[1*4+c], 1) - t[3*4+c];
        e3 = t[1*4+c] + asr(t[3*4+c], 1);
        exp_y[0*4+c] = e0 + e3; exp_y[1*4+c] = e1 + e2;
        exp_y[2*4+c] = e1 - e2; exp_y[3*4+c] = e0 - e3;
      end
    end else begin
      exp_y[0] = x[0] + x[1] + x[2] + x[3];
      exp_y[1] = x[0] - x[1] + x[2] - x[3];
      exp_y[2] = x[0] + x[1] - x[2] - x[3];
      exp_y[3] = x[0] - x[1] - x[2] + x[3];
    end
    for (int i = 0; i < 16; i++)
      case (o)
        OS_HALF: exp_y[i] = asr(exp_y[i], 1);
        OS_RND6: exp_y[i] = asr(exp_y[i] + 32, 6);
        OS_SHR5: exp_y[i] = asr(exp_y[i], 5);
        default: ;
      endcase
  endtask

  task automatic run_block(input tmode_e m, input oscale_e o, input int range);
    int n, first, last, nout;
    for (int i = 0; i < 16; i++) x[i] = $signed($urandom_range(2*range, 0)) - range;
    reference(m, o);
    nout = (m == TM_HAD2) ? 4 : 16;
    @(negedge clk);
    mode = m; oscale = o; src_rf = (m == TM_FWD); start = 1'b1;
    cyc = 0;
    @(negedge clk);
    start = 1'b0;
    n = 0; first = -1; last = -1;
    for (int i = 0; i < 16; i++) got[i] = 32'h7fffffff;
    while (n < nout && cyc < 200) begin
      cyc++;
      if (out_valid) begin
        if (first < 0) first = cyc;
        last = cyc;
        got[out_idx] = out_data;
        n++;
        if (n == nout) begin
          checks++;
          if (!done) begin failures++; $display("FAIL done missing"); end
        end
      end
      @(negedge clk);
    end
    for (int i = 0; i < nout; i++) begin
      checks++;
      if (got[i] != exp_y[i]) begin
        failures++;
        $display("FAIL mode=%0d idx=%0d got=%0d exp=%0d", m, i, got[i], exp_y[i]);
      end
    end
    checks++;
    if ((m == TM_HAD2 && (first != 4 || last != 7)) ||
        (m != TM_HAD2 && (first != 21 || last != 36))) begin
      failures++;
      $display("FAIL timing mode=%0d first=%0d last=%0d", m, first, last);
    end
    @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL busy after block"); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; start = 1'b0; mode = TM_FWD; oscale = OS_NONE; src_rf = 1'b1;
    for (int i = 0; i < 16; i++) x[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 40; it++) begin
      run_block(TM_FWD,  OS_NONE, 255);
      run_block(TM_INV,  OS_RND6, 2000);
      run_block(TM_HAD4, OS_HALF, 1000);
      run_block(TM_HAD4, OS_RND6, 1000);
      run_block(TM_HAD2, OS_NONE, 4000);
      run_block(TM_HAD2, OS_SHR5, 4000);
    end
    checks++;
    if (rc_cycles == 0) begin failures++; $display("FAIL ripple-carry build never produced output"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
