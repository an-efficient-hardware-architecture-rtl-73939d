// tb_quant_datapath: self-checking test of quant_datapath.
// Random coefficients, QPs, positions and intra/inter choices are quantised
// and inverse quantised in all four modes.  The expected value is worked out
// here with integer arithmetic from the H.264 formulas (f = 2^qbits/3 or /6,
// MF and V written out as tables), including the 15-bit operand limit and the
// 16-bit result saturation.  The one-cycle latency is checked on every
// operation.
module tb_quant_datapath;
  import tq_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, in_valid, intra, out_valid;
  qmode_e qmode;
  logic [5:0] qp;
  logic [3:0] pos;
  logic signed [15:0] w_in, z_in, out_data;
  int checks = 0, failures = 0;

  quant_datapath dut (.*);

  int mf_t [6][3] = '{'{13107, 5243, 8066}, '{11916, 4660, 7490}, '{10082, 4194, 6554},
                      '{9362, 3647, 5825}, '{8192, 3355, 5243}, '{7282, 2893, 4559}};
  int v_t  [6][3] = '{'{10, 16, 13}, '{11, 18, 14}, '{13, 20, 16},
                      '{14, 23, 18}, '{16, 25, 20}, '{18, 29, 23}};

  function automatic longint expected(input int m, input int q, input int p, input int in,
                                      input int it, input int val);
    int c, i, j, qb, s;
    longint a, f, r;
    i = p / 4; j = p % 4;
    if (m == 1 || m == 3 || (i % 2 == 0 && j % 2 == 0)) c = 0;
    else if (i % 2 == 1 && j % 2 == 1) c = 1;
    else c = 2;
    s = (val < 0) ? -1 : 1;
    a = (val < 0) ? -val : val;
    if (a > 32767) a = 32767;
    qb = 15 + q / 6;
    if (m <= 1) begin
      f = (longint'(1) << qb) / (it ? 3 : 6);
      if (m == 1) r = (a * mf_t[q % 6][c] + 2 * f) >> (qb + 1);
      else        r = (a * mf_t[q % 6][c] + f) >> qb;
    end else
      r = (a * v_t[q % 6][c]) << (q / 6);
    if (r > 32767) r = 32767;
    return s * r;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; in_valid = 0; qmode = QM_Q_AC; qp = 0; pos = 0; intra = 0; w_in = 0; z_in = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 20000; n++) begin
      int m, q, p, it, val;
      longint e;
      m = $urandom_range(3, 0); q = $urandom_range(51, 0); p = $urandom_range(15, 0);
      it = $urandom_range(1, 0);
      case ($urandom_range(3, 0))
        0: val = $signed($urandom_range(64, 0)) - 32;
        1: val = $signed($urandom_range(4000, 0)) - 2000;
        default: val = $signed(16'($urandom));
      endcase
      if (val == -32768) val = -32767;
      qmode = qmode_e'(m); qp = 6'(q); pos = 4'(p); intra = 1'(it);
      if (m >= 2) begin z_in = 16'(val); w_in = 16'($urandom); end
      else        begin w_in = 16'(val); z_in = 16'($urandom); end
      in_valid = 1;
      e = expected(m, q, p, 0, it, val);
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid || longint'(out_data) != e) begin
        failures++;
        if (failures < 20)
          $display("FAIL m=%0d qp=%0d pos=%0d intra=%0d in=%0d got=%0d exp=%0d v=%0d",
                   m, q, p, it, val, out_data, e, out_valid);
      end
      @(negedge clk);
      checks++;
      if (out_valid) begin failures++; $display("FAIL out_valid stuck"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
