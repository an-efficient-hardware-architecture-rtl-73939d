// tb_quant_luts: exhaustive self-checking test of quant_luts.
// Every QP 0..51 and every position 0..15, with and without the dc input, is
// compared with the MF and V tables of H.264 written out here independently.
module tb_quant_luts;
  logic [5:0] qp;
  logic [3:0] pos;
  logic dc;
  logic [13:0] mf;
  logic [4:0] v;
  int checks = 0, failures = 0;

  quant_luts dut (.*);

  int mf_t [6][3] = '{'{13107, 5243, 8066}, '{11916, 4660, 7490}, '{10082, 4194, 6554},
                      '{9362, 3647, 5825}, '{8192, 3355, 5243}, '{7282, 2893, 4559}};
  int v_t  [6][3] = '{'{10, 16, 13}, '{11, 18, 14}, '{13, 20, 16},
                      '{14, 23, 18}, '{16, 25, 20}, '{18, 29, 23}};

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int q = 0; q < 52; q++)
      for (int p = 0; p < 16; p++)
        for (int d = 0; d < 2; d++) begin
          int i, j, c;
          qp = 6'(q); pos = 4'(p); dc = 1'(d);
          #1;
          i = p / 4; j = p % 4;
          if (d == 1 || (i % 2 == 0 && j % 2 == 0)) c = 0;
          else if (i % 2 == 1 && j % 2 == 1) c = 1;
          else c = 2;
          checks += 2;
          if (int'(mf) != mf_t[q % 6][c]) begin failures++; $display("FAIL mf qp=%0d pos=%0d", q, p); end
          if (int'(v)  != v_t[q % 6][c])  begin failures++; $display("FAIL v qp=%0d pos=%0d", q, p); end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
