// tb_reg_file: self-checking test of reg_file.
// Two instances are tested, the 384 x 9 input register file (row reads) and a
// 16 x 16 transpose register file (column reads).  Random data is written
// everywhere, mirrored in a testbench array, and every scalar and vector read
// is compared with the mirror.  A write with we low must not change anything.
module tb_reg_file;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // 384 x 9, stride 1
  logic        we_a;
  logic [8:0]  waddr_a, raddr_a, vbase_a;
  logic [8:0]  wdata_a, rdata_a;
  logic [3:0][8:0] vdata_a;
  logic [8:0]  mirror_a [384];
  reg_file #(.DEPTH(384), .W(9), .VSTRIDE(1)) u_a (
    .clk, .we(we_a), .waddr(waddr_a), .wdata(wdata_a), .raddr(raddr_a),
    .rdata(rdata_a), .vbase(vbase_a), .vdata(vdata_a));

  // 16 x 16, stride 4
  logic        we_b;
  logic [3:0]  waddr_b, raddr_b, vbase_b;
  logic [15:0] wdata_b, rdata_b;
  logic [3:0][15:0] vdata_b;
  logic [15:0] mirror_b [16];
  reg_file #(.DEPTH(16), .W(16), .VSTRIDE(4)) u_b (
    .clk, .we(we_b), .waddr(waddr_b), .wdata(wdata_b), .raddr(raddr_b),
    .rdata(rdata_b), .vbase(vbase_b), .vdata(vdata_b));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we_a = 0; we_b = 0; waddr_a = 0; waddr_b = 0; wdata_a = 0; wdata_b = 0;
    raddr_a = 0; raddr_b = 0; vbase_a = 0; vbase_b = 0;
    for (int i = 0; i < 384; i++) begin
      @(negedge clk);
      we_a = 1; waddr_a = 9'(i); wdata_a = 9'($urandom); mirror_a[i] = wdata_a;
      if (i < 16) begin
        we_b = 1; waddr_b = 4'(i); wdata_b = 16'($urandom); mirror_b[i] = wdata_b;
      end else we_b = 0;
    end
    @(negedge clk);
    // writes with we low are ignored
    we_a = 0; waddr_a = 9'd5; wdata_a = ~mirror_a[5];
    we_b = 0; waddr_b = 4'd7; wdata_b = ~mirror_b[7];
    @(negedge clk);
    for (int i = 0; i < 384; i++) begin
      raddr_a = 9'(i);
      #1;
      checks++;
      if (rdata_a !== mirror_a[i]) begin failures++; $display("FAIL A rd %0d", i); end
    end
    for (int r = 0; r < 96; r++) begin
      vbase_a = 9'(4 * r);
      #1;
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (vdata_a[k] !== mirror_a[4*r+k]) begin failures++; $display("FAIL A row %0d el %0d", r, k); end
      end
    end
    for (int c = 0; c < 4; c++) begin
      vbase_b = 4'(c); raddr_b = 4'(c * 5);
      #1;
      checks++;
      if (rdata_b !== mirror_b[c*5]) begin failures++; $display("FAIL B rd %0d", c*5); end
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (vdata_b[k] !== mirror_b[c+4*k]) begin failures++; $display("FAIL B col %0d el %0d", c, k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
