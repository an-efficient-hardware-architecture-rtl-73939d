// tb_addsub: self-checking test of addsub in both implementations.
// Random and corner operands are applied to a carry-save and a ripple-carry
// instance; each result is compared with the sum or difference computed by the
// testbench with the + and - operators.
module tb_addsub;
  localparam int unsigned W = 16;
  logic [W-1:0] a, b, y_csa, y_rca;
  logic sub;
  int checks = 0, failures = 0;

  addsub #(.W(W), .CARRY_SAVE(1'b1)) u_csa (.a, .b, .sub, .y(y_csa));
  addsub #(.W(W), .CARRY_SAVE(1'b0)) u_rca (.a, .b, .sub, .y(y_rca));

  task automatic check_one(input logic [W-1:0] ta, input logic [W-1:0] tb_, input logic ts);
    logic [W-1:0] exp;
    a = ta; b = tb_; sub = ts;
    #1;
    exp = ts ? ta - tb_ : ta + tb_;
    checks += 2;
    if (y_csa !== exp) begin failures++; $display("FAIL csa a=%h b=%h sub=%0d y=%h exp=%h", ta, tb_, ts, y_csa, exp); end
    if (y_rca !== exp) begin failures++; $display("FAIL rca a=%h b=%h sub=%0d y=%h exp=%h", ta, tb_, ts, y_rca, exp); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_one('0, '0, 1'b0);
    check_one('0, '0, 1'b1);
    check_one('1, 16'd1, 1'b0);
    check_one(16'h8000, 16'd1, 1'b1);
    check_one(16'h7fff, 16'h7fff, 1'b0);
    for (int i = 0; i < 2000; i++)
      check_one(W'($urandom), W'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
