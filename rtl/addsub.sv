// addsub: W-bit two's complement adder/subtractor, y = a + b or y = a - b.
//
// The transform datapath uses three of these.  Subtraction adds the inverted
// b with a carry-in of one.  Two implementations can be chosen, the two the
// transform hardware was compared with:
//   CARRY_SAVE = 1 (default): a, ~b/b and the carry-in bit are first reduced
//     by one row of full adders into a sum and a carry vector (carry-save
//     form), which a final carry-propagate addition resolves.
//   CARRY_SAVE = 0: an explicit ripple-carry chain of full adders.
// Both give the same result; only the structure differs.  The result wraps
// modulo 2^W.  Purely combinational.
module addsub #(
  parameter int unsigned W          = 16,
  parameter bit          CARRY_SAVE = 1'b1
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         sub,   // 1: a - b, 0: a + b
  output logic [W-1:0] y
);
  logic [W-1:0] bx;
  assign bx = sub ? ~b : b;

  if (CARRY_SAVE) begin : g_csa
    // the carry out of the top bit falls outside the W-bit result
    logic [W-1:0] cin_vec, s_vec;
    logic [W-2:0] c_vec;
    assign cin_vec = {{(W-1){1'b0}}, sub};
    always_comb begin
      for (int i = 0; i < W; i++)
        s_vec[i] = a[i] ^ bx[i] ^ cin_vec[i];
      for (int i = 0; i < W - 1; i++)
        c_vec[i] = (a[i] & bx[i]) | (a[i] & cin_vec[i]) | (bx[i] & cin_vec[i]);
    end
    assign y = s_vec + {c_vec, 1'b0};
  end else begin : g_rca
    logic [W:0] c;
    always_comb begin
      c[0] = sub;
      for (int i = 0; i < W; i++) begin
        y[i]   = a[i] ^ bx[i] ^ c[i];
        c[i+1] = (a[i] & bx[i]) | (c[i] & (a[i] ^ bx[i]));
      end
    end
  end
endmodule
