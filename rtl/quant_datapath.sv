// quant_datapath: the quantisation part of the engine.  One 15x14 unsigned
// multiplier serves forward quantisation and inverse quantisation.
//
// Function (k = floor(QP/6), qbits = 15 + k):
//   QM_Q_AC   Z  = sign(W) * ((|W| * MF(QP%6,pos) + f) >> qbits)
//   QM_Q_DC   Z  = sign(W) * ((|W| * MF(QP%6,0)   + 2f) >> (qbits+1))
//   QM_IQ     W' = sign(Z) * ((|Z| * V(QP%6,pos)) << k)
//   QM_IQ_DC  W' = sign(Z) * ((|Z| * V(QP%6,0))   << k)
// with f = floor(2^qbits/3) for intra blocks and floor(2^qbits/6) for inter
// blocks (the rounding offset of the H.264 reference encoder).
//
// Structure.  One multiplexer selects the multiplier's first operand: the
// transform result from register 4 (w_in) for quantisation or the quantised
// value from the TQ register file (z_in) for inverse quantisation; its
// magnitude is taken and limited to 15 bits.  The other selects the second
// operand from the quant or the inverse quant lookup table.  An adder after
// the multiplier adds the rounding offset f, which a shifter derives from
// the constant 0x555555 (floor(2^n/3) is the top n bits of that pattern).
// The result is then shifted right by qbits (scaling) or left by k
// (rescaling), limited to 16 bits signed and converted back to two's
// complement.
//
// Interface and timing: present in_valid with qmode, qp, pos, intra and the
// operand; out_valid and out_data follow one clock later (one result per
// cycle).  The multiplier size, the operand and table multiplexers, the
// rounding adder with its shifter, the qbits shifter and the two's
// complement conversion follow the paper; the exact f, the DC variants, the
// 15-bit operand limit and the 16-bit result saturation are this design's
// choices.
module quant_datapath
  import tq_pkg::*;
#(
  parameter int unsigned W    = DW,
  parameter int unsigned MA_W = 15,   // multiplier operand A width (data)
  parameter int unsigned MB_W = 14    // multiplier operand B width (table)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  qmode_e              qmode,
  input  logic [5:0]          qp,
  input  logic [3:0]          pos,
  input  logic                intra,
  input  logic signed [W-1:0] w_in,
  input  logic signed [W-1:0] z_in,
  output logic                out_valid,
  output logic signed [W-1:0] out_data
);
  localparam int unsigned PW = MA_W + MB_W;   // product width
  localparam int unsigned XW = PW + 10;       // room for the shifts

  logic        inverse, dcm;
  assign inverse = (qmode == QM_IQ) || (qmode == QM_IQ_DC);
  assign dcm     = (qmode == QM_Q_DC) || (qmode == QM_IQ_DC);

  // lookup tables and their multiplexer
  logic [13:0] mf;
  logic [4:0]  v;
  quant_luts u_luts (.qp(qp), .pos(pos), .dc(dcm), .mf(mf), .v(v));
  logic [MB_W-1:0] op_b;
  assign op_b = inverse ? MB_W'(v) : MB_W'(mf);

  // data multiplexer, magnitude, 15-bit limit
  logic signed [W-1:0] d_sel;
  logic                neg;
  logic [W-1:0]        mag;
  logic [MA_W-1:0]     op_a;
  assign d_sel = inverse ? z_in : w_in;
  assign neg   = d_sel[W-1];
  assign mag   = neg ? W'(-d_sel) : W'(d_sel);
  assign op_a  = (mag > W'((1 << MA_W) - 1)) ? MA_W'((1 << MA_W) - 1) : MA_W'(mag);

  // the multiplier
  logic [PW-1:0] prod;
  assign prod = PW'(op_a) * PW'(op_b);

  // rounding offset: shifter on one adder input
  logic [3:0]  k;
  logic [4:0]  qbits, rshift;
  logic [24:0] f;
  always_comb begin
    k      = qp_div6(qp);
    qbits  = 5'd15 + 5'(k);
    rshift = dcm ? qbits + 5'd1 : qbits;
    f      = 25'(24'h555555 >> (5'd24 - qbits));    // floor(2^qbits/3)
    if (!intra) f = f >> 1;                         // floor(2^qbits/6)
    if (dcm)    f = f << 1;                         // 2f for DC
    if (inverse) f = '0;
  end

  logic [XW-1:0] acc, shifted;
  logic [W-1:0]  mag_out;
  always_comb begin
    acc     = XW'(prod) + XW'(f);
    shifted = inverse ? (acc << k) : (acc >> rshift);
    mag_out = (shifted > XW'((1 << (W-1)) - 1)) ? W'((1 << (W-1)) - 1) : W'(shifted);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_data <= neg ? -signed'(mag_out) : signed'(mag_out);
    end
  end
endmodule
