// quant_luts: the quant lookup table and the inverse quant lookup table.
//
// For a quantisation parameter QP (0..51) and a coefficient position pos
// (raster index i*4+j of a 4x4 block) it returns the H.264 forward scaling
// factor MF (14 bits) and the inverse rescaling factor V (5 bits).  Both
// depend only on QP%6 and on the position class: (i,j) both even, both odd,
// or mixed.  The dc input forces position (0,0), used for the DC blocks.
// Purely combinational (the tables are constant logic).  That the datapath
// has these two tables is the paper's; their contents are those of the H.264
// standard.
module quant_luts
  import tq_pkg::*;
(
  input  logic [5:0]  qp,
  input  logic [3:0]  pos,
  input  logic        dc,
  output logic [13:0] mf,
  output logic [4:0]  v
);
  logic [2:0] qrem;
  logic [1:0] cls;
  assign qrem = qp_mod6(qp);
  assign cls  = dc ? 2'd0 : pos_class(pos);
  assign mf   = mf_value(qrem, cls);
  assign v    = v_value(qrem, cls);
endmodule
