// tq_pkg: types, constants and table functions shared by the H.264 transform
// and quantisation engine.
//
// The engine works on one macroblock at a time: 16 luma 4x4 blocks, 8 chroma
// 4x4 blocks and the DC blocks built from their DC coefficients.  This package
// holds the transform mode and quantiser mode encodings, the block numbering
// and the H.264 scaling (MF) and rescaling (V) tables.  The MF and V values and
// the position classes are the ones of the H.264 standard; the encodings and
// the block numbering are this design's own choice.
package tq_pkg;

  // Width of every transform-side value: registers 0-3, P registers,
  // register 4 and the 16-bit register files.
  localparam int unsigned DW = 16;
  // Width of one residual sample in the input register file.
  localparam int unsigned RW = 9;

  // Transform datapath configuration.
  typedef enum logic [1:0] {
    TM_FWD  = 2'd0,   // 4x4 forward integer transform
    TM_INV  = 2'd1,   // 4x4 inverse integer transform, with the final (x+32)>>6
    TM_HAD4 = 2'd2,   // 4x4 Hadamard transform (forward and inverse)
    TM_HAD2 = 2'd3    // 2x2 Hadamard transform (forward and inverse)
  } tmode_e;

  // Output scaling applied by the transform datapath after the second pass.
  typedef enum logic [1:0] {
    OS_NONE   = 2'd0, // value as computed
    OS_HALF   = 2'd1, // arithmetic >>1  (forward luma DC Hadamard)
    OS_RND6   = 2'd2, // (x+32)>>6       (inverse luma DC Hadamard)
    OS_SHR5   = 2'd3  // x>>5            (inverse chroma DC Hadamard)
  } oscale_e;

  // Quantiser configuration.
  typedef enum logic [1:0] {
    QM_Q_AC  = 2'd0,  // forward quant, eq. (1)
    QM_Q_DC  = 2'd1,  // forward quant of a DC coefficient: 2f, qbits+1
    QM_IQ    = 2'd2,  // inverse quant, eq. (2)
    QM_IQ_DC = 2'd3   // inverse quant of a DC coefficient: Z*V(0,0)<<floor(QP/6)
  } qmode_e;

  // Block numbering inside a macroblock (TQ register file block slots).
  // 0..15 luma 4x4 blocks in raster order, 16 Cb DC, 17 Cr DC,
  // 18..21 Cb 4x4 blocks, 22..25 Cr 4x4 blocks, 26 luma DC block ("-1").
  localparam int unsigned NBLK      = 27;
  localparam int unsigned BLK_CBDC  = 16;
  localparam int unsigned BLK_CRDC  = 17;
  localparam int unsigned BLK_CHR0  = 18;
  localparam int unsigned BLK_LUMDC = 26;

  // Row source of the transform datapath (first row of multiplexers).
  typedef enum logic [1:0] {
    SRC_IN   = 2'd0,  // input register file (residuals)
    SRC_IQIT = 2'd1,  // IQIT register file (inverse-quantised block)
    SRC_DC   = 2'd2   // DC register file
  } tsrc_e;

  // Where the transform results in register 4 go.
  typedef enum logic [1:0] {
    DEST_QUANT = 2'd0, // forward quantisation, then TQ register file
    DEST_DCRF  = 2'd1, // DC register file (inverse DC Hadamard results)
    DEST_REC   = 2'd2  // reconstructed residual output
  } tdest_e;

  // Control word from the control unit to the datapath.
  typedef struct packed {
    logic        t_start;   // start a block in the transform datapath
    tmode_e      t_mode;
    oscale_e     t_osc;
    tsrc_e       t_src;
    logic [8:0]  t_base;    // source address of row 0 of the block
    tdest_e      t_dest;
    logic        t_dcdiv;   // forward: coefficient 0 also goes to the DC RF
    logic [4:0]  dc_wbase;  // DC RF write address (diversion or DC base)
    logic [4:0]  blk;       // current block slot (TQ register file)
    logic [5:0]  qp;        // QP of the current block
    qmode_e      q_fmode;   // forward quant mode (QM_Q_AC or QM_Q_DC)
    logic        iq_issue;  // issue one inverse quantisation this cycle
    logic [3:0]  iq_pos;
    qmode_e      iq_mode;   // QM_IQ or QM_IQ_DC
    logic        iq_usedc;  // take this coefficient from the DC RF instead
    logic [4:0]  iq_dcidx;  // DC RF address for iq_usedc
  } tq_ctrl_t;

  // floor(QP/6) and QP%6 for QP in 0..51.
  function automatic logic [3:0] qp_div6(input logic [5:0] qp);
    logic [3:0] d;
    d = 4'd0;
    for (int k = 1; k <= 8; k++)
      if (qp >= 6'(6 * k)) d = 4'(k);
    return d;
  endfunction

  function automatic logic [2:0] qp_mod6(input logic [5:0] qp);
    logic [5:0] r;
    r = qp - 6'(6 * int'(qp_div6(qp)));
    return r[2:0];
  endfunction

  // Position class of coefficient (i,j): 0 both even, 1 both odd, 2 mixed.
  function automatic logic [1:0] pos_class(input logic [3:0] pos);
    if (!pos[0] && !pos[2]) return 2'd0;
    if (pos[0] && pos[2])   return 2'd1;
    return 2'd2;
  endfunction

  // Forward scaling factor MF (14 bits).
  function automatic logic [13:0] mf_value(input logic [2:0] qrem, input logic [1:0] cls);
    logic [13:0] t [6][3];
    t[0] = '{14'd13107, 14'd5243, 14'd8066};
    t[1] = '{14'd11916, 14'd4660, 14'd7490};
    t[2] = '{14'd10082, 14'd4194, 14'd6554};
    t[3] = '{14'd9362,  14'd3647, 14'd5825};
    t[4] = '{14'd8192,  14'd3355, 14'd5243};
    t[5] = '{14'd7282,  14'd2893, 14'd4559};
    return t[(qrem > 3'd5) ? 3'd5 : qrem][(cls > 2'd2) ? 2'd2 : cls];
  endfunction

  // Inverse rescaling factor V (5 bits).
  function automatic logic [4:0] v_value(input logic [2:0] qrem, input logic [1:0] cls);
    logic [4:0] t [6][3];
    t[0] = '{5'd10, 5'd16, 5'd13};
    t[1] = '{5'd11, 5'd18, 5'd14};
    t[2] = '{5'd13, 5'd20, 5'd16};
    t[3] = '{5'd14, 5'd23, 5'd18};
    t[4] = '{5'd16, 5'd25, 5'd20};
    t[5] = '{5'd18, 5'd29, 5'd23};
    return t[(qrem > 3'd5) ? 3'd5 : qrem][(cls > 2'd2) ? 2'd2 : cls];
  endfunction

endpackage
