// tq_top: H.264 forward transform + quantisation and inverse quantisation +
// inverse transform engine for one macroblock, built around one
// reconfigurable transform datapath and one multiplier.
//
// What it does.  The residual of a macroblock (16 luma and 8 chroma 4x4
// blocks, 9-bit samples) is loaded into the 384 x 9 input register file.
// After start, every block is transformed with the 4x4 integer transform and
// quantised; the luma DC coefficients of an Intra 16x16 macroblock and the
// chroma DC coefficients are collected and go through the 4x4 / 2x2 Hadamard
// transform and DC quantisation.  All quantised coefficients are kept in the
// TQ register file for the entropy coder and are also streamed out.  Then
// the reconstruction path runs: inverse quantisation and inverse Hadamard of
// the DC blocks, inverse quantisation and inverse integer transform of each
// 4x4 block; the reconstructed residual is streamed out.
//
// Structure: control_unit drives transform_datapath (registers 0-3, three
// adder/subtractors, P registers, register 4, transpose RF) and
// quant_datapath (multiplier, lookup tables, rounding adder and shifters);
// reg_file instances hold the input residuals (384 x 9), the quantised
// coefficients TQ (27 slots x 16 = 432 x 16), the inverse-quantised block
// IQIT (16 x 16) and the DC coefficients (24 x 16).
//
// Interface.
//   in_we/in_addr/in_data  write residuals while in_ready.  Address = 16*b + 4*i + j
//                          for luma block b (0..15, raster order in the
//                          macroblock) and 256 + 16*(b-18) + 4*i + j for chroma
//                          blocks b = 18..21 (Cb) and 22..25 (Cr).
//   start, qp_y, qp_c, intra, i16   start a macroblock (one cycle, while not
//                          busy); intra selects the intra rounding offset, i16
//                          the Intra 16x16 luma DC path.  qp_c is the chroma QP.
//   coef_*                 every quantised coefficient as it is written:
//                          block slot, raster position, value.
//   rec_*                  every reconstructed residual sample.
//   tq_rrow -> tq_rrow_data  read row tq_rrow (= 4*slot + row) of the TQ
//                          register file, four coefficients, asynchronous.
//   busy, done             done pulses once when the macroblock is finished.
//   in_ready               the input register file accepts writes: when idle
//                          and after the forward phase, so the next
//                          macroblock can be loaded during reconstruction
//                          (writes while in_ready is low are ignored).
// Timing: 2291 cycles per Intra 16x16 macroblock, 2201 for other macroblocks.
module tq_top
  import tq_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_we,
  input  logic [8:0]           in_addr,
  input  logic [RW-1:0]        in_data,
  input  logic                 start,
  input  logic [5:0]           qp_y,
  input  logic [5:0]           qp_c,
  input  logic                 intra,
  input  logic                 i16,
  output logic                 busy,
  output logic                 in_ready,
  output logic                 done,
  output logic                 coef_valid,
  output logic [4:0]           coef_blk,
  output logic [3:0]           coef_pos,
  output logic signed [DW-1:0] coef_data,
  output logic                 rec_valid,
  output logic [4:0]           rec_blk,
  output logic [3:0]           rec_pos,
  output logic signed [DW-1:0] rec_data,
  input  logic [6:0]           tq_rrow,
  output logic [3:0][DW-1:0]   tq_rrow_data
);
  tq_ctrl_t ctrl;
  logic     intra_q, in_free;
  logic     t_done, t_busy, t_out_valid;
  logic [1:0] row_req;
  logic [3:0] t_out_idx;
  logic signed [DW-1:0] t_out_data;

  control_unit u_ctrl (
    .clk, .rst_n, .start, .qp_y, .qp_c, .intra, .i16,
    .t_done, .ctrl, .intra_q, .busy, .in_free, .done);
  assign in_ready = in_free;

  // ---------------- register files ----------------
  logic [8:0]           row_addr;
  assign row_addr = ctrl.t_base + {5'd0, row_req, 2'b00};

  logic [3:0][RW-1:0]   in_row;
  logic [RW-1:0]        in_unused;
  reg_file #(.DEPTH(384), .W(RW), .VSTRIDE(1)) u_input_rf (
    .clk, .we(in_we && in_ready), .waddr(in_addr), .wdata(in_data),
    .raddr(9'd0), .rdata(in_unused), .vbase(row_addr), .vdata(in_row));

  logic                 iqit_we;
  logic [3:0]           iqit_waddr;
  logic [DW-1:0]        iqit_wdata, iqit_unused;
  logic [3:0][DW-1:0]   iqit_row;
  reg_file #(.DEPTH(16), .W(DW), .VSTRIDE(1)) u_iqit_rf (
    .clk, .we(iqit_we), .waddr(iqit_waddr), .wdata(iqit_wdata),
    .raddr(4'd0), .rdata(iqit_unused), .vbase(row_addr[3:0]), .vdata(iqit_row));

  logic                 dc_we;
  logic [4:0]           dc_waddr;
  logic [DW-1:0]        dc_wdata, dc_rdata;
  logic [3:0][DW-1:0]   dc_row;
  reg_file #(.DEPTH(24), .W(DW), .VSTRIDE(1)) u_dc_rf (
    .clk, .we(dc_we), .waddr(dc_waddr), .wdata(dc_wdata),
    .raddr(ctrl.iq_dcidx), .rdata(dc_rdata), .vbase(row_addr[4:0]), .vdata(dc_row));

  logic                 tq_we;
  logic [8:0]           tq_waddr;
  logic [DW-1:0]        tq_wdata, tq_rdata;
  reg_file #(.DEPTH(NBLK * 16), .W(DW), .VSTRIDE(1)) u_tq_rf (
    .clk, .we(tq_we), .waddr(tq_waddr), .wdata(tq_wdata),
    .raddr({ctrl.blk, ctrl.iq_pos}), .rdata(tq_rdata),
    .vbase({tq_rrow, 2'b00}), .vdata(tq_rrow_data));

  // ---------------- transform datapath ----------------
  transform_datapath u_tdp (
    .clk, .rst_n,
    .start  (ctrl.t_start),
    .mode   (ctrl.t_mode),
    .oscale (ctrl.t_osc),
    .src_rf (ctrl.t_src == SRC_IN),
    .row_req,
    .row_rf (in_row),
    .row_alt((ctrl.t_src == SRC_DC) ? dc_row : iqit_row),
    .busy   (t_busy),
    .out_valid(t_out_valid),
    .out_idx(t_out_idx),
    .out_data(t_out_data),
    .done   (t_done));

  // ---------------- quantiser ----------------
  logic   fq_valid;     // forward quantisation of register 4 this cycle
  logic   q_in_valid, q_out_valid;
  qmode_e q_mode;
  logic [3:0] q_pos;
  logic signed [DW-1:0] q_out;

  assign fq_valid   = t_out_valid && (ctrl.t_dest == DEST_QUANT);
  assign q_in_valid = fq_valid || ctrl.iq_issue;
  assign q_mode     = ctrl.iq_issue ? ctrl.iq_mode : ctrl.q_fmode;
  assign q_pos      = ctrl.iq_issue ? ctrl.iq_pos : t_out_idx;

  quant_datapath u_qdp (
    .clk, .rst_n,
    .in_valid (q_in_valid),
    .qmode    (q_mode),
    .qp       (ctrl.qp),
    .pos      (q_pos),
    .intra    (intra_q),
    .w_in     (t_out_data),
    .z_in     (signed'(tq_rdata)),
    .out_valid(q_out_valid),
    .out_data (q_out));

  // tags travelling with each quantiser operation
  logic            tag_tq, tag_iq, tag_zero, tag_usedc;
  logic [4:0]      tag_blk;
  logic [3:0]      tag_pos;
  logic [DW-1:0]   tag_dc;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tag_tq <= 1'b0; tag_iq <= 1'b0; tag_zero <= 1'b0; tag_usedc <= 1'b0;
      tag_blk <= '0; tag_pos <= '0; tag_dc <= '0;
    end else begin
      tag_tq    <= fq_valid;
      tag_iq    <= ctrl.iq_issue;
      tag_zero  <= ctrl.t_dcdiv && (t_out_idx == 4'd0);
      tag_usedc <= ctrl.iq_usedc;
      tag_blk   <= ctrl.blk;
      tag_pos   <= q_pos;
      tag_dc    <= dc_rdata;
    end
  end

  // TQ register file and coefficient stream
  assign tq_we      = q_out_valid && tag_tq;
  assign tq_waddr   = {tag_blk, tag_pos};
  assign tq_wdata   = tag_zero ? '0 : q_out;
  assign coef_valid = tq_we;
  assign coef_blk   = tag_blk;
  assign coef_pos   = tag_pos;
  assign coef_data  = signed'(tq_wdata);

  // IQIT register file
  assign iqit_we    = q_out_valid && tag_iq;
  assign iqit_waddr = tag_pos;
  assign iqit_wdata = tag_usedc ? tag_dc : q_out;

  // DC register file: forward DC diversion or inverse DC Hadamard results
  always_comb begin
    dc_we    = 1'b0;
    dc_waddr = ctrl.dc_wbase;
    dc_wdata = t_out_data;
    if (fq_valid && ctrl.t_dcdiv && t_out_idx == 4'd0) dc_we = 1'b1;
    if (t_out_valid && ctrl.t_dest == DEST_DCRF) begin
      dc_we    = 1'b1;
      dc_waddr = ctrl.dc_wbase + {1'b0, t_out_idx};
    end
  end

  // reconstructed residual
  assign rec_valid = t_out_valid && (ctrl.t_dest == DEST_REC);
  assign rec_blk   = ctrl.blk;
  assign rec_pos   = t_out_idx;
  assign rec_data  = t_out_data;

  // the multiplier serves one operation per cycle
  assert property (@(posedge clk) disable iff (!rst_n) !(fq_valid && ctrl.iq_issue));
  // a transform block is only started when the datapath is free
  assert property (@(posedge clk) disable iff (!rst_n) ctrl.t_start |-> !t_busy);
endmodule
