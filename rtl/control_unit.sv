// control_unit: sequences one macroblock through the transform and
// quantisation datapath.
//
// Order of work (blocks numbered as in tq_pkg):
//   1. forward transform + quantisation of luma blocks 0..15, then chroma
//      blocks 18..25.  The DC coefficient of every chroma block, and of every
//      luma block when the macroblock is Intra 16x16, is also kept in the DC
//      register file (and coded as zero in its own block).
//   2. Intra 16x16 only: the luma DC block (slot 26, block "-1"): 4x4
//      Hadamard (result halved), DC quantisation, DC inverse quantisation,
//      inverse 4x4 Hadamard with (x+32)>>6; results back to the DC RF.
//   3. Cb then Cr DC blocks (slots 16, 17): 2x2 Hadamard, DC quantisation,
//      DC inverse quantisation, inverse 2x2 Hadamard with >>5; results back to
//      the DC RF.
//   4. for each luma block, then each chroma block: inverse quantisation of
//      its 16 coefficients into the IQIT RF (coefficient 0 taken from the DC
//      RF where a DC path was used), then the inverse integer transform, whose
//      results leave as the reconstructed residual.
// Within a block the forward transform and quantisation run pipelined (each
// coefficient is quantised in the cycle after it leaves the transform);
// inverse quantisation uses the same multiplier and so runs on its own,
// before the inverse transform.
//
// Interface.  start (one cycle, while idle) latches qp_y, qp_c, intra and
// i16.  The control word ctrl (tq_ctrl_t) drives the datapath in the same
// cycle; t_done is the transform datapath's done.  busy is high from start to
// done; done pulses for one cycle at the end.  in_free is high whenever the
// input register file is no longer needed (idle, or past the forward phase),
// so the next macroblock can be loaded while this one is reconstructed.
//
// Timing: a transform job starts one cycle after the previous one finishes,
// an inverse quantisation job issues one coefficient per cycle.  A macroblock
// takes 2291 cycles when Intra 16x16 and 2201 otherwise.
//
// The units, the block numbering -1, 0..15, 16, 17, 18..25 and the rule that
// inverse quantisation follows quantisation of a block and precedes its
// inverse transform are taken from the paper.  Doing all forward work of a
// macroblock before the inverse work (the luma and chroma DC blocks need all
// forward DC values first) and the DC register file are this design's choice.
module control_unit
  import tq_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [5:0] qp_y,
  input  logic [5:0] qp_c,
  input  logic       intra,
  input  logic       i16,
  input  logic       t_done,
  output tq_ctrl_t   ctrl,
  output logic       intra_q,
  output logic       busy,
  output logic       in_free,
  output logic       done
);
  typedef enum logic [3:0] {
    C_IDLE, C_FWD, C_FLDC, C_IQLDC, C_ILDC, C_FCDC, C_IQCDC, C_ICDC,
    C_IQ, C_INV, C_DONE
  } cstate_e;

  cstate_e    st;
  logic [4:0] blk;
  logic       launch;
  logic [3:0] pos;
  logic [5:0] qpy_q, qpc_q;
  logic       i16_q;

  logic is_chroma;
  assign is_chroma = (blk >= 5'(BLK_CBDC)) && (blk < 5'(BLK_LUMDC));

  // DC register file index of a 4x4 block's DC coefficient
  function automatic logic [4:0] dc_index(input logic [4:0] b);
    return (b >= 5'(BLK_CHR0)) ? b - 5'd2 : b;
  endfunction

  // base address of block b in the input register file
  function automatic logic [8:0] in_base(input logic [4:0] b);
    return (b >= 5'(BLK_CHR0)) ? {b - 5'd2, 4'd0} : {b, 4'd0};
  endfunction

  // ---------------- control word ----------------
  always_comb begin
    ctrl          = '0;
    ctrl.blk      = blk;
    ctrl.qp       = is_chroma ? qpc_q : qpy_q;
    ctrl.t_start  = launch && (st inside {C_FWD, C_FLDC, C_ILDC, C_FCDC, C_ICDC, C_INV});
    ctrl.q_fmode  = QM_Q_AC;
    ctrl.iq_mode  = QM_IQ;
    ctrl.iq_pos   = pos;
    unique case (st)
      C_FWD: begin
        ctrl.t_mode   = TM_FWD;
        ctrl.t_src    = SRC_IN;
        ctrl.t_base   = in_base(blk);
        ctrl.t_dest   = DEST_QUANT;
        ctrl.t_dcdiv  = is_chroma || i16_q;
        ctrl.dc_wbase = dc_index(blk);
      end
      C_FLDC: begin
        ctrl.t_mode   = TM_HAD4;
        ctrl.t_osc    = OS_HALF;
        ctrl.t_src    = SRC_DC;
        ctrl.t_base   = 9'd0;
        ctrl.t_dest   = DEST_QUANT;
        ctrl.q_fmode  = QM_Q_DC;
      end
      C_ILDC: begin
        ctrl.t_mode   = TM_HAD4;
        ctrl.t_osc    = OS_RND6;
        ctrl.t_src    = SRC_IQIT;
        ctrl.t_dest   = DEST_DCRF;
        ctrl.dc_wbase = 5'd0;
      end
      C_FCDC: begin
        ctrl.t_mode   = TM_HAD2;
        ctrl.t_src    = SRC_DC;
        ctrl.t_base   = (blk == 5'(BLK_CBDC)) ? 9'd16 : 9'd20;
        ctrl.t_dest   = DEST_QUANT;
        ctrl.q_fmode  = QM_Q_DC;
      end
      C_ICDC: begin
        ctrl.t_mode   = TM_HAD2;
        ctrl.t_osc    = OS_SHR5;
        ctrl.t_src    = SRC_IQIT;
        ctrl.t_dest   = DEST_DCRF;
        ctrl.dc_wbase = (blk == 5'(BLK_CBDC)) ? 5'd16 : 5'd20;
      end
      C_IQLDC, C_IQCDC: begin
        ctrl.iq_issue = 1'b1;
        ctrl.iq_mode  = QM_IQ_DC;
      end
      C_IQ: begin
        ctrl.iq_issue = 1'b1;
        ctrl.iq_usedc = (pos == 4'd0) && (is_chroma || i16_q);
        ctrl.iq_dcidx = dc_index(blk);
      end
      C_INV: begin
        ctrl.t_mode   = TM_INV;
        ctrl.t_osc    = OS_RND6;
        ctrl.t_src    = SRC_IQIT;
        ctrl.t_dest   = DEST_REC;
      end
      default: ;
    endcase
  end

  // ---------------- sequencer ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= C_IDLE; blk <= '0; launch <= 1'b0; pos <= '0;
      qpy_q <= '0; qpc_q <= '0; i16_q <= 1'b0; intra_q <= 1'b0;
    end else begin
      launch <= 1'b0;
      unique case (st)
        C_IDLE: if (start) begin
          qpy_q <= qp_y; qpc_q <= qp_c; i16_q <= i16; intra_q <= intra;
          blk <= 5'd0; st <= C_FWD; launch <= 1'b1;
        end
        C_FWD: if (t_done) begin
          launch <= 1'b1;
          if (blk == 5'd15) blk <= 5'(BLK_CHR0);
          else if (blk == 5'd25) begin
            if (i16_q) begin blk <= 5'(BLK_LUMDC); st <= C_FLDC; end
            else       begin blk <= 5'(BLK_CBDC);  st <= C_FCDC; end
          end else blk <= blk + 5'd1;
        end
        C_FLDC: if (t_done) begin st <= C_IQLDC; pos <= '0; end
        C_IQLDC: begin
          pos <= pos + 4'd1;
          if (pos == 4'd15) begin st <= C_ILDC; launch <= 1'b1; end
        end
        C_ILDC: if (t_done) begin blk <= 5'(BLK_CBDC); st <= C_FCDC; launch <= 1'b1; end
        C_FCDC: if (t_done) begin st <= C_IQCDC; pos <= '0; end
        C_IQCDC: begin
          pos <= pos + 4'd1;
          if (pos == 4'd3) begin st <= C_ICDC; launch <= 1'b1; end
        end
        C_ICDC: if (t_done) begin
          if (blk == 5'(BLK_CBDC)) begin blk <= 5'(BLK_CRDC); st <= C_FCDC; launch <= 1'b1; end
          else begin blk <= 5'd0; st <= C_IQ; pos <= '0; end
        end
        C_IQ: begin
          pos <= pos + 4'd1;
          if (pos == 4'd15) begin st <= C_INV; launch <= 1'b1; end
        end
        C_INV: if (t_done) begin
          pos <= '0;
          if (blk == 5'd25) st <= C_DONE;
          else begin
            st  <= C_IQ;
            blk <= (blk == 5'd15) ? 5'(BLK_CHR0) : blk + 5'd1;
          end
        end
        C_DONE: st <= C_IDLE;
        default: st <= C_IDLE;
      endcase
    end
  end

  assign busy = (st != C_IDLE);
  // the input register file is only read in the forward phase: once the
  // last forward block is finished, the next macroblock may be loaded
  assign in_free = (st != C_FWD);
  assign done = (st == C_DONE);
endmodule
