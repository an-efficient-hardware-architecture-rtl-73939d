// transform_datapath: the reconfigurable transform part of the engine.  One
// datapath computes the 4x4 forward integer transform, the 4x4 inverse integer
// transform, the 4x4 Hadamard transform and the 2x2 Hadamard transform of
// H.264, producing one coefficient per clock cycle.
//
// How it works.  A 2-D 4x4 transform Y = A X A^T is done as two passes of
// 1-D transforms.  Pass 1 (first matrix multiplication) transforms the rows of
// X; its 16 results go into an internal transpose register file.  Pass 2
// (second matrix multiplication) loads one column of those results at a time
// into registers 0-3 and transforms it, giving one column of Y.  The first row
// of multiplexers picks the block source (input register file for the forward
// transform, the alternative 16-bit source - IQIT or DC register file - for
// the others); the second row picks that source in pass 1 and registers 0-3 in
// pass 2.  Each 1-D output needs three adder/subtractors: adder 0 and adder 1
// form the butterfly terms (a0+-a3, a1+-a2; for the inverse a0+-a2 and
// a1+-a3/2), P registers hold them, and adder 2 combines them.  The four
// outputs are produced in the order 0,2,1,3 (inverse: 0,3,1,2), so adders 0
// and 1 keep the same inputs and operation for two cycles at a time (add in
// phases 0-1, subtract in phases 2-3).  One-bit shifters double a butterfly
// term for the forward transform and halve an input for the inverse.  The
// pass-2 result goes through an output scaling step (none, >>1, (x+32)>>6 or
// >>5) into register 4.  The 2x2 Hadamard skips pass 1: the four DC values
// are loaded straight into registers 0-3.
//
// Interface.  Pulse start for one cycle with mode and oscale valid; busy is
// high until the block is finished.  While busy, row_req names the row (0-3)
// the datapath wants; the source must present it combinationally on row_rf
// (9-bit residuals) or row_alt (16-bit values), chosen by src_rf.  The
// coefficients come out of register 4 with out_valid, out_idx (raster
// position i*4+j, 0-3 for 2x2) and out_data; done marks the last one.
//
// Timing (counting clock edges after the edge that samples start).  4x4
// modes: 16 cycles pass 1, 2 cycles to drain and load, 16 cycles pass 2; the
// outputs are valid after edges 21..36, done with the last, and a new start
// is accepted from then on (36 cycles per block).  2x2: outputs after edges
// 4..7 (7 cycles per block).
//
// The pass structure, registers 0-3, the three adder/subtractors, the P
// registers, register 4, the one-bit shifters and the low-switching output
// order follow the paper.  The transpose register file, the output scaling
// step and the exact cycle schedule are this design's own choices.
module transform_datapath
  import tq_pkg::*;
#(
  parameter int unsigned W          = DW,
  parameter bit          CARRY_SAVE = 1'b1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  tmode_e              mode,
  input  oscale_e             oscale,
  input  logic                src_rf,     // 1: first-row mux takes row_rf
  output logic [1:0]          row_req,
  input  logic [3:0][RW-1:0]  row_rf,
  input  logic [3:0][W-1:0]   row_alt,
  output logic                busy,
  output logic                out_valid,
  output logic [3:0]          out_idx,
  output logic signed [W-1:0] out_data,
  output logic                done
);
  typedef enum logic [2:0] {S_IDLE, S_P1, S_DRAIN, S_LOAD, S_P2} state_e;
  state_e  state;
  logic [3:0] cnt;
  tmode_e  mode_q;
  oscale_e osc_q;
  logic    src_q;

  // ---------------- first row of multiplexers ----------------
  logic [3:0][W-1:0] src_row;
  always_comb begin
    for (int i = 0; i < 4; i++)
      src_row[i] = src_q ? W'(signed'(row_rf[i])) : row_alt[i];
  end

  assign row_req = (state == S_P1) ? cnt[3:2] : 2'd0;

  // ---------------- transpose register file ----------------
  logic          tr_we;
  logic [3:0]    tr_waddr;
  logic [W-1:0]  tr_wdata;
  logic [3:0][W-1:0] tr_col;
  logic [W-1:0]  tr_unused;
  logic [1:0]    load_col;
  reg_file #(.DEPTH(16), .W(W), .VSTRIDE(4)) u_transpose (
    .clk, .we(tr_we), .waddr(tr_waddr), .wdata(tr_wdata),
    .raddr(4'd0), .rdata(tr_unused),
    .vbase({2'b00, load_col}), .vdata(tr_col));

  // ---------------- registers 0-3 ----------------
  logic signed [W-1:0] r [4];
  logic                load_en;
  always_comb begin
    load_en  = 1'b0;
    load_col = 2'd0;
    if (state == S_LOAD) load_en = 1'b1;
    else if (state == S_P2 && cnt[1:0] == 2'd3 && cnt[3:2] != 2'd3) begin
      load_en  = 1'b1;
      load_col = cnt[3:2] + 2'd1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) r[i] <= '0;
    end else if (load_en) begin
      if (mode_q == TM_HAD2) begin
        // 2x2 block a b / c d: R0=a, R1=c, R2=d, R3=b
        r[0] <= src_row[0]; r[3] <= src_row[1];
        r[1] <= src_row[2]; r[2] <= src_row[3];
      end else begin
        for (int i = 0; i < 4; i++) r[i] <= tr_col[i];
      end
    end
  end

  // ---------------- second row of multiplexers + adders 0/1 ----------------
  logic [1:0]          ph;
  logic signed [W-1:0] op [4];
  logic signed [W-1:0] a0_x, a0_y, a1_x, a1_y;
  logic [W-1:0]        sum0, sum1;
  logic                ab_sub;
  logic                active;

  assign active = (state == S_P1) || (state == S_P2);
  assign ph     = cnt[1:0];
  assign ab_sub = ph[1];

  always_comb begin
    for (int i = 0; i < 4; i++)
      op[i] = (state == S_P1) ? signed'(src_row[i]) : r[i];
    if (mode_q == TM_INV) begin
      a0_x = op[0];
      a0_y = op[2];
      a1_x = ph[1] ? (op[1] >>> 1) : op[1];
      a1_y = ph[1] ? op[3] : (op[3] >>> 1);
    end else begin
      a0_x = op[0];
      a0_y = op[3];
      a1_x = op[1];
      a1_y = op[2];
    end
  end

  addsub #(.W(W), .CARRY_SAVE(CARRY_SAVE)) u_add0 (.a(a0_x), .b(a0_y), .sub(ab_sub), .y(sum0));
  addsub #(.W(W), .CARRY_SAVE(CARRY_SAVE)) u_add1 (.a(a1_x), .b(a1_y), .sub(ab_sub), .y(sum1));

  // output position of the value computed in this phase
  logic [1:0] k_idx;   // row/column of the 1-D output
  always_comb begin
    if (mode_q == TM_INV)
      unique case (ph)
        2'd0: k_idx = 2'd0;
        2'd1: k_idx = 2'd3;
        2'd2: k_idx = 2'd1;
        default: k_idx = 2'd2;
      endcase
    else
      unique case (ph)
        2'd0: k_idx = 2'd0;
        2'd1: k_idx = 2'd2;
        2'd2: k_idx = 2'd1;
        default: k_idx = 2'd3;
      endcase
  end

  // ---------------- P registers ----------------
  logic signed [W-1:0] p0, p1;
  logic       pv, p_pass2, p_last;
  logic [1:0] p_ph;
  logic [3:0] p_idx;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p0 <= '0; p1 <= '0; pv <= 1'b0; p_pass2 <= 1'b0; p_last <= 1'b0;
      p_ph <= 2'd0; p_idx <= 4'd0;
    end else begin
      pv      <= active;
      p0      <= signed'(sum0);
      p1      <= signed'(sum1);
      p_ph    <= ph;
      p_pass2 <= (state == S_P2);
      p_last  <= (state == S_P2) && (cnt == ((mode_q == TM_HAD2) ? 4'd3 : 4'd15));
      if (state == S_P1)
        p_idx <= {cnt[3:2], k_idx};                 // t[row][k]
      else if (mode_q == TM_HAD2)
        p_idx <= {2'b00, k_idx};
      else
        p_idx <= {k_idx, cnt[3:2]};                 // y[i][column]
    end
  end

  // ---------------- shifters + adder 2 ----------------
  logic signed [W-1:0] a2_x, a2_y;
  logic [W-1:0]        sum2;
  always_comb begin
    a2_x = p0;
    a2_y = p1;
    if (mode_q == TM_FWD) begin
      if (p_ph == 2'd2) a2_x = p0 <<< 1;
      if (p_ph == 2'd3) a2_y = p1 <<< 1;
    end
  end
  addsub #(.W(W), .CARRY_SAVE(CARRY_SAVE)) u_add2 (.a(a2_x), .b(a2_y), .sub(p_ph[0]), .y(sum2));

  // output scaling
  logic signed [W-1:0] scaled;
  logic signed [W:0]   rnd;
  always_comb begin
    rnd = {sum2[W-1], sum2} + (W+1)'(32);
    unique case (osc_q)
      OS_HALF: scaled = signed'(sum2) >>> 1;
      OS_RND6: scaled = W'(rnd >>> 6);
      OS_SHR5: scaled = signed'(sum2) >>> 5;
      default: scaled = signed'(sum2);
    endcase
  end

  assign tr_we    = pv && !p_pass2;
  assign tr_waddr = p_idx;
  assign tr_wdata = sum2;

  // ---------------- register 4 ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_idx <= 4'd0; out_data <= '0; done <= 1'b0;
    end else begin
      out_valid <= pv && p_pass2;
      done      <= pv && p_pass2 && p_last;
      if (pv && p_pass2) begin
        out_idx  <= p_idx;
        out_data <= scaled;
      end
    end
  end

  // ---------------- sequencer ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      cnt    <= 4'd0;
      mode_q <= TM_FWD;
      osc_q  <= OS_NONE;
      src_q  <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          mode_q <= mode;
          osc_q  <= oscale;
          src_q  <= src_rf;
          cnt    <= 4'd0;
          state  <= (mode == TM_HAD2) ? S_LOAD : S_P1;
        end
        S_P1: begin
          cnt <= cnt + 4'd1;
          if (cnt == 4'd15) state <= S_DRAIN;
        end
        S_DRAIN: state <= S_LOAD;
        S_LOAD: begin
          cnt   <= 4'd0;
          state <= S_P2;
        end
        S_P2: begin
          cnt <= cnt + 4'd1;
          if (cnt == ((mode_q == TM_HAD2) ? 4'd3 : 4'd15)) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // busy covers the pipeline tail so a new start cannot disturb it
  assign busy = (state != S_IDLE) || pv;

  // start is only accepted when the datapath is free
  assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);
endmodule
