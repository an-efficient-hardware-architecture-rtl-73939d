// reg_file: register file with one write port, one scalar read port and one
// four-element vector read port.
//
// Every storage element of the engine is an instance of this module:
//   input RF     384 x 9   residual samples of one macroblock, rows of 4 read
//   transpose RF  16 x 16  first-pass transform results, columns of 4 read
//   IQIT RF       16 x 16  inverse-quantised block, rows of 4 read
//   DC RF         24 x 16  luma and chroma DC coefficients, rows of 4 read
//   TQ RF        432 x 16  quantised coefficients of the whole macroblock
// The sizes of the input RF (384 x 9) follow the paper's description; the
// others are this design's choice.
//
// Interface and timing: the write is synchronous (we, waddr, wdata sampled on
// the rising clock edge).  Both reads are asynchronous, as in a register
// file: rdata = mem[raddr]; vdata[i] = mem[vbase + i*VSTRIDE] (VSTRIDE = 1
// reads a row of a 4x4 block stored row by row, VSTRIDE = 4 reads a column).
// An address past the end reads as zero.  There is no reset; entries are
// written before they are read.
module reg_file #(
  parameter int unsigned DEPTH   = 384,
  parameter int unsigned W       = 9,
  parameter int unsigned VSTRIDE = 1,
  localparam int unsigned AW     = $clog2(DEPTH)
) (
  input  logic                clk,
  input  logic                we,
  input  logic [AW-1:0]       waddr,
  input  logic [W-1:0]        wdata,
  input  logic [AW-1:0]       raddr,
  output logic [W-1:0]        rdata,
  input  logic [AW-1:0]       vbase,
  output logic [3:0][W-1:0]   vdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (we && (32'(waddr) < DEPTH)) mem[waddr] <= wdata;

  assign rdata = (32'(raddr) < DEPTH) ? mem[raddr] : '0;

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      automatic int unsigned a = 32'(vbase) + 32'(i) * VSTRIDE;
      vdata[i] = (a < DEPTH) ? mem[a[AW-1:0]] : '0;
    end
  end
endmodule
