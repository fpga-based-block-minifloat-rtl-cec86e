// bm_buffer: on-chip BM buffer. Each word is one row of LANES element codes
// plus the shared exponent of the block the row belongs to.
//
// How: a simple dual-port memory with one write port and one read port.
// Reads are asynchronous (the word at rd_addr appears in the same cycle), so
// a streaming unit can read, compute and write back in a pipelined loop;
// a write and a read of the same address in one cycle return the old word.
// Contents are cleared at reset so that a two-state simulation reads zeros.
//
// Interface: wr_en/wr_addr/wr_code/wr_beta, rd_addr/rd_code/rd_beta.
// Timing: write takes effect at the clock edge, read is combinational.
//
// From the document: the accelerator keeps weights, inputs, activations,
// low- and high-precision outputs and the residual in on-chip BM buffers
// with the element format and sizes of its buffer table. The word layout,
// the asynchronous read and the reset clearing are this design's choices.
module bm_buffer
  import bm_pkg::*;
#(
  parameter int unsigned LANES = 12,
  parameter int unsigned W     = CODE_W,
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 wr_en,
  input  logic [AW-1:0]        wr_addr,
  input  logic [LANES-1:0][W-1:0] wr_code,
  input  beta_t                wr_beta,
  input  logic [AW-1:0]        rd_addr,
  output logic [LANES-1:0][W-1:0] rd_code,
  output beta_t                rd_beta
);
  logic [LANES-1:0][W-1:0] mem  [DEPTH];
  beta_t                   bmem [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) begin mem[i] <= '0; bmem[i] <= '0; end
    end else if (wr_en) begin
      mem[wr_addr]  <= wr_code;
      bmem[wr_addr] <= wr_beta;
    end
  end

  assign rd_code = mem[rd_addr];
  assign rd_beta = bmem[rd_addr];
endmodule
