// tile_transpose: ping-pong tile buffer that turns a stream of tile rows into
// a stream of tile columns (transpose) or rows (direct), together with the
// per-block shared exponents.
//
// How: two banks of N x N element registers. A tile is written one row per
// beat into the write bank; when its N-th row arrives the bank is handed to
// the reader and writing continues in the other bank, so one tile is read
// while the next is written. The reader emits row k (direct) or column k
// (transpose) of the full bank on beat k. Shared exponents are kept per
// BLK x BLK block; in transpose mode block (i, j) is read back as (j, i).
// A sideband word (first/last flags of the GEMM step) travels with each row.
//
// Interface: valid/ready on both sides. in_vec holds N elements of W bits;
// in_beta one exponent per block column of the row, sampled on rows
// k % BLK == 0. out_beta gives one exponent per block of the emitted vector.
// Timing: the first output beat of a tile can follow its last input beat by
// one cycle; a continuous input stream gives a continuous output stream.
//
// From the document: the transpose block is a register array that reads one
// tile while it feeds another, transposed tile to the GEMM kernel. The bank
// organisation, the handshake, the direct mode (so both feeders have equal
// latency) and the exponent handling are this design's choices.
module tile_transpose
  import bm_pkg::*;
#(
  parameter int unsigned N   = 72,
  parameter int unsigned W   = LP_W,
  parameter int unsigned BLK = 12,
  parameter int unsigned SB  = 2,
  localparam int unsigned NB = N / BLK,
  localparam int unsigned KW = $clog2(N)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 transpose,   // sampled with the first row of a tile
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic [N-1:0][W-1:0]  in_vec,
  input  beta_t [NB-1:0]       in_beta,
  input  logic [SB-1:0]        in_side,
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic [N-1:0][W-1:0]  out_vec,
  output beta_t [NB-1:0]       out_beta,
  output logic [SB-1:0]        out_side
);
  logic [N-1:0][W-1:0] mem   [2][N];
  beta_t               bmem  [2][NB][NB];
  logic [SB-1:0]       side  [2][N];
  logic                tr    [2];
  logic [1:0]          full;
  logic                wb, rb;
  logic [KW-1:0]       wk, rk;

  assign in_ready  = !full[wb];
  assign out_valid = full[rb];

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) begin
      mem[wb][wk]  <= in_vec;
      side[wb][wk] <= in_side;
      if (wk % BLK == 0)
        for (int j = 0; j < NB; j++) bmem[wb][wk / BLK][j] <= in_beta[j];
      if (wk == 0) tr[wb] <= transpose;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full <= '0; wb <= 1'b0; rb <= 1'b0; wk <= '0; rk <= '0;
    end else begin
      logic [1:0] f;
      f = full;
      if (out_valid && out_ready) begin
        if (rk == KW'(N-1)) begin rk <= '0; f[rb] = 1'b0; rb <= ~rb; end
        else rk <= rk + 1'b1;
      end
      if (in_valid && in_ready) begin
        if (wk == KW'(N-1)) begin wk <= '0; f[wb] = 1'b1; wb <= ~wb; end
        else wk <= wk + 1'b1;
      end
      full <= f;
    end
  end

  always_comb begin
    out_side = side[rb][rk];
    for (int i = 0; i < N; i++) out_vec[i] = tr[rb] ? mem[rb][i][rk] : mem[rb][rk][i];
    for (int b = 0; b < NB; b++) out_beta[b] = tr[rb] ? bmem[rb][b][rk / BLK] : bmem[rb][rk / BLK][b];
  end

  initial assert (N % BLK == 0) else $fatal(1, "BLK must divide N");
endmodule
