// bm_gemm: block minifloat GEMM kernel.
//
// C = A x B on one output tile of TL_R x TL_C elements (TL_R = 2*PE_ROWS,
// TL_C = 3*PE_COLS) with BLK x BLK blocks, each with its own shared
// exponent, independent of the tile size (cross-block GEMM). Inputs are
// 4-bit BM codes in run-time formats fmt_a / fmt_b; the output is either a
// low-precision 4-bit format or the high-precision BM<0,15>, chosen by
// out_fmt, with optional ReLU and the ReLU derivative mask.
//
// Structure: bm_pe_array (decoders, packed multiply, aligned accumulation,
// drain chain) feeding bm_gemm_post (ping-pong P buffer, FindMax, Calibr,
// ReLU&Norm). out_fmt and relu are sampled with the last step of each tile.
// A tile is one run of K steps from `in_first` to `in_last`;
// successive tiles overlap (inner product of tile n+1 with normalisation of
// tile n). Latency of a tile from its last step to its first output row is
// about PE_ROWS + PE_COLS + TL_R cycles, and tiles stream at one per
// max(K, TL_R) cycles, in line with the pipelined latency model
// ceil(Row*Col/(Tl*Tl)) * K + O(Blk + Tl) of the design.
module bm_gemm
  import bm_pkg::*;
#(
  parameter int unsigned PE_ROWS = 36,
  parameter int unsigned PE_COLS = 24,
  parameter int unsigned BLK     = 12,
  parameter int unsigned W_EX    = 10,
  parameter int unsigned W_TAIL  = 4,
  // Kadd = 1 + (2^ea - 1 + ma) + (2^eb - 1 + mb) + W_ex + W_tail, with
  // 4-bit integer magnitudes on both sides
  parameter int unsigned ACC_W   = 1 + 4 + 4 + W_EX + W_TAIL,
  localparam int unsigned TL_R   = 2 * PE_ROWS,
  localparam int unsigned TL_C   = 3 * PE_COLS,
  localparam int unsigned NBC    = TL_C / BLK,
  localparam int unsigned RW     = $clog2(TL_R)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  bm_fmt_t                 fmt_a,
  input  bm_fmt_t                 fmt_b,
  input  bm_fmt_t                 out_fmt,
  input  logic                    relu,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic                    in_first,
  input  logic                    in_last,
  input  lp_code_t [TL_R-1:0]     a_col,
  input  beta_t    [TL_R/BLK-1:0] beta_a,     // one exponent per block row
  input  lp_code_t [TL_C-1:0]     b_row,
  input  beta_t    [TL_C/BLK-1:0] beta_b,     // one exponent per block column
  output logic                    out_valid,
  output logic                    out_last,
  output logic [RW-1:0]           out_row,
  output code_t    [TL_C-1:0]     out_code,
  output beta_t    [NBC-1:0]      out_beta,
  output logic     [TL_C-1:0]     out_mask
);
  // output format and ReLU of a tile are taken with its last step and held
  // while it drains (the next last step is accepted only after the drain)
  bm_fmt_t tile_fmt;
  logic    tile_relu;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      tile_fmt  <= FMT_0_15;
      tile_relu <= 1'b0;
    end else if (in_valid && in_ready && in_last) begin
      tile_fmt  <= out_fmt;
      tile_relu <= relu;
    end

  // block exponents fanned out to PE rows / columns (the beta blocks)
  beta_t [PE_ROWS-1:0] pe_beta_a;
  beta_t [PE_COLS-1:0] pe_beta_b;
  always_comb begin
    for (int i = 0; i < PE_ROWS; i++) pe_beta_a[i] = beta_a[(2*i) / BLK];
    for (int j = 0; j < PE_COLS; j++) pe_beta_b[j] = beta_b[(3*j) / BLK];
  end

  logic                              arr_valid;
  logic [RW-1:0]                     arr_row;
  logic signed [TL_C-1:0][ACC_W-1:0] arr_val;
  beta_t [PE_COLS-1:0]               arr_ref;

  bm_pe_array #(.PE_ROWS(PE_ROWS), .PE_COLS(PE_COLS), .ACC_W(ACC_W), .W_TAIL(W_TAIL)) u_array (
    .clk(clk), .rst_n(rst_n), .fmt_a(fmt_a), .fmt_b(fmt_b),
    .in_valid(in_valid), .in_ready(in_ready), .in_first(in_first), .in_last(in_last),
    .a_col(a_col), .beta_a(pe_beta_a), .b_row(b_row), .beta_b(pe_beta_b),
    .out_valid(arr_valid), .out_row(arr_row), .out_val(arr_val), .out_ref(arr_ref));

  bm_gemm_post #(.TL_R(TL_R), .TL_C(TL_C), .BLK(BLK), .ACC_W(ACC_W), .W_TAIL(W_TAIL)) u_post (
    .clk(clk), .rst_n(rst_n), .out_fmt(tile_fmt), .relu(tile_relu),
    .in_valid(arr_valid), .in_row(arr_row), .in_val(arr_val), .in_ref(arr_ref),
    .out_valid(out_valid), .out_last(out_last), .out_row(out_row), .out_code(out_code),
    .out_beta(out_beta), .out_mask(out_mask));
endmodule
