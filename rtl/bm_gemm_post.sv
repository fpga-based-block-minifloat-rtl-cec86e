// bm_gemm_post: normalisation pipeline of the BM GEMM kernel
// (P buffer, FindMax, Calibr and ReLU&Norm).
//
// The PE array drains one tile of wide integer sums per TL_R cycles, one row
// per cycle, bottom row first. This block
//   1. writes each row into one bank of a ping-pong P buffer,
//   2. keeps a per-column running maximum of |P| over the BLK rows of the
//      current block row (columnar FindMax) and, on the last row of the
//      group, reduces it over the BLK columns of each block to P_max,
//   3. Calibr: derives for every BLK x BLK block the right shift
//      Z_shift = max(0, bits(P_max) - bits(largest value of the output
//      format)) and the output exponent beta' = ref - W_TAIL + Z_shift,
//   4. once the tile is complete, reads the bank back row by row (row 0
//      first) while the next tile fills the other bank, and converts every
//      element to the output format with round-to-nearest and saturation
//      (Algorithm 1), optionally applying ReLU. It also emits the ReLU
//      derivative mask (P > 0) used by the backward pass.
// The output format is chosen at run time (out_fmt and relu must be stable
// while a tile drains in; they are kept per bank for the conversion): a low-precision 4-bit format or
// the high-precision BM<0,15>.
//
// Timing: a row is written the cycle it arrives; the first output row of a
// tile appears two cycles after its last input row, and a tile takes TL_R
// cycles to leave. The block maximum is reduced with a comparator tree
// instead of the document's shift-left reduction (same result, one cycle).
// out_* have no back-pressure: the receiving buffer always accepts.
module bm_gemm_post
  import bm_pkg::*;
#(
  parameter int unsigned TL_R   = 72,
  parameter int unsigned TL_C   = 72,
  parameter int unsigned BLK    = 12,
  parameter int unsigned ACC_W  = 23,
  parameter int unsigned W_TAIL = 4,
  localparam int unsigned NBR   = TL_R / BLK,
  localparam int unsigned NBC   = TL_C / BLK,
  localparam int unsigned NPC   = TL_C / 3,
  localparam int unsigned RW    = $clog2(TL_R)
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  bm_fmt_t                           out_fmt,
  input  logic                              relu,
  input  logic                              in_valid,
  input  logic [RW-1:0]                     in_row,
  input  logic signed [TL_C-1:0][ACC_W-1:0] in_val,
  input  beta_t    [NPC-1:0]                in_ref,
  output logic                              out_valid,
  output logic                              out_last,     // last row of a tile
  output logic [RW-1:0]                     out_row,
  output code_t    [TL_C-1:0]               out_code,
  output beta_t    [NBC-1:0]                out_beta,
  output logic     [TL_C-1:0]               out_mask
);
  // ---------------- P buffer (ping-pong) --------------------------------
  logic [TL_C*ACC_W-1:0] pbuf [2][TL_R];
  logic [5:0]            zs   [2][NBR][NBC];
  beta_t                 bo   [2][NBR][NBC];
  logic                  wb;            // bank being filled
  logic                  rb;            // bank being normalised
  logic                  norm_busy;
  logic [RW-1:0]         nrow;
  bm_fmt_t               bfmt  [2];     // format of the tile in each bank
  logic                  brelu [2];

  // ---------------- FindMax / Calibr ------------------------------------
  logic [ACC_W-1:0] colmax   [TL_C];
  logic [ACC_W-1:0] colmax_d [TL_C];
  logic [ACC_W-1:0] absv     [TL_C];
  logic             grp_start, grp_end;

  assign grp_start = (in_row % BLK) == (BLK - 1);
  assign grp_end   = (in_row % BLK) == 0;

  always_comb
    for (int c = 0; c < TL_C; c++) begin
      absv[c] = in_val[c][ACC_W-1] ? ACC_W'(-in_val[c]) : ACC_W'(in_val[c]);
      if (grp_start || absv[c] > colmax[c]) colmax_d[c] = absv[c];
      else                                  colmax_d[c] = colmax[c];
    end

  always_ff @(posedge clk)
    if (in_valid) begin
      pbuf[wb][in_row] <= in_val;
      if (in_row == RW'(TL_R - 1)) begin
        bfmt[wb]  <= out_fmt;
        brelu[wb] <= relu;
      end
      for (int c = 0; c < TL_C; c++) colmax[c] <= colmax_d[c];
    end

  // Calibr: per block of the finished block row
  always_ff @(posedge clk) begin
    if (in_valid && grp_end) begin
      for (int bc = 0; bc < NBC; bc++) begin
        logic [ACC_W-1:0] pm;
        int unsigned      z;
        pm = '0;
        for (int c = 0; c < BLK; c++)
          if (colmax_d[bc*BLK + c] > pm) pm = colmax_d[bc*BLK + c];
        z = bm_zshift(NMAG_W'(pm), out_fmt, 0);
        zs[wb][in_row / BLK][bc] <= 6'(z);
        bo[wb][in_row / BLK][bc] <= in_ref[(bc*BLK)/3] - beta_t'(W_TAIL) + beta_t'(z);
      end
    end
  end

  // bank hand-over and norm sequencing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wb <= 1'b0; rb <= 1'b0; norm_busy <= 1'b0; nrow <= '0;
    end else begin
      if (norm_busy) begin
        if (nrow == RW'(TL_R - 1)) norm_busy <= 1'b0;
        nrow <= nrow + 1'b1;
      end
      if (in_valid && in_row == '0) begin
        rb        <= wb;
        wb        <= ~wb;
        norm_busy <= 1'b1;
        nrow      <= '0;
      end
    end
  end

  // ---------------- ReLU & Norm -----------------------------------------
  logic [TL_C*ACC_W-1:0] rd_row;
  assign rd_row = pbuf[rb][nrow];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
    end else begin
      out_valid <= norm_busy;
      out_last  <= norm_busy && (nrow == RW'(TL_R - 1));
    end
  end

  always_ff @(posedge clk) begin
    if (norm_busy) begin
      out_row <= nrow;
      for (int bc = 0; bc < NBC; bc++) out_beta[bc] <= bo[rb][nrow / BLK][bc];
      for (int c = 0; c < TL_C; c++) begin
        logic signed [ACC_W-1:0] v;
        logic [ACC_W-1:0]        mag;
        logic                    neg;
        v   = rd_row[c*ACC_W +: ACC_W];
        neg = v[ACC_W-1];
        mag = neg ? ACC_W'(-v) : ACC_W'(v);
        if (brelu[rb] && neg) mag = '0;
        out_mask[c] <= !neg && (v != '0);
        out_code[c] <= bm_encode(neg, NMAG_W'(mag), int'(zs[rb][nrow / BLK][c / BLK]),
                                 bfmt[rb], 1'b0, 16'h0);
      end
    end
  end

  initial assert (TL_R % BLK == 0 && TL_C % BLK == 0 && BLK % 6 == 0)
    else $fatal(1, "bm_gemm_post: block size must divide the tile and be a multiple of 6");
endmodule
