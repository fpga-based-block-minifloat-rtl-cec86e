// bm_pe_array: output-stationary systolic PE array of the BM GEMM kernel.
//
// PE_ROWS x PE_COLS DSP-packed PEs compute one output tile of
// TL_R = 2*PE_ROWS rows by TL_C = 3*PE_COLS columns. Each accepted step k
// supplies column k of the A tile (TL_R codes, one shared exponent per PE
// row) and row k of the B tile (TL_C codes, one exponent per PE column).
// A operands and the step control (first / last) flow to the right, B
// operands flow down; input skew registers delay row i and column j by i and
// j cycles so that the caller presents each step unskewed. The operand
// formats are given per step and travel with the operands.
//
// A tile is one run of steps from `first` to `last`. When the bottom-right
// PE has captured its sums, the per-column shadow chains drain for TL_R
// cycles, one output row per cycle, bottom row first (out_row = TL_R-1 down
// to 0), each row with one block exponent per PE column.
//
// Handshake: in_valid/in_ready. in_ready is low only for a `last` step while
// the previous tile is still waiting to drain or draining, so a tile of
// K >= PE_ROWS + PE_COLS + TL_R steps accumulates fully in parallel with the
// drain of the one before (the overlap of inner product and normalisation).
// The block size must be a multiple of 2 rows and 3 columns so that a PE
// never spans two blocks.
module bm_pe_array
  import bm_pkg::*;
#(
  parameter int unsigned PE_ROWS = 36,
  parameter int unsigned PE_COLS = 24,
  parameter int unsigned ACC_W   = 23,
  parameter int unsigned W_TAIL  = 4,
  localparam int unsigned TL_R   = 2 * PE_ROWS,
  localparam int unsigned TL_C   = 3 * PE_COLS
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  bm_fmt_t                       fmt_a,
  input  bm_fmt_t                       fmt_b,
  input  logic                          in_valid,
  output logic                          in_ready,
  input  logic                          in_first,
  input  logic                          in_last,
  input  lp_code_t [TL_R-1:0]           a_col,
  input  beta_t    [PE_ROWS-1:0]        beta_a,
  input  lp_code_t [TL_C-1:0]           b_row,
  input  beta_t    [PE_COLS-1:0]        beta_b,
  output logic                          out_valid,
  output logic [$clog2(TL_R)-1:0]       out_row,
  output logic signed [TL_C-1:0][ACC_W-1:0] out_val,
  output beta_t    [PE_COLS-1:0]        out_ref
);
  localparam int unsigned CNT_W = $clog2(TL_R + 1);

  logic go;
  assign go = in_valid & in_ready;

  // ---------------- input skew ------------------------------------------
  // row i: control and A operands delayed by i cycles
  logic            sk_v     [PE_ROWS];
  logic            sk_first [PE_ROWS];
  logic            sk_last  [PE_ROWS];
  lp_code_t [1:0]  sk_a     [PE_ROWS];
  beta_t           sk_ba    [PE_ROWS];
  bm_fmt_t         sk_fa    [PE_ROWS];
  bm_fmt_t         sk_fb    [PE_COLS];
  lp_code_t [2:0]  sk_b     [PE_COLS];
  beta_t           sk_bb    [PE_COLS];

  for (genvar i = 0; i < PE_ROWS; i++) begin : g_skr
    if (i == 0) begin : g0
      always_comb begin
        sk_v[0] = go; sk_first[0] = in_first; sk_last[0] = in_last;
        sk_a[0] = a_col[1:0]; sk_ba[0] = beta_a[0]; sk_fa[0] = fmt_a;
      end
    end else begin : gn
      logic           dv [i], df [i], dl [i];
      lp_code_t [1:0] da [i];
      beta_t          db [i];
      bm_fmt_t        dfa [i];
      always_ff @(posedge clk or negedge rst_n)
        if (!rst_n) for (int s = 0; s < i; s++) begin dv[s] <= 1'b0; df[s] <= 1'b0; dl[s] <= 1'b0; end
        else begin
          dv[0] <= go; df[0] <= in_first; dl[0] <= in_last;
          for (int s = 1; s < i; s++) begin dv[s] <= dv[s-1]; df[s] <= df[s-1]; dl[s] <= dl[s-1]; end
        end
      always_ff @(posedge clk) begin
        da[0] <= a_col[2*i +: 2]; db[0] <= beta_a[i]; dfa[0] <= fmt_a;
        for (int s = 1; s < i; s++) begin da[s] <= da[s-1]; db[s] <= db[s-1]; dfa[s] <= dfa[s-1]; end
      end
      always_comb begin
        sk_v[i] = dv[i-1]; sk_first[i] = df[i-1]; sk_last[i] = dl[i-1];
        sk_a[i] = da[i-1]; sk_ba[i] = db[i-1]; sk_fa[i] = dfa[i-1];
      end
    end
  end

  for (genvar j = 0; j < PE_COLS; j++) begin : g_skc
    if (j == 0) begin : g0
      always_comb begin sk_b[0] = b_row[2:0]; sk_bb[0] = beta_b[0]; sk_fb[0] = fmt_b; end
    end else begin : gn
      lp_code_t [2:0] dbv [j];
      beta_t          dbb [j];
      bm_fmt_t        dfb [j];
      always_ff @(posedge clk) begin
        dbv[0] <= b_row[3*j +: 3]; dbb[0] <= beta_b[j]; dfb[0] <= fmt_b;
        for (int s = 1; s < j; s++) begin dbv[s] <= dbv[s-1]; dbb[s] <= dbb[s-1]; dfb[s] <= dfb[s-1]; end
      end
      always_comb begin sk_b[j] = dbv[j-1]; sk_bb[j] = dbb[j-1]; sk_fb[j] = dfb[j-1]; end
    end
  end

  // ---------------- PE grid ---------------------------------------------
  // horizontal nets: index [i][j] enters PE(i,j) from the west
  logic            h_v [PE_ROWS][PE_COLS+1];
  logic            h_f [PE_ROWS][PE_COLS+1];
  logic            h_l [PE_ROWS][PE_COLS+1];
  lp_code_t [1:0]  h_a [PE_ROWS][PE_COLS+1];
  beta_t           h_b [PE_ROWS][PE_COLS+1];
  bm_fmt_t         h_fa [PE_ROWS][PE_COLS+1];
  bm_fmt_t         v_fb [PE_ROWS+1][PE_COLS];
  // vertical nets: index [i][j] enters PE(i,j) from the north
  lp_code_t [2:0]  v_b  [PE_ROWS+1][PE_COLS];
  beta_t           v_bb [PE_ROWS+1][PE_COLS];
  logic signed [2:0][ACC_W-1:0] d_val [PE_ROWS+1][PE_COLS];
  beta_t                        d_ref [PE_ROWS+1][PE_COLS];
  logic            cap [PE_ROWS][PE_COLS];
  logic            drain_shift;

  for (genvar i = 0; i < PE_ROWS; i++) begin : g_row
    always_comb begin
      h_v[i][0] = sk_v[i]; h_f[i][0] = sk_first[i]; h_l[i][0] = sk_last[i];
      h_a[i][0] = sk_a[i]; h_b[i][0] = sk_ba[i]; h_fa[i][0] = sk_fa[i];
    end
    for (genvar j = 0; j < PE_COLS; j++) begin : g_col
      if (i == 0) begin : g_top
        always_comb begin
          v_b[0][j] = sk_b[j]; v_bb[0][j] = sk_bb[j]; v_fb[0][j] = sk_fb[j];
          d_val[0][j] = '0; d_ref[0][j] = '0;
        end
      end
      bm_pe #(.ACC_W(ACC_W), .W_TAIL(W_TAIL)) u_pe (
        .clk(clk), .rst_n(rst_n), .fmt_a(h_fa[i][j]), .fmt_b(v_fb[i][j]),
        .fmt_a_out(h_fa[i][j+1]), .fmt_b_out(v_fb[i+1][j]),
        .v_in(h_v[i][j]), .first_in(h_f[i][j]), .last_in(h_l[i][j]),
        .a_in(h_a[i][j]), .beta_a_in(h_b[i][j]),
        .v_out(h_v[i][j+1]), .first_out(h_f[i][j+1]), .last_out(h_l[i][j+1]),
        .a_out(h_a[i][j+1]), .beta_a_out(h_b[i][j+1]),
        .b_in(v_b[i][j]), .beta_b_in(v_bb[i][j]),
        .b_out(v_b[i+1][j]), .beta_b_out(v_bb[i+1][j]),
        .drain_shift(drain_shift),
        .dr_val_in(d_val[i][j]), .dr_ref_in(d_ref[i][j]),
        .dr_val_out(d_val[i+1][j]), .dr_ref_out(d_ref[i+1][j]),
        .captured(cap[i][j]));
    end
  end

  // ---------------- drain control ---------------------------------------
  logic             pending;      // a last step was accepted, not yet drained
  logic             draining;
  logic [CNT_W-1:0] dcnt;
  logic             cap_done;

  assign cap_done    = cap[PE_ROWS-1][PE_COLS-1];
  assign drain_shift = draining;
  assign in_ready    = !(in_last && (pending || draining));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending  <= 1'b0;
      draining <= 1'b0;
      dcnt     <= '0;
    end else begin
      if (go && in_last) pending <= 1'b1;
      if (cap_done) begin
        pending  <= 1'b0;
        draining <= 1'b1;
        dcnt     <= '0;
      end else if (draining) begin
        if (dcnt == CNT_W'(TL_R - 1)) draining <= 1'b0;
        dcnt <= dcnt + 1'b1;
      end
    end
  end

  assign out_valid = draining;
  assign out_row   = $bits(out_row)'(TL_R - 1 - int'(dcnt));
  always_comb
    for (int j = 0; j < PE_COLS; j++) begin
      for (int c = 0; c < 3; c++) out_val[3*j+c] = d_val[PE_ROWS][j][c];
      out_ref[j] = d_ref[PE_ROWS][j];
    end
endmodule
