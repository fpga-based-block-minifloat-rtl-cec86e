// tb_bm_gemm: self-checking test of the BM GEMM kernel on a reduced tile
// (12 x 12 outputs, 6 x 6 blocks). Three tiles are streamed back to back,
// one per training phase (forward with ReLU to unsigned BM<0,4>, error
// propagation to high-precision BM<0,15>, gradient to BM<0,3>). Every output
// element is decoded and compared with the exact product computed here in
// real arithmetic; the block exponents are chosen so that the aligned
// accumulation is exact, so the raw sums leaving the PE array must equal the
// exact products and the converted outputs may differ by the output
// rounding only (at most one output LSB). The latency from the last step of a tile to its first output
// row is checked against PE_ROWS + PE_COLS + TL_R + 4 cycles.
//
// The number formats, the operations and the latencies checked follow the
// accelerator's description; the random stimulus, the one-LSB tolerance and
// the reduced sizes are this testbench's own choices. It has no ports; it
// ends with a TB_RESULT line and a watchdog stops it if the design hangs.
`timescale 1ns/1ps
module tb_bm_gemm;
  import bm_pkg::*;
  localparam int PR = 6, PC = 4, BLK = 6, K = 24;
  localparam int TR = 2*PR, TC = 3*PC, NBR = TR/BLK, NBC = TC/BLK, NKB = K/BLK;
  localparam int NT = 3;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;     // a falling edge applies the asynchronous reset at once
  always #5 clk = ~clk;

  bm_fmt_t fmt_a, fmt_b, out_fmt;
  logic relu;
  logic in_valid, in_ready, in_first, in_last;
  lp_code_t [TR-1:0] a_col;
  beta_t [NBR-1:0] beta_a;
  lp_code_t [TC-1:0] b_row;
  beta_t [NBC-1:0] beta_b;
  logic out_valid, out_last;
  logic [$clog2(TR)-1:0] out_row;
  code_t [TC-1:0] out_code;
  beta_t [NBC-1:0] out_beta;
  logic [TC-1:0] out_mask;

  bm_gemm #(.PE_ROWS(PR), .PE_COLS(PC), .BLK(BLK)) dut (.*);

  int checks = 0, failures = 0;

  // stimulus per tile
  logic [3:0] A [NT][TR][K];
  logic [3:0] B [NT][K][TC];
  int         BA [NT][NBR][NKB];
  int         BB [NT][NKB][NBC];
  bm_fmt_t    FA [NT], FB [NT], FO [NT];
  logic       RL [NT];

  // independent decode of an element to a real number
  function automatic real dec(input int code, input bm_fmt_t f, input int beta);
    int s, ex, mt, ival;
    mt = code % (1 << f.m);
    ex = (code >> f.m) % (1 << f.e);
    s  = f.uns ? 0 : ((code >> (f.e + f.m)) & 1);
    ival = (ex == 0) ? mt : ((1 << f.m) + mt) * (1 << (ex - 1));
    return (s ? -1.0 : 1.0) * ival * (2.0 ** beta);
  endfunction

  function automatic real ulp(input int code, input bm_fmt_t f, input int beta);
    int ex;
    ex = (code >> f.m) % (1 << f.e);
    return 2.0 ** (beta + ((ex > 1) ? ex - 1 : 0));
  endfunction

  real exact [TR][TC];
  int  t_last [NT], t_out [NT];
  int  cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic build(input int t);
    for (int r = 0; r < TR; r++) for (int k = 0; k < K; k++) begin
      A[t][r][k] = 4'($urandom);
      if (!FA[t].uns && A[t][r][k] == 4'h8) A[t][r][k] = 4'h0;
    end
    for (int k = 0; k < K; k++) for (int c = 0; c < TC; c++) begin
      B[t][k][c] = 4'($urandom);
      if (!FB[t].uns && B[t][k][c] == 4'h8) B[t][k][c] = 4'h0;
    end
    for (int i = 0; i < NBR; i++) for (int w = 0; w < NKB; w++) BA[t][i][w] = -int'($urandom_range(2));
    for (int w = 0; w < NKB; w++) for (int j = 0; j < NBC; j++) BB[t][w][j] = int'($urandom_range(2));
  endtask

  // driver
  initial begin
    FA[0] = FMT_U0_4; FB[0] = FMT_2_1; FO[0] = FMT_U0_4; RL[0] = 1;
    FA[1] = FMT_0_3;  FB[1] = FMT_2_1; FO[1] = FMT_0_15; RL[1] = 0;
    FA[2] = FMT_0_3;  FB[2] = FMT_U0_4; FO[2] = FMT_0_3; RL[2] = 0;
    for (int t = 0; t < NT; t++) build(t);
    in_valid = 0; in_first = 0; in_last = 0; a_col = '0; b_row = '0; beta_a = '0; beta_b = '0;
    fmt_a = FA[0]; fmt_b = FB[0]; out_fmt = FO[0]; relu = RL[0];
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int t = 0; t < NT; t++) begin
      for (int k = 0; k < K; k++) begin
        @(negedge clk);
        in_valid = 1; in_first = (k == 0); in_last = (k == K-1);
        fmt_a = FA[t]; fmt_b = FB[t]; out_fmt = FO[t]; relu = RL[t];
        for (int r = 0; r < TR; r++) a_col[r] = A[t][r][k];
        for (int c = 0; c < TC; c++) b_row[c] = B[t][k][c];
        for (int i = 0; i < NBR; i++) beta_a[i] = beta_t'(BA[t][i][k/BLK]);
        for (int j = 0; j < NBC; j++) beta_b[j] = beta_t'(BB[t][k/BLK][j]);
        while (!in_ready) @(negedge clk);
        @(posedge clk);
        if (k == K-1) t_last[t] = cyc;
      end
    end
    @(negedge clk) in_valid = 0; in_first = 0; in_last = 0;
  end

  int tout = 0;
  // raw array sums: exact in this test, checked before normalisation
  int tdr = 0;
  always @(posedge clk) if (rst_n && dut.arr_valid) begin
    for (int c = 0; c < TC; c++) begin
      real s; int vi, sc; beta_t rf; logic [dut.ACC_W-1:0] v;
      s = 0.0;
      for (int k = 0; k < K; k++)
        s += dec(A[tdr][dut.arr_row][k], FA[tdr], BA[tdr][dut.arr_row/BLK][k/BLK]) *
             dec(B[tdr][k][c], FB[tdr], BB[tdr][k/BLK][c/BLK]);
      v = dut.arr_val[c]; vi = int'($signed(v)); rf = dut.arr_ref[c/3];
      sc = int'(rf) - 4;
      checks++;
      if (vi * (2.0 ** sc) != s) begin
        failures++;
        $display("FAIL sum tile %0d r%0d c%0d got %0d ref %0d exp %f", tdr, dut.arr_row, c, vi, rf, s);
      end
    end
    if (dut.arr_row == 0) tdr++;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    int t;
    t = tout;
    if (out_row == 0) begin
      t_out[t] = cyc;
      // exact reference of this tile
      for (int r = 0; r < TR; r++) for (int c = 0; c < TC; c++) begin
        real s;
        s = 0.0;
        for (int k = 0; k < K; k++)
          s += dec(A[t][r][k], FA[t], BA[t][r/BLK][k/BLK]) * dec(B[t][k][c], FB[t], BB[t][k/BLK][c/BLK]);
        if (RL[t] && s < 0.0) s = 0.0;
        exact[r][c] = s;
      end
      checks++;
      if (t_out[t] - t_last[t] > PR + PC + TR + 4) begin
        failures++; $display("FAIL latency tile %0d: %0d cycles", t, t_out[t] - t_last[t]);
      end
    end
    for (int c = 0; c < TC; c++) begin
      real d, e, u;
      beta_t ob;
      ob = out_beta[c/BLK];
      d = dec(int'(out_code[c]), FO[t], int'(ob));
      u = ulp(int'(out_code[c]), FO[t], int'(ob));
      e = exact[out_row][c];
      checks++;
      if ((d - e > u) || (e - d > u)) begin
        failures++;
        if (failures < 10) $display("FAIL tile %0d r%0d c%0d: got %f (code %h beta %0d) exp %f",
                                    t, out_row, c, d, out_code[c], ob, e);
      end
      if (RL[t]) begin
        checks++;
        if (out_mask[c] != (e > 0.0)) begin failures++; $display("FAIL mask r%0d c%0d", out_row, c); end
      end
    end
    if (out_last) begin
      tout++;
      if (tout == NT) begin
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
