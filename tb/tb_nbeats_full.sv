// tb_nbeats_full: end-to-end test of the accelerator top at its default size
// (36 x 24 PEs, a 72 x 72 tile, 12 x 12 blocks, a 1024-row residual buffer),
// with no parameter overrides. It runs the same sequence as tb_nbeats_accel
// with one K tile per output tile.
//
// FC block: three GEMMs are run, one per training path, each with two output
// tiles of two K tiles: path 1 (forward, B transposed, BM<0,3> x BM<2,1>,
// ReLU, unsigned BM<0,4> out), path 2 (error propagation, no transpose,
// high-precision BM<0,15> out) and path 3 (gradient, A transposed, BM<0,3>
// out). The operand tiles are random; the testbench applies the transposes
// itself, sums exact real products and checks every result element to one
// output LSB, plus the ReLU mask.
// Vector path: a RES block is loaded, then (1) residual subtraction
// RES <- RES - HP in BM<0,15>, (2) the MAPE error against a label block,
// (3) an SGD update W <- W - 2^-3 g with BM<2,1> weights and stochastic
// rounding. Each result is read back from RES and checked against the exact
// value to one output LSB.
// Mechanisms counted (each must occur): kernel stall, tile overlap (new
// steps entering while the previous tile drains), transposed feeds of A and
// of B, ReLU zeroing, high-precision output, residual write-back, MAPE, and
// stochastic rounding in both directions.
//
// The number formats, the operations and the latencies checked follow the
// accelerator's description; the random stimulus, the one-LSB tolerance and
// the reduced sizes are this testbench's own choices. It has no ports; it
// ends with a TB_RESULT line and a watchdog stops it if the design hangs.
`timescale 1ns/1ps
module tb_nbeats_full;
  import bm_pkg::*;
  localparam int PR = 36, PC = 24, BLK = 12, KT = 1, NT = 2, DEPTH = 1024;
  localparam int TL = 2 * PR, NB = TL / BLK, H = 6, AW = $clog2(DEPTH), RWW = $clog2(TL);

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;     // a falling edge applies the asynchronous reset at once
  always #5 clk = ~clk;

  fc_path_t fc_path; logic [7:0] fc_k_tiles;
  bm_fmt_t fc_fmt_a, fc_fmt_b, fc_out_fmt; logic fc_relu;
  logic fc_a_valid, fc_a_ready, fc_b_valid, fc_b_ready;
  lp_code_t [TL-1:0] fc_a_vec, fc_b_vec;
  beta_t [NB-1:0] fc_a_beta, fc_b_beta, fc_out_beta;
  logic fc_out_valid, fc_out_last; logic [RWW-1:0] fc_out_row;
  code_t [TL-1:0] fc_out_code; logic [TL-1:0] fc_out_mask;
  logic cmd_valid, cmd_ready, cmd_mape, cmd_stoch, cmd_wb, cmd_done;
  vec_op_t cmd_op; bm_fmt_t cmd_fmt_a, cmd_fmt_b, cmd_fmt_o;
  logic [4:0] cmd_b_shift; logic [AW-1:0] cmd_addr; logic [7:0] horizon;
  logic hp_valid, hp_ready; code_t [BLK-1:0] hp_code; beta_t hp_beta;
  logic vec_out_valid; code_t [BLK-1:0] vec_out_code; beta_t vec_out_beta;
  logic res_ld_en; logic [AW-1:0] res_ld_addr, res_rd_addr;
  code_t [BLK-1:0] res_ld_code, res_rd_code; beta_t res_ld_beta, res_rd_beta;

  nbeats_accel dut (.*);

  int checks = 0, failures = 0;
  int n_stall = 0, n_overlap = 0, n_tr_a = 0, n_tr_b = 0, n_relu = 0, n_hp = 0;
  int n_wb = 0, n_mape = 0, n_up = 0, n_down = 0;

  function automatic real dec(input int code, input bm_fmt_t f, input int beta);
    int s, ex, mt, ival;
    mt = code % (1 << f.m);
    ex = (code >> f.m) % (1 << f.e);
    s  = f.uns ? 0 : ((code >> (f.e + f.m)) & 1);
    ival = (ex == 0) ? mt : ((1 << f.m) + mt) * (1 << (ex - 1));
    return (s ? -1.0 : 1.0) * ival * (2.0 ** beta);
  endfunction
  function automatic real ulp(input int code, input bm_fmt_t f, input int beta);
    int ex, p;
    ex = (code >> f.m) % (1 << f.e);
    p = beta + ((ex > 1) ? ex - 1 : 0);
    return 2.0 ** p;
  endfunction
  function automatic int rcode(input bm_fmt_t f);
    return int'($urandom % (1 << (f.e + f.m + (f.uns ? 0 : 1))));
  endfunction
  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endfunction

  // ------------------------------------------------------------ FC block
  real     exp_c [$][TL][TL];
  bm_fmt_t exp_f [$];
  logic    exp_r [$];

  task automatic run_gemm(input fc_path_t p, input bm_fmt_t fa, input bm_fmt_t fb,
                          input bm_fmt_t fo, input logic rl, input int kt = KT);
    int sa [NT][KT][TL][TL], sb [NT][KT][TL][TL];
    int ba [NT][KT], bb [NT][KT];
    fc_path = p; fc_fmt_a = fa; fc_fmt_b = fb; fc_out_fmt = fo; fc_relu = rl;
    fc_k_tiles = 8'(kt);
    for (int t = 0; t < NT; t++) begin
      real c [TL][TL];
      for (int i = 0; i < TL; i++) for (int j = 0; j < TL; j++) c[i][j] = 0.0;
      for (int k = 0; k < kt; k++) begin
        ba[t][k] = int'($urandom_range(4)) - 2;
        bb[t][k] = int'($urandom_range(4)) - 2;
        for (int r = 0; r < TL; r++) for (int x = 0; x < TL; x++) begin
          sa[t][k][r][x] = rcode(fa);
          sb[t][k][r][x] = rcode(fb);
        end
        // step s of this K tile: a_col[i] and b_row[j]
        for (int s = 0; s < TL; s++) for (int i = 0; i < TL; i++) for (int j = 0; j < TL; j++) begin
          int ac, bc;
          ac = (p == PATH_GRAD) ? sa[t][k][i][s] : sa[t][k][s][i];
          bc = (p == PATH_FWD)  ? sb[t][k][j][s] : sb[t][k][s][j];
          c[i][j] += dec(ac, fa, ba[t][k]) * dec(bc, fb, bb[t][k]);
        end
      end
      exp_c.push_back(c); exp_f.push_back(fo); exp_r.push_back(rl);
    end
    fork
      for (int t = 0; t < NT; t++) for (int k = 0; k < kt; k++) for (int r = 0; r < TL; r++) begin
        @(negedge clk);
        fc_a_valid = 1; fc_a_beta = {NB{beta_t'(ba[t][k])}};
        for (int x = 0; x < TL; x++) fc_a_vec[x] = lp_code_t'(sa[t][k][r][x]);
        @(posedge clk); while (!fc_a_ready) @(posedge clk);
        #1 fc_a_valid = 0;
      end
      for (int t = 0; t < NT; t++) for (int k = 0; k < kt; k++) for (int r = 0; r < TL; r++) begin
        @(negedge clk);
        if ($urandom_range(3) == 0) @(negedge clk);    // irregular B stream
        fc_b_valid = 1; fc_b_beta = {NB{beta_t'(bb[t][k])}};
        for (int x = 0; x < TL; x++) fc_b_vec[x] = lp_code_t'(sb[t][k][r][x]);
        @(posedge clk); while (!fc_b_ready) @(posedge clk);
        #1 fc_b_valid = 0;
      end
    join
    // let the feeders empty before the path or formats change
    while (dut.u_fc.u_feed_a.out_valid || dut.u_fc.u_feed_b.out_valid) @(posedge clk);
    repeat (2) @(posedge clk);
    if (p == PATH_GRAD) n_tr_a++;
    if (p == PATH_FWD)  n_tr_b++;
  endtask

  int out_tiles = 0;
  always @(posedge clk) if (rst_n && fc_out_valid) begin
    if (exp_c.size() == 0) check(0, "unexpected FC output");
    else begin
      bm_fmt_t f; real d, u, e; beta_t ob;
      f = exp_f[0];
      if (f == FMT_0_15) n_hp++;
      for (int j = 0; j < TL; j++) begin
        ob = fc_out_beta[j / BLK];
        e = exp_c[0][fc_out_row][j];
        if (exp_r[0] && e < 0) begin e = 0; n_relu++; end
        d = dec(fc_out_code[j], f, int'(ob));
        u = ulp(fc_out_code[j], f, int'(ob));
        check(d - e <= u && e - d <= u, $sformatf("FC tile %0d row %0d col %0d got %f exp %f",
                                                  out_tiles, fc_out_row, j, d, e));
        if (exp_r[0]) check(fc_out_mask[j] == (exp_c[0][fc_out_row][j] > 0) || d == 0, "relu mask");
      end
      if (fc_out_last) begin
        check(fc_out_row == RWW'(TL - 1), "last row index");
        void'(exp_c.pop_front()); void'(exp_f.pop_front()); void'(exp_r.pop_front());
        out_tiles++;
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (dut.u_fc.fa_valid && dut.u_fc.fb_valid && !dut.u_fc.g_ready) n_stall++;
    if (dut.u_fc.fa_valid && dut.u_fc.fb_valid && dut.u_fc.g_ready &&
        dut.u_fc.u_gemm.u_array.draining) n_overlap++;
  end

  // ------------------------------------------------------------ vector path
  real res_val [BLK][BLK];

  task automatic load_res(input bm_fmt_t f, input int beta);
    for (int r = 0; r < BLK; r++) begin
      @(negedge clk);
      res_ld_en = 1; res_ld_addr = AW'(8 + r); res_ld_beta = beta_t'(beta);
      for (int l = 0; l < BLK; l++) begin
        res_ld_code[l] = code_t'(rcode(f));
        res_val[r][l] = dec(res_ld_code[l], f, beta);
      end
    end
    @(negedge clk) res_ld_en = 0;
  endtask

  task automatic run_cmd(input logic mape, input vec_op_t op, input bm_fmt_t fa, input bm_fmt_t fb,
                         input bm_fmt_t fo, input logic st, input int bsh, input int bbeta,
                         output real expv [BLK][BLK]);
    @(negedge clk);
    cmd_valid = 1; cmd_mape = mape; cmd_op = op; cmd_fmt_a = fa; cmd_fmt_b = fb; cmd_fmt_o = fo;
    cmd_stoch = st; cmd_b_shift = 5'(bsh); cmd_wb = 1; cmd_addr = AW'(8);
    @(negedge clk) cmd_valid = 0;
    for (int r = 0; r < BLK; r++) begin
      @(negedge clk);
      hp_valid = 1; hp_beta = beta_t'(bbeta);
      for (int l = 0; l < BLK; l++) begin
        real y;
        hp_code[l] = code_t'(rcode(fb));
        if (mape) while (hp_code[l] == 0) hp_code[l] = code_t'(rcode(fb));
        y = dec(hp_code[l], fb, bbeta - bsh);
        if (mape) begin
          real a;
          a = (y < 0) ? -y : y;
          expv[r][l] = (res_val[r][l] > y) ? 1.0 / (H * a) : (res_val[r][l] < y) ? -1.0 / (H * a) : 0.0;
        end else expv[r][l] = (op == VOP_SUB) ? res_val[r][l] - y : res_val[r][l] + y;
      end
      @(posedge clk); while (!hp_ready) @(posedge clk);
      #1 hp_valid = 0;
    end
    @(posedge clk); while (!cmd_done) @(posedge clk);
  endtask

  task automatic check_res(input bm_fmt_t fo, input real expv [BLK][BLK], input logic st, input string what);
    for (int r = 0; r < BLK; r++) begin
      @(negedge clk) res_rd_addr = AW'(8 + r);
      #1;
      for (int l = 0; l < BLK; l++) begin
        real d, u; beta_t ob;
        ob = res_rd_beta;
        d = dec(res_rd_code[l], fo, int'(ob));
        u = ulp(res_rd_code[l], fo, int'(ob));
        check(d - expv[r][l] <= u && expv[r][l] - d <= u,
              $sformatf("%s r%0d l%0d got %g exp %g", what, r, l, d, expv[r][l]));
        if (st && (d < 0 ? -d : d) > (expv[r][l] < 0 ? -expv[r][l] : expv[r][l])) n_up++;
        if (st && (d < 0 ? -d : d) < (expv[r][l] < 0 ? -expv[r][l] : expv[r][l])) n_down++;
        res_val[r][l] = d;
      end
    end
    n_wb++;
  endtask

  initial begin
    real ev [BLK][BLK];
    fc_a_valid = 0; fc_b_valid = 0; fc_a_vec = '0; fc_b_vec = '0; fc_a_beta = '0; fc_b_beta = '0;
    fc_path = PATH_FWD; fc_k_tiles = 8'(KT); fc_fmt_a = FMT_0_3; fc_fmt_b = FMT_2_1;
    fc_out_fmt = FMT_U0_4; fc_relu = 0;
    cmd_valid = 0; cmd_mape = 0; cmd_op = VOP_ADD; cmd_fmt_a = FMT_0_15; cmd_fmt_b = FMT_0_15;
    cmd_fmt_o = FMT_0_15; cmd_stoch = 0; cmd_b_shift = 0; cmd_wb = 0; cmd_addr = 0; horizon = 8'(H);
    hp_valid = 0; hp_code = '0; hp_beta = '0; res_ld_en = 0; res_ld_addr = 0; res_ld_code = '0;
    res_ld_beta = 0; res_rd_addr = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      begin
        run_gemm(PATH_FWD,  FMT_0_3, FMT_2_1, FMT_U0_4, 1'b1);
        run_gemm(PATH_ERR,  FMT_0_3, FMT_2_1, FMT_0_15, 1'b0);
        run_gemm(PATH_GRAD, FMT_0_3, FMT_0_3, FMT_0_3,  1'b0);
        run_gemm(PATH_ERR,  FMT_1_2, FMT_2_1, FMT_0_3,  1'b0, 1);
        while (exp_c.size() != 0) @(posedge clk);
      end
      begin
        load_res(FMT_0_15, -4);
        run_cmd(0, VOP_SUB, FMT_0_15, FMT_0_15, FMT_0_15, 0, 0, -3, ev);
        check_res(FMT_0_15, ev, 0, "residual sub");
        run_cmd(1, VOP_ADD, FMT_0_15, FMT_0_15, FMT_0_15, 0, 0, -2, ev);
        check_res(FMT_0_15, ev, 0, "mape");
        n_mape++;
        for (int rep = 0; rep < 3; rep++) begin
          load_res(FMT_2_1, -1);
          run_cmd(0, VOP_SUB, FMT_2_1, FMT_0_3, FMT_2_1, 1, 3, 0, ev);
          check_res(FMT_2_1, ev, 1, "sgd");
        end
      end
    join
    check(out_tiles == 4 * NT, "all FC tiles out");
    check(n_stall   > 0, "stall seen");
    check(n_overlap > 0, "overlap seen");
    check(n_tr_a    > 0, "A transposed");
    check(n_tr_b    > 0, "B transposed");
    check(n_relu    > 0, "ReLU zeroing seen");
    check(n_hp      > 0, "HP output seen");
    check(n_wb      > 0, "write-back seen");
    check(n_mape    > 0, "MAPE seen");
    check(n_up > 0 && n_down > 0, "stochastic rounding both ways");
    $display("mechanisms: stall=%0d overlap=%0d trA=%0d trB=%0d relu=%0d hp=%0d wb=%0d mape=%0d sr_up=%0d sr_down=%0d",
             n_stall, n_overlap, n_tr_a, n_tr_b, n_relu, n_hp, n_wb, n_mape, n_up, n_down);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
