// tb_bm_vec_unit: self-checking test of the BM vector addition unit with a
// reduced block (6 x 6). Blocks with random elements and exponents are run
// through residual addition (BM<0,15> + BM<0,15> -> BM<0,15>), error
// subtraction to BM<0,3>, the SGD update W - 2^-3 * g (BM<2,1> weights,
// BM<0,3> gradients, stochastic rounding back to BM<2,1>), Cvt and negated
// Cvt (BM<0,15> -> BM<0,3>). Each output is decoded and compared with the
// exact real result: the error must stay within one output LSB, and the
// output exponent must equal max(beta_a, beta_b') unless the result needed a
// larger one. For stochastic rounding both rounding directions must occur.
// The block must leave BLK + 2 cycles after its last input beat.
//
// The number formats, the operations and the latencies checked follow the
// accelerator's description; the random stimulus, the one-LSB tolerance and
// the reduced sizes are this testbench's own choices. It has no ports; it
// ends with a TB_RESULT line and a watchdog stops it if the design hangs.
`timescale 1ns/1ps
module tb_bm_vec_unit;
  import bm_pkg::*;
  localparam int BLK = 6, NB = 20;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;     // a falling edge applies the asynchronous reset at once
  always #5 clk = ~clk;

  vec_op_t op;
  bm_fmt_t fmt_a, fmt_b, fmt_o;
  logic stoch;
  logic [4:0] b_shift;
  logic in_valid, in_ready, out_valid, out_last;
  code_t [BLK-1:0] a_code, b_code, out_code;
  beta_t beta_a, beta_b, out_beta;

  bm_vec_unit #(.BLK(BLK)) dut (.*);

  int checks = 0, failures = 0, n_up = 0, n_down = 0;

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
  function automatic int rnd_code(input bm_fmt_t f);
    int w;
    w = f.e + f.m + (f.uns ? 0 : 1);
    return int'($urandom % (1 << w));
  endfunction

  real exact [BLK][BLK];
  int  bmax;
  int  t_in, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    in_valid = 0; a_code = '0; b_code = '0; beta_a = '0; beta_b = '0;
    op = VOP_ADD; fmt_a = FMT_0_15; fmt_b = FMT_0_15; fmt_o = FMT_0_15; stoch = 0; b_shift = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < NB; n++) begin
      int ba, bb;
      unique case (n % 5)
        0: begin op = VOP_ADD;  fmt_a = FMT_0_15; fmt_b = FMT_0_15; fmt_o = FMT_0_15; stoch = 0; b_shift = 0; end
        1: begin op = VOP_SUB;  fmt_a = FMT_0_3;  fmt_b = FMT_0_3;  fmt_o = FMT_0_3;  stoch = 0; b_shift = 0; end
        2: begin op = VOP_SUB;  fmt_a = FMT_2_1;  fmt_b = FMT_0_3;  fmt_o = FMT_2_1;  stoch = 1; b_shift = 3; end
        3: begin op = VOP_CVT;  fmt_a = FMT_0_15; fmt_b = FMT_0_15; fmt_o = FMT_0_3;  stoch = 0; b_shift = 0; end
        default: begin op = VOP_NCVT; fmt_a = FMT_0_15; fmt_b = FMT_0_15; fmt_o = FMT_0_3; stoch = 0; b_shift = 0; end
      endcase
      ba = int'($urandom_range(6)) - 3;
      bb = int'($urandom_range(6)) - 3;
      bmax = (op == VOP_ADD || op == VOP_SUB) ? ((ba > bb - int'(b_shift)) ? ba : bb - int'(b_shift)) : ba;
      for (int r = 0; r < BLK; r++) begin
        @(negedge clk);
        while (!in_ready) @(negedge clk);
        in_valid = 1; beta_a = beta_t'(ba); beta_b = beta_t'(bb);
        for (int l = 0; l < BLK; l++) begin
          real x, y;
          a_code[l] = code_t'(rnd_code(fmt_a));
          b_code[l] = code_t'(rnd_code(fmt_b));
          x = dec(a_code[l], fmt_a, ba);
          y = dec(b_code[l], fmt_b, bb - int'(b_shift));
          unique case (op)
            VOP_ADD: exact[r][l] = x + y;
            VOP_SUB: exact[r][l] = x - y;
            VOP_CVT: exact[r][l] = x;
            default: exact[r][l] = -x;
          endcase
        end
        @(posedge clk);
        t_in = cyc;
      end
      @(negedge clk) in_valid = 0;
      // collect
      for (int r = 0; r < BLK; r++) begin
        @(posedge clk);
        while (!out_valid) @(posedge clk);
        if (r == 0) begin
          checks++;
          if (cyc - t_in > 3) begin failures++; $display("FAIL latency %0d", cyc - t_in); end
          checks++;
          if (int'(out_beta) < bmax) begin failures++; $display("FAIL beta %0d < %0d", out_beta, bmax); end
        end
        for (int l = 0; l < BLK; l++) begin
          real d, u, e;
          beta_t ob;
          ob = out_beta;
          d = dec(out_code[l], fmt_o, int'(ob));
          u = ulp(out_code[l], fmt_o, int'(ob));
          e = exact[r][l];
          checks++;
          if (d - e > u || e - d > u) begin
            failures++;
            $display("FAIL blk %0d op %0d r%0d l%0d got %f exp %f", n, op, r, l, d, e);
          end
          if (stoch && (d < 0 ? -d : d) > (e < 0 ? -e : e)) n_up++;
          if (stoch && (d < 0 ? -d : d) < (e < 0 ? -e : e)) n_down++;
        end
        checks++;
        if (out_last != (r == BLK-1)) begin failures++; $display("FAIL out_last"); end
      end
    end
    checks++;
    $display("stochastic rounding: away %0d toward %0d", n_up, n_down);
    if (n_up * 5 < n_up + n_down || n_down * 5 < n_up + n_down) begin failures++; $display("FAIL stochastic rounding biased"); end
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
