// tb_bm_pe: self-checking test of one DSP-packed PE. Random runs of K steps
// with random 4-bit operands in the forward (unsigned BM<0,4> x BM<2,1>),
// error (BM<0,3> x BM<2,1>) and gradient (BM<0,3> x unsigned BM<0,4>)
// format pairs and random block exponents are applied; the six captured
// sums and the block exponent are drained through the shadow chain and
// compared with a reference worked out here: the exact real-valued inner
// product must equal sum * 2^(ref - W_TAIL) whenever the exponents of a run
// lie within W_TAIL of each other (aligned accumulation is then exact), and
// ref must be the largest exponent sum of the run. The pass-through ports
// must show the inputs one cycle later.
//
// The number formats, the operations and the latencies checked follow the
// accelerator's description; the random stimulus, the one-LSB tolerance and
// the reduced sizes are this testbench's own choices. It has no ports; it
// ends with a TB_RESULT line and a watchdog stops it if the design hangs.
`timescale 1ns/1ps
module tb_bm_pe;
  import bm_pkg::*;
  localparam int ACC_W = 23, W_TAIL = 4, K = 12, RUNS = 30;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;     // a falling edge applies the asynchronous reset at once
  always #5 clk = ~clk;

  bm_fmt_t fmt_a, fmt_b, fmt_a_out, fmt_b_out;
  logic v_in, first_in, last_in, v_out, first_out, last_out;
  lp_code_t [1:0] a_in, a_out;
  lp_code_t [2:0] b_in, b_out;
  beta_t beta_a_in, beta_a_out, beta_b_in, beta_b_out;
  logic drain_shift, captured;
  logic signed [2:0][ACC_W-1:0] dr_val_in, dr_val_out;
  beta_t dr_ref_in, dr_ref_out;

  bm_pe #(.ACC_W(ACC_W), .W_TAIL(W_TAIL)) dut (.*);

  int checks = 0, failures = 0;

  function automatic real dec(input int code, input bm_fmt_t f, input int beta);
    int s, ex, mt, ival;
    mt = code % (1 << f.m);
    ex = (code >> f.m) % (1 << f.e);
    s  = f.uns ? 0 : ((code >> (f.e + f.m)) & 1);
    ival = (ex == 0) ? mt : ((1 << f.m) + mt) * (1 << (ex - 1));
    return (s ? -1.0 : 1.0) * ival * (2.0 ** beta);
  endfunction

  initial begin
    real ex [6];
    int  smax;
    bm_fmt_t fa [3], fb [3];
    fa[0] = FMT_U0_4; fb[0] = FMT_2_1;
    fa[1] = FMT_0_3;  fb[1] = FMT_2_1;
    fa[2] = FMT_0_3;  fb[2] = FMT_U0_4;
    v_in = 0; first_in = 0; last_in = 0; a_in = '0; b_in = '0; beta_a_in = '0; beta_b_in = '0;
    drain_shift = 0; dr_val_in = '0; dr_ref_in = '0; fmt_a = fa[0]; fmt_b = fb[0];
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < RUNS; run++) begin
      int base;
      fmt_a = fa[run % 3]; fmt_b = fb[run % 3];
      for (int q = 0; q < 6; q++) ex[q] = 0.0;
      smax = -1000;
      base = int'($urandom_range(20)) - 10;
      for (int k = 0; k < K; k++) begin
        int ba, bb;
        @(negedge clk);
        v_in = 1; first_in = (k == 0); last_in = (k == K-1);
        for (int i = 0; i < 2; i++) a_in[i] = 4'($urandom);
        for (int j = 0; j < 3; j++) b_in[j] = 4'($urandom);
        // block exponents change every 4 steps, sums within W_TAIL
        ba = base + int'($urandom_range(2)) * ((k % 4) == 0 ? 1 : 0);
        if (k % 4 != 0) ba = int'(beta_a_in);
        bb = (k % 4 == 0) ? int'($urandom_range(2)) : int'(beta_b_in);
        beta_a_in = beta_t'(ba); beta_b_in = beta_t'(bb);
        if (ba + bb > smax) smax = ba + bb;
        for (int i = 0; i < 2; i++) for (int j = 0; j < 3; j++)
          ex[3*i+j] += dec(a_in[i], fmt_a, ba) * dec(b_in[j], fmt_b, bb);
        @(posedge clk); #1;
        checks++;
        if (a_out != a_in || b_out != b_in || beta_a_out != beta_a_in || v_out != 1'b1) begin
          failures++; $display("FAIL pass-through");
        end
      end
      @(negedge clk) v_in = 0; first_in = 0; last_in = 0;
      @(posedge clk); #1;
      // drain: bottom MAC row (row 1) leaves first
      for (int r = 1; r >= 0; r--) begin
        for (int c = 0; c < 3; c++) begin
          real got;
          logic signed [ACC_W-1:0] v;
          int vi, sc;
          v = dr_val_out[c];
          vi = int'(v);
          sc = int'(dr_ref_out) - W_TAIL;
          got = vi * (2.0 ** sc);
          checks++;
          if (got != ex[3*r+c]) begin
            failures++;
            $display("FAIL run %0d mac r%0d c%0d: got %f exp %f", run, r, c, got, ex[3*r+c]);
          end
        end
        checks++;
        if (int'(dr_ref_out) != smax) begin failures++; $display("FAIL ref %0d exp %0d", dr_ref_out, smax); end
        @(negedge clk) drain_shift = 1;
        @(posedge clk); #1 drain_shift = 0;
      end
    end
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
