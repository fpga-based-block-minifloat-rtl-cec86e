// mape_err: output error of the MAPE loss. For a forecast p and a label l of
// horizon H the derivative of (1/H) * sum |l - p| / |l| with respect to p is
// sign(p - l) / (H * |l|); this block computes it for one row of LANES
// high-precision BM elements sharing one exponent, and returns the errors as
// a high-precision BM row with a new shared exponent.
//
// How: each lane decodes its two BM<0,15> integers, decides the sign by
// comparing p and l after aligning their exponents, and runs a restoring
// divider: the denominator H*|L| is normalised to [2^23, 2^24) by a left
// shift s, and 16 quotient bits of 2^38 / den are produced one per cycle.
// The lane result is q * 2^(s - 38 - beta_l). After the division the block
// exponent is the largest lane exponent, and every lane is shifted to it and
// rounded to nearest with Algorithm-1 style saturation. Lanes with l = 0 give
// 0 (the loss is undefined there).
//
// Interface: in_valid/in_ready starts a row; out_valid pulses for one cycle
// with the row. Timing: 18 cycles per row (1 load, 16 divide, 1 normalise).
//
// From the document: MAPE is the training loss and its error is produced in
// the vector unit as the first step of back-propagation. The divider, the
// widths and the normalisation order are this design's choices.
module mape_err
  import bm_pkg::*;
#(
  parameter int unsigned LANES = 12,
  parameter int unsigned HW    = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [HW-1:0]         horizon,     // H >= 1
  input  logic                  in_valid,
  output logic                  in_ready,
  input  code_t [LANES-1:0]     p_code,
  input  beta_t                 beta_p,
  input  code_t [LANES-1:0]     l_code,
  input  beta_t                 beta_l,
  output logic                  out_valid,
  output code_t [LANES-1:0]     out_code,
  output beta_t                 out_beta
);
  localparam int unsigned DW = 24;           // normalised denominator width
  typedef enum logic [1:0] {S_IDLE, S_DIV, S_NORM} state_t;
  state_t state;
  logic [3:0]              cnt;
  logic [LANES-1:0]        sgn, nz;
  logic [DW:0]             rem [LANES];
  logic [DW-1:0]           den [LANES];
  logic [15:0]             q   [LANES];
  int                      xe  [LANES];       // lane exponent
  beta_t                   bl_q;

  assign in_ready = (state == S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; cnt <= '0; out_valid <= 1'b0; out_code <= '0; out_beta <= '0;
      sgn <= '0; nz <= '0; bl_q <= '0;
      for (int i = 0; i < LANES; i++) begin rem[i] <= '0; den[i] <= '0; q[i] <= '0; xe[i] <= 0; end
    end else begin
      out_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (in_valid) begin
          bl_q <= beta_l;
          for (int i = 0; i < LANES; i++) begin
            logic signed [17:0] pi, li;
            logic signed [63:0] pa, la;
            logic [DW-1:0]      d;
            int                 dd, sh;
            pi = bm_to_int(p_code[i], FMT_0_15);
            li = bm_to_int(l_code[i], FMT_0_15);
            dd = int'(beta_p) - int'(beta_l);
            if (dd > 30) dd = 30;
            if (dd < -30) dd = -30;
            pa = (dd >= 0) ? (64'(pi) <<< dd) : 64'(pi);
            la = (dd <  0) ? (64'(li) <<< (-dd)) : 64'(li);
            sgn[i] <= (pa < la);                       // p < l: derivative is negative
            nz[i]  <= (li != 0) && (pa != la);
            d  = DW'(horizon) * DW'(li < 0 ? -li : li);
            sh = (DW - 1) - msb_pos(NMAG_W'(d));
            if (li == 0) sh = 0;
            den[i] <= d << sh;
            xe[i]  <= sh - 38;
            rem[i] <= (DW+1)'(1) << (DW - 2);        // 2^22: the part of 2^38 above the quotient bits
            q[i]   <= '0;
          end
          cnt   <= '0;
          state <= S_DIV;
        end
        S_DIV: begin
          for (int i = 0; i < LANES; i++) begin
            logic [DW:0] r;
            r = rem[i] << 1;
            if (r >= {1'b0, den[i]}) begin rem[i] <= r - {1'b0, den[i]}; q[i] <= {q[i][14:0], 1'b1}; end
            else                     begin rem[i] <= r;                  q[i] <= {q[i][14:0], 1'b0}; end
          end
          cnt <= cnt + 1'b1;
          if (cnt == 4'd15) state <= S_NORM;
        end
        default: begin
          int bo;
          bo = -1000;
          for (int i = 0; i < LANES; i++) if (nz[i] && xe[i] > bo) bo = xe[i];
          if (bo == -1000) bo = 0;
          // a quotient of 2^15 needs one more bit than BM<0,15> has: shift by 1 more
          for (int i = 0; i < LANES; i++)
            if (nz[i] && xe[i] == bo && q[i][15]) begin bo = bo + 1; break; end
          for (int i = 0; i < LANES; i++)
            out_code[i] <= nz[i] ? bm_encode(sgn[i], NMAG_W'(q[i]), unsigned'(bo - xe[i]), FMT_0_15, 1'b0, 16'h0)
                                 : '0;
          out_beta  <= beta_t'(bo - int'(bl_q));
          out_valid <= 1'b1;
          state     <= S_IDLE;
        end
      endcase
    end
  end
endmodule
