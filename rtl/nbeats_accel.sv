// nbeats_accel: top level of the BM training accelerator for N-BEATS.
//
// It joins the two compute engines of the accelerator around the residual
// buffer:
//  * the FC block (feeders with transposers and the systolic BM GEMM with
//    normalisation) that computes every fully connected layer in the three
//    training phases; its operand tile streams come from the weight, input
//    and activation buffers and its result rows go to the LP/HP buffers;
//  * the vector path: the residual buffer RES (high-precision BM rows), the
//    BM vector unit (residual add/subtract, error addition, SGD weight update
//    with stochastic rounding, precision conversion) and the MAPE error unit.
//
// How the vector path runs: a command names an operation and a RES block
// (BLK rows starting at cmd_addr). For a vector operation the rows are read
// from RES as operand a, operand b (or the label, for MAPE) arrives on the
// hp stream, and the results are written back over the same rows when
// cmd_wb is set and always shown on the vec_out port. MAPE processes the
// block row by row. res_ld_* loads RES from outside (input data) when no
// command runs; res_rd_* reads it back.
//
// Ports: the off-chip memories and the remaining on-chip buffers are
// outside this module, so their streams are ports. Timing: the FC path
// follows fc_block; a vector command takes about 2*BLK + 3 cycles after its
// b stream starts, a MAPE command 19 cycles per row.
//
// From the document: the FC block, the vector addition unit and the residual
// buffer and the operations of the training algorithm. The command interface
// and the write-back scheme are this design's choices; the sequencing of the
// training algorithm itself is left to the host of these ports.
module nbeats_accel
  import bm_pkg::*;
#(
  parameter int unsigned PE_ROWS   = 36,
  parameter int unsigned PE_COLS   = 24,
  parameter int unsigned BLK       = 12,
  parameter int unsigned KTW       = 8,
  parameter int unsigned RES_DEPTH = 1024,
  parameter int unsigned HW        = 8,
  localparam int unsigned TL_R     = 2 * PE_ROWS,
  localparam int unsigned TL_C     = 3 * PE_COLS,
  localparam int unsigned NBR      = TL_R / BLK,
  localparam int unsigned NBC      = TL_C / BLK,
  localparam int unsigned RW       = $clog2(TL_R),
  localparam int unsigned AW       = $clog2(RES_DEPTH)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // FC block
  input  fc_path_t              fc_path,
  input  logic [KTW-1:0]        fc_k_tiles,
  input  bm_fmt_t               fc_fmt_a,
  input  bm_fmt_t               fc_fmt_b,
  input  bm_fmt_t               fc_out_fmt,
  input  logic                  fc_relu,
  input  logic                  fc_a_valid,
  output logic                  fc_a_ready,
  input  lp_code_t [TL_R-1:0]   fc_a_vec,
  input  beta_t    [NBR-1:0]    fc_a_beta,
  input  logic                  fc_b_valid,
  output logic                  fc_b_ready,
  input  lp_code_t [TL_C-1:0]   fc_b_vec,
  input  beta_t    [NBC-1:0]    fc_b_beta,
  output logic                  fc_out_valid,
  output logic                  fc_out_last,
  output logic [RW-1:0]         fc_out_row,
  output code_t    [TL_C-1:0]   fc_out_code,
  output beta_t    [NBC-1:0]    fc_out_beta,
  output logic     [TL_C-1:0]   fc_out_mask,
  // vector path commands
  input  logic                  cmd_valid,
  output logic                  cmd_ready,
  input  logic                  cmd_mape,     // 1: MAPE error, 0: vector operation
  input  vec_op_t               cmd_op,
  input  bm_fmt_t               cmd_fmt_a,
  input  bm_fmt_t               cmd_fmt_b,
  input  bm_fmt_t               cmd_fmt_o,
  input  logic                  cmd_stoch,
  input  logic [4:0]            cmd_b_shift,
  input  logic                  cmd_wb,
  input  logic [AW-1:0]         cmd_addr,
  input  logic [HW-1:0]         horizon,
  output logic                  cmd_done,
  // operand b / label stream (one row per beat)
  input  logic                  hp_valid,
  output logic                  hp_ready,
  input  code_t    [BLK-1:0]    hp_code,
  input  beta_t                 hp_beta,
  // vector unit results
  output logic                  vec_out_valid,
  output code_t    [BLK-1:0]    vec_out_code,
  output beta_t                 vec_out_beta,
  // residual buffer load and read-back
  input  logic                  res_ld_en,
  input  logic [AW-1:0]         res_ld_addr,
  input  code_t    [BLK-1:0]    res_ld_code,
  input  beta_t                 res_ld_beta,
  input  logic [AW-1:0]         res_rd_addr,
  output code_t    [BLK-1:0]    res_rd_code,
  output beta_t                 res_rd_beta
);
  localparam int unsigned CW = $clog2(BLK + 1);

  fc_block #(.PE_ROWS(PE_ROWS), .PE_COLS(PE_COLS), .BLK(BLK), .KTW(KTW)) u_fc (
    .clk, .rst_n, .path(fc_path), .k_tiles(fc_k_tiles),
    .fmt_a(fc_fmt_a), .fmt_b(fc_fmt_b), .out_fmt(fc_out_fmt), .relu(fc_relu),
    .a_valid(fc_a_valid), .a_ready(fc_a_ready), .a_vec(fc_a_vec), .a_beta(fc_a_beta),
    .b_valid(fc_b_valid), .b_ready(fc_b_ready), .b_vec(fc_b_vec), .b_beta(fc_b_beta),
    .out_valid(fc_out_valid), .out_last(fc_out_last), .out_row(fc_out_row),
    .out_code(fc_out_code), .out_beta(fc_out_beta), .out_mask(fc_out_mask)
  );

  // ---------------------------------------------------------------- vector path
  typedef enum logic [1:0] {V_IDLE, V_VEC, V_MAPE} vstate_t;
  vstate_t          vs;
  logic             c_mape, c_wb, c_stoch;
  vec_op_t          c_op;
  bm_fmt_t          c_fa, c_fb, c_fo;
  logic [4:0]       c_bsh;
  logic [AW-1:0]    c_addr;
  logic [CW-1:0]    icnt, ocnt;
  logic             m_busy;

  logic [AW-1:0]    buf_rd_addr, buf_wr_addr;
  code_t [BLK-1:0]  buf_rd_code, buf_wr_code;
  beta_t            buf_rd_beta, buf_wr_beta;
  logic             buf_wr_en;

  logic             v_in_valid, v_in_ready, v_out_valid, v_out_last;
  code_t [BLK-1:0]  v_out_code;
  beta_t            v_out_beta;
  logic             m_in_valid, m_in_ready, m_out_valid;
  code_t [BLK-1:0]  m_out_code;
  beta_t            m_out_beta;

  assign cmd_ready  = (vs == V_IDLE);
  assign v_in_valid = (vs == V_VEC) && (icnt < CW'(BLK)) && hp_valid;
  assign m_in_valid = (vs == V_MAPE) && !m_busy && (icnt < CW'(BLK)) && hp_valid;
  assign hp_ready   = (vs == V_VEC)  ? (v_in_ready && icnt < CW'(BLK))
                    : (vs == V_MAPE) ? (m_in_ready && !m_busy && icnt < CW'(BLK)) : 1'b0;

  assign buf_rd_addr = (vs == V_IDLE) ? res_rd_addr : c_addr + AW'(icnt);
  assign res_rd_code = buf_rd_code;
  assign res_rd_beta = buf_rd_beta;

  always_comb begin
    buf_wr_en   = 1'b0;
    buf_wr_addr = res_ld_addr;
    buf_wr_code = res_ld_code;
    buf_wr_beta = res_ld_beta;
    if (vs == V_IDLE) begin
      buf_wr_en = res_ld_en;
    end else if (vs == V_VEC) begin
      buf_wr_en   = v_out_valid && c_wb;
      buf_wr_addr = c_addr + AW'(ocnt);
      buf_wr_code = v_out_code;
      buf_wr_beta = v_out_beta;
    end else begin
      buf_wr_en   = m_out_valid;
      buf_wr_addr = c_addr + AW'(ocnt);
      buf_wr_code = m_out_code;
      buf_wr_beta = m_out_beta;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vs <= V_IDLE; icnt <= '0; ocnt <= '0; m_busy <= 1'b0; cmd_done <= 1'b0;
      c_mape <= 1'b0; c_wb <= 1'b0; c_stoch <= 1'b0; c_op <= VOP_ADD;
      c_fa <= FMT_0_15; c_fb <= FMT_0_15; c_fo <= FMT_0_15; c_bsh <= '0; c_addr <= '0;
    end else begin
      cmd_done <= 1'b0;
      unique case (vs)
        V_IDLE: if (cmd_valid) begin
          c_mape <= cmd_mape; c_wb <= cmd_wb; c_stoch <= cmd_stoch; c_op <= cmd_op;
          c_fa <= cmd_fmt_a; c_fb <= cmd_fmt_b; c_fo <= cmd_fmt_o; c_bsh <= cmd_b_shift;
          c_addr <= cmd_addr; icnt <= '0; ocnt <= '0;
          vs <= cmd_mape ? V_MAPE : V_VEC;
        end
        V_VEC: begin
          if (v_in_valid && v_in_ready) icnt <= icnt + 1'b1;
          if (v_out_valid) begin
            ocnt <= ocnt + 1'b1;
            if (v_out_last) begin vs <= V_IDLE; cmd_done <= 1'b1; end
          end
        end
        default: begin
          if (m_in_valid && m_in_ready) begin icnt <= icnt + 1'b1; m_busy <= 1'b1; end
          if (m_out_valid) begin
            ocnt   <= ocnt + 1'b1;
            m_busy <= 1'b0;
            if (ocnt == CW'(BLK - 1)) begin vs <= V_IDLE; cmd_done <= 1'b1; end
          end
        end
      endcase
    end
  end

  bm_buffer #(.LANES(BLK), .W(CODE_W), .DEPTH(RES_DEPTH)) u_res (
    .clk, .rst_n, .wr_en(buf_wr_en), .wr_addr(buf_wr_addr), .wr_code(buf_wr_code),
    .wr_beta(buf_wr_beta), .rd_addr(buf_rd_addr), .rd_code(buf_rd_code), .rd_beta(buf_rd_beta)
  );

  bm_vec_unit #(.BLK(BLK)) u_vec (
    .clk, .rst_n, .op(c_op), .fmt_a(c_fa), .fmt_b(c_fb), .fmt_o(c_fo), .stoch(c_stoch),
    .b_shift(c_bsh), .in_valid(v_in_valid), .in_ready(v_in_ready),
    .a_code(buf_rd_code), .beta_a(buf_rd_beta), .b_code(hp_code), .beta_b(hp_beta),
    .out_valid(v_out_valid), .out_last(v_out_last), .out_code(v_out_code), .out_beta(v_out_beta)
  );

  mape_err #(.LANES(BLK), .HW(HW)) u_mape (
    .clk, .rst_n, .horizon, .in_valid(m_in_valid), .in_ready(m_in_ready),
    .p_code(buf_rd_code), .beta_p(buf_rd_beta), .l_code(hp_code), .beta_l(hp_beta),
    .out_valid(m_out_valid), .out_code(m_out_code), .out_beta(m_out_beta)
  );

  assign vec_out_valid = v_out_valid;
  assign vec_out_code  = v_out_code;
  assign vec_out_beta  = v_out_beta;

  // assertions are armed one cycle after reset, from an asynchronously reset flop
  logic chk_arm;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) chk_arm <= 1'b0;
    else        chk_arm <= 1'b1;
  a_no_load_in_cmd: assert property (@(posedge clk) disable iff (!chk_arm)
    (vs != V_IDLE) |-> !res_ld_en) else $error("RES load during a command");
endmodule
