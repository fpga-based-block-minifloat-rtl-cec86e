// bm_feeder: operand feeder of the FC block. It takes one operand of a GEMM
// (tiles of 4-bit BM codes arriving one tile row per beat from an on-chip
// buffer) and presents it to the GEMM kernel as one K-step vector per beat,
// either unchanged or transposed.
//
// How: the stream goes through a tile_transpose ping-pong buffer in both
// modes, so a transposed and a direct operand reach the kernel with the same
// latency and stay aligned step by step. The feeder also creates the GEMM
// step flags: it counts K steps across tiles and marks the first step of an
// output tile (start accumulation) and the last one (after k_tiles tiles,
// emit the result). The input tile stream is expected in K order.
//
// Interface: in_* is the buffer side (valid/ready), out_* the kernel side
// (valid/ready); out_first/out_last travel with each vector. k_tiles and
// transpose are held stable for a GEMM. Timing: one vector per cycle once a
// tile is buffered; N cycles of fill latency.
//
// From the document: feederA and feederB pre-process the kernel inputs by
// transposing them when a training phase needs it. The step counting and the
// equal-latency direct path are this design's choices.
module bm_feeder
  import bm_pkg::*;
#(
  parameter int unsigned N   = 72,
  parameter int unsigned BLK = 12,
  parameter int unsigned KTW = 8,
  localparam int unsigned NB = N / BLK
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     transpose,
  input  logic [KTW-1:0]           k_tiles,     // tiles along K per output tile (>= 1)
  input  logic                     in_valid,
  output logic                     in_ready,
  input  lp_code_t [N-1:0]         in_vec,
  input  beta_t    [NB-1:0]        in_beta,
  output logic                     out_valid,
  input  logic                     out_ready,
  output lp_code_t [N-1:0]         out_vec,
  output beta_t    [NB-1:0]        out_beta,
  output logic                     out_first,
  output logic                     out_last
);
  localparam int unsigned KW = $clog2(N);
  logic [KW-1:0]  row;
  logic [KTW-1:0] kt;
  logic [1:0]     side_in, side_out;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row <= '0; kt <= '0;
    end else if (in_valid && in_ready) begin
      if (row == KW'(N-1)) begin
        row <= '0;
        kt  <= (kt == k_tiles - 1'b1) ? '0 : kt + 1'b1;
      end else row <= row + 1'b1;
    end
  end

  assign side_in[0] = (kt == '0) && (row == '0);
  assign side_in[1] = (kt == k_tiles - 1'b1) && (row == KW'(N-1));

  tile_transpose #(.N(N), .W(LP_W), .BLK(BLK), .SB(2)) u_tr (
    .clk, .rst_n, .transpose,
    .in_valid, .in_ready, .in_vec, .in_beta, .in_side(side_in),
    .out_valid, .out_ready, .out_vec, .out_beta, .out_side(side_out)
  );

  assign out_first = side_out[0];
  assign out_last  = side_out[1];
endmodule
