// rcrc_ldpc_codec: rate-compatible LDPC codec, transmit and receive sides.
//
// Transmit side: message words -> ldpc_encoder (P_ENC-parallel, all I parity
// vectors of the rate-1/2 mother code) -> arq_tx_scheduler, which sends the
// systematic vectors and q_I (rate J/(J+1)), further parity vectors up to
// n_par, and one more per arq_req. Receive side: ldpc_decoder, a P_DEC-parallel
// layered sum-product decoder that zero-fills every parity vector it was not
// given. Modulation, channel and demodulation lie between tx_* and llr_*
// ports and are outside this block: the receiver turns each received segment
// into a LLRs (positive = bit 0) and writes them with its block-column index.
// The two sides share only the clock and reset, so the same top serves as a
// transmitter, a receiver, or a loop-back codec.
// Timing: see the blocks. At the defaults the encoder takes 54 clocks per
// codeword, a frame leaves in 24 + n_par clocks, the decoder takes 1 + 48
// clocks per iteration.
// The split into encoder, rate-compatible transmission and zero-filling decoder
// follows the source paper; the port protocol is this design's choice.
module rcrc_ldpc_codec
  import ldpc_pkg::*;
#(
  parameter int unsigned A       = SUB_SIZE,
  parameter int unsigned NI      = BLK_ROWS,
  parameter int unsigned NJ      = BLK_SYS,
  parameter int unsigned P_ENC   = ENC_PAR,
  parameter int unsigned P_DEC   = DEC_PAR,
  parameter int unsigned ITER_MX = MAX_ITER,
  localparam int unsigned NC  = NI + NJ,
  localparam int unsigned SGW = $clog2(NC),
  localparam int unsigned NPW = $clog2(NI + 1),
  localparam int unsigned ITW = $clog2(ITER_MX + 1)
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // transmit side: message in
  input  logic                           msg_valid,
  output logic                           msg_ready,
  input  logic [P_ENC-1:0]               msg_data,
  // transmit side: rate and ARQ control
  input  logic [NPW-1:0]                 n_par,
  input  logic                           arq_req,
  input  logic                           ack,
  output logic                           arq_exhausted,
  output logic                           frame_held,
  // transmit side: segments out
  output logic                           tx_valid,
  input  logic                           tx_ready,
  output logic [SGW-1:0]                 tx_seg,
  output logic [A-1:0]                   tx_data,
  output logic                           tx_first,
  output logic                           tx_retx,
  // receive side: LLRs in
  input  logic                           frame_start,
  input  logic                           llr_valid,
  input  logic [SGW-1:0]                 llr_seg,
  input  logic signed [A-1:0][LLR_W-1:0] llr_data,
  // receive side: decoding
  input  logic                           dec_start,
  input  logic [ITW-1:0]                 max_iter,
  output logic                           dec_busy,
  output logic                           dec_done,
  output logic                           dec_ok,
  output logic [ITW-1:0]                 dec_iters,
  output logic [NJ*A-1:0]                dec_sys
);

  logic            cw_valid, cw_ready;
  logic [NJ*A-1:0] cw_sys;
  logic [NI*A-1:0] cw_par;

  ldpc_encoder #(.A(A), .NI(NI), .NJ(NJ), .P(P_ENC)) u_enc (
    .clk, .rst_n,
    .msg_valid, .msg_ready, .msg_data,
    .cw_valid, .cw_ready, .cw_sys, .cw_par
  );

  arq_tx_scheduler #(.A(A), .NI(NI), .NJ(NJ)) u_tx (
    .clk, .rst_n,
    .cw_valid, .cw_ready, .cw_sys, .cw_par,
    .n_par, .arq_req, .ack, .arq_exhausted, .frame_held,
    .tx_valid, .tx_ready, .tx_seg, .tx_data, .tx_first, .tx_retx
  );

  ldpc_decoder #(.A(A), .NI(NI), .NJ(NJ), .P(P_DEC), .ITER_MX(ITER_MX)) u_dec (
    .clk, .rst_n,
    .frame_start, .llr_valid, .llr_seg, .llr_data,
    .dec_start, .max_iter, .dec_busy, .dec_done, .dec_ok, .dec_iters, .dec_sys
  );

endmodule
