// ldpc_decoder: P-parallel layered sum-product decoder with zero filling.
//
// Decodes the mother code and every daughter code with one datapath. Punctured
// parity vectors are "zero filled": their channel LLRs are 0, so the decoder
// treats those bits as unknown and recovers them along with the message.
//
// Memories (registers):
//   chan[c][k]  channel LLRs of block column c, 8 bits. frame_start clears it,
//               which zero-fills every vector that is not received later.
//   post[c][k]  posterior LLRs Z_n, 10 bits, loaded from chan at dec_start.
//   msg[i][t][k] check messages Y_mn of block row i, slot t (0..5 systematic
//               sub-matrices, 6 = parity column q_(i-1), 7 = parity column q_i).
// Schedule: each iteration walks the block rows from the bottom (row I) to the
// top (row 1). A block row of a rows is handled in a/P clocks, P rows per
// clock, by P row_column_processor instances. For each of the 8 slots the
// addressed block column of post[] is rotated by S through a cyclic_shifter, so
// that element k lines up with row k of the block row; the processors update
// P rows; the rotated vector with those P entries replaced is rotated back by
// a - S and written to post[]. The rows of one block row share no code bit, so
// no two processors touch the same Z_n in a clock.
// Stopping: an iteration in which every row's parity check on the updated Z'
// holds and no hard decision changes ends decoding with dec_ok = 1; otherwise
// decoding stops after max_iter iterations with dec_ok = 0.
// Interface: llr_valid writes one block column (a LLRs) of chan per clock;
// dec_start (while idle) starts decoding; dec_done pulses for one clock when
// dec_sys (hard decisions of the systematic bits, 1 = negative LLR), dec_ok and
// dec_iters are valid; they hold until the next dec_start.
// Timing: 1 clock to load post/msg, then I*a/P clocks per iteration (48 at the
// defaults), then dec_done.
// Follows the source paper: 36 parallel row-column processors of degree 8 for a = 72,
// bottom-to-top row order, zero filling, the 50-iteration limit. This design's
// own choices: register memories, the single-clock processing of a row group,
// the termination test and the interface.
module ldpc_decoder
  import ldpc_pkg::*;
#(
  parameter int unsigned A       = SUB_SIZE,
  parameter int unsigned NI      = BLK_ROWS,
  parameter int unsigned NJ      = BLK_SYS,
  parameter int unsigned P       = DEC_PAR,
  parameter int unsigned ITER_MX = MAX_ITER,
  localparam int unsigned NC  = NI + NJ,
  localparam int unsigned SGW = $clog2(NC),
  localparam int unsigned ITW = $clog2(ITER_MX + 1)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // channel LLR loading
  input  logic                         frame_start,  // clear channel LLRs (zero filling)
  input  logic                         llr_valid,
  input  logic [SGW-1:0]               llr_seg,      // block column 0..I+J-1
  input  logic signed [A-1:0][LLR_W-1:0] llr_data,
  // decoding
  input  logic                         dec_start,
  input  logic [ITW-1:0]               max_iter,     // 1..ITER_MX, 0 selects ITER_MX
  output logic                         dec_busy,
  output logic                         dec_done,
  output logic                         dec_ok,
  output logic [ITW-1:0]               dec_iters,
  output logic [NJ*A-1:0]              dec_sys
);

  localparam int unsigned H   = A / P;            // clocks per block row
  localparam int unsigned HW  = (H > 1) ? $clog2(H) : 1;
  localparam int unsigned RW  = (NI > 1) ? $clog2(NI) : 1;
  localparam int unsigned SW  = (A > 1) ? $clog2(A) : 1;
  localparam int unsigned DEG = NSYS + 2;

  if (A % P != 0) begin : g_chk_par
    $error("ldpc_decoder: A must be a multiple of P");
  end
  if (DEG != ROW_DEG) begin : g_chk_deg
    $error("ldpc_decoder: row degree must equal ROW_DEG");
  end

  typedef int unsigned tab_t [NI*NSYS];   // entry i*NSYS + t

  function automatic tab_t gen_cols();
    tab_t t;
    for (int i = 0; i < int'(NI); i++)
      for (int s = 0; s < int'(NSYS); s++) t[i*NSYS+s] = base_col(i, s, NJ);
    return t;
  endfunction

  function automatic tab_t gen_shifts();
    tab_t t;
    for (int i = 0; i < int'(NI); i++)
      for (int s = 0; s < int'(NSYS); s++) t[i*NSYS+s] = base_shift(i, s, NJ, A);
    return t;
  endfunction

  localparam tab_t COLS   = gen_cols();
  localparam tab_t SHIFTS = gen_shifts();

  typedef logic signed [A-1:0][LLR_W-1:0]  llr_vec_t;
  typedef logic signed [A-1:0][POST_W-1:0] post_vec_t;

  llr_vec_t  chan [NC];
  post_vec_t post [NC];
  llr_vec_t  msg  [NI][DEG];

  typedef enum logic [1:0] {D_IDLE, D_LOAD, D_RUN} dstate_t;
  dstate_t        state;
  logic [RW-1:0]  row;       // current block row, counts down
  logic [HW-1:0]  half;      // row group inside the block row
  logic [ITW-1:0] iter;      // iterations completed
  logic [ITW-1:0] iter_lim;
  logic           iter_good; // all checks so far in this iteration held, no flips

  // slot addressing of the current block row
  logic [SGW-1:0] col   [DEG];
  logic [SW-1:0]  sh    [DEG];
  logic [DEG-1:0] slot_en;

  always_comb begin
    for (int t = 0; t < int'(NSYS); t++) begin
      col[t]     = SGW'(COLS[int'(row)*NSYS+t]);
      sh[t]      = SW'(SHIFTS[int'(row)*NSYS+t]);
      slot_en[t] = 1'b1;
    end
    col[NSYS]       = SGW'(NJ) + SGW'(row) - SGW'(1);
    sh[NSYS]        = '0;
    slot_en[NSYS]   = (row != '0);
    col[NSYS+1]     = SGW'(NJ) + SGW'(row);
    sh[NSYS+1]      = '0;
    slot_en[NSYS+1] = 1'b1;
    if (!slot_en[NSYS]) col[NSYS] = col[NSYS+1];
  end

  // rotate the addressed block columns into row order
  post_vec_t rot  [DEG];
  post_vec_t nrot [DEG];
  post_vec_t back [DEG];
  logic [SW-1:0] ush [DEG];

  for (genvar t = 0; t < DEG; t++) begin : g_slot
    cyclic_shifter #(.N(A), .W(POST_W)) u_fwd (.din(post[col[t]]), .shift(sh[t]), .dout(rot[t]));
    assign ush[t] = (sh[t] == '0) ? '0 : SW'(A) - sh[t];
    cyclic_shifter #(.N(A), .W(POST_W)) u_inv (.din(nrot[t]), .shift(ush[t]), .dout(back[t]));
  end

  // processors
  logic signed [P-1:0][DEG-1:0][POST_W-1:0] pz, pz_new;
  logic signed [P-1:0][DEG-1:0][LLR_W-1:0]  py, py_new;
  logic [P-1:0] p_ok;
  logic [P-1:0] p_flip;

  always_comb begin
    for (int t = 0; t < int'(DEG); t++)
      for (int l = 0; l < int'(P); l++) begin
        pz[l][t] = rot[t][int'(half)*P + l];
        py[l][t] = msg[row][t][int'(half)*P + l];
      end
  end

  always_comb begin
    for (int t = 0; t < int'(DEG); t++) begin
      nrot[t] = rot[t];
      for (int l = 0; l < int'(P); l++) nrot[t][int'(half)*P + l] = pz_new[l][t];
    end
    for (int l = 0; l < int'(P); l++) begin
      p_flip[l] = 1'b0;
      for (int t = 0; t < int'(DEG); t++)
        if (slot_en[t] && (pz_new[l][t][POST_W-1] != pz[l][t][POST_W-1])) p_flip[l] = 1'b1;
    end
  end

  for (genvar l = 0; l < P; l++) begin : g_proc
    row_column_processor #(.DEG(DEG)) u_rcp (
      .en         (slot_en),
      .z          (pz[l]),
      .y          (py[l]),
      .z_new      (pz_new[l]),
      .y_new      (py_new[l]),
      .parity_ok  (p_ok[l]),
      .sign_parity()
    );
  end

  logic group_good;
  logic last_group;
  assign group_good = (&p_ok) && !(|p_flip);
  assign last_group = (row == '0) && (half == HW'(H - 1));

  assign dec_busy = (state != D_IDLE);

  for (genvar c = 0; c < NJ; c++) begin : g_hard
    for (genvar k = 0; k < A; k++) begin : g_bit
      assign dec_sys[c*A + k] = post[c][k][POST_W-1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= D_IDLE;
      row       <= '0;
      half      <= '0;
      iter      <= '0;
      iter_lim  <= ITW'(ITER_MX);
      iter_good <= 1'b1;
      dec_done  <= 1'b0;
      dec_ok    <= 1'b0;
      dec_iters <= '0;
      for (int c = 0; c < int'(NC); c++) begin
        chan[c] <= '0;
        post[c] <= '0;
      end
      for (int i = 0; i < int'(NI); i++)
        for (int t = 0; t < int'(DEG); t++) msg[i][t] <= '0;
    end else begin
      dec_done <= 1'b0;

      // channel LLR memory: zero filling, then received segments
      if (frame_start) begin
        for (int c = 0; c < int'(NC); c++) chan[c] <= '0;
      end else if (llr_valid) begin
        chan[llr_seg] <= llr_data;
      end

      case (state)
        D_IDLE: if (dec_start) begin
          iter_lim <= (max_iter == '0 || max_iter > ITW'(ITER_MX)) ? ITW'(ITER_MX) : max_iter;
          state    <= D_LOAD;
        end
        D_LOAD: begin
          for (int c = 0; c < int'(NC); c++)
            for (int k = 0; k < int'(A); k++) post[c][k] <= POST_W'($signed(chan[c][k]));
          for (int i = 0; i < int'(NI); i++)
            for (int t = 0; t < int'(DEG); t++) msg[i][t] <= '0;
          row       <= RW'(NI - 1);
          half      <= '0;
          iter      <= '0;
          iter_good <= 1'b1;
          state     <= D_RUN;
        end
        D_RUN: begin
          for (int t = 0; t < int'(DEG); t++) begin
            if (slot_en[t]) post[col[t]] <= back[t];
            for (int l = 0; l < int'(P); l++)
              msg[row][t][int'(half)*P + l] <= py_new[l][t];
          end
          if (half == HW'(H - 1)) begin
            half <= '0;
            row  <= (row == '0) ? RW'(NI - 1) : row - RW'(1);
          end else begin
            half <= half + HW'(1);
          end
          if (last_group) begin
            iter      <= iter + ITW'(1);
            iter_good <= 1'b1;
            if ((iter_good && group_good) || (iter + ITW'(1) == iter_lim)) begin
              state     <= D_IDLE;
              dec_done  <= 1'b1;
              dec_ok    <= iter_good && group_good;
              dec_iters <= iter + ITW'(1);
            end
          end else begin
            iter_good <= iter_good && group_good;
          end
        end
        default: state <= D_IDLE;
      endcase
    end
  end

  // the parity columns of a block row are distinct block columns
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state == D_RUN && slot_en[NSYS]) |-> (col[NSYS] != col[NSYS+1]))
    else $error("ldpc_decoder: parity slots collide");

endmodule
