// arq_tx_scheduler: the rate-compatible transmitter of the codec.
//
// Takes a whole codeword from the encoder and sends it one a-bit segment per
// accepted clock, each tagged with its block-column index (0..J-1 for the
// systematic vectors p_1..p_J, J+i-1 for the parity vector q_i). A frame starts
// with p_1..p_J and q_I, the highest-rate daughter code, followed by further
// parity vectors until n_par of them have been sent; n_par (1..I) selects the
// code rate J/(J + n_par). Parity vectors after q_I follow the fixed ARQ order
// q_(J/2), q_(J/4), q_(3J/4), the other even indices, then the odd ones. Each
// arq_req pulse while a frame is held sends the next vector in that order (an
// incremental-redundancy retransmission); ack releases the frame so that the
// next codeword is taken. Vectors never sent are punctured: the decoder fills
// them with zero LLRs.
// Timing: a frame takes J + n_par clocks when tx_ready stays high; a
// retransmission takes one clock. n_par is sampled when a codeword is taken.
// The transmission order follows the source paper; the handshakes, the
// ack/arq_req protocol and n_par as a rate selector are this design's choices.
module arq_tx_scheduler
  import ldpc_pkg::*;
#(
  parameter int unsigned A  = SUB_SIZE,
  parameter int unsigned NI = BLK_ROWS,
  parameter int unsigned NJ = BLK_SYS,
  localparam int unsigned NC = NI + NJ,
  localparam int unsigned SGW = $clog2(NC),
  localparam int unsigned NPW = $clog2(NI + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  // codeword from the encoder
  input  logic            cw_valid,
  output logic            cw_ready,
  input  logic [NJ*A-1:0] cw_sys,
  input  logic [NI*A-1:0] cw_par,
  // rate and ARQ control
  input  logic [NPW-1:0]  n_par,        // parity vectors in the first transmission, 1..I
  input  logic            arq_req,      // send one more parity vector of the held frame
  input  logic            ack,          // frame received, release it
  output logic            arq_exhausted,// every parity vector of the held frame was sent
  output logic            frame_held,
  // segment stream
  output logic            tx_valid,
  input  logic            tx_ready,
  output logic [SGW-1:0]  tx_seg,
  output logic [A-1:0]    tx_data,
  output logic            tx_first,     // first segment of a frame
  output logic            tx_retx       // segment sent on an ARQ request
);

  typedef enum logic [1:0] {S_IDLE, S_SEND, S_WAIT, S_RETX} state_t;

  typedef int unsigned ord_t [NI];

  function automatic ord_t gen_order();
    ord_t o;
    o[0] = NI;                              // q_I is always sent first
    for (int n = 1; n < int'(NI); n++) o[n] = arq_order(n - 1, NI, NJ);
    return o;
  endfunction

  localparam ord_t ORDER = gen_order();     // parity vector index, 1-based

  state_t           state;
  logic [NJ*A-1:0]  sys_q;
  logic [NI*A-1:0]  par_q;
  logic [SGW-1:0]   idx;       // position in the frame: 0..J-1 systematic, J.. parity order
  logic [NPW-1:0]   par_sent;  // parity vectors sent so far
  logic [NPW-1:0]   par_goal;  // parity vectors to send in the first transmission

  logic [NPW-1:0]   ord_pos;
  logic [SGW-1:0]   seg;

  always_comb begin
    ord_pos = par_sent;
    if (idx < SGW'(NJ)) seg = idx;
    else                seg = SGW'(NJ + ORDER[ord_pos] - 1);
  end

  assign cw_ready      = (state == S_IDLE);
  assign frame_held    = (state == S_WAIT);
  assign arq_exhausted = (par_sent == NPW'(NI));
  assign tx_valid      = (state == S_SEND) || (state == S_RETX);
  assign tx_seg        = seg;
  assign tx_first      = (state == S_SEND) && (idx == '0);
  assign tx_retx       = (state == S_RETX);

  always_comb begin
    if (seg < SGW'(NJ)) tx_data = sys_q[seg * A +: A];
    else                tx_data = par_q[(int'(seg) - int'(NJ)) * int'(A) +: A];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      sys_q    <= '0;
      par_q    <= '0;
      idx      <= '0;
      par_sent <= '0;
      par_goal <= NPW'(1);
    end else begin
      case (state)
        S_IDLE: if (cw_valid) begin
          sys_q    <= cw_sys;
          par_q    <= cw_par;
          idx      <= '0;
          par_sent <= '0;
          par_goal <= (n_par == '0) ? NPW'(1) : (n_par > NPW'(NI)) ? NPW'(NI) : n_par;
          state    <= S_SEND;
        end
        S_SEND: if (tx_ready) begin
          if (idx >= SGW'(NJ)) par_sent <= par_sent + NPW'(1);
          if (idx >= SGW'(NJ) && par_sent + NPW'(1) == par_goal) begin
            state <= S_WAIT;
          end else begin
            idx <= (idx < SGW'(NJ)) ? idx + SGW'(1) : idx;
          end
        end
        S_WAIT: begin
          if (ack)                           state <= S_IDLE;
          else if (arq_req && !arq_exhausted) state <= S_RETX;
        end
        S_RETX: if (tx_ready) begin
          par_sent <= par_sent + NPW'(1);
          state    <= S_WAIT;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // a segment offered on the stream stays unchanged until it is taken
  assert property (@(posedge clk) disable iff (!rst_n)
                   (tx_valid && !tx_ready) |=> (tx_valid && $stable(tx_seg) && $stable(tx_data)))
    else $error("arq_tx_scheduler: segment changed before it was accepted");

endmodule
