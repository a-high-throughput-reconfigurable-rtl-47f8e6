// ldpc_encoder: the P-parallel universal encoder of the rate-compatible LDPC code.
//
// Computes all I parity vectors of the mother code in linear time with the
// dual-diagonal recursion q_i = sum_j K(S_ij) p_j + q_(i-1) (q_0 = 0). Bit k of
// K(S) p_j is bit (k + S) mod a of p_j, so each of the P xor_processor lanes
// picks the NSYS shifted systematic bits of its row directly and XORs them
// with bit k of the previous parity vector. The I*a parity bits are produced
// P per clock in the order n = i*a + k; since P <= a, bit k of q_(i-1) was
// produced at least one clock earlier.
//
// Interface: the message (J*a bits, p_1 first, bit 0 of each vector first)
// arrives as P-bit words on a valid/ready handshake into an input buffer, so
// the next message can load while the current one encodes. The finished
// codeword (systematic and parity parts) is held on cw_* until cw_ready.
// Timing: encoding starts the clock after the last word is accepted and takes
// ceil(I*a/P) clocks (54 at the defaults), then cw_valid rises. With loading
// overlapped, one codeword leaves every max(J*a/P, ceil(I*a/P) + 1) clocks
// (54 at the defaults, about 32 message bits per clock). A new encoding may
// start in the clock in which the previous codeword is taken.
// The 32 XOR processors, the recursion and the tree form follow the source paper;
// the bit-serial order over (i, k), the buffering and the handshake are this
// design's choices.
module ldpc_encoder
  import ldpc_pkg::*;
#(
  parameter int unsigned A  = SUB_SIZE,
  parameter int unsigned NI = BLK_ROWS,
  parameter int unsigned NJ = BLK_SYS,
  parameter int unsigned P  = ENC_PAR
) (
  input  logic              clk,
  input  logic              rst_n,
  // message words
  input  logic              msg_valid,
  output logic              msg_ready,
  input  logic [P-1:0]      msg_data,
  // codeword
  output logic              cw_valid,
  input  logic              cw_ready,
  output logic [NJ*A-1:0]   cw_sys,
  output logic [NI*A-1:0]   cw_par
);

  localparam int unsigned NSB    = NJ * A;               // systematic bits
  localparam int unsigned NPB    = NI * A;               // parity bits
  localparam int unsigned WORDS  = NSB / P;              // message words per codeword
  localparam int unsigned ENC_CY = (NPB + P - 1) / P;    // encoding clocks
  localparam int unsigned RW     = $clog2(NI + 1);
  localparam int unsigned KW     = $clog2(A + P);
  localparam int unsigned MW     = $clog2(2 * A);      // k + S < 2a
  localparam int unsigned WW     = (WORDS > 1) ? $clog2(WORDS) : 1;
  localparam int unsigned CW     = (ENC_CY > 1) ? $clog2(ENC_CY) : 1;

  if (P > A) begin : g_chk_par
    $error("ldpc_encoder: P must not exceed the sub-matrix size A");
  end
  if (NSB % P != 0) begin : g_chk_words
    $error("ldpc_encoder: J*A must be a multiple of P");
  end

  typedef int unsigned tab_t [NI*NSYS];  // entry i*NSYS + t

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

  // input buffer
  logic [NSB-1:0] in_buf;
  logic [WW-1:0]  in_cnt;
  logic           in_full;

  // encoding engine
  logic [NSB-1:0] p_work;
  logic [NPB-1:0] q_reg;
  logic           busy;
  logic [CW-1:0]  cyc;
  logic [RW-1:0]  row0;    // block row of lane 0
  logic [KW-1:0]  k0;      // bit position of lane 0

  logic [P-1:0]   lane_q;
  logic [P-1:0]   lane_ok;
  logic [RW-1:0]  lane_row [P];
  logic [KW-1:0]  lane_k   [P];

  assign msg_ready = !in_full;
  assign cw_sys    = p_work;
  assign cw_par    = q_reg;

  for (genvar l = 0; l < P; l++) begin : g_lane
    logic [NSYS-1:0] x;
    logic            s_prev;

    always_comb begin
      logic [KW-1:0] kk;
      logic [MW-1:0] m;
      kk = k0 + KW'(l);
      m  = '0;
      lane_row[l] = row0;
      if (kk >= KW'(A)) begin
        kk = kk - KW'(A);
        lane_row[l] = row0 + RW'(1);
      end
      lane_k[l]  = kk;
      lane_ok[l] = (lane_row[l] < RW'(NI));
      x = '0;
      s_prev = 1'b0;
      if (lane_ok[l]) begin
        for (int t = 0; t < int'(NSYS); t++) begin
          m = MW'(kk) + MW'(SHIFTS[lane_row[l]*NSYS+t]);
          if (m >= MW'(A)) m = m - MW'(A);
          x[t] = p_work[int'(COLS[lane_row[l]*NSYS+t] * A) + int'(m)];
        end
        if (lane_row[l] != '0) s_prev = q_reg[(int'(lane_row[l]) - 1) * int'(A) + int'(kk)];
      end
    end

    xor_processor #(.NIN(NSYS)) u_xor (.x(x), .s_prev(s_prev), .q(lane_q[l]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_buf   <= '0;
      in_cnt   <= '0;
      in_full  <= 1'b0;
      p_work   <= '0;
      q_reg    <= '0;
      busy     <= 1'b0;
      cyc      <= '0;
      row0     <= '0;
      k0       <= '0;
      cw_valid <= 1'b0;
    end else begin
      // message loading
      if (msg_valid && msg_ready) begin
        in_buf[in_cnt * P +: P] <= msg_data;
        if (in_cnt == WW'(WORDS - 1)) begin
          in_cnt  <= '0;
          in_full <= 1'b1;
        end else begin
          in_cnt <= in_cnt + WW'(1);
        end
      end

      // codeword hand-off
      if (cw_valid && cw_ready) cw_valid <= 1'b0;

      // encoding
      if (!busy) begin
        if (in_full && (!cw_valid || cw_ready)) begin
          p_work  <= in_buf;
          in_full <= 1'b0;
          busy    <= 1'b1;
          cyc     <= '0;
          row0    <= '0;
          k0      <= '0;
        end
      end else begin
        for (int l = 0; l < int'(P); l++)
          if (lane_ok[l]) q_reg[int'(lane_row[l]) * int'(A) + int'(lane_k[l])] <= lane_q[l];
        if (k0 + KW'(P) >= KW'(A)) begin
          k0   <= k0 + KW'(P) - KW'(A);
          row0 <= row0 + RW'(1);
        end else begin
          k0 <= k0 + KW'(P);
        end
        if (cyc == CW'(ENC_CY - 1)) begin
          busy     <= 1'b0;
          cw_valid <= 1'b1;
        end
        cyc <= cyc + CW'(1);
      end
    end
  end

endmodule
