// Input scheduling buffer: turns four parallel sample streams into serial
// per-stream blocks for a single butterfly per stage.
// Streams A-D deliver sample n of OFDM symbol j in the same cycle, n = 0..N-1.
// The buffer outputs, for each stream in turn (A of symbol j, then B, C and D
// of symbol j), N/4 cycles in which lane l carries x[l*N/4 + t], t = 0..N/4-1.
// Twelve banks of N/4 words hold the first three quarters of every stream:
// banks a0..a2 and a 3x3 array M[r][c] (rows = b, c, d). The symbol period is
// split in four blocks of N/4 cycles, p = 0..3:
//  * block 3: banks a0..a2 deliver stream A quarters 0..2 on lanes 0..2, the
//    live A input is lane 3, and a0..a2 are refilled with the live quarter 3
//    of streams B, C, D;
//  * block p < 3: stream p+1 (B, C or D) of the previous symbol leaves; its
//    quarter 3 comes from bank a_p, which is refilled with the live quarter p
//    of stream A, and its quarters 0..2 come from one line of M, which is
//    refilled with the live quarter p of B, C, D.
// The line of M alternates between symbols: a row (b_p, c_p, d_p as written
// in row p) when the previous symbol was stored column-wise, and column p when
// it was stored row-wise, so the b/c/d grouping is transposed every symbol
// while the a grouping stays. Each bank access is a write-after-read at the
// same address t, so all twelve banks stay full and no extra buffer is needed.
// start is high in the cycle that carries sample 0 of the first symbol; from
// then on one sample per stream and cycle is expected without gaps. The first
// output block (stream A) starts 3N/4 + 1 cycles after start.
// The bank grouping, the write-after-read access and the per-symbol
// transposition follow the design; the start handshake, the one-cycle read
// latency and the storage of 8-bit input words are this implementation's.
module input_buffer (
  input  logic                               clk,
  input  logic                               rst_n,
  input  fft_pkg::len_e                      len,
  input  logic                               start,
  input  logic signed [fft_pkg::IN_W-1:0]    in_re  [4],
  input  logic signed [fft_pkg::IN_W-1:0]    in_im  [4],
  output logic signed [fft_pkg::DATA_W-1:0]  out_re [4],
  output logic signed [fft_pkg::DATA_W-1:0]  out_im [4],
  output fft_pkg::tag_t                      out_tag
);
  import fft_pkg::*;

  localparam int unsigned DEPTH = NMAX / 4;
  localparam int unsigned AW    = $clog2(DEPTH);
  localparam int unsigned W     = 2 * IN_W;

  // ---------------- scheduling control ----------------
  logic          running, sym0, tr;
  logic [1:0]    blk;
  logic [AW-1:0] t;
  logic [AW-1:0] last_t;

  assign last_t = AW'((32'd1 << len_log2(len)) / 4 - 1);

  // current position (start restarts at block 0, address 0)
  logic          act;
  logic [1:0]    blk_c;
  logic [AW-1:0] t_c;
  logic          tr_c, sym0_c;
  always_comb begin
    act    = running || start;
    blk_c  = start ? 2'd0 : blk;
    t_c    = start ? '0   : t;
    tr_c   = start ? 1'b1 : tr;     // symbol 0 is written row-wise
    sym0_c = start ? 1'b1 : sym0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      blk     <= '0;
      t       <= '0;
      tr      <= 1'b1;
      sym0    <= 1'b1;
    end else if (act) begin
      running <= 1'b1;
      if (t_c == last_t) begin
        t   <= '0;
        blk <= blk_c + 2'd1;
        if (blk_c == 2'd3) begin
          tr   <= ~tr_c;
          sym0 <= 1'b0;
        end else begin
          tr   <= tr_c;
          sym0 <= sym0_c;
        end
      end else begin
        t    <= t_c + 1'b1;
        blk  <= blk_c;
        tr   <= tr_c;
        sym0 <= sym0_c;
      end
    end
  end

  // ---------------- banks ----------------
  logic [W-1:0] live [4];
  for (genvar s = 0; s < 4; s++) begin : g_live
    assign live[s] = {in_re[s], in_im[s]};
  end

  logic         a_en [3];
  logic [W-1:0] a_wd [3];
  logic [W-1:0] a_rd [3];
  logic         m_en [3][3];
  logic [W-1:0] m_wd [3][3];
  logic [W-1:0] m_rd [3][3];

  always_comb begin
    for (int q = 0; q < 3; q++) begin
      a_en[q] = act && (blk_c == 2'd3 || blk_c == 2'(q));
      a_wd[q] = (blk_c == 2'd3) ? live[q+1] : live[0];
      for (int c = 0; c < 3; c++) begin
        // line used in block p: column p (tr = 1) or row p (tr = 0)
        m_en[q][c] = act && (blk_c != 2'd3) &&
                     (tr_c ? (blk_c == 2'(c)) : (blk_c == 2'(q)));
        // position inside the line selects the stream: row q, column c
        m_wd[q][c] = tr_c ? live[q+1] : live[c+1];
      end
    end
  end

  for (genvar q = 0; q < 3; q++) begin : g_a
    dp_ram #(.W(W), .DEPTH(DEPTH)) u_a (
      .clk, .en(a_en[q]), .we(1'b1), .addr(t_c), .wdata(a_wd[q]), .rdata(a_rd[q]));
    for (genvar c = 0; c < 3; c++) begin : g_m
      dp_ram #(.W(W), .DEPTH(DEPTH)) u_m (
        .clk, .en(m_en[q][c]), .we(1'b1), .addr(t_c), .wdata(m_wd[q][c]),
        .rdata(m_rd[q][c]));
    end
  end

  // ---------------- read-out routing (one cycle after the access) ----------
  logic [1:0]   blk_q;
  logic         tr_q;
  logic [W-1:0] live0_q;
  tag_t         tag_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      blk_q   <= '0;
      tr_q    <= 1'b0;
      live0_q <= '0;
      tag_q   <= '0;
    end else begin
      blk_q        <= blk_c;
      tr_q         <= tr_c;
      live0_q      <= live[0];
      tag_q.valid  <= act && (!sym0_c || blk_c == 2'd3);
      tag_q.first  <= act && (t_c == '0);
      tag_q.stream <= (blk_c == 2'd3) ? 2'd0 : blk_c + 2'd1;
    end
  end

  logic [W-1:0] lane [4];
  always_comb begin
    for (int q = 0; q < 3; q++) begin
      if (blk_q == 2'd3)  lane[q] = a_rd[q];
      else if (tr_q)      lane[q] = m_rd[q][blk_q];
      else                lane[q] = m_rd[blk_q][q];
    end
    case (blk_q)
      2'd0:    lane[3] = a_rd[0];
      2'd1:    lane[3] = a_rd[1];
      2'd2:    lane[3] = a_rd[2];
      default: lane[3] = live0_q;
    endcase
    for (int l = 0; l < 4; l++) begin
      out_re[l] = DATA_W'($signed(lane[l][W-1:IN_W]));
      out_im[l] = DATA_W'($signed(lane[l][IN_W-1:0]));
    end
  end
  assign out_tag = tag_q;

endmodule
