// AF module: 32-band polyphase analysis filterbank for five input channels.
//
// A command (start, cmd_ch, cmd_nblk) filters cmd_nblk consecutive blocks of
// one channel. Per block the FSM
//   S_IN    takes 32 new PCM samples from the input stream into that channel's
//           512-sample circular history (X[0] is the newest sample),
//   S_WIN   windows and folds: Y[i] = sum_{j=0..7} C[i+64j] * X[i+64j];
//           MAC 0 computes Y[i] while MAC 1 computes Y[i+32], 8 cycles each,
//   S_ZCP   folds the 64 partial sums into the input of a 32-point cosine
//           transform. The standard matrixing
//             S[k] = sum_{i=0..63} cos((2k+1)(i-16)pi/64) * Y[i]
//           equals
//             S[k] = sum_{m=0..31} cos((2k+1)m pi/64) * Z[m],
//             Z[0] = Y[16], Z[m] = Y[16+m] + Y[16-m] (m = 1..16),
//             Z[m] = Y[16+m] - Y[80-m] (m = 17..31), Y[48] drops out,
//           by the evenness of the cosine and cos(pi(2k+1) - a) = -cos(a),
//   S_PRE   runs the input additions of Lee's fast DCT, in iterative form:
//           for blocks of M = 32, 16, 8, 4 words, the even inputs move to the
//           lower half and a[2n+1] + a[2n-1] (a[1] for n = 0) to the upper half,
//           one word per cycle (128 cycles),
//   S_BF    runs the five butterfly levels M = 2, 4, ..., 32: with g from the
//           lower and h from the upper half of a block, t = h / (2cos((2k+1)
//           pi/(2M))) on MAC 0 and out[k] = g + t, out[M-1-k] = g - t. Each
//           level takes 16 multiplications, 80 for the transform, pipelined
//           at one butterfly per cycle (17 cycles per level),
//   S_WR    writes the 32 subband samples to the shared subband memory at
//           channel*1152 + block*32 + k.
// One block takes 567 cycles with an unstalled input, so a 36-block frame of
// five channels takes 102,060 cycles, well inside the
// 350,000-cycle budget of the architecture.
//
// Following the architecture: hardwired FSM control, two multiply-accumulate
// units (both used for windowing, one for the DCT), 32 equal subbands, five
// channels, output into the shared memory, and the matrixing computed with
// Lee's fast DCT (80 multiplications per block). This implementation's
// choices: the 512 window coefficients are written through the coef port (19
// fractional bits, so the full MPEG window range fits in 16 bits) and are
// shared by all channels; the 80 butterfly factors are generated at
// elaboration with 24 fractional bits; Y carries 8 and the DCT scratch words
// 16 fractional bits; the two scratch banks alternate between levels;
// subband samples are PCM units with 8 fractional bits, saturated to 24
// bits; arithmetic truncates.
//
// After reset the module spends NCH*512 cycles (busy high) clearing the sample
// histories, so filtering starts from silence as the standard encoder does.
// Interface timing: start is sampled when idle; busy stays high until done, a
// one-cycle pulse after the last subband write; in_ready is high only in S_IN.
module af_module
  import enc_pkg::*;
#(
  parameter int NCH       = N_IN_CH,
  parameter int TAPS      = AF_TAPS,
  parameter int NB        = N_SUBBANDS,
  parameter int FRAME     = FRAME_LEN,
  parameter int SB_AW     = $clog2(SB_DEPTH),
  parameter int COEF_FRAC = 19,
  localparam int CHW      = $clog2(NCH),
  localparam int TW       = $clog2(TAPS),
  localparam int NBW      = $clog2(NB),
  localparam int BLKW     = $clog2(FRAME / NB + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  // command from the DSP module
  input  logic               start,
  input  logic [CHW-1:0]     cmd_ch,
  input  logic [BLKW-1:0]    cmd_nblk,
  output logic               busy,
  output logic               done,
  // input samples of channel cmd_ch
  input  logic               in_valid,
  input  logic [PCM_W-1:0]   in_data,
  output logic               in_ready,
  // window coefficient load
  input  logic               coef_we,
  input  logic [TW-1:0]      coef_addr,
  input  logic [COEF_W-1:0]  coef_data,
  // subband samples out, to the shared memory
  output logic               sb_we,
  output logic [SB_AW-1:0]   sb_addr,
  output logic [SB_W-1:0]    sb_data
);
  localparam int YW    = 32;           // Y word: PCM units, 8 fractional bits
  localparam int DW    = 48;           // DCT scratch word, 16 fractional bits
  localparam int XFRAC = 8;            // extra fractional bits of the DCT scratch
  localparam int MW    = 32;           // MAC coefficient operand
  localparam int LFRAC = 24;           // fractional bits of the DCT butterfly factors
  localparam int ACC_W = 80;
  localparam int NY    = 2 * NB;       // 64 partial sums
  localparam int NFOLD = TAPS / NY;    // 8 terms per partial sum
  localparam int YIW   = $clog2(NY);
  localparam int FW    = $clog2(NFOLD);

  // Butterfly factors of the fast DCT: 1 / (2 cos((2k+1) pi / (2M))) for the
  // levels M = 2, 4, 8, 16, 32 (lvl = log2(M) - 1) and k < M/2, at 16*lvl + k
  typedef logic signed [MW-1:0] lee_t [80];
  function automatic lee_t make_lee();
    lee_t t;
    for (int l = 0; l < 5; l++)
      for (int k = 0; k < 16; k++)
        t[16 * l + k] = (k < (1 << l))
          ? MW'($rtoi($floor(real'(2 ** LFRAC) /
                (2.0 * $cos(3.14159265358979323846 * real'(2 * k + 1) / real'(4 << l))) + 0.5)))
          : '0;
    return t;
  endfunction
  localparam lee_t LEE_TAB = make_lee();

  typedef enum logic [3:0] { S_CLR, S_IDLE, S_IN, S_WIN, S_WIN_END, S_ZCP, S_PRE, S_BF, S_WR, S_DONE } state_e;
  state_e state;

  // storage
  logic signed [PCM_W-1:0]  hist [NCH*TAPS];
  logic [TW-1:0]            wptr [NCH];
  logic signed [COEF_W-1:0] coef [TAPS];
  logic signed [YW-1:0]     y [NY];

  // command registers and counters
  logic [CHW-1:0]  ch;
  logic [BLKW-1:0] nblk, blk;
  logic [NBW-1:0]  icnt;        // input sample counter / windowing index i
  logic [FW-1:0]   jcnt;        // windowing fold index j
  logic [NBW-1:0]  mcnt;        // DCT word index (Z copy, pre-add, write-out)
  logic [2:0]      lvl;         // DCT level
  logic [NBW-1:0]  bcnt;        // butterfly index within a level, 0..16
  logic            first;       // first MAC step of a windowing output
  logic            cur;         // scratch bank holding the current DCT level
  logic signed [DW-1:0] s [2][NB];  // DCT scratch, ping-pong between levels
  // butterfly pipeline: the product of one cycle is used in the next
  logic                 bf_pend;
  logic [NBW-1:0]       bf_lo, bf_hi;
  logic signed [DW-1:0] bf_g;
  logic [$clog2(NCH*TAPS)-1:0] clr_idx;  // history clearing after reset

  // MACs
  logic                    mac_load;
  logic signed [DW-1:0]    mac0_a, mac1_a;
  logic signed [MW-1:0]    mac0_b, mac1_b;
  logic signed [ACC_W-1:0] mac0_acc, mac1_acc;

  mac_unit #(.A_W(DW), .B_W(MW), .ACC_W(ACC_W)) u_mac0 (
    .clk, .rst_n, .load(mac_load), .en(state == S_WIN || (state == S_BF && bcnt != NBW'(NB / 2))),
    .init('0), .a(mac0_a), .b(mac0_b), .acc(mac0_acc));
  mac_unit #(.A_W(DW), .B_W(MW), .ACC_W(ACC_W)) u_mac1 (
    .clk, .rst_n, .load(mac_load), .en(state == S_WIN),
    .init('0), .a(mac1_a), .b(mac1_b), .acc(mac1_acc));

  // history addressing: X[i] = hist[ch][wptr - 1 - i]
  logic [TW-1:0] tap0, tap1;
  logic [TW-1:0] x0_idx, x1_idx;
  always_comb begin
    tap0   = TW'({jcnt, 1'b0, icnt});   // i + 64j
    tap1   = TW'({jcnt, 1'b1, icnt});   // i + 32 + 64j
    x0_idx = wptr[ch] - 1'b1 - tap0;
    x1_idx = wptr[ch] - 1'b1 - tap1;
  end

  // DCT input folding: Z[0] = Y[16], Z[m] = Y[16+m] + Y[16-m] for m = 1..16,
  // Z[m] = Y[16+m] - Y[80-m] for m = 17..31 (Y[48] has a zero coefficient)
  logic signed [YW-1:0] z;
  logic [YIW-1:0]       z_hi, z_lo;
  always_comb begin
    z_hi = YIW'(NB / 2 + int'(mcnt));
    z_lo = (int'(mcnt) <= NB / 2) ? YIW'(NB / 2 - int'(mcnt)) : YIW'(5 * NB / 2 - int'(mcnt));
    if (mcnt == '0)                      z = y[z_hi];
    else if (int'(mcnt) <= NB / 2)       z = y[z_hi] + y[z_lo];
    else                                 z = y[z_hi] - y[z_lo];
  end

  // pre-add level: M = 32 >> lvl; output j of block o = j & ~(M-1), r = j % M:
  //   r <  M/2: a[o + 2r]
  //   r >= M/2: a[o + 2n + 1] + a[o + 2n - 1], n = r - M/2 (second term 0 for n = 0)
  logic [NBW:0]         pre_m, pre_o, pre_r, pre_n;
  logic signed [DW-1:0] pre_v;
  always_comb begin
    pre_m = (NBW+1)'(NB >> lvl);
    pre_o = (NBW+1)'(mcnt) & ~(pre_m - 1'b1);
    pre_r = (NBW+1)'(mcnt) & (pre_m - 1'b1);
    pre_n = pre_r - (pre_m >> 1);
    if (pre_r < (pre_m >> 1))
      pre_v = s[cur][NBW'(pre_o + (pre_r << 1))];
    else if (pre_n == '0)
      pre_v = s[cur][NBW'(pre_o + 1'b1)];
    else
      pre_v = s[cur][NBW'(pre_o + (pre_n << 1) + 1'b1)] + s[cur][NBW'(pre_o + (pre_n << 1) - 1'b1)];
  end

  // butterfly level: M = 2 << lvl, butterfly bcnt -> block o, index k
  //   g = a[o+k], h = a[o+M/2+k]; a'[o+k] = g + h*f, a'[o+M-1-k] = g - h*f
  logic [NBW:0]   bf_m;
  logic [NBW-1:0] bf_o, bf_k;
  always_comb begin
    bf_m = (NBW+1)'(2) << lvl;
    bf_k = bcnt & NBW'((bf_m >> 1) - 1'b1);
    bf_o = NBW'((bcnt >> lvl) << (lvl + 1));
  end
  logic signed [DW-1:0] bf_t;
  assign bf_t = DW'(mac0_acc >>> LFRAC);

  always_comb begin
    mac_load = (state == S_BF) ? 1'b1 : first;
    if (state == S_WIN) begin
      mac0_a = DW'(hist[CHW'(ch) * TAPS + int'(x0_idx)]);
      mac1_a = DW'(hist[CHW'(ch) * TAPS + int'(x1_idx)]);
      mac0_b = MW'(coef[tap0]);
      mac1_b = MW'(coef[tap1]);
    end else begin
      mac0_a = s[cur][bf_o + NBW'(bf_m >> 1) + bf_k];
      mac1_a = '0;
      mac0_b = LEE_TAB[{lvl, bf_k[3:0]}];
      mac1_b = '0;
    end
  end

  // result scaling
  function automatic logic signed [YW-1:0] win_scale(input logic signed [ACC_W-1:0] a);
    return YW'(a >>> (COEF_FRAC - 8));   // X*C (frac COEF_FRAC) -> frac 8
  endfunction
  function automatic logic signed [SB_W-1:0] sat_sb(input logic signed [DW-1:0] v);
    if (v > DW'(2 ** (SB_W - 1) - 1))          return {1'b0, {(SB_W-1){1'b1}}};
    else if (v < -DW'(2 ** (SB_W - 1)))        return {1'b1, {(SB_W-1){1'b0}}};
    else                                       return SB_W'(v);
  endfunction

  function automatic logic [SB_AW-1:0] sb_address(input logic [CHW-1:0] c,
                                                  input logic [BLKW-1:0] b,
                                                  input logic [NBW-1:0] k);
    return SB_AW'(int'(c) * FRAME + int'(b) * NB + int'(k));
  endfunction

  always_ff @(posedge clk) begin
    if (coef_we) coef[coef_addr] <= coef_data;
    if (state == S_CLR)
      hist[clr_idx] <= '0;
    else if (state == S_IN && in_valid)
      hist[CHW'(ch) * TAPS + int'(wptr[ch])] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_CLR;
      clr_idx   <= '0;
      ch        <= '0;
      nblk      <= '0;
      blk       <= '0;
      icnt      <= '0;
      jcnt      <= '0;
      mcnt      <= '0;
      lvl       <= '0;
      bcnt      <= '0;
      first     <= 1'b0;
      cur       <= 1'b0;
      bf_pend   <= 1'b0;
      bf_lo     <= '0;
      bf_hi     <= '0;
      bf_g      <= '0;
      for (int b = 0; b < 2; b++)
        for (int i = 0; i < NB; i++) s[b][i] <= '0;
      done      <= 1'b0;
      sb_we     <= 1'b0;
      sb_addr   <= '0;
      sb_data   <= '0;
      for (int c = 0; c < NCH; c++) wptr[c] <= '0;
      for (int i = 0; i < NY; i++) y[i] <= '0;
    end else begin
      done  <= 1'b0;
      sb_we <= 1'b0;
      unique case (state)
        S_CLR: begin
          clr_idx <= clr_idx + 1'b1;
          if (int'(clr_idx) == NCH * TAPS - 1) state <= S_IDLE;
        end
        S_IDLE: if (start && cmd_nblk != '0) begin
          ch    <= cmd_ch;
          nblk  <= cmd_nblk;
          blk   <= '0;
          icnt  <= '0;
          state <= S_IN;
        end
        S_IN: if (in_valid) begin
          wptr[ch] <= wptr[ch] + 1'b1;
          icnt     <= icnt + 1'b1;
          if (icnt == NBW'(NB - 1)) begin
            icnt  <= '0;
            jcnt  <= '0;
            first <= 1'b1;
            state <= S_WIN;
          end
        end
        S_WIN: begin
          first <= 1'b0;
          jcnt  <= jcnt + 1'b1;
          if (first && icnt != '0) begin
            y[YIW'(icnt) - 1'b1]         <= win_scale(mac0_acc);
            y[YIW'(icnt) + YIW'(NB) - 1'b1] <= win_scale(mac1_acc);
          end
          if (jcnt == FW'(NFOLD - 1)) begin
            first <= 1'b1;
            icnt  <= icnt + 1'b1;
            if (icnt == NBW'(NB - 1)) state <= S_WIN_END;
          end
        end
        S_WIN_END: begin
          y[NB - 1]  <= win_scale(mac0_acc);
          y[NY - 1]  <= win_scale(mac1_acc);
          mcnt  <= '0;
          cur   <= 1'b0;
          state <= S_ZCP;
        end
        // fold the 64 partial sums into the 32 inputs of the cosine transform
        S_ZCP: begin
          s[0][mcnt] <= DW'(z) <<< XFRAC;
          mcnt <= mcnt + 1'b1;
          if (mcnt == NBW'(NB - 1)) begin
            lvl   <= '0;
            state <= S_PRE;
          end
        end
        // fast DCT, pre-addition levels M = 32, 16, 8, 4
        S_PRE: begin
          s[~cur][mcnt] <= pre_v;
          mcnt <= mcnt + 1'b1;
          if (mcnt == NBW'(NB - 1)) begin
            cur <= ~cur;
            if (lvl == 3'd3) begin
              lvl     <= '0;
              bcnt    <= '0;
              bf_pend <= 1'b0;
              state   <= S_BF;
            end else begin
              lvl <= lvl + 1'b1;
            end
          end
        end
        // fast DCT, butterfly levels M = 2, 4, 8, 16, 32: one multiplication
        // per cycle, the two results of a butterfly written one cycle later
        S_BF: begin
          if (bf_pend) begin
            s[~cur][bf_lo] <= bf_g + bf_t;
            s[~cur][bf_hi] <= bf_g - bf_t;
          end
          if (bcnt == NBW'(NB / 2)) begin
            bf_pend <= 1'b0;
            bcnt    <= '0;
            cur     <= ~cur;
            if (lvl == 3'd4) begin
              mcnt  <= '0;
              state <= S_WR;
            end else begin
              lvl <= lvl + 1'b1;
            end
          end else begin
            bf_pend <= 1'b1;
            bf_g    <= s[cur][bf_o + bf_k];
            bf_lo   <= bf_o + bf_k;
            bf_hi   <= NBW'((NBW+1)'(bf_o) + bf_m - 1'b1 - (NBW+1)'(bf_k));
            bcnt    <= bcnt + 1'b1;
          end
        end
        S_WR: begin
          sb_we   <= 1'b1;
          sb_addr <= sb_address(ch, blk, mcnt);
          sb_data <= sat_sb(s[cur][mcnt] >>> XFRAC);
          mcnt    <= mcnt + 1'b1;
          if (mcnt == NBW'(NB - 1)) begin
            blk   <= blk + 1'b1;
            icnt  <= '0;
            state <= (blk + 1'b1 == nblk) ? S_DONE : S_IN;
          end
        end
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy     = (state != S_IDLE);
  assign in_ready = (state == S_IN);
endmodule
