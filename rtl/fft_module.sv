// FFT module: 1,024-point FFT and power spectrum for the psychoacoustic model.
//
// On a start command the module accepts N real PCM samples from its input
// stream (valid/ready) and stores them in bit-reversed order in an internal
// complex working memory. It then runs log2(N) radix-2 decimation-in-time
// stages in place, one butterfly at a time, under a finite-state machine:
//   RD_A, RD_B         read the two operands (registered memory read)
//   M0..M3             four products on the single multiplier:
//                      Tr = Br*cos + Bi*sin   (adder)
//                      Ti = Bi*cos - Br*sin   (subtractor)
//   WR_A, WR_B         A' = (A+T)/2 and B' = (A-T)/2 on two adder/subtractors
// Each stage halves its results, so the output equals X(k)/N and cannot
// overflow. Finally, for k = 0..N/2-1, the same multiplier forms
// Re^2 + Im^2 and the module writes it as an unsigned 32-bit power line to the
// bank memory (spec_we/spec_addr/spec_data), then pulses done.
//
// Following the architecture: N = 1,024, one multiplier, one adder, one
// subtractor and two adder/subtractors, FSM control, 512-line output to the
// bank memory, completion within 45,000 cycles (about 44,050 with an unstalled
// input stream). This implementation's choices: radix-2 DIT with per-stage
// scaling, 24-bit working data (PCM << 8), 16-bit Q2.14 twiddles computed at
// elaboration, truncating arithmetic, output scale |X(k)/N|^2 in PCM units
// squared, no analysis window (the input stream is expected to be windowed).
//
// Interface timing: start is sampled in IDLE; busy is high from the cycle after
// start until done; done is a one-cycle pulse after the last spectrum write.
module fft_module
  import enc_pkg::*;
#(
  parameter int N    = FFT_N,
  parameter int DW   = 24,
  parameter int TW_W = 16,
  localparam int LOG2N = $clog2(N),
  localparam int AW    = LOG2N,
  localparam int SAW   = LOG2N - 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  output logic             busy,
  output logic             done,
  // input samples
  input  logic             in_valid,
  input  logic [PCM_W-1:0] in_data,
  output logic             in_ready,
  // power spectrum out, to the bank memory
  output logic             spec_we,
  output logic [SAW-1:0]   spec_addr,
  output logic [SPEC_W-1:0] spec_data
);
  localparam int TW_ONE = 2 ** (TW_W - 2);  // 1.0 in Q2.(TW_W-2)

  // the power word is taken from the product bits [2*(DW-PCM_W) +: SPEC_W]
  if (2 * (DW - PCM_W) + SPEC_W > 2 * DW) begin : g_bad_width
    $error("fft_module: DW too small for the power output");
  end

  typedef logic signed [TW_W-1:0] tw_t [N/2];

  function automatic tw_t make_cos();
    tw_t t;
    for (int k = 0; k < N / 2; k++)
      t[k] = TW_W'($rtoi($floor(real'(TW_ONE) * $cos(2.0 * 3.14159265358979323846 * real'(k) / real'(N)) + 0.5)));
    return t;
  endfunction

  function automatic tw_t make_sin();
    tw_t t;
    for (int k = 0; k < N / 2; k++)
      t[k] = TW_W'($rtoi($floor(real'(TW_ONE) * $sin(2.0 * 3.14159265358979323846 * real'(k) / real'(N)) + 0.5)));
    return t;
  endfunction

  localparam tw_t COS_TAB = make_cos();
  localparam tw_t SIN_TAB = make_sin();

  function automatic logic [AW-1:0] bitrev(input logic [AW-1:0] v);
    for (int i = 0; i < AW; i++) bitrev[i] = v[AW-1-i];
  endfunction

  typedef enum logic [3:0] {
    S_IDLE, S_LOAD, S_RD_A, S_RD_B, S_M0, S_M1, S_M2, S_M3, S_WR_A, S_WR_B,
    S_PW_RD, S_PW_M0, S_PW_M1, S_PW_WR, S_DONE
  } state_e;

  state_e state;

  // working memory
  logic signed [DW-1:0] mem_re [N];
  logic signed [DW-1:0] mem_im [N];
  logic signed [DW-1:0] q_re, q_im;       // registered read data
  logic [AW-1:0]        rd_addr;
  logic                 rd_en;
  logic                 wr_en;
  logic [AW-1:0]        wr_addr;
  logic signed [DW-1:0] wr_re, wr_im;

  // counters
  logic [AW-1:0]        cnt;              // load / power-line counter
  logic [$clog2(LOG2N)-1:0] stage;
  logic [SAW-1:0]       bfly;

  // butterfly registers
  logic signed [DW-1:0] a_re, a_im, b_re, b_im;
  logic signed [TW_W-1:0] w_c, w_s;
  logic signed [2*DW-1:0] acc_r, acc_i;

  // the one multiplier
  logic signed [DW-1:0]   mul_a, mul_b;
  logic signed [2*DW-1:0] mul_p;

  // butterfly addressing
  logic [AW-1:0] addr_a, addr_b, half;
  logic [SAW-1:0] tw_idx;

  always_comb begin
    half   = AW'(1) << stage;
    addr_a = ((AW'(bfly) >> stage) << (stage + 1)) | (AW'(bfly) & (half - 1'b1));
    addr_b = addr_a | half;
    tw_idx = SAW'((AW'(bfly) & (half - 1'b1)) << (LOG2N - 1 - int'(stage)));
  end

  logic signed [DW-1:0]   t_re, t_im;
  logic signed [DW:0]     sum_re, sum_im, dif_re, dif_im;  // bit 0 is dropped by the /2 scaling
  always_comb begin
    t_re   = DW'(acc_r >>> (TW_W - 2));
    t_im   = DW'(acc_i >>> (TW_W - 2));
    sum_re = (DW+1)'(a_re) + (DW+1)'(t_re);
    sum_im = (DW+1)'(a_im) + (DW+1)'(t_im);
    dif_re = (DW+1)'(a_re) - (DW+1)'(t_re);
    dif_im = (DW+1)'(a_im) - (DW+1)'(t_im);
  end

  // multiplier operand selection
  always_comb begin
    mul_a = '0;
    mul_b = '0;
    unique case (state)
      S_M0:    begin mul_a = q_re; mul_b = DW'(w_c); end   // Br*cos
      S_M1:    begin mul_a = b_im; mul_b = DW'(w_s); end   // Bi*sin
      S_M2:    begin mul_a = b_im; mul_b = DW'(w_c); end   // Bi*cos
      S_M3:    begin mul_a = b_re; mul_b = DW'(w_s); end   // Br*sin
      S_PW_M0: begin mul_a = q_re; mul_b = q_re;     end
      S_PW_M1: begin mul_a = b_im; mul_b = b_im;     end
      default: ;
    endcase
    mul_p = mul_a * mul_b;
  end

  // memory
  always_comb begin
    rd_en   = 1'b0;
    rd_addr = '0;
    wr_en   = 1'b0;
    wr_addr = '0;
    wr_re   = '0;
    wr_im   = '0;
    unique case (state)
      S_LOAD:  begin
        wr_en   = in_valid;
        wr_addr = bitrev(cnt);
        wr_re   = DW'($signed(in_data)) <<< (DW - PCM_W);
      end
      S_RD_A:  begin rd_en = 1'b1; rd_addr = addr_a; end
      S_RD_B:  begin rd_en = 1'b1; rd_addr = addr_b; end
      S_WR_A:  begin wr_en = 1'b1; wr_addr = addr_a; wr_re = sum_re[DW:1]; wr_im = sum_im[DW:1]; end
      S_WR_B:  begin wr_en = 1'b1; wr_addr = addr_b; wr_re = dif_re[DW:1]; wr_im = dif_im[DW:1]; end
      S_PW_RD: begin rd_en = 1'b1; rd_addr = cnt; end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (wr_en) begin
      mem_re[wr_addr] <= wr_re;
      mem_im[wr_addr] <= wr_im;
    end
    if (rd_en) begin
      q_re <= mem_re[rd_addr];
      q_im <= mem_im[rd_addr];
    end
  end

  // control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cnt       <= '0;
      stage     <= '0;
      bfly      <= '0;
      a_re      <= '0;
      a_im      <= '0;
      b_re      <= '0;
      b_im      <= '0;
      w_c       <= '0;
      w_s       <= '0;
      acc_r     <= '0;
      acc_i     <= '0;
      done      <= 1'b0;
      spec_we   <= 1'b0;
      spec_addr <= '0;
      spec_data <= '0;
    end else begin
      done    <= 1'b0;
      spec_we <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          cnt   <= '0;
          state <= S_LOAD;
        end
        S_LOAD: if (in_valid) begin
          cnt <= cnt + 1'b1;
          if (cnt == AW'(N - 1)) begin
            stage <= '0;
            bfly  <= '0;
            state <= S_RD_A;
          end
        end
        S_RD_A: begin
          w_c   <= COS_TAB[tw_idx];
          w_s   <= SIN_TAB[tw_idx];
          state <= S_RD_B;
        end
        S_RD_B: begin
          a_re  <= q_re;
          a_im  <= q_im;
          state <= S_M0;
        end
        S_M0: begin
          b_re  <= q_re;
          b_im  <= q_im;
          acc_r <= mul_p;
          state <= S_M1;
        end
        S_M1: begin acc_r <= acc_r + mul_p; state <= S_M2; end
        S_M2: begin acc_i <= mul_p;         state <= S_M3; end
        S_M3: begin acc_i <= acc_i - mul_p; state <= S_WR_A; end
        S_WR_A: state <= S_WR_B;
        S_WR_B: begin
          bfly <= bfly + 1'b1;
          if (bfly == SAW'(N / 2 - 1)) begin
            if (int'(stage) == LOG2N - 1) begin
              cnt   <= '0;
              state <= S_PW_RD;
            end else begin
              stage <= stage + 1'b1;
              state <= S_RD_A;
            end
          end else begin
            state <= S_RD_A;
          end
        end
        S_PW_RD: state <= S_PW_M0;
        S_PW_M0: begin
          b_im  <= q_im;
          acc_r <= mul_p;
          state <= S_PW_M1;
        end
        S_PW_M1: begin acc_r <= acc_r + mul_p; state <= S_PW_WR; end
        S_PW_WR: begin
          spec_we   <= 1'b1;
          spec_addr <= SAW'(cnt);
          spec_data <= acc_r[2*(DW-PCM_W) +: SPEC_W];
          cnt       <= cnt + 1'b1;
          state     <= (cnt == AW'(N / 2 - 1)) ? S_DONE : S_PW_RD;
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
  assign in_ready = (state == S_LOAD);
endmodule
