// Five-channel MPEG-2 layer II audio encoder: three cooperating modules.
//
// The encoder is a heterogeneous multiprocessor. The DSP module (an ASIP) is
// the master: it runs the program that the host loads and commands two
// hardwired accelerators.
//   FFT module  1,024-point FFT plus power spectrum for each of the seven
//               psychoacoustic channels, written into the bank memory.
//   AF module   32-band analysis filterbank for the five input channels,
//               written into the shared subband memory.
// The two-bank spectrum memory lets the FFT module fill one bank while the DSP
// evaluates the psychoacoustic model on the other, so FFT and psychoacoustic
// model run as a two-stage pipeline; the AF module runs in parallel with both.
// Once filtering is done the DSP reads the subband memory for matrixing,
// scale-factor coding, bit allocation, quantization and packing, and emits
// the bitstream through bs_valid/bs_data/bs_ready.
//
// The module split, the master/command relationship, the bank memory and the
// shared subband memory follow the architecture. The separate PCM input
// streams of the two accelerators, the coefficient port of the AF module and
// the program-load port are this implementation's choices.
//
// Ports: clk, active-low asynchronous rst_n; program load (prog_*) and run /
// halted; per-accelerator PCM input streams (valid/ready); AF window
// coefficient load (coef_*); output bitstream words (valid/ready).
module audio_encoder_top
  import enc_pkg::*;
#(
  parameter int PDEPTH = 1024,
  localparam int PAW   = $clog2(PDEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  // DSP program load and run control
  input  logic              prog_we,
  input  logic [PAW-1:0]    prog_addr,
  input  logic [31:0]       prog_data,
  input  logic              run,
  output logic              halted,
  // PCM input to the FFT module
  input  logic              fft_in_valid,
  input  logic [PCM_W-1:0]  fft_in_data,
  output logic              fft_in_ready,
  // PCM input to the AF module
  input  logic              af_in_valid,
  input  logic [PCM_W-1:0]  af_in_data,
  output logic              af_in_ready,
  // AF window coefficients
  input  logic              coef_we,
  input  logic [8:0]        coef_addr,
  input  logic [COEF_W-1:0] coef_data,
  // output bitstream
  output logic              bs_valid,
  output logic [31:0]       bs_data,
  input  logic              bs_ready
);
  localparam int BANK_AW = $clog2(SPEC_LINES);
  localparam int SB_AW   = $clog2(SB_DEPTH);

  // DSP <-> FFT / AF commands
  logic       fft_start, fft_busy, fft_done;
  logic       af_start, af_busy, af_done;
  logic [2:0] af_ch;
  logic [5:0] af_nblk;

  // bank memory
  logic               bank_swap, bank_wr_bank;
  logic               spec_we;
  logic [BANK_AW-1:0] spec_addr, bank_addr;
  logic [SPEC_W-1:0]  spec_data, bank_rdata;

  // subband memory
  logic             af_sb_we, dsp_sb_we;
  logic [SB_AW-1:0] af_sb_addr, dsp_sb_addr;
  logic [SB_W-1:0]  af_sb_data, dsp_sb_wdata, dsp_sb_rdata;

  dsp_module #(.PDEPTH(PDEPTH)) u_dsp (
    .clk, .rst_n,
    .prog_we, .prog_addr, .prog_data, .run, .halted,
    .fft_start, .fft_busy,
    .af_start, .af_ch, .af_nblk, .af_busy,
    .bank_swap, .bank_addr, .bank_rdata,
    .sb_we(dsp_sb_we), .sb_addr(dsp_sb_addr), .sb_wdata(dsp_sb_wdata), .sb_rdata(dsp_sb_rdata),
    .bs_valid, .bs_data, .bs_ready);

  fft_module u_fft (
    .clk, .rst_n,
    .start(fft_start), .busy(fft_busy), .done(fft_done),
    .in_valid(fft_in_valid), .in_data(fft_in_data), .in_ready(fft_in_ready),
    .spec_we, .spec_addr, .spec_data);

  af_module u_af (
    .clk, .rst_n,
    .start(af_start), .cmd_ch(af_ch), .cmd_nblk(af_nblk), .busy(af_busy), .done(af_done),
    .in_valid(af_in_valid), .in_data(af_in_data), .in_ready(af_in_ready),
    .coef_we, .coef_addr, .coef_data,
    .sb_we(af_sb_we), .sb_addr(af_sb_addr), .sb_data(af_sb_data));

  bank_memory u_bank (
    .clk, .rst_n,
    .swap(bank_swap), .wr_bank(bank_wr_bank),
    .wr_en(spec_we), .wr_addr(spec_addr), .wr_data(spec_data),
    .rd_addr(bank_addr), .rd_data(bank_rdata));

  subband_memory u_sbmem (
    .clk,
    .a_we(af_sb_we), .a_addr(af_sb_addr), .a_wdata(af_sb_data),
    .b_we(dsp_sb_we), .b_addr(dsp_sb_addr), .b_wdata(dsp_sb_wdata), .b_rdata(dsp_sb_rdata));

  // the DSP must not swap the banks while the FFT module is still writing
  assert property (@(posedge clk) disable iff (!rst_n) bank_swap |-> !spec_we);
endmodule
