// Shared constants and types of the five-channel MPEG-2 layer II audio encoder.
//
// Sizes marked "from the architecture" are fixed by the encoder organisation
// (1,024-point FFT, 512-line spectrum banks, 32 subbands, 1,152-sample frames,
// five input channels plus two matrixed channels, 8.8 dB and 32-bit linear
// number formats). Word widths of PCM input, FFT datapath and subband samples
// are this implementation's own choice.
package enc_pkg;

  // Frame organisation (from the architecture)
  localparam int FRAME_LEN    = 1152;  // samples per layer II frame
  localparam int N_SUBBANDS   = 32;    // equal-width analysis bands
  localparam int AF_TAPS      = 512;   // polyphase window length
  localparam int N_IN_CH      = 5;     // input channels filtered by the AF module
  localparam int N_SB_CH      = 7;     // 5 input + 2 matrixed (Lo, Ro) channels
  localparam int FFT_N        = 1024;  // psychoacoustic FFT length
  localparam int SPEC_LINES   = 512;   // words per spectrum bank
  localparam int SB_DEPTH     = FRAME_LEN * N_SB_CH; // 8,064 subband samples

  // Number formats (from the architecture)
  localparam int SPEC_W       = 32;    // linear power spectrum, unsigned
  localparam int DB_W         = 16;    // logarithmic value, signed 8.8

  // Implementation choices
  localparam int PCM_W        = 16;    // input sample width, two's complement
  localparam int SB_W         = 24;    // subband sample width, two's complement
  localparam int COEF_W       = 16;    // filter coefficient width, Q1.15

  // DSP instruction set (this implementation's own encoding)
  typedef enum logic [5:0] {
    OP_NOP   = 6'd0,  OP_HALT  = 6'd1,  OP_LDI   = 6'd2,  OP_LUI   = 6'd3,
    OP_ADD   = 6'd4,  OP_SUB   = 6'd5,  OP_AND   = 6'd6,  OP_OR    = 6'd7,
    OP_XOR   = 6'd8,  OP_SHL   = 6'd9,  OP_SRA   = 6'd10, OP_SRL   = 6'd11,
    OP_ADDI  = 6'd12, OP_MUL   = 6'd13, OP_MACLD = 6'd14, OP_MAC   = 6'd15,
    OP_MACRD = 6'd16, OP_LOG   = 6'd17, OP_POW   = 6'd18, OP_LDBK  = 6'd19,
    OP_LDSB  = 6'd20, OP_STSB  = 6'd21, OP_OUT   = 6'd22, OP_FFTGO = 6'd23,
    OP_AFGO  = 6'd24, OP_WAIT  = 6'd25, OP_SWAP  = 6'd26, OP_BEQ   = 6'd27,
    OP_BNE   = 6'd28, OP_BLT   = 6'd29, OP_JMP   = 6'd30
  } opcode_e;

  // Instruction word: [31:26] opcode, [25:22] rd, [21:18] ra, [17:14] rb,
  // [15:0] immediate. rb and the immediate overlap; an instruction uses one
  // or the other.
  localparam int DSP_NREG = 16;

  // Assemble a register-form instruction (op rd, ra, rb)
  function automatic logic [31:0] asm_r(opcode_e op, int rd, int ra, int rb);
    return {op, 4'(rd), 4'(ra), 4'(rb), 14'd0};
  endfunction

  // Assemble an immediate-form instruction (op rd, ra, imm)
  function automatic logic [31:0] asm_i(opcode_e op, int rd, int ra, int imm);
    return {op, 4'(rd), 4'(ra), 2'd0, 16'(imm)};
  endfunction

  // log_pow unit operation select
  typedef enum logic { LP_LOG = 1'b0, LP_POW = 1'b1 } lp_mode_e;

endpackage
