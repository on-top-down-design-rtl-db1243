// log_pow unit: single-cycle conversion between linear power and decibels.
//
// LOG mode, y = 10*log10(x): the 32-bit unsigned input is split as
// x = mantissa * 2^exponent with the mantissa in [0.5, 1). A lead-one detector
// gives the exponent; the MANT_IDX_W bits below the leading one address
// manti_table (10*log10 of the mantissa, taken at the middle of each interval)
// and the exponent addresses expo_table (exponent*10*log10(2)); their sum is
// the result in signed 8.8 dB. x = 0 returns the most negative code (-128 dB).
//
// POW mode, y = 10^(x/10) = 2^(I+f): the signed 8.8 dB input is multiplied by
// the constant log2(10)/10 (0.16 format), giving the exponent in 16.16 format.
// Its integer part I drives a scaler (shifter) and the top POW_IDX_W bits of its
// fraction f address pow_table (2^f in 1.15 format). The result is a 32-bit
// unsigned linear value, saturated at all ones when I > 31 and zero when the
// value underflows.
//
// The structure (lead-one detector, manti_table, expo_table, adder; multiplier,
// pow_table, scaler) and the 32-bit linear / 8.8 logarithmic formats follow the
// architecture. The table sizes, the table sample points and the saturation
// rules are this implementation's choices. Tables are computed at elaboration.
//
// Timing: purely combinational; the DSP registers y at the end of the cycle.
module log_pow_unit
  import enc_pkg::*;
#(
  parameter int MANT_IDX_W = 8,
  parameter int POW_IDX_W  = 10
) (
  input  lp_mode_e           mode,
  input  logic [31:0]        x,   // LOG: unsigned linear; POW: x[15:0] signed 8.8 dB
  output logic [31:0]        y    // LOG: y[15:0] signed 8.8 dB, sign-extended; POW: unsigned linear
);
  localparam int NM = 2 ** MANT_IDX_W;
  localparam int NP = 2 ** POW_IDX_W;

  typedef logic signed [15:0] mtab_t [NM];
  typedef logic signed [15:0] etab_t [32];
  typedef logic        [15:0] ptab_t [NP];

  // 10*log10(m) for m in the middle of [0.5 + i/(2*NM), 0.5 + (i+1)/(2*NM))
  function automatic mtab_t make_manti();
    mtab_t t;
    for (int i = 0; i < NM; i++)
      t[i] = 16'($rtoi($floor(256.0 * 10.0 * $log10((real'(NM + i) + 0.5) / real'(2 * NM)) + 0.5)));
    return t;
  endfunction

  // exponent*10*log10(2), exponent = position of leading one + 1
  function automatic etab_t make_expo();
    etab_t t;
    for (int p = 0; p < 32; p++)
      t[p] = 16'($rtoi($floor(256.0 * 10.0 * $log10(2.0) * real'(p + 1) + 0.5)));
    return t;
  endfunction

  // 2^(i/NP) in 1.15 format
  function automatic ptab_t make_pow();
    ptab_t t;
    for (int i = 0; i < NP; i++)
      t[i] = 16'($rtoi($floor(32768.0 * $pow(2.0, real'(i) / real'(NP)) + 0.5)));
    return t;
  endfunction

  localparam mtab_t MANTI_TABLE = make_manti();
  localparam etab_t EXPO_TABLE  = make_expo();
  localparam ptab_t POW_TABLE   = make_pow();

  // log2(10)/10 in 0.16 format
  localparam logic signed [17:0] LOG2_10_DIV_10 = 18'sd21771;

  // ---- log path ----
  logic [4:0]            lead_pos;
  logic                  x_zero;
  logic [31:0]           x_norm;
  logic [MANT_IDX_W-1:0] m_idx;
  logic signed [15:0]    log_y;

  lead_one_detector #(.W(32)) u_lod (.x(x), .pos(lead_pos), .zero(x_zero));

  always_comb begin
    x_norm = x << (5'd31 - lead_pos);
    m_idx  = x_norm[30 -: MANT_IDX_W];
    log_y  = x_zero ? 16'sh8000 : MANTI_TABLE[m_idx] + EXPO_TABLE[lead_pos];
  end

  // ---- pow path ----
  logic signed [33:0]    pow_prod;   // 8.8 * 0.16 -> 8.24
  logic signed [31:0]    pow_exp;    // 16.16
  logic signed [15:0]    pow_i;
  logic [POW_IDX_W-1:0]  pow_f;
  logic [15:0]           pow_mant;
  logic [47:0]           pow_shifted;
  logic [31:0]           pow_y;

  always_comb begin
    pow_prod    = $signed(x[15:0]) * LOG2_10_DIV_10;
    pow_exp     = 32'(pow_prod >>> 8);
    pow_i       = pow_exp[31:16];
    pow_f       = pow_exp[15 -: POW_IDX_W];
    pow_mant    = POW_TABLE[pow_f];
    pow_shifted = '0;
    if (pow_i > 16'sd31) begin
      pow_y = '1;
    end else if (pow_i >= 16'sd0) begin
      pow_shifted = {32'd0, pow_mant} << pow_i[4:0];
      pow_y       = pow_shifted[46:15];
    end else if (pow_i >= -16'sd16) begin
      pow_shifted = {32'd0, pow_mant} >> (5'd15 - 5'(pow_i));
      pow_y       = pow_shifted[31:0];
    end else begin
      pow_y = '0;
    end
  end

  assign y = (mode == LP_LOG) ? {{16{log_y[15]}}, log_y} : pow_y;
endmodule
