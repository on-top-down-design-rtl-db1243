// Signed multiply-accumulate unit.
//
// One product per clock is added to the accumulator, so a piecewise-linear
// function a*dz + b is evaluated in a single cycle after the accumulator is
// loaded with b (load and accumulate in the same cycle give b + a*dz). The AF
// module uses two of these for windowing and matrixing; the DSP module uses one
// for its masking-threshold arithmetic. The accumulator width is this
// implementation's choice; there is no saturation, so ACC_W must cover the
// longest sum the user runs.
//
// Interface: load=1 replaces the accumulator with init (plus a*b when en=1);
// en=1 alone adds a*b; acc shows the registered result one cycle later.
module mac_unit #(
  parameter int A_W   = 16,
  parameter int B_W   = 16,
  parameter int ACC_W = 40
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    load,
  input  logic                    en,
  input  logic signed [ACC_W-1:0] init,
  input  logic signed [A_W-1:0]   a,
  input  logic signed [B_W-1:0]   b,
  output logic signed [ACC_W-1:0] acc
);
  logic signed [A_W+B_W-1:0] prod;
  logic signed [ACC_W-1:0]   base;

  always_comb begin
    prod = a * b;
    base = load ? init : acc;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        acc <= '0;
    else if (en)       acc <= base + ACC_W'(prod);
    else if (load)     acc <= init;
  end
endmodule
