// Shared subband-sample memory.
//
// Holds one frame of subband samples for seven channels (1,152 x 7 = 8,064
// words): channels 0-4 are written by the AF module, channels 5-6 (the
// matrixed Lo/Ro) by the DSP module, and the DSP module reads all of them for
// scale-factor coding, quantization and packing. Address = channel*1152 +
// block*32 + subband. Port A is write-only (AF); port B reads combinationally
// and writes on the clock edge (DSP). If both ports write the same word in one
// cycle, port B wins. Size follows the architecture; the port arrangement and
// the 24-bit word are this implementation's choices.
module subband_memory #(
  parameter int DEPTH = enc_pkg::SB_DEPTH,
  parameter int WIDTH = enc_pkg::SB_W,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  // AF side
  input  logic             a_we,
  input  logic [AW-1:0]    a_addr,
  input  logic [WIDTH-1:0] a_wdata,
  // DSP side
  input  logic             b_we,
  input  logic [AW-1:0]    b_addr,
  input  logic [WIDTH-1:0] b_wdata,
  output logic [WIDTH-1:0] b_rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_we && a_addr < AW'(DEPTH)) mem[a_addr] <= a_wdata;
    if (b_we && b_addr < AW'(DEPTH)) mem[b_addr] <= b_wdata;
  end

  assign b_rdata = (b_addr < AW'(DEPTH)) ? mem[b_addr] : '0;
endmodule
