// Two-bank spectrum memory between the FFT module and the DSP module.
//
// Each bank holds one 512-line power spectrum. The FFT module always writes the
// bank selected by wr_bank; the DSP module always reads the other one. A swap
// pulse exchanges the roles, so the DSP takes over a finished spectrum while the
// FFT module fills the other bank for the next channel, without copying. The
// bank count and size follow the architecture; the asynchronous read (so the
// DSP loads a word in one instruction) and the reset to bank 0 are this
// implementation's choices.
//
// Timing: write on the clock edge; rd_data follows rd_addr combinationally and
// reflects the bank selected after the most recent swap edge.
module bank_memory #(
  parameter int DEPTH  = enc_pkg::SPEC_LINES,
  parameter int WIDTH  = enc_pkg::SPEC_W,
  localparam int AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             swap,
  output logic             wr_bank,
  // FFT side
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data,
  // DSP side
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data
);
  logic [WIDTH-1:0] mem [2*DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    wr_bank <= 1'b0;
    else if (swap) wr_bank <= ~wr_bank;
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[{wr_bank, wr_addr}] <= wr_data;
  end

  assign rd_data = mem[{~wr_bank, rd_addr}];
endmodule
