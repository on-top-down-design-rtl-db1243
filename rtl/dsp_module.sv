// DSP module: application-specific instruction-set processor (ASIP) that runs
// the irregular tasks of the encoder and acts as bus master of the system.
//
// A single-issue processor that executes one 32-bit instruction per cycle from
// a loadable program memory, with sixteen 32-bit registers (r0 reads as zero).
// Its datapath holds an ALU, a 32x32 multiplier, a multiply-accumulate unit
// (acc = b + a*dz in one instruction, for piecewise-linear masking functions)
// and the single-cycle log_pow unit (10*log10 x and 10^(x/10)), so the
// psychoacoustic-model arithmetic runs in registers. Application-specific
// instructions drive the rest of the encoder:
//   FFTGO          start the FFT module (stalls while it is busy)
//   AFGO ra, n     start the AF module on channel r[ra] for n blocks
//   WAIT mask      stall while the FFT (mask bit 0) / AF (bit 1) module is busy
//   SWAP           exchange the two spectrum banks
//   LDBK/LDSB/STSB read a spectrum line / read or write a subband sample
//   OUT ra         emit a 32-bit bitstream word (stalls while bs_ready is low)
// Instruction fields: [31:26] opcode, [25:22] rd, [21:18] ra, [17:14] rb,
// [15:0] signed immediate. Branches BEQ/BNE/BLT compare r[rd] with r[ra] and
// add the immediate to the PC; JMP loads the immediate; memory addresses are
// r[ra] + immediate. The encoding is listed in enc_pkg.
//
// Following the architecture: an ASIP with ALU, hardware multiplier, MAC unit
// and log_pow unit; master control of the FFT and AF modules by command;
// spectrum hand-over by bank switching; access to the shared subband memory;
// output bitstream. The instruction set, its encoding, the register count, the
// program size and the load/run protocol are this implementation's own, since
// the architecture fixes none of them.
//
// Interface timing: while halted the host writes the program through
// prog_we/prog_addr/prog_data; a run pulse starts execution at address 0;
// HALT stops it and raises halted. Memory reads of the bank and subband
// memories are combinational, stores take effect on the clock edge.
module dsp_module
  import enc_pkg::*;
#(
  parameter int PDEPTH = 1024,
  parameter int BANK_AW = $clog2(SPEC_LINES),
  parameter int SB_AW   = $clog2(SB_DEPTH),
  localparam int PAW    = $clog2(PDEPTH)
) (
  input  logic               clk,
  input  logic               rst_n,
  // program load and run control
  input  logic               prog_we,
  input  logic [PAW-1:0]     prog_addr,
  input  logic [31:0]        prog_data,
  input  logic               run,
  output logic               halted,
  // FFT module command
  output logic               fft_start,
  input  logic               fft_busy,
  // AF module command
  output logic               af_start,
  output logic [2:0]         af_ch,
  output logic [5:0]         af_nblk,
  input  logic               af_busy,
  // spectrum bank memory
  output logic               bank_swap,
  output logic [BANK_AW-1:0] bank_addr,
  input  logic [SPEC_W-1:0]  bank_rdata,
  // shared subband memory
  output logic               sb_we,
  output logic [SB_AW-1:0]   sb_addr,
  output logic [SB_W-1:0]    sb_wdata,
  input  logic [SB_W-1:0]    sb_rdata,
  // output bitstream
  output logic               bs_valid,
  output logic [31:0]        bs_data,
  input  logic               bs_ready
);
  logic [31:0]  pmem [PDEPTH];
  logic [31:0]  regs [DSP_NREG];
  logic [PAW-1:0] pc;
  logic         running;

  logic [31:0]  ir;
  opcode_e      op;
  logic [3:0]   rd, ra, rb;
  logic [31:0]  imm_s;
  logic [31:0]  vd, va, vb;   // register values of the rd, ra, rb fields
  logic [31:0]  addr;

  always_comb begin
    ir    = pmem[pc];
    op    = opcode_e'(ir[31:26]);
    rd    = ir[25:22];
    ra    = ir[21:18];
    rb    = ir[17:14];
    imm_s = {{16{ir[15]}}, ir[15:0]};
    vd    = (rd == 4'd0) ? 32'd0 : regs[rd];
    va    = (ra == 4'd0) ? 32'd0 : regs[ra];
    vb    = (rb == 4'd0) ? 32'd0 : regs[rb];
    addr  = va + imm_s;
  end

  // log_pow unit
  logic [31:0] lp_y;
  log_pow_unit u_log_pow (
    .mode(op == OP_POW ? LP_POW : LP_LOG), .x(va), .y(lp_y));

  // MAC unit: MACLD acc = r[rd] + r[ra]*r[rb]; MAC acc += r[ra]*r[rb]
  logic signed [63:0] mac_acc;
  logic               mac_load, mac_en;
  mac_unit #(.A_W(32), .B_W(32), .ACC_W(64)) u_mac (
    .clk, .rst_n, .load(mac_load), .en(mac_en),
    .init(64'($signed(vd))), .a(va), .b(vb), .acc(mac_acc));

  // stall conditions
  logic stall;
  always_comb begin
    unique case (op)
      OP_WAIT:  stall = (ir[0] && fft_busy) || (ir[1] && af_busy);
      OP_FFTGO: stall = fft_busy;
      OP_AFGO:  stall = af_busy;
      OP_OUT:   stall = !bs_ready;
      default:  stall = 1'b0;
    endcase
  end

  logic issue;
  assign issue = running && !stall;

  // result and next PC
  logic        wr_reg;
  logic [31:0] result;
  logic [PAW-1:0] pc_next;
  logic [63:0] mul_full;

  always_comb begin
    wr_reg   = 1'b0;
    result   = '0;
    mul_full = 64'($signed(va) * $signed(vb));
    pc_next  = pc + 1'b1;
    unique case (op)
      OP_LDI:   begin wr_reg = 1'b1; result = imm_s; end
      OP_LUI:   begin wr_reg = 1'b1; result = {ir[15:0], vd[15:0]}; end
      OP_ADD:   begin wr_reg = 1'b1; result = va + vb; end
      OP_SUB:   begin wr_reg = 1'b1; result = va - vb; end
      OP_AND:   begin wr_reg = 1'b1; result = va & vb; end
      OP_OR:    begin wr_reg = 1'b1; result = va | vb; end
      OP_XOR:   begin wr_reg = 1'b1; result = va ^ vb; end
      OP_SHL:   begin wr_reg = 1'b1; result = va << ir[4:0]; end
      OP_SRA:   begin wr_reg = 1'b1; result = $signed(va) >>> ir[4:0]; end
      OP_SRL:   begin wr_reg = 1'b1; result = va >> ir[4:0]; end
      OP_ADDI:  begin wr_reg = 1'b1; result = va + imm_s; end
      OP_MUL:   begin wr_reg = 1'b1; result = mul_full[31:0]; end
      OP_MACRD: begin wr_reg = 1'b1; result = 32'(mac_acc >>> ir[5:0]); end
      OP_LOG,
      OP_POW:   begin wr_reg = 1'b1; result = lp_y; end
      OP_LDBK:  begin wr_reg = 1'b1; result = bank_rdata; end
      OP_LDSB:  begin wr_reg = 1'b1; result = 32'($signed(sb_rdata)); end
      OP_BEQ:   if (vd == va)                   pc_next = pc + PAW'(imm_s);
      OP_BNE:   if (vd != va)                   pc_next = pc + PAW'(imm_s);
      OP_BLT:   if ($signed(vd) < $signed(va))  pc_next = pc + PAW'(imm_s);
      OP_JMP:   pc_next = PAW'(ir[15:0]);
      default:  ;
    endcase
  end

  // side effects toward the other modules (combinational, valid in the issue cycle)
  always_comb begin
    mac_load  = issue && (op == OP_MACLD);
    mac_en    = issue && (op == OP_MACLD || op == OP_MAC);
    fft_start = issue && (op == OP_FFTGO);
    af_start  = issue && (op == OP_AFGO);
    af_ch     = va[2:0];
    af_nblk   = ir[5:0];
    bank_swap = issue && (op == OP_SWAP);
    bank_addr = BANK_AW'(addr);
    sb_addr   = SB_AW'(addr);
    sb_we     = issue && (op == OP_STSB);
    sb_wdata  = SB_W'(vd);
    bs_valid  = running && (op == OP_OUT);
    bs_data   = va;
  end

  always_ff @(posedge clk) begin
    if (prog_we && !running) pmem[prog_addr] <= prog_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc      <= '0;
      running <= 1'b0;
      for (int i = 0; i < DSP_NREG; i++) regs[i] <= '0;
    end else if (!running) begin
      if (run) begin
        pc      <= '0;
        running <= 1'b1;
      end
    end else if (issue) begin
      if (op == OP_HALT) running <= 1'b0;
      else               pc <= pc_next;
      if (wr_reg && rd != 4'd0) regs[rd] <= result;
    end
  end

  assign halted = !running;

  // a command must not be issued to a module that is still busy
  assert property (@(posedge clk) disable iff (!rst_n) fft_start |-> !fft_busy);
  assert property (@(posedge clk) disable iff (!rst_n) af_start  |-> !af_busy);
  // the bitstream word must hold until it is accepted
  assert property (@(posedge clk) disable iff (!rst_n)
                   bs_valid && !bs_ready |=> bs_valid && $stable(bs_data));
endmodule
