// Self-checking testbench of dsp_module.
//
// Loads a test program through the program port and runs it. The program
// exercises the ALU, immediates, shifts, the multiplier, the MAC unit
// (b + a*dz in one instruction, then accumulation), the log_pow unit, a
// counted loop and the branches, the bank-memory and subband-memory accesses,
// and the commands to the FFT and AF modules. Every result is sent out with
// OUT and compared with values worked out here; bs_ready is toggled randomly
// so OUT must stall. The FFT and AF modules are modelled as busy for a fixed
// number of cycles, and the test checks that WAIT holds the program until
// they finish, and that the SWAP and AF command fields arrive as programmed.
module tb_dsp_module;
  import enc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        prog_we, run, halted;
  logic [9:0]  prog_addr;
  logic [31:0] prog_data;
  logic        fft_start, fft_busy, af_start, af_busy, bank_swap, sb_we, bs_valid, bs_ready;
  logic [2:0]  af_ch;
  logic [5:0]  af_nblk;
  logic [8:0]  bank_addr;
  logic [31:0] bank_rdata, bs_data;
  logic [12:0] sb_addr;
  logic [23:0] sb_wdata, sb_rdata;
  int checks = 0, failures = 0;

  dsp_module dut (.*);

  // models of the neighbours
  logic [23:0] sbm [8064];
  int fft_cnt = 0, af_cnt = 0, swaps = 0, fft_cmds = 0, af_cmds = 0, cycle = 0;
  int fft_start_cycle = 0, af_start_cycle = 0, swap_cycle = 0, after_af_cycle = 0;
  int got_ch = -1, got_nblk = -1, out_stalls = 0;
  assign bank_rdata = 32'(bank_addr) * 3 + 7;
  assign sb_rdata   = sbm[sb_addr];
  assign fft_busy   = fft_cnt != 0;
  assign af_busy    = af_cnt != 0;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (fft_start) begin fft_cnt <= 50; fft_cmds++; fft_start_cycle <= cycle; end
    else if (fft_cnt != 0) fft_cnt <= fft_cnt - 1;
    if (af_start) begin af_cnt <= 80; af_cmds++; af_start_cycle <= cycle; got_ch <= af_ch; got_nblk <= af_nblk; end
    else if (af_cnt != 0) af_cnt <= af_cnt - 1;
    if (bank_swap) begin swaps++; swap_cycle <= cycle; end
    if (sb_we) sbm[sb_addr] <= sb_wdata;
    if (bs_valid && !bs_ready) out_stalls++;
  end
  always @(negedge clk) bs_ready <= ($urandom() % 3) != 0;

  // collected output words
  logic [31:0] outs [$];
  always @(posedge clk) if (bs_valid && bs_ready) outs.push_back(bs_data);

  logic [31:0] prog [$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_word(input int idx, input logic [31:0] v, input string what);
    checks++;
    if (idx >= outs.size() || outs[idx] !== v) begin
      failures++;
      $display("%s: got %h expected %h", what, (idx < outs.size()) ? outs[idx] : 32'hx, v);
    end
  endtask

  initial begin
    prog_we = 0; prog_addr = 0; prog_data = 0; run = 0;
    for (int i = 0; i < 8064; i++) sbm[i] = 24'(i * 5);
    prog = '{
      asm_i(OP_LDI, 1, 0, 1234),          // 0
      asm_i(OP_LDI, 2, 0, -56),
      asm_r(OP_ADD, 3, 1, 2),
      asm_r(OP_OUT, 0, 3, 0),             // out0 = 1178
      asm_r(OP_SUB, 3, 1, 2),
      asm_r(OP_OUT, 0, 3, 0),             // out1 = 1290
      asm_r(OP_MUL, 4, 1, 2),
      asm_r(OP_OUT, 0, 4, 0),             // out2 = -69104
      asm_i(OP_LUI, 5, 0, 16'h1234),
      asm_i(OP_ADDI, 5, 5, 16'h5678),
      asm_r(OP_OUT, 0, 5, 0),             // out3 = 0x12345678
      asm_r(OP_XOR, 6, 5, 1),
      asm_r(OP_OUT, 0, 6, 0),             // out4
      asm_i(OP_SHL, 7, 5, 4),
      asm_r(OP_OUT, 0, 7, 0),             // out5 = 0x23456780
      asm_i(OP_SRA, 7, 2, 2),
      asm_r(OP_OUT, 0, 7, 0),             // out6 = -14
      asm_i(OP_SRL, 7, 2, 28),
      asm_r(OP_OUT, 0, 7, 0),             // out7 = 0xF
      asm_r(OP_AND, 7, 5, 1),
      asm_r(OP_OUT, 0, 7, 0),             // out8
      asm_r(OP_OR, 7, 5, 1),
      asm_r(OP_OUT, 0, 7, 0),             // out9
      asm_i(OP_LDI, 8, 0, 100),           // b
      asm_i(OP_LDI, 9, 0, 7),             // a
      asm_i(OP_LDI, 10, 0, -3),           // dz
      asm_r(OP_MACLD, 8, 9, 10),          // acc = 100 + 7*(-3) = 79
      asm_i(OP_MACRD, 11, 0, 0),
      asm_r(OP_OUT, 0, 11, 0),            // out10 = 79
      asm_r(OP_MAC, 0, 9, 9),             // acc = 128
      asm_i(OP_MACRD, 11, 0, 3),
      asm_r(OP_OUT, 0, 11, 0),            // out11 = 16
      asm_i(OP_LDI, 12, 0, 1000),
      asm_r(OP_LOG, 13, 12, 0),
      asm_r(OP_OUT, 0, 13, 0),            // out12 ~ 30 dB in 8.8
      asm_r(OP_POW, 14, 13, 0),
      asm_r(OP_OUT, 0, 14, 0),            // out13 ~ 1000
      asm_i(OP_LDI, 1, 0, 0),
      asm_i(OP_LDI, 2, 0, 10),
      asm_i(OP_LDI, 3, 0, 0),
      asm_i(OP_ADDI, 1, 1, 1),            // loop:
      asm_r(OP_ADD, 3, 3, 1),
      asm_i(OP_BNE, 1, 2, -2),
      asm_r(OP_OUT, 0, 3, 0),             // out14 = 55
      asm_i(OP_LDI, 13, 0, -5),
      asm_i(OP_BLT, 13, 1, 2),            // -5 < 10 (signed): taken
      asm_r(OP_OUT, 0, 0, 0),             // skipped
      asm_i(OP_BLT, 2, 1, 2),             // 10 < 10: not taken
      asm_i(OP_BEQ, 1, 2, 2),             // taken, skips the next OUT
      asm_r(OP_OUT, 0, 0, 0),
      asm_r(OP_FFTGO, 0, 0, 0),
      asm_i(OP_WAIT, 0, 0, 1),
      asm_r(OP_SWAP, 0, 0, 0),
      asm_i(OP_LDI, 1, 0, 5),
      asm_i(OP_LDBK, 2, 1, 3),            // bank[8] = 31
      asm_r(OP_OUT, 0, 2, 0),             // out15 = 31
      asm_i(OP_LDI, 4, 0, 3),
      asm_i(OP_AFGO, 0, 4, 36),
      asm_i(OP_WAIT, 0, 0, 2),
      asm_i(OP_LDSB, 5, 0, 100),          // sbm[100] = 500
      asm_r(OP_OUT, 0, 5, 0),             // out16 = 500
      asm_i(OP_LDI, 6, 0, -9),
      asm_i(OP_STSB, 6, 0, 200),
      asm_i(OP_LDSB, 7, 0, 200),
      asm_r(OP_OUT, 0, 7, 0),             // out17 = -9
      asm_i(OP_JMP, 0, 0, 68),
      asm_r(OP_OUT, 0, 1, 0),             // skipped
      asm_r(OP_OUT, 0, 1, 0),             // skipped
      asm_r(OP_HALT, 0, 0, 0)             // 68
    };
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (!halted) begin failures++; $display("not halted after reset"); end
    foreach (prog[i]) begin
      prog_we = 1; prog_addr = 10'(i); prog_data = prog[i];
      @(negedge clk);
    end
    prog_we = 0;
    run = 1;
    @(negedge clk);
    run = 0;
    while (!halted) @(negedge clk);
    expect_word(0, 32'd1178, "ADD");
    expect_word(1, 32'd1290, "SUB");
    expect_word(2, -32'sd69104, "MUL");
    expect_word(3, 32'h12345678, "LUI/ADDI");
    expect_word(4, 32'h12345678 ^ 32'd1234, "XOR");
    expect_word(5, 32'h23456780, "SHL");
    expect_word(6, -32'sd14, "SRA");
    expect_word(7, 32'hF, "SRL");
    expect_word(8, 32'h12345678 & 32'd1234, "AND");
    expect_word(9, 32'h12345678 | 32'd1234, "OR");
    expect_word(10, 32'd79, "MACLD");
    expect_word(11, 32'd16, "MAC/MACRD");
    checks++;
    if (outs.size() < 14 || $signed(outs[12]) < 7675 || $signed(outs[12]) > 7685) begin
      failures++; $display("LOG(1000) = %0d", outs[12]);
    end
    checks++;
    if (outs.size() < 14 || outs[13] < 990 || outs[13] > 1010) begin
      failures++; $display("POW(LOG(1000)) = %0d", outs[13]);
    end
    expect_word(14, 32'd55, "loop");
    expect_word(15, 32'd31, "LDBK");
    expect_word(16, 32'd500, "LDSB");
    expect_word(17, -32'sd9, "STSB");
    checks++;
    if (outs.size() != 18) begin failures++; $display("%0d words out", outs.size()); end
    checks++;
    if (fft_cmds != 1 || swaps != 1 || swap_cycle < fft_start_cycle + 50) begin
      failures++; $display("FFT command / WAIT / SWAP: %0d %0d %0d %0d", fft_cmds, swaps, fft_start_cycle, swap_cycle);
    end
    checks++;
    if (af_cmds != 1 || got_ch != 3 || got_nblk != 36) begin
      failures++; $display("AF command: %0d ch %0d nblk %0d", af_cmds, got_ch, got_nblk);
    end
    checks++;
    if (out_stalls == 0) begin failures++; $display("OUT never stalled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
