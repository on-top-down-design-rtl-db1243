// Workload testbench: global masking threshold of psychoacoustic model 1 on
// the DSP module.
//
// A DSP program computes, for every frequency index i of the threshold
// grid, the merged individual/global masking threshold
//   LTg(i) = 10 log10( 10^(LTq(i)/10) + sum_j 10^(LT[z(j), z(i)]/10) ),
// with each individual threshold evaluated as one piecewise-linear segment
//   LT[z(j), z(i)] = a * dz + b,  dz = z(i) - z(j) in Bark,
// on the MAC unit, the conversions on the log_pow unit (POW per term, one LOG
// per index), and the running sum kept in a register. Maskers further than
// -3..+8 Bark are skipped. The segment constants (a, b) of each masker are
// those of the model 1 masking function and masking index; b already holds
// the masker level and index.
//
// The grid has 126 indices (the 48 kHz layer II threshold grid), 0 to 24 Bark,
// and eight maskers, tonal and non-tonal; the numbers are generated here. The
// program reads its operands from a model of the spectrum bank: z(i) at
// 0..125, LTq(i) at 128..253, and nine words per masker from 256 on:
// z(j), then (a, b) for the four segments dz < -1, < 0, < 1, < 8. Formats:
// Bark and dB in 8.8, slopes in 8.8 dB/Bark, b in 16.16 dB.
//
// Checks: every LTg against a floating-point evaluation with the same
// quantized constants (0.15 dB), that each of the four segments and the range
// skip were used, and that the whole kernel stays inside 28,000 cycles, the
// budget of the masking-threshold steps of the improved model.
module tb_masking_threshold;
  import enc_pkg::*;
  localparam int NI = 126;           // threshold grid
  localparam int NM = 8;             // maskers
  localparam int ZI = 0, QI = 128, MB = 256, MS = 9;
  localparam int BUDGET = 28000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        prog_we, run, halted;
  logic [9:0]  prog_addr;
  logic [31:0] prog_data;
  logic        fft_start, af_start, bank_swap, sb_we, bs_valid;
  logic [2:0]  af_ch;
  logic [5:0]  af_nblk;
  logic [8:0]  bank_addr;
  logic [31:0] bank_rdata, bs_data;
  logic [12:0] sb_addr;
  logic [23:0] sb_wdata;
  int checks = 0, failures = 0;

  dsp_module dut (
    .clk, .rst_n, .prog_we, .prog_addr, .prog_data, .run, .halted,
    .fft_start, .fft_busy(1'b0), .af_start, .af_ch, .af_nblk, .af_busy(1'b0),
    .bank_swap, .bank_addr, .bank_rdata, .sb_we, .sb_addr, .sb_wdata,
    .sb_rdata(24'd0), .bs_valid, .bs_data, .bs_ready(1'b1));

  logic [31:0] bankm [512];
  assign bank_rdata = bankm[bank_addr];

  logic [31:0] outs [$];
  always @(posedge clk) if (bs_valid) outs.push_back(bs_data);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // masker data and the reference
  real mz [NM], ma [NM][4], mb [NM][4];
  real gz [NI], gq [NI];

  function automatic int q88(real v);
    return $rtoi(v * 256.0 + ((v < 0.0) ? -0.5 : 0.5));
  endfunction

  task automatic make_data();
    int zq, aq, bq;
    real x, av, z;
    bit tonal;
    for (int i = 0; i < NI; i++) begin
      zq = q88(24.0 * real'(i) / real'(NI - 1));
      gz[i] = real'(zq) / 256.0;
      bankm[ZI + i] = 32'(zq);
      zq = q88(30.0 + 3.0 * real'(i % 7) + 0.1 * real'(i % 5));
      gq[i] = real'(zq) / 256.0;
      bankm[QI + i] = 32'(zq);
    end
    for (int j = 0; j < NM; j++) begin
      z = 1.0 + 22.0 * real'($urandom_range(0, 1000)) / 1000.0;
      x = 50.0 + 25.0 * real'($urandom_range(0, 1000)) / 1000.0;
      tonal = j[0];
      av = tonal ? (-1.525 - 0.275 * z - 4.5) : (-1.525 - 0.175 * z - 0.5);
      zq = q88(z);
      mz[j] = real'(zq) / 256.0;
      bankm[MB + MS * j] = 32'(zq);
      // segments of the masking function: -3..-1, -1..0, 0..1, 1..8 Bark
      ma[j][0] = 17.0;               mb[j][0] = 17.0 - (0.4 * x + 6.0) + x + av;
      ma[j][1] = 0.4 * x + 6.0;      mb[j][1] = x + av;
      ma[j][2] = -17.0;              mb[j][2] = x + av;
      ma[j][3] = -(17.0 - 0.15 * x); mb[j][3] = (17.0 - 0.15 * x) - 17.0 + x + av;
      for (int s = 0; s < 4; s++) begin
        aq = q88(ma[j][s]);
        bq = $rtoi(mb[j][s] * 65536.0);
        ma[j][s] = real'(aq) / 256.0;
        mb[j][s] = real'(bq) / 65536.0;
        bankm[MB + MS * j + 1 + 2 * s] = 32'(aq);
        bankm[MB + MS * j + 2 + 2 * s] = 32'(bq);
      end
    end
  endtask

  int seg_used [5];   // segments 0..3, 4 = out of range

  function automatic real ref_ltg(int i);
    real lin, dz;
    int s;
    lin = 10.0 ** (gq[i] / 10.0);
    for (int j = 0; j < NM; j++) begin
      dz = gz[i] - mz[j];
      if (dz < -3.0 || dz >= 8.0) begin
        seg_used[4]++;
      end else begin
        s = (dz < -1.0) ? 0 : (dz < 0.0) ? 1 : (dz < 1.0) ? 2 : 3;
        seg_used[s]++;
        lin += 10.0 ** ((ma[j][s] * dz + mb[j][s]) / 10.0);
      end
    end
    return 10.0 * $log10(lin);
  endfunction

  logic [31:0] prog [$];
  int cycles;
  real got, want, worst;

  initial begin
    prog_we = 0; prog_addr = 0; prog_data = 0; run = 0;
    for (int i = 0; i < 512; i++) bankm[i] = '0;
    make_data();
    // r1 i, r2 NI, r3 masker address, r4 end address, r5 z(i), r6 linear sum,
    // r7 dz, r8 a, r9 b, r10 scratch, r11 -1 Bark, r12 +1 Bark, r13 -3 Bark,
    // r14 +8 Bark, r15 segment address
    prog = '{
      asm_i(OP_LDI, 1, 0, 0),              // 0
      asm_i(OP_LDI, 2, 0, NI),
      asm_i(OP_LDI, 11, 0, -256),
      asm_i(OP_LDI, 12, 0, 256),
      asm_i(OP_LDI, 13, 0, -768),
      asm_i(OP_LDI, 14, 0, 2048),
      asm_i(OP_LDBK, 5, 1, ZI),            // 6: next index
      asm_i(OP_LDBK, 10, 1, QI),
      asm_r(OP_POW, 6, 10, 0),             // sum = 10^(LTq/10)
      asm_i(OP_LDI, 3, 0, MB),
      asm_i(OP_LDI, 4, 0, MB + MS * NM),
      asm_i(OP_LDBK, 7, 3, 0),             // 11: next masker
      asm_r(OP_SUB, 7, 5, 7),              // dz
      asm_i(OP_BLT, 7, 13, 16),            // dz < -3: skip (to 29)
      asm_i(OP_BLT, 7, 14, 2),             // dz < 8: in range
      asm_i(OP_JMP, 0, 0, 29),
      asm_i(OP_ADDI, 15, 3, 1),            // 16: segment -3..-1
      asm_i(OP_BLT, 7, 11, 6),
      asm_i(OP_ADDI, 15, 15, 2),           // segment -1..0
      asm_i(OP_BLT, 7, 0, 4),
      asm_i(OP_ADDI, 15, 15, 2),           // segment 0..1
      asm_i(OP_BLT, 7, 12, 2),
      asm_i(OP_ADDI, 15, 15, 2),           // segment 1..8
      asm_i(OP_LDBK, 8, 15, 0),            // 23: a
      asm_i(OP_LDBK, 9, 15, 1),            // b
      asm_r(OP_MACLD, 9, 8, 7),            // acc = b + a*dz
      asm_i(OP_MACRD, 10, 0, 8),           // LT in 8.8 dB
      asm_r(OP_POW, 10, 10, 0),
      asm_r(OP_ADD, 6, 6, 10),
      asm_i(OP_ADDI, 3, 3, MS),            // 29
      asm_i(OP_BNE, 3, 4, -19),
      asm_r(OP_LOG, 10, 6, 0),
      asm_r(OP_OUT, 0, 10, 0),
      asm_i(OP_ADDI, 1, 1, 1),
      asm_i(OP_BNE, 1, 2, -28),
      asm_r(OP_HALT, 0, 0, 0)
    };
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    foreach (prog[i]) begin
      prog_we = 1; prog_addr = 10'(i); prog_data = prog[i];
      @(negedge clk);
    end
    prog_we = 0;
    run = 1;
    @(negedge clk);
    run = 0;
    cycles = 1;
    while (!halted) begin @(negedge clk); cycles++; end

    checks++;
    if (outs.size() != NI) begin failures++; $display("%0d thresholds out, expected %0d", outs.size(), NI); end
    worst = 0.0;
    for (int i = 0; i < NI && i < outs.size(); i++) begin
      got  = real'($signed(outs[i][15:0])) / 256.0;
      want = ref_ltg(i);
      checks++;
      if (got - want > 0.15 || want - got > 0.15) begin
        failures++;
        $display("LTg(%0d): got %f dB expected %f dB", i, got, want);
      end
      if (got - want > worst) worst = got - want;
      if (want - got > worst) worst = want - got;
    end
    for (int s = 0; s < 5; s++) begin
      checks++;
      if (seg_used[s] == 0) begin failures++; $display("masking segment %0d never used", s); end
    end
    checks++;
    if (cycles > BUDGET) begin failures++; $display("%0d cycles, budget %0d", cycles, BUDGET); end
    $display("%0d indices x %0d maskers: %0d cycles (budget %0d), segment use %0d %0d %0d %0d, out of range %0d, worst error %f dB",
             NI, NM, cycles, BUDGET, seg_used[0], seg_used[1], seg_used[2], seg_used[3], seg_used[4], worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
