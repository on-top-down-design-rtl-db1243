// End-to-end testbench of audio_encoder_top at its default (full) size.
//
// Runs one complete frame of the schedule the encoder is built for. The DSP
// program issues seven FFT commands and five AF commands (one per input
// channel, 36 blocks each). After each FFT it switches the spectrum bank,
// restarts the FFT module on the next channel, and searches the finished
// spectrum for its peak with the log_pow unit, so FFT and spectrum analysis
// overlap as a two-stage pipeline while the AF module filters in parallel.
// The peak line, its level in dB, and a masking-style value
// 10^((peak - 27 dB)/10) from the MAC and POW instructions go out on the
// bitstream port. After the AF work the DSP forms a downmix channel
// (ch0 + ch1)/2 in subband memory slot 5 and emits one of its samples.
//
// Checks: the tone line and level of every FFT channel; every subband sample
// of the five filtered channels against a floating-point filterbank model
// (0.5 PCM tolerance); the downmix words exactly; the frame finishing inside
// the 648,000-cycle budget (27 MHz, 48 kHz, 1,152 samples). It also counts
// the mechanisms: bank swaps, FFT and AF runs, FFT/AF parallel cycles,
// FFT/DSP pipeline overlap, DSP stalls on busy modules, bitstream
// back-pressure, and LOG, POW and MAC instructions; one that never happens
// counts as a failure.
module tb_audio_encoder_top;
  import enc_pkg::*;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        prog_we, run, halted;
  logic [9:0]  prog_addr;
  logic [31:0] prog_data;
  logic        fft_in_valid, fft_in_ready, af_in_valid, af_in_ready;
  logic [15:0] fft_in_data, af_in_data;
  logic        coef_we;
  logic [8:0]  coef_addr;
  logic [15:0] coef_data;
  logic        bs_valid, bs_ready;
  logic [31:0] bs_data;
  int checks = 0, failures = 0;

  audio_encoder_top dut (.*);

  // ---------------- stimulus ----------------
  function automatic logic signed [15:0] fft_sig(int c, int n);
    return 16'($rtoi((8000.0 + 1000.0 * c) * $cos(2.0 * PI * real'(20 + 30 * c) * real'(n) / 1024.0)));
  endfunction
  function automatic logic signed [15:0] af_sig(int c, int n);
    return 16'($rtoi(7000.0 * $sin(2.0 * PI * real'(30 + 45 * c) * real'(n) / 1152.0)
                     + 2500.0 * $cos(2.0 * PI * 0.21 * real'(c + 1) * real'(n))));
  endfunction

  int fft_run = 0, fft_n = 0, af_n [5];
  always @(posedge clk) begin
    if (dut.fft_start) begin fft_n <= 0; end
    else if (fft_in_valid && fft_in_ready) fft_n <= fft_n + 1;
    if (dut.u_fft.done) fft_run <= fft_run + 1;
    if (af_in_valid && af_in_ready) af_n[dut.u_af.ch] <= af_n[dut.u_af.ch] + 1;
  end
  always_comb begin
    fft_in_valid = 1'b1;
    fft_in_data  = fft_sig(fft_run, fft_n);
    af_in_valid  = 1'b1;
    af_in_data   = af_sig(int'(dut.u_af.ch), af_n[dut.u_af.ch]);
  end
  always @(negedge clk) bs_ready <= ($urandom() % 4) != 0;

  // ---------------- mechanism counters ----------------
  int n_swaps = 0, n_fft_done = 0, n_af_done = 0, n_parallel = 0, n_pipeline = 0;
  int n_dsp_stall = 0, n_bs_stall = 0, n_log = 0, n_pow = 0, n_mac = 0, cyc = 0;
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (dut.bank_swap) n_swaps++;
    if (dut.u_fft.done) n_fft_done++;
    if (dut.u_af.done) n_af_done++;
    if (dut.fft_busy && dut.af_busy && !halted) n_parallel++;
    if (dut.fft_busy && dut.u_dsp.issue && dut.u_dsp.op == OP_LDBK) n_pipeline++;
    if (dut.u_dsp.running && dut.u_dsp.stall && dut.u_dsp.op != OP_OUT) n_dsp_stall++;
    if (bs_valid && !bs_ready) n_bs_stall++;
    if (dut.u_dsp.issue && dut.u_dsp.op == OP_LOG) n_log++;
    if (dut.u_dsp.issue && dut.u_dsp.op == OP_POW) n_pow++;
    if (dut.u_dsp.issue && (dut.u_dsp.op == OP_MACLD || dut.u_dsp.op == OP_MAC)) n_mac++;
  end

  logic [31:0] outs [$];
  always @(posedge clk) if (bs_valid && bs_ready) outs.push_back(bs_data);

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- helpers ----------------
  int cq [512];
  function automatic int mq(int k, int i);
    return $rtoi($floor(16384.0 * $cos(PI * real'(((2 * k + 1) * (i - 16)) % 128) / 64.0) + 0.5));
  endfunction

  task automatic check_count(input string what, input int n);
    checks++;
    if (n == 0) begin failures++; $display("mechanism never happened: %s", what); end
    else $display("  %-34s %0d", what, n);
  endtask

  logic [31:0] prog [$];
  int t_run, t_halt;

  initial begin
    prog_we = 0; prog_addr = 0; prog_data = 0; run = 0;
    coef_we = 0; coef_addr = 0; coef_data = 0;
    for (int c = 0; c < 5; c++) af_n[c] = 0;
    prog = '{
      asm_i(OP_LDI, 1, 0, 0),          // 0  r1 = channel
      asm_i(OP_LDI, 2, 0, 7),          // 1  r2 = 7 FFT channels
      asm_i(OP_LDI, 3, 0, 5),          // 2  r3 = 5 AF channels
      asm_r(OP_FFTGO, 0, 0, 0),        // 3  FFT of channel 0
      asm_i(OP_BLT, 1, 3, 2),          // 4  L0: if r1 < 5 filter it
      asm_i(OP_JMP, 0, 0, 7),          // 5
      asm_i(OP_AFGO, 0, 1, 36),        // 6  AF channel r1, one frame
      asm_i(OP_WAIT, 0, 0, 1),         // 7  wait for the FFT
      asm_r(OP_SWAP, 0, 0, 0),         // 8  take over its spectrum
      asm_i(OP_ADDI, 4, 1, 1),         // 9
      asm_i(OP_BEQ, 4, 2, 2),          // 10 last channel: no next FFT
      asm_r(OP_FFTGO, 0, 0, 0),        // 11 next FFT runs during the analysis
      asm_i(OP_LDI, 5, 0, 0),          // 12 k
      asm_i(OP_LDI, 6, 0, 512),        // 13
      asm_i(OP_LDI, 7, 0, -32768),     // 14 peak dB
      asm_i(OP_LDI, 8, 0, 0),          // 15 peak line
      asm_i(OP_LDBK, 9, 5, 0),         // 16 LA
      asm_r(OP_LOG, 10, 9, 0),         // 17
      asm_i(OP_BLT, 10, 7, 3),         // 18
      asm_r(OP_ADD, 7, 10, 0),         // 19
      asm_r(OP_ADD, 8, 5, 0),          // 20
      asm_i(OP_ADDI, 5, 5, 1),         // 21
      asm_i(OP_BNE, 5, 6, -6),         // 22
      asm_r(OP_OUT, 0, 8, 0),          // 23 peak line
      asm_r(OP_OUT, 0, 7, 0),          // 24 peak level, 8.8 dB
      asm_i(OP_LDI, 11, 0, -6912),     // 25 slope -27 dB (8.8)
      asm_i(OP_LDI, 12, 0, 1),         // 26 dz = 1
      asm_r(OP_MACLD, 7, 11, 12),      // 27 acc = peak + slope*dz
      asm_i(OP_MACRD, 13, 0, 0),       // 28
      asm_r(OP_POW, 14, 13, 0),        // 29
      asm_r(OP_OUT, 0, 14, 0),         // 30 linear masking value
      asm_i(OP_ADDI, 1, 1, 1),         // 31
      asm_i(OP_BNE, 1, 2, -28),        // 32 -> L0
      asm_i(OP_WAIT, 0, 0, 2),         // 33 wait for the AF module
      asm_i(OP_LDI, 5, 0, 0),          // 34
      asm_i(OP_LDI, 6, 0, 1152),       // 35
      asm_i(OP_LDSB, 9, 5, 0),         // 36 LM: ch0
      asm_i(OP_LDSB, 10, 5, 1152),     // 37 ch1
      asm_r(OP_ADD, 9, 9, 10),         // 38
      asm_i(OP_SRA, 9, 9, 1),          // 39
      asm_i(OP_STSB, 9, 5, 5760),      // 40 ch5 = (ch0 + ch1)/2
      asm_i(OP_ADDI, 5, 5, 1),         // 41
      asm_i(OP_BNE, 5, 6, -6),         // 42 -> LM
      asm_i(OP_LDSB, 9, 0, 5793),      // 43
      asm_r(OP_OUT, 0, 9, 0),          // 44
      asm_r(OP_HALT, 0, 0, 0)          // 45
    };
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    foreach (prog[i]) begin
      prog_we = 1; prog_addr = 10'(i); prog_data = prog[i];
      @(negedge clk);
    end
    prog_we = 0;
    for (int i = 0; i < 512; i++) begin
      real d, h;
      d = real'(i) - 255.5;
      h = $sin(PI * d / 64.0) / (PI * d) * (0.5 - 0.5 * $cos(2.0 * PI * (real'(i) + 0.5) / 512.0));
      cq[i] = $rtoi($floor(h * 524288.0 * 2.0 + 0.5));
      coef_we = 1; coef_addr = 9'(i); coef_data = 16'(cq[i]);
      @(negedge clk);
    end
    coef_we = 0;
    run = 1;
    t_run = cyc;
    @(negedge clk);
    run = 0;
    while (!halted) @(negedge clk);
    t_halt = cyc;
    $display("frame: %0d cycles from run to halt", t_halt - t_run);
    checks++;
    if (t_halt - t_run > 648000) begin failures++; $display("frame deadline of 648,000 cycles missed"); end

    // FFT / psychoacoustic results
    checks++;
    if (outs.size() != 7 * 3 + 1) begin failures++; $display("%0d output words", outs.size()); end
    for (int c = 0; c < 7 && 3 * c + 2 < outs.size(); c++) begin
      real a, ref_db, got_db, mask;
      a      = 8000.0 + 1000.0 * c;
      ref_db = 10.0 * $log10(a * a / 4.0);
      got_db = real'($signed(outs[3 * c + 1][15:0])) / 256.0;
      mask   = $pow(10.0, (ref_db - 27.0) / 10.0);
      checks += 3;
      if (outs[3 * c] != 32'(20 + 30 * c)) begin failures++; $display("ch %0d peak line %0d", c, outs[3 * c]); end
      if (got_db - ref_db > 0.1 || ref_db - got_db > 0.1) begin failures++; $display("ch %0d peak %f dB, expected %f", c, got_db, ref_db); end
      if (real'(outs[3 * c + 2]) > 1.02 * mask || real'(outs[3 * c + 2]) < 0.98 * mask) begin
        failures++; $display("ch %0d masking value %0d expected %f", c, outs[3 * c + 2], mask);
      end
    end

    // subband samples of the five channels against a floating-point model
    for (int c = 0; c < 5; c++) begin
      real x [1152];
      for (int n = 0; n < 1152; n++) x[n] = real'(af_sig(c, n));
      for (int b = 0; b < 36; b++) begin
        real y [64];
        int newest;
        newest = 32 * b + 31;
        for (int i = 0; i < 64; i++) begin
          y[i] = 0.0;
          for (int j = 0; j < 8; j++) begin
            int t;
            t = i + 64 * j;
            if (newest - t >= 0) y[i] += x[newest - t] * real'(cq[t]) / 524288.0;
          end
        end
        for (int k = 0; k < 32; k++) begin
          real s, got, err;
          s = 0.0;
          for (int i = 0; i < 64; i++) s += y[i] * real'(mq(k, i)) / 16384.0;
          got = real'($signed(dut.u_sbmem.mem[c * 1152 + b * 32 + k])) / 256.0;
          err = got - s;
          checks++;
          if (err > 0.5 || err < -0.5) begin
            failures++;
            if (failures < 10) $display("ch %0d blk %0d sb %0d: got %f expected %f", c, b, k, got, s);
          end
        end
      end
    end

    // downmix written by the DSP
    for (int i = 0; i < 1152; i++) begin
      logic signed [31:0] a0, a1, m;
      a0 = 32'($signed(dut.u_sbmem.mem[i]));
      a1 = 32'($signed(dut.u_sbmem.mem[1152 + i]));
      m  = (a0 + a1) >>> 1;
      checks++;
      if (dut.u_sbmem.mem[5760 + i] !== 24'(m)) begin
        failures++;
        if (failures < 10) $display("downmix %0d: %h expected %h", i, dut.u_sbmem.mem[5760 + i], 24'(m));
      end
      if (i == 33) begin
        checks++;
        if (outs.size() != 22 || outs[21] !== m) begin failures++; $display("downmix word out %h", m); end
      end
    end

    $display("mechanisms:");
    check_count("spectrum bank swaps", n_swaps);
    check_count("FFT runs", n_fft_done);
    check_count("AF runs", n_af_done);
    check_count("FFT/AF parallel cycles", n_parallel);
    check_count("FFT/DSP pipeline overlap (LDBK)", n_pipeline);
    check_count("DSP stalls on a busy module", n_dsp_stall);
    check_count("bitstream back-pressure cycles", n_bs_stall);
    check_count("LOG instructions", n_log);
    check_count("POW instructions", n_pow);
    check_count("MAC instructions", n_mac);
    checks += 3;
    if (n_swaps != 7)    begin failures++; $display("expected 7 bank swaps"); end
    if (n_fft_done != 7) begin failures++; $display("expected 7 FFT runs"); end
    if (n_af_done != 5)  begin failures++; $display("expected 5 AF runs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
