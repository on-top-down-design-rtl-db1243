// Self-checking testbench of fft_module at its full size (1,024 points).
//
// Frame 1: two sinusoids plus a pseudo-random component, streamed without
// gaps; the 512 power lines written to the bank port are compared with a
// floating-point DFT computed here (|X(k)/N|^2, tolerance 0.2 % + 64), and the
// start-to-done time must stay within the 45,000-cycle budget. Frame 2: an
// impulse-free random signal streamed with random gaps, to check that input
// stalls and back-to-back commands work. busy and in_ready are checked too.
module tb_fft_module;
  import enc_pkg::*;
  localparam int N = 1024;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, busy, done, in_valid, in_ready, spec_we;
  logic [PCM_W-1:0] in_data;
  logic [8:0] spec_addr;
  logic [31:0] spec_data;
  int checks = 0, failures = 0;
  logic signed [15:0] samples [N];
  logic [31:0] got [N/2];
  int nwritten;

  fft_module dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (spec_we) begin
    got[spec_addr] <= spec_data;
    nwritten++;
  end

  task automatic make_signal(input int kind);
    for (int n = 0; n < N; n++) begin
      real v;
      if (kind == 0)
        v = 12000.0 * $cos(2.0 * PI * 37.0 * n / N) + 6000.0 * $sin(2.0 * PI * 200.3 * n / N)
          + real'(int'($urandom() % 2001) - 1000);
      else
        v = real'(int'($urandom() % 40001) - 20000);
      samples[n] = 16'($rtoi(v));
    end
  endtask

  task automatic run_frame(input bit gaps, output int cycles);
    int t0, n;
    nwritten = 0;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    t0 = 1;
    checks++;
    if (!busy) begin failures++; $display("busy not raised"); end
    n = 0;
    while (!done) begin
      in_valid = (n < N) && (!gaps || ($urandom() % 3 != 0));
      in_data  = (n < N) ? samples[n] : '0;
      #1;
      if (in_valid && in_ready) n++;
      @(negedge clk);
      t0++;
    end
    in_valid = 0;
    cycles = t0;
  endtask

  task automatic compare();
    for (int k = 0; k < N / 2; k++) begin
      real re, im, p, err;
      re = 0.0;
      im = 0.0;
      for (int n = 0; n < N; n++) begin
        re += real'(samples[n]) * $cos(2.0 * PI * k * n / N);
        im -= real'(samples[n]) * $sin(2.0 * PI * k * n / N);
      end
      p = (re * re + im * im) / (real'(N) * real'(N));
      err = real'(got[k]) - p;
      if (err < 0) err = -err;
      checks++;
      if (err > 0.002 * p + 64.0) begin
        failures++;
        if (failures < 10) $display("bin %0d: got %0d expected %f", k, got[k], p);
      end
    end
    checks++;
    if (nwritten != N / 2) begin failures++; $display("%0d lines written", nwritten); end
  endtask

  initial begin
    int cyc;
    start = 0; in_valid = 0; in_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    make_signal(0);
    run_frame(0, cyc);
    $display("FFT frame: %0d cycles from start to done", cyc);
    checks++;
    if (cyc > 45000) begin failures++; $display("cycle budget exceeded: %0d", cyc); end
    @(negedge clk);
    compare();
    checks++;
    if (busy || in_ready) begin failures++; $display("not idle after done"); end
    make_signal(1);
    run_frame(1, cyc);
    @(negedge clk);
    compare();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
