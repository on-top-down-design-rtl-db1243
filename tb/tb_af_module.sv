// Self-checking testbench of af_module at its full size.
//
// Loads a 512-tap low-pass window (a Hann-windowed sinc, standing in for the
// standard's analysis window), then issues several commands on different
// channels, including a second command on the same channel so that the
// per-channel history must carry over. Every subband sample written to the
// memory port is compared with a floating-point model of the polyphase
// filterbank in its direct 64-term matrixing form, computed here from the
// same quantised window and exact cosines (tolerance 0.1 PCM units), every
// expected address must be written, and each block must take no more than
// 1,944 cycles, the 350,000-cycle budget spread over 5 x 36 blocks.
module tb_af_module;
  import enc_pkg::*;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, busy, done, in_valid, in_ready, coef_we, sb_we;
  logic [2:0] cmd_ch;
  logic [5:0] cmd_nblk;
  logic [PCM_W-1:0] in_data;
  logic [8:0] coef_addr;
  logic [COEF_W-1:0] coef_data;
  logic [12:0] sb_addr;
  logic [SB_W-1:0] sb_data;
  int checks = 0, failures = 0;

  af_module dut (.*);

  int   cq [512];            // window coefficients as integers (Q.19)
  real  hist [5][$];         // per-channel input history, newest first
  logic [SB_W-1:0] mem [8064];
  bit   written [8064];
  real  expect_s [8064];
  bit   expect_v [8064];

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (sb_we) begin
    mem[sb_addr]     <= sb_data;
    written[sb_addr] <= 1'b1;
  end

  function automatic real mcos(int k, int i);
    return $cos(PI * real'((2 * k + 1) * (i - 16)) / 64.0);
  endfunction

  // model one block of channel c after its 32 new samples are in hist[c]
  task automatic model_block(input int c, input int blk);
    real y [64];
    for (int i = 0; i < 64; i++) begin
      y[i] = 0.0;
      for (int j = 0; j < 8; j++) begin
        int t;
        real x;
        t = i + 64 * j;
        x = (t < hist[c].size()) ? hist[c][t] : 0.0;
        y[i] += x * real'(cq[t]) / 524288.0;
      end
    end
    for (int k = 0; k < 32; k++) begin
      real s;
      s = 0.0;
      for (int i = 0; i < 64; i++) s += y[i] * mcos(k, i);
      expect_s[c * 1152 + blk * 32 + k] = s;
      expect_v[c * 1152 + blk * 32 + k] = 1'b1;
    end
  endtask

  task automatic run_cmd(input int c, input int nblk, input int freq);
    int cyc, n, blk;
    cyc = 0; n = 0; blk = 0;
    @(negedge clk);
    cmd_ch = 3'(c); cmd_nblk = 6'(nblk); start = 1;
    @(negedge clk);
    start = 0;
    while (!done) begin
      logic signed [15:0] v;
      v = 16'($rtoi(9000.0 * $sin(2.0 * PI * freq * real'(hist[c].size()) / 1152.0)
                    + 3000.0 * $cos(2.0 * PI * 0.37 * real'(hist[c].size()))));
      in_valid = ($urandom() % 8 != 0);
      in_data  = v;
      #1;
      if (in_valid && in_ready) begin
        hist[c].push_front(real'(v));
        n++;
        if (n % 32 == 0) begin model_block(c, blk); blk++; end
      end
      @(negedge clk);
      cyc++;
    end
    in_valid = 0;
    checks++;
    if (cyc > 1944 * nblk + 32 * nblk) begin
      failures++; $display("channel %0d: %0d cycles for %0d blocks", c, cyc, nblk);
    end
    $display("channel %0d: %0d blocks in %0d cycles (stalled input)", c, nblk, cyc);
  endtask

  initial begin
    start = 0; in_valid = 0; in_data = 0; coef_we = 0; coef_addr = 0; coef_data = 0;
    cmd_ch = 0; cmd_nblk = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // window: Hann-windowed sinc with cutoff pi/64, Q.19
    for (int i = 0; i < 512; i++) begin
      real d, h;
      d = real'(i) - 255.5;
      h = $sin(PI * d / 64.0) / (PI * d) * (0.5 - 0.5 * $cos(2.0 * PI * (real'(i) + 0.5) / 512.0));
      cq[i] = $rtoi($floor(h * 524288.0 * 2.0 + 0.5));
      @(negedge clk);
      coef_we = 1; coef_addr = 9'(i); coef_data = 16'(cq[i]);
    end
    @(negedge clk);
    coef_we = 0;
    // wait for the history clear after reset
    while (busy) @(negedge clk);
    run_cmd(2, 20, 40);
    run_cmd(0, 3, 300);
    run_cmd(2, 4, 40);   // continues channel 2: blocks 0..3 again, history kept
    repeat (3) @(negedge clk);
    for (int a = 0; a < 8064; a++) if (expect_v[a]) begin
      real err;
      err = real'($signed(mem[a])) / 256.0 - expect_s[a];
      checks++;
      if (!written[a] || err > 0.1 || err < -0.1) begin
        failures++;
        if (failures < 10) $display("addr %0d: got %f expected %f", a, real'($signed(mem[a])) / 256.0, expect_s[a]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
