// Self-checking testbench of log_pow_unit.
//
// Compares LOG mode against 10*log10(x) and POW mode against 10^(x/10),
// computed here in floating point, on edge cases and random operands. LOG must
// be within 0.02 dB; POW within 0.2 % (or 2 LSB for small results, which the scaler truncates). Also
// checks the zero input, saturation above 2^32 and underflow to zero. The unit
// is combinational, so each result is sampled 1 ns after the operand changes.
module tb_log_pow_unit;
  import enc_pkg::*;

  lp_mode_e    mode;
  logic [31:0] x, y;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  log_pow_unit dut (.mode, .x, .y);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_log(input logic [31:0] v);
    real ref_db, got;
    mode = LP_LOG; x = v; #1;
    checks++;
    if (v == 0) begin
      if (y[15:0] != 16'h8000) begin failures++; $display("LOG(0) = %h", y); end
      return;
    end
    ref_db = 10.0 * $log10(real'(v));
    got    = real'($signed(y[15:0])) / 256.0;
    if (got - ref_db > 0.02 || ref_db - got > 0.02) begin
      failures++;
      $display("LOG mismatch x=%0d got=%f ref=%f", v, got, ref_db);
    end
  endtask

  task automatic check_pow(input logic signed [15:0] v);
    real ref_lin, got, err;
    mode = LP_POW; x = {16'd0, v}; #1;
    checks++;
    ref_lin = $pow(10.0, real'(v) / 2560.0);
    got     = real'(y);
    if (ref_lin >= 4294967295.0) begin
      if (y != 32'hFFFF_FFFF) begin failures++; $display("POW no saturation x=%0d y=%h", v, y); end
      return;
    end
    err = got - ref_lin;
    if (err < 0) err = -err;
    if (err > 2.0 && err > 0.002 * ref_lin) begin
      failures++;
      $display("POW mismatch x=%f dB got=%f ref=%f", real'(v) / 256.0, got, ref_lin);
    end
  endtask

  initial begin
    check_log(0);
    check_log(1);
    check_log(2);
    check_log(10);
    check_log(1000);
    check_log(32'hFFFF_FFFF);
    for (int p = 0; p < 32; p++) check_log(32'd1 << p);
    for (int i = 0; i < 3000; i++) check_log($urandom() >> ($urandom() % 32));
    check_pow(16'sd0);
    check_pow(16'sd2560);          // 10 dB
    check_pow(16'sd24576);         // 96 dB
    check_pow(16'sh7FFF);          // ~128 dB, saturates
    check_pow(-16'sd32768);        // -128 dB, underflows to 0
    for (int i = 0; i < 3000; i++) check_pow(16'(int'($urandom() % 34560) - 10240)); // -40 .. 95 dB
    // round trip: POW(LOG(x)) close to x
    for (int i = 0; i < 500; i++) begin
      logic [31:0] v, l;
      real r;
      v = ($urandom() >> ($urandom() % 24)) | 32'd256;
      mode = LP_LOG; x = v; #1; l = y;
      mode = LP_POW; x = l; #1;
      checks++;
      r = real'(y) / real'(v);
      if (r > 1.01 || r < 0.99) begin failures++; $display("round trip x=%0d back=%0d", v, y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
