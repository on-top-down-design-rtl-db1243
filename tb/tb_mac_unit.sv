// Self-checking testbench of mac_unit.
//
// Drives random load / accumulate sequences with random signed operands and
// compares the accumulator, one cycle after each step, with a reference sum
// kept here. Also checks the single-cycle form b + a*dz (load and en together).
module tb_mac_unit;
  localparam int A_W = 16, B_W = 16, ACC_W = 40;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic load, en;
  logic signed [ACC_W-1:0] init, acc;
  logic signed [A_W-1:0] a;
  logic signed [B_W-1:0] b;
  longint model;
  int checks = 0, failures = 0;

  mac_unit #(.A_W(A_W), .B_W(B_W), .ACC_W(ACC_W)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 0; en = 0; init = 0; a = 0; b = 0; model = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (acc != 0) begin failures++; $display("acc not cleared by reset"); end
    for (int i = 0; i < 5000; i++) begin
      int r;
      r = $urandom() % 8;
      load = (r == 0) || (r == 1);
      en   = (r != 1) && (r != 7);
      init = ACC_W'($signed($urandom()));
      a    = A_W'($urandom());
      b    = B_W'($urandom());
      if (load) model = longint'(init);
      if (en)   model = model + longint'(a) * longint'(b);
      model = longint'($signed(ACC_W'(model)));
      @(negedge clk);
      checks++;
      if (acc != ACC_W'(model)) begin
        failures++;
        if (failures < 10) $display("step %0d: acc=%0d expected %0d", i, acc, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
