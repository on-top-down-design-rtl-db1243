// Self-checking testbench of subband_memory.
//
// Writes random words over the whole 8,064-word range from both ports
// (including same-address collisions, where port B must win), then reads every
// word back through port B and compares with a reference array.
module tb_subband_memory;
  localparam int DEPTH = 8064, WIDTH = 24;
  logic clk = 0;
  always #5 clk = ~clk;
  logic a_we, b_we;
  logic [12:0] a_addr, b_addr;
  logic [WIDTH-1:0] a_wdata, b_wdata, b_rdata;
  logic [WIDTH-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  subband_memory dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a_we = 0; b_we = 0; a_addr = 0; b_addr = 0; a_wdata = 0; b_wdata = 0;
    @(negedge clk);
    for (int i = 0; i < DEPTH; i++) begin
      a_we = 1; a_addr = 13'(i); a_wdata = WIDTH'($urandom());
      model[i] = a_wdata;
      b_we = 0;
      @(negedge clk);
    end
    for (int i = 0; i < 3000; i++) begin
      a_we = 1; a_addr = 13'($urandom() % DEPTH); a_wdata = WIDTH'($urandom());
      b_we = ($urandom() % 2) == 1;
      b_addr = (($urandom() % 4) == 0) ? a_addr : 13'($urandom() % DEPTH);
      b_wdata = WIDTH'($urandom());
      model[a_addr] = a_wdata;
      if (b_we) model[b_addr] = b_wdata;
      @(negedge clk);
    end
    a_we = 0; b_we = 0;
    for (int i = 0; i < DEPTH; i++) begin
      b_addr = 13'(i); #1;
      checks++;
      if (b_rdata !== model[i]) begin
        failures++;
        if (failures < 10) $display("word %0d: %h expected %h", i, b_rdata, model[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
