// Self-checking testbench of bank_memory.
//
// Fills the write bank with one pattern, swaps, checks that the read side sees
// that pattern while a second pattern goes into the other bank, swaps again
// and checks the second pattern; repeated several rounds with random data.
module tb_bank_memory;
  localparam int DEPTH = 512, WIDTH = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic swap, wr_bank, wr_en;
  logic [8:0] wr_addr, rd_addr;
  logic [WIDTH-1:0] wr_data, rd_data;
  logic [WIDTH-1:0] model [2][DEPTH];
  int checks = 0, failures = 0;

  bank_memory dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int wb;
    swap = 0; wr_en = 0; wr_addr = 0; wr_data = 0; rd_addr = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (wr_bank !== 1'b0) begin failures++; $display("reset bank not 0"); end
    wb = 0;
    for (int round = 0; round < 6; round++) begin
      // FFT side fills the write bank, DSP side reads the other bank meanwhile
      for (int i = 0; i < DEPTH; i++) begin
        wr_en = 1; wr_addr = 9'(i); wr_data = $urandom();
        model[wb][i] = wr_data;
        rd_addr = 9'(DEPTH - 1 - i);
        #1;
        if (round > 0) begin
          checks++;
          if (rd_data !== model[1-wb][DEPTH-1-i]) begin
            failures++;
            if (failures < 10) $display("round %0d read %0d: %h expected %h", round, DEPTH-1-i, rd_data, model[1-wb][DEPTH-1-i]);
          end
        end
        @(negedge clk);
      end
      wr_en = 0;
      swap = 1;
      @(negedge clk);
      swap = 0;
      wb = 1 - wb;
      checks++;
      if (wr_bank !== 1'(wb)) begin failures++; $display("bank did not switch"); end
      // the finished bank is now readable
      for (int i = 0; i < DEPTH; i += 7) begin
        rd_addr = 9'(i); #1;
        checks++;
        if (rd_data !== model[1-wb][i]) begin failures++; $display("after swap %0d: %h", i, rd_data); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
