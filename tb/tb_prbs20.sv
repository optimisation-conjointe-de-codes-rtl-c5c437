// tb_prbs20 -- self-checking testbench of the PRBS-20 source.
// A maximal-length 20-bit sequence has period 2^20 - 1 and holds exactly 2^19 ones per
// period. The testbench runs one full period and checks both properties, checks that no
// 20-bit window repeats the starting one earlier, and that the source holds when en is low.
module tb_prbs20;
  localparam int PERIOD = (1 << 20) - 1;
  logic clk = 0, rst_n = 0, en = 0, bit_out;
  int checks = 0, failures = 0;

  prbs20 dut (.*);

  always #5 clk = ~clk;

  initial begin
    int ones, first_repeat;
    logic [19:0] win, win0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    ones = 0;
    first_repeat = 0;
    win = '0;
    @(negedge clk);
    en = 1;
    for (int n = 0; n < PERIOD + 20; n++) begin
      if (n < PERIOD) ones += bit_out;
      win = {win[18:0], bit_out};
      if (n == 19) win0 = win;
      else if (n > 19 && win == win0 && first_repeat == 0) first_repeat = n - 19;
      @(negedge clk);
    end
    en = 0;
    checks += 2;
    if (ones != (1 << 19)) begin
      failures++;
      $display("%0d ones in a period, expected %0d", ones, 1 << 19);
    end
    if (first_repeat != PERIOD) begin
      failures++;
      $display("sequence repeats after %0d bits, expected %0d", first_repeat, PERIOD);
    end
    win0[0] = bit_out;
    repeat (5) @(negedge clk);
    checks++;
    if (bit_out != win0[0]) begin
      failures++;
      $display("source moved while disabled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (PERIOD + 1000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
