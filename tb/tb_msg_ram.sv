// tb_msg_ram -- self-checking testbench of the memory used for banks and buffers.
// Random writes and reads against an array kept by the testbench: read data must appear one
// clock after the read request, a read of the address written in the same cycle must return
// the new word (write-first), and the output must hold while no read is requested.
module tb_msg_ram;
  localparam int WIDTH = 8, DEPTH = 24;
  logic clk = 0, we = 0, re = 0;
  logic [4:0] wr_addr = '0, rd_addr = '0;
  logic [WIDTH-1:0] wr_data = '0, rd_data;
  logic [WIDTH-1:0] shadow [DEPTH];
  int checks = 0, failures = 0, bypass = 0;

  msg_ram #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    logic [WIDTH-1:0] expect_q;
    logic pending;
    // fill every word first
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; wr_addr = 5'(a); wr_data = 8'($urandom); shadow[a] = wr_data;
    end
    @(negedge clk);
    we = 0;
    pending = 0;
    for (int n = 0; n < 3000; n++) begin
      we = 1'($urandom_range(0, 1));
      re = 1'($urandom_range(0, 3) != 0);
      wr_addr = 5'($urandom_range(0, DEPTH - 1));
      rd_addr = ($urandom_range(0, 3) == 0) ? wr_addr : 5'($urandom_range(0, DEPTH - 1));
      wr_data = 8'($urandom);
      if (re) begin
        expect_q = (we && wr_addr == rd_addr) ? wr_data : shadow[rd_addr];
        if (we && wr_addr == rd_addr) bypass++;
      end
      pending = re || pending;
      if (we) shadow[wr_addr] = wr_data;
      @(negedge clk);
      if (pending) begin
        checks++;
        if (rd_data !== expect_q) begin
          failures++;
          $display("read returned %h, expected %h", rd_data, expect_q);
        end
      end
    end
    checks++;
    if (bypass == 0) begin
      failures++;
      $display("no same-address read and write happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
