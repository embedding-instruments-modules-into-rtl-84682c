// tb_uart_tx: sends bytes and decodes the line independently, sampling each
// bit in its middle; checks start bit, data bits, stop bit, the frame length
// of 10 bit times (busy) and that the line idles high.
module tb_uart_tx;
  localparam int CPB = 12;
  logic clk = 0, rst_n = 0, start = 0;
  logic [7:0] data = 0;
  logic busy, tx;
  int checks = 0, failures = 0;

  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst_n, .data, .start, .busy, .tx);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] b, got;
    int busy_cycles;
    repeat (3) @(posedge clk); rst_n = 1; repeat (3) @(posedge clk);
    check(tx == 1'b1 && !busy, "line not idle high after reset");
    for (int k = 0; k < 30; k++) begin
      b = (k == 0) ? 8'h00 : (k == 1) ? 8'hFF : 8'($urandom);
      @(negedge clk); data = b; start = 1;
      @(negedge clk); start = 0; data = 8'($urandom);  // data is latched
      // tx went low at the edge where start was seen: mid start bit
      repeat (CPB/2 - 1) @(negedge clk);
      check(tx == 1'b0, "start bit");
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(negedge clk);
        got[i] = tx;
      end
      check(got == b, $sformatf("byte %0d sent %02h got %02h", k, b, got));
      repeat (CPB) @(negedge clk);
      check(tx == 1'b1, "stop bit");
      busy_cycles = 0;
      while (busy) begin @(negedge clk); busy_cycles++; end
      check(busy_cycles == CPB/2 + 1 || busy_cycles == CPB/2,
            $sformatf("frame length off, tail %0d", busy_cycles));
      check(tx == 1'b1, "idle after frame");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
