// tb_uart_rx: drives 8N1 frames bit by bit onto the line and checks every
// received byte, its arrival time (middle of the stop bit), and that a frame
// with a low stop bit is reported as a framing error and not delivered.
module tb_uart_rx;
  localparam int CPB = 16;
  logic clk = 0, rst_n = 0, rx = 1;
  logic [7:0] data;
  logic valid, frame_err;
  int checks = 0, failures = 0;
  int nvalid = 0, nerr = 0;
  logic [7:0] last;

  uart_rx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst_n, .rx, .data, .valid, .frame_err);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (valid) begin nvalid++; last = data; end
    if (frame_err) nerr++;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic send(input logic [7:0] b, input logic stop);
    rx = 0; repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rx = b[i]; repeat (CPB) @(posedge clk); end
    rx = stop; repeat (CPB) @(posedge clk);
    rx = 1;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] b;
    int t0, n0;
    repeat (3) @(posedge clk); rst_n = 1; repeat (3) @(posedge clk);
    for (int k = 0; k < 40; k++) begin
      b = (k < 4) ? (k == 0 ? 8'h00 : k == 1 ? 8'hFF : k == 2 ? 8'hA5 : 8'h5A) : 8'($urandom);
      n0 = nvalid;
      send(b, 1'b1);
      repeat (2) @(posedge clk);
      check(nvalid == n0 + 1, $sformatf("byte %0d not received", k));
      check(last == b, $sformatf("byte %0d got %02h exp %02h", k, last, b));
      repeat ($urandom_range(0, 5)) @(posedge clk);
    end
    // latency: valid comes ~9.5 bit times after the start edge (+ sync)
    n0 = nvalid; t0 = 0;
    fork
      send(8'h3C, 1'b1);
      begin while (nvalid == n0) begin @(posedge clk); t0++; end end
    join
    check(t0 >= 9*CPB + CPB/2 && t0 <= 9*CPB + CPB/2 + 4, $sformatf("latency %0d", t0));
    // framing error
    n0 = nvalid;
    send(8'h81, 1'b0);
    repeat (CPB) @(posedge clk);
    check(nvalid == n0, "byte with bad stop bit delivered");
    check(nerr == 1, "framing error not flagged");
    // recovers afterwards
    send(8'h42, 1'b1); repeat (2) @(posedge clk);
    check(last == 8'h42, "no recovery after framing error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
