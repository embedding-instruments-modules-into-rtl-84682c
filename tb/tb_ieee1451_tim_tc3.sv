// tb_ieee1451_tim_tc3: the TIM with the step-motor channel numbered 3, as an
// NCAP web page would address it with "ReadTeds of TEDS 128 on TC 3". The
// testbench plays the NCAP on the RS-232 line at 8 clocks per bit. It reads
// the MD-TEDS (code 0x80 = 128) of TC 3 and compares all 27 octets and the
// success flag with the default data sheet. It checks that the same request
// on TC 1 is rejected, then sets a short time divider in TC 3's MD-TEDS,
// triggers TC 3, checks that the motor lines step, and aborts.
module tb_ieee1451_tim_tc3;
  import ieee1451_pkg::*;
  localparam int CPB = 8;
  logic clk = 0, clk_ext = 0, rst_n = 0, rx = 1;
  logic tx;
  logic [5:0] data_out;
  int checks = 0, failures = 0;

  ieee1451_tim #(.TC_ID(16'd3), .CLKS_PER_BIT(CPB)) dut (
    .clk, .rst_n, .rs232_rx(rx), .rs232_tx(tx), .clk_external(clk_ext), .data_out);
  always #5 clk = ~clk;
  always #7 clk_ext = ~clk_ext;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---- NCAP line model ----
  logic [7:0] reply [$];
  initial forever begin : line_rx
    logic [7:0] b;
    @(negedge tx);
    repeat (CPB / 2) @(posedge clk);
    for (int i = 0; i < 8; i++) begin repeat (CPB) @(posedge clk); b[i] = tx; end
    repeat (CPB) @(posedge clk);
    reply.push_back(b);
  end

  task automatic send_byte(input logic [7:0] b);
    @(posedge clk); rx = 0; repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rx = b[i]; repeat (CPB) @(posedge clk); end
    rx = 1; repeat (CPB + 2) @(posedge clk);
  endtask

  task automatic cmd(input logic [15:0] tc, input logic [7:0] cls, input logic [7:0] fn,
                     input logic [7:0] pay [$]);
    logic [7:0] f [$];
    int n = 0;
    f = {tc[15:8], tc[7:0], cls, fn, 8'(pay.size() >> 8), 8'(pay.size())};
    f = {f, pay};
    reply.delete();
    foreach (f[i]) send_byte(f[i]);
    while ((reply.size() < 3 || reply.size() < 3 + int'({reply[1], reply[2]})) && n < 20000) begin
      @(posedge clk); n++;
    end
    check(n < 20000, "no reply");
    repeat (20) @(posedge clk);
  endtask

  // motor line changes
  int n_chg = 0;
  logic [5:0] prev = 0;
  always @(posedge clk_ext) begin
    if (data_out != prev) n_chg++;
    prev <= data_out;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static logic [7:0] md [27] = '{8'h00, 8'h00, 8'h00, 8'h17,
      8'h03, 8'h04, 8'h00, 8'h80, 8'h01, 8'h01, 8'h04, 8'h01, 8'h01,
      8'h05, 8'h02, 8'hFF, 8'hFF, 8'h06, 8'h01, 8'h00,
      8'h07, 8'h03, 8'h01, 8'h86, 8'hA0, 8'hFC, 8'h1D};
    bit ok;
    int c0;
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (300) @(posedge clk);

    // ReadTEDSSegment, TC 3, TEDS 128, offset 0: the whole 27-octet image
    cmd(16'd3, CLS_COMMON, FN_READ_TEDS, '{8'd128, 8'h00, 8'h00, 8'h00, 8'h00});
    check(reply.size() >= 3 && reply[0] == 8'd1, "TC 3 ReadTeds 128 succeeds");
    check(reply.size() == 3 + 4 + 27 && reply[1] == 8'd0 && reply[2] == 8'd31,
          $sformatf("reply length %0d", reply.size()));
    ok = 1;
    for (int i = 0; i < 27; i++) if (i + 7 >= reply.size() || reply[7 + i] != md[i]) ok = 0;
    check(ok, "MD-TEDS contents on TC 3");

    // the same request on TC 1 addresses no channel
    cmd(16'd1, CLS_COMMON, FN_READ_TEDS, '{8'd128, 8'h00, 8'h00, 8'h00, 8'h00});
    check(reply.size() == 3 && reply[0] == 8'd0, "TC 1 rejected");

    // time divider 4 (octets 22..24), trigger TC 3, motor steps, abort
    cmd(16'd3, CLS_COMMON, FN_WRITE_TEDS, '{8'd128, 8'h00, 8'h00, 8'h00, 8'd22,
                                           8'h00, 8'h00, 8'h04});
    check(reply.size() == 3 && reply[0] == 8'd1, "WriteTeds on TC 3");
    c0 = n_chg;
    cmd(16'd3, CLS_OPERATE, FN_TRIGGER, '{});
    check(reply.size() == 3 && reply[0] == 8'd1, "Trigger on TC 3");
    repeat (400) @(posedge clk_ext);
    check(n_chg - c0 >= 20, $sformatf("motor stepped %0d times", n_chg - c0));
    cmd(16'd3, CLS_OPERATE, FN_ABORT, '{});
    check(reply.size() == 3 && reply[0] == 8'd1, "AbortTrigger on TC 3");
    repeat (50) @(posedge clk_ext);
    c0 = n_chg;
    repeat (200) @(posedge clk_ext);
    check(n_chg == c0, "motor stopped");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
