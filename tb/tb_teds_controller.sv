// tb_teds_controller: checks the step-motor MD-TEDS image after reset octet
// by octet (length 0x17, fields 3..7, checksum 0xFC1D), the empty Meta- and
// TC-TEDS, writes and read-back in each TEDS, independence of the three
// images, out-of-range addresses and unknown codes.
module tb_teds_controller;
  logic clk = 0, rst_n = 0, we = 0;
  logic [7:0] sel = 0, addr = 0, wdata = 0, rdata;
  logic sel_ok;
  int checks = 0, failures = 0;

  teds_controller dut (.clk, .rst_n, .sel, .addr, .we, .wdata, .rdata, .sel_ok);
  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic rdc(input logic [7:0] s, input logic [7:0] a, input logic [7:0] exp,
                     input string msg);
    sel = s; addr = a; #1;
    check(rdata == exp, $sformatf("%s: TEDS %02h octet %0d = %02h exp %02h", msg, s, a, rdata, exp));
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static logic [7:0] md [27] = '{8'h00, 8'h00, 8'h00, 8'h17,
      8'h03, 8'h04, 8'h00, 8'h80, 8'h01, 8'h01, 8'h04, 8'h01, 8'h01,
      8'h05, 8'h02, 8'hFF, 8'hFF, 8'h06, 8'h01, 8'h00,
      8'h07, 8'h03, 8'h01, 8'h86, 8'hA0, 8'hFC, 8'h1D};
    logic [7:0] shadow [3][64];
    static logic [7:0] codes [3] = '{8'h01, 8'h03, 8'h80};
    logic [7:0] v;
    repeat (2) @(posedge clk); rst_n = 1; @(negedge clk);
    for (int i = 0; i < 27; i++)
      rdc(8'h80, 8'(i), md[i], "MD-TEDS");
    for (int i = 27; i < 64; i++) rdc(8'h80, 8'(i), 8'h00, "MD-TEDS tail");
    rdc(8'h01, 8'd3, 8'h02, "empty Meta-TEDS"); rdc(8'h01, 8'd4, 8'hFF, "empty Meta-TEDS");
    rdc(8'h01, 8'd5, 8'hFE, "empty Meta-TEDS");
    rdc(8'h03, 8'd3, 8'h02, "empty TC-TEDS"); rdc(8'h03, 8'd5, 8'hFE, "empty TC-TEDS");
    sel = 8'h80; #1; check(sel_ok, "0x80 known");
    sel = 8'h02; #1; check(!sel_ok, "0x02 unknown");
    rdc(8'h02, 8'd3, 8'h00, "unknown code");
    // fill all three with random data and read back
    for (int t = 0; t < 3; t++)
      for (int i = 0; i < 64; i++) begin
        v = 8'($urandom); shadow[t][i] = v;
        @(negedge clk); sel = codes[t]; addr = 8'(i); wdata = v; we = 1;
        @(negedge clk); we = 0;
      end
    for (int t = 0; t < 3; t++)
      for (int i = 0; i < 64; i++)
        rdc(codes[t], 8'(i), shadow[t][i], "readback");
    // out of range: no write, reads 0
    @(negedge clk); sel = 8'h80; addr = 8'd64; wdata = 8'h55; we = 1;
    @(negedge clk); we = 0;
    rdc(8'h80, 8'd64, 8'h00, "out of range read");
    rdc(8'h80, 8'd0, shadow[2][0], "out of range write aliased");
    // reset restores defaults
    rst_n = 0; #1; rst_n = 1; @(negedge clk);
    rdc(8'h80, 8'd25, 8'hFC, "checksum after reset"); rdc(8'h80, 8'd26, 8'h1D, "checksum after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
