// tb_ieee1451_tim_full: the TIM with every parameter at its default (434
// clocks per bit, i.e. 115200 baud from 50 MHz) running the step-motor
// example as shipped: the MD-TEDS defaults (direction 1, continuous, half
// step, time divider 100000). The NCAP model reads the MD-TEDS over the line,
// triggers the channel, watches three steps at 50 MHz clk_external (one step
// every 2 * 100000 cycles = 4 ms, i.e. 250 steps/s), reads the channel
// status and aborts. The first step follows the start position after
// 100000 + 1 cycles (the divider starts one cycle after the start), the
// others every 200000.
module tb_ieee1451_tim_full;
  import ieee1451_pkg::*;
  localparam int CPB = 434;
  logic clk = 0, clk_ext = 0, rst_n = 0, rx = 1;
  logic tx;
  logic [5:0] data_out;
  int checks = 0, failures = 0;

  ieee1451_tim dut (
    .clk, .rst_n, .rs232_rx(rx), .rs232_tx(tx), .clk_external(clk_ext), .data_out);
  always #10 clk = ~clk;          // 50 MHz
  always #10 clk_ext = ~clk_ext;  // 50 MHz, separate clock

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

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
    while ((reply.size() < 3 || reply.size() < 3 + int'({reply[1], reply[2]})) && n < 500000) begin
      @(posedge clk); n++;
    end
    check(n < 500000, "no reply");
    repeat (100) @(posedge clk);
  endtask

  function automatic logic [5:0] ref_pat(input int p);
    int at[8] = '{1, 1, 0, -1, -1, -1, 0, 1};
    int bt[8] = '{0, 1, 1, 1, 0, -1, -1, -1};
    return {bt[p] != 0, at[p] != 0, bt[p] < 0, bt[p] > 0, at[p] < 0, at[p] > 0};
  endfunction

  logic [5:0] chg_v [$];
  longint     chg_t [$];
  longint     ext_cyc = 0;
  logic [5:0] prev = 0;
  always @(posedge clk_ext) begin
    ext_cyc++;
    if (data_out != prev) begin chg_v.push_back(data_out); chg_t.push_back(ext_cyc); end
    prev = data_out;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
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
    repeat (5) @(posedge clk); rst_n = 1;
    repeat (500) @(posedge clk);
    cmd(16'd1, CLS_COMMON, FN_READ_TEDS, '{8'h80, 8'h00, 8'h00, 8'h00, 8'h00});
    ok = (reply.size() == 34) && reply[0] == 1;
    for (int i = 0; i < 27 && ok; i++) if (reply[7 + i] != md[i]) ok = 0;
    check(ok, "MD-TEDS read at 115200 baud");
    chg_v.delete(); chg_t.delete();
    cmd(16'd1, CLS_OPERATE, FN_TRIGGER, '{});
    check(reply.size() == 3 && reply[0] == 1, "trigger");
    while (chg_v.size() < 4 && ext_cyc < 2_000_000) @(posedge clk_ext);
    // the first change is the start position: A+ (position 0) from reset
    check(chg_v.size() >= 4 && chg_v[0] == ref_pat(0), "start position A+");
    for (int s = 1; s < 4 && s < chg_v.size(); s++) begin
      check(chg_v[s] == ref_pat(s), $sformatf("half step %0d: %06b", s, chg_v[s]));
      check(chg_t[s] - chg_t[s-1] == (s == 1 ? 100001 : 200000),
            $sformatf("step %0d after %0d clk_external cycles", s, chg_t[s] - chg_t[s-1]));
    end
    cmd(16'd1, CLS_OPERATE, FN_READ_TC, '{8'h00, 8'h00, 8'h00, 8'h00});
    check(reply.size() == 9 && reply[7] == 8'b1100_0000, $sformatf("running, dir 1, half step: %p", reply));
    cmd(16'd1, CLS_OPERATE, FN_ABORT, '{});
    check(reply[0] == 1, "abort");
    chg_v.delete();
    repeat (250000) @(posedge clk_ext);
    check(chg_v.size() == 0, "stopped after abort");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
