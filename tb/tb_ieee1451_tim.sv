// tb_ieee1451_tim: end-to-end test of the TIM. The testbench plays the NCAP:
// it sends low-level command frames on the RS-232 line, decodes the reply
// frames from the line, and watches the six motor lines. The UART runs at 8
// clocks per bit to keep the run short; the motor's time divider is set
// through the MD-TEDS. Every mechanism is counted and must occur: boot init,
// TEDS read and write, trigger with a finite step count and automatic stop,
// continuous running via Write TC trigger state, AbortTrigger, trigger state
// off, Read TC status, Write TC, an I&M error (bad step mode), Reset, a
// rejected command and a UART framing error inside a frame.
module tb_ieee1451_tim;
  import ieee1451_pkg::*;
  localparam int CPB = 8;
  logic clk = 0, clk_ext = 0, rst_n = 0, rx = 1;
  logic tx;
  logic [5:0] data_out;
  int checks = 0, failures = 0;

  ieee1451_tim #(.CLKS_PER_BIT(CPB)) dut (
    .clk, .rst_n, .rs232_rx(rx), .rs232_tx(tx), .clk_external(clk_ext), .data_out);
  always #5 clk = ~clk;
  always #6 clk_ext = ~clk_ext;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---- mechanism counters ----
  typedef enum int {M_BOOT, M_TEDS_RD, M_TEDS_WR, M_TRIGGER, M_FINITE_STOP, M_CONTINUOUS,
                    M_ABORT, M_TRIG_ON, M_TRIG_OFF, M_READ_TC, M_WRITE_TC, M_IM_ERROR,
                    M_RESET, M_REJECT, M_FRAME_ERR, M_N} mech_e;
  int mech [M_N];
  string mname [M_N] = '{"boot init", "TEDS read", "TEDS write", "trigger", "finite stop",
                         "continuous", "abort", "trigger state on", "trigger state off",
                         "read TC", "write TC", "I&M error", "reset", "rejected command",
                         "framing error"};

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

  task automatic send_byte(input logic [7:0] b, input logic stop = 1'b1);
    @(posedge clk); rx = 0; repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rx = b[i]; repeat (CPB) @(posedge clk); end
    rx = stop; repeat (CPB) @(posedge clk); rx = 1; repeat (2) @(posedge clk);
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

  task automatic write_md(input logic [7:0] off, input logic [7:0] d [$]);
    logic [7:0] p [$];
    p = {8'h80, 8'h00, 8'h00, 8'h00, off};
    p = {p, d};
    cmd(16'd1, CLS_COMMON, FN_WRITE_TEDS, p);
    check(reply.size() == 3 && reply[0] == 1, "WriteTEDS ok");
    if (reply[0] == 1) mech[M_TEDS_WR]++;
  endtask

  // ---- motor model ----
  function automatic logic [5:0] ref_pat(input int p);
    int at[8] = '{1, 1, 0, -1, -1, -1, 0, 1};
    int bt[8] = '{0, 1, 1, 1, 0, -1, -1, -1};
    return {bt[p] != 0, at[p] != 0, bt[p] < 0, bt[p] > 0, at[p] < 0, at[p] > 0};
  endfunction
  function automatic int pos_of(input logic [5:0] v);
    for (int p = 0; p < 8; p++) if (ref_pat(p) == v) return p;
    return -1;
  endfunction
  logic [5:0] chg_v [$];
  int         chg_t [$];
  int         ext_cyc = 0;
  logic [5:0] prev = 0;
  always @(posedge clk_ext) begin
    ext_cyc++;
    if (data_out != prev) begin chg_v.push_back(data_out); chg_t.push_back(ext_cyc); end
    prev = data_out;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static logic [7:0] md [27] = '{8'h00, 8'h00, 8'h00, 8'h17,
      8'h03, 8'h04, 8'h00, 8'h80, 8'h01, 8'h01, 8'h04, 8'h01, 8'h01,
      8'h05, 8'h02, 8'hFF, 8'hFF, 8'h06, 8'h01, 8'h00,
      8'h07, 8'h03, 8'h01, 8'h86, 8'hA0, 8'hFC, 8'h1D};
    int p; bit ok;
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (300) @(posedge clk);
    check(data_out == 6'd0, "motor off after reset");
    cmd(16'd1, CLS_COMMON, FN_READ_STATUS, '{});
    check(reply.size() == 7 && reply[0] == 1 && reply[6] == 8'h08, "enabled after boot init");
    if (reply.size() == 7 && reply[6] == 8'h08) mech[M_BOOT]++;

    // read the MD-TEDS
    cmd(16'd1, CLS_COMMON, FN_READ_TEDS, '{8'h80, 8'h00, 8'h00, 8'h00, 8'h00});
    ok = (reply.size() == 34) && reply[0] == 1;
    for (int i = 0; i < 27 && ok; i++) if (reply[7 + i] != md[i]) ok = 0;
    check(ok, "MD-TEDS read over the line");
    if (ok) mech[M_TEDS_RD]++;

    // 8 steps, normal drive, direction 1, time divider 5
    write_md(8'd15, '{8'h00, 8'h08});           // number of steps
    write_md(8'd19, '{8'h01});                  // normal drive
    write_md(8'd22, '{8'h00, 8'h00, 8'h05});    // time divider
    chg_v.delete(); chg_t.delete();
    cmd(16'd1, CLS_OPERATE, FN_TRIGGER, '{});
    check(reply[0] == 1, "trigger ok");
    if (reply[0] == 1) mech[M_TRIGGER]++;
    repeat (400) @(posedge clk_ext);
    check(chg_v.size() == 9, $sformatf("start + 8 steps, saw %0d changes", chg_v.size()));
    if (chg_v.size() == 9) begin
      p = pos_of(chg_v[0]);
      check(p >= 0 && p % 2 == 1, "normal drive start");
      ok = 1;
      for (int s = 1; s < 9; s++) begin
        p = (p + 2) % 8;
        if (chg_v[s] != ref_pat(p)) ok = 0;
        if (s > 1 && chg_t[s] - chg_t[s-1] != 10) ok = 0;
      end
      check(ok, "normal drive sequence and 10-cycle period");
      if (ok) mech[M_FINITE_STOP]++;
    end
    // status via Read TC
    cmd(16'd1, CLS_OPERATE, FN_READ_TC, '{8'h00, 8'h00, 8'h00, 8'h00});
    check(reply.size() == 9 && reply[0] == 1 && reply[7] == 8'b0100_0001 &&
          reply[8] == {2'b00, data_out}, $sformatf("Read TC status %p", reply));
    if (reply.size() == 9 && reply[0] == 1) mech[M_READ_TC]++;

    // continuous half steps, direction 0, via Write TC trigger state
    write_md(8'd12, '{8'h00});
    write_md(8'd15, '{8'hFF, 8'hFF});
    write_md(8'd19, '{8'h00});
    chg_v.delete(); chg_t.delete();
    cmd(16'd1, CLS_IDLE, FN_TRIG_STATE, '{8'h01});
    check(reply[0] == 1, "trigger state on ok");
    if (reply[0] == 1) mech[M_TRIG_ON]++;
    repeat (600) @(posedge clk_ext);
    check(chg_v.size() >= 40, $sformatf("continuous: %0d steps", chg_v.size()));
    ok = chg_v.size() >= 2;
    p = ok ? pos_of(chg_v[0]) : 0;
    for (int s = 1; s < chg_v.size(); s++) begin
      p = (p + 7) % 8;
      if (chg_v[s] != ref_pat(p)) ok = 0;
    end
    check(ok, "half-step sequence, direction 0");
    if (ok && chg_v.size() >= 40) mech[M_CONTINUOUS]++;
    cmd(16'd1, CLS_OPERATE, FN_ABORT, '{});
    check(reply[0] == 1, "abort ok");
    chg_v.delete();
    repeat (100) @(posedge clk_ext);
    check(chg_v.size() == 0, "moving after abort");
    if (reply[0] == 1 && chg_v.size() == 0) mech[M_ABORT]++;
    cmd(16'd1, CLS_IDLE, FN_TRIG_STATE, '{8'h00});
    check(reply[0] == 1, "trigger state off ok");
    if (reply[0] == 1) mech[M_TRIG_OFF]++;

    // Write TC
    cmd(16'd1, CLS_OPERATE, FN_WRITE_TC, '{8'h00, 8'h00, 8'h00, 8'h00, 8'h12});
    check(reply.size() == 3 && reply[0] == 1, "Write TC ok");
    if (reply[0] == 1) mech[M_WRITE_TC]++;

    // invalid step mode: the I&M reports an error, the command fails
    write_md(8'd19, '{8'h05});
    cmd(16'd1, CLS_OPERATE, FN_TRIGGER, '{});
    check(reply[0] == 0, "bad mode must fail");
    cmd(16'd1, CLS_COMMON, FN_READ_STATUS, '{});
    check(reply[6] == 8'h0E, $sformatf("status after I&M error %02h", reply[6]));
    if (reply[6] == 8'h0E) mech[M_IM_ERROR]++;
    write_md(8'd19, '{8'h00});

    // Reset
    cmd(16'd1, CLS_EITHER, FN_RESET, '{});
    check(reply[0] == 1, "reset ok");
    cmd(16'd1, CLS_COMMON, FN_READ_STATUS, '{});
    check(reply[6] == 8'h08, "idle after reset");
    if (reply[6] == 8'h08) mech[M_RESET]++;

    // rejected: TC 2 does not exist
    cmd(16'd2, CLS_OPERATE, FN_TRIGGER, '{});
    check(reply.size() == 3 && reply[0] == 0, "TC 2 rejected");
    if (reply[0] == 0) mech[M_REJECT]++;

    // framing error in the middle of a frame, then a clean command
    send_byte(8'h00); send_byte(8'h01);
    send_byte(8'h03, 1'b0);
    repeat (50) @(posedge clk);
    cmd(16'd1, CLS_COMMON, FN_READ_STATUS, '{});
    check(reply.size() == 7 && reply[0] == 1, "command after framing error");
    if (reply.size() == 7 && reply[0] == 1) mech[M_FRAME_ERR]++;

    for (int m = 0; m < M_N; m++) begin
      $display("mechanism %-18s %0d", mname[m], mech[m]);
      check(mech[m] > 0, $sformatf("mechanism %s never happened", mname[m]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
