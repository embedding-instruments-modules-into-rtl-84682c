// tb_decoder_controller: the decoder/controller with the TEDS controller, the
// status/state module and the handshake engine, fed command frames octet by
// octet (no UART) and with an I&M model on the TC bus that logs every step.
// Checks the boot-time init (rst pulse, MD-TEDS fields streamed with their
// field numbers), TEDS segment reads and writes, the task sequences of
// Trigger, AbortTrigger, Write TC trigger state, Read TC, Write TC and Reset,
// the reply frames, the status register, rejected commands, an I&M error
// code, a handshake timeout, and the event-sensor option: an event_ edge
// runs the update task with no reply, also when it arrives during a command,
// and an I&M error it meets shows in the status register.
module tb_decoder_controller;
  import ieee1451_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [7:0] rx_data = 0, tx_data;
  logic rx_valid = 0, tx_start, tx_busy = 0;
  logic [7:0] teds_sel, teds_addr, teds_wdata, teds_rdata;
  logic teds_we, teds_sel_ok;
  logic st_we, cmd_done, cmd_rejected, im_error_flag, status_read, im_en, im_rst;
  tc_state_e st_wdata, tc_state;
  logic [7:0] status;
  logic hs_req, hs_finish, hs_ack, hs_ended, hs_timeout;
  acc_t hs_acc;
  logic [7:0] hs_wdata, hs_rdata;
  int checks = 0, failures = 0;

  tc_bus_if bus ();
  teds_controller u_teds (.clk, .rst_n, .sel(teds_sel), .addr(teds_addr), .we(teds_we),
                          .wdata(teds_wdata), .rdata(teds_rdata), .sel_ok(teds_sel_ok));
  status_state u_st (.clk, .rst_n, .state_we(st_we), .state_wdata(st_wdata), .cmd_done,
                     .cmd_rejected, .im_error(im_error_flag), .status_read, .state(tc_state),
                     .status, .im_en);
  tc_handshake_master #(.TIMEOUT(100)) u_hs (
    .clk, .rst_n, .bus(bus.master), .im_en, .im_rst, .req(hs_req), .op_finish(hs_finish),
    .acc(hs_acc), .wdata(hs_wdata), .ack(hs_ack), .rdata(hs_rdata), .ended(hs_ended),
    .timeout(hs_timeout));
  decoder_controller #(.EVENT_SENSOR(1'b1)) dut (
    .clk, .rst_n, .rx_data, .rx_valid, .rx_err(1'b0), .tx_data, .tx_start, .tx_busy,
    .teds_sel, .teds_addr, .teds_we, .teds_wdata, .teds_rdata, .teds_sel_ok,
    .st_we, .st_wdata, .cmd_done, .cmd_rejected, .im_error_flag, .status_read,
    .tc_state, .status, .im_rst, .im_error(bus.error), .im_event(bus.event_),
    .hs_req, .hs_finish, .hs_acc, .hs_wdata, .hs_ack, .hs_rdata, .hs_ended, .hs_timeout);
  always #5 clk = ~clk;

  // ---- I&M model: logs steps as {access, out}, "E" for an end ----
  logic [11:0] log_q [$];
  int   n_end = 0, n_rst = 0;
  bit   silent = 0;
  logic [7:0] rd_q [$];
  logic [3:0] err = 0;
  assign bus.error  = err;
  logic ev = 0;
  assign bus.event_ = ev;
  logic im_rst_d = 0;
  always @(posedge clk) begin
    if (rst_n && im_rst && !im_rst_d) n_rst++;
    im_rst_d <= rst_n && im_rst;
  end
  initial begin
    bus.done = 0; bus.end_ = 0; bus.in = 0;
    forever begin
      @(posedge clk);
      if (!bus.run) bus.end_ <= 0;
      if (silent) continue;
      if (bus.exe && !bus.done) begin
        log_q.push_back({bus.access, bus.out});
        bus.done <= 1;
        if (bus.access == ACC_DATA && rd_q.size() > 0) begin
          bus.in <= rd_q.pop_front();
          if (rd_q.size() == 0) bus.end_ <= 1;
        end
      end else if (!bus.exe) bus.done <= 0;
      if (bus.run && !bus.exe && bus.access == ACC_END && !bus.end_) begin
        bus.end_ <= 1; n_end++;
      end
    end
  end

  // ---- NCAP side ----
  logic [7:0] reply [$];
  always @(posedge clk) if (tx_start) reply.push_back(tx_data);
  initial forever begin
    @(posedge clk);
    if (tx_start) begin tx_busy <= 1; repeat (4) @(posedge clk); tx_busy <= 0; end
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic cmd(input logic [15:0] tc, input logic [7:0] cls, input logic [7:0] fn,
                     input logic [7:0] pay [$]);
    logic [7:0] f [$];
    int n = 0;
    f = {tc[15:8], tc[7:0], cls, fn, 8'(pay.size() >> 8), 8'(pay.size())};
    f = {f, pay};
    reply.delete(); log_q.delete();
    foreach (f[i]) begin
      @(negedge clk); rx_data = f[i]; rx_valid = 1;
      @(negedge clk); rx_valid = 0;
      repeat (2) @(negedge clk);
    end
    // wait for the complete reply
    while ((reply.size() < 3 || reply.size() < 3 + int'({reply[1], reply[2]})) && n < 5000) begin
      @(negedge clk); n++;
    end
    repeat (10) @(negedge clk);
  endtask

  function automatic logic [11:0] S(input acc_t a, input logic [7:0] d);
    return {a, d};
  endfunction

  logic [11:0] upd_default [$] = '{12'h401, 12'h5FF, 12'h5FF, 12'h600, 12'h701, 12'h786, 12'h7A0};

  task automatic check_log(input logic [11:0] exp [$], input string msg);
    check(log_q == exp, $sformatf("%s: log %p exp %p", msg, log_q, exp));
  endtask

  task automatic pulse_event();
    @(negedge clk); ev = 1;
    repeat (3) @(negedge clk); ev = 0;
  endtask

  task automatic read_status(output logic [7:0] st);
    logic [7:0] none [$];
    cmd(16'd1, CLS_COMMON, FN_READ_STATUS, none);
    check(reply.size() == 7 && reply[0] == 8'd1, "status reply");
    st = reply[6];
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] st;
    static logic [7:0] md [27] = '{8'h00, 8'h00, 8'h00, 8'h17,
      8'h03, 8'h04, 8'h00, 8'h80, 8'h01, 8'h01, 8'h04, 8'h01, 8'h01,
      8'h05, 8'h02, 8'hFF, 8'hFF, 8'h06, 8'h01, 8'h00,
      8'h07, 8'h03, 8'h01, 8'h86, 8'hA0, 8'hFC, 8'h1D};
    logic [11:0] exp [$];
    bit ok;
    repeat (3) @(posedge clk); rst_n = 1;
    // boot: init task = rst pulse + update
    repeat (200) @(posedge clk);
    check(n_rst == 1, "boot rst pulse");
    check(log_q == upd_default, $sformatf("boot update log %p", log_q));
    check(n_end == 1, "boot update ended");
    check(tc_state == TC_IDLE, "idle after boot");
    read_status(st);
    check(st == 8'h08, $sformatf("status after boot %02h", st));

    // ReadTEDSSegment of the MD-TEDS (TC 1, code 0x80, offset 0)
    cmd(16'd1, CLS_COMMON, FN_READ_TEDS, '{8'h80, 8'h00, 8'h00, 8'h00, 8'h00});
    check(reply.size() == 3 + 4 + 27 && reply[0] == 1 && reply[2] == 8'd31, "ReadTEDS length");
    ok = 1;
    for (int i = 0; i < 27 && i + 7 < reply.size(); i++) if (reply[7 + i] != md[i]) ok = 0;
    check(ok, "ReadTEDS contents");
    cmd(16'd1, CLS_COMMON, FN_READ_TEDS, '{8'h80, 8'h00, 8'h00, 8'h00, 8'd20});
    check(reply.size() == 3 + 4 + 7 && reply[6] == 8'd20 && reply[7] == 8'h07 && reply[13] == 8'h1D,
          "ReadTEDS offset 20");
    // Meta-TEDS only through TC 0
    cmd(16'd0, CLS_COMMON, FN_READ_TEDS, '{8'h80, 8'h00, 8'h00, 8'h00, 8'h00});
    check(reply.size() == 3 && reply[0] == 0, "MD-TEDS via TC 0 rejected");
    read_status(st);
    check(st == 8'h0A, $sformatf("rejected bit %02h", st));
    cmd(16'd0, CLS_COMMON, FN_READ_TEDS, '{8'h01, 8'h00, 8'h00, 8'h00, 8'h00});
    check(reply.size() == 3 + 4 + 6 && reply[0] == 1 && reply[10] == 8'h02, "Meta-TEDS via TC 0");

    // WriteTEDSSegment: direction 0 (octet 12), wave drive (octet 19)
    cmd(16'd1, CLS_COMMON, FN_WRITE_TEDS, '{8'h80, 8'h00, 8'h00, 8'h00, 8'd12, 8'h00});
    check(reply.size() == 3 && reply[0] == 1, "WriteTEDS reply");
    cmd(16'd1, CLS_COMMON, FN_WRITE_TEDS, '{8'h80, 8'h00, 8'h00, 8'h00, 8'd19, 8'h02});
    cmd(16'd1, CLS_COMMON, FN_READ_TEDS, '{8'h80, 8'h00, 8'h00, 8'h00, 8'd12});
    check(reply[7] == 8'h00 && reply[14] == 8'h02, "WriteTEDS readback");
    cmd(16'd1, CLS_COMMON, FN_WRITE_TEDS, '{8'h80, 8'h00, 8'h00, 8'h00, 8'd63, 8'h00, 8'h00});
    check(reply.size() == 3 && reply[0] == 0, "WriteTEDS past the end rejected");

    // Trigger: update with the new fields, then start
    cmd(16'd1, CLS_OPERATE, FN_TRIGGER, '{});
    exp = '{12'h400, 12'h5FF, 12'h5FF, 12'h602, 12'h701, 12'h786, 12'h7A0, 12'h800};
    check_log(exp, "Trigger");
    check(reply.size() == 3 && reply[0] == 1, "Trigger reply");
    check(tc_state == TC_OPERATING, "operating after trigger");
    read_status(st);
    check(st == 8'h09, $sformatf("status operating %02h", st));
    // AbortTrigger: stop
    cmd(16'd1, CLS_OPERATE, FN_ABORT, '{});
    check_log('{12'h900}, "AbortTrigger");
    check(tc_state == TC_IDLE && reply[0] == 1, "idle after abort");
    // Write TC trigger state
    cmd(16'd1, CLS_IDLE, FN_TRIG_STATE, '{8'h01});
    check(log_q.size() == 8 && log_q[7] == 12'h800 && tc_state == TC_OPERATING, "trigger state on");
    cmd(16'd1, CLS_IDLE, FN_TRIG_STATE, '{8'h00});
    check_log('{12'h900}, "trigger state off");
    check(tc_state == TC_IDLE, "trigger state off -> idle");

    // Read TC: update, then data steps until the I&M ends
    rd_q = '{8'hAA, 8'hBB, 8'hCC};
    cmd(16'd1, CLS_OPERATE, FN_READ_TC, '{8'h00, 8'h00, 8'h00, 8'h05});
    check(log_q.size() == 10 && log_q[7] == 12'h000 && log_q[9] == 12'h000, $sformatf("Read TC log %p", log_q));
    check(reply.size() == 3 + 4 + 3 && reply[0] == 1 && reply[6] == 8'h05 &&
          reply[7] == 8'hAA && reply[8] == 8'hBB && reply[9] == 8'hCC, $sformatf("Read TC reply %p", reply));
    // Write TC: update, then the payload octets as data steps
    cmd(16'd1, CLS_OPERATE, FN_WRITE_TC, '{8'h00, 8'h00, 8'h00, 8'h00, 8'h11, 8'h22, 8'h33});
    check(log_q.size() == 10 && log_q[7] == 12'h011 && log_q[8] == 12'h022 && log_q[9] == 12'h033,
          $sformatf("Write TC log %p", log_q));
    check(reply.size() == 3 && reply[0] == 1, "Write TC reply");

    // Reset: rst pulse + update
    cmd(16'd1, CLS_EITHER, FN_RESET, '{});
    check(n_rst == 2 && log_q.size() == 7 && reply[0] == 1, "Reset");

    // rejected: wrong TC, unknown command
    cmd(16'd2, CLS_OPERATE, FN_TRIGGER, '{});
    check(reply.size() == 3 && reply[0] == 0 && log_q.size() == 0, "wrong TC rejected");
    cmd(16'd1, 8'd5, 8'd5, '{});
    check(reply.size() == 3 && reply[0] == 0, "unknown command rejected");

    // I&M error code fails the command and latches the error bit
    err = 4'd1;
    cmd(16'd1, CLS_OPERATE, FN_TRIGGER, '{});
    check(reply[0] == 0 && tc_state == TC_IDLE, "I&M error fails trigger");
    err = 4'd0;
    read_status(st);
    check(st == 8'h0E, $sformatf("status after I&M error %02h", st));
    read_status(st);
    check(st == 8'h08, $sformatf("error bit cleared by read %02h", st));

    // handshake timeout
    silent = 1;
    cmd(16'd1, CLS_OPERATE, FN_TRIGGER, '{});
    check(reply.size() == 3 && reply[0] == 0, "timeout fails trigger");
    silent = 0;
    cmd(16'd1, CLS_OPERATE, FN_ABORT, '{});
    check(reply[0] == 1, "recovers after timeout");

    // event sensor: an event_ edge between commands runs update, no reply
    exp = '{12'h400, 12'h5FF, 12'h5FF, 12'h602, 12'h701, 12'h786, 12'h7A0};
    log_q.delete(); reply.delete(); n_end = 0;
    pulse_event();
    repeat (300) @(negedge clk);
    check_log(exp, "event update");
    check(reply.size() == 0 && n_end == 1 && tc_state == TC_IDLE, "event: no reply, one operation");
    // an event during a command frame is served after the reply
    fork
      cmd(16'd1, CLS_OPERATE, FN_TRIGGER, '{});
      begin repeat (12) @(negedge clk); pulse_event(); end
    join
    repeat (300) @(negedge clk);
    check(log_q.size() == 15 && log_q[7] == 12'h800 && log_q[8:14] == exp,
          $sformatf("event during command log %p", log_q));
    check(reply.size() == 3 && reply[0] == 1 && tc_state == TC_OPERATING, "event during command reply");
    // an I&M error met by the event's update is latched in the status
    err = 4'd2;
    pulse_event();
    repeat (300) @(negedge clk);
    err = 4'd0;
    read_status(st);
    check(st == 8'h0D, $sformatf("status after event error %02h", st));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
