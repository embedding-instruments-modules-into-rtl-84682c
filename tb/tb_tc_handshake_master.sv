// tb_tc_handshake_master: the master against a slave model in the testbench
// with random response delays. Checks for every step that the slave saw the
// right access code and out byte inside a run, that rdata is the slave's
// answer, the step latency with an immediate slave (5 clocks, request to ack), finish
// (access 15 -> end_ -> run low), an operation ended early by the slave
// (`ended`), the timeout when the slave never answers, and that en/rst
// follow their inputs.
module tb_tc_handshake_master;
  import ieee1451_pkg::*;
  logic clk = 0, rst_n = 0;
  logic im_en = 0, im_rst = 0, req = 0, op_finish = 0;
  acc_t acc = '0;
  logic [7:0] wdata = 0, rdata;
  logic ack, ended, timeout;
  int checks = 0, failures = 0;

  tc_bus_if bus ();
  tc_handshake_master #(.TIMEOUT(200)) dut (
    .clk, .rst_n, .bus(bus.master), .im_en, .im_rst, .req, .op_finish, .acc,
    .wdata, .ack, .rdata, .ended, .timeout);
  always #5 clk = ~clk;

  // ---- slave model ----
  int   dly = 0;           // extra cycles before done / end_
  bit   silent = 0;        // never answer
  bit   end_after = 0;     // raise end_ with the done of the next step
  acc_t seen_acc; logic [7:0] seen_out; bit seen_run;
  int   nsteps_seen = 0;
  assign bus.event_ = 1'b0;
  assign bus.error  = '0;
  initial begin
    bus.done = 0; bus.end_ = 0; bus.in = 0;
    forever begin
      @(posedge clk);
      if (!bus.run) bus.end_ <= 0;
      if (silent) continue;
      if (bus.exe && !bus.done) begin
        seen_acc = bus.access; seen_out = bus.out; seen_run = bus.run;
        nsteps_seen++;
        repeat (dly) @(posedge clk);
        bus.in   <= ~bus.out ^ {4'h0, bus.access};
        bus.done <= 1;
        if (end_after) begin bus.end_ <= 1; end_after = 0; end
        wait (!bus.exe); @(posedge clk); bus.done <= 0;
      end else if (bus.run && !bus.exe && bus.access == ACC_END && !bus.end_) begin
        repeat (dly) @(posedge clk);
        bus.end_ <= 1;
      end
    end
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic call(input bit fin, input acc_t a, input logic [7:0] d, output int cyc);
    @(negedge clk); req = 1; op_finish = fin; acc = a; wdata = d; cyc = 0;
    do begin @(negedge clk); cyc++; end while (!ack);
    req = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    acc_t a; logic [7:0] d;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);
    check(!bus.run && !bus.exe, "idle after reset");
    im_en = 1; im_rst = 1; #1;
    check(bus.en && bus.rst, "en/rst pass through"); im_rst = 0;
    // immediate slave: latency
    call(0, 4'd5, 8'h3C, cyc);
    check(cyc == 5, $sformatf("step latency %0d", cyc));
    check(seen_acc == 4'd5 && seen_out == 8'h3C && seen_run, "slave saw step");
    check(rdata == (~8'h3C ^ 8'h05) && !ended && !timeout, "rdata");
    check(bus.run, "run stays high between steps");
    // random steps with random delays
    for (int i = 0; i < 40; i++) begin
      a = acc_t'($urandom_range(0, 14)); d = 8'($urandom); dly = $urandom_range(0, 6);
      call(0, a, d, cyc);
      check(seen_acc == a && seen_out == d, $sformatf("step %0d: slave saw %0d/%02h", i, seen_acc, seen_out));
      check(rdata == (~d ^ {4'h0, a}), "rdata random");
      check(!timeout && !ended, "no timeout/end");
    end
    // finish
    dly = 2;
    call(1, '0, '0, cyc);
    check(ended && !timeout && !bus.run, "finish ends the operation");
    check(bus.access == ACC_DATA, "access back to 0");
    // early end by the slave
    dly = 0; end_after = 1;
    call(0, ACC_DATA, 8'h11, cyc);
    check(ended && !bus.run, "slave-ended operation");
    // timeout
    silent = 1;
    call(0, 4'd8, 8'h00, cyc);
    check(timeout && !bus.run && !bus.exe, "timeout");
    check(cyc >= 200 && cyc <= 205, $sformatf("timeout after %0d", cyc));
    silent = 0; repeat (3) @(negedge clk);
    call(1, '0, '0, cyc);
    check(ended && !timeout, "works after timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
