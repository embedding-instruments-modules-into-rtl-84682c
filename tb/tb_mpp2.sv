// tb_mpp2: drives the TC bus as master from the testbench and checks the
// step-motor controller's parameter registers (single and shifted multi-octet
// fields), start/stop of go, the two status octets and the end_ that comes
// with the second, end on request (access 15), the error codes for a bad step
// mode and a zero time divider, enable gating and the rst line.
module tb_mpp2;
  import ieee1451_pkg::*;
  logic clk = 0, rst_n = 0;
  logic running_ext = 0;
  logic [5:0] data_out_ext = 0;
  logic go, start_tgl, dir;
  logic [1:0] mode;
  logic [15:0] nsteps;
  logic [23:0] tdiv;
  int checks = 0, failures = 0;

  tc_bus_if bus ();
  assign bus.clk = clk;
  mpp2 dut (.rst_n, .bus(bus.slave), .running_ext, .data_out_ext, .go, .start_tgl, .dir, .mode,
            .nsteps, .tdiv);
  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic step(input acc_t a, input logic [7:0] d, output logic [7:0] r, output bit e);
    int n = 0;
    @(negedge clk); bus.run = 1; bus.access = a; bus.out = d; bus.exe = 1;
    while (!bus.done) begin @(negedge clk); n++; end
    r = bus.in; e = bus.end_;
    bus.exe = 0;
    while (bus.done) @(negedge clk);
    check(n <= 2, "done slow");
  endtask

  task automatic finish();
    int n = 0;
    @(negedge clk); bus.access = ACC_END;
    while (!bus.end_ && n < 10) begin @(negedge clk); n++; end
    check(bus.end_, "no end_ on end request");
    bus.run = 0;
    @(negedge clk); @(negedge clk);
    check(!bus.end_, "end_ not dropped after run low");
    bus.access = ACC_DATA;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] r; bit e;
    bus.out = 0; bus.run = 0; bus.exe = 0; bus.access = '0; bus.en = 1; bus.rst = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    // parameters as the update task sends them (Table III values)
    step(ACC_DIR, 8'h01, r, e);
    step(ACC_NSTEPS, 8'h12, r, e); step(ACC_NSTEPS, 8'h34, r, e);
    step(ACC_MODE, 8'h02, r, e);
    step(ACC_TDIV, 8'h01, r, e); step(ACC_TDIV, 8'h86, r, e); step(ACC_TDIV, 8'hA0, r, e);
    finish();
    check(dir == 1'b1, "dir");
    check(nsteps == 16'h1234, $sformatf("nsteps %04h", nsteps));
    check(mode == 2'd2, "mode");
    check(tdiv == 24'h0186A0, $sformatf("tdiv %06h", tdiv));
    check(!go, "go before start");
    check(bus.error == 0 && bus.event_ == 0, "no error/event");
    // start
    begin
      logic t0;
      t0 = start_tgl;
      step(ACC_START, 8'h00, r, e); finish();
      check(go && start_tgl != t0, "go and start toggle after start");
      step(ACC_START, 8'h00, r, e); finish();
      check(go && start_tgl == t0, "second start toggles again");
    end
    // status read
    running_ext = 1; data_out_ext = 6'b11_01_01;
    repeat (3) @(negedge clk);
    step(ACC_DATA, 8'h00, r, e);
    check(r == 8'b1100_0010 && !e, $sformatf("status octet 0 %02h", r));
    step(ACC_DATA, 8'h00, r, e);
    check(r == 8'b0011_0101 && e, $sformatf("status octet 1 %02h end %0d", r, e));
    bus.run = 0; @(negedge clk); @(negedge clk);
    check(!bus.end_, "end_ dropped");
    // stop
    step(ACC_STOP, 8'h00, r, e); finish();
    check(!go, "go after stop");
    // bad mode
    step(ACC_MODE, 8'h05, r, e); step(ACC_START, 8'h00, r, e); finish();
    check(!go && bus.error == 4'd1, "bad mode error");
    // zero divider
    step(ACC_MODE, 8'h00, r, e);
    step(ACC_TDIV, 8'h00, r, e); step(ACC_TDIV, 8'h00, r, e); step(ACC_TDIV, 8'h00, r, e);
    step(ACC_START, 8'h00, r, e); finish();
    check(!go && bus.error == 4'd2, "zero divider error");
    step(ACC_TDIV, 8'h05, r, e); step(ACC_START, 8'h00, r, e); finish();
    check(go && bus.error == 4'd0, "start after fix");
    // enable low drops go and blocks start
    @(negedge clk); bus.en = 0; @(negedge clk); @(negedge clk);
    check(!go, "en low drops go");
    step(ACC_START, 8'h00, r, e); finish();
    check(!go, "start while disabled");
    bus.en = 1;
    // rst clears
    step(ACC_START, 8'h00, r, e); finish();
    @(negedge clk); bus.rst = 1; @(negedge clk); bus.rst = 0;
    check(!go && nsteps == 0 && tdiv == 24'd1 && !dir, "rst clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
