// tb_step_motor_controller: configures the whole step-motor I&M over its TC
// bus (bus driven by the testbench), with clk_external unrelated to the TC
// clock, and checks the motor line sequence against a coil-table model, the
// step period of 2*tdiv external clocks, the stop after the programmed number
// of steps, continuous running until a stop, and the status octets.
module tb_step_motor_controller;
  import ieee1451_pkg::*;
  logic clk = 0, clk_ext = 0, rst_n = 0;
  logic [5:0] data_out;
  int checks = 0, failures = 0;

  tc_bus_if bus ();
  assign bus.clk = clk;
  step_motor_controller dut (.rst_n, .bus(bus.slave), .clk_external(clk_ext), .data_out);
  always #5 clk = ~clk;
  always #7 clk_ext = ~clk_ext;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [5:0] ref_pat(input int p);
    int at[8] = '{1, 1, 0, -1, -1, -1, 0, 1};
    int bt[8] = '{0, 1, 1, 1, 0, -1, -1, -1};
    return {bt[p] != 0, at[p] != 0, bt[p] < 0, bt[p] > 0, at[p] < 0, at[p] > 0};
  endfunction
  function automatic int pos_of(input logic [5:0] v);
    for (int p = 0; p < 8; p++) if (ref_pat(p) == v) return p;
    return -1;
  endfunction

  task automatic step(input acc_t a, input logic [7:0] d, output logic [7:0] r);
    @(negedge clk); bus.run = 1; bus.access = a; bus.out = d; bus.exe = 1;
    while (!bus.done) @(negedge clk);
    r = bus.in; bus.exe = 0;
    while (bus.done) @(negedge clk);
  endtask
  task automatic finish();
    @(negedge clk); bus.access = ACC_END;
    while (!bus.end_) @(negedge clk);
    bus.run = 0; while (bus.end_) @(negedge clk);
    bus.access = ACC_DATA;
  endtask
  task automatic configure(input logic [7:0] dir, input logic [15:0] n, input logic [7:0] mode,
                           input logic [23:0] div);
    logic [7:0] r;
    step(ACC_DIR, dir, r);
    step(ACC_NSTEPS, n[15:8], r); step(ACC_NSTEPS, n[7:0], r);
    step(ACC_MODE, mode, r);
    step(ACC_TDIV, div[23:16], r); step(ACC_TDIV, div[15:8], r); step(ACC_TDIV, div[7:0], r);
    finish();
  endtask

  // start the motor while recording the first `n` changes of data_out
  logic [5:0] seen_v [32];
  int         seen_t [32];
  task automatic start_and_record(input int n);
    logic [7:0] r;
    fork
      begin step(ACC_START, 8'd0, r); finish(); end
      for (int i = 0; i < n; i++) next_change(seen_t[i]);
    join
    // next_change leaves data_out at the new value; capture values as we go
  endtask

  // wait for the next change of data_out, return its time in clk_ext cycles
  int nrec = 0;
  task automatic next_change(output int cyc);
    logic [5:0] old = data_out;
    cyc = 0;
    while (data_out == old && cyc < 1000) begin @(posedge clk_ext); cyc++; end
    if (nrec < 32) begin seen_v[nrec] = data_out; nrec++; end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p, cyc;
    logic [7:0] r;
    bus.out = 0; bus.run = 0; bus.exe = 0; bus.access = '0; bus.en = 1; bus.rst = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    // normal drive, direction 1, 6 steps, divider 3 -> one step per 6 clk_ext
    configure(8'h01, 16'd6, 8'h01, 24'd3);
    nrec = 0;
    start_and_record(7);
    p = pos_of(seen_v[0]);
    check(p >= 0 && p % 2 == 1, "normal-drive start position");
    for (int s = 1; s < 7; s++) begin
      p = (p + 2) % 8;
      check(seen_v[s] == ref_pat(p), $sformatf("normal step %0d: %06b", s, seen_v[s]));
      if (s > 1) check(seen_t[s] == 6, $sformatf("step period %0d clk_ext", seen_t[s]));
    end
    next_change(cyc);
    check(cyc >= 1000, "kept moving after 6 steps");
    step(ACC_DATA, 8'd0, r);
    check(r[7] == 1'b0 && r[6] == 1'b1 && r[1:0] == 2'd1, $sformatf("status %02h after end", r));
    step(ACC_DATA, 8'd0, r);
    check(r[5:0] == data_out, "status lines");
    bus.run = 0; repeat (3) @(negedge clk);
    step(ACC_STOP, 8'd0, r); finish();
    // half step, direction 0, continuous, divider 2
    configure(8'h00, 16'hFFFF, 8'h00, 24'd2);
    nrec = 0;
    start_and_record(21);
    p = pos_of(seen_v[0]);
    check(p >= 0, "half-step start position");
    for (int s = 1; s < 21; s++) begin
      p = (p + 7) % 8;
      check(seen_v[s] == ref_pat(p), $sformatf("half step %0d", s));
      if (s > 1) check(seen_t[s] == 4, $sformatf("half step period %0d", seen_t[s]));
    end
    step(ACC_DATA, 8'd0, r);
    check(r[7] == 1'b1, "running flag");
    step(ACC_DATA, 8'd0, r);
    bus.run = 0; repeat (3) @(negedge clk);
    step(ACC_STOP, 8'd0, r); finish();
    repeat (4) @(posedge clk_ext);
    next_change(cyc);
    check(cyc >= 1000, "moving after stop");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
