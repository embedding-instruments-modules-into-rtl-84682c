// tb_mpp1: checks the step sequences against a reference model written from
// the coil table (which coils are on, with which polarity) for the three step
// modes and both directions, the step count limit and continuous running
// (0xFFFF), stopping when go falls, that outputs hold when stopped, and a
// restart (start toggle) while go is still high.
module tb_mpp1;
  import ieee1451_pkg::*;
  logic clk = 0, rst_n = 0, go = 0, start_tgl = 0, dir = 0, tick = 0;
  logic [1:0] mode = 0;
  logic [15:0] nsteps = 0;
  logic [5:0] data_out;
  logic running;
  logic [15:0] steps_done;
  int checks = 0, failures = 0;

  mpp1 dut (.clk_ext(clk), .rst_n, .go, .start_tgl, .dir, .mode, .nsteps, .tick,
            .data_out, .running, .steps_done);
  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // coil state at half-step position p: A: +1/0/-1, B: +1/0/-1
  function automatic logic [5:0] ref_pat(input int p);
    int a, b;
    int at[8] = '{1, 1, 0, -1, -1, -1, 0, 1};
    int bt[8] = '{0, 1, 1, 1, 0, -1, -1, -1};
    a = at[p]; b = bt[p];
    return {b != 0, a != 0, b < 0, b > 0, a < 0, a > 0};
  endfunction

  function automatic int pos_of(input logic [5:0] v);
    for (int p = 0; p < 8; p++) if (ref_pat(p) == v) return p;
    return -1;
  endfunction

  task automatic do_tick();
    @(negedge clk); tick = 1; @(negedge clk); tick = 0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p, q, stepsz;
    repeat (3) @(posedge clk); rst_n = 1; @(negedge clk);
    check(data_out == 6'd0 && !running, "outputs low after reset");
    for (int m = 0; m < 3; m++) begin
      for (int d = 0; d < 2; d++) begin
        mode = 2'(m); dir = d[0]; nsteps = 16'd10;
        @(negedge clk); go = 1; start_tgl = ~start_tgl;
        repeat (4) @(negedge clk);
        p = pos_of(data_out);
        check(p >= 0, "start pattern not in table");
        check(running, "not running after go");
        if (m == 1) check(p % 2 == 1, "normal drive must use two coils");
        if (m == 2) check(p % 2 == 0, "wave drive must use one coil");
        stepsz = (m == 0) ? 1 : 2;
        for (int s = 0; s < 10; s++) begin
          do_tick();
          q = (d != 0) ? (p + stepsz) % 8 : (p + 8 - stepsz) % 8;
          check(data_out == ref_pat(q),
                $sformatf("mode %0d dir %0d step %0d: %06b exp %06b", m, d, s, data_out, ref_pat(q)));
          p = q;
        end
        check(!running, "did not stop after nsteps");
        check(steps_done == 16'd10, "steps_done");
        do_tick();
        check(data_out == ref_pat(p), "moved after stop / not holding");
        @(negedge clk); go = 0; repeat (4) @(negedge clk);
      end
    end
    // continuous
    mode = 0; dir = 1; nsteps = STEPS_CONTINUOUS;
    @(negedge clk); go = 1; start_tgl = ~start_tgl; repeat (4) @(negedge clk);
    repeat (300) do_tick();
    check(running && steps_done == 16'd300, "continuous mode stopped");
    p = pos_of(data_out);
    @(negedge clk); go = 0; repeat (4) @(negedge clk);
    check(!running, "go low did not stop");
    repeat (3) do_tick();
    check(pos_of(data_out) == p, "moved after abort");
    // a new start while go is still high restarts with new parameters
    mode = 2; dir = 1; nsteps = 16'd2;
    @(negedge clk); go = 1; start_tgl = ~start_tgl; repeat (4) @(negedge clk);
    p = pos_of(data_out);
    check(p % 2 == 0 && running, "restart not taken");
    do_tick(); do_tick();
    check(data_out == ref_pat((p + 4) % 8) && !running, "restart: 2 wave steps");
    @(negedge clk); go = 0; repeat (4) @(negedge clk);
    // zero steps: does not run
    nsteps = 0; @(negedge clk); go = 1; start_tgl = ~start_tgl; repeat (4) @(negedge clk);
    check(!running, "nsteps 0 should not run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
