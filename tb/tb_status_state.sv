// tb_status_state: drives state changes, command results and I&M errors and
// checks the state, every status bit and the enable line against a model.
module tb_status_state;
  import ieee1451_pkg::*;
  logic clk = 0, rst_n = 0;
  logic state_we = 0, cmd_done = 0, cmd_rejected = 0, im_error = 0, status_read = 0;
  tc_state_e state_wdata = TC_INIT, state;
  logic [7:0] status;
  logic im_en;
  int checks = 0, failures = 0;

  status_state dut (.clk, .rst_n, .state_we, .state_wdata, .cmd_done, .cmd_rejected,
                    .im_error, .status_read, .state, .status, .im_en);
  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tc_state_e ms;
    logic mrej, merr;
    int r;
    repeat (2) @(posedge clk); rst_n = 1; @(negedge clk);
    check(state == TC_INIT && status == 8'h00 && !im_en, "after reset");
    ms = TC_INIT; mrej = 0; merr = 0;
    for (int i = 0; i < 300; i++) begin
      r = $urandom_range(0, 3);
      state_we = 1'($urandom_range(0, 1)); state_wdata = tc_state_e'($urandom_range(0, 2));
      cmd_done = 1'($urandom_range(0, 1)); cmd_rejected = 1'($urandom_range(0, 1));
      im_error = ($urandom_range(0, 5) == 0); status_read = ($urandom_range(0, 3) == 0);
      @(negedge clk);
      if (state_we) ms = state_wdata;
      if (cmd_done) mrej = cmd_rejected;
      if (im_error) merr = 1; else if (status_read) merr = 0;
      check(state == ms, "state");
      check(status == {4'b0, ms != TC_INIT, merr, mrej, ms == TC_OPERATING},
            $sformatf("status %02h", status));
      check(im_en == (ms != TC_INIT), "en");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
