// step_motor_controller: the bipolar step-motor I&M bound to one TC of the
// IEEE1451-module.
//
// Three parts, as in the controller's block diagram: mpp2 (TC-bus slave and
// parameter store, on the TC clk), clk_generator (speed divider) and mpp1
// (sequence generator), both on clk_external. mpp2's go, direction, mode and
// step count feed mpp1; its time divider feeds clk_generator, which runs while
// mpp1 is running and gives it one tick per step. mpp1's running flag and
// output lines go back to mpp2 for status reads. data_out[5:0] are the six
// motor lines {EN_B, EN_A, B2, B1, A2, A1}.
module step_motor_controller (
  input  logic       rst_n,
  tc_bus_if.slave    bus,
  input  logic       clk_external,
  output logic [5:0] data_out
);
  logic        go, start_tgl, dir, running, tick, clk_gen;
  logic [1:0]  mode;
  logic [15:0] nsteps, steps_done;
  logic [23:0] tdiv;

  mpp2 u_mpp2 (
    .rst_n, .bus, .running_ext(running), .data_out_ext(data_out),
    .go, .start_tgl, .dir, .mode, .nsteps, .tdiv
  );

  clk_generator u_clk_gen (
    .clk_ext(clk_external), .rst_n, .enable(running), .tdiv, .clk_gen, .tick
  );

  mpp1 u_mpp1 (
    .clk_ext(clk_external), .rst_n, .go, .start_tgl, .dir, .mode, .nsteps, .tick,
    .data_out, .running, .steps_done
  );
endmodule
