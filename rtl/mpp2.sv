// mpp2: controller of the step-motor I&M, the slave end of its transducer
// channel (TC) bus.
//
// It holds the motor parameters the TC's update task hands over from the
// MD-TEDS, one step operation per value byte, with the MD-TEDS field number
// as access code: 4 direction (bit 0), 5 number of steps (2 bytes, MSB
// first), 6 step mode, 7 time divider (3 bytes, MSB first); multi-byte fields
// are shifted in. Access 8 (start) raises `go`, access 9 (stop) drops it.
// A data step (access 0) returns a status byte on `in`: first
// {running, dir, 4'b0, mode}, then {2'b0, data_out}; `end_` rises together with
// the done of the second one. The `out` byte of a data step is not used, as
// this I&M takes all its settings from the MD-TEDS. Access 15 asks for the
// end of the operation.
//
// Handshake (all on the TC clk): exe high and done low -> act and raise done;
// exe low -> drop done. end_ rises on (run & access==15 & !exe) or after the
// last status byte, and falls once run is low. `en` low forces go low and
// ignores start; `rst` (from the TC's init task) clears all parameters.
// error = 1 flags a step mode above 2, error = 2 a time divider of 0 (both
// checked on start; go is not raised then).
//
// The access codes, the status bytes and the error codes are this design's
// choice; the parameters and their octet counts follow the MD-TEDS layout.
// running and data_out come from the clk_ext side through two flops; data_out
// changes at most once per step, far slower than the TC clock.
module mpp2
  import ieee1451_pkg::*;
(
  input  logic        rst_n,
  tc_bus_if.slave     bus,
  input  logic        running_ext,
  input  logic [5:0]  data_out_ext,
  output logic        go,
  output logic        start_tgl,
  output logic        dir,
  output logic [1:0]  mode,
  output logic [15:0] nsteps,
  output logic [23:0] tdiv
);
  logic [1:0] run_sync;
  logic [5:0] dout_s1, dout_s2;
  logic       rd_idx;
  logic       run_d;
  logic [7:0] mode_byte;
  logic [3:0] err;

  assign mode       = mode_byte[1:0];
  assign bus.event_ = 1'b0;       // an actuator: no events
  assign bus.error  = err;

  always_ff @(posedge bus.clk or negedge rst_n) begin
    if (!rst_n) begin
      run_sync <= '0; dout_s1 <= '0; dout_s2 <= '0;
    end else begin
      run_sync <= {run_sync[0], running_ext};
      dout_s1  <= data_out_ext;
      dout_s2  <= dout_s1;
    end
  end

  always_ff @(posedge bus.clk or negedge rst_n) begin
    if (!rst_n) begin
      go <= 1'b0; dir <= 1'b0; mode_byte <= '0; nsteps <= '0; tdiv <= 24'd1;
      err <= '0; bus.done <= 1'b0; bus.end_ <= 1'b0; bus.in <= '0;
      rd_idx <= 1'b0; run_d <= 1'b0; start_tgl <= 1'b0;
    end else if (bus.rst) begin
      go <= 1'b0; dir <= 1'b0; mode_byte <= '0; nsteps <= '0; tdiv <= 24'd1;
      err <= '0; bus.done <= 1'b0; bus.end_ <= 1'b0; bus.in <= '0;
      rd_idx <= 1'b0; run_d <= 1'b0;
    end else begin
      run_d <= bus.run;
      if (bus.run && !run_d) rd_idx <= 1'b0;
      if (!bus.en) go <= 1'b0;

      if (!bus.run) bus.end_ <= 1'b0;
      else if (bus.access == ACC_END && !bus.exe) bus.end_ <= 1'b1;

      if (!bus.exe) bus.done <= 1'b0;
      else if (bus.run && !bus.done) begin
        bus.done <= 1'b1;
        unique case (bus.access)
          ACC_DIR:    dir       <= bus.out[0];
          ACC_NSTEPS: nsteps    <= {nsteps[7:0], bus.out};
          ACC_MODE:   mode_byte <= bus.out;
          ACC_TDIV:   tdiv      <= {tdiv[15:0], bus.out};
          ACC_START: begin
            if (mode_byte > 8'd2)    err <= 4'd1;
            else if (tdiv == 24'd0)  err <= 4'd2;
            else begin
              err <= 4'd0;
              go  <= bus.en;
              if (bus.en) start_tgl <= ~start_tgl;
            end
          end
          ACC_STOP:   go <= 1'b0;
          ACC_DATA: begin
            if (!rd_idx) bus.in <= {run_sync[1], dir, 4'b0000, mode_byte[1:0]};
            else begin
              bus.in   <= {2'b00, dout_s2};
              bus.end_ <= 1'b1;
            end
            rd_idx <= ~rd_idx;
          end
          default: ;
        endcase
      end
    end
  end
endmodule
