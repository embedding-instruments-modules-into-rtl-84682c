// status_state: operating state and status register of the TIM's transducer
// channel.
//
// The state follows the TC life cycle: TC_INIT after reset until the init
// task has run, TC_IDLE when initialised or stopped, TC_OPERATING after a
// trigger. The decoder/controller moves it with state_we/state_wdata.
// The 8-bit status register:
//   bit 0 operating   state == TC_OPERATING
//   bit 1 rejected    the last command was rejected (set or cleared by
//                     cmd_done with cmd_rejected)
//   bit 2 I&M error   an I&M reported a non-zero error code; latched until
//                     the status register is read (status_read)
//   bit 3 enabled     the I&M enable line is high (state != TC_INIT)
// `im_en` is the enable line shared by the channel's I&M. The bit
// assignment is this design's own; the TIM's status register and TC states
// are those of IEEE1451.0 in outline only.
module status_state
  import ieee1451_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        state_we,
  input  tc_state_e   state_wdata,
  input  logic        cmd_done,
  input  logic        cmd_rejected,
  input  logic        im_error,
  input  logic        status_read,
  output tc_state_e   state,
  output logic [7:0]  status,
  output logic        im_en
);
  logic rejected, err_latched;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= TC_INIT; rejected <= 1'b0; err_latched <= 1'b0;
    end else begin
      if (state_we) state <= state_wdata;
      if (cmd_done) rejected <= cmd_rejected;
      if (im_error) err_latched <= 1'b1;
      else if (status_read) err_latched <= 1'b0;
    end
  end

  always_comb begin
    im_en  = (state != TC_INIT);
    status = '0;
    status[ST_OPERATING] = (state == TC_OPERATING);
    status[ST_REJECTED]  = rejected;
    status[ST_IM_ERROR]  = err_latched;
    status[ST_ENABLED]   = im_en;
  end
endmodule
