// tc_handshake_master: master end of one TC bus, the engine under the
// decoder/controller's TC tasks.
//
// The task logic asks for one bus action at a time (req, held until ack):
//   OP_STEP   - raise run if it is low, drive access/out, raise exe, wait for
//               done, capture `in` into rdata, drop exe, wait for done low.
//               If the I&M raised end_ with that step, run is dropped and
//               `ended` is set in the ack.
//   OP_FINISH - put access = 15 (end request), wait for end_, drop run, wait
//               for end_ low.
// So an operation is run high, any number of exe/done step operations, then
// end_ high and run low: the run/end and exe/done pairs of the TC signal
// table. With an I&M that answers on the next clock a step takes 5 clocks
// from req to ack (exe, done, exe low, done low, ack). If the I&M does not answer
// within TIMEOUT clocks the operation is abandoned (run and exe low) and the
// ack carries `timeout`. bus.clk is the system clock; en and rst are driven
// from the task logic (im_en, im_rst). The end-request code and the timeout
// are this design's choice.
module tc_handshake_master
  import ieee1451_pkg::*;
#(
  parameter int unsigned TIMEOUT = 65535
) (
  input  logic       clk,
  input  logic       rst_n,
  tc_bus_if.master   bus,
  input  logic       im_en,
  input  logic       im_rst,
  input  logic       req,
  input  logic       op_finish,   // 0: OP_STEP, 1: OP_FINISH
  input  acc_t       acc,
  input  logic [7:0] wdata,
  output logic       ack,
  output logic [7:0] rdata,
  output logic       ended,
  output logic       timeout
);
  typedef enum logic [2:0] {
    H_IDLE, H_WAIT_DONE, H_WAIT_DONE_LOW, H_WAIT_END, H_WAIT_END_LOW
  } hstate_e;
  hstate_e state;
  logic [$clog2(TIMEOUT+1)-1:0] tmr;
  logic end_seen;

  assign bus.clk = clk;
  assign bus.en  = im_en;
  assign bus.rst = im_rst;

  wire expired = (tmr == TIMEOUT[$bits(tmr)-1:0]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= H_IDLE; bus.run <= 1'b0; bus.exe <= 1'b0; bus.access <= ACC_DATA;
      bus.out <= '0; ack <= 1'b0; rdata <= '0; ended <= 1'b0; timeout <= 1'b0;
      tmr <= '0; end_seen <= 1'b0;
    end else begin
      ack <= 1'b0;
      if (state == H_IDLE) tmr <= '0;
      else                 tmr <= tmr + 1'b1;
      unique case (state)
        H_IDLE: if (req && !ack) begin
          ended   <= 1'b0;
          timeout <= 1'b0;
          bus.run <= 1'b1;
          if (op_finish) begin
            bus.access <= ACC_END;
            state      <= H_WAIT_END;
          end else begin
            bus.access <= acc;
            bus.out    <= wdata;
            bus.exe    <= 1'b1;
            state      <= H_WAIT_DONE;
          end
        end
        H_WAIT_DONE: begin
          if (bus.done) begin
            rdata    <= bus.in;
            end_seen <= bus.end_;
            bus.exe  <= 1'b0;
            state    <= H_WAIT_DONE_LOW;
          end else if (expired) begin
            bus.exe <= 1'b0; bus.run <= 1'b0; timeout <= 1'b1; ack <= 1'b1;
            state   <= H_IDLE;
          end
        end
        H_WAIT_DONE_LOW: begin
          if (!bus.done) begin
            if (end_seen || bus.end_) begin
              bus.run <= 1'b0;
              ended   <= 1'b1;
              state   <= H_WAIT_END_LOW;
            end else begin
              ack   <= 1'b1;
              state <= H_IDLE;
            end
          end else if (expired) begin
            bus.run <= 1'b0; timeout <= 1'b1; ack <= 1'b1; state <= H_IDLE;
          end
        end
        H_WAIT_END: begin
          if (bus.end_) begin
            bus.run <= 1'b0;
            ended   <= 1'b1;
            state   <= H_WAIT_END_LOW;
          end else if (expired) begin
            bus.run <= 1'b0; timeout <= 1'b1; ack <= 1'b1; state <= H_IDLE;
          end
        end
        H_WAIT_END_LOW: begin
          if (!bus.end_ || expired) begin
            bus.access <= ACC_DATA;
            timeout    <= expired;
            ack        <= 1'b1;
            state      <= H_IDLE;
          end
        end
        default: state <= H_IDLE;
      endcase
    end
  end

  // Bus rules: a step operation only inside an operation, and access/out
  // stable while exe is high.
  a_exe_in_run: assert property (@(posedge clk) disable iff (!rst_n)
    bus.exe |-> bus.run);
  a_access_stable: assert property (@(posedge clk) disable iff (!rst_n)
    bus.exe && $past(bus.exe) |-> $stable(bus.access) && $stable(bus.out));
endmodule
