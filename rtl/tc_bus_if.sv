// tc_bus_if: the bus lines of one transducer channel (TC) between the
// IEEE1451-module (master) and an I&M (slave), plus the I&M-wide enable,
// reset and error lines.
//
// clk    TC clock driven by the master
// out    data master -> I&M (data when access == 0, instruction operand else)
// in     data I&M -> master
// run    master: an operation is in progress
// end_   I&M: the operation has ended (the master then drops run)
// event_ I&M: event, for I&Ms working as event sensors
// exe    master: execute one step operation (only while run is high)
// done   I&M: the step operation has finished
// access master: 0 = data transfer, else an I&M-specific instruction code
// en/rst master: enable / initialise the I&M; error: I&M error code
//
// Signal names and directions follow the TC/I&M signal table; the width of
// access and error is this design's choice (4 bits each).
interface tc_bus_if
  import ieee1451_pkg::*;
  #(parameter int unsigned ERR_W = 4);
  logic             clk;
  logic [7:0]       out;
  logic [7:0]       in;
  logic             run;
  logic             end_;
  logic             event_;
  logic             exe;
  logic             done;
  acc_t             access;
  logic             en;
  logic             rst;
  logic [ERR_W-1:0] error;

  modport master (output clk, out, run, exe, access, en, rst,
                  input  in, end_, event_, done, error);
  modport slave  (input  clk, out, run, exe, access, en, rst,
                  output in, end_, event_, done, error);
endinterface
