// ieee1451_pkg: constants and types shared by the IEEE1451.0 TIM and its
// instruments & modules (I&Ms).
//
// Command numbering (class.function) follows the IEEE1451.0 low-level
// commands the TIM serves: 3.1 Read TC data set, 3.2 Write TC data set,
// 3.3 Trigger, 3.4 AbortTrigger, 4.4 Write TC trigger state and 7.1 Reset.
// The TEDS and status commands (1.2 ReadTEDSSegment, 1.3 WriteTEDSSegment,
// 1.8 ReadStatusEventRegister) and the TEDS access codes (1 Meta-TEDS,
// 3 TC-TEDS, 0x80 manufacturer-defined TEDS) are taken from the standard's
// tables; 0x80 is the code of the step-motor MD-TEDS.
//
// The TC bus "access" codes are this design's own: a non-zero access code
// names an instruction for the I&M. Codes 4..7 carry the MD-TEDS field of the
// same number (the update task streams every field value byte with its field
// number as access code), 8/9 start/stop the I&M and 15 closes an operation.
package ieee1451_pkg;

  localparam int unsigned ACC_W = 4;
  typedef logic [ACC_W-1:0] acc_t;

  localparam acc_t ACC_DATA   = 4'd0;   // out/in carry data
  localparam acc_t ACC_DIR    = 4'd4;   // MD-TEDS field 4: direction
  localparam acc_t ACC_NSTEPS = 4'd5;   // MD-TEDS field 5: number of steps
  localparam acc_t ACC_MODE   = 4'd6;   // MD-TEDS field 6: step mode
  localparam acc_t ACC_TDIV   = 4'd7;   // MD-TEDS field 7: time divider
  localparam acc_t ACC_START  = 4'd8;   // TCx_start
  localparam acc_t ACC_STOP   = 4'd9;   // TCx_stop
  localparam acc_t ACC_END    = 4'd15;  // master asks the I&M to raise end

  // First and last MD-TEDS field numbers handed to the I&M by TCx_update.
  localparam int unsigned FIRST_PARAM_FIELD = 4;
  localparam int unsigned LAST_PARAM_FIELD  = 14;

  // Low-level command classes / functions.
  localparam logic [7:0] CLS_COMMON  = 8'd1;
  localparam logic [7:0] CLS_OPERATE = 8'd3;
  localparam logic [7:0] CLS_IDLE    = 8'd4;
  localparam logic [7:0] CLS_EITHER  = 8'd7;

  localparam logic [7:0] FN_READ_TEDS   = 8'd2;  // 1.2
  localparam logic [7:0] FN_WRITE_TEDS  = 8'd3;  // 1.3
  localparam logic [7:0] FN_READ_STATUS = 8'd8;  // 1.8
  localparam logic [7:0] FN_READ_TC     = 8'd1;  // 3.1
  localparam logic [7:0] FN_WRITE_TC    = 8'd2;  // 3.2
  localparam logic [7:0] FN_TRIGGER     = 8'd3;  // 3.3
  localparam logic [7:0] FN_ABORT       = 8'd4;  // 3.4
  localparam logic [7:0] FN_TRIG_STATE  = 8'd4;  // 4.4
  localparam logic [7:0] FN_RESET       = 8'd1;  // 7.1

  // TEDS access codes.
  localparam logic [7:0] TEDS_META = 8'h01;
  localparam logic [7:0] TEDS_TC   = 8'h03;
  localparam logic [7:0] TEDS_MD   = 8'h80;

  // Step modes (MD-TEDS field 6).
  typedef enum logic [1:0] {
    MODE_HALF   = 2'd0,
    MODE_NORMAL = 2'd1,
    MODE_WAVE   = 2'd2
  } step_mode_e;

  // Transducer channel operating state.
  typedef enum logic [1:0] {
    TC_INIT      = 2'd0,
    TC_IDLE      = 2'd1,
    TC_OPERATING = 2'd2
  } tc_state_e;

  // Status register bits (this design's own assignment).
  localparam int unsigned ST_OPERATING = 0;  // TC triggered / running
  localparam int unsigned ST_REJECTED  = 1;  // last command rejected
  localparam int unsigned ST_IM_ERROR  = 2;  // I&M reported a non-zero error
  localparam int unsigned ST_ENABLED   = 3;  // I&M enabled (en high)

  // Number of steps value that means "run continuously" (Table III field 5).
  localparam logic [15:0] STEPS_CONTINUOUS = 16'hFFFF;

endpackage
