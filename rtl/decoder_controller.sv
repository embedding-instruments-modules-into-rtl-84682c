// decoder_controller: the core of the IEEE1451-module. It decodes low-level
// command frames arriving from the NCAP through the UART, runs the tasks of
// the transducer channel (TC) that the command calls, reads and writes the
// TEDSs and the status/state module, and returns a reply frame.
//
// Command frame (NCAP -> TIM), as in IEEE1451.0 command messages:
//   TC number (2 octets, 0 = the TIM) | class | function | length (2) | payload
// Reply frame (TIM -> NCAP):
//   success (1 = ok, 0 = failed) | length (2) | payload
// Multi-octet numbers are MSB first.
//
// Commands and the TC tasks they run (task = TCx_...):
//   1.2 ReadTEDSSegment   payload code, offset(4) -> offset(4), TEDS octets
//   1.3 WriteTEDSSegment  payload code, offset(4), octets
//   1.8 ReadStatusEventRegister -> 4 octets, status in the last
//   3.1 Read TC           update, rd  -> offset(4) echoed, data set octets
//   3.2 Write TC          update, wr  (payload offset(4), octets)
//   3.3 Trigger           update, start           -> state OPERATING
//   3.4 AbortTrigger      stop                    -> state IDLE
//   4.4 Write TC trigger state  1 octet: !=0 update, start; 0 stop
//   7.1 Reset             init (rst pulse, then update) -> state IDLE
// init also runs once after reset, taking the TC out of TC_INIT.
// The command-to-task map follows the paper's task table; the frame layout,
// the 1.x numbers and the TEDS codes come from IEEE1451.0; the rest
// (payload subsets, data-set size MAX_DS, segment size MAX_SEG) is this
// design's choice. Only the commanded transmission mode exists: data reach
// the NCAP only in replies to Read TC.
//
// TC tasks talk to the I&M through tc_handshake_master, one step or finish at
// a time. The update task walks the MD-TEDS fields (type, length, value) and
// hands every value octet of fields 4..14 to the I&M as one step operation
// whose access code is the field number; the read task reads data octets
// (access 0) until the I&M ends the operation or MAX_DS octets are in; the
// write task sends the payload octets with access 0. A timeout of the
// handshake or a non-zero I&M error code fails the command.
//
// Event sensors: with EVENT_SENSOR set, a rising edge of the I&M's event_
// line runs the update task between commands, as a command would, but sends
// no reply; an I&M error it meets is latched in the status register. The
// edge is remembered while a command runs and served once the decoder is
// idle; octets arriving during that update are dropped, as during a
// command. The step-motor channel is an actuator and leaves EVENT_SENSOR at 0.
//
// A UART framing error inside a command frame drops the partial frame.
// Timing: a command is executed once its last octet has arrived; octets
// arriving while a command runs or its reply is sent are dropped (the NCAP
// waits for each reply). Replies are sent back to back through uart_tx.
module decoder_controller
  import ieee1451_pkg::*;
#(
  parameter logic [15:0] TC_ID      = 16'd1,
  parameter int unsigned MAX_DS     = 16,
  parameter int unsigned MAX_SEG    = 32,
  parameter int unsigned TEDS_BYTES = 64,
  parameter int unsigned RST_CYCLES = 4,
  parameter bit          EVENT_SENSOR = 1'b0
) (
  input  logic        clk,
  input  logic        rst_n,
  // UART
  input  logic [7:0]  rx_data,
  input  logic        rx_valid,
  input  logic        rx_err,
  output logic [7:0]  tx_data,
  output logic        tx_start,
  input  logic        tx_busy,
  // TEDS controller
  output logic [7:0]  teds_sel,
  output logic [7:0]  teds_addr,
  output logic        teds_we,
  output logic [7:0]  teds_wdata,
  input  logic [7:0]  teds_rdata,
  input  logic        teds_sel_ok,
  // status/state module
  output logic        st_we,
  output tc_state_e   st_wdata,
  output logic        cmd_done,
  output logic        cmd_rejected,
  output logic        im_error_flag,
  output logic        status_read,
  input  tc_state_e   tc_state,
  input  logic [7:0]  status,
  // I&M control and TC handshake engine
  output logic        im_rst,
  input  logic [3:0]  im_error,
  input  logic        im_event,
  output logic        hs_req,
  output logic        hs_finish,
  output acc_t        hs_acc,
  output logic [7:0]  hs_wdata,
  input  logic        hs_ack,
  input  logic [7:0]  hs_rdata,
  input  logic        hs_ended,
  input  logic        hs_timeout
);
  localparam int unsigned DMAX    = (MAX_SEG > MAX_DS) ? MAX_SEG : MAX_DS;
  localparam int unsigned PAY_MAX = 5 + DMAX;
  localparam int unsigned RBUF    = 7 + DMAX;

  typedef enum logic [5:0] {
    D_BOOT, D_HDR, D_PAY, D_EXEC,
    D_TR_L2, D_TR_L3, D_TR_COPY, D_TW,
    D_TASKS, D_HS_WAIT,
    D_INIT,
    D_U_L2, D_U_L3, D_U_TYPE, D_U_LEN, D_U_VAL, D_U_NEXT,
    D_S2,
    D_R1, D_R2,
    D_W1, D_W2,
    D_DONE, D_REPLY, D_SEND, D_SEND_GAP
  } dstate_e;

  dstate_e state, ret;

  // received frame
  logic [2:0]  hcnt;
  logic [15:0] f_tc, f_len, pcnt;
  logic [7:0]  f_cls, f_fn;
  logic [7:0]  pay [PAY_MAX];

  // reply
  logic [7:0]  rbuf [RBUF];
  logic [7:0]  rlen, sidx;
  logic        reply_ok, boot;      // boot: task run without a reply
  logic        ev_d, ev_pend;

  // task queue and command result
  logic        q_init, q_update, q_start, q_stop, q_rd, q_wr;
  logic        fail, st_set;
  tc_state_e   st_next;
  logic        is_rd_tc;

  // task registers
  logic [9:0]  u_p, u_end;
  logic [7:0]  u_type, u_n, t_len_hi;
  logic [7:0]  k, n_wr, t_off;
  logic [15:0] t_total;
  logic [3:0]  rst_cnt;

  wire [7:0] p0 = pay[0];
  wire       tc_is_ch  = (f_tc == TC_ID);
  wire       tc_is_tim = (f_tc == 16'd0);

  // TEDS codes reachable from the addressed TC: the Meta-TEDS from the TIM,
  // the TC-TEDS and MD-TEDS from the channel.
  wire teds_code_ok = teds_sel_ok &&
                      ((tc_is_tim && pay[0] == TEDS_META) ||
                       (tc_is_ch  && (pay[0] == TEDS_TC || pay[0] == TEDS_MD)));
  wire off_small    = (pay[1] == 8'd0) && (pay[2] == 8'd0) && (pay[3] == 8'd0);


  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= D_BOOT; ret <= D_BOOT;
      hcnt <= '0; f_tc <= '0; f_len <= '0; pcnt <= '0; f_cls <= '0; f_fn <= '0;
      for (int i = 0; i < PAY_MAX; i++) pay[i] <= '0;
      for (int i = 0; i < RBUF; i++)    rbuf[i] <= '0;
      rlen <= '0; sidx <= '0; reply_ok <= 1'b0; boot <= 1'b1;
      ev_d <= 1'b0; ev_pend <= 1'b0;
      q_init <= 1'b0; q_update <= 1'b0; q_start <= 1'b0; q_stop <= 1'b0;
      q_rd <= 1'b0; q_wr <= 1'b0; fail <= 1'b0; st_set <= 1'b0; st_next <= TC_INIT;
      is_rd_tc <= 1'b0;
      u_p <= '0; u_end <= '0; u_type <= '0; u_n <= '0; t_len_hi <= '0;
      k <= '0; n_wr <= '0; t_off <= '0; t_total <= '0; rst_cnt <= '0;
      teds_sel <= TEDS_MD; teds_addr <= '0; teds_we <= 1'b0; teds_wdata <= '0;
      tx_data <= '0; tx_start <= 1'b0;
      st_we <= 1'b0; st_wdata <= TC_INIT; cmd_done <= 1'b0; cmd_rejected <= 1'b0;
      im_error_flag <= 1'b0; status_read <= 1'b0; im_rst <= 1'b0;
      hs_req <= 1'b0; hs_finish <= 1'b0; hs_acc <= ACC_DATA; hs_wdata <= '0;
    end else begin
      tx_start      <= 1'b0;
      teds_we       <= 1'b0;
      st_we         <= 1'b0;
      cmd_done      <= 1'b0;
      im_error_flag <= 1'b0;
      status_read   <= 1'b0;
      ev_d          <= im_event;
      if (EVENT_SENSOR && im_event && !ev_d) ev_pend <= 1'b1;

      // a broken UART frame inside a command frame drops the command
      if (rx_err && (state == D_HDR || state == D_PAY)) begin
        hcnt  <= '0;
        state <= D_HDR;
      end else
      unique case (state)
        // ---------------------------------------------------------------
        D_BOOT: begin
          q_init <= 1'b1; q_update <= 1'b1;
          fail <= 1'b0; st_set <= 1'b1; st_next <= TC_IDLE;
          state <= D_TASKS;
        end

        // ---------------------------------------------------------------
        D_HDR: if (EVENT_SENSOR && ev_pend && hcnt == 3'd0 && !rx_valid) begin
          ev_pend  <= 1'b0;
          boot     <= 1'b1;
          q_update <= 1'b1;
          fail <= 1'b0; st_set <= 1'b0; is_rd_tc <= 1'b0;
          state <= D_TASKS;
        end else if (rx_valid) begin
          unique case (hcnt)
            3'd0: f_tc[15:8]  <= rx_data;
            3'd1: f_tc[7:0]   <= rx_data;
            3'd2: f_cls       <= rx_data;
            3'd3: f_fn        <= rx_data;
            3'd4: f_len[15:8] <= rx_data;
            default: f_len[7:0] <= rx_data;
          endcase
          if (hcnt == 3'd5) begin
            hcnt <= '0;
            pcnt <= '0;
            for (int i = 0; i < PAY_MAX; i++) pay[i] <= '0;
            state <= ({f_len[15:8], rx_data} == 16'd0) ? D_EXEC : D_PAY;
          end else hcnt <= hcnt + 3'd1;
        end

        D_PAY: if (rx_valid) begin
          if (pcnt < 16'(PAY_MAX)) pay[pcnt[$clog2(PAY_MAX)-1:0]] <= rx_data;
          pcnt <= pcnt + 16'd1;
          if (pcnt == f_len - 16'd1) state <= D_EXEC;
        end

        // ---------------------------------------------------------------
        D_EXEC: begin
          fail <= 1'b0; st_set <= 1'b0; is_rd_tc <= 1'b0;
          rlen <= 8'd3;
          k <= '0;
          state <= D_REPLY;                          // default: rejected
          reply_ok <= 1'b0;
          unique case ({f_cls, f_fn})
            {CLS_COMMON, FN_READ_TEDS}: begin
              teds_sel <= p0;
              if (teds_code_ok && f_len >= 16'd5 && off_small) begin
                teds_addr <= 8'd2;
                t_off     <= pay[4];
                state     <= D_TR_L2;
              end
            end
            {CLS_COMMON, FN_WRITE_TEDS}: begin
              teds_sel <= p0;
              if (teds_code_ok && f_len >= 16'd5 && off_small &&
                  f_len <= 16'(PAY_MAX) &&
                  32'(pay[4]) + 32'(f_len) - 32'd5 <= TEDS_BYTES) begin
                t_off <= pay[4];
                n_wr  <= 8'(f_len - 16'd5);
                state <= D_TW;
              end
            end
            {CLS_COMMON, FN_READ_STATUS}: begin
              if (tc_is_ch || tc_is_tim) begin
                rbuf[3] <= 8'd0; rbuf[4] <= 8'd0; rbuf[5] <= 8'd0; rbuf[6] <= status;
                rlen <= 8'd7; reply_ok <= 1'b1; status_read <= 1'b1;
                state <= D_REPLY;
              end
            end
            {CLS_OPERATE, FN_READ_TC}: if (tc_is_ch && tc_state != TC_INIT) begin
              q_update <= 1'b1; q_rd <= 1'b1; is_rd_tc <= 1'b1;
              state <= D_TASKS;
            end
            {CLS_OPERATE, FN_WRITE_TC}: if (tc_is_ch && tc_state != TC_INIT &&
                                            f_len >= 16'd4 && f_len <= 16'(4 + MAX_DS)) begin
              q_update <= 1'b1; q_wr <= 1'b1;
              n_wr <= 8'(f_len - 16'd4);
              state <= D_TASKS;
            end
            {CLS_OPERATE, FN_TRIGGER}: if (tc_is_ch && tc_state != TC_INIT) begin
              q_update <= 1'b1; q_start <= 1'b1;
              st_set <= 1'b1; st_next <= TC_OPERATING;
              state <= D_TASKS;
            end
            {CLS_OPERATE, FN_ABORT}: if (tc_is_ch && tc_state != TC_INIT) begin
              q_stop <= 1'b1;
              st_set <= 1'b1; st_next <= TC_IDLE;
              state <= D_TASKS;
            end
            {CLS_IDLE, FN_TRIG_STATE}: if (tc_is_ch && tc_state != TC_INIT &&
                                           f_len >= 16'd1) begin
              if (p0 != 8'd0) begin
                q_update <= 1'b1; q_start <= 1'b1; st_next <= TC_OPERATING;
              end else begin
                q_stop <= 1'b1; st_next <= TC_IDLE;
              end
              st_set <= 1'b1;
              state <= D_TASKS;
            end
            {CLS_EITHER, FN_RESET}: if (tc_is_ch || tc_is_tim) begin
              q_init <= 1'b1; q_update <= 1'b1;
              st_set <= 1'b1; st_next <= TC_IDLE;
              state <= D_TASKS;
            end
            default: ;
          endcase
        end

        // ---- 1.2 ReadTEDSSegment ---------------------------------------
        D_TR_L2: begin
          t_len_hi  <= teds_rdata;
          teds_addr <= 8'd3;
          state     <= D_TR_L3;
        end
        D_TR_L3: begin
          // octets in the TEDS image: 4 length octets + length
          if ({t_len_hi, teds_rdata} > 16'(TEDS_BYTES - 4))
            t_total <= 16'(TEDS_BYTES);
          else
            t_total <= {t_len_hi, teds_rdata} + 16'd4;
          rbuf[3] <= pay[1]; rbuf[4] <= pay[2]; rbuf[5] <= pay[3]; rbuf[6] <= pay[4];
          teds_addr <= t_off;
          k <= '0;
          state <= D_TR_COPY;
        end
        D_TR_COPY: begin
          if (16'(t_off) + 16'(k) >= t_total || 32'(k) == MAX_SEG) begin
            rlen     <= 8'd7 + k;
            reply_ok <= (16'(t_off) < t_total);
            state    <= D_REPLY;
          end else begin
            rbuf[7 + k] <= teds_rdata;
            k         <= k + 8'd1;
            teds_addr <= t_off + k + 8'd1;
          end
        end

        // ---- 1.3 WriteTEDSSegment --------------------------------------
        D_TW: begin
          if (k == n_wr) begin
            reply_ok <= 1'b1;
            state <= D_REPLY;
          end else begin
            teds_we    <= 1'b1;
            teds_addr  <= t_off + k;
            teds_wdata <= pay[5 + k];
            k          <= k + 8'd1;
          end
        end

        // ---- task dispatcher -------------------------------------------
        D_TASKS: begin
          teds_sel <= TEDS_MD;
          if (fail) begin
            q_init <= 1'b0; q_update <= 1'b0; q_start <= 1'b0;
            q_stop <= 1'b0; q_rd <= 1'b0; q_wr <= 1'b0;
            state <= D_DONE;
          end else if (q_init) begin
            q_init <= 1'b0; im_rst <= 1'b1; rst_cnt <= '0;
            state <= D_INIT;
          end else if (q_update) begin
            q_update <= 1'b0;
            teds_addr <= 8'd2;
            state <= D_U_L2;
          end else if (q_start) begin
            q_start <= 1'b0;
            hs_req <= 1'b1; hs_finish <= 1'b0; hs_acc <= ACC_START; hs_wdata <= 8'd0;
            ret <= D_S2; state <= D_HS_WAIT;
          end else if (q_stop) begin
            q_stop <= 1'b0;
            hs_req <= 1'b1; hs_finish <= 1'b0; hs_acc <= ACC_STOP; hs_wdata <= 8'd0;
            ret <= D_S2; state <= D_HS_WAIT;
          end else if (q_rd) begin
            q_rd <= 1'b0;
            k    <= '0;
            rbuf[3] <= pay[0]; rbuf[4] <= pay[1]; rbuf[5] <= pay[2]; rbuf[6] <= pay[3];
            state <= D_R1;
          end else if (q_wr) begin
            q_wr <= 1'b0;
            k    <= '0;
            state <= D_W1;
          end else begin
            state <= D_DONE;
          end
        end

        // one handshake action: wait for its ack, then go to `ret`
        D_HS_WAIT: if (hs_ack) begin
          hs_req <= 1'b0;
          if (hs_timeout) fail <= 1'b1;
          state <= ret;
        end

        // ---- TCx_init: pulse rst to the I&M, then update -------------
        D_INIT: begin
          if (32'(rst_cnt) == RST_CYCLES - 1) begin
            im_rst <= 1'b0;
            state  <= D_TASKS;
          end
          rst_cnt <= rst_cnt + 4'd1;
        end

        // ---- TCx_update: MD-TEDS fields -> I&M parameters ------------
        D_U_L2: begin
          t_len_hi  <= teds_rdata;
          teds_addr <= 8'd3;
          state     <= D_U_L3;
        end
        D_U_L3: begin
          // fields run from octet 4 up to the 2-octet checksum
          if ({t_len_hi, teds_rdata} > 16'(TEDS_BYTES - 2))
            u_end <= 10'(TEDS_BYTES - 2);
          else
            u_end <= 10'({t_len_hi, teds_rdata}) + 10'd2;
          u_p       <= 10'd4;
          teds_addr <= 8'd4;
          state     <= D_U_TYPE;
        end
        D_U_TYPE: begin
          if (u_p >= u_end || fail) begin
            hs_req <= 1'b1; hs_finish <= 1'b1;
            ret <= D_TASKS; state <= D_HS_WAIT;
          end else begin
            u_type    <= teds_rdata;
            teds_addr <= u_p[7:0] + 8'd1;
            state     <= D_U_LEN;
          end
        end
        D_U_LEN: begin
          u_n       <= teds_rdata;
          u_p       <= u_p + 10'd2;
          teds_addr <= u_p[7:0] + 8'd2;
          state     <= D_U_VAL;
        end
        D_U_VAL: begin
          if (u_n == 8'd0 || u_p >= u_end) begin
            teds_addr <= u_p[7:0];
            state     <= D_U_TYPE;
          end else if (32'(u_type) >= FIRST_PARAM_FIELD &&
                       32'(u_type) <= LAST_PARAM_FIELD) begin
            hs_req <= 1'b1; hs_finish <= 1'b0;
            hs_acc <= u_type[ACC_W-1:0]; hs_wdata <= teds_rdata;
            ret <= D_U_NEXT; state <= D_HS_WAIT;
          end else begin
            state <= D_U_NEXT;
          end
        end
        D_U_NEXT: begin
          u_p       <= u_p + 10'd1;
          u_n       <= u_n - 8'd1;
          teds_addr <= u_p[7:0] + 8'd1;
          state     <= fail ? D_TASKS : D_U_VAL;
        end

        // ---- TCx_start / TCx_stop: one step, then end the operation ----
        D_S2: begin
          if (hs_ended || fail) state <= D_TASKS;
          else begin
            hs_req <= 1'b1; hs_finish <= 1'b1;
            ret <= D_TASKS; state <= D_HS_WAIT;
          end
        end

        // ---- TCx_rd: I&M data -> data set -------------------------------
        D_R1: begin
          if (32'(k) == MAX_DS) begin
            hs_req <= 1'b1; hs_finish <= 1'b1;
            ret <= D_TASKS; state <= D_HS_WAIT;
          end else begin
            hs_req <= 1'b1; hs_finish <= 1'b0; hs_acc <= ACC_DATA; hs_wdata <= 8'd0;
            ret <= D_R2; state <= D_HS_WAIT;
          end
        end
        D_R2: begin
          if (!fail) begin
            rbuf[7 + k] <= hs_rdata;
            k <= k + 8'd1;
          end
          state <= (hs_ended || fail) ? D_TASKS : D_R1;
        end

        // ---- TCx_wr: data set (command payload) -> I&M ------------------
        D_W1: begin
          if (k == n_wr) begin
            hs_req <= 1'b1; hs_finish <= 1'b1;
            ret <= D_TASKS; state <= D_HS_WAIT;
          end else begin
            hs_req <= 1'b1; hs_finish <= 1'b0; hs_acc <= ACC_DATA;
            hs_wdata <= pay[4 + k];
            ret <= D_W2; state <= D_HS_WAIT;
          end
        end
        D_W2: begin
          k <= k + 8'd1;
          state <= (hs_ended || fail) ? D_TASKS : D_W1;
        end

        // ---- command result -------------------------------------------
        D_DONE: begin
          if (fail || im_error != 4'd0) begin
            reply_ok <= 1'b0;
            rlen     <= 8'd3;
            im_error_flag <= (im_error != 4'd0);
          end else begin
            reply_ok <= 1'b1;
            rlen     <= is_rd_tc ? 8'd7 + k : 8'd3;
            if (st_set) begin
              st_we    <= 1'b1;
              st_wdata <= st_next;
            end
          end
          if (boot) begin
            boot  <= 1'b0;
            state <= D_HDR;
          end else state <= D_REPLY;
        end

        // ---- reply -------------------------------------------------------
        D_REPLY: begin
          cmd_done     <= 1'b1;
          cmd_rejected <= !reply_ok;
          rbuf[0] <= {7'd0, reply_ok};
          rbuf[1] <= 8'd0;
          rbuf[2] <= rlen - 8'd3;
          sidx    <= '0;
          state   <= D_SEND;
        end
        D_SEND: begin
          if (!tx_busy && !tx_start) begin
            tx_data  <= rbuf[sidx[$clog2(RBUF)-1:0]];
            tx_start <= 1'b1;
            sidx     <= sidx + 8'd1;
            state    <= D_SEND_GAP;
          end
        end
        D_SEND_GAP: begin
          // uart_tx raises busy the cycle after start
          if (!tx_start) state <= (sidx == rlen) ? D_HDR : D_SEND;
        end
        default: state <= D_HDR;
      endcase
    end
  end
endmodule
