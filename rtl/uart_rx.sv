// uart_rx: receiver half of the RS-232 link between the NCAP and the TIM.
//
// 8 data bits, LSB first, no parity, one stop bit. The line is first passed
// through a two-flop synchroniser; a falling edge starts a frame, the start
// bit is checked at its middle and every data bit is sampled in the middle of
// its bit time (CLKS_PER_BIT clocks per bit). A byte is delivered with a
// one-cycle `valid` strobe at the middle of the stop bit, if the stop bit is
// high; a frame with a low stop bit is dropped and `frame_err` pulses.
// The frame format and the default rate (115200 baud from a 50 MHz clock)
// are this design's choice: the link is only described as RS-232.
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 434
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rx,
  output logic [7:0] data,
  output logic       valid,
  output logic       frame_err
);
  typedef enum logic [1:0] {S_IDLE, S_START, S_DATA, S_STOP} state_e;
  state_e state;
  logic [1:0]  sync;
  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);
  localparam logic [CW-1:0] FULL = CW'(CLKS_PER_BIT - 1);
  localparam logic [CW-1:0] HALF = CW'(CLKS_PER_BIT / 2 - 1);
  logic [CW-1:0] cnt;
  logic [2:0]  bit_idx;
  logic [7:0]  shreg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sync <= 2'b11;
    else        sync <= {sync[0], rx};
  end

  wire line = sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; cnt <= '0; bit_idx <= '0; shreg <= '0;
      data <= '0; valid <= 1'b0; frame_err <= 1'b0;
    end else begin
      valid     <= 1'b0;
      frame_err <= 1'b0;
      unique case (state)
        S_IDLE: if (!line) begin
          state <= S_START;
          cnt   <= '0;
        end
        S_START: begin
          if (cnt == HALF) begin
            cnt     <= '0;
            bit_idx <= '0;
            state   <= line ? S_IDLE : S_DATA;  // glitch: back to idle
          end else cnt <= cnt + 1'b1;
        end
        S_DATA: begin
          if (cnt == FULL) begin
            cnt   <= '0;
            shreg <= {line, shreg[7:1]};
            if (bit_idx == 3'd7) state <= S_STOP;
            bit_idx <= bit_idx + 1'b1;
          end else cnt <= cnt + 1'b1;
        end
        S_STOP: begin
          if (cnt == FULL) begin
            cnt   <= '0;
            state <= S_IDLE;
            if (line) begin
              data  <= shreg;
              valid <= 1'b1;
            end else frame_err <= 1'b1;
          end else cnt <= cnt + 1'b1;
        end
      endcase
    end
  end
endmodule
