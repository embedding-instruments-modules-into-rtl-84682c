// uart_tx: transmitter half of the RS-232 link between the TIM and the NCAP.
//
// 8 data bits, LSB first, no parity, one stop bit, CLKS_PER_BIT clocks per
// bit. `start` is accepted when `busy` is low; the byte is latched and the
// frame (start bit, 8 data bits, stop bit) takes 10*CLKS_PER_BIT clocks, during
// which `busy` stays high. The line idles high. Frame format and rate are this
// design's choice, matching uart_rx.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 434
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] data,
  input  logic       start,
  output logic       busy,
  output logic       tx
);
  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);
  localparam logic [CW-1:0] FULL = CW'(CLKS_PER_BIT - 1);
  logic [CW-1:0] cnt;
  logic [3:0] bit_idx;   // 0 start, 1..8 data, 9 stop
  logic [7:0] shreg;     // data bits still to send, LSB next

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; tx <= 1'b1; cnt <= '0; bit_idx <= '0; shreg <= '0;
    end else if (!busy) begin
      tx <= 1'b1;
      if (start) begin
        busy    <= 1'b1;
        shreg   <= data;
        tx      <= 1'b0;
        cnt     <= '0;
        bit_idx <= '0;
      end
    end else begin
      if (cnt == FULL) begin
        cnt <= '0;
        if (bit_idx == 4'd9) begin
          busy <= 1'b0;
          tx   <= 1'b1;
        end else begin
          bit_idx <= bit_idx + 1'b1;
          shreg   <= {1'b0, shreg[7:1]};
          tx      <= (bit_idx == 4'd8) ? 1'b1 : shreg[0];
        end
      end else cnt <= cnt + 1'b1;
    end
  end
endmodule
