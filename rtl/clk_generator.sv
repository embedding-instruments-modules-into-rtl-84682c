// clk_generator: speed divider of the step-motor controller.
//
// Runs on the I&M's external clock. While `enable` is high it produces a
// square wave `clk_gen` whose high level, and low level, each last `tdiv`
// external clock cycles, so f(clk_gen) = 0.5 * f(clk_external) / tdiv: the
// time-divider field of the step-motor MD-TEDS (Table III default 0x0186A0 =
// 100000, i.e. 250 Hz from 50 MHz). `tick` is a one-cycle pulse at each rising
// edge of clk_gen; the sequence generator steps on it instead of being
// clocked by clk_gen, so the whole I&M stays on one clock. The wave starts low
// when enabled, so the first tick comes tdiv cycles after enable rises and
// the next ones every 2*tdiv cycles. tdiv = 0 is treated as 1.
module clk_generator (
  input  logic        clk_ext,
  input  logic        rst_n,
  input  logic        enable,
  input  logic [23:0] tdiv,
  output logic        clk_gen,
  output logic        tick
);
  logic [23:0] cnt;
  logic [23:0] limit;

  always_comb limit = (tdiv == 24'd0) ? 24'd0 : tdiv - 24'd1;

  always_ff @(posedge clk_ext or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; clk_gen <= 1'b0; tick <= 1'b0;
    end else begin
      tick <= 1'b0;
      if (!enable) begin
        cnt     <= '0;
        clk_gen <= 1'b0;
      end else if (cnt >= limit) begin
        cnt     <= '0;
        clk_gen <= ~clk_gen;
        tick    <= ~clk_gen;
      end else begin
        cnt <= cnt + 24'd1;
      end
    end
  end
endmodule
