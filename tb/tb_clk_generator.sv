// tb_clk_generator: for several dividers checks that the generated wave's
// high and low levels each last exactly tdiv input cycles, that the first
// tick comes tdiv cycles after enable, one tick per period, and that the
// output is held low while disabled.
module tb_clk_generator;
  logic clk = 0, rst_n = 0, enable = 0;
  logic [23:0] tdiv = 24'd1;
  logic clk_gen, tick;
  int checks = 0, failures = 0;

  clk_generator dut (.clk_ext(clk), .rst_n, .enable, .tdiv, .clk_gen, .tick);
  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d, n, first, hi, lo, ticks;
    static int divs[6] = '{1, 2, 3, 7, 10, 100};
    repeat (3) @(posedge clk); rst_n = 1;
    foreach (divs[j]) begin
      d = divs[j];
      @(negedge clk); tdiv = 24'(d); enable = 1;
      // first tick
      first = 0;
      do begin @(negedge clk); first++; end while (!tick);
      check(first == d, $sformatf("div %0d: first tick after %0d", d, first));
      check(clk_gen, "clk_gen high with tick");
      for (int p = 0; p < 4; p++) begin
        hi = 0; ticks = 0;
        while (clk_gen) begin @(negedge clk); hi++; if (tick) ticks++; end
        lo = 0;
        while (!clk_gen) begin @(negedge clk); lo++; if (tick) ticks++; end
        check(hi == d && lo == d, $sformatf("div %0d: high %0d low %0d", d, hi, lo));
        check(ticks == 1, $sformatf("div %0d: %0d ticks in a period", d, ticks));
      end
      @(negedge clk); enable = 0;
      n = 0;
      repeat (3 * d + 3) begin @(negedge clk); if (clk_gen || tick) n++; end
      check(n == 0, "activity while disabled");
    end
    // tdiv = 0 behaves as 1
    @(negedge clk); tdiv = 0; enable = 1;
    @(negedge clk); check(tick, "tdiv 0 -> tick after 1 cycle");
    @(negedge clk); enable = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
