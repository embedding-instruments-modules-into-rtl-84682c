// mpp1: step-sequence generator of the bipolar step-motor controller.
//
// Drives the six motor lines data_out[5:0] = {EN_B, EN_A, B2, B1, A2, A1}:
// two H-bridge enables and the two terminals of each coil. A coil driven
// "+" has x1=1, x2=0, "-" has x1=0, x2=1; a coil left off has its enable low.
// The eight half-step positions are
//   0 A+   1 A+B+   2 B+   3 A-B+   4 A-   5 A-B-   6 B-   7 A+B-
// Half-step mode (0) walks all eight, normal drive (1) only the odd ones (two
// coils on), wave drive (2) only the even ones (one coil on). Direction 1
// walks upwards, 0 downwards. The modes, the direction and the number of
// steps are those of the step-motor MD-TEDS; the assignment of the six lines
// and the position table are this design's choice.
//
// Runs on clk_ext. `go` and `start_tgl` come from the TC-clock side and are
// synchronised here. Every change of start_tgl is a start: dir/mode/nsteps
// are sampled then (mpp2 changes them only before a start). go low stops. On that edge the current position, moved
// to the right parity for the mode, is driven at once; then each `tick` moves
// one step. With nsteps = 0xFFFF the motor runs until go falls; otherwise it
// stops by itself after nsteps steps. The lines keep their last pattern when
// stopped (holding torque) and are all low after reset.
module mpp1
  import ieee1451_pkg::*;
(
  input  logic        clk_ext,
  input  logic        rst_n,
  input  logic        go,
  input  logic        start_tgl,
  input  logic        dir,
  input  logic [1:0]  mode,
  input  logic [15:0] nsteps,
  input  logic        tick,
  output logic [5:0]  data_out,
  output logic        running,
  output logic [15:0] steps_done
);
  function automatic logic [5:0] pattern(input logic [2:0] pos);
    unique case (pos)
      3'd0: pattern = 6'b01_00_01;  // A+
      3'd1: pattern = 6'b11_01_01;  // A+ B+
      3'd2: pattern = 6'b10_01_00;  // B+
      3'd3: pattern = 6'b11_01_10;  // A- B+
      3'd4: pattern = 6'b01_00_10;  // A-
      3'd5: pattern = 6'b11_10_10;  // A- B-
      3'd6: pattern = 6'b10_10_00;  // B-
      default: pattern = 6'b11_10_01;  // A+ B-
    endcase
  endfunction

  logic [2:0]  go_sync, tgl_sync;
  logic [2:0]  pos;
  logic        dir_r;
  step_mode_e  mode_r;
  logic [15:0] nsteps_r;
  logic [15:0] remaining;

  always_ff @(posedge clk_ext or negedge rst_n) begin
    if (!rst_n) begin
      go_sync <= '0; tgl_sync <= '0;
    end else begin
      go_sync  <= {go_sync[1:0], go};
      tgl_sync <= {tgl_sync[1:0], start_tgl};
    end
  end

  wire go_s    = go_sync[1];
  // a start: the start toggle changed (each start command flips it)
  wire go_rise = tgl_sync[1] ^ tgl_sync[2];

  logic [2:0] aligned;
  always_comb begin
    unique case (step_mode_e'(mode))
      MODE_NORMAL: aligned = {pos[2:1], 1'b1};
      MODE_WAVE:   aligned = {pos[2:1], 1'b0};
      default:     aligned = pos;
    endcase
  end

  logic [2:0] delta, nxt;
  always_comb begin
    delta = (mode_r == MODE_HALF) ? 3'd1 : 3'd2;
    nxt   = dir_r ? pos + delta : pos - delta;
  end

  always_ff @(posedge clk_ext or negedge rst_n) begin
    if (!rst_n) begin
      pos <= '0; dir_r <= 1'b0; mode_r <= MODE_HALF; nsteps_r <= '0;
      remaining <= '0; running <= 1'b0; data_out <= '0; steps_done <= '0;
    end else if (go_rise) begin
      dir_r      <= dir;
      mode_r     <= (mode > 2'd2) ? MODE_HALF : step_mode_e'(mode);
      nsteps_r   <= nsteps;
      remaining  <= nsteps;
      pos        <= aligned;
      data_out   <= pattern(aligned);
      running    <= (nsteps != 16'd0);
      steps_done <= '0;
    end else if (!go_s && !go_sync[0]) begin
      running <= 1'b0;
    end else if (running && tick) begin
      pos        <= nxt;
      data_out   <= pattern(nxt);
      steps_done <= steps_done + 16'd1;
      if (nsteps_r != STEPS_CONTINUOUS) begin
        remaining <= remaining - 16'd1;
        if (remaining == 16'd1) running <= 1'b0;
      end
    end
  end
endmodule
