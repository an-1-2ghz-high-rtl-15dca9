// phase_offset_adders: phases of the four samples of one group.
//
// The accumulator advances by 4*FTW per slow-clock tick, so one tick covers
// four output samples. Following the paper's block diagram, three adders
// form phase + FTW*1, phase + FTW*2 and phase + FTW*3 for the 2nd to 4th
// converter, and the 1st converter receives the accumulator phase itself. All
// four results are registered (this design's choice) so that every converter
// sees its phase at the same time. Sums wrap modulo 2^PHASE_W, which is the
// phase wrap of the sine.
//
// Interface: on a tick (en) rom_phase[j] <= phase + offset[j] (offset[0] is 0);
// latency one tick.
module phase_offset_adders
  import ddfs_pkg::*;
(
  input  logic   clk_sync,
  input  logic   rst_n,
  input  logic   en,
  input  phase_t phase,
  input  phase_t offset    [1:N_ROM-1],
  output phase_t rom_phase [N_ROM]
);

  always_ff @(posedge clk_sync or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < N_ROM; j++) rom_phase[j] <= '0;
    end else if (en) begin
      rom_phase[0] <= phase;
      for (int j = 1; j < N_ROM; j++) rom_phase[j] <= phase + offset[j];
    end
  end

endmodule
