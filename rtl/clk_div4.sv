// clk_div4: divide-by-four of the sample clock.
//
// The paper derives the datapath clock as CLK_SYNC/4 (f_CLK = f_CLK_SYNC/4,
// the data-ready clock), so that the four converters each have four sample
// periods per result. Here a 2-bit counter provides both the divided clock
// clk_dr (high for counts 2 and 3, 50 % duty) and a one-cycle tick in the
// last sample period of each group. The datapath uses the tick as a clock
// enable on CLK_SYNC rather than running on a second clock; that, the counter
// and the reset to count 0 are this design's choices.
//
// Timing: after reset the tick is high in every fourth cycle, the 4th, 8th, ...
module clk_div4 (
  input  logic clk_sync,
  input  logic rst_n,
  output logic clk_dr,
  output logic tick
);

  logic [1:0] cnt;

  always_ff @(posedge clk_sync or negedge rst_n) begin
    if (!rst_n) cnt <= 2'd0;
    else        cnt <= cnt + 2'd1;
  end

  assign clk_dr = cnt[1];
  assign tick   = (cnt == 2'd3);

endmodule
