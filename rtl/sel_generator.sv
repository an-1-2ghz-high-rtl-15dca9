// sel_generator: select counter of the 4:1 output multiplexer.
//
// The paper's block diagram clocks a SEL generator from CLK_SYNC and drives
// the 2-bit SEL input of the output MUX with it. Here SEL counts 0,1,2,3 at the
// sample rate and is forced to 0 on the cycle after each divider tick, so it
// stays in step with the slow datapath even if the two ever disagree: SEL = 0
// always falls in the first sample period after the converters update. The
// resynchronisation is this design's way of meeting the paper's remark
// that the quartet scheme works once synchronisation is solved.
//
// Timing: sel changes on every rising clk_sync edge.
module sel_generator
  import ddfs_pkg::*;
(
  input  logic             clk_sync,
  input  logic             rst_n,
  input  logic             sync,
  output logic [SEL_W-1:0] sel
);

  always_ff @(posedge clk_sync or negedge rst_n) begin
    if (!rst_n)    sel <= '0;
    else if (sync) sel <= '0;
    else           sel <= sel + SEL_W'(1);
  end

endmodule
