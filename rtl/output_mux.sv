// output_mux: 4:1 sample multiplexer in front of the DAC.
//
// The four converter outputs hold one group of four samples for a whole
// slow-clock period. At the full sample rate the multiplexer passes din[sel]
// into its output register, so with SEL counting 0..3 the DAC receives the
// samples in order at four times the datapath rate, as in the paper's
// equation Data_rate = f_CLK_SYNC/4. The output register (retiming the
// samples onto CLK_SYNC before the DAC) is this design's choice.
//
// Timing: dout is din[sel] one clk_sync cycle later.
module output_mux
  import ddfs_pkg::*;
(
  input  logic             clk_sync,
  input  logic             rst_n,
  input  logic [SEL_W-1:0] sel,
  input  amp_t             din [N_ROM],
  output amp_t             dout
);

  always_ff @(posedge clk_sync or negedge rst_n) begin
    if (!rst_n) dout <= '0;
    else        dout <= din[sel];
  end

endmodule
