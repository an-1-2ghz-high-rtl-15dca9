// quartet_rom: one phase-to-amplitude converter of the quartet (one "ROM" of
// the paper's block diagram).
//
// The two phase MSBs give the quadrant and the 14-bit quarter phase is split
// into alpha (4 bits), beta (6) and gamma (4). The converter is cut into
// N_GEN = 8 generator blocks (sine_gen_block). alpha, after folding by the
// second MSB (one's complement in the descending quarter), drives two things,
// as the paper describes: the input-latch enables, so that only the one
// block whose alpha range contains the phase takes beta, gamma and the two
// MSBs, and the output multiplexer that later picks that block's result. With
// eight blocks for sixteen alpha values, the upper three alpha bits select the
// block and the lowest alpha bit is latched along with the data; that split
// is this design's choice.
//
// Interface: phase is sampled on a tick (en). amp, an offset-binary code
// approximating 2047.5 + 2047.5*sin(2*pi*(phase+0.5)/2^16), appears three
// ticks later (input latch, table read, amplitude, output multiplexer
// register) and holds between ticks.
module quartet_rom
  import ddfs_pkg::*;
(
  input  logic   clk_sync,
  input  logic   rst_n,
  input  logic   en,
  input  phase_t phase,
  output amp_t   amp
);

  localparam int unsigned GSEL_W = $clog2(N_GEN);

  logic [ALPHA_W-1:0] alpha;
  logic [GSEL_W-1:0]  gsel;
  logic [GSEL_W-1:0]  gsel_d [3];
  amp_t               gen_amp [N_GEN];

  // alpha after quadrant folding; selects the generator block
  assign alpha = phase[PHASE_W-2] ? ~phase[QPH_W-1 -: ALPHA_W] : phase[QPH_W-1 -: ALPHA_W];
  assign gsel  = alpha[ALPHA_W-1 -: GSEL_W];

  for (genvar g = 0; g < N_GEN; g++) begin : gen_blk
    sine_gen_block #(.GEN(g)) u_gen (
      .clk_sync (clk_sync),
      .rst_n    (rst_n),
      .en       (en),
      .load     (gsel == GSEL_W'(g)),
      .a_lsb    (alpha[0]),
      .beta     (phase[BETA_W+GAMMA_W-1 -: BETA_W]),
      .gamma    (phase[GAMMA_W-1:0]),
      .msb2     (phase[PHASE_W-1 -: 2]),
      .amp      (gen_amp[g])
    );
  end

  always_ff @(posedge clk_sync or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 3; k++) gsel_d[k] <= '0;
      amp <= '0;
    end else if (en) begin
      gsel_d[0] <= gsel;
      gsel_d[1] <= gsel_d[0];
      gsel_d[2] <= gsel_d[1];
      amp       <= gen_amp[gsel_d[2]];
    end
  end

endmodule
