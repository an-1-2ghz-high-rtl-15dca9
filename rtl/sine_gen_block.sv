// sine_gen_block: one of the eight phase-to-amplitude generator blocks of a
// quartet ROM.
//
// The quarter phase x = {alpha, beta, gamma} (4, 6, 4 bits) is turned into a
// sine magnitude with the Sunderland split named in the paper:
//   sin(alpha+beta+gamma) ~ sin(alpha+beta) + cos(alpha)*sin(gamma).
// This block serves the two alpha values 2*GEN and 2*GEN+1, so its coarse
// table holds sin(alpha+beta) for 2x64 entries and its fine table
// cos(alpha)*sin(gamma) for 2x16 entries. Both tables are computed at
// elaboration from $sin/$cos. The coarse entry is taken at gamma = 0 and the
// fine entry uses cos() at the middle of the alpha segment; the fine values
// are 0..3 LSB. Angles carry the half-LSB offset theta = (x+0.5)*pi/2^15, so
// that the descending quarter is obtained exactly by one's complement of beta
// and gamma. The two phase MSBs travel with the data, as in the paper: bit
// 0 of msb2 (the second MSB) decides whether beta and gamma are complemented,
// bit 1 (the MSB) gives the sign, applied as one's complement of the
// magnitude in offset binary: {1, mag} for the first half wave and {0, ~mag}
// for the second. The output code therefore approximates
// 2047.5 + 2047.5*sin(2*pi*(p+0.5)/2^16) for 16-bit phase p.
//
// The input latch (load) is the power-gating register of the paper: it is
// loaded only when the quarter phase's alpha selects this block, so the other
// blocks see no input activity. Pipeline: input latch -> table read register
// -> amplitude register; the amplitude appears two ticks after the latch was
// loaded and holds until the block is loaded again. Table scaling, rounding,
// saturation and the pipeline depth are this design's choices.
module sine_gen_block
  import ddfs_pkg::*;
#(
  parameter int unsigned GEN = 0
) (
  input  logic               clk_sync,
  input  logic               rst_n,
  input  logic               en,
  input  logic               load,
  input  logic               a_lsb,
  input  logic [BETA_W-1:0]  beta,
  input  logic [GAMMA_W-1:0] gamma,
  input  logic [1:0]         msb2,
  output amp_t               amp
);

  localparam int unsigned CA_W = 1 + BETA_W;   // coarse address {a_lsb, beta}
  localparam int unsigned FA_W = 1 + GAMMA_W;  // fine address {a_lsb, gamma}
  localparam int unsigned FINE_W = 2;

  typedef logic [MAG_W-1:0]  coarse_tab_t [2**CA_W];
  typedef logic [FINE_W-1:0] fine_tab_t   [2**FA_W];

  function automatic coarse_tab_t mk_coarse();
    coarse_tab_t t;
    for (int a = 0; a < 2; a++)
      for (int b = 0; b < 2**BETA_W; b++) begin
        real x, v;
        x = real'((((2*GEN + a) << BETA_W) + b) << GAMMA_W);
        v = AMP_SCALE * $sin(qangle(x)) - 0.5;
        if (v < 0.0) v = 0.0;
        if (v > real'(2**MAG_W - 1)) v = real'(2**MAG_W - 1);
        t[(a << BETA_W) + b] = MAG_W'($rtoi(v + 0.5));
      end
    return t;
  endfunction

  function automatic fine_tab_t mk_fine();
    fine_tab_t t;
    for (int a = 0; a < 2; a++)
      for (int g = 0; g < 2**GAMMA_W; g++) begin
        real xa, v;
        xa = real'((((2*GEN + a) << BETA_W) + 2**(BETA_W-1)) << GAMMA_W);
        v  = AMP_SCALE * $cos(qangle(xa)) * $sin(real'(g) * PI / real'(1 << (QPH_W + 1)));
        t[(a << GAMMA_W) + g] = FINE_W'($rtoi(v + 0.5));
      end
    return t;
  endfunction

  localparam coarse_tab_t COARSE = mk_coarse();
  localparam fine_tab_t   FINE   = mk_fine();

  // input latch (power gating)
  logic               a_q;
  logic [BETA_W-1:0]  beta_q;
  logic [GAMMA_W-1:0] gamma_q;
  logic [1:0]         msb2_q;
  // table read register
  logic [MAG_W-1:0]   coarse_q;
  logic [FINE_W-1:0]  fine_q;
  logic               neg_q;

  logic [BETA_W-1:0]  beta_f;
  logic [GAMMA_W-1:0] gamma_f;
  logic [MAG_W:0]     mag_sum;
  logic [MAG_W-1:0]   mag;

  // descending quarter: one's complement of the low bits
  assign beta_f  = msb2_q[0] ? ~beta_q  : beta_q;
  assign gamma_f = msb2_q[0] ? ~gamma_q : gamma_q;

  assign mag_sum = {1'b0, coarse_q} + (MAG_W+1)'(fine_q);
  assign mag     = mag_sum[MAG_W] ? {MAG_W{1'b1}} : mag_sum[MAG_W-1:0];

  always_ff @(posedge clk_sync or negedge rst_n) begin
    if (!rst_n) begin
      a_q      <= 1'b0;
      beta_q   <= '0;
      gamma_q  <= '0;
      msb2_q   <= '0;
      coarse_q <= '0;
      fine_q   <= '0;
      neg_q    <= 1'b0;
      amp      <= '0;
    end else if (en) begin
      if (load) begin
        a_q     <= a_lsb;
        beta_q  <= beta;
        gamma_q <= gamma;
        msb2_q  <= msb2;
      end
      coarse_q <= COARSE[{a_q, beta_f}];
      fine_q   <= FINE[{a_q, gamma_f}];
      neg_q    <= msb2_q[1];
      amp      <= neg_q ? {1'b0, ~mag} : {1'b1, mag};
    end
  end

endmodule
