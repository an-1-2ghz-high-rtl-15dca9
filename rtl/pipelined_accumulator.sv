// pipelined_accumulator: wide phase accumulator split into carry-pipelined
// stages.
//
// A single 32-bit add is too slow for one clock period, so the word is cut
// into N_STAGE slices of STAGE_W bits. Slice i of the increment passes through
// i+1 input skew registers before reaching its own STAGE_W-bit accumulator; the
// carry out of each slice is registered and added into the next slice one
// cycle later, which is exactly when that slice sees the matching increment.
// The upper OUT_STAGES slices form the output phase; every slice below the top
// one is delayed by de-skew registers so that all output bits belong to the
// same accumulation step. The slicing, the skew and de-skew registers and the
// truncation to the upper 16 bits follow the paper's pipelined accumulator
// figure; the enable and the reset to zero are this design's choices.
//
// Interface: on each clock edge with en high the accumulator takes inc. An
// increment taken at enabled edge k shows in the phase after enabled edge
// k+N_STAGE (4 ticks at the defaults); nothing moves while en is low.
module pipelined_accumulator #(
  parameter int unsigned N_STAGE    = 4,
  parameter int unsigned STAGE_W    = 8,
  parameter int unsigned OUT_STAGES = 2
) (
  input  logic                            clk_sync,
  input  logic                            rst_n,
  input  logic                            en,
  input  logic [N_STAGE*STAGE_W-1:0]      inc,
  output logic [OUT_STAGES*STAGE_W-1:0]   phase
);

  // skew[i][k]: k-th input delay register of slice i (slice i uses k = 0..i)
  logic [STAGE_W-1:0] skew [N_STAGE][N_STAGE];
  logic [STAGE_W-1:0] sum  [N_STAGE];
  logic               cy   [N_STAGE];          // registered carry out of each slice
  // deskew[i][k]: output delay registers of slice i (slice i needs N_STAGE-1-i)
  logic [STAGE_W-1:0] deskew [N_STAGE][N_STAGE];
  logic [STAGE_W:0]   nxt    [N_STAGE];          // {carry, sum} of each slice adder

  // slice adders: own sum + skewed increment slice + carry of the slice below
  always_comb begin
    for (int i = 0; i < N_STAGE; i++) begin
      logic cin;
      cin    = (i == 0) ? 1'b0 : cy[(i == 0) ? 0 : i-1];
      nxt[i] = {1'b0, sum[i]} + {1'b0, skew[i][i]} + {{STAGE_W{1'b0}}, cin};
    end
  end

  always_ff @(posedge clk_sync or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_STAGE; i++) begin
        sum[i] <= '0;
        cy[i]  <= 1'b0;
        for (int k = 0; k < N_STAGE; k++) begin
          skew[i][k]   <= '0;
          deskew[i][k] <= '0;
        end
      end
    end else if (en) begin
      for (int i = 0; i < N_STAGE; i++) begin
        // input skew chain
        skew[i][0] <= inc[i*STAGE_W +: STAGE_W];
        for (int k = 1; k < N_STAGE; k++) skew[i][k] <= skew[i][k-1];
        sum[i] <= nxt[i][STAGE_W-1:0];
        cy[i]  <= nxt[i][STAGE_W];
        // output de-skew chain
        deskew[i][0] <= sum[i];
        for (int k = 1; k < N_STAGE; k++) deskew[i][k] <= deskew[i][k-1];
      end
    end
  end

  always_comb begin
    for (int j = 0; j < OUT_STAGES; j++) begin
      int unsigned i;
      i = N_STAGE - OUT_STAGES + j;
      if (i == N_STAGE - 1) phase[j*STAGE_W +: STAGE_W] = sum[i];
      else                  phase[j*STAGE_W +: STAGE_W] = deskew[i][N_STAGE-2-i];
    end
  end

endmodule
