// timing_control: frequency-word register and multiples for the quartet datapath.
//
// The paper's block diagram shows this logic handing FTW*4 to the phase
// accumulator and FTW*1, FTW*2, FTW*3 to the three offset adders; how it does
// so is this design's own. A new word on fcw is taken into the frequency
// register on a slow-clock tick (en) with fcw_wr high. FTW*4 goes straight to
// the accumulator. The offsets must belong to the increment the accumulator is
// about to add to the phase it is currently showing, so the word is delayed by
// ACC_LAT ticks (the accumulator's latency) before its multiples are formed.
// With that alignment sample 4k+j of the output has phase P_k + j*FTW and
// P_(k+1) = P_k + 4*FTW, so a frequency change keeps the phase continuous.
// The offsets are the upper PHASE_W bits of j*FTW (the accumulator also only
// passes on its upper bits); this truncation can move a sample's phase by one
// 16-bit LSB.
//
// Interface: all registers advance only when en is high; fcw_wr is sampled on
// those ticks. acc_inc changes on the tick after the write; offset changes
// ACC_LAT ticks after that.
module timing_control
  import ddfs_pkg::*;
#(
  parameter int unsigned ACC_LAT = N_STAGE
) (
  input  logic                clk_sync,
  input  logic                rst_n,
  input  logic                en,
  input  logic [ACC_W-1:0]    fcw,
  input  logic                fcw_wr,
  output logic [ACC_W-1:0]    acc_inc,
  output phase_t              offset [1:N_ROM-1]
);

  logic [ACC_W-1:0] fcw_q;
  logic [ACC_W-1:0] fcw_d [ACC_LAT];

  always_ff @(posedge clk_sync or negedge rst_n) begin
    if (!rst_n) begin
      fcw_q <= '0;
      for (int k = 0; k < ACC_LAT; k++) fcw_d[k] <= '0;
    end else if (en) begin
      if (fcw_wr) fcw_q <= fcw;
      fcw_d[0] <= fcw_q;
      for (int k = 1; k < ACC_LAT; k++) fcw_d[k] <= fcw_d[k-1];
    end
  end

  assign acc_inc = fcw_q << 2;

  always_comb begin
    for (int j = 1; j < N_ROM; j++)
      offset[j] = PHASE_W'((fcw_d[ACC_LAT-1] * ACC_W'(j)) >> (ACC_W - PHASE_W));
  end

  // The paper's range for the frequency word, 0 <= FCW <= 2^(f-1): words
  // above half the phase range only alias to lower frequencies.
  a_fcw_range: assert property (@(posedge clk_sync)
    (rst_n && en && fcw_wr) |-> (fcw <= (ACC_W)'(1) << (ACC_W - 1)))
    else $error("frequency word %h above 2^%0d", fcw, ACC_W - 1);

endmodule
