// current_steering_dac: behavioural model of the 12-bit segmented
// current-steering DAC.
//
// This is a behavioural model of an analog block, not a circuit to synthesise
// into the chip: the real part is an array of switched current sources with
// a bias reference. The model keeps the digital part of a segmented DAC (an
// input register and the binary-to-thermometer decoder for the upper
// N_UNARY_BITS) and replaces the current sources by integer arithmetic: every
// unary source carries 2^(N_BITS-N_UNARY_BITS) unit currents, the binary
// lower bits carry their binary weights, and a unit current is
// IFS_NA/(2^N_BITS-1) nanoamperes. Each source is steered to IOUT when on and
// to IOUTB when off, so iout_na + ioutb_na = IFS_NA.
//
// From the paper: 12 bits, differential outputs IOUT/IOUTB, up to 5 mA
// full scale (1 V differential into 100-ohm loads), a segmented architecture.
// This model's own choices: 6 unary MSBs, the unary sources switched in
// index order (the paper's switching order, a "Q2 random walk" over the
// current-source array, is not detailed), ideal sources with no mismatch,
// and currents rounded down to whole nanoamperes.
//
// Timing: the code is registered on the rising clk edge; the currents follow
// that register without delay.
module current_steering_dac #(
  parameter int unsigned N_BITS       = 12,
  parameter int unsigned N_UNARY_BITS = 6,
  parameter int unsigned IFS_NA       = 5_000_000
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N_BITS-1:0] code,
  output logic [31:0]       iout_na,
  output logic [31:0]       ioutb_na
);

  localparam int unsigned N_BIN   = N_BITS - N_UNARY_BITS;
  localparam int unsigned N_UNARY = 2**N_UNARY_BITS - 1;

  logic [N_BITS-1:0]       code_q;
  logic [N_UNARY-1:0]      therm;   // unary switch controls
  logic [N_BIN-1:0]        bin;     // binary switch controls
  logic [N_BITS-1:0]       units;   // unit currents steered to IOUT

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) code_q <= '0;
    else        code_q <= code;
  end

  // binary-to-thermometer decoder of the upper bits
  always_comb begin
    for (int k = 0; k < N_UNARY; k++)
      therm[k] = (code_q[N_BITS-1 -: N_UNARY_BITS] > N_UNARY_BITS'(k));
    bin = code_q[N_BIN-1:0];
  end

  // current summation at the output node
  always_comb begin
    units = '0;
    for (int k = 0; k < N_UNARY; k++)
      if (therm[k]) units = units + N_BITS'(2**N_BIN);
    units = units + N_BITS'(bin);
  end

  always_comb begin
    iout_na  = 32'((64'(units) * 64'(IFS_NA)) / 64'(2**N_BITS - 1));
    ioutb_na = IFS_NA - iout_na;
  end

endmodule
