// mux_ddfs_top: 4:1 multiplexed direct digital frequency synthesizer with a
// quartet of phase-to-amplitude converters.
//
// A DDFS produces samples sin(2*pi*n*FTW/2^32) by accumulating the frequency
// word FTW every sample period. The slow parts (the wide accumulator and the
// sine tables) are here moved to a quarter of the sample rate: each slow
// tick the pipelined accumulator advances by 4*FTW, three adders derive the
// phases of samples 2 to 4 of the group (P+FTW, P+2*FTW, P+3*FTW), four
// converters turn the four phases into 12-bit amplitudes in parallel, and a
// 4:1 multiplexer clocked at the full rate sends the four samples to the DAC
// one after the other. The output frequency is FTW/2^32 * f_clk_sync.
//
// "The paper" in the comments of these files is Z. Hao, Z. Fang, L. Yuan,
// "An 1.2GHz High-performance MUX-DDFS Using Quartet ROMs", whose architecture
// this RTL follows. The block structure (accumulator of 4 x 8-bit pipelined
// stages with a 16-bit phase, three offset adders, four converters, 4:1 MUX, SEL generator,
// /4 divider, timing logic, 12-bit DAC) follows the paper. This design's
// own choices: one clock (clk_sync) with a 1-in-4 enable for the slow
// datapath, a write strobe for the frequency word, the alignment of the
// offsets to the accumulator latency that keeps the phase continuous when the
// word changes, and the pipeline depths. The I/O interface, bandgap and clock
// pads are outside this RTL; the DAC is a behavioural model.
//
// Interface and timing: fcw is taken when fcw_wr is high during a cycle in
// which the divider tick is high (hold fcw_wr for four cycles to be sure to
// hit one). dac_code is an offset-binary sample, new every clk_sync cycle,
// approximating 2047.5 + 2047.5*sin(2*pi*phi/2^16) with phi the upper 16 bits
// of the running phase plus half an LSB. The phase steps by the new word for
// the first time in the dac_code value that appears 38 clk_sync edges after
// the edge that took the word: 9 ticks (36 cycles) of offset delay, offset
// adders and converters, 1 cycle for the output register, and 1 sample
// because the new word first separates sample 1 of a group from sample 0.
// clk_dr is the data-ready clock
// f_clk_sync/4. iout_na/ioutb_na are the DAC model's output currents.
module mux_ddfs_top
  import ddfs_pkg::*;
(
  input  logic             clk_sync,
  input  logic             rst_n,
  input  logic [ACC_W-1:0] fcw,
  input  logic             fcw_wr,
  output logic             clk_dr,
  output amp_t             dac_code,
  output logic [31:0]      iout_na,
  output logic [31:0]      ioutb_na
);

  logic             tick;
  logic [SEL_W-1:0] sel;
  logic [ACC_W-1:0] acc_inc;
  phase_t           offset    [1:N_ROM-1];
  phase_t           acc_phase;
  phase_t           rom_phase [N_ROM];
  amp_t             rom_amp   [N_ROM];

  clk_div4 u_div (
    .clk_sync (clk_sync),
    .rst_n    (rst_n),
    .clk_dr   (clk_dr),
    .tick     (tick)
  );

  sel_generator u_selgen (
    .clk_sync (clk_sync),
    .rst_n    (rst_n),
    .sync     (tick),
    .sel      (sel)
  );

  timing_control #(.ACC_LAT(N_STAGE)) u_tctl (
    .clk_sync (clk_sync),
    .rst_n    (rst_n),
    .en       (tick),
    .fcw      (fcw),
    .fcw_wr   (fcw_wr),
    .acc_inc  (acc_inc),
    .offset   (offset)
  );

  pipelined_accumulator #(
    .N_STAGE    (N_STAGE),
    .STAGE_W    (STAGE_W),
    .OUT_STAGES (PHASE_W / STAGE_W)
  ) u_acc (
    .clk_sync (clk_sync),
    .rst_n    (rst_n),
    .en       (tick),
    .inc      (acc_inc),
    .phase    (acc_phase)
  );

  phase_offset_adders u_add (
    .clk_sync  (clk_sync),
    .rst_n     (rst_n),
    .en        (tick),
    .phase     (acc_phase),
    .offset    (offset),
    .rom_phase (rom_phase)
  );

  for (genvar j = 0; j < N_ROM; j++) begin : gen_rom
    quartet_rom u_rom (
      .clk_sync (clk_sync),
      .rst_n    (rst_n),
      .en       (tick),
      .phase    (rom_phase[j]),
      .amp      (rom_amp[j])
    );
  end

  // The multiplexer must be on its last input when the converters update,
  // so that SEL = 0 meets the first sample of the new group.
  a_sel_sync: assert property (@(posedge clk_sync)
    (rst_n && tick) |-> (sel == SEL_W'(N_ROM - 1)))
    else $error("SEL generator out of step with the divider");

  output_mux u_mux (
    .clk_sync (clk_sync),
    .rst_n    (rst_n),
    .sel      (sel),
    .din      (rom_amp),
    .dout     (dac_code)
  );

  current_steering_dac #(
    .N_BITS (AMP_W)
  ) u_dac (
    .clk      (clk_sync),
    .rst_n    (rst_n),
    .code     (dac_code),
    .iout_na  (iout_na),
    .ioutb_na (ioutb_na)
  );

endmodule
