// ddfs_pkg: widths shared by the blocks of the 4:1 multiplexed DDFS.
//
// The accumulator is 32 bits wide, built as four 8-bit pipelined stages, and
// hands its upper 16 bits on as the phase. The phase-to-amplitude converters
// split the 16-bit phase into 2 quadrant bits and a 14-bit quarter phase made
// of alpha (4), beta (6) and gamma (4) bits, and produce 12-bit samples. Four
// converters feed a 4:1 multiplexer, so the datapath runs at a quarter of the
// sample clock. All of these numbers follow the paper; the amplitude
// scaling constant and the stage counts of the local pipelines are this
// design's own choices.
package ddfs_pkg;

  parameter int unsigned ACC_W    = 32; // accumulator width (4 stages x 8 bits)
  parameter int unsigned STAGE_W  = 8;  // width of one accumulator stage
  parameter int unsigned N_STAGE  = ACC_W / STAGE_W;
  parameter int unsigned PHASE_W  = 16; // truncated phase
  parameter int unsigned AMP_W    = 12; // sample width
  parameter int unsigned ALPHA_W  = 4;
  parameter int unsigned BETA_W   = 6;
  parameter int unsigned GAMMA_W  = 4;
  parameter int unsigned QPH_W    = ALPHA_W + BETA_W + GAMMA_W; // 14-bit quarter phase
  parameter int unsigned MAG_W    = AMP_W - 1;                  // magnitude of one half wave
  parameter int unsigned N_ROM    = 4;  // quartet: four converters per sample group
  parameter int unsigned N_GEN    = 8;  // generator blocks inside one converter
  parameter int unsigned SEL_W    = $clog2(N_ROM);

  typedef logic [PHASE_W-1:0] phase_t;
  typedef logic [AMP_W-1:0]   amp_t;

  // Amplitude scale: a code of 2047.5 +/- AMP_SCALE*sin() spans 0..4095.
  parameter real AMP_SCALE = 2047.5;
  parameter real PI        = 3.14159265358979323846;

  // Angle (radians) of quarter-phase index x, including the half-LSB offset
  // that makes one's complement folding an exact mirror: theta = (x+0.5)*pi/2^15.
  function automatic real qangle(real x);
    return (x + 0.5) * PI / real'(1 << (QPH_W + 1));
  endfunction

endpackage
