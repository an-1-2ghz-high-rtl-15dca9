// tb_spectrum_fig4: spectrum of the synthesizer output for the measured case
// of a 19.95 MHz tone at a 1.2 GHz sample clock.
//
// The top runs at its default sizes with FTW = round(19.95/1200 * 2^32) =
// 71403831. After the pipeline has settled, 8192 consecutive samples of
// dac_code are taken, a 4-term Blackman-Harris window is applied and the
// power of every DFT bin up to Nyquist is computed. Checks:
//   - the largest bin is the carrier, at 19.95/1200*8192 = 136.2 bins;
//   - wideband SFDR (all bins up to 600 MHz) is at least 53 dBc, and
//     narrowband SFDR over 0..60 MHz at least 68 dBc: the values reported
//     for the fabricated chip, whose DAC can only add spurs to the digital
//     output checked here.
// Bins within 8 of DC and of the carrier belong to the window's main lobe and
// are not counted as spurs.
module tb_spectrum_fig4;
  import ddfs_pkg::*;
  localparam int  N    = 8192;
  localparam int  FTW  = 71403831;
  localparam real FCLK = 1200.0e6;

  logic        clk_sync = 1'b0;
  logic        rst_n;
  logic [31:0] fcw;
  logic        fcw_wr;
  logic        clk_dr;
  amp_t        dac_code;
  logic [31:0] iout_na, ioutb_na;
  int checks = 0, failures = 0;

  mux_ddfs_top dut (.clk_sync(clk_sync), .rst_n(rst_n), .fcw(fcw), .fcw_wr(fcw_wr), .clk_dr(clk_dr),
                    .dac_code(dac_code), .iout_na(iout_na), .ioutb_na(ioutb_na));

  always #5 clk_sync = ~clk_sync;

  initial begin
    repeat (N + 2000) @(posedge clk_sync);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real x   [N];
  real cs  [N];
  real sn  [N];
  real pwr [N/2];

  initial begin
    real two_pi, p_carrier, p_wide, p_narrow, sfdr_w, sfdr_n;
    int  k_peak, k_60;
    two_pi = 2.0 * 3.14159265358979323846;
    rst_n = 1'b0; fcw = FTW; fcw_wr = 1'b0;
    repeat (3) @(posedge clk_sync);
    @(negedge clk_sync) rst_n = 1'b1;
    fcw_wr = 1'b1;
    repeat (4) @(negedge clk_sync);
    fcw_wr = 1'b0;
    repeat (100) @(negedge clk_sync);
    for (int n = 0; n < N; n++) begin
      real w, t;
      @(negedge clk_sync);
      t = two_pi * real'(n) / real'(N);
      w = 0.35875 - 0.48829 * $cos(t) + 0.14128 * $cos(2.0 * t) - 0.01168 * $cos(3.0 * t);
      x[n]  = (real'(dac_code) - 2047.5) * w;
      cs[n] = $cos(t);
      sn[n] = $sin(t);
    end
    for (int k = 0; k < N/2; k++) begin
      real re, im;
      int  idx;
      re = 0.0; im = 0.0; idx = 0;
      for (int n = 0; n < N; n++) begin
        re += x[n] * cs[idx];
        im -= x[n] * sn[idx];
        idx = (idx + k) % N;
      end
      pwr[k] = re * re + im * im;
    end
    k_peak = 0;
    for (int k = 1; k < N/2; k++) if (pwr[k] > pwr[k_peak]) k_peak = k;
    p_carrier = 0.0;
    for (int k = k_peak - 4; k <= k_peak + 4; k++) p_carrier += pwr[k];
    k_60 = int'(60.0e6 / FCLK * real'(N));
    p_wide = 1.0e-30; p_narrow = 1.0e-30;
    for (int k = 9; k < N/2; k++) begin
      if (k >= k_peak - 8 && k <= k_peak + 8) continue;
      if (pwr[k] > p_wide) p_wide = pwr[k];
      if (k <= k_60 && pwr[k] > p_narrow) p_narrow = pwr[k];
    end
    sfdr_w = 10.0 * $log10(pwr[k_peak] / p_wide);
    sfdr_n = 10.0 * $log10(pwr[k_peak] / p_narrow);
    $display("carrier at bin %0d (%f MHz), wideband SFDR %f dBc, 0-60 MHz SFDR %f dBc",
             k_peak, real'(k_peak) * FCLK / real'(N) / 1.0e6, sfdr_w, sfdr_n);
    checks++;
    if (k_peak < 135 || k_peak > 137) failures++;
    checks++;
    if (sfdr_w < 53.0) failures++;
    checks++;
    if (sfdr_n < 68.0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
