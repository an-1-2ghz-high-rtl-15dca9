// tb_mux_ddfs_top: end-to-end test of the multiplexed DDFS at its default
// sizes.
//
// The reference is an ideal single-rate DDFS: a 32-bit phase that grows by
// the current frequency word every sample, with a word change taking effect
// exactly LAT_WR samples after the tick that took it and without a phase
// jump. Every output sample must lie within 1.5 LSB of
// 2047.5 + 2047.5*sin(2*pi*(phi[31:16]+0.5)/2^16), and the DAC model's
// current must follow the code one cycle later. The run switches between a
// low word, the 19.95 MHz at 1.2 GHz tone of the measured spectrum, a word
// near the Nyquist limit and back, so that the accumulator wraps, carries
// cross from the truncated half into the phase, all quadrants, generator
// blocks and multiplexer positions are used, and frequency switching is
// exercised; each is counted and a mechanism never seen counts as a failure.
module tb_mux_ddfs_top;
  import ddfs_pkg::*;
  localparam real TOL    = 1.5;
  localparam int  LAT_WR = 38;   // cycles from the write tick to the first new increment
  localparam int  N_SEG  = 6;

  logic        clk_sync = 1'b0;
  logic        rst_n;
  logic [31:0] fcw;
  logic        fcw_wr;
  logic        clk_dr;
  amp_t        dac_code;
  logic [31:0] iout_na, ioutb_na;

  int checks = 0, failures = 0;
  int n_switch = 0, n_wrap = 0, n_carry = 0, n_dr_edges = 0;
  int quad_hits [4];
  int gen_hits  [N_GEN];
  int sel_hits  [N_ROM];
  real max_err = 0.0;

  mux_ddfs_top dut (.clk_sync(clk_sync), .rst_n(rst_n), .fcw(fcw), .fcw_wr(fcw_wr), .clk_dr(clk_dr),
                    .dac_code(dac_code), .iout_na(iout_na), .ioutb_na(ioutb_na));

  always #5 clk_sync = ~clk_sync;

  initial begin
    repeat (100000) @(posedge clk_sync);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real ideal(logic [15:0] p);
    return 2047.5 + 2047.5 * $sin(2.0 * 3.14159265358979323846 * (real'(p) + 0.5) / 65536.0);
  endfunction

  // words and the number of cycles each is held
  logic [31:0] words  [N_SEG] = '{32'h0001_2345, 32'd71403831, 32'h7A3C_5E11, 32'h2000_0001, 32'h0000_0000, 32'h0F0F_F0F1};
  int          cycles [N_SEG] = '{3000, 4000, 2000, 2000, 600, 2000};

  logic [31:0] phi;       // reference phase of the sample in dac_code
  logic [31:0] f_now;     // reference increment per sample
  logic [31:0] f_pend [$];
  int          due    [$];
  int          c;         // clock edges since reset release
  amp_t        code_prev;
  logic        dr_prev;

  // reference model and checks, one step per clock edge
  always @(posedge clk_sync) begin
    if (rst_n) begin
      logic [32:0] s;
      logic [3:0]  alpha;
      c++;
      #1;
      if (due.size() != 0 && c == due[0]) begin
        f_now = f_pend.pop_front();
        void'(due.pop_front());
        n_switch++;
      end
      s = {1'b0, phi} + {1'b0, f_now};
      if (c > 1) begin
        if (s[32]) n_wrap++;
        if (17'(phi[15:0]) + 17'(f_now[15:0]) > 17'hFFFF) n_carry++;
        phi = s[31:0];
      end
      if (c >= 64) begin
        real e;
        e = real'(dac_code) - ideal(phi[31:16]);
        if (e < 0.0) e = -e;
        if (e > max_err) max_err = e;
        checks++;
        if (e > TOL) begin
          failures++;
          if (failures < 10) $display("cycle %0d: code=%0d ideal=%f (phase %h)", c, dac_code, ideal(phi[31:16]), phi[31:16]);
        end
        if (f_now != 0) begin
          quad_hits[phi[31:30]]++;
          alpha = phi[30] ? ~phi[29:26] : phi[29:26];
          gen_hits[alpha[3:1]]++;
          sel_hits[c % 4]++;
        end
        checks++;
        if (iout_na !== 32'((longint'(code_prev) * 64'd5000000) / 64'd4095)) begin
          failures++;
          if (failures < 10) $display("cycle %0d: iout_na=%0d for code %0d", c, iout_na, code_prev);
        end
      end
      if (clk_dr && !dr_prev) n_dr_edges++;
      dr_prev   = clk_dr;
      code_prev = dac_code;
    end
  end

  initial begin
    rst_n = 1'b0; fcw = '0; fcw_wr = 1'b0; phi = '0; f_now = '0; c = 0; code_prev = '0; dr_prev = 1'b0;
    repeat (3) @(posedge clk_sync);
    @(negedge clk_sync) rst_n = 1'b1;
    repeat (80) @(negedge clk_sync);
    for (int s = 0; s < N_SEG; s++) begin
      // align to the cycle in which the divider tick is high (count 3 of 4)
      while ((c % 4) != 3) @(negedge clk_sync);
      fcw    = words[s];
      fcw_wr = 1'b1;
      f_pend.push_back(words[s]);
      due.push_back(c + 1 + LAT_WR);
      @(negedge clk_sync);
      fcw_wr = 1'b0;
      fcw    = 32'hDEAD_BEEF;   // must not be taken without a tick
      repeat (cycles[s]) @(negedge clk_sync);
    end
    repeat (100) @(negedge clk_sync);
    checks++;
    if (n_switch != N_SEG) begin failures++; $display("only %0d word changes took effect", n_switch); end
    checks++;
    if (n_wrap == 0 || n_carry == 0 || n_dr_edges == 0) begin
      failures++;
      $display("wraps=%0d carries=%0d data-ready edges=%0d", n_wrap, n_carry, n_dr_edges);
    end
    for (int q = 0; q < 4; q++) begin checks++; if (quad_hits[q] == 0) failures++; end
    for (int g = 0; g < N_GEN; g++) begin checks++; if (gen_hits[g] == 0) failures++; end
    for (int j = 0; j < N_ROM; j++) begin checks++; if (sel_hits[j] == 0) failures++; end
    $display("word changes=%0d accumulator wraps=%0d carries into phase=%0d data-ready clocks=%0d",
             n_switch, n_wrap, n_carry, n_dr_edges);
    $display("quadrants %0d/%0d/%0d/%0d, max |error| %f LSB", quad_hits[0], quad_hits[1], quad_hits[2], quad_hits[3], max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
