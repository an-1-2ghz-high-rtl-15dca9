// tb_quartet_rom: checks one phase-to-amplitude converter over every phase.
//
// All 65536 phases are fed in a scrambled order, one per enabled edge, with
// the enable dropped now and then. Three enabled edges after a phase was
// taken, amp must lie within 1.5 LSB of 2047.5 + 2047.5*sin(2*pi*(p+0.5)/2^16),
// computed here with real arithmetic. The input-latch gating is checked on
// every edge: only the generator block selected by the folded alpha may load
// its latch. The largest error seen and the use of every block and quadrant
// are reported.
module tb_quartet_rom;
  import ddfs_pkg::*;
  localparam real TOL = 1.5;
  logic   clk_sync = 1'b0;
  logic   rst_n;
  logic   en;
  phase_t phase;
  amp_t   amp;
  int checks = 0, failures = 0;
  real max_err = 0.0;
  int gen_hits [N_GEN];
  int quad_hits [4];

  quartet_rom dut (.clk_sync(clk_sync), .rst_n(rst_n), .en(en), .phase(phase), .amp(amp));

  always #5 clk_sync = ~clk_sync;

  initial begin
    repeat (200000) @(posedge clk_sync);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real ideal(phase_t p);
    return 2047.5 + 2047.5 * $sin(2.0 * 3.14159265358979323846 * (real'(p) + 0.5) / 65536.0);
  endfunction

  // snapshot of every block's input latch, to check the gating
  logic [BETA_W+GAMMA_W+2:0] latch_before [N_GEN];
  logic [BETA_W+GAMMA_W+2:0] latch_after  [N_GEN];

  always_comb begin
    latch_after[0] = {dut.gen_blk[0].u_gen.a_q, dut.gen_blk[0].u_gen.beta_q, dut.gen_blk[0].u_gen.gamma_q, dut.gen_blk[0].u_gen.msb2_q};
    latch_after[1] = {dut.gen_blk[1].u_gen.a_q, dut.gen_blk[1].u_gen.beta_q, dut.gen_blk[1].u_gen.gamma_q, dut.gen_blk[1].u_gen.msb2_q};
    latch_after[2] = {dut.gen_blk[2].u_gen.a_q, dut.gen_blk[2].u_gen.beta_q, dut.gen_blk[2].u_gen.gamma_q, dut.gen_blk[2].u_gen.msb2_q};
    latch_after[3] = {dut.gen_blk[3].u_gen.a_q, dut.gen_blk[3].u_gen.beta_q, dut.gen_blk[3].u_gen.gamma_q, dut.gen_blk[3].u_gen.msb2_q};
    latch_after[4] = {dut.gen_blk[4].u_gen.a_q, dut.gen_blk[4].u_gen.beta_q, dut.gen_blk[4].u_gen.gamma_q, dut.gen_blk[4].u_gen.msb2_q};
    latch_after[5] = {dut.gen_blk[5].u_gen.a_q, dut.gen_blk[5].u_gen.beta_q, dut.gen_blk[5].u_gen.gamma_q, dut.gen_blk[5].u_gen.msb2_q};
    latch_after[6] = {dut.gen_blk[6].u_gen.a_q, dut.gen_blk[6].u_gen.beta_q, dut.gen_blk[6].u_gen.gamma_q, dut.gen_blk[6].u_gen.msb2_q};
    latch_after[7] = {dut.gen_blk[7].u_gen.a_q, dut.gen_blk[7].u_gen.beta_q, dut.gen_blk[7].u_gen.gamma_q, dut.gen_blk[7].u_gen.msb2_q};
  end

  phase_t taken [$];

  initial begin
    rst_n = 1'b0; en = 1'b0; phase = '0;
    repeat (3) @(posedge clk_sync);
    @(negedge clk_sync) rst_n = 1'b1;
    for (int t = 0; t < 65536 + 4; ) begin
      int unsigned sel_gen;
      logic [2:0]  a3;
      @(negedge clk_sync);
      en = ($urandom_range(0, 7) != 0);
      phase = 16'(t * 40503);          // odd multiplier: visits every phase once
      a3 = phase[14] ? ~phase[13:11] : phase[13:11];
      sel_gen = a3;
      latch_before = latch_after;
      @(posedge clk_sync);
      #1;
      if (en) begin
        if (t < 65536) begin
          gen_hits[sel_gen]++;
          quad_hits[phase[15:14]]++;
          // gating: the selected block holds the new fields, no other block moved
          for (int g = 0; g < N_GEN; g++) begin
            checks++;
            if (g == int'(sel_gen)) begin
              if (latch_after[g] !== {phase[10] ^ phase[14], phase[9:4], phase[3:0], phase[15:14]}) begin
                failures++;
                if (failures < 10) $display("block %0d did not latch phase %h", g, phase);
              end
            end else if (latch_after[g] !== latch_before[g]) begin
              failures++;
              if (failures < 10) $display("block %0d latch moved for phase %h", g, phase);
            end
          end
        end
        taken.push_back(phase);
        t++;
        if (taken.size() > 3) begin
          phase_t p;
          real e;
          p = taken.pop_front();
          e = real'(amp) - ideal(p);
          if (e < 0.0) e = -e;
          if (e > max_err) max_err = e;
          checks++;
          if (e > TOL) begin
            failures++;
            if (failures < 10) $display("phase %h: amp=%0d ideal=%f", p, amp, ideal(p));
          end
        end
      end
    end
    for (int g = 0; g < N_GEN; g++) begin
      checks++;
      if (gen_hits[g] == 0) failures++;
    end
    for (int q = 0; q < 4; q++) begin
      checks++;
      if (quad_hits[q] == 0) failures++;
    end
    $display("max |error| = %f LSB; block 0 used %0d times", max_err, gen_hits[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
