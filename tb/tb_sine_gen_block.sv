// tb_sine_gen_block: checks one generator block (GEN = 5, alpha 10 and 11).
//
// Phases whose folded alpha falls in this block are loaded with load high;
// two enabled edges later amp must be within 1.5 LSB of
// 2047.5 + 2047.5*sin(2*pi*(p+0.5)/2^16). In between, other data is presented
// with load low and the output must keep the last loaded phase's amplitude
// (the input latch holds). All four quadrants are covered.
module tb_sine_gen_block;
  import ddfs_pkg::*;
  localparam int unsigned GEN = 5;
  localparam real TOL = 1.5;
  logic               clk_sync = 1'b0;
  logic               rst_n;
  logic               en;
  logic               load;
  logic               a_lsb;
  logic [BETA_W-1:0]  beta;
  logic [GAMMA_W-1:0] gamma;
  logic [1:0]         msb2;
  amp_t               amp;
  int checks = 0, failures = 0;
  int quad_hits [4];

  sine_gen_block #(.GEN(GEN)) dut (.clk_sync(clk_sync), .rst_n(rst_n), .en(en), .load(load),
    .a_lsb(a_lsb), .beta(beta), .gamma(gamma), .msb2(msb2), .amp(amp));

  always #5 clk_sync = ~clk_sync;

  initial begin
    repeat (50000) @(posedge clk_sync);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real ideal(phase_t p);
    return 2047.5 + 2047.5 * $sin(2.0 * 3.14159265358979323846 * (real'(p) + 0.5) / 65536.0);
  endfunction

  task automatic tick(input logic ld, input phase_t p);
    logic [3:0] alpha;
    @(negedge clk_sync);
    alpha = p[14] ? ~p[13:10] : p[13:10];
    en    = 1'b1;
    load  = ld;
    a_lsb = alpha[0];
    beta  = p[9:4];
    gamma = p[3:0];
    msb2  = p[15:14];
    @(posedge clk_sync);
  endtask

  function automatic phase_t in_block(int unsigned r);
    // random phase whose folded alpha[3:1] equals GEN
    phase_t p;
    logic [3:0] alpha;
    p = 16'(r);
    alpha = {3'(GEN), p[10]};
    p[13:10] = p[14] ? ~alpha : alpha;
    return p;
  endfunction

  initial begin
    rst_n = 1'b0; en = 1'b0; load = 1'b0; a_lsb = 1'b0; beta = '0; gamma = '0; msb2 = '0;
    repeat (3) @(posedge clk_sync);
    @(negedge clk_sync) rst_n = 1'b1;
    for (int n = 0; n < 4000; n++) begin
      phase_t p;
      real e;
      p = in_block($urandom);
      quad_hits[p[15:14]]++;
      tick(1'b1, p);
      tick(1'b0, 16'($urandom));
      tick(1'b0, 16'($urandom));
      #1;
      e = real'(amp) - ideal(p);
      checks++;
      if (e > TOL || e < -TOL) begin
        failures++;
        if (failures < 10) $display("phase %h: amp=%0d ideal=%f", p, amp, ideal(p));
      end
      // output holds while load stays low
      tick(1'b0, 16'($urandom));
      #1;
      checks++;
      if (real'(amp) - ideal(p) > TOL || real'(amp) - ideal(p) < -TOL) begin
        failures++;
        if (failures < 10) $display("phase %h: output did not hold", p);
      end
    end
    for (int q = 0; q < 4; q++) begin
      checks++;
      if (quad_hits[q] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
