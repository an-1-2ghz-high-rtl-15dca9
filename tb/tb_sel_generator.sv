// tb_sel_generator: checks that SEL counts 0..3 and realigns to the tick.
//
// sync pulses every fourth cycle, with the phase of the pulse train moved a
// few times. After a cycle with sync high SEL must be 0, otherwise it must be
// the previous SEL plus one modulo 4.
module tb_sel_generator;
  import ddfs_pkg::*;
  logic             clk_sync = 1'b0;
  logic             rst_n;
  logic             sync;
  logic [SEL_W-1:0] sel;
  logic [SEL_W-1:0] exp_sel;
  int checks = 0, failures = 0, realigns = 0;

  sel_generator dut (.clk_sync(clk_sync), .rst_n(rst_n), .sync(sync), .sel(sel));

  always #5 clk_sync = ~clk_sync;

  initial begin
    repeat (20000) @(posedge clk_sync);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int phase_off;
    rst_n = 1'b0; sync = 1'b0; exp_sel = '0; phase_off = 3;
    repeat (3) @(posedge clk_sync);
    @(negedge clk_sync) rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      if (t % 500 == 499) phase_off = $urandom_range(0, 3);
      sync = ((t % 4) == phase_off);
      if (sync && exp_sel != SEL_W'(N_ROM-1)) realigns++;
      exp_sel = sync ? '0 : exp_sel + SEL_W'(1);
      @(posedge clk_sync);
      #1;
      checks++;
      if (sel !== exp_sel) begin
        failures++;
        if (failures < 10) $display("t=%0d sel=%0d expected=%0d", t, sel, exp_sel);
      end
      @(negedge clk_sync);
    end
    $display("realignments=%0d", realigns);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
