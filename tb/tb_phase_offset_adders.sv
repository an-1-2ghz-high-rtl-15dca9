// tb_phase_offset_adders: checks the four registered sample phases.
//
// Random phases and offsets with a random enable: after an enabled edge
// rom_phase[0] is the phase and rom_phase[j] the phase plus offset[j] modulo
// 2^16, as presented before that edge; without the enable nothing changes.
module tb_phase_offset_adders;
  import ddfs_pkg::*;
  logic   clk_sync = 1'b0;
  logic   rst_n;
  logic   en;
  phase_t phase;
  phase_t offset    [1:N_ROM-1];
  phase_t rom_phase [N_ROM];
  phase_t expect_ph [N_ROM];
  int checks = 0, failures = 0, wraps = 0;

  phase_offset_adders dut (.clk_sync(clk_sync), .rst_n(rst_n), .en(en), .phase(phase),
                           .offset(offset), .rom_phase(rom_phase));

  always #5 clk_sync = ~clk_sync;

  initial begin
    repeat (20000) @(posedge clk_sync);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; en = 1'b0; phase = '0;
    for (int j = 1; j < N_ROM; j++) offset[j] = '0;
    for (int j = 0; j < N_ROM; j++) expect_ph[j] = '0;
    repeat (3) @(posedge clk_sync);
    @(negedge clk_sync) rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk_sync);
      en    = ($urandom_range(0, 3) != 0);
      phase = 16'($urandom);
      for (int j = 1; j < N_ROM; j++) offset[j] = 16'($urandom);
      if (en) begin
        expect_ph[0] = phase;
        for (int j = 1; j < N_ROM; j++) begin
          expect_ph[j] = phase + offset[j];
          if (17'(phase) + 17'(offset[j]) > 17'hFFFF) wraps++;
        end
      end
      @(posedge clk_sync);
      #1;
      for (int j = 0; j < N_ROM; j++) begin
        checks++;
        if (rom_phase[j] !== expect_ph[j]) begin
          failures++;
          if (failures < 10) $display("rom_phase[%0d]=%h expected=%h", j, rom_phase[j], expect_ph[j]);
        end
      end
    end
    checks++;
    if (wraps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
