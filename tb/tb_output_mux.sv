// tb_output_mux: checks that dout is din[sel] of the previous cycle.
module tb_output_mux;
  import ddfs_pkg::*;
  logic             clk_sync = 1'b0;
  logic             rst_n;
  logic [SEL_W-1:0] sel;
  amp_t             din [N_ROM];
  amp_t             dout;
  amp_t             exp_q;
  int checks = 0, failures = 0;
  int sel_hits [N_ROM];

  output_mux dut (.clk_sync(clk_sync), .rst_n(rst_n), .sel(sel), .din(din), .dout(dout));

  always #5 clk_sync = ~clk_sync;

  initial begin
    repeat (20000) @(posedge clk_sync);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; sel = '0;
    for (int j = 0; j < N_ROM; j++) din[j] = '0;
    repeat (3) @(posedge clk_sync);
    @(negedge clk_sync) rst_n = 1'b1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk_sync);
      sel = SEL_W'($urandom_range(0, N_ROM-1));
      for (int j = 0; j < N_ROM; j++) din[j] = AMP_W'($urandom);
      exp_q = din[sel];
      sel_hits[sel]++;
      @(posedge clk_sync);
      #1;
      checks++;
      if (dout !== exp_q) begin
        failures++;
        if (failures < 10) $display("sel=%0d dout=%h expected=%h", sel, dout, exp_q);
      end
    end
    for (int j = 0; j < N_ROM; j++) begin
      checks++;
      if (sel_hits[j] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
