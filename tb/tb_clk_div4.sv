// tb_clk_div4: checks the divide-by-four tick and data-ready clock.
//
// After reset the tick must be high in cycles 3, 7, 11, ... (counting from 0)
// and nowhere else, and clk_dr must be low for two cycles and high for two,
// rising two cycles before each tick ends.
module tb_clk_div4;
  logic clk_sync = 1'b0;
  logic rst_n;
  logic clk_dr;
  logic tick;
  int checks = 0, failures = 0, ticks = 0;

  clk_div4 dut (.clk_sync(clk_sync), .rst_n(rst_n), .clk_dr(clk_dr), .tick(tick));

  always #5 clk_sync = ~clk_sync;

  initial begin
    repeat (20000) @(posedge clk_sync);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    repeat (3) @(posedge clk_sync);
    @(negedge clk_sync) rst_n = 1'b1;
    for (int c = 0; c < 4000; c++) begin
      checks++;
      if (tick !== ((c % 4) == 3) || clk_dr !== ((c % 4) >= 2)) begin
        failures++;
        if (failures < 10) $display("cycle %0d tick=%b clk_dr=%b", c, tick, clk_dr);
      end
      if (tick) ticks++;
      @(negedge clk_sync);
    end
    checks++;
    if (ticks != 1000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
