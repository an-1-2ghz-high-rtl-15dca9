// tb_pipelined_accumulator: checks the 4 x 8-bit carry-pipelined accumulator
// against a plain 32-bit running sum.
//
// Random increments (including all-ones slices that force carries through
// every stage) are presented with a random enable. After enabled edge k the
// 16-bit output must equal the upper half of the sum of the increments taken
// at enabled edges 1..k-4: this checks both the value and the 4-tick latency.
// The enable is also dropped for stretches to check that the pipeline holds.
module tb_pipelined_accumulator;
  logic        clk_sync = 1'b0;
  logic        rst_n;
  logic        en;
  logic [31:0] inc;
  logic [15:0] phase;
  int checks = 0, failures = 0;
  int carries = 0, wraps = 0;

  pipelined_accumulator dut (.clk_sync(clk_sync), .rst_n(rst_n), .en(en), .inc(inc), .phase(phase));

  always #5 clk_sync = ~clk_sync;

  initial begin
    repeat (20000) @(posedge clk_sync);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] hist [$];
  logic [31:0] acc;

  initial begin
    rst_n = 1'b0; en = 1'b0; inc = '0; acc = '0;
    hist.push_back(32'd0);
    repeat (3) @(posedge clk_sync);
    @(negedge clk_sync) rst_n = 1'b1;
    for (int t = 0; t < 6000; t++) begin
      @(negedge clk_sync);
      en = (t < 1000) ? 1'b1 : ($urandom_range(0, 3) != 0);
      case ($urandom_range(0, 5))
        0: inc = 32'h00FF_FFFF;
        1: inc = 32'hFFFF_FFFF;
        2: inc = {$urandom_range(0, 255), 24'h0} | 32'h00FF_FF00;
        default: inc = $urandom;
      endcase
      @(posedge clk_sync);
      if (en) begin
        logic [32:0] s;
        s = {1'b0, acc} + {1'b0, inc};
        if (s[32]) wraps++;
        if ((17'(acc[15:0]) + 17'(inc[15:0])) > 17'hFFFF) carries++;
        acc = s[31:0];
        hist.push_back(acc);
      end
      #1;
      begin
        int k;
        logic [31:0] exp_acc;
        k = hist.size() - 1;
        exp_acc = (k >= 4) ? hist[k-4] : 32'd0;
        checks++;
        if (phase !== exp_acc[31:16]) begin
          failures++;
          if (failures < 10) $display("mismatch k=%0d phase=%h expected=%h", k, phase, exp_acc[31:16]);
        end
      end
    end
    checks++;
    if (carries == 0 || wraps == 0) begin
      failures++;
      $display("carries=%0d wraps=%0d: a mechanism was not exercised", carries, wraps);
    end
    $display("carries into upper half=%0d wraps=%0d", carries, wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
