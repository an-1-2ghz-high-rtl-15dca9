// tb_current_steering_dac: checks the DAC model over every code.
//
// Each code is applied for one cycle; after the clock edge the model must
// switch exactly code>>6 unary sources, and iout_na must be
// floor(code * 5 mA / 4095) in nanoamperes with iout_na + ioutb_na = 5 mA.
module tb_current_steering_dac;
  logic        clk = 1'b0;
  logic        rst_n;
  logic [11:0] code;
  logic [31:0] iout_na, ioutb_na;
  int checks = 0, failures = 0;

  current_steering_dac dut (.clk(clk), .rst_n(rst_n), .code(code), .iout_na(iout_na), .ioutb_na(ioutb_na));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; code = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int c = 0; c < 4096; c++) begin
      longint unsigned exp_i;
      @(negedge clk);
      code = 12'((c * 2731) % 4096);
      @(posedge clk);
      #1;
      exp_i = (longint'(code) * 64'd5000000) / 64'd4095;
      checks++;
      if (iout_na !== 32'(exp_i) || iout_na + ioutb_na !== 32'd5000000) begin
        failures++;
        if (failures < 10) $display("code %0d: iout=%0d ioutb=%0d expected %0d", code, iout_na, ioutb_na, exp_i);
      end
      checks++;
      if ($countones(dut.therm) != int'(code >> 6)) begin
        failures++;
        if (failures < 10) $display("code %0d: %0d unary sources on", code, $countones(dut.therm));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
