// tb_timing_control: checks the frequency-word register and its multiples.
//
// Random words are written on random ticks with a random enable. After each
// enabled edge acc_inc must be 4 x the last written word, and offset[j] must
// be the upper 16 bits of j x the word that was in the register ACC_LAT
// enabled edges earlier. Writes while en is low must be ignored.
module tb_timing_control;
  import ddfs_pkg::*;
  logic        clk_sync = 1'b0;
  logic        rst_n;
  logic        en;
  logic [31:0] fcw;
  logic        fcw_wr;
  logic [31:0] acc_inc;
  phase_t      offset [1:N_ROM-1];
  int checks = 0, failures = 0;
  int writes = 0, ignored = 0;

  timing_control dut (.clk_sync(clk_sync), .rst_n(rst_n), .en(en), .fcw(fcw), .fcw_wr(fcw_wr),
                      .acc_inc(acc_inc), .offset(offset));

  always #5 clk_sync = ~clk_sync;

  initial begin
    repeat (20000) @(posedge clk_sync);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] word_hist [$];   // register value after each enabled edge
  logic [31:0] word;

  initial begin
    rst_n = 1'b0; en = 1'b0; fcw = '0; fcw_wr = 1'b0; word = '0;
    word_hist.push_back(32'd0);
    repeat (3) @(posedge clk_sync);
    @(negedge clk_sync) rst_n = 1'b1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk_sync);
      en     = ($urandom_range(0, 2) != 0);
      fcw_wr = ($urandom_range(0, 4) == 0);
      fcw    = $urandom_range(0, 32'h8000_0000);   // valid range 0..2^31
      @(posedge clk_sync);
      if (en) begin
        if (fcw_wr) begin word = fcw; writes++; end
        word_hist.push_back(word);
      end else if (fcw_wr) ignored++;
      #1;
      begin
        int k;
        logic [31:0] wd, m;
        k  = word_hist.size() - 1;
        wd = (k >= 4) ? word_hist[k-4] : 32'd0;
        checks++;
        if (acc_inc !== (word << 2)) begin
          failures++;
          if (failures < 10) $display("acc_inc=%h expected=%h", acc_inc, word << 2);
        end
        for (int j = 1; j < N_ROM; j++) begin
          m = wd * j;
          checks++;
          if (offset[j] !== m[31:16]) begin
            failures++;
            if (failures < 10) $display("offset[%0d]=%h expected=%h", j, offset[j], m[31:16]);
          end
        end
      end
    end
    checks++;
    if (writes == 0 || ignored == 0) failures++;
    $display("writes=%0d writes ignored without tick=%0d", writes, ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
