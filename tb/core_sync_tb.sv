// core_sync_tb: random START/READY traffic that obeys the protocol (START
// only to a core whose previous START was taken) checked against a reference
// of the flag rules: START sets a core's START flag and clears its READY flag,
// start_clr clears START, ready_set sets READY.
module core_sync_tb;
  logic clk = 1'b0, rst;
  logic [3:0] start_set, start_clr, ready_set, start, ready;
  logic [3:0] rs, rr;
  int checks = 0, failures = 0;

  core_sync dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    rst = 1'b1; start_set = '0; start_clr = '0; ready_set = '0; rs = '0; rr = '0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    for (int i = 0; i < 5000; i++) begin
      logic [3:0] ss, sc, ry;
      ss = 4'($urandom) & ~rs & {4{$urandom_range(0, 3) == 0}};
      sc = 4'($urandom) & {4{$urandom_range(0, 1) == 0}};
      ry = 4'($urandom) & {4{$urandom_range(0, 1) == 0}};
      start_set <= ss; start_clr <= sc; ready_set <= ry;
      @(posedge clk);
      for (int s = 0; s < 4; s++) begin
        if (ss[s]) begin rs[s] = 1'b1; rr[s] = 1'b0; end
        else begin
          if (sc[s]) rs[s] = 1'b0;
          if (ry[s]) rr[s] = 1'b1;
        end
      end
      #1;
      checks++;
      if (start !== rs || ready !== rr) begin
        failures++;
        if (failures < 10) $display("FAIL start %b/%b ready %b/%b", start, rs, ready, rr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
