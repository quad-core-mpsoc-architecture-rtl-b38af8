// sample_reg_tb: the error-sample register must change only on a latch
// request and then hold exactly the input value of that cycle.
module sample_reg_tb;
  logic clk = 1'b0, rst, latch;
  logic [31:0] e_in, e_q, held;
  int checks = 0, failures = 0, nlatch = 0;

  sample_reg dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    rst = 1'b1; latch = 1'b0; e_in = 32'hDEAD_BEEF; held = '0;
    @(posedge clk); @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    checks++;
    if (e_q !== 32'd0) begin failures++; $display("FAIL not reset"); end
    for (int i = 0; i < 1000; i++) begin
      logic l;
      logic [31:0] v;
      l = ($urandom_range(0, 3) == 0);
      v = $urandom;
      latch <= l;
      e_in  <= v;
      @(posedge clk);
      if (l) begin held = v; nlatch++; end
      #1;
      checks++;
      if (e_q !== held) begin
        failures++;
        if (failures < 10) $display("FAIL e_q %h expected %h", e_q, held);
      end
    end
    checks++;
    if (nlatch == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
