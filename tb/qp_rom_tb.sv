// qp_rom_tb: checks the shared program ROM. The default program image is read
// into a local table; all four ports fetch random addresses every cycle and
// each must return the word at the address it presented one cycle earlier.
module qp_rom_tb;
  logic clk, clk2x, rst;
  logic [9:0]  addr  [4];
  logic [17:0] instr [4];
  int checks = 0, failures = 0, nonzero = 0;

  qp_rom dut (.*);

  initial begin
    clk = 1'b0; clk2x = 1'b0;
    forever begin
      clk = 1'b1; clk2x = 1'b1; #5;
      clk2x = 1'b0; #5;
      clk = 1'b0; clk2x = 1'b1; #5;
      clk2x = 1'b0; #5;
    end
  end

  logic [17:0] image [1024];
  logic [9:0]  prev [4];

  initial begin
    for (int i = 0; i < 1024; i++) image[i] = '0;
    $readmemh("rtl/pdpid_app.hex", image);
    for (int p = 0; p < 4; p++) begin addr[p] = '0; prev[p] = '0; end
    rst = 1'b1;
    repeat (3) @(posedge clk);
    rst = 1'b0;
  end

  int cyc = 0;
  always @(posedge clk) begin
    if (!rst) begin
      cyc <= cyc + 1;
      for (int p = 0; p < 4; p++) begin
        if (cyc >= 2) begin
          checks++;
          if (instr[p] != 18'd0) nonzero++;
          if (instr[p] !== image[prev[p]]) begin
            failures++;
            if (failures < 10) $display("FAIL port %0d addr %0d: %h expected %h", p, prev[p], instr[p], image[prev[p]]);
          end
        end
        prev[p] = addr[p];
        addr[p] <= 10'($urandom_range(0, 200));
      end
    end
  end

  initial begin
    repeat (3000) @(posedge clk);
    checks++;
    if (nonzero < 1000) begin failures++; $display("FAIL program image looks empty"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
