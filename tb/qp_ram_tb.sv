// qp_ram_tb: checks the quad-port RAM against a cycle-level reference.
// Every clk cycle all four ports get a random address (from a small range,
// so ports collide often), write enable and data. The reference serves, in
// each system cycle, ports 0 and 2 first (read, then write, 2 over 0) and
// then ports 1 and 3 (read, then write, 3 over 1). Read data presented in one
// cycle must be there at the end of the next, i.e. one-cycle latency as seen
// from the clk domain.
module qp_ram_tb;
  localparam int DEPTH = 2048;
  logic clk, clk2x, rst;
  logic [10:0] addr  [4];
  logic        we    [4];
  logic [7:0]  wdata [4];
  logic [7:0]  rdata [4];
  int checks = 0, failures = 0;

  qp_ram dut (.*);

  initial begin
    clk = 1'b0; clk2x = 1'b0;
    forever begin
      clk = 1'b1; clk2x = 1'b1; #5;
      clk2x = 1'b0; #5;
      clk = 1'b0; clk2x = 1'b1; #5;
      clk2x = 1'b0; #5;
    end
  end

  logic [7:0] ref_mem [DEPTH];
  logic [7:0] exp_d1 [4];   // read data due at the next clk edge
  int cyc = 0;

  initial begin
    for (int i = 0; i < DEPTH; i++) ref_mem[i] = 8'h00;
    for (int p = 0; p < 4; p++) begin addr[p] = '0; we[p] = 1'b0; wdata[p] = '0; end
    rst = 1'b1;
    repeat (3) @(posedge clk);
    rst = 1'b0;
  end

  always @(posedge clk) begin
    if (!rst) begin
      cyc <= cyc + 1;
      // data for the inputs of the cycle before last are due now
      if (cyc >= 2) begin
        for (int p = 0; p < 4; p++) begin
          checks++;
          if (rdata[p] !== exp_d1[p]) begin
            failures++;
            if (failures < 10) $display("FAIL port %0d read %h expected %h", p, rdata[p], exp_d1[p]);
          end
        end
      end
      // reference for the cycle that ends now
      exp_d1[0] = ref_mem[addr[0]];
      exp_d1[2] = ref_mem[addr[2]];
      if (we[0]) ref_mem[addr[0]] = wdata[0];
      if (we[2]) ref_mem[addr[2]] = wdata[2];
      exp_d1[1] = ref_mem[addr[1]];
      exp_d1[3] = ref_mem[addr[3]];
      if (we[1]) ref_mem[addr[1]] = wdata[1];
      if (we[3]) ref_mem[addr[3]] = wdata[3];
      // new random requests
      for (int p = 0; p < 4; p++) begin
        addr[p]  <= 11'($urandom_range(0, 15)) | (($urandom_range(0, 7) == 0) ? 11'h7F0 : 11'h000);
        we[p]    <= ($urandom_range(0, 2) == 0);
        wdata[p] <= 8'($urandom);
      end
    end
  end

  initial begin
    repeat (6000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
