// epm_tb: exercises one enhanced PicoBlaze through its CPU bus the way a
// program does. FPU jobs (random add, sub, mul) are written as operand bytes
// and a command; the status port is polled every cycle and must show the
// result from the fifth clock edge after the command's edge on (the command
// edge and three more fill the four pipeline stages, the fifth loads the
// result register); the result bytes are compared with reference single
// precision. The HWID/START/READY status byte, the E(k) bytes, the QP-RAM
// read path and write strobe, the sync requests and the U port are checked.
module epm_tb;
  import pdpid_pkg::*;
  import fp_ref_pkg::*;
  logic clk = 1'b0, rst;
  hwid_t hwid;
  byte_t port_id, out_port, in_port, ram_wdata, ram_rdata;
  logic write_strobe, read_strobe, ram_we, ready_set, start_clr, own_start, e_latch, u_valid;
  logic [10:0] ram_addr;
  logic [3:0] start_set, ready;
  logic [31:0] e_sample, u_out;
  int checks = 0, failures = 0;

  epm dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 15) $display("FAIL %s", what); end
  endtask

  task automatic wr(input byte_t p, input byte_t d);
    @(negedge clk);
    port_id = p; out_port = d; write_strobe = 1'b1;
    @(negedge clk);
    write_strobe = 1'b0;
  endtask

  task automatic rd(input byte_t p, output byte_t d);
    @(negedge clk);
    port_id = p; read_strobe = 1'b1;
    #1 d = in_port;
    @(negedge clk);
    read_strobe = 1'b0;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    byte_t d;
    rst = 1'b1; hwid = 2'd2; port_id = '0; out_port = '0; write_strobe = 1'b0;
    read_strobe = 1'b0; own_start = 1'b1; ready = 4'b1010; e_sample = 32'hC1A2_B3C4;
    ram_rdata = 8'h5A;
    repeat (2) @(posedge clk);
    rst = 1'b0;
    rd(P_HWID_RDY, d);  chk(d == 8'hA6, $sformatf("status byte %h", d));
    rd(P_E0 + 8'd2, d); chk(d == 8'hA2, "E byte 2");
    rd(P_RAM_RD, d);    chk(d == 8'h5A, "RAM data");
    // RAM write request
    @(negedge clk);
    port_id = P_RAM_WD; out_port = 8'h77; write_strobe = 1'b1;
    #1 chk(ram_we && ram_wdata == 8'h77, "RAM write strobe");
    @(negedge clk);
    write_strobe = 1'b0;
    #1 chk(!ram_we, "RAM write lasts one cycle");
    // FPU jobs
    for (int j = 0; j < 300; j++) begin
      logic [31:0] a, b, r, e;
      logic [1:0] o;
      int lat;
      a = $urandom; a[30:23] = 8'(110 + $urandom_range(0, 30));
      b = $urandom; b[30:23] = 8'(110 + $urandom_range(0, 30));
      o = 2'($urandom_range(0, 2));
      for (int i = 0; i < 4; i++) wr(P_FPU_A0 + 8'(i), a[8*i +: 8]);
      for (int i = 0; i < 4; i++) wr(P_FPU_B0 + 8'(i), b[8*i +: 8]);
      @(negedge clk);
      port_id = P_FPU_OP; out_port = {6'd0, o}; write_strobe = 1'b1;
      @(negedge clk);
      write_strobe = 1'b0; port_id = P_FPU_ST;
      lat = 0;
      while (in_port[0] == 1'b0 && lat < 20) begin
        @(negedge clk);
        lat++;
      end
      chk(lat == 4, $sformatf("FPU done %0d cycles after the command cycle, expected 4", lat));
      for (int i = 0; i < 4; i++) begin rd(P_FPU_R0 + 8'(i), d); r[8*i +: 8] = d; end
      e = fp_ref(o, a, b);
      chk(r == e, $sformatf("FPU op %0d %h %h = %h expected %h", o, a, b, r, e));
    end
    // sync and output
    @(negedge clk);
    port_id = P_SYNC; out_port = 8'h01; write_strobe = 1'b1;
    #1 chk(ready_set && !start_clr, "READY request");
    @(negedge clk);
    port_id = P_START; out_port = 8'h0E;
    #1 chk(start_set == 4'hE, "START request");
    @(negedge clk);
    write_strobe = 1'b0;
    wr(P_U0, 8'h01); wr(P_U0 + 8'd1, 8'h02); wr(P_U0 + 8'd2, 8'h03); wr(P_U0 + 8'd3, 8'h04);
    chk(u_out == 32'h04030201, "U output");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
