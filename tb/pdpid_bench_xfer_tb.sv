// pdpid_bench_xfer_tb: RAM data-transfer benchmark, 16, 32 and 64 bytes.
// The block to move sits in the QP-RAM at 0x40 and its length at 0x3F
// (both preloaded through the memory array before reset is released); the
// program copies it to 0x80. One controller runs the single-core version
// (core 0 copies everything, the others idle), a second the quad-core
// version (core c copies bytes c, c+4, c+8, ... with c its HWID). A core that
// has finished sets its READY flag. For each size the copy is checked byte
// by byte, and the cycles from reset to the last READY give the reduction
// ratio of the quad-core run, which must be at least 60% (about 75% is
// reported for this benchmark on the original system).
module pdpid_bench_xfer_tb;
  import pdpid_pkg::*;

  logic clk, clk2x, rst;
  logic [31:0] e_in;
  int checks = 0, failures = 0;

  initial begin
    clk = 1'b0; clk2x = 1'b0;
    forever begin
      clk = 1'b1; clk2x = 1'b1; #5;
      clk2x = 1'b0; #5;
      clk = 1'b0; clk2x = 1'b1; #5;
      clk2x = 1'b0; #5;
    end
  end

  assign e_in = '0;

  localparam string FILES [2] = '{"tb/bench_xfer_1core.hex", "tb/bench_xfer_4core.hex"};
  logic [NCORES-1:0] ready [2];

  for (genvar v = 0; v < 2; v++) begin : g_v
    logic [IADDR_W-1:0] pb_address      [NCORES];
    logic [INSTR_W-1:0] pb_instruction  [NCORES];
    byte_t              pb_port_id      [NCORES];
    byte_t              pb_out_port     [NCORES];
    logic               pb_write_strobe [NCORES];
    logic               pb_read_strobe  [NCORES];
    byte_t              pb_in_port      [NCORES];
    logic [31:0]        u_out;
    logic               u_valid, e_latch;
    logic [NCORES-1:0]  start;

    pdpid_top #(.ROM_FILE(FILES[v])) u_dut (
      .clk, .clk2x, .rst, .e_in, .u_out, .u_valid, .e_latch, .start, .ready(ready[v]),
      .pb_address, .pb_instruction, .pb_port_id, .pb_out_port,
      .pb_write_strobe, .pb_read_strobe, .pb_in_port
    );

    for (genvar c = 0; c < int'(NCORES); c++) begin : g_cpu
      kcpsm3_model u_cpu (
        .clk, .reset(rst),
        .address(pb_address[c]), .instruction(pb_instruction[c]),
        .port_id(pb_port_id[c]), .write_strobe(pb_write_strobe[c]),
        .out_port(pb_out_port[c]), .read_strobe(pb_read_strobe[c]),
        .in_port(pb_in_port[c]), .interrupt(1'b0), .interrupt_ack()
      );
    end
  end

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int sizes [3] = '{16, 32, 64};
    int cyc [2];
    rst = 1'b1;
    foreach (sizes[i]) begin
      int n;
      logic [7:0] data [64];
      n = sizes[i];
      rst = 1'b1;
      for (int b = 0; b < 64; b++) data[b] = 8'($urandom);
      for (int b = 0; b < 64; b++) begin
        g_v[0].u_dut.u_mpsoc.u_qp_ram.u_bram.mem[11'h40 + b] = data[b];
        g_v[1].u_dut.u_mpsoc.u_qp_ram.u_bram.mem[11'h40 + b] = data[b];
        g_v[0].u_dut.u_mpsoc.u_qp_ram.u_bram.mem[11'h80 + b] = 8'h00;
        g_v[1].u_dut.u_mpsoc.u_qp_ram.u_bram.mem[11'h80 + b] = 8'h00;
      end
      g_v[0].u_dut.u_mpsoc.u_qp_ram.u_bram.mem[11'h3F] = 8'(n);
      g_v[1].u_dut.u_mpsoc.u_qp_ram.u_bram.mem[11'h3F] = 8'(n);
      repeat (4) @(posedge clk);
      rst = 1'b0;
      cyc = '{0, 0};
      while (!(ready[0][0] && ready[1] == 4'hF)) begin
        @(posedge clk);
        if (!ready[0][0]) cyc[0]++;
        if (ready[1] != 4'hF) cyc[1]++;
      end
      for (int b = 0; b < 64; b++) begin
        logic [7:0] e;
        e = (b < n) ? data[b] : 8'h00;
        check(g_v[0].u_dut.u_mpsoc.u_qp_ram.u_bram.mem[11'h80 + b] == e, $sformatf("1-core copy byte %0d", b));
        check(g_v[1].u_dut.u_mpsoc.u_qp_ram.u_bram.mem[11'h80 + b] == e, $sformatf("4-core copy byte %0d", b));
      end
      $display("%0d-byte transfer: 1 core %0d cycles, 4 cores %0d cycles, RR %0.1f%%", n, cyc[0], cyc[1],
               100.0 * (1.0 - real'(cyc[1]) / real'(cyc[0])));
      check(real'(cyc[1]) <= 0.4 * real'(cyc[0]), "quad-core reduction ratio of at least 60%");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
