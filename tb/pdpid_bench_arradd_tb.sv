// pdpid_bench_arradd_tb: integer array-add benchmark, C[i] = A[i] + B[i]
// over 12 elements of 8 bits and of 16 bits (little-endian byte pairs).
// A sits in the QP-RAM at 0x40, B at 0x60, and the sums go to 0x80; the
// operands are preloaded through the memory array while reset is held.
// Four controllers run side by side: for each element width a single-core
// program (core 0 does all 12 elements, the others idle) and a quad-core one
// (core c does elements c, c+4 and c+8, with c its HWID). A core that has
// finished sets its READY flag. Each of three random data sets is checked
// element by element against sums worked out here, and the cycles from
// reset to the last READY give the reduction ratio of the quad-core run,
// which must be at least 60% (about 73-74% is reported for these two tests
// on the original system, whose programs were compiled from C).
module pdpid_bench_arradd_tb;
  import pdpid_pkg::*;

  localparam int NEL = 12;

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

  // run v: element width 8 << (v / 2) bits, 1 core for even v, 4 for odd v
  localparam string FILES [4] = '{"tb/bench_add8_1core.hex", "tb/bench_add8_4core.hex",
                                  "tb/bench_add16_1core.hex", "tb/bench_add16_4core.hex"};
  logic [NCORES-1:0] ready [4];
  byte_t             ram_a [4][NEL*2];
  byte_t             ram_b [4][NEL*2];
  byte_t             ram_c [4][NEL*2];
  logic              load;

  for (genvar v = 0; v < 4; v++) begin : g_v
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

    // backdoor access to the shared data memory of this controller
    always @(posedge load)
      for (int b = 0; b < NEL * 2; b++) begin
        u_dut.u_mpsoc.u_qp_ram.u_bram.mem[11'h40 + b] = ram_a[v][b];
        u_dut.u_mpsoc.u_qp_ram.u_bram.mem[11'h60 + b] = ram_b[v][b];
        u_dut.u_mpsoc.u_qp_ram.u_bram.mem[11'h80 + b] = 8'h00;
      end
    always_comb
      for (int b = 0; b < NEL * 2; b++) ram_c[v][b] = u_dut.u_mpsoc.u_qp_ram.u_bram.mem[11'h80 + b];
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
    int cyc [4];
    rst  = 1'b1;
    load = 1'b0;
    for (int set = 0; set < 3; set++) begin
      rst = 1'b1;
      for (int b = 0; b < NEL * 2; b++) begin
        byte_t a, bb;
        a  = 8'($urandom);
        bb = 8'($urandom);
        for (int v = 0; v < 4; v++) begin ram_a[v][b] = a; ram_b[v][b] = bb; end
      end
      repeat (2) @(posedge clk);
      load = 1'b1;
      repeat (2) @(posedge clk);
      load = 1'b0;
      rst  = 1'b0;
      cyc  = '{0, 0, 0, 0};
      while (!(ready[0][0] && ready[1] == 4'hF && ready[2][0] && ready[3] == 4'hF)) begin
        @(posedge clk);
        for (int v = 0; v < 4; v++)
          if (v % 2 == 0 ? !ready[v][0] : ready[v] != 4'hF) cyc[v]++;
      end
      #1;
      for (int v = 0; v < 4; v++)
        for (int i = 0; i < NEL; i++) begin
          if (v < 2) begin
            byte_t s;
            s = ram_a[v][i] + ram_b[v][i];
            check(ram_c[v][i] == s, $sformatf("set %0d run %0d 8-bit element %0d", set, v, i));
          end else begin
            logic [15:0] s;
            s = {ram_a[v][2*i+1], ram_a[v][2*i]} + {ram_b[v][2*i+1], ram_b[v][2*i]};
            check({ram_c[v][2*i+1], ram_c[v][2*i]} == s,
                  $sformatf("set %0d run %0d 16-bit element %0d", set, v, i));
          end
        end
      for (int w = 0; w < 2; w++) begin
        $display("%0d-bit array add: 1 core %0d cycles, 4 cores %0d cycles, RR %0.1f%%", 8 << w,
                 cyc[2*w], cyc[2*w+1], 100.0 * (1.0 - real'(cyc[2*w+1]) / real'(cyc[2*w])));
        check(real'(cyc[2*w+1]) <= 0.4 * real'(cyc[2*w]), "quad-core reduction ratio of at least 60%");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
