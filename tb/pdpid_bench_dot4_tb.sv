// pdpid_bench_dot4_tb: product of two 4-D single-precision vectors,
// S = A0*B0 + A1*B1 + A2*B2 + A3*B3 (4 multiplies and 3 adds on the EPM FPUs).
// A sits in the QP-RAM at 0x40, B at 0x50 (four little-endian binary32 words
// each), preloaded through the memory array while reset is held; the products
// go to 0x60 + 4*i and S to 0x80. The single-core program lets core 0 form
// all four products on its own FPU; in the quad-core one core c forms
// product c and sets READY, and core 0 waits for the READY flags of cores
// 1-3 before it adds. Both sum in the order ((p0 + p1) + p2) + p3, so S is
// checked bit for bit against the reference arithmetic in that order, for
// eight random vector pairs. The cycles from reset to the final READY give
// the reduction ratio, which must be at least 40% (about 71% is reported for
// this benchmark on the original system, with compiled C programs).
module pdpid_bench_dot4_tb;
  import pdpid_pkg::*;
  import fp_ref_pkg::*;

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

  localparam string FILES [2] = '{"tb/bench_dot4_1core.hex", "tb/bench_dot4_4core.hex"};
  logic [NCORES-1:0] ready [2];
  logic [31:0]       vec_a [4], vec_b [4];
  logic [31:0]       sum   [2];
  logic              load;

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

    // backdoor access to the shared data memory of this controller
    always @(posedge load)
      for (int i = 0; i < 4; i++)
        for (int b = 0; b < 4; b++) begin
          u_dut.u_mpsoc.u_qp_ram.u_bram.mem[11'h40 + 4*i + b] = vec_a[i][8*b +: 8];
          u_dut.u_mpsoc.u_qp_ram.u_bram.mem[11'h50 + 4*i + b] = vec_b[i][8*b +: 8];
          u_dut.u_mpsoc.u_qp_ram.u_bram.mem[11'h80 + b]       = 8'h00;
        end
    always_comb
      for (int b = 0; b < 4; b++) sum[v][8*b +: 8] = u_dut.u_mpsoc.u_qp_ram.u_bram.mem[11'h80 + b];
  end

  // random normal operand of moderate size: |x| in [2^-8, 2^8)
  function automatic logic [31:0] rnd_float();
    return {1'($urandom), 8'(119 + $urandom_range(0, 15)), 23'($urandom)};
  endfunction

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int cyc [2];
    logic [31:0] p [4], s;
    rst  = 1'b1;
    load = 1'b0;
    for (int set = 0; set < 8; set++) begin
      rst = 1'b1;
      for (int i = 0; i < 4; i++) begin vec_a[i] = rnd_float(); vec_b[i] = rnd_float(); end
      for (int i = 0; i < 4; i++) p[i] = fp_ref(2'(FPU_MUL), vec_a[i], vec_b[i]);
      s = fp_ref(2'(FPU_ADD), fp_ref(2'(FPU_ADD), fp_ref(2'(FPU_ADD), p[0], p[1]), p[2]), p[3]);
      repeat (2) @(posedge clk);
      load = 1'b1;
      repeat (2) @(posedge clk);
      load = 1'b0;
      rst  = 1'b0;
      cyc  = '{0, 0};
      while (!(ready[0][0] && ready[1] == 4'hF)) begin
        @(posedge clk);
        if (!ready[0][0]) cyc[0]++;
        if (ready[1] != 4'hF) cyc[1]++;
      end
      #1;
      check(sum[0] == s, $sformatf("set %0d 1-core S %h, expected %h", set, sum[0], s));
      check(sum[1] == s, $sformatf("set %0d 4-core S %h, expected %h", set, sum[1], s));
      if (set == 0)
        $display("4-D vector product: 1 core %0d cycles, 4 cores %0d cycles, RR %0.1f%%",
                 cyc[0], cyc[1], 100.0 * (1.0 - real'(cyc[1]) / real'(cyc[0])));
      check(real'(cyc[1]) <= 0.6 * real'(cyc[0]), "quad-core reduction ratio of at least 40%");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
