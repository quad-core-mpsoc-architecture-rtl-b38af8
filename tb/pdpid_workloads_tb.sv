// pdpid_workloads_tb: the three controller programs side by side on three
// copies of the controller: the sequential PID on one core (the other three
// idle), the parallel PID (master waits while the slaves compute) and the
// software-pipelined parallel PID (default). Each must deliver bit-exact
// outputs; the steady-state loop times must rank sequential > parallel >
// pipelined, and the pipelined loop must not exceed the 316 cycles reported
// for the pipelined controller. Loop times, reduction ratios against the
// sequential program and the speed-up per core S(4) = Ts / (4 Tm) are printed.
module pdpid_workloads_tb;
  import pdpid_pkg::*;

  localparam int NS = 12;
  localparam string FILES [3] = '{"tb/pdpid_app_seq.hex", "tb/pdpid_app_par.hex", "rtl/pdpid_app.hex"};
  localparam string NAMES [3] = '{"sequential", "parallel", "pipelined"};

  logic clk [3], clk2x [3], rst [3], done [3], u_valid [3], e_latch [3];
  logic [31:0] e_in [3], u_out [3];
  logic [NCORES-1:0] start [3], ready [3];
  int checks [3], failures [3], loop_cycles [3];

  for (genvar v = 0; v < 3; v++) begin : g_v
    logic [IADDR_W-1:0] pb_address      [NCORES];
    logic [INSTR_W-1:0] pb_instruction  [NCORES];
    byte_t              pb_port_id      [NCORES];
    byte_t              pb_out_port     [NCORES];
    logic               pb_write_strobe [NCORES];
    logic               pb_read_strobe  [NCORES];
    byte_t              pb_in_port      [NCORES];

    pdpid_top #(.ROM_FILE(FILES[v])) u_dut (
      .clk(clk[v]), .clk2x(clk2x[v]), .rst(rst[v]), .e_in(e_in[v]),
      .u_out(u_out[v]), .u_valid(u_valid[v]), .e_latch(e_latch[v]),
      .start(start[v]), .ready(ready[v]),
      .pb_address, .pb_instruction, .pb_port_id, .pb_out_port,
      .pb_write_strobe, .pb_read_strobe, .pb_in_port
    );

    pdpid_harness #(.N_SAMPLES(NS), .PIPELINED(v == 2), .SEQUENTIAL(v == 0)) u_h (
      .clk(clk[v]), .clk2x(clk2x[v]), .rst(rst[v]), .e_in(e_in[v]),
      .u_out(u_out[v]), .u_valid(u_valid[v]), .e_latch(e_latch[v]),
      .start(start[v]), .ready(ready[v]),
      .pb_address, .pb_instruction, .pb_port_id, .pb_out_port,
      .pb_write_strobe, .pb_read_strobe, .pb_in_port,
      .done(done[v]), .checks(checks[v]), .failures(failures[v]),
      .loop_cycles(loop_cycles[v])
    );
  end

  initial begin
    #2000000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1] + checks[2],
             failures[0] + failures[1] + failures[2] + 1);
    $finish;
  end

  initial begin
    int c, f;
    real ts;
    #1;
    wait (done[0] && done[1] && done[2]);
    c = checks[0] + checks[1] + checks[2] + 3;
    f = failures[0] + failures[1] + failures[2];
    ts = real'(loop_cycles[0]);
    for (int v = 0; v < 3; v++)
      $display("%-10s loop %4d cycles  RR %6.1f%%  S(4) %5.1f%%", NAMES[v], loop_cycles[v],
               100.0 * (real'(loop_cycles[v]) - ts) / ts, 100.0 * ts / (4.0 * real'(loop_cycles[v])));
    if (!(loop_cycles[0] > loop_cycles[1])) begin f++; $display("FAIL parallel not faster than sequential"); end
    if (!(loop_cycles[1] > loop_cycles[2])) begin f++; $display("FAIL pipelining gains nothing"); end
    if (loop_cycles[2] > 316) begin f++; $display("FAIL pipelined loop above 316 cycles"); end
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end
endmodule
