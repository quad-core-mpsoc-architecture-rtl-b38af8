// mpsoc_tb: runs the inner quad-core MPSoC with the default (pipelined PID)
// program on four PicoBlaze models. The error-sample register in front of
// it is modelled here; the harness checks every U bit-exactly and that
// the START/READY handshakes, FPU use by every core, concurrent QP-RAM
// accesses and master/slave overlap all occur.
module mpsoc_tb;
  import pdpid_pkg::*;

  logic               clk, clk2x, rst;
  logic [31:0]        e_in, e_sample, u_out;
  logic               u_valid, e_latch;
  logic [NCORES-1:0]  start, ready;
  logic [IADDR_W-1:0] pb_address      [NCORES];
  logic [INSTR_W-1:0] pb_instruction  [NCORES];
  byte_t              pb_port_id      [NCORES];
  byte_t              pb_out_port     [NCORES];
  logic               pb_write_strobe [NCORES];
  logic               pb_read_strobe  [NCORES];
  byte_t              pb_in_port      [NCORES];
  logic               done;
  int                 checks, failures, loop_cycles;

  mpsoc dut (.*);

  always @(posedge clk) begin
    if (rst) e_sample <= '0;
    else if (e_latch) e_sample <= e_in;
  end

  pdpid_harness #(.N_SAMPLES(8), .PIPELINED(1'b1)) u_h (.*);

  initial begin
    repeat (30000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    #1;
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
