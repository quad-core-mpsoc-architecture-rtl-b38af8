// pdpid_top_tb: end-to-end test of the PDPID controller at its default
// configuration (software-pipelined parallel PID program in the shared ROM).
// Four PicoBlaze models run the program; 16 random error samples go in and
// every control output U is checked bit-exactly against a reference PID.
// The test also requires each mechanism to occur: START/READY handshakes,
// FPU use by every core, simultaneous QP-RAM accesses, and outputs that
// overlap the slaves' work on the next sample. The steady-state loop time
// must not exceed the 316 cycles reported for the pipelined controller.
module pdpid_top_tb;
  import pdpid_pkg::*;

  logic               clk, clk2x, rst;
  logic [31:0]        e_in, u_out;
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

  pdpid_top dut (.*);

  pdpid_harness #(.N_SAMPLES(16), .PIPELINED(1'b1)) u_h (.*);

  initial begin
    repeat (40000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    #1;
    wait (done);
    if (loop_cycles == 0 || loop_cycles > 316) begin
      $display("FAIL loop time %0d cycles", loop_cycles);
      $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    end else begin
      $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures);
    end
    $finish;
  end
endmodule
