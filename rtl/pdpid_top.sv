// pdpid_top: parallel digital PID (PDPID) controller.
//
// The quad-core MPSoC with its surroundings: the error signal E enters
// through the sample register R, which only the master core opens, and the
// held sample goes to all four cores; the control command U leaves from the
// master core's OUT port, with u_valid for one cycle per new value. E and U
// are IEEE binary32 values. The program the cores run is the shared ROM
// image ROM_FILE (by default the software-pipelined parallel PID
// application). The four PicoBlaze cores connect through the pb_* ports
// (one bus per core), and clk2x, the doubled clock of the shared memories,
// comes from outside (a clock manager on an FPGA). Reset is synchronous and
// active high.
module pdpid_top
  import pdpid_pkg::*;
#(
  parameter string ROM_FILE = "rtl/pdpid_app.hex"
) (
  input  logic               clk,
  input  logic               clk2x,
  input  logic               rst,
  input  logic [FP_W-1:0]    e_in,
  output logic [FP_W-1:0]    u_out,
  output logic               u_valid,
  output logic               e_latch,
  output logic [NCORES-1:0]  start,
  output logic [NCORES-1:0]  ready,
  input  logic [IADDR_W-1:0] pb_address      [NCORES],
  output logic [INSTR_W-1:0] pb_instruction  [NCORES],
  input  byte_t              pb_port_id      [NCORES],
  input  byte_t              pb_out_port     [NCORES],
  input  logic               pb_write_strobe [NCORES],
  input  logic               pb_read_strobe  [NCORES],
  output byte_t              pb_in_port      [NCORES]
);

  logic [FP_W-1:0] e_q;

  sample_reg #(.W(FP_W)) u_r (
    .clk, .rst,
    .e_in,
    .latch(e_latch),
    .e_q
  );

  mpsoc #(.ROM_FILE(ROM_FILE)) u_mpsoc (
    .clk, .clk2x, .rst,
    .pb_address, .pb_instruction, .pb_port_id, .pb_out_port,
    .pb_write_strobe, .pb_read_strobe, .pb_in_port,
    .e_sample(e_q),
    .e_latch,
    .u_out, .u_valid,
    .start, .ready
  );

endmodule
