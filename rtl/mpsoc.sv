// mpsoc: the inner quad-core MPSoC.
//
// Four enhanced PicoBlaze cores share one quad-port program ROM (each core
// fetches through its own port) and one quad-port data RAM (each core has its
// own port, reached through its output decoder and input mux). Core i is
// wired to the constant hardware identifier i: core 0 carries the master ID
// and cores 1..3 slave IDs, and the shared program branches on the ID it
// reads. The START/READY flags of core_sync link the cores; only core 0's
// START requests reach it. Only core 0's OUT port (U) and its E-latch request
// leave the MPSoC: the master alone delivers control outputs and admits new
// error samples, while E(k) is distributed to all four cores.
// The PicoBlaze cores themselves are outside this module: for each core the
// instruction fetch (pb_address -> pb_instruction, one cycle) and the I/O bus
// are ports. clk2x must be phase aligned with clk at twice its frequency; it
// clocks the two quad-port memories.
module mpsoc
  import pdpid_pkg::*;
#(
  parameter string       ROM_FILE  = "rtl/pdpid_app.hex",
  parameter int unsigned RAM_DEPTH = 2048,
  parameter int unsigned ROM_DEPTH = 1024
) (
  input  logic              clk,
  input  logic              clk2x,
  input  logic              rst,
  // PicoBlaze buses, one per core
  input  logic [IADDR_W-1:0] pb_address      [NCORES],
  output logic [INSTR_W-1:0] pb_instruction  [NCORES],
  input  byte_t              pb_port_id      [NCORES],
  input  byte_t              pb_out_port     [NCORES],
  input  logic               pb_write_strobe [NCORES],
  input  logic               pb_read_strobe  [NCORES],
  output byte_t              pb_in_port      [NCORES],
  // error sample (after R) and master's control output
  input  logic [FP_W-1:0]    e_sample,
  output logic               e_latch,
  output logic [FP_W-1:0]    u_out,
  output logic               u_valid,
  // synchronisation flags, for observation
  output logic [NCORES-1:0]  start,
  output logic [NCORES-1:0]  ready
);

  localparam int unsigned RAM_AW = $clog2(RAM_DEPTH);
  localparam int unsigned ROM_AW = $clog2(ROM_DEPTH);

  logic [RAM_AW-1:0] ram_addr  [NCORES];
  logic              ram_we    [NCORES];
  byte_t             ram_wdata [NCORES];
  byte_t             ram_rdata [NCORES];
  logic [ROM_AW-1:0] rom_addr  [NCORES];

  logic [NCORES-1:0] ready_set, start_clr;
  logic [NCORES-1:0] start_set [NCORES];
  logic              e_latch_c [NCORES];
  logic [FP_W-1:0]   u_out_c   [NCORES];
  logic              u_valid_c [NCORES];

  for (genvar c = 0; c < int'(NCORES); c++) begin : g_core
    epm #(.RAM_AW(RAM_AW)) u_epm (
      .clk, .rst,
      .hwid        (hwid_t'(c)),
      .port_id     (pb_port_id[c]),
      .out_port    (pb_out_port[c]),
      .write_strobe(pb_write_strobe[c]),
      .read_strobe (pb_read_strobe[c]),
      .in_port     (pb_in_port[c]),
      .ram_addr    (ram_addr[c]),
      .ram_we      (ram_we[c]),
      .ram_wdata   (ram_wdata[c]),
      .ram_rdata   (ram_rdata[c]),
      .ready_set   (ready_set[c]),
      .start_clr   (start_clr[c]),
      .start_set   (start_set[c]),
      .own_start   (start[c]),
      .ready       (ready),
      .e_sample    (e_sample),
      .e_latch     (e_latch_c[c]),
      .u_out       (u_out_c[c]),
      .u_valid     (u_valid_c[c])
    );
    assign rom_addr[c] = ROM_AW'(pb_address[c]);
  end

  core_sync u_sync (
    .clk, .rst,
    .start_set(start_set[0]),
    .start_clr,
    .ready_set,
    .start,
    .ready
  );

  // only the master core drives the system outputs
  assign e_latch = e_latch_c[0];
  assign u_out   = u_out_c[0];
  assign u_valid = u_valid_c[0];

  qp_ram #(.WIDTH(8), .DEPTH(RAM_DEPTH)) u_qp_ram (
    .clk, .clk2x, .rst,
    .addr (ram_addr),
    .we   (ram_we),
    .wdata(ram_wdata),
    .rdata(ram_rdata)
  );

  qp_rom #(.DEPTH(ROM_DEPTH), .INIT_FILE(ROM_FILE)) u_qp_rom (
    .clk, .clk2x, .rst,
    .addr (rom_addr),
    .instr(pb_instruction)
  );

endmodule
