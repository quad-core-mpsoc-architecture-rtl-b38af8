// qp_rom: the shared quad-port program ROM.
//
// One 1024 x 18 memory holds the single application that all four
// PicoBlaze cores execute; each core fetches through its own port with the
// timing of a synchronous block ROM (address in one cycle, instruction
// sampled at the end of the next). It is the quad-port memory of qp_ram
// with its write ports unused. The program is loaded from INIT_FILE, a hex
// file with one 18-bit instruction word per line. The document gives the
// sharing of one ROM by all cores; the size is the PicoBlaze's program space
// and the default program is the parallel PID application of this design.
module qp_rom #(
  parameter int unsigned DEPTH     = 1024,
  parameter string       INIT_FILE = "rtl/pdpid_app.hex",
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          clk2x,
  input  logic          rst,
  input  logic [AW-1:0] addr  [4],
  output logic [17:0]   instr [4]
);

  logic             we    [4];
  logic [17:0]      wdata [4];

  always_comb begin
    for (int p = 0; p < 4; p++) begin
      we[p]    = 1'b0;
      wdata[p] = '0;
    end
  end

  qp_ram #(.WIDTH(18), .DEPTH(DEPTH), .INIT_FILE(INIT_FILE)) u_mem (
    .clk, .clk2x, .rst,
    .addr, .we, .wdata,
    .rdata(instr)
  );

endmodule
