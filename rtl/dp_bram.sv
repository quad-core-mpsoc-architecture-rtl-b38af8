// dp_bram: true dual-port synchronous block RAM, the building block of the
// quad-port memories.
//
// Two independent ports A and B share one array and one clock. Each port
// reads synchronously (dout is registered, read-before-write on the same
// port) and writes when we is high. When both ports write one address in
// the same cycle, port B's data is kept. INIT_FILE, if not empty, names a
// hex file loaded into the array at start-up (otherwise it starts at zero).
module dp_bram #(
  parameter int unsigned WIDTH     = 8,
  parameter int unsigned DEPTH     = 2048,
  parameter string       INIT_FILE = ""
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] addr_a,
  input  logic                     we_a,
  input  logic [WIDTH-1:0]         din_a,
  output logic [WIDTH-1:0]         dout_a,
  input  logic [$clog2(DEPTH)-1:0] addr_b,
  input  logic                     we_b,
  input  logic [WIDTH-1:0]         din_b,
  output logic [WIDTH-1:0]         dout_b
);

  logic [WIDTH-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk) begin
    dout_a <= mem[addr_a];
    dout_b <= mem[addr_b];
    if (we_a) mem[addr_a] <= din_a;
    if (we_b) mem[addr_b] <= din_b;
  end

endmodule
