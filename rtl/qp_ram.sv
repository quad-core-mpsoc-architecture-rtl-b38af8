// qp_ram: quad-port memory made from one dual-port block RAM run at twice the
// system clock.
//
// clk2x is phase aligned with clk and twice its frequency, so every system
// cycle holds two memory cycles. Dual-port side A serves core ports 0 and 1,
// side B serves ports 2 and 3: ports 0/2 are served at the clk2x edge in
// the middle of a system cycle, ports 1/3 at the clk2x edge that coincides
// with the clk edge. A toggle flip-flop in the clk domain, copied into the
// clk2x domain, tells the two edges apart. Data read for ports 0/2 are
// captured at the next clk edge, data for ports 1/3 at the next mid-cycle
// clk2x edge, so each of the four ports behaves, seen from the clk domain,
// like a synchronous single-port RAM: an address (and write) presented in
// one system cycle is performed once, and its read data is there for the
// consumer to sample at the end of the following cycle. A write enable
// held for one system cycle writes exactly once. Read data reflect the
// memory before that cycle's writes by the same port; the order among
// ports is 0/2 then 1/3, and port 2/3 wins over 0/1 on the same edge.
// The document bases the memory on the vendor's method of building
// quad-port memories from dual-port ones (one block RAM, Table I, so 16 Kbit
// of data: 2048 x 8); the edge assignment and the capture registers are this
// design's own. Used for data exchange (this module) and, read-only, as the
// program ROM (qp_rom).
module qp_ram #(
  parameter int unsigned WIDTH     = 8,
  parameter int unsigned DEPTH     = 2048,
  parameter string       INIT_FILE = "",
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             clk2x,
  input  logic             rst,
  input  logic [AW-1:0]    addr  [4],
  input  logic             we    [4],
  input  logic [WIDTH-1:0] wdata [4],
  output logic [WIDTH-1:0] rdata [4]
);

  logic tgl, tgl_2x;      // toggles every clk edge / copy in clk2x domain
  logic second;           // clk2x edge coinciding with the clk edge

  always_ff @(posedge clk) begin
    if (rst) tgl <= 1'b0;
    else     tgl <= ~tgl;
  end

  always_ff @(posedge clk2x) tgl_2x <= tgl;

  assign second = (tgl == tgl_2x);

  logic [AW-1:0]    addr_a, addr_b;
  logic             we_a, we_b;
  logic [WIDTH-1:0] din_a, din_b, dout_a, dout_b;

  always_comb begin
    addr_a = second ? addr[1]  : addr[0];
    we_a   = second ? we[1]    : we[0];
    din_a  = second ? wdata[1] : wdata[0];
    addr_b = second ? addr[3]  : addr[2];
    we_b   = second ? we[3]    : we[2];
    din_b  = second ? wdata[3] : wdata[2];
  end

  dp_bram #(.WIDTH(WIDTH), .DEPTH(DEPTH), .INIT_FILE(INIT_FILE)) u_bram (
    .clk   (clk2x),
    .addr_a(addr_a), .we_a(we_a), .din_a(din_a), .dout_a(dout_a),
    .addr_b(addr_b), .we_b(we_b), .din_b(din_b), .dout_b(dout_b)
  );

  logic [WIDTH-1:0] q0, q1, q2, q3;

  // ports 0/2: read at the mid-cycle edge, captured at the clk edge
  always_ff @(posedge clk) begin
    q0 <= dout_a;
    q2 <= dout_b;
  end

  // ports 1/3: read at the clk-aligned edge, captured at the next mid-cycle edge
  always_ff @(posedge clk2x) begin
    if (!second) begin
      q1 <= dout_a;
      q3 <= dout_b;
    end
  end

  assign rdata[0] = q0;
  assign rdata[1] = q1;
  assign rdata[2] = q2;
  assign rdata[3] = q3;

endmodule
