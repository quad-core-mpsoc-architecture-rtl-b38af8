// sample_reg: the error-sample register R in front of the cores.
//
// E(k) from the plant side enters through this register, and only the
// master core opens it: a one-cycle latch request loads the current input,
// which is then held and distributed to all four cores until the next
// request, so every slave works on the same sample whatever the input does
// meanwhile. The register resets to zero. The document places R between E
// and the cores and gives its job; the width (one 32-bit float) is assumed.
module sample_reg #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] e_in,
  input  logic         latch,
  output logic [W-1:0] e_q
);

  always_ff @(posedge clk) begin
    if (rst)        e_q <= '0;
    else if (latch) e_q <= e_in;
  end

endmodule
