// epm_out_dec: output decoding interface of the enhanced PicoBlaze.
//
// The PicoBlaze has one 8-bit output bus qualified by port_id and a
// one-cycle write_strobe. This block decodes port_id to widen it into the
// registers and strobes the rest of the core and the system need:
//   * FPU operand registers A and B (4 bytes each, byte 0 = LSB) and a
//     one-cycle fpu_start with the opcode, issued when P_FPU_OP is written;
//   * the QP-RAM address register (11 bits, low/high byte ports) and a
//     one-cycle ram_we with ram_wdata = out_port; the address steps by one
//     after each data write and after each read of P_RAM_RD (read_strobe),
//     so block transfers need no address rewrite;
//   * the START/READY requests for the synchronisation unit;
//   * the OUT port: U is staged byte by byte and updated as one 32-bit word,
//     with a one-cycle u_valid, when its byte 3 is written;
//   * e_latch, which opens the error-sample register R.
// All registers reset to zero. The document gives the function of this block
// (output port extension by decoding); the port map and the address
// auto-increment are this design's own choices.
module epm_out_dec
  import pdpid_pkg::*;
#(
  parameter int unsigned RAM_AW = 11
) (
  input  logic              clk,
  input  logic              rst,
  // PicoBlaze output side
  input  byte_t             port_id,
  input  byte_t             out_port,
  input  logic              write_strobe,
  input  logic              read_strobe,
  // FPU
  output logic [31:0]       fpu_a,
  output logic [31:0]       fpu_b,
  output fpu_op_e           fpu_op,
  output logic              fpu_start,
  // QP-RAM
  output logic [RAM_AW-1:0] ram_addr,
  output logic              ram_we,
  output byte_t             ram_wdata,
  // synchronisation
  output logic              ready_set,
  output logic              start_clr,
  output logic [NCORES-1:0] start_set,
  output logic              e_latch,
  // OUT port
  output logic [31:0]       u_out,
  output logic              u_valid
);

  logic wr;
  logic [23:0] u_stage;

  assign wr = write_strobe;

  // one-cycle strobes decoded straight from the bus
  always_comb begin
    fpu_start = wr && (port_id == P_FPU_OP);
    fpu_op    = fpu_op_e'(out_port[1:0]);
    ram_we    = wr && (port_id == P_RAM_WD);
    ram_wdata = out_port;
    ready_set = wr && (port_id == P_SYNC) && out_port[0];
    start_clr = wr && (port_id == P_SYNC) && out_port[1];
    start_set = (wr && (port_id == P_START)) ? out_port[NCORES-1:0] : '0;
    e_latch   = wr && (port_id == P_E_LATCH);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      fpu_a    <= '0;
      fpu_b    <= '0;
      ram_addr <= '0;
      u_stage  <= '0;
      u_out    <= '0;
      u_valid  <= 1'b0;
    end else begin
      u_valid <= 1'b0;
      if (wr) begin
        unique case (port_id)
          P_FPU_A0 + 8'd0: fpu_a[7:0]   <= out_port;
          P_FPU_A0 + 8'd1: fpu_a[15:8]  <= out_port;
          P_FPU_A0 + 8'd2: fpu_a[23:16] <= out_port;
          P_FPU_A0 + 8'd3: fpu_a[31:24] <= out_port;
          P_FPU_B0 + 8'd0: fpu_b[7:0]   <= out_port;
          P_FPU_B0 + 8'd1: fpu_b[15:8]  <= out_port;
          P_FPU_B0 + 8'd2: fpu_b[23:16] <= out_port;
          P_FPU_B0 + 8'd3: fpu_b[31:24] <= out_port;
          P_RAM_ALO:       ram_addr[7:0] <= out_port;
          P_RAM_AHI:       ram_addr[RAM_AW-1:8] <= out_port[RAM_AW-9:0];
          P_RAM_WD:        ram_addr <= ram_addr + 1'b1;
          P_U0 + 8'd0:     u_stage[7:0]   <= out_port;
          P_U0 + 8'd1:     u_stage[15:8]  <= out_port;
          P_U0 + 8'd2:     u_stage[23:16] <= out_port;
          P_U0 + 8'd3: begin
            u_out   <= {out_port, u_stage};
            u_valid <= 1'b1;
          end
          default: ;
        endcase
      end else if (read_strobe && port_id == P_RAM_RD) begin
        ram_addr <= ram_addr + 1'b1;
      end
    end
  end

  // the PicoBlaze never reads and writes in the same cycle
  assert property (@(posedge clk) disable iff (rst) !(write_strobe && read_strobe));

endmodule
