// epm_in_mux: input multiplexing interface of the enhanced PicoBlaze.
//
// The PicoBlaze reads one 8-bit in_port selected by port_id. This block
// extends that single input into several byte-wide sources: the four FPU
// result bytes, the FPU status (bit 0 = result ready), the QP-RAM read data,
// the HWID/READY status byte ([1:0] HWID, [2] this core's START flag,
// [7:4] READY flags of cores 3..0) and the four bytes of the error sample
// E(k). An unmapped port reads as zero. The mux is purely combinational; the
// PicoBlaze samples in_port at the end of its two-cycle INPUT instruction.
// The document gives the function (input port extension by multiplexing);
// the port map is this design's own.
module epm_in_mux
  import pdpid_pkg::*;
(
  input  byte_t             port_id,
  input  logic [31:0]       fpu_result,
  input  logic              fpu_done,
  input  byte_t             ram_rdata,
  input  hwid_t             hwid,
  input  logic              own_start,
  input  logic [NCORES-1:0] ready,
  input  logic [31:0]       e_sample,
  output byte_t             in_port
);

  always_comb begin
    unique case (port_id)
      P_FPU_R0 + 8'd0: in_port = fpu_result[7:0];
      P_FPU_R0 + 8'd1: in_port = fpu_result[15:8];
      P_FPU_R0 + 8'd2: in_port = fpu_result[23:16];
      P_FPU_R0 + 8'd3: in_port = fpu_result[31:24];
      P_FPU_ST:        in_port = {7'd0, fpu_done};
      P_RAM_RD:        in_port = ram_rdata;
      P_HWID_RDY:      in_port = {ready, 1'b0, own_start, hwid};
      P_E0 + 8'd0:     in_port = e_sample[7:0];
      P_E0 + 8'd1:     in_port = e_sample[15:8];
      P_E0 + 8'd2:     in_port = e_sample[23:16];
      P_E0 + 8'd3:     in_port = e_sample[31:24];
      default:         in_port = 8'h00;
    endcase
  end

endmodule
