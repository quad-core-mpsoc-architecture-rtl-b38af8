// epm: Enhanced PicoBlaze Microcontroller, the processing element of the
// MPSoC (without the PicoBlaze core itself, whose bus is this module's
// cpu-side interface).
//
// Around the 8-bit PicoBlaze I/O bus (port_id, out_port, write_strobe,
// read_strobe, in_port) it adds:
//   * the output decoding interface (epm_out_dec), which turns port writes
//     into FPU operands and commands, QP-RAM accesses, START/READY requests,
//     the E-sample latch request and the 32-bit OUT port U;
//   * the four-stage pipelined FPU (add, sub, mul on IEEE binary32);
//   * a result register that holds the FPU result and a 'done' flag, cleared
//     by each new FPU command and set when the result leaves the pipeline
//     four cycles later, so software can poll it (one command at a time is
//     assumed: a new command clears 'done' even if an older result is
//     still leaving the pipeline);
//   * the input multiplexing interface (epm_in_mux) that returns FPU result,
//     status, QP-RAM data, HWID/START/READY and E(k) bytes on in_port.
// The structure (PicoBlaze, input mux, output decoder, FPU fed with operands
// and control from the decoder and returning its output through the mux)
// follows the document's EPM block diagram; widths and the port map are this
// design's own (see pdpid_pkg).
module epm
  import pdpid_pkg::*;
#(
  parameter int unsigned RAM_AW = 11
) (
  input  logic              clk,
  input  logic              rst,
  input  hwid_t             hwid,
  // PicoBlaze I/O bus
  input  byte_t             port_id,
  input  byte_t             out_port,
  input  logic              write_strobe,
  input  logic              read_strobe,
  output byte_t             in_port,
  // QP-RAM port
  output logic [RAM_AW-1:0] ram_addr,
  output logic              ram_we,
  output byte_t             ram_wdata,
  input  byte_t             ram_rdata,
  // synchronisation
  output logic              ready_set,
  output logic              start_clr,
  output logic [NCORES-1:0] start_set,
  input  logic              own_start,
  input  logic [NCORES-1:0] ready,
  // error sample and control output
  input  logic [31:0]       e_sample,
  output logic              e_latch,
  output logic [31:0]       u_out,
  output logic              u_valid
);

  logic [31:0] fpu_a, fpu_b, fpu_res, res_q;
  fpu_op_e     fpu_op;
  logic        fpu_start, fpu_valid, done_q;

  epm_out_dec #(.RAM_AW(RAM_AW)) u_out_dec (
    .clk, .rst,
    .port_id, .out_port, .write_strobe, .read_strobe,
    .fpu_a, .fpu_b, .fpu_op, .fpu_start,
    .ram_addr, .ram_we, .ram_wdata,
    .ready_set, .start_clr, .start_set, .e_latch,
    .u_out, .u_valid
  );

  fpu u_fpu (
    .clk, .rst,
    .in_valid (fpu_start),
    .op       (fpu_op),
    .a        (fpu_a),
    .b        (fpu_b),
    .out_valid(fpu_valid),
    .result   (fpu_res)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      res_q  <= '0;
      done_q <= 1'b0;
    end else begin
      if (fpu_valid) res_q <= fpu_res;
      if (fpu_start)      done_q <= 1'b0;
      else if (fpu_valid) done_q <= 1'b1;
    end
  end

  epm_in_mux u_in_mux (
    .port_id,
    .fpu_result(res_q),
    .fpu_done  (done_q),
    .ram_rdata,
    .hwid,
    .own_start,
    .ready,
    .e_sample,
    .in_port
  );

endmodule
