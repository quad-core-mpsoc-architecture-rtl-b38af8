// core_sync: START/READY synchronisation signals between the master core and
// the three slave cores.
//
// Each core s has a START flag and a READY flag. The master (core 0) sends
// START to a set of cores with one write (start_set mask): that sets their
// START flags and clears their READY flags. A slave that has seen START
// clears its own flag (start_clr) before reading the new error sample, and
// sets READY (ready_set) once its result is in the QP-RAM. The master waits
// until the READY flags of all slaves are set. Every core can read its own
// START flag and all READY flags. Flags reset to zero. A request and its
// opposite in the same cycle resolve in favour of the master's START.
// The document says only that START and READY are hardware signals between
// the cores; the flag-register form is this design's own.
module core_sync
  import pdpid_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic [NCORES-1:0] start_set,   // from the master's output decoder
  input  logic [NCORES-1:0] start_clr,   // from each core
  input  logic [NCORES-1:0] ready_set,   // from each core
  output logic [NCORES-1:0] start,
  output logic [NCORES-1:0] ready
);

  always_ff @(posedge clk) begin
    if (rst) begin
      start <= '0;
      ready <= '0;
    end else begin
      for (int s = 0; s < int'(NCORES); s++) begin
        if (start_set[s]) begin
          start[s] <= 1'b1;
          ready[s] <= 1'b0;
        end else begin
          if (start_clr[s]) start[s] <= 1'b0;
          if (ready_set[s]) ready[s] <= 1'b1;
        end
      end
    end
  end

  // a START must have been taken before the next one is sent
  generate
    for (genvar s = 0; s < int'(NCORES); s++) begin : g_chk
      assert property (@(posedge clk) disable iff (rst) start_set[s] |-> !start[s])
        else $error("START sent to core %0d before it took the previous one", s);
    end
  endgenerate

endmodule
