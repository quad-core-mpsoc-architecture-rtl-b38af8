// pdpid_harness: drives and checks a PDPID controller in simulation.
//
// It makes the two phase-aligned clocks (clk2x at twice clk) and the reset,
// runs one PicoBlaze behavioural model per core on the controller's CPU
// buses, and drives e_in with a new random error value every cycle: the
// value present when the master opens register R is the sample E(k), so the
// cores only compute correctly if R holds it for them. Every U the
// controller delivers is compared bit for bit with a reference PID computed
// here in the same order with correctly rounded single precision:
//   P = Kp*E(k), I(k) = I(k-1) + E(k), D(k) = E(k) - E(k-1),
//   U(k) = (P + Ki*I(k)) + Kd*D(k),   Kp = 1.2, Ki = 0.05, Kd = 0.3.
// It also counts the system's mechanisms (START and READY events, FPU
// operations per core, QP-RAM cycles with several cores accessing at once,
// outputs delivered while the slaves already work on the next sample) and
// measures the steady-state PID loop time in clk cycles (between the last
// two outputs). PIPELINED says whether outputs overlapping the next sample
// are expected (1) or forbidden (0); SEQUENTIAL says the slaves stay idle.
module pdpid_harness
  import pdpid_pkg::*;
  import fp_ref_pkg::*;
#(
  parameter int unsigned N_SAMPLES  = 16,
  parameter bit          PIPELINED  = 1'b1,
  parameter bit          SEQUENTIAL = 1'b0
) (
  output logic               clk,
  output logic               clk2x,
  output logic               rst,
  output logic [31:0]        e_in,
  input  logic [31:0]        u_out,
  input  logic               u_valid,
  input  logic               e_latch,
  input  logic [NCORES-1:0]  start,
  input  logic [NCORES-1:0]  ready,
  output logic [IADDR_W-1:0] pb_address      [NCORES],
  input  logic [INSTR_W-1:0] pb_instruction  [NCORES],
  output byte_t              pb_port_id      [NCORES],
  output byte_t              pb_out_port     [NCORES],
  output logic               pb_write_strobe [NCORES],
  output logic               pb_read_strobe  [NCORES],
  input  byte_t              pb_in_port      [NCORES],
  output logic               done,
  output int                 checks,
  output int                 failures,
  output int                 loop_cycles
);

  localparam logic [31:0] KP = 32'h3F99999A, KI = 32'h3D4CCCCD, KD = 32'h3E99999A;

  // clocks: clk2x rises at every clk edge and once in between
  initial begin
    clk = 1'b0; clk2x = 1'b0;
    forever begin
      clk = 1'b1; clk2x = 1'b1; #5;
      clk2x = 1'b0; #5;
      clk = 1'b0; clk2x = 1'b1; #5;
      clk2x = 1'b0; #5;
    end
  end

  for (genvar c = 0; c < int'(NCORES); c++) begin : g_cpu
    kcpsm3_model u_cpu (
      .clk, .reset(rst),
      .address     (pb_address[c]),
      .instruction (pb_instruction[c]),
      .port_id     (pb_port_id[c]),
      .write_strobe(pb_write_strobe[c]),
      .out_port    (pb_out_port[c]),
      .read_strobe (pb_read_strobe[c]),
      .in_port     (pb_in_port[c]),
      .interrupt   (1'b0),
      .interrupt_ack()
    );
  end

  // stimulus and reference: e_in takes a new random value every cycle; the
  // value present when the master opens R is the sample the PID must use
  logic [31:0] lat_q [$];
  logic [31:0] i_acc, e_prev;
  int n_latched, n_out, cycle, last_out_cycle;
  int n_start, n_ready, n_pipelined, n_multi_ram;
  int n_fpu [NCORES];

  function automatic logic [31:0] rnd_sample();
    logic [31:0] v;
    v = $urandom;
    v[30:23] = 8'(122 + $urandom_range(0, 8));
    return v;
  endfunction

  // next reference output for sample e, advancing the integral and the
  // previous-sample state
  function automatic logic [31:0] ref_u(input logic [31:0] e);
    logic [31:0] p, iout, dout;
    p      = fp_ref(2'd2, KP, e);
    i_acc  = fp_ref(2'd0, i_acc, e);
    iout   = fp_ref(2'd2, KI, i_acc);
    dout   = fp_ref(2'd2, KD, fp_ref(2'd1, e, e_prev));
    e_prev = e;
    return fp_ref(2'd0, fp_ref(2'd0, p, iout), dout);
  endfunction

  initial begin
    rst = 1'b1; done = 1'b0;
    checks = 0; failures = 0; loop_cycles = 0;
    repeat (4) @(posedge clk);
    rst = 1'b0;
  end

  always @(posedge clk) begin
    if (rst) begin
      e_in <= rnd_sample();
      i_acc = '0; e_prev = '0;
      lat_q.delete();
      n_latched <= 0; n_out <= 0; cycle <= 0; last_out_cycle <= 0;
      n_start <= 0; n_ready <= 0; n_pipelined <= 0; n_multi_ram <= 0;
      for (int c = 0; c < int'(NCORES); c++) n_fpu[c] <= 0;
    end else begin
      int nram, nrdy;
      cycle <= cycle + 1;
      e_in <= rnd_sample();
      if (e_latch) begin
        n_latched <= n_latched + 1;
        lat_q.push_back(e_in);
      end
      if (pb_write_strobe[0] && pb_port_id[0] == P_START) n_start <= n_start + 1;
      nram = 0;
      nrdy = 0;
      for (int c = 0; c < int'(NCORES); c++) begin
        if (pb_write_strobe[c] && pb_port_id[c] == P_SYNC && pb_out_port[c][0])
          nrdy++;
        if (pb_write_strobe[c] && pb_port_id[c] == P_FPU_OP) n_fpu[c] <= n_fpu[c] + 1;
        if ((pb_write_strobe[c] && pb_port_id[c] == P_RAM_WD) ||
            (pb_read_strobe[c] && pb_port_id[c] == P_RAM_RD)) nram++;
      end
      n_ready <= n_ready + nrdy;
      if (nram >= 2) n_multi_ram <= n_multi_ram + 1;
      if (u_valid && n_out < int'(N_SAMPLES)) begin
        logic [31:0] ue;
        checks <= checks + 1;
        if (lat_q.size() == 0) begin
          failures <= failures + 1;
          $display("FAIL U(%0d) delivered before its sample was taken", n_out);
        end else begin
          ue = ref_u(lat_q.pop_front());
          if (u_out !== ue) begin
            failures <= failures + 1;
            $display("FAIL U(%0d) = %h, expected %h", n_out, u_out, ue);
          end
        end
        // the slaves already hold the next sample: software pipelining
        if (n_latched >= n_out + 2) n_pipelined <= n_pipelined + 1;
        loop_cycles <= cycle - last_out_cycle;
        last_out_cycle <= cycle;
        n_out <= n_out + 1;
      end
    end
  end

  task automatic expect_true(input bit c, input string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #1;
    wait (!rst);
    wait (n_out == int'(N_SAMPLES));
    @(posedge clk);
    expect_true(SEQUENTIAL ? (n_start == 0) : (n_start >= int'(N_SAMPLES)), "START sent for every sample");
    expect_true(SEQUENTIAL ? (n_ready == 0) : (n_ready >= 3 * int'(N_SAMPLES)), "READY from each slave");
    expect_true(n_fpu[0] >= 2 * int'(N_SAMPLES), "master used its FPU");
    for (int c = 1; c < int'(NCORES); c++)
      expect_true(SEQUENTIAL ? (n_fpu[c] == 0) : (n_fpu[c] >= int'(N_SAMPLES)),
                  $sformatf("slave %0d FPU use", c));
    expect_true(SEQUENTIAL || n_multi_ram > 0, "concurrent QP-RAM accesses");
    expect_true(PIPELINED ? (n_pipelined >= int'(N_SAMPLES) - 2) : (n_pipelined == 0),
                "software pipelining of master and slaves");
    $display("loop %0d cycles; START %0d READY %0d FPU %0d/%0d/%0d/%0d multi-RAM %0d pipelined %0d",
             loop_cycles, n_start, n_ready, n_fpu[0], n_fpu[1], n_fpu[2], n_fpu[3],
             n_multi_ram, n_pipelined);
    done = 1'b1;
  end

endmodule
