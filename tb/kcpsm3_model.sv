// kcpsm3_model: behavioural model of the PicoBlaze (KCPSM3) 8-bit
// microcontroller, for simulation only. It is not synthesizable RTL of the
// vendor core; it reproduces its programmer's view and bus timing closely
// enough to run programs in the system testbenches.
//
// Programmer's view: sixteen 8-bit registers s0..sF, zero and carry flags,
// a 64-byte scratchpad, a 31-deep call stack, 1024 x 18-bit program space.
// The instruction encoding follows the KCPSM3 assembler output (opcode in
// bits 17:12, sX in 11:8, sY in 7:4, constant in 7:0, address in 9:0,
// condition Z/NZ/C/NC in 11:10). Interrupts are not modelled: 'interrupt' is
// ignored and 'interrupt_ack' stays low.
// Timing: every instruction takes two clock cycles. In the first the
// program address is presented; the instruction word comes back from a
// synchronous ROM and is used in the second, in which port_id/out_port are
// driven, write_strobe or read_strobe is high for an OUTPUT or INPUT, and
// in_port is sampled at its closing edge, where the instruction executes.
// A reset (synchronous, active high) restarts at address 0 with cleared
// flags and an empty stack.
module kcpsm3_model (
  input  logic        clk,
  input  logic        reset,
  output logic [9:0]  address,
  input  logic [17:0] instruction,
  output logic [7:0]  port_id,
  output logic        write_strobe,
  output logic [7:0]  out_port,
  output logic        read_strobe,
  input  logic [7:0]  in_port,
  input  logic        interrupt,
  output logic        interrupt_ack
);

  logic [7:0] regs [16];
  logic [7:0] spm  [64];
  logic [9:0] stack [31];
  logic [4:0] sp;
  logic       zf, cf;
  logic       phase;          // 0: fetch cycle, 1: execute cycle
  logic [9:0] pc;
  longint unsigned n_instr;   // executed instructions, for statistics

  logic [5:0] opc;
  logic [3:0] rx, ry;
  logic [7:0] kk, opnd;

  assign opc  = instruction[17:12];
  assign rx   = instruction[11:8];
  assign ry   = instruction[7:4];
  assign kk   = instruction[7:0];
  assign opnd = instruction[12] ? regs[ry] : kk;
  assign address = pc;
  assign interrupt_ack = 1'b0;

  always_comb begin
    port_id      = opnd;
    out_port     = regs[rx];
    write_strobe = phase && (opc[5:1] == 5'b10110);   // OUTPUT
    read_strobe  = phase && (opc[5:1] == 5'b00010);   // INPUT
  end

  function automatic logic cond_ok(input logic [1:0] c, input logic z, input logic cy);
    case (c)
      2'b00: return z;
      2'b01: return !z;
      2'b10: return cy;
      default: return !cy;
    endcase
  endfunction

  initial begin
    for (int i = 0; i < 16; i++) regs[i] = '0;
    for (int i = 0; i < 64; i++) spm[i] = '0;
    for (int i = 0; i < 31; i++) stack[i] = '0;
  end

  always @(posedge clk) begin
    if (reset) begin
      phase   <= 1'b0;
      pc      <= '0;
      sp      <= '0;
      zf      <= 1'b0;
      cf      <= 1'b0;
      n_instr <= 0;
    end else if (!phase) begin
      phase <= 1'b1;
    end else begin
      logic [8:0]  r;
      logic [7:0]  x, y, t;
      logic [9:0]  npc;
      logic        taken;
      phase   <= 1'b0;
      n_instr <= n_instr + 1;
      x   = regs[rx];
      y   = opnd;
      npc = pc + 10'd1;
      taken = 1'b0;
      unique case (opc[5:1])
        5'b00000: regs[rx] <= y;                                       // LOAD
        5'b00010: regs[rx] <= in_port;                                 // INPUT
        5'b00011: regs[rx] <= spm[y[5:0]];                             // FETCH
        5'b00101: begin t = x & y; regs[rx] <= t; zf <= (t == 0); cf <= 1'b0; end  // AND
        5'b00110: begin t = x | y; regs[rx] <= t; zf <= (t == 0); cf <= 1'b0; end  // OR
        5'b00111: begin t = x ^ y; regs[rx] <= t; zf <= (t == 0); cf <= 1'b0; end  // XOR
        5'b01001: begin t = x & y; zf <= (t == 0); cf <= ^t; end        // TEST
        5'b01010: begin zf <= (x == y); cf <= (x < y); end              // COMPARE
        5'b01100: begin r = {1'b0, x} + {1'b0, y}; regs[rx] <= r[7:0]; cf <= r[8]; zf <= (r[7:0] == 0); end
        5'b01101: begin r = {1'b0, x} + {1'b0, y} + {8'd0, cf}; regs[rx] <= r[7:0]; cf <= r[8]; zf <= (r[7:0] == 0); end
        5'b01110: begin r = {1'b0, x} - {1'b0, y}; regs[rx] <= r[7:0]; cf <= r[8]; zf <= (r[7:0] == 0); end
        5'b01111: begin r = {1'b0, x} - {1'b0, y} - {8'd0, cf}; regs[rx] <= r[7:0]; cf <= r[8]; zf <= (r[7:0] == 0); end
        5'b10000: begin                                                 // shift / rotate
          logic co;
          case (kk[3:0])
            4'h6: begin co = x[7]; t = {x[6:0], 1'b0}; end   // SL0
            4'h7: begin co = x[7]; t = {x[6:0], 1'b1}; end   // SL1
            4'h4: begin co = x[7]; t = {x[6:0], x[0]}; end   // SLX
            4'h0: begin co = x[7]; t = {x[6:0], cf}; end     // SLA
            4'h2: begin co = x[7]; t = {x[6:0], x[7]}; end   // RL
            4'hE: begin co = x[0]; t = {1'b0, x[7:1]}; end   // SR0
            4'hF: begin co = x[0]; t = {1'b1, x[7:1]}; end   // SR1
            4'hA: begin co = x[0]; t = {x[7], x[7:1]}; end   // SRX
            4'h8: begin co = x[0]; t = {cf, x[7:1]}; end     // SRA
            default: begin co = x[0]; t = {x[0], x[7:1]}; end // RR
          endcase
          regs[rx] <= t; cf <= co; zf <= (t == 0);
        end
        5'b10101: begin                                                 // RETURN
          if (!opc[0] || cond_ok(instruction[11:10], zf, cf)) begin
            npc = stack[sp - 5'd1] + 10'd1;
            sp <= sp - 5'd1;
          end
        end
        5'b10110: ;                                                     // OUTPUT
        5'b10111: spm[y[5:0]] <= x;                                     // STORE
        5'b11000: begin                                                 // CALL
          taken = !opc[0] || cond_ok(instruction[11:10], zf, cf);
          if (taken) begin
            stack[sp] <= pc;
            sp <= sp + 5'd1;
            npc = instruction[9:0];
          end
        end
        5'b11010: begin                                                 // JUMP
          if (!opc[0] || cond_ok(instruction[11:10], zf, cf)) npc = instruction[9:0];
        end
        default: ;                                                      // interrupts: ignored
      endcase
      pc <= npc;
    end
  end

endmodule
