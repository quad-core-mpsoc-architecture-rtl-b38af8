// epm_out_dec_tb: plays PicoBlaze port writes and reads into the output
// decoding interface and checks every register and strobe: FPU operands and
// command, QP-RAM address (with its step after each data write and each data
// read), START/READY requests, the E latch and the staged U output. Random
// traffic to all ports is compared with a reference of the port map.
module epm_out_dec_tb;
  import pdpid_pkg::*;
  logic clk = 1'b0, rst;
  byte_t port_id, out_port, ram_wdata;
  logic write_strobe, read_strobe;
  logic [31:0] fpu_a, fpu_b, u_out;
  fpu_op_e fpu_op;
  logic fpu_start, ram_we, ready_set, start_clr, e_latch, u_valid;
  logic [10:0] ram_addr;
  logic [3:0] start_set;
  int checks = 0, failures = 0;

  epm_out_dec dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 15) $display("FAIL %s", what); end
  endtask

  // reference state
  logic [31:0] ra, rb, ru, rstage;
  logic [10:0] raddr;
  int n_uvalid = 0;

  always @(posedge clk) if (!rst && u_valid) n_uvalid++;

  // one OUTPUT: strobe for one cycle, combinational strobes checked meanwhile
  task automatic wr(input byte_t p, input byte_t d);
    @(negedge clk);
    port_id = p; out_port = d; write_strobe = 1'b1;
    #1;
    chk(fpu_start == (p == P_FPU_OP), "fpu_start decode");
    if (p == P_FPU_OP) chk(fpu_op == fpu_op_e'(d[1:0]), "fpu_op");
    chk(ram_we == (p == P_RAM_WD) && (ram_wdata == d || p != P_RAM_WD), "ram_we/wdata");
    chk(ready_set == (p == P_SYNC && d[0]), "ready_set");
    chk(start_clr == (p == P_SYNC && d[1]), "start_clr");
    chk(start_set == ((p == P_START) ? d[3:0] : 4'h0), "start_set");
    chk(e_latch == (p == P_E_LATCH), "e_latch");
    // reference update at the coming edge
    case (p)
      8'h00: ra[7:0] = d;   8'h01: ra[15:8] = d;  8'h02: ra[23:16] = d; 8'h03: ra[31:24] = d;
      8'h04: rb[7:0] = d;   8'h05: rb[15:8] = d;  8'h06: rb[23:16] = d; 8'h07: rb[31:24] = d;
      8'h10: raddr[7:0] = d;
      8'h11: raddr[10:8] = d[2:0];
      8'h12: raddr = raddr + 11'd1;
      8'h30: rstage[7:0] = d; 8'h31: rstage[15:8] = d; 8'h32: rstage[23:16] = d;
      8'h33: ru = {d, rstage[23:0]};
      default: ;
    endcase
    @(negedge clk);
    write_strobe = 1'b0;
    chk(fpu_a == ra && fpu_b == rb, "FPU operand registers");
    chk(ram_addr == raddr, $sformatf("ram_addr %h expected %h", ram_addr, raddr));
    chk(u_out == ru, "U register");
  endtask

  task automatic rd(input byte_t p);
    @(negedge clk);
    port_id = p; read_strobe = 1'b1;
    if (p == P_RAM_RD) raddr = raddr + 11'd1;
    @(negedge clk);
    read_strobe = 1'b0;
    chk(ram_addr == raddr, "ram_addr after read");
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int nu;
    rst = 1'b1; port_id = '0; out_port = '0; write_strobe = 1'b0; read_strobe = 1'b0;
    ra = '0; rb = '0; ru = '0; rstage = '0; raddr = '0;
    repeat (2) @(posedge clk);
    rst = 1'b0;
    // directed
    wr(8'h10, 8'h34); wr(8'h11, 8'h05);
    chk(ram_addr == 11'h534, "RAM address from two ports");
    wr(8'h12, 8'hAB);
    chk(ram_addr == 11'h535, "address steps after a write");
    rd(8'h12);
    chk(ram_addr == 11'h536, "address steps after a read");
    rd(8'h20);
    chk(ram_addr == 11'h536, "other reads leave the address");
    nu = n_uvalid;
    wr(8'h30, 8'h11); wr(8'h31, 8'h22); wr(8'h32, 8'h33);
    chk(n_uvalid == nu, "no u_valid before byte 3");
    wr(8'h33, 8'h44);
    @(posedge clk); #1;
    chk(u_out == 32'h44332211 && n_uvalid == nu + 1, "U committed once by byte 3");
    wr(8'h21, 8'h0E); wr(8'h20, 8'h03); wr(8'h22, 8'h00); wr(8'h08, 8'h02);
    // random traffic over the whole port map
    for (int i = 0; i < 3000; i++) begin
      byte_t p;
      p = ($urandom_range(0, 3) == 0) ? 8'($urandom) : 8'({$urandom_range(0, 3), 4'h0} + $urandom_range(0, 7));
      if ($urandom_range(0, 4) == 0) rd(p);
      else wr(p, 8'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
