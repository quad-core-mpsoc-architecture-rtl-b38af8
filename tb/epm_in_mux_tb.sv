// epm_in_mux_tb: drives random values on every source of the input
// multiplexing interface and checks, for every port number 0..255, the byte
// it returns (unmapped ports must read zero).
module epm_in_mux_tb;
  import pdpid_pkg::*;
  byte_t       port_id, ram_rdata, in_port;
  logic [31:0] fpu_result, e_sample;
  logic        fpu_done, own_start;
  hwid_t       hwid;
  logic [3:0]  ready;
  int checks = 0, failures = 0;

  epm_in_mux dut (.*);

  initial begin
    #100000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int it = 0; it < 50; it++) begin
      fpu_result = $urandom; e_sample = $urandom; ram_rdata = 8'($urandom);
      fpu_done = 1'($urandom); own_start = 1'($urandom); hwid = 2'($urandom);
      ready = 4'($urandom);
      for (int p = 0; p < 256; p++) begin
        byte_t e;
        port_id = 8'(p);
        #1;
        case (p)
          0: e = fpu_result[7:0];
          1: e = fpu_result[15:8];
          2: e = fpu_result[23:16];
          3: e = fpu_result[31:24];
          8: e = {7'd0, fpu_done};
          8'h12: e = ram_rdata;
          8'h20: e = {ready, 1'b0, own_start, hwid};
          8'h30: e = e_sample[7:0];
          8'h31: e = e_sample[15:8];
          8'h32: e = e_sample[23:16];
          8'h33: e = e_sample[31:24];
          default: e = 8'h00;
        endcase
        checks++;
        if (in_port !== e) begin
          failures++;
          if (failures < 10) $display("FAIL port %h: %h expected %h", p, in_port, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
