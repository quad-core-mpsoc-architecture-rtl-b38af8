// fpu_tb: checks the pipelined FPU against double-precision reference
// arithmetic. Random operands (normal range, near-cancelling pairs, zeros,
// out-of-range exponents that overflow or underflow) are issued back to back,
// one per cycle, and every result must come out exactly 4 cycles after issue
// with the correctly rounded value. A few infinity/NaN cases are directed.
module fpu_tb;
  import pdpid_pkg::*;
  import fp_ref_pkg::*;

  logic clk = 1'b0;
  logic rst;
  logic in_valid;
  fpu_op_e op;
  logic [31:0] a, b, result;
  logic out_valid;
  int checks = 0, failures = 0;
  int cycle = 0;

  fpu dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // expected results, tagged with their issue cycle
  logic [31:0] exp_q[$];
  int          iss_q[$];
  logic [1:0]  op_q[$];
  logic [31:0] a_q[$], b_q[$];

  function automatic logic [31:0] rnd_fp(input int mode);
    logic [31:0] v;
    v = $urandom;
    case (mode)
      0: v[30:23] = 8'(100 + $urandom_range(0, 54));   // comfortable range
      1: v[30:23] = 8'($urandom_range(1, 254));        // anything finite
      default: v = 32'd0;
    endcase
    if (mode == 2 && $urandom_range(0, 1) == 1) v[31] = 1'b1;
    return v;
  endfunction

  task automatic issue(input logic [1:0] o, input logic [31:0] x, input logic [31:0] y,
                       input logic [31:0] expv);
    in_valid <= 1'b1;
    op <= fpu_op_e'(o);
    a <= x;
    b <= y;
    exp_q.push_back(expv);
    iss_q.push_back(cycle + 1);   // the edge that samples the operands
    op_q.push_back(o); a_q.push_back(x); b_q.push_back(y);
    @(posedge clk);
  endtask

  always @(posedge clk) begin
    if (!rst && out_valid) begin
      logic [31:0] e;
      int ic;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected result %h", result);
      end else begin
        e = exp_q.pop_front();
        ic = iss_q.pop_front();
        void'(op_q.pop_front()); void'(a_q.pop_front()); void'(b_q.pop_front());
        if (result !== e || (cycle - ic) != 4) begin
          failures++;
          if (failures < 10)
            $display("FAIL result %h expected %h latency %0d", result, e, cycle - ic);
        end
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] x, y;
    logic [1:0] o;
    int mode;
    rst = 1'b1; in_valid = 1'b0; op = FPU_ADD; a = '0; b = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    // directed cases
    issue(2'd0, 32'h3F80_0000, 32'h4000_0000, 32'h4040_0000);  // 1 + 2 = 3
    issue(2'd1, 32'h3F80_0000, 32'h4000_0000, 32'hBF80_0000);  // 1 - 2 = -1
    issue(2'd2, 32'h4040_0000, 32'hC000_0000, 32'hC0C0_0000);  // 3 * -2 = -6
    issue(2'd1, 32'h4120_0000, 32'h4120_0000, 32'h0000_0000);  // x - x = +0
    issue(2'd0, 32'h7F80_0000, 32'h3F80_0000, 32'h7F80_0000);  // inf + 1
    issue(2'd1, 32'h7F80_0000, 32'h7F80_0000, 32'h7FC0_0000);  // inf - inf
    issue(2'd2, 32'h7F80_0000, 32'h0000_0000, 32'h7FC0_0000);  // inf * 0
    issue(2'd2, 32'h7F00_0000, 32'h7F00_0000, 32'h7F80_0000);  // overflow
    issue(2'd2, 32'h0080_0000, 32'h3F00_0000, 32'h0000_0000);  // underflow
    // random, back to back
    for (int i = 0; i < 20000; i++) begin
      mode = $urandom_range(0, 9);
      o = 2'($urandom_range(0, 2));
      x = rnd_fp(mode < 7 ? 0 : (mode < 9 ? 1 : 2));
      y = rnd_fp(mode < 7 ? 0 : (mode < 9 ? 1 : 2));
      if (mode == 3) begin       // near cancellation
        y = x ^ 32'(1 << $urandom_range(0, 5));
        if ($urandom_range(0, 1) == 1) y[31] = ~y[31];
      end
      issue(o, x, y, fp_ref(o, x, y));
    end
    in_valid <= 1'b0;
    repeat (8) @(posedge clk);
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d results missing", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
