// fpu: four-stage pipelined single-precision floating-point unit (add,
// subtract, multiply) attached to each enhanced PicoBlaze.
//
// The document gives the unit's function: a fast four-stage pipelined FPU,
// cut down to addition, subtraction and multiplication. The insides below are
// this design's own:
//   stage 1  unpack, order the add operands by magnitude / add the exponents
//   stage 2  align the smaller addend (guard, round, sticky) / 24x24 multiply
//   stage 3  add or subtract and normalise / normalise the product
//   stage 4  round to nearest even, handle overflow and underflow, pack
// Operands are IEEE-754 binary32. Subnormal inputs count as zero and results
// below the smallest normal number flush to a signed zero. Infinities pass
// through, and any NaN, inf-inf or 0*inf gives the quiet NaN 0x7FC00000.
// Interface: in_valid with a, b and op issues one operation per cycle; the
// result appears with out_valid exactly STAGES (4) cycles later.
module fpu
  import pdpid_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  logic            in_valid,
  input  fpu_op_e         op,
  input  logic [31:0]     a,
  input  logic [31:0]     b,
  output logic            out_valid,
  output logic [31:0]     result
);

  localparam logic [31:0] QNAN = 32'h7FC0_0000;

  // ---------------- stage 1 ----------------
  typedef struct packed {
    logic        valid;
    logic        is_mul;
    logic        special;     // result already known (inf / nan)
    logic [31:0] special_val;
    logic        sign;        // sign of result (mul) / of larger operand (add)
    logic        eff_sub;     // add path: magnitudes are subtracted
    logic        sign_small;  // add path: sign of the smaller operand
    logic signed [10:0] exp;  // mul: ea+eb-127, add: exponent of larger
    logic [7:0]  diff;        // add: exponent difference
    logic [23:0] m_big;
    logic [23:0] m_small;
  } s1_t;

  s1_t s1;

  always_ff @(posedge clk) begin
    if (rst) begin
      s1 <= '0;
    end else begin
      logic        sa, sb;
      logic [7:0]  ea, eb;
      logic [23:0] ma, mb;
      logic        za, zb, ia, ib, na, nb;
      sa = a[31];
      sb = b[31] ^ (op == FPU_SUB);
      ea = a[30:23];
      eb = b[30:23];
      za = (ea == 8'd0);
      zb = (eb == 8'd0);
      ia = (ea == 8'hFF) && (a[22:0] == 23'd0);
      ib = (eb == 8'hFF) && (b[22:0] == 23'd0);
      na = (ea == 8'hFF) && (a[22:0] != 23'd0);
      nb = (eb == 8'hFF) && (b[22:0] != 23'd0);
      ma = za ? 24'd0 : {1'b1, a[22:0]};
      mb = zb ? 24'd0 : {1'b1, b[22:0]};

      s1.valid       <= in_valid;
      s1.is_mul      <= (op == FPU_MUL);
      s1.special     <= 1'b0;
      s1.special_val <= '0;
      s1.eff_sub     <= 1'b0;
      s1.sign_small  <= 1'b0;
      s1.diff        <= '0;

      if (op == FPU_MUL) begin
        s1.sign    <= a[31] ^ b[31];
        s1.exp     <= $signed({3'b000, ea}) + $signed({3'b000, eb}) - 11'sd127;
        s1.m_big   <= ma;
        s1.m_small <= mb;
        if (na || nb || (ia && zb) || (ib && za)) begin
          s1.special <= 1'b1; s1.special_val <= QNAN;
        end else if (ia || ib) begin
          s1.special <= 1'b1; s1.special_val <= {a[31] ^ b[31], 8'hFF, 23'd0};
        end
      end else begin
        // zero operands are treated as the smaller one
        if ({~za, ea, a[22:0]} >= {~zb, eb, b[22:0]}) begin
          s1.sign       <= sa;
          s1.sign_small <= sb;
          s1.exp        <= $signed({3'b000, ea});
          s1.diff       <= zb ? 8'd255 : ea - eb;
          s1.m_big      <= ma;
          s1.m_small    <= mb;
        end else begin
          s1.sign       <= sb;
          s1.sign_small <= sa;
          s1.exp        <= $signed({3'b000, eb});
          s1.diff       <= za ? 8'd255 : eb - ea;
          s1.m_big      <= mb;
          s1.m_small    <= ma;
        end
        s1.eff_sub <= sa ^ sb;
        if (na || nb || (ia && ib && (sa != sb))) begin
          s1.special <= 1'b1; s1.special_val <= QNAN;
        end else if (ia) begin
          s1.special <= 1'b1; s1.special_val <= {sa, 8'hFF, 23'd0};
        end else if (ib) begin
          s1.special <= 1'b1; s1.special_val <= {sb, 8'hFF, 23'd0};
        end
      end
    end
  end

  // ---------------- stage 2 ----------------
  typedef struct packed {
    logic        valid;
    logic        is_mul;
    logic        special;
    logic [31:0] special_val;
    logic        sign;
    logic        sign_small;
    logic        eff_sub;
    logic signed [10:0] exp;
    logic [26:0] big;     // {M, g, r, s}
    logic [26:0] little;   // aligned {M, g, r, s}
    logic [47:0] prod;
  } s2_t;

  s2_t s2;

  always_ff @(posedge clk) begin
    if (rst) begin
      s2 <= '0;
    end else begin
      logic [49:0] sh;
      sh = {s1.m_small, 26'd0} >> ((s1.diff > 8'd49) ? 8'd50 : s1.diff);
      s2.valid       <= s1.valid;
      s2.is_mul      <= s1.is_mul;
      s2.special     <= s1.special;
      s2.special_val <= s1.special_val;
      s2.sign        <= s1.sign;
      s2.sign_small  <= s1.sign_small;
      s2.eff_sub     <= s1.eff_sub;
      s2.exp         <= s1.exp;
      s2.big         <= {s1.m_big, 3'b000};
      s2.little       <= {sh[49:24], ((s1.diff > 8'd49) ? (|s1.m_small) : (|sh[23:0]))};
      s2.prod        <= s1.is_mul ? s1.m_big * s1.m_small : 48'd0;
    end
  end

  // ---------------- stage 3 ----------------
  typedef struct packed {
    logic        valid;
    logic        special;
    logic [31:0] special_val;
    logic        zero;
    logic        sign;
    logic signed [10:0] exp;
    logic [23:0] m;
    logic        rnd;
    logic        sticky;
  } s3_t;

  s3_t s3;

  // leading-zero count of a 27-bit value (27 when zero)
  function automatic logic [4:0] lzc27(input logic [26:0] v);
    lzc27 = 5'd27;
    for (int i = 0; i < 27; i++) begin
      if (v[i]) lzc27 = 5'(26 - i);
    end
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      s3 <= '0;
    end else begin
      logic [27:0] sum;
      logic [26:0] dif, nrm;
      logic [4:0]  lz;
      logic signed [10:0] e;
      s3.valid       <= s2.valid;
      s3.special     <= s2.special;
      s3.special_val <= s2.special_val;
      s3.sign        <= s2.sign;
      s3.zero        <= 1'b0;
      sum = '0; dif = '0; nrm = '0; lz = '0; e = '0;
      if (s2.is_mul) begin
        if (s2.prod == 48'd0) begin
          s3.zero <= 1'b1;
          s3.exp <= '0; s3.m <= '0; s3.rnd <= 1'b0; s3.sticky <= 1'b0;
        end else if (s2.prod[47]) begin
          s3.exp    <= s2.exp + 11'sd1;
          s3.m      <= s2.prod[47:24];
          s3.rnd    <= s2.prod[23];
          s3.sticky <= |s2.prod[22:0];
        end else begin
          s3.exp    <= s2.exp;
          s3.m      <= s2.prod[46:23];
          s3.rnd    <= s2.prod[22];
          s3.sticky <= |s2.prod[21:0];
        end
      end else if (!s2.eff_sub) begin
        sum = {1'b0, s2.big} + {1'b0, s2.little};
        if (sum == 28'd0) begin
          s3.zero <= 1'b1;
          s3.sign <= s2.sign & s2.sign_small;
          s3.exp <= '0; s3.m <= '0; s3.rnd <= 1'b0; s3.sticky <= 1'b0;
        end else if (sum[27]) begin
          s3.exp    <= s2.exp + 11'sd1;
          s3.m      <= sum[27:4];
          s3.rnd    <= sum[3];
          s3.sticky <= |sum[2:0];
        end else begin
          s3.exp    <= s2.exp;
          s3.m      <= sum[26:3];
          s3.rnd    <= sum[2];
          s3.sticky <= |sum[1:0];
        end
      end else begin
        dif = s2.big - s2.little;
        lz  = lzc27(dif);
        if (dif == 27'd0) begin
          s3.zero <= 1'b1;
          s3.sign <= 1'b0;          // x - x = +0 when rounding to nearest
          s3.exp <= '0; s3.m <= '0; s3.rnd <= 1'b0; s3.sticky <= 1'b0;
        end else begin
          nrm = dif << lz;
          e   = s2.exp - $signed({6'd0, lz});
          s3.exp    <= e;
          s3.m      <= nrm[26:3];
          s3.rnd    <= nrm[2];
          s3.sticky <= |nrm[1:0];
        end
      end
    end
  end

  // ---------------- stage 4 ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      result    <= '0;
    end else begin
      logic [24:0] mr;
      logic signed [10:0] e;
      out_valid <= s3.valid;
      mr = {1'b0, s3.m} + 25'((s3.rnd && (s3.sticky || s3.m[0])) ? 1 : 0);
      e  = s3.exp;
      if (mr[24]) begin
        mr = mr >> 1;
        e  = e + 11'sd1;
      end
      if (s3.special)
        result <= s3.special_val;
      else if (s3.zero || e <= 11'sd0)
        result <= {s3.sign, 31'd0};
      else if (e >= 11'sd255)
        result <= {s3.sign, 8'hFF, 23'd0};
      else
        result <= {s3.sign, e[7:0], mr[22:0]};
    end
  end

endmodule
