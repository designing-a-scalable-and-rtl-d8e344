// jpau: Joint Polynomial Arithmetic Unit.
//
// A fully pipelined modular ALU shared by all lattice schemes. Each cycle it
// accepts one operation on two lanes; a lane takes one coefficient x of one
// polynomial and one coefficient y of another (plus a twiddle w and a fed-back
// product fb). In packed (Kyber) mode every 24-bit operand holds two 12-bit
// coefficients and each lane works on both halves, so the unit handles four
// Kyber coefficients per cycle instead of two.
//
// Operations (pqc_pkg::jop_e): ADD/SUB mod q, MUL (raw 48-bit product, in
// packed mode two 24-bit products side by side), RED (Montgomery reduction of
// the 48-bit value on fb, which the caller holds in an external temporary
// store after a MUL), MMUL (x*w*R^-1), CT and GS butterflies, bitwise AND and
// CMP (x < y decided by subtraction, reported on the separate cmp port).
// R is 2^24 unpacked and 2^12 per packed half; qinv = -q^-1 mod 2^24 serves
// both since its low 12 bits are -q^-1 mod 2^12.
//
// Timing: three register stages (multiply, reduce, final add/sub); results
// appear LAT = 3 cycles after in_valid with out_valid, one new operation may
// enter every cycle. Inputs must be reduced (< q) for the modular operations.
//
// From the architecture description: 24-bit datapath, two lanes, four
// coefficients in Kyber mode, product fed back from an outside register for
// reduction, compare by subtraction on its own port, full pipelining, butterfly
// and Montgomery units. The stage split and the opcode set are this design's.
module jpau
  import pqc_pkg::*;
#(
  parameter int unsigned LANES = 2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  jop_e                  op,
  input  logic                  packed_mode,
  input  logic [COEF_W-1:0]     q,
  input  logic [COEF_W-1:0]     qinv,
  input  logic [COEF_W-1:0]     x   [LANES],
  input  logic [COEF_W-1:0]     y   [LANES],
  input  logic [COEF_W-1:0]     w   [LANES],
  input  logic [PROD_W-1:0]     fb  [LANES],
  output logic                  out_valid,
  output logic [PROD_W-1:0]     r0  [LANES],
  output logic [COEF_W-1:0]     r1  [LANES],
  output logic [1:0]            cmp [LANES]
);

  // stage 1 -> 2 registers
  logic              v1, pk1;
  jop_e              op1;
  logic [COEF_W-1:0] q1, qi1;
  logic [PROD_W-1:0] p1 [LANES];   // product or pass-through value
  logic [COEF_W-1:0] u1 [LANES];   // butterfly upper operand
  logic [1:0]        c1 [LANES];

  // stage 2 -> 3 registers
  logic              v2, pk2;
  jop_e              op2;
  logic [COEF_W-1:0] q2;
  logic [PROD_W-1:0] p2 [LANES];
  logic [COEF_W-1:0] u2 [LANES];
  logic [1:0]        c2 [LANES];

  // ------------------------------------------------------------- stage 1
  // Per lane: sums/differences, the product to be reduced, compare flags.
  function automatic logic [PROD_W-1:0] mul_packed(logic [COEF_W-1:0] a,
                                                   logic [COEF_W-1:0] b,
                                                   logic pk);
    if (pk)
      return {COEF_W'(a[2*HALF_W-1:HALF_W] * b[2*HALF_W-1:HALF_W]),
              COEF_W'(a[HALF_W-1:0] * b[HALF_W-1:0])};
    return PROD_W'(a) * PROD_W'(b);
  endfunction

  function automatic logic [COEF_W-1:0] add_q(logic [COEF_W-1:0] a,
                                              logic [COEF_W-1:0] b,
                                              logic [COEF_W-1:0] qq,
                                              logic pk);
    if (pk)
      return {HALF_W'(mod_add(COEF_W'(a[2*HALF_W-1:HALF_W]), COEF_W'(b[2*HALF_W-1:HALF_W]), qq)),
              HALF_W'(mod_add(COEF_W'(a[HALF_W-1:0]), COEF_W'(b[HALF_W-1:0]), qq))};
    return mod_add(a, b, qq);
  endfunction

  function automatic logic [COEF_W-1:0] sub_q(logic [COEF_W-1:0] a,
                                              logic [COEF_W-1:0] b,
                                              logic [COEF_W-1:0] qq,
                                              logic pk);
    if (pk)
      return {HALF_W'(mod_sub(COEF_W'(a[2*HALF_W-1:HALF_W]), COEF_W'(b[2*HALF_W-1:HALF_W]), qq)),
              HALF_W'(mod_sub(COEF_W'(a[HALF_W-1:0]), COEF_W'(b[HALF_W-1:0]), qq))};
    return mod_sub(a, b, qq);
  endfunction

  function automatic logic [COEF_W-1:0] red_q(logic [PROD_W-1:0] t,
                                              logic [COEF_W-1:0] qq,
                                              logic [COEF_W-1:0] qi,
                                              logic pk);
    if (pk)
      return {mont12(t[PROD_W-1:COEF_W], qq[HALF_W-1:0], qi[HALF_W-1:0]),
              mont12(t[COEF_W-1:0], qq[HALF_W-1:0], qi[HALF_W-1:0])};
    return mont24(t, qq, qi);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1  <= 1'b0;
      op1 <= JOP_NOP;
      pk1 <= 1'b0;
      q1  <= '0;
      qi1 <= '0;
      for (int l = 0; l < LANES; l++) begin
        p1[l] <= '0;
        u1[l] <= '0;
        c1[l] <= '0;
      end
    end else begin
      v1  <= in_valid;
      op1 <= in_valid ? op : JOP_NOP;
      pk1 <= packed_mode;
      q1  <= q;
      qi1 <= qinv;
      for (int l = 0; l < LANES; l++) begin
        u1[l] <= x[l];
        c1[l] <= '0;
        unique case (op)
          JOP_ADD:   p1[l] <= PROD_W'(add_q(x[l], y[l], q, packed_mode));
          JOP_SUB:   p1[l] <= PROD_W'(sub_q(x[l], y[l], q, packed_mode));
          JOP_MUL:   p1[l] <= mul_packed(x[l], y[l], packed_mode);
          JOP_RED:   p1[l] <= fb[l];
          JOP_MMUL:  p1[l] <= mul_packed(x[l], w[l], packed_mode);
          JOP_BF_CT: p1[l] <= mul_packed(y[l], w[l], packed_mode);
          JOP_BF_GS: begin
            u1[l] <= add_q(x[l], y[l], q, packed_mode);
            p1[l] <= mul_packed(sub_q(x[l], y[l], q, packed_mode), w[l], packed_mode);
          end
          JOP_AND:   p1[l] <= PROD_W'(x[l] & y[l]);
          JOP_CMP: begin
            p1[l] <= PROD_W'(x[l]);
            // borrow of the subtraction x - y
            if (packed_mode) begin
              c1[l][0] <= x[l][HALF_W-1:0] < y[l][HALF_W-1:0];
              c1[l][1] <= x[l][2*HALF_W-1:HALF_W] < y[l][2*HALF_W-1:HALF_W];
            end else begin
              c1[l][0] <= x[l] < y[l];
            end
          end
          default:   p1[l] <= '0;
        endcase
      end
    end
  end

  // ------------------------------------------------------------- stage 2
  // Montgomery reduction of the product for the multiplying operations.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v2  <= 1'b0;
      op2 <= JOP_NOP;
      pk2 <= 1'b0;
      q2  <= '0;
      for (int l = 0; l < LANES; l++) begin
        p2[l] <= '0;
        u2[l] <= '0;
        c2[l] <= '0;
      end
    end else begin
      v2  <= v1;
      op2 <= op1;
      pk2 <= pk1;
      q2  <= q1;
      for (int l = 0; l < LANES; l++) begin
        u2[l] <= u1[l];
        c2[l] <= c1[l];
        if (op1 inside {JOP_RED, JOP_MMUL, JOP_BF_CT, JOP_BF_GS})
          p2[l] <= PROD_W'(red_q(p1[l], q1, qi1, pk1));
        else
          p2[l] <= p1[l];
      end
    end
  end

  // ------------------------------------------------------------- stage 3
  // Butterfly outputs; everything else passes through.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int l = 0; l < LANES; l++) begin
        r0[l]  <= '0;
        r1[l]  <= '0;
        cmp[l] <= '0;
      end
    end else begin
      out_valid <= v2;
      for (int l = 0; l < LANES; l++) begin
        cmp[l] <= c2[l];
        r1[l]  <= '0;
        if (op2 == JOP_BF_CT) begin
          r0[l] <= PROD_W'(add_q(u2[l], p2[l][COEF_W-1:0], q2, pk2));
          r1[l] <= sub_q(u2[l], p2[l][COEF_W-1:0], q2, pk2);
        end else if (op2 == JOP_BF_GS) begin
          r0[l] <= PROD_W'(u2[l]);
          r1[l] <= p2[l][COEF_W-1:0];
        end else begin
          r0[l] <= p2[l];
        end
      end
    end
  end

endmodule
