// tb_twiddle_rom: checks every ROM word against a root-of-unity table built
// here by repeated multiplication (not exponentiation), and checks that each
// table's root has the expected order (zeta^(N) = -1 for the complete NTTs,
// 17^128 = -1 for Kyber). Reads are checked one cycle after the address.
module tb_twiddle_rom;
  import pqc_pkg::*;

  localparam int NP = 4;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [TW_AW-1:0]  addr [NP];
  logic [COEF_W-1:0] data [NP];
  int checks = 0, failures = 0;

  twiddle_rom #(.NPORT(NP)) dut (.clk, .addr, .data);

  // expected word for table (q, root, bits) at index k
  function automatic logic [63:0] expect_word(logic [63:0] q, logic [63:0] root, int bits, int k);
    logic [63:0] p, r24;
    int e;
    e = 0;
    for (int i = 0; i < bits; i++) if (k & (1 << i)) e |= 1 << (bits - 1 - i);
    p = 1;
    for (int i = 0; i < e; i++) p = (p * root) % q;
    r24 = (64'd1 << 24) % q;
    return (p * r24) % q;
  endfunction

  function automatic logic [63:0] powr(logic [63:0] b, int e, logic [63:0] q);
    logic [63:0] p;
    p = 1;
    for (int i = 0; i < e; i++) p = (p * b) % q;
    return p;
  endfunction

  initial begin
    logic [63:0] exp_w [NP];
    int base [4], bits [4];
    logic [63:0] qs [4], roots [4];
    base[0] = 0;   bits[0] = 7;  qs[0] = 3329;    roots[0] = 17;
    base[1] = 128; bits[1] = 8;  qs[1] = 8380417; roots[1] = 1753;
    base[2] = 384; bits[2] = 9;  qs[2] = 12289;   roots[2] = 49;
    base[3] = 896; bits[3] = 10; qs[3] = 12289;   roots[3] = 7;
    // order of the roots
    for (int t = 0; t < 4; t++) begin
      checks++;
      if (powr(roots[t], 1 << bits[t], qs[t]) != qs[t] - 1) begin
        failures++; $display("FAIL root order table %0d", t);
      end
    end
    for (int t = 0; t < 4; t++) begin
      for (int k = 0; k < (1 << bits[t]); k += NP) begin
        @(negedge clk);
        for (int p = 0; p < NP; p++) begin
          addr[p] = TW_AW'(base[t] + k + p);
          exp_w[p] = expect_word(qs[t], roots[t], bits[t], k + p);
        end
        @(negedge clk);
        for (int p = 0; p < NP; p++) begin
          checks++;
          if (64'(data[p]) != exp_w[p]) begin
            failures++;
            if (failures < 10) $display("FAIL table %0d k=%0d got %0d exp %0d", t, k + p, data[p], exp_w[p]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
