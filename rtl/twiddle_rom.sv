// twiddle_rom: NTT twiddle factors for every supported scheme.
//
// Holds the four per-scheme tables described in pqc_pkg (Kyber, Dilithium,
// Falcon-512, Falcon-1024; 1920 words of 24 bits), each entry
// zeta^brv(k) * 2^24 mod q, i.e. in Montgomery form so that a JPAU Montgomery
// product with it yields an exact multiplication by zeta. The contents are
// computed at elaboration by pqc_pkg::tw_entry rather than loaded from a file.
// NPORT independent read ports, one per unpacked JPAU lane; reads are
// registered (one cycle latency), like a synchronous ROM macro.
//
// A ROM attached to the JPAUs that serves each scheme's own q and NTT follows
// the architecture description; the table layout, the Montgomery form and the
// port count are this design's choices.
module twiddle_rom
  import pqc_pkg::*;
#(
  parameter int unsigned NPORT = 16
) (
  input  logic                clk,
  input  logic [TW_AW-1:0]    addr [NPORT],
  output logic [COEF_W-1:0]   data [NPORT]
);

  typedef logic [COEF_W-1:0] table_t [TW_DEPTH];

  function automatic table_t build_table();
    table_t t;
    for (int unsigned i = 0; i < TW_DEPTH; i++) t[i] = tw_entry(i);
    return t;
  endfunction

  localparam table_t TABLE = build_table();

  always_ff @(posedge clk) begin
    for (int p = 0; p < NPORT; p++)
      data[p] <= (addr[p] < TW_AW'(TW_DEPTH)) ? TABLE[addr[p]] : '0;
  end

endmodule
