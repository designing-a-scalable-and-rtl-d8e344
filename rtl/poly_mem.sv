// poly_mem: multi-ported synchronous RAM for polynomial coefficients.
//
// A flat array of DEPTH words of WIDTH bits with NR read ports and NW write
// ports, all usable in the same cycle. Reads are registered: the word at
// raddr appears on rdata one clock later (a read of a word written in the
// same cycle returns the old value). Writes to the same address from several
// ports in one cycle resolve to the highest-numbered port; the controller
// never issues such writes. The accelerator uses one instance as the
// polynomial SRAM (24-bit coefficients, NSLOT polynomial slots of NMAX
// coefficients) and one as the temporary store that holds 48-bit products
// until the JPAUs reduce them.
//
// The architecture description names the SRAM and the temporary register but
// gives no organisation; the flat multi-ported array is this design's choice,
// made so that any lane can reach any coefficient without bank conflicts.
module poly_mem #(
  parameter int unsigned WIDTH = 24,
  parameter int unsigned DEPTH = 8192,
  parameter int unsigned NR    = 4,
  parameter int unsigned NW    = 2,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic [AW-1:0]    raddr [NR],
  output logic [WIDTH-1:0] rdata [NR],
  input  logic             we    [NW],
  input  logic [AW-1:0]    waddr [NW],
  input  logic [WIDTH-1:0] wdata [NW]
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    for (int r = 0; r < NR; r++) rdata[r] <= mem[raddr[r]];
    for (int w = 0; w < NW; w++)
      if (we[w]) mem[waddr[w]] <= wdata[w];
  end

endmodule
