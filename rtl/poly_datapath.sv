// poly_datapath: the JPAU cluster with its memories and operand multiplexers.
//
// NJ JPAUs (two lanes each, NU = 2*NJ lanes) work in lock-step on one
// operation issued per cycle by the UPCU. Around them sit the polynomial SRAM
// (poly_mem, one coefficient per address), the temporary product store
// (poly_mem of 48-bit words) and the twiddle ROM. The coefficient SRAM has
// NP = 4*NJ "coefficient ports": unpacked lane u reads operand A through
// port 2u and operand B through port 2u, and writes its two results r0/r1
// through ports 2u and 2u+1; in packed (Kyber) mode lane u reads and writes
// ports 2u and 2u+1, one 12-bit coefficient each.
//
// Timing: an issue in cycle t reads the SRAM, product store and ROM at the end
// of t; the JPAUs take the operands in t+1; results sit in the JPAU output
// registers in t+4, when the issue's write-back (wb_* and tmp_w*, delayed
// here by four cycles) stores them. The sample path (sw_*) writes JPAU 0's
// current results without delay; the UPCU uses it after a compare, and reads
// JPAU 0's compare port (cmp0) to decide what to keep. A host port (one extra
// read and write port on the SRAM) loads and unloads polynomials.
//
// Per the architecture description: several identical JPAUs, a temporary
// register outside the JPAU from which products are fed back for reduction,
// the twiddle ROM and multiplexers under UPCU control. Port mapping, latency
// and the host port are this design's.
module poly_datapath
  import pqc_pkg::*;
#(
  parameter int unsigned NJ = 8,
  localparam int unsigned NU = 2 * NJ,
  localparam int unsigned NP = 4 * NJ,
  localparam int unsigned TMP_AW = $clog2(NMAX)
) (
  input  logic                clk,
  input  logic                rst_n,
  // issue from the UPCU
  input  logic                iss_valid,
  input  jop_e                iss_op,
  input  logic                iss_pk,
  input  logic [COEF_W-1:0]   iss_q,
  input  logic [COEF_W-1:0]   iss_qinv,
  input  xsrc_e               iss_xsrc,
  input  logic                iss_ycon_sel,   // y from iss_ycon, not SRAM
  input  logic [COEF_W-1:0]   iss_ycon,
  input  logic                iss_wcon_sel,   // w from iss_wcon, not ROM
  input  logic [COEF_W-1:0]   iss_wcon,
  input  logic                iss_wneg,       // use q - w
  input  logic [63:0]         iss_kam,
  input  logic [MEM_AW-1:0]   ra_addr   [NP],
  input  logic [MEM_AW-1:0]   rb_addr   [NP],
  input  logic [TW_AW-1:0]    tw_addr   [NU],
  input  logic [TMP_AW-1:0]   tmp_raddr [NU],
  input  logic                wb_en     [NP],
  input  logic [MEM_AW-1:0]   wb_addr   [NP],
  input  logic                tmp_wen   [NU],
  input  logic [TMP_AW-1:0]   tmp_waddr [NU],
  // undelayed sample write from JPAU 0
  input  logic                sw_en     [4],
  input  logic [MEM_AW-1:0]   sw_addr   [4],
  output logic                res0_valid,
  output logic [1:0]          cmp0      [2],
  // host access
  input  logic                host_we,
  input  logic [MEM_AW-1:0]   host_waddr,
  input  logic [COEF_W-1:0]   host_wdata,
  input  logic [MEM_AW-1:0]   host_raddr,
  output logic [COEF_W-1:0]   host_rdata
);

  localparam int unsigned D = JPAU_LAT + 1;  // issue to write-back

  // ------------------------------------------------------------ memories
  logic [MEM_AW-1:0] m_raddr [2*NP+1];
  logic [COEF_W-1:0] m_rdata [2*NP+1];
  logic              m_we    [NP+1];
  logic [MEM_AW-1:0] m_waddr [NP+1];
  logic [COEF_W-1:0] m_wdata [NP+1];

  poly_mem #(.WIDTH(COEF_W), .DEPTH(NSLOT * NMAX), .NR(2 * NP + 1), .NW(NP + 1)) u_sram (
    .clk, .raddr(m_raddr), .rdata(m_rdata), .we(m_we), .waddr(m_waddr), .wdata(m_wdata));

  logic [PROD_W-1:0] t_rdata [NU];
  logic [PROD_W-1:0] t_wdata [NU];
  logic              t_we    [NU];
  logic [TMP_AW-1:0] t_waddr [NU];

  poly_mem #(.WIDTH(PROD_W), .DEPTH(NMAX), .NR(NU), .NW(NU)) u_tmp (
    .clk, .raddr(tmp_raddr), .rdata(t_rdata), .we(t_we), .waddr(t_waddr), .wdata(t_wdata));

  logic [COEF_W-1:0] tw_data [NU];
  twiddle_rom #(.NPORT(NU)) u_rom (.clk, .addr(tw_addr), .data(tw_data));

  always_comb begin
    for (int p = 0; p < NP; p++) begin
      m_raddr[p]      = ra_addr[p];
      m_raddr[NP + p] = rb_addr[p];
    end
    m_raddr[2*NP] = host_raddr;
  end
  assign host_rdata = m_rdata[2*NP];

  // ------------------------------------------------ control delay line
  typedef struct packed {
    logic              valid;
    jop_e              op;
    logic              pk;
    logic [COEF_W-1:0] q;
    logic [COEF_W-1:0] qinv;
    xsrc_e             xsrc;
    logic              ycon_sel;
    logic [COEF_W-1:0] ycon;
    logic              wcon_sel;
    logic [COEF_W-1:0] wcon;
    logic              wneg;
    logic [63:0]       kam;
  } ctl_t;

  ctl_t c1;   // aligned with the memory read data
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) c1 <= '0;
    else c1 <= '{valid: iss_valid, op: iss_op, pk: iss_pk, q: iss_q, qinv: iss_qinv,
                 xsrc: iss_xsrc, ycon_sel: iss_ycon_sel, ycon: iss_ycon,
                 wcon_sel: iss_wcon_sel, wcon: iss_wcon, wneg: iss_wneg, kam: iss_kam};
  end

  // write-back controls and the packing flag, delayed to the result cycle
  logic              wbd_en   [D][NP];
  logic [MEM_AW-1:0] wbd_addr [D][NP];
  logic              tmd_en   [D][NU];
  logic [TMP_AW-1:0] tmd_addr [D][NU];
  logic              pkd      [D];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < D; s++) begin
        pkd[s] <= 1'b0;
        for (int p = 0; p < NP; p++) begin wbd_en[s][p] <= 1'b0; wbd_addr[s][p] <= '0; end
        for (int u = 0; u < NU; u++) begin tmd_en[s][u] <= 1'b0; tmd_addr[s][u] <= '0; end
      end
    end else begin
      pkd[0] <= iss_pk;
      for (int p = 0; p < NP; p++) begin
        wbd_en[0][p]   <= iss_valid & wb_en[p];
        wbd_addr[0][p] <= wb_addr[p];
      end
      for (int u = 0; u < NU; u++) begin
        tmd_en[0][u]   <= iss_valid & tmp_wen[u];
        tmd_addr[0][u] <= tmp_waddr[u];
      end
      for (int s = 1; s < D; s++) begin
        pkd[s]      <= pkd[s-1];
        wbd_en[s]   <= wbd_en[s-1];
        wbd_addr[s] <= wbd_addr[s-1];
        tmd_en[s]   <= tmd_en[s-1];
        tmd_addr[s] <= tmd_addr[s-1];
      end
    end
  end

  // ------------------------------------------------------- JPAU cluster
  logic [COEF_W-1:0] jx  [NU], jy [NU], jw [NU];
  logic [PROD_W-1:0] jr0 [NU];
  logic [COEF_W-1:0] jr1 [NU];
  logic [1:0]        jcmp [NU];
  logic              jvalid [NJ];

  always_comb begin
    for (int u = 0; u < NU; u++) begin
      logic [COEF_W-1:0] a_mem, b_mem, wr;
      if (c1.pk) begin
        a_mem = {m_rdata[2*u+1][HALF_W-1:0], m_rdata[2*u][HALF_W-1:0]};
        b_mem = {m_rdata[NP+2*u+1][HALF_W-1:0], m_rdata[NP+2*u][HALF_W-1:0]};
      end else begin
        a_mem = m_rdata[2*u];
        b_mem = m_rdata[NP+2*u];
      end
      unique case (c1.xsrc)
        XS_KAM:  jx[u] = (u < 2) ? c1.kam[COEF_W*(u%2) +: COEF_W] : '0;
        XS_FB:   jx[u] = jr0[u][COEF_W-1:0];
        default: jx[u] = a_mem;
      endcase
      jy[u] = c1.ycon_sel ? c1.ycon : b_mem;
      wr    = c1.wcon_sel ? c1.wcon : tw_data[u];
      jw[u] = (c1.wneg && wr != '0) ? c1.q - wr : wr;
    end
  end

  for (genvar j = 0; j < NJ; j++) begin : g_jpau
    jpau #(.LANES(2)) u_jpau (
      .clk, .rst_n,
      .in_valid   (c1.valid),
      .op         (c1.op),
      .packed_mode(c1.pk),
      .q          (c1.q),
      .qinv       (c1.qinv),
      .x          (jx[2*j +: 2]),
      .y          (jy[2*j +: 2]),
      .w          (jw[2*j +: 2]),
      .fb         (t_rdata[2*j +: 2]),
      .out_valid  (jvalid[j]),
      .r0         (jr0[2*j +: 2]),
      .r1         (jr1[2*j +: 2]),
      .cmp        (jcmp[2*j +: 2]));
  end

  assign res0_valid = jvalid[0];
  assign cmp0[0]    = jcmp[0];
  assign cmp0[1]    = jcmp[1];

  // ------------------------------------------------------------ write-back
  // coefficient written through port p by the result now in the JPAUs
  function automatic logic [COEF_W-1:0] port_data(int unsigned p, logic pk);
    int unsigned u;
    u = p / 2;
    if (pk) return COEF_W'(jr0[u][HALF_W*(p%2) +: HALF_W]);
    return (p % 2 == 0) ? jr0[u][COEF_W-1:0] : jr1[u];
  endfunction

  always_comb begin
    for (int p = 0; p < NP; p++) begin
      m_we[p]    = wbd_en[D-1][p];
      m_waddr[p] = wbd_addr[D-1][p];
      if (p < 4 && sw_en[p]) begin
        m_we[p]    = 1'b1;
        m_waddr[p] = sw_addr[p];
      end
      m_wdata[p] = port_data(p, pkd[D-1]);
    end
    m_we[NP]    = host_we;
    m_waddr[NP] = host_waddr;
    m_wdata[NP] = host_wdata;
    for (int u = 0; u < NU; u++) begin
      t_we[u]    = tmd_en[D-1][u];
      t_waddr[u] = tmd_addr[D-1][u];
      t_wdata[u] = jr0[u];
    end
  end

endmodule
