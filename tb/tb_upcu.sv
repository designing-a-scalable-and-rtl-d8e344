// tb_upcu: runs every UPCU polynomial function on the real polynomial
// datapath and checks the SRAM contents against software models written here.
//
// For Dilithium, Kyber and Falcon-512/1024 it loads random polynomials through
// the host port, then checks ADD, SUB, PMUL (a*b*R^-1, R = 2^24, or 2^12 per
// packed Kyber coefficient), NTT against a textbook iterative transform with
// plain modular arithmetic, INTT back to the input, and SAMPLE against an
// independent rejection sampler fed by the same random KAM words (delivered
// with random gaps). Cycle counts of ADD and NTT are checked against the
// issue rate of NU lanes per cycle.
module tb_upcu;
  import pqc_pkg::*;

  localparam int NJ = 8;
  localparam int NU = 2 * NJ, NP = 4 * NJ, TMP_AW = $clog2(NMAX);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done;
  pfunc_e func; scheme_e scheme; sec_t sec;
  logic [2:0] src_a, src_b, dst;
  logic kam_valid, kam_pop; logic [63:0] kam_data;
  logic res0_valid; logic [1:0] cmp0 [2];
  logic draining;
  logic iss_valid; jop_e iss_op; logic iss_pk; logic [COEF_W-1:0] iss_q, iss_qinv;
  xsrc_e iss_xsrc; logic iss_ycon_sel, iss_wcon_sel, iss_wneg;
  logic [COEF_W-1:0] iss_ycon, iss_wcon; logic [63:0] iss_kam;
  logic [MEM_AW-1:0] ra_addr [NP], rb_addr [NP], wb_addr [NP], sw_addr [4];
  logic [TW_AW-1:0] tw_addr [NU];
  logic [TMP_AW-1:0] tmp_raddr [NU], tmp_waddr [NU];
  logic wb_en [NP], tmp_wen [NU], sw_en [4];
  logic host_we; logic [MEM_AW-1:0] host_waddr, host_raddr;
  logic [COEF_W-1:0] host_wdata, host_rdata;

  upcu #(.NJ(NJ)) dut (.*);
  poly_datapath #(.NJ(NJ)) u_dp (.*);

  int checks = 0, failures = 0;

  // ---------------------------------------------------------- KAM model
  logic [63:0] kam_stream [$];
  int          kam_rd;
  always @(posedge clk) begin
    if (kam_pop) kam_rd <= kam_rd + 1;
  end
  always_comb begin
    kam_data  = (kam_rd < kam_stream.size()) ? kam_stream[kam_rd] : 64'd0;
  end
  always @(negedge clk) kam_valid <= (kam_rd < kam_stream.size()) && ($urandom % 4 != 0);

  // ------------------------------------------------------------- helpers
  logic [63:0] pa [NMAX], pb [NMAX], pr [NMAX], ex [NMAX];

  task automatic host_write(int slot, int n, ref logic [63:0] v [NMAX]);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      host_we = 1; host_waddr = MEM_AW'(slot * NMAX + i); host_wdata = v[i][23:0];
    end
    @(negedge clk) host_we = 0;
  endtask

  task automatic host_read(int slot, int n, ref logic [63:0] v [NMAX]);
    for (int i = 0; i < n; i++) begin
      @(negedge clk) host_raddr = MEM_AW'(slot * NMAX + i);
      @(negedge clk) v[i] = 64'(host_rdata);
    end
  endtask

  task automatic run(pfunc_e f, scheme_e s, sec_t l, int a, int b, int d, output int cyc);
    @(negedge clk);
    func = f; scheme = s; sec = l; src_a = 3'(a); src_b = 3'(b); dst = 3'(d); start = 1;
    @(negedge clk) start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
  endtask

  task automatic compare(string what, int n, ref logic [63:0] got [NMAX], ref logic [63:0] e [NMAX]);
    int bad;
    bad = 0;
    for (int i = 0; i < n; i++) if (got[i] != e[i]) begin
      if (bad < 4) $display("FAIL %s [%0d] got %0d exp %0d", what, i, got[i], e[i]);
      bad++;
    end
    checks++;
    if (bad != 0) failures++;
  endtask

  function automatic logic [63:0] powm(logic [63:0] b, logic [63:0] e, logic [63:0] m);
    logic [63:0] r;
    r = 1;
    for (int i = 0; i < 64; i++) begin
      if (e[i]) r = (r * b) % m;
      b = (b * b) % m;
    end
    return r;
  endfunction

  function automatic int bitrev(int v, int bits);
    int r;
    r = 0;
    for (int i = 0; i < bits; i++) if (v & (1 << i)) r |= 1 << (bits - 1 - i);
    return r;
  endfunction

  // Reference forward transform, zeta table built from the root directly.
  task automatic ref_ntt(ref logic [63:0] v [NMAX], input int n, input logic [63:0] q,
                         input logic [63:0] root, input int zbits, input int minlen);
    int k, len, j, start_i;
    logic [63:0] z, t;
    k = 0;
    for (len = n / 2; len >= minlen; len = len / 2) begin
      for (start_i = 0; start_i < n; start_i = j + len) begin
        k++;
        z = powm(root, bitrev(k, zbits), q);
        for (j = start_i; j < start_i + len; j++) begin
          t = (z * v[j + len]) % q;
          v[j + len] = (v[j] + q - t) % q;
          v[j] = (v[j] + t) % q;
        end
      end
    end
  endtask

  int cyc;
  int sample_runs;

  task automatic test_scheme(scheme_e s, sec_t l);
    int n, zbits, minlen, cbits, na, acc_cnt;
    logic [63:0] q, root, rinv, r;
    logic pk;
    q  = 64'(q_of(s));
    n  = 1 << logn_of(s, l);
    pk = (s == SCH_KYBER);
    case (s)
      SCH_KYBER:     begin root = 17;   zbits = 7;  minlen = 2; end
      SCH_DILITHIUM: begin root = 1753; zbits = 8;  minlen = 1; end
      default:       begin root = (n == 512) ? 49 : 7; zbits = logn_of(s, l); minlen = 1; end
    endcase
    for (int i = 0; i < n; i++) begin pa[i] = {$urandom, $urandom} % q; pb[i] = {$urandom, $urandom} % q; end
    host_write(0, n, pa);
    host_write(1, n, pb);

    // ADD, SUB
    run(PF_ADD, s, l, 0, 1, 2, cyc);
    for (int i = 0; i < n; i++) ex[i] = (pa[i] + pb[i]) % q;
    host_read(2, n, pr); compare("ADD", n, pr, ex);
    checks++;
    // issue cycles, the start cycle and the drain
    if (cyc != n / (pk ? NP : NU) + JPAU_LAT + 2) begin
      failures++; $display("FAIL ADD cycles %0d", cyc);
    end
    run(PF_SUB, s, l, 0, 1, 3, cyc);
    for (int i = 0; i < n; i++) ex[i] = (pa[i] + q - pb[i]) % q;
    host_read(3, n, pr); compare("SUB", n, pr, ex);

    // PMUL
    run(PF_PMUL, s, l, 0, 1, 4, cyc);
    r = pk ? 4096 : (64'd1 << 24);
    rinv = powm(r % q, q - 2, q);
    for (int i = 0; i < n; i++) ex[i] = (((pa[i] * pb[i]) % q) * rinv) % q;
    host_read(4, n, pr); compare("PMUL", n, pr, ex);

    // NTT and INTT
    run(PF_NTT, s, l, 0, 0, 5, cyc);
    for (int i = 0; i < n; i++) ex[i] = pa[i];
    ref_ntt(ex, n, q, root, zbits, minlen);
    host_read(5, n, pr); compare("NTT", n, pr, ex);
    na = 0;
    for (int len = n / 2; len >= minlen; len /= 2) na++;
    checks++;
    if (cyc != na * (n / 2 / NU + JPAU_LAT + 1) + 2) begin
      failures++; $display("FAIL NTT cycles %0d layers %0d", cyc, na);
    end
    run(PF_INTT, s, l, 5, 5, 6, cyc);
    host_read(6, n, pr); compare("INTT", n, pr, pa);

    // SAMPLE
    kam_stream.delete();
    @(negedge clk);
    kam_rd = 0;
    for (int i = 0; i < 4 * n; i++) kam_stream.push_back({$urandom, $urandom});
    run(PF_SAMPLE, s, l, 0, 0, 7, cyc);
    sample_runs++;
    acc_cnt = 0;
    cbits = pk ? 12 : (s == SCH_DILITHIUM) ? 23 : 14;
    for (int w = 0; w < kam_stream.size() && acc_cnt < n; w++) begin
      for (int c = 0; c < (pk ? 4 : 2); c++) begin
        logic [63:0] cand;
        cand = (kam_stream[w] >> (c * (pk ? 12 : 24))) & ((64'd1 << cbits) - 1);
        if (cand < q && acc_cnt < n) begin ex[acc_cnt] = cand; acc_cnt++; end
      end
    end
    host_read(7, n, pr); compare("SAMPLE", n, pr, ex);
    $display("scheme %s level %0d done (checks %0d failures %0d)", s.name(), l, checks, failures);
  endtask

  initial begin
    start = 0; func = PF_NONE; scheme = SCH_KYBER; sec = 0; src_a = 0; src_b = 0; dst = 0;
    host_we = 0; host_waddr = 0; host_wdata = 0; host_raddr = 0; kam_rd = 0; sample_runs = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    test_scheme(SCH_DILITHIUM, 2'd0);
    test_scheme(SCH_KYBER, 2'd0);
    test_scheme(SCH_FALCON, 2'd0);
    test_scheme(SCH_FALCON, 2'd1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
