// tb_workloads: runs the polynomial and hash kernels of the evaluated parameter sets
// on the top level at its default size, as far as the built functions reach,
// and reports their cycle counts.
//
//  * Dilithium2/3/5: one row of the matrix-vector product A*y with l = 4, 5
//    and 7 polynomials of N = 256: NTT of a_j and y_j, pointwise product,
//    accumulation, inverse NTT. Checked against a schoolbook negacyclic
//    product (the result carries the Montgomery factor R^-1, R = 2^24).
//  * Falcon-512/1024: the product s2*h of signature verification, through the
//    NTT, pointwise product and inverse NTT, checked the same way.
//  * Kyber512/768/1024: NTT and inverse NTT of the k = 2, 3, 4 polynomials of
//    a secret vector, and the packed vector addition, checked exactly. (The
//    NTT-domain base multiplication of Kyber is not built.)
//  * SPHINCS+-256s: one WOTS+ hash chain of 15 steps. Each step is the tweakable
//    hash F = SHAKE256(PK.seed || ADRS || M) with n = 32, a 96-byte message
//    sent to the KAM as a 64-byte and a 32-byte chunk (cmd 1); the host pops
//    the 32-byte result and uses it as the next M. Checked against a Keccak
//    model written here.
// Polynomials are written and read through the host memory port with direct
// polynomial functions (cmd 0); hashes use direct KAM operations (cmd 1).
module tb_workloads;
  import pqc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cmd_valid, cmd_ready, cmd_done, upcu_busy, kam_busy;
  logic [1:0] cmd;
  scheme_e scheme; sec_t sec; pfunc_e pfunc;
  logic [2:0] src_a, src_b, dst;
  kop_e kop; logic [511:0] msg; logic [7:0] msg_len; logic msg_cont, msg_more;
  logic [255:0] seed, rnd_out;
  logic host_mem_we; logic [MEM_AW-1:0] host_mem_waddr, host_mem_raddr;
  logic [COEF_W-1:0] host_mem_wdata, host_mem_rdata;
  logic kam_buf_valid, kam_host_pop; logic [63:0] kam_buf_data;
  logic mon_packed, mon_feedback, mon_bfly, mon_scale, mon_drain, mon_join;

  pqc_top dut (.*);

  int checks = 0, failures = 0;
  longint cycles;
  always @(posedge clk) cycles++;

  logic [63:0] pa [NMAX], pb [NMAX], acc [NMAX], ex [NMAX];

  function automatic logic [63:0] powm(logic [63:0] b, logic [63:0] e, logic [63:0] q);
    logic [63:0] r;
    r = 1;
    for (int i = 0; i < 64; i++) begin
      if (e[i]) r = (r * b) % q;
      b = (b * b) % q;
    end
    return r;
  endfunction

  task automatic rand_poly(ref logic [63:0] v [NMAX], input int n, input logic [63:0] q);
    for (int i = 0; i < n; i++) v[i] = {$urandom, $urandom} % q;
  endtask

  task automatic load(int slot, int n, ref logic [63:0] v [NMAX]);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      host_mem_we = 1; host_mem_waddr = MEM_AW'(slot * NMAX + i); host_mem_wdata = v[i][23:0];
    end
    @(negedge clk) host_mem_we = 0;
  endtask

  task automatic check_slot(string what, int slot, int n, ref logic [63:0] e [NMAX]);
    int bad;
    bad = 0;
    for (int i = 0; i < n; i++) begin
      @(negedge clk) host_mem_raddr = MEM_AW'(slot * NMAX + i);
      @(negedge clk);
      if (64'(host_mem_rdata) != e[i]) begin
        if (bad < 4) $display("FAIL %s [%0d] got %0d exp %0d", what, i, host_mem_rdata, e[i]);
        bad++;
      end
    end
    checks++;
    if (bad != 0) failures++;
  endtask

  // ----------------------------------------------------------- Keccak model
  localparam logic [63:0] RCT [24] = '{
    64'h0000000000000001, 64'h0000000000008082, 64'h800000000000808A, 64'h8000000080008000,
    64'h000000000000808B, 64'h0000000080000001, 64'h8000000080008081, 64'h8000000000008009,
    64'h000000000000008A, 64'h0000000000000088, 64'h0000000080008009, 64'h000000008000000A,
    64'h000000008000808B, 64'h800000000000008B, 64'h8000000000008089, 64'h8000000000008003,
    64'h8000000000008002, 64'h8000000000000080, 64'h000000000000800A, 64'h800000008000000A,
    64'h8000000080008081, 64'h8000000000008080, 64'h0000000080000001, 64'h8000000080008008};
  localparam int RHO [5][5] = '{'{0, 36, 3, 41, 18}, '{1, 44, 10, 45, 2}, '{62, 6, 43, 15, 61},
                                '{28, 55, 25, 21, 56}, '{27, 20, 39, 8, 14}};
  logic [63:0] m [5][5];

  function automatic logic [63:0] rl(logic [63:0] v, int n);
    return (n == 0) ? v : ((v << n) | (v >> (64 - n)));
  endfunction

  task automatic perm();
    logic [63:0] c [5], b [5][5];
    for (int r = 0; r < 24; r++) begin
      for (int x = 0; x < 5; x++) c[x] = m[x][0] ^ m[x][1] ^ m[x][2] ^ m[x][3] ^ m[x][4];
      for (int x = 0; x < 5; x++)
        for (int y = 0; y < 5; y++) m[x][y] ^= c[(x + 4) % 5] ^ rl(c[(x + 1) % 5], 1);
      for (int x = 0; x < 5; x++)
        for (int y = 0; y < 5; y++) b[y][(2 * x + 3 * y) % 5] = rl(m[x][y], RHO[x][y]);
      for (int x = 0; x < 5; x++)
        for (int y = 0; y < 5; y++) m[x][y] = b[x][y] ^ (~b[(x + 1) % 5][y] & b[(x + 2) % 5][y]);
      m[0][0] ^= RCT[r];
    end
  endtask

  // SHAKE of a byte string of any length
  task automatic shake_bytes(kop_e o, ref logic [7:0] bs [$], input int nlanes, ref logic [63:0] out [$]);
    logic [7:0] blk [$];
    int rate;
    rate = (o == KOP_SHAKE128) ? 168 : 136;
    blk = bs;
    blk.push_back(8'h1F);
    while (blk.size() % rate != 0) blk.push_back(8'h00);
    blk[blk.size() - 1] ^= 8'h80;
    for (int x = 0; x < 5; x++) for (int y = 0; y < 5; y++) m[x][y] = 0;
    for (int b = 0; b < blk.size() / rate; b++) begin
      for (int i = 0; i < rate; i++)
        m[(i / 8) % 5][(i / 8) / 5][8 * (i % 8) +: 8] ^= blk[b * rate + i];
      perm();
    end
    out.delete();
    while (1) begin
      for (int l = 0; l < rate / 8; l++) out.push_back(m[l % 5][l / 5]);
      if (out.size() >= nlanes) break;
      perm();
    end
  endtask

  // one direct polynomial function; returns its cycle count
  task automatic poly(scheme_e s, sec_t l, pfunc_e f, int a, int b, int d, inout longint cyc);
    longint t0;
    int n;
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
    cmd = 2'd0; scheme = s; sec = l; pfunc = f; src_a = 3'(a); src_b = 3'(b); dst = 3'(d);
    cmd_valid = 1; t0 = cycles;
    @(negedge clk) cmd_valid = 0;
    n = 0;
    while (!cmd_done && n < 100000) begin @(negedge clk); n++; end
    if (!cmd_done) begin failures++; $display("FAIL %s timed out", f.name()); end
    cyc += cycles - t0;
  endtask

  // acc += a*b in Z_q[x]/(x^n + 1)
  task automatic negacyclic_mac(int n, logic [63:0] q);
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++) begin
        logic [63:0] p;
        p = (pa[i] * pb[j]) % q;
        if (i + j < n) acc[i + j] = (acc[i + j] + p) % q;
        else           acc[i + j - n] = (acc[i + j - n] + q - p) % q;
      end
  endtask

  // one row of A*y for Dilithium with l columns
  task automatic dilithium_row(string name, int l);
    logic [63:0] q, rinv;
    longint cyc;
    int n;
    q = 64'(Q_DILITHIUM); n = 256; cyc = 0;
    rinv = powm((64'd1 << 24) % q, q - 2, q);
    for (int i = 0; i < n; i++) begin acc[i] = 0; ex[i] = 0; end
    load(5, n, ex);                                   // accumulator slot
    for (int j = 0; j < l; j++) begin
      rand_poly(pa, n, q); rand_poly(pb, n, q);
      load(0, n, pa); load(1, n, pb);
      poly(SCH_DILITHIUM, 0, PF_NTT, 0, 0, 2, cyc);
      poly(SCH_DILITHIUM, 0, PF_NTT, 1, 0, 3, cyc);
      poly(SCH_DILITHIUM, 0, PF_PMUL, 2, 3, 4, cyc);
      poly(SCH_DILITHIUM, 0, PF_ADD, 5, 4, 5, cyc);
      negacyclic_mac(n, q);
    end
    poly(SCH_DILITHIUM, 0, PF_INTT, 5, 0, 6, cyc);
    for (int i = 0; i < n; i++) ex[i] = (acc[i] * rinv) % q;
    check_slot(name, 6, n, ex);
    $display("%s: one row of A*y (l = %0d) in %0d cycles", name, l, cyc);
  endtask

  task automatic falcon_product(string name, sec_t lvl, int n);
    logic [63:0] q, rinv;
    longint cyc;
    q = 64'(Q_FALCON); cyc = 0;
    rinv = powm((64'd1 << 24) % q, q - 2, q);
    rand_poly(pa, n, q); rand_poly(pb, n, q);
    for (int i = 0; i < n; i++) acc[i] = 0;
    load(0, n, pa); load(1, n, pb);
    poly(SCH_FALCON, lvl, PF_NTT, 0, 0, 2, cyc);
    poly(SCH_FALCON, lvl, PF_NTT, 1, 0, 3, cyc);
    poly(SCH_FALCON, lvl, PF_PMUL, 2, 3, 4, cyc);
    poly(SCH_FALCON, lvl, PF_INTT, 4, 0, 5, cyc);
    negacyclic_mac(n, q);
    for (int i = 0; i < n; i++) ex[i] = (acc[i] * rinv) % q;
    check_slot(name, 5, n, ex);
    $display("%s: s2*h (N = %0d) in %0d cycles", name, n, cyc);
  endtask

  task automatic kyber_vector(string name, int k);
    logic [63:0] q;
    longint cyc;
    int n;
    q = 64'(Q_KYBER); n = 256; cyc = 0;
    for (int j = 0; j < k; j++) begin
      rand_poly(pa, n, q); rand_poly(pb, n, q);
      load(0, n, pa); load(1, n, pb);
      poly(SCH_KYBER, 2'(k - 2), PF_NTT, 0, 0, 2, cyc);
      poly(SCH_KYBER, 2'(k - 2), PF_INTT, 2, 0, 3, cyc);
      check_slot({name, " NTT/INTT"}, 3, n, pa);
      poly(SCH_KYBER, 2'(k - 2), PF_ADD, 0, 1, 4, cyc);
      for (int i = 0; i < n; i++) ex[i] = (pa[i] + pb[i]) % q;
      check_slot({name, " ADD"}, 4, n, ex);
    end
    $display("%s: NTT, INTT and packed ADD of k = %0d polynomials in %0d cycles", name, k, cyc);
  endtask

  task automatic kam_chunk(int off, int len, logic cont, logic more, ref logic [7:0] bs [$]);
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
    msg = '0;
    for (int i = 0; i < len; i++) msg[8*i +: 8] = bs[off + i];
    cmd = 2'd1; kop = KOP_SHAKE256; msg_len = 8'(len); msg_cont = cont; msg_more = more;
    cmd_valid = 1;
    @(negedge clk) cmd_valid = 0;
    while (!cmd_done) @(negedge clk);
    msg_cont = 0; msg_more = 0;
  endtask

  task automatic sphincs_chain(string name, int steps);
    logic [7:0] bs [$], mm [32];
    logic [63:0] lanes [$];
    longint t0, cyc;
    int bad;
    bad = 0;
    for (int i = 0; i < 32; i++) mm[i] = 8'($urandom);
    t0 = cycles;
    for (int st = 0; st < steps; st++) begin
      bs.delete();
      for (int i = 0; i < 32; i++) bs.push_back(8'(i * 7 + 1));     // PK.seed
      for (int i = 0; i < 32; i++) bs.push_back((i == 31) ? 8'(st) : 8'(i == 20)); // ADRS
      for (int i = 0; i < 32; i++) bs.push_back(mm[i]);
      kam_chunk(0, 64, 1'b0, 1'b1, bs);
      kam_chunk(64, 32, 1'b1, 1'b0, bs);
      shake_bytes(KOP_SHAKE256, bs, 4, lanes);
      for (int l = 0; l < 4; l++) begin
        while (!kam_buf_valid) @(negedge clk);
        if (kam_buf_data != lanes[l]) begin
          if (bad < 4) $display("FAIL %s step %0d lane %0d got %h exp %h", name, st, l, kam_buf_data, lanes[l]);
          bad++;
        end
        for (int i = 0; i < 8; i++) mm[8 * l + i] = kam_buf_data[8*i +: 8];
        kam_host_pop = 1;
        @(negedge clk) kam_host_pop = 0;
      end
    end
    cyc = cycles - t0;
    checks++;
    if (bad != 0) failures++;
    $display("%s: WOTS+ chain of %0d F calls (96-byte SHAKE256) in %0d cycles", name, steps, cyc);
  endtask

  initial begin
    cmd_valid = 0; cmd = 0; scheme = SCH_KYBER; sec = 0; pfunc = PF_NONE;
    src_a = 0; src_b = 0; dst = 0; kop = KOP_SHAKE128; msg = '0; msg_len = 0; msg_cont = 0; msg_more = 0; seed = '0;
    host_mem_we = 0; host_mem_waddr = 0; host_mem_wdata = 0; host_mem_raddr = 0; kam_host_pop = 0;
    cycles = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    dilithium_row("Dilithium2", 4);
    dilithium_row("Dilithium3", 5);
    dilithium_row("Dilithium5", 7);
    falcon_product("Falcon-512", 2'd0, 512);
    falcon_product("Falcon-1024", 2'd1, 1024);
    kyber_vector("Kyber512", 2);
    kyber_vector("Kyber768", 3);
    kyber_vector("Kyber1024", 4);
    sphincs_chain("SPHINCS+-256s", 15);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
