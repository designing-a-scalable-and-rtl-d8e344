// tb_pqc_top: end-to-end test of the accelerator at its default size
// (8 JPAUs, one Keccak round per cycle, no parameter overrides).
//
// Everything is driven through the top-level ports only and checked against
// software models written here (a Keccak-f[1600] model for SHAKE, a textbook
// NTT, plain modular arithmetic):
//  1. Dilithium2 signing opening: s1, s2, t0 loaded into slots 1..3; checks
//     the matrix polynomial sampled into slot 0 from SHAKE128(rho || 0, 0)
//     where rho is the first 32 bytes of SHAKE256(seed), and the NTTs of s1,
//     s2, t0 in slots 4..6.
//  2. Falcon-512 signing opening: checks rnd_out = SHAKE256(seed), the two
//     pointwise products and the final NTT.
//  3. Kyber (packed) ADD, PMUL and an NTT/INTT round trip as direct commands.
//  4. A direct SHAKE128 operation whose first lanes the host pops, followed by
//     a Falcon rejection-sampling run that consumes the rest of the stream.
//  5. A 150-byte SHAKE256 message sent as four chunks (64, 64, 8, 14 bytes;
//     the third completes the first rate block), checked on its first lanes.
// It also counts how often each mechanism is exercised (packed issues,
// sampling rejections, KAM re-permutation, pipeline drain, the
// UPC_done & Keccak_done join, product feedback, butterflies, INTT scaling)
// and counts a failure for any mechanism that never occurred.
module tb_pqc_top;
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

  pqc_top dut (.*);

  int checks = 0, failures = 0;

  // ------------------------------------------------------ mechanism counters
  logic mon_packed, mon_feedback, mon_bfly, mon_scale, mon_drain, mon_join, busy_q;
  int n_packed, n_reject, n_kbusy, n_drain, n_join, n_feedback, n_bfly, n_scale;
  always @(posedge clk) if (rst_n) begin
    busy_q <= kam_busy;
    if (mon_packed)   n_packed++;
    if (mon_feedback) n_feedback++;
    if (mon_bfly)     n_bfly++;
    if (mon_scale)    n_scale++;
    if (mon_drain)    n_drain++;
    if (mon_join)     n_join++;
    if (kam_busy && !busy_q) n_kbusy++;   // permutation starts
  end

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

  // SHAKE output as 64-bit lanes
  task automatic shake(kop_e o, logic [511:0] mm, int len, int nlanes, ref logic [63:0] out [$]);
    logic [7:0] blk [200];
    int rate;
    rate = (o == KOP_SHAKE128) ? 21 : 17;
    for (int i = 0; i < 200; i++) blk[i] = (i < len) ? mm[8*i +: 8] : 8'h00;
    blk[len] ^= 8'h1F;
    blk[8 * rate - 1] ^= 8'h80;
    for (int x = 0; x < 5; x++) for (int y = 0; y < 5; y++) m[x][y] = 0;
    for (int i = 0; i < 200; i++) m[(i / 8) % 5][(i / 8) / 5][8 * (i % 8) +: 8] = blk[i];
    out.delete();
    while (out.size() < nlanes) begin
      perm();
      for (int l = 0; l < rate; l++) out.push_back(m[l % 5][l / 5]);
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

  // ---------------------------------------------------------- arithmetic
  function automatic logic [63:0] powm(logic [63:0] b, logic [63:0] e, logic [63:0] q);
    logic [63:0] r;
    r = 1;
    for (int i = 0; i < 64; i++) begin
      if (e[i]) r = (r * b) % q;
      b = (b * b) % q;
    end
    return r;
  endfunction

  function automatic int bitrev(int v, int bits);
    int r;
    r = 0;
    for (int i = 0; i < bits; i++) if (v & (1 << i)) r |= 1 << (bits - 1 - i);
    return r;
  endfunction

  task automatic ref_ntt(ref logic [63:0] v [NMAX], input int n, input logic [63:0] q,
                         input logic [63:0] root, input int zbits, input int minlen);
    int k, j;
    logic [63:0] z, t;
    k = 0;
    for (int len = n / 2; len >= minlen; len = len / 2)
      for (int s = 0; s < n; s = j + len) begin
        k++;
        z = powm(root, bitrev(k, zbits), q);
        for (j = s; j < s + len; j++) begin
          t = (z * v[j + len]) % q;
          v[j + len] = (v[j] + q - t) % q;
          v[j] = (v[j] + t) % q;
        end
      end
  endtask

  // rejection sampler: 'per' candidates of 'step' bits per lane
  task automatic ref_sample(ref logic [63:0] lanes [$], input int first, input int n,
                            input int per, input int step, input logic [63:0] mask,
                            input logic [63:0] q, ref logic [63:0] v [NMAX],
                            output int used, output int rejected);
    int acc;
    acc = 0; rejected = 0; used = 0;
    for (int w = first; w < lanes.size() && acc < n; w++) begin
      used++;
      for (int c = 0; c < per; c++) begin
        logic [63:0] cand;
        cand = (lanes[w] >> (c * step)) & mask;
        if (acc < n) begin
          if (cand < q) begin v[acc] = cand; acc++; end
          else rejected++;
        end
      end
    end
  endtask

  // ---------------------------------------------------------- host helpers
  logic [63:0] p1 [NMAX], p2 [NMAX], p3 [NMAX], ex [NMAX], got [NMAX];

  task automatic load(int slot, int n, logic [63:0] q, ref logic [63:0] v [NMAX]);
    for (int i = 0; i < n; i++) begin
      v[i] = {$urandom, $urandom} % q;
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

  task automatic command(logic [1:0] c, scheme_e s, sec_t l, pfunc_e f, int a, int b, int d);
    int n;
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
    cmd = c; scheme = s; sec = l; pfunc = f; src_a = 3'(a); src_b = 3'(b); dst = 3'(d);
    cmd_valid = 1;
    @(negedge clk) cmd_valid = 0;
    n = 0;
    while (!cmd_done && n < 200000) begin @(negedge clk); n++; end
    checks++;
    if (!cmd_done) begin failures++; $display("FAIL command %0d timed out", c); end
  endtask

  function automatic logic [63:0] mulr(logic [63:0] x, logic [63:0] y, logic [63:0] q, logic [63:0] r);
    return (((x * y) % q) * powm(r % q, q - 2, q)) % q;
  endfunction

  // ---------------------------------------------------------------- test
  logic [63:0] lanes [$];
  logic [63:0] tmp [$];

  initial begin
    logic [255:0] rho;
    logic [63:0] q;
    int used, rej, n;
    cmd_valid = 0; cmd = 0; scheme = SCH_KYBER; sec = 0; pfunc = PF_NONE;
    src_a = 0; src_b = 0; dst = 0; kop = KOP_SHAKE128; msg = '0; msg_len = 0; msg_cont = 0; msg_more = 0; seed = '0;
    host_mem_we = 0; host_mem_waddr = 0; host_mem_wdata = 0; host_mem_raddr = 0; kam_host_pop = 0;
    n_packed = 0; n_reject = 0; n_kbusy = 0; n_drain = 0; n_join = 0; n_feedback = 0;
    n_bfly = 0; n_scale = 0; busy_q = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // 1. Dilithium2 signing opening
    q = 64'(Q_DILITHIUM); n = 256;
    load(1, n, q, p1); load(2, n, q, p2); load(3, n, q, p3);
    seed = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    command(2'd2, SCH_DILITHIUM, 2'd0, PF_NONE, 0, 0, 0);
    shake(KOP_SHAKE256, 512'(seed), 32, 4, lanes);
    rho = {lanes[3], lanes[2], lanes[1], lanes[0]};
    shake(KOP_SHAKE128, 512'(rho), 34, 400, lanes);
    ref_sample(lanes, 0, n, 2, 24, 64'h7FFFFF, q, ex, used, rej);
    n_reject += rej;
    check_slot("Dilithium matrix sample", 0, n, ex);
    ex = p1; ref_ntt(ex, n, q, 1753, 8, 1); check_slot("Dilithium NTT s1", 4, n, ex);
    ex = p2; ref_ntt(ex, n, q, 1753, 8, 1); check_slot("Dilithium NTT s2", 5, n, ex);
    ex = p3; ref_ntt(ex, n, q, 1753, 8, 1); check_slot("Dilithium NTT t0", 6, n, ex);
    $display("Dilithium done: checks %0d failures %0d", checks, failures);

    // 2. Falcon-512 signing opening
    q = 64'(Q_FALCON); n = 512;
    load(1, n, q, p1); load(2, n, q, p2); load(3, n, q, p3);
    seed = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    command(2'd3, SCH_FALCON, 2'd0, PF_NONE, 0, 0, 0);
    shake(KOP_SHAKE256, 512'(seed), 32, 4, lanes);
    checks++;
    if (rnd_out != {lanes[3], lanes[2], lanes[1], lanes[0]}) begin
      failures++; $display("FAIL Falcon random value %h", rnd_out);
    end
    for (int i = 0; i < n; i++) ex[i] = mulr(p1[i], p2[i], q, 64'd1 << 24);
    check_slot("Falcon product 1", 4, n, ex);
    for (int i = 0; i < n; i++) ex[i] = mulr(ex[i], p3[i], q, 64'd1 << 24);
    check_slot("Falcon product 2", 5, n, ex);
    ref_ntt(ex, n, q, 49, 9, 1);
    check_slot("Falcon NTT", 6, n, ex);
    $display("Falcon done: checks %0d failures %0d", checks, failures);

    // 3. Kyber, packed coefficient-wise functions and the NTT round trip
    q = 64'(Q_KYBER); n = 256;
    load(1, n, q, p1); load(2, n, q, p2);
    command(2'd0, SCH_KYBER, 2'd2, PF_ADD, 1, 2, 3);
    for (int i = 0; i < n; i++) ex[i] = (p1[i] + p2[i]) % q;
    check_slot("Kyber ADD", 3, n, ex);
    command(2'd0, SCH_KYBER, 2'd2, PF_PMUL, 1, 2, 4);
    for (int i = 0; i < n; i++) ex[i] = mulr(p1[i], p2[i], q, 64'd4096);
    check_slot("Kyber PMUL", 4, n, ex);
    command(2'd0, SCH_KYBER, 2'd2, PF_NTT, 1, 0, 5);
    ex = p1; ref_ntt(ex, n, q, 17, 7, 2);
    check_slot("Kyber NTT", 5, n, ex);
    command(2'd0, SCH_KYBER, 2'd2, PF_INTT, 5, 0, 6);
    check_slot("Kyber INTT", 6, n, p1);
    $display("Kyber done: checks %0d failures %0d", checks, failures);

    // 4. direct SHAKE128, host pops, then Falcon sampling from the stream
    msg = {16{$urandom}};
    msg_len = 8'd40; kop = KOP_SHAKE128;
    command(2'd1, SCH_FALCON, 2'd0, PF_NONE, 0, 0, 0);
    shake(KOP_SHAKE128, msg, 40, 1000, lanes);
    for (int i = 0; i < 5; i++) begin
      while (!kam_buf_valid) @(negedge clk);
      checks++;
      if (kam_buf_data != lanes[i]) begin
        failures++; $display("FAIL host pop %0d got %h exp %h", i, kam_buf_data, lanes[i]);
      end
      kam_host_pop = 1;
      @(negedge clk) kam_host_pop = 0;
    end
    q = 64'(Q_FALCON); n = 512;
    command(2'd0, SCH_FALCON, 2'd0, PF_SAMPLE, 0, 0, 7);
    ref_sample(lanes, 5, n, 2, 24, 64'h3FFF, q, ex, used, rej);
    n_reject += rej;
    check_slot("Falcon sample", 7, n, ex);
    $display("KAM and sampling done: checks %0d failures %0d", checks, failures);

    // mechanisms
    // four KAM operations were started; every further permutation is a re-permutation
    $display("packed=%0d reject=%0d reperm=%0d drain=%0d join=%0d feedback=%0d bfly=%0d scale=%0d",
             n_packed, n_reject, n_kbusy - 4, n_drain, n_join, n_feedback, n_bfly, n_scale);
    checks += 8;
    if (n_packed == 0)   begin failures++; $display("FAIL packed mode never used"); end
    if (n_reject == 0)   begin failures++; $display("FAIL no sampling rejection"); end
    if (n_kbusy <= 4)   begin failures++; $display("FAIL KAM never re-permuted"); end
    if (n_drain == 0)    begin failures++; $display("FAIL pipeline drain never seen"); end
    if (n_join != 1)     begin failures++; $display("FAIL UPC_done & Keccak_done join never seen"); end
    if (n_feedback == 0) begin failures++; $display("FAIL product feedback never used"); end
    if (n_bfly == 0)     begin failures++; $display("FAIL no butterfly issued"); end
    if (n_scale == 0)    begin failures++; $display("FAIL INTT scaling never issued"); end

    // 5. chunked SHAKE256 of 150 bytes
    begin
      logic [7:0] bs [$];
      int lens [4];
      int off;
      for (int i = 0; i < 150; i++) bs.push_back(8'($urandom));
      off = 0; lens = '{64, 64, 8, 14};
      kop = KOP_SHAKE256;
      for (int c = 0; c < 4; c++) begin
        msg = '0;
        for (int i = 0; i < lens[c]; i++) msg[8*i +: 8] = bs[off + i];
        msg_len = 8'(lens[c]); msg_cont = (c != 0); msg_more = (c != 3);
        command(2'd1, SCH_FALCON, 2'd0, PF_NONE, 0, 0, 0);
        off += lens[c];
      end
      msg_cont = 0; msg_more = 0;
      shake_bytes(KOP_SHAKE256, bs, 20, lanes);
      for (int i = 0; i < 20; i++) begin
        while (!kam_buf_valid) @(negedge clk);
        checks++;
        if (kam_buf_data != lanes[i]) begin
          failures++; $display("FAIL chunked pop %0d got %h exp %h", i, kam_buf_data, lanes[i]);
        end
        kam_host_pop = 1;
        @(negedge clk) kam_host_pop = 0;
      end
      $display("chunked SHAKE256 done: checks %0d failures %0d", checks, failures);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
