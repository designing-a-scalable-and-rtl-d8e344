// tb_poly_datapath: checks the JPAU cluster with its memories by driving the
// issue interface directly (no UPCU). With the default 8 JPAUs it loads
// operands through the host port and issues, one operation each:
//  * ADD (unpacked, Dilithium modulus) with results on the even ports;
//  * CT butterfly with twiddles from the ROM, both results written back;
//  * MUL into the temporary product store followed by RED fed back from it;
//  * MMUL by a constant and by its negation (q - w);
//  * packed Kyber ADD with all ports reading and writing 12-bit coefficients;
//  * AND and CMP with a constant y, checking the compare port of JPAU 0.
// Results are read back through the host port and compared with modular
// arithmetic done here with 64-bit integers. The result-valid flag must rise
// exactly four cycles after an issue.
module tb_poly_datapath;
  import pqc_pkg::*;

  localparam int NJ = 8, NU = 2 * NJ, NP = 4 * NJ, TMP_AW = $clog2(NMAX);
  localparam longint QD = 8380417, QK = 3329;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic iss_valid, iss_pk, iss_ycon_sel, iss_wcon_sel, iss_wneg;
  jop_e iss_op;
  logic [COEF_W-1:0] iss_q, iss_qinv, iss_ycon, iss_wcon;
  xsrc_e iss_xsrc;
  logic [63:0] iss_kam;
  logic [MEM_AW-1:0] ra_addr [NP], rb_addr [NP], wb_addr [NP], sw_addr [4];
  logic wb_en [NP], tmp_wen [NU], sw_en [4];
  logic [TW_AW-1:0] tw_addr [NU];
  logic [TMP_AW-1:0] tmp_raddr [NU], tmp_waddr [NU];
  logic res0_valid;
  logic [1:0] cmp0 [2];
  logic host_we;
  logic [MEM_AW-1:0] host_waddr, host_raddr;
  logic [COEF_W-1:0] host_wdata, host_rdata;

  poly_datapath #(.NJ(NJ)) dut (.*);

  int checks = 0, failures = 0;
  longint a [NP], b [NP];

  function automatic longint pw(longint x, longint e, longint q);
    longint r = 1;
    x = x % q;
    while (e > 0) begin
      if (e & 1) r = (r * x) % q;
      x = (x * x) % q;
      e >>= 1;
    end
    return r;
  endfunction

  function automatic int br8(int v);
    int r = 0;
    for (int i = 0; i < 8; i++) r |= ((v >> i) & 1) << (7 - i);
    return r;
  endfunction

  task automatic idle_issue();
    iss_valid = 0; iss_pk = 0; iss_ycon_sel = 0; iss_wcon_sel = 0; iss_wneg = 0;
    iss_op = JOP_NOP; iss_xsrc = XS_MEM; iss_kam = '0; iss_ycon = '0; iss_wcon = '0;
    for (int p = 0; p < NP; p++) begin ra_addr[p] = '0; rb_addr[p] = '0; wb_en[p] = 0; wb_addr[p] = '0; end
    for (int u = 0; u < NU; u++) begin tw_addr[u] = '0; tmp_raddr[u] = '0; tmp_wen[u] = 0; tmp_waddr[u] = '0; end
    for (int i = 0; i < 4; i++) begin sw_en[i] = 0; sw_addr[i] = '0; end
  endtask

  task automatic hwrite(int addr, longint v);
    @(negedge clk);
    host_we = 1; host_waddr = MEM_AW'(addr); host_wdata = COEF_W'(v);
    @(negedge clk) host_we = 0;
  endtask

  task automatic hcheck(int addr, longint exp, string what);
    @(negedge clk) host_raddr = MEM_AW'(addr);
    @(negedge clk);
    checks++;
    if (longint'(host_rdata) != exp) begin
      failures++;
      $display("FAIL %s addr %0d got %0d exp %0d", what, addr, host_rdata, exp);
    end
  endtask

  // issue the prepared operation for one cycle, check result timing
  task automatic fire();
    int n;
    iss_valid = 1;
    @(negedge clk);
    iss_valid = 0;
    for (int p = 0; p < NP; p++) wb_en[p] = 0;
    for (int u = 0; u < NU; u++) tmp_wen[u] = 0;
    n = 1;
    while (!res0_valid && n < 10) begin @(negedge clk); n++; end
    checks++;
    if (n != JPAU_LAT + 1) begin failures++; $display("FAIL result after %0d cycles", n); end
    repeat (2) @(negedge clk);
  endtask

  initial begin
    longint rinv_d, rinv_k, t, w, c;
    idle_issue();
    host_we = 0; host_waddr = '0; host_wdata = '0; host_raddr = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    rinv_d = pw(longint'(1) << 24, QD - 2, QD);

    // operands: slot 0 = a, slot 1 = b (Dilithium)
    for (int p = 0; p < NP; p++) begin
      a[p] = $urandom % QD; b[p] = $urandom % QD;
      hwrite(p, a[p]); hwrite(1024 + p, b[p]);
    end
    for (int p = 0; p < NP; p++) hcheck(p, a[p], "host");

    // ADD -> slot 2, even ports
    idle_issue();
    iss_op = JOP_ADD; iss_q = 24'(QD); iss_qinv = neg_qinv(24'(QD), 24);
    for (int p = 0; p < NP; p++) begin
      ra_addr[p] = MEM_AW'(p); rb_addr[p] = MEM_AW'(1024 + p);
      wb_en[p] = (p % 2 == 0); wb_addr[p] = MEM_AW'(2048 + p);
    end
    fire();
    for (int u = 0; u < NU; u++) hcheck(2048 + 2*u, (a[2*u] + b[2*u]) % QD, "ADD");

    // CT butterfly with ROM twiddles -> slot 3
    idle_issue();
    iss_op = JOP_BF_CT; iss_q = 24'(QD); iss_qinv = neg_qinv(24'(QD), 24);
    for (int p = 0; p < NP; p++) begin
      ra_addr[p] = MEM_AW'(p); rb_addr[p] = MEM_AW'(1024 + p);
      wb_en[p] = 1; wb_addr[p] = MEM_AW'(3072 + p);
    end
    for (int u = 0; u < NU; u++) tw_addr[u] = TW_AW'(TW_BASE_DIL + 1 + u);
    fire();
    for (int u = 0; u < NU; u++) begin
      w = pw(1753, br8(1 + u), QD);
      t = (b[2*u] * w) % QD;
      hcheck(3072 + 2*u, (a[2*u] + t) % QD, "CT upper");
      hcheck(3072 + 2*u + 1, (a[2*u] - t + QD) % QD, "CT lower");
    end

    // MUL into the product store, then RED fed back -> slot 4
    idle_issue();
    iss_op = JOP_MUL; iss_q = 24'(QD); iss_qinv = neg_qinv(24'(QD), 24);
    for (int p = 0; p < NP; p++) begin ra_addr[p] = MEM_AW'(p); rb_addr[p] = MEM_AW'(1024 + p); end
    for (int u = 0; u < NU; u++) begin tmp_wen[u] = 1; tmp_waddr[u] = TMP_AW'(100 + u); end
    fire();
    idle_issue();
    iss_op = JOP_RED; iss_q = 24'(QD); iss_qinv = neg_qinv(24'(QD), 24);
    for (int u = 0; u < NU; u++) tmp_raddr[u] = TMP_AW'(100 + u);
    for (int p = 0; p < NP; p++) begin wb_en[p] = (p % 2 == 0); wb_addr[p] = MEM_AW'(4096 + p); end
    fire();
    for (int u = 0; u < NU; u++) hcheck(4096 + 2*u, (((a[2*u] * b[2*u]) % QD) * rinv_d) % QD, "MUL+RED");

    // MMUL by constant c and by q - c -> slot 4 odd addresses
    c = $urandom % QD;
    for (int neg = 0; neg < 2; neg++) begin
      idle_issue();
      iss_op = JOP_MMUL; iss_q = 24'(QD); iss_qinv = neg_qinv(24'(QD), 24);
      iss_wcon_sel = 1; iss_wcon = 24'(c); iss_wneg = neg[0];
      for (int p = 0; p < NP; p++) begin
        ra_addr[p] = MEM_AW'(p); wb_en[p] = (p % 2 == 0); wb_addr[p] = MEM_AW'(4096 + 512 + p);
      end
      fire();
      for (int u = 0; u < NU; u++)
        hcheck(4096 + 512 + 2*u, (((a[2*u] * (neg ? QD - c : c)) % QD) * rinv_d) % QD, "MMUL");
    end

    // packed Kyber ADD: slots 5 + 6 -> 7, every port
    for (int p = 0; p < NP; p++) begin
      a[p] = $urandom % QK; b[p] = $urandom % QK;
      hwrite(5*1024 + p, a[p]); hwrite(6*1024 + p, b[p]);
    end
    idle_issue();
    iss_op = JOP_ADD; iss_pk = 1; iss_q = 24'(QK); iss_qinv = neg_qinv(24'(QK), 24);
    for (int p = 0; p < NP; p++) begin
      ra_addr[p] = MEM_AW'(5*1024 + p); rb_addr[p] = MEM_AW'(6*1024 + p);
      wb_en[p] = 1; wb_addr[p] = MEM_AW'(7*1024 + p);
    end
    fire();
    for (int p = 0; p < NP; p++) hcheck(7*1024 + p, (a[p] + b[p]) % QK, "packed ADD");

    // AND, then CMP against constant y: compare port of JPAU 0
    idle_issue();
    iss_op = JOP_AND; iss_ycon_sel = 1; iss_ycon = 24'h00FF0F;
    for (int p = 0; p < NP; p++) begin
      ra_addr[p] = MEM_AW'(5*1024 + p); wb_en[p] = (p % 2 == 0); wb_addr[p] = MEM_AW'(2048 + 512 + p);
    end
    fire();
    for (int u = 0; u < NU; u++) hcheck(2048 + 512 + 2*u, (a[2*u] & 24'h00FF0F), "AND");
    for (int trial = 0; trial < 20; trial++) begin
      idle_issue();
      iss_op = JOP_CMP; iss_ycon_sel = 1; iss_ycon = 24'($urandom % 4096);
      iss_q = 24'(QD);
      for (int p = 0; p < NP; p++) ra_addr[p] = MEM_AW'(5*1024 + p);
      @(negedge clk);
      iss_valid = 1;
      @(negedge clk) iss_valid = 0;
      repeat (JPAU_LAT) @(negedge clk);
      checks++;
      if (!res0_valid || cmp0[0][0] != (a[0] < iss_ycon) || cmp0[1][0] != (a[2] < iss_ycon)) begin
        failures++;
        $display("FAIL CMP y=%0d a0=%0d a2=%0d cmp=%b %b", iss_ycon, a[0], a[2], cmp0[0], cmp0[1]);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
