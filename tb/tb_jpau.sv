// tb_jpau: self-checking test of the JPAU.
//
// Streams random operations of every opcode, unpacked (Dilithium and Falcon
// moduli) and packed (Kyber), one per cycle, and checks each result LAT = 3
// cycles later against arithmetic done here with plain % on 64-bit values.
// Montgomery results r are checked through r * R == t (mod q) with r < q.
module tb_jpau;
  import pqc_pkg::*;

  localparam int LAT = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              in_valid;
  jop_e              op;
  logic              pk;
  logic [COEF_W-1:0] q, qinv;
  logic [COEF_W-1:0] x [2], y [2], w [2];
  logic [PROD_W-1:0] fb [2];
  logic              out_valid;
  logic [PROD_W-1:0] r0 [2];
  logic [COEF_W-1:0] r1 [2];
  logic [1:0]        cmp [2];

  jpau dut (.clk, .rst_n, .in_valid, .op, .packed_mode(pk), .q, .qinv,
            .x, .y, .w, .fb, .out_valid, .r0, .r1, .cmp);

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct {
    jop_e op; logic pk; logic [63:0] q;
    logic [63:0] x[2], y[2], w[2], fb[2];
    int issue;
  } item_t;
  item_t pend [$];

  function automatic logic [63:0] mred(logic [63:0] t, logic [63:0] qq, int bits);
    // r with r * 2^bits == t mod q, found through the inverse of 2^bits
    logic [63:0] rinv, r;
    rinv = 64'(pow_ref((64'd1 << bits) % qq, qq - 2, qq));
    r = ((t % qq) * rinv) % qq;
    return r;
  endfunction

  function automatic logic [63:0] pow_ref(logic [63:0] b, logic [63:0] e, logic [63:0] m);
    logic [63:0] r;
    r = 1;
    for (int i = 0; i < 64; i++) begin
      if (e[i]) r = (r * b) % m;
      b = (b * b) % m;
    end
    return r;
  endfunction

  // Expected (r0, r1, cmp) for one sub-lane of width bits.
  task automatic ref_sub(input jop_e o, input logic [63:0] qq, input int bits,
                         input logic [63:0] a, b, tw, f,
                         output logic [63:0] e0, e1, output logic ec);
    logic [63:0] t;
    e1 = 0; ec = 0;
    case (o)
      JOP_ADD:   e0 = (a + b) % qq;
      JOP_SUB:   e0 = (a + qq - b) % qq;
      JOP_MUL:   e0 = a * b;
      JOP_RED:   e0 = mred(f, qq, bits);
      JOP_MMUL:  e0 = mred(a * tw, qq, bits);
      JOP_BF_CT: begin
        t  = mred(b * tw, qq, bits);
        e0 = (a + t) % qq;
        e1 = (a + qq - t) % qq;
      end
      JOP_BF_GS: begin
        e0 = (a + b) % qq;
        e1 = mred(((a + qq - b) % qq) * tw, qq, bits);
      end
      JOP_AND:   e0 = a & b;
      default:   begin e0 = a; ec = (a < b); end
    endcase
  endtask

  task automatic check_out(item_t it);
    logic [63:0] e0, e1, e0h, e1h;
    logic ec, ech;
    for (int l = 0; l < 2; l++) begin
      if (!it.pk) begin
        ref_sub(it.op, it.q, 24, it.x[l], it.y[l], it.w[l], it.fb[l], e0, e1, ec);
        checks++;
        if (r0[l] !== e0[47:0] || r1[l] !== e1[23:0] || cmp[l][0] !== ec) begin
          failures++;
          $display("FAIL op=%s lane%0d x=%0d y=%0d w=%0d fb=%0d got %0d/%0d/%0d exp %0d/%0d/%0d",
                   it.op.name(), l, it.x[l], it.y[l], it.w[l], it.fb[l], r0[l], r1[l], cmp[l],
                   e0, e1, ec);
        end
      end else begin
        ref_sub(it.op, it.q, 12, it.x[l] & 12'hfff, it.y[l] & 12'hfff, it.w[l] & 12'hfff,
                it.fb[l] & 24'hffffff, e0, e1, ec);
        ref_sub(it.op, it.q, 12, it.x[l] >> 12, it.y[l] >> 12, it.w[l] >> 12,
                it.fb[l] >> 24, e0h, e1h, ech);
        checks++;
        if (it.op == JOP_MUL || it.op == JOP_AND || it.op == JOP_CMP) begin
          if (r0[l] !== {e0h[23:0], e0[23:0]} && it.op == JOP_MUL) failures++;
          else if (it.op != JOP_MUL && r0[l][23:0] !== {e0h[11:0], e0[11:0]}) failures++;
        end else if (r0[l][23:0] !== {e0h[11:0], e0[11:0]} ||
                     r1[l] !== {e1h[11:0], e1[11:0]}) begin
          failures++;
          $display("FAIL packed op=%s lane%0d got %h/%h exp %h%h/%h%h", it.op.name(), l,
                   r0[l], r1[l], e0h[11:0], e0[11:0], e1h[11:0], e1[11:0]);
        end
        if (cmp[l] !== {ech, ec}) failures++;
      end
      if (it.op == JOP_CMP || it.op == JOP_AND) ;  // covered above
    end
    // fixed latency
    checks++;
    if (cycle - it.issue != LAT) begin
      failures++;
      $display("FAIL latency %0d", cycle - it.issue);
    end
  endtask

  function automatic logic [63:0] rnd(logic [63:0] m);
    return {$urandom, $urandom} % m;
  endfunction

  // output checker
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      item_t it;
      if (pend.size() == 0) begin
        failures++;
        $display("FAIL unexpected output");
      end else begin
        it = pend.pop_front();
        check_out(it);
      end
    end
  end

  initial begin
    item_t it;
    logic [63:0] qs [3];
    qs[0] = Q_DILITHIUM; qs[1] = Q_FALCON; qs[2] = Q_KYBER;
    in_valid = 0; op = JOP_NOP; pk = 0; q = Q_DILITHIUM; qinv = neg_qinv(Q_DILITHIUM, 24);
    for (int l = 0; l < 2; l++) begin x[l] = 0; y[l] = 0; w[l] = 0; fb[l] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      it.q  = qs[n % 3];
      it.pk = (it.q == Q_KYBER);
      it.op = jop_e'(1 + ($urandom % 9));
      for (int l = 0; l < 2; l++) begin
        if (it.pk) begin
          it.x[l]  = (rnd(it.q) << 12) | rnd(it.q);
          it.y[l]  = (rnd(it.q) << 12) | rnd(it.q);
          it.w[l]  = (rnd(it.q) << 12) | rnd(it.q);
          it.fb[l] = (rnd(it.q * 4096) << 24) | rnd(it.q * 4096);
          if (it.op == JOP_AND || it.op == JOP_CMP) begin
            it.x[l] = rnd(64'h1000000); it.y[l] = rnd(64'h1000000);
          end
        end else begin
          it.x[l]  = rnd(it.q);
          it.y[l]  = rnd(it.q);
          it.w[l]  = rnd(it.q);
          it.fb[l] = rnd(it.q << 24);
          if (it.op == JOP_AND || it.op == JOP_CMP) begin
            it.x[l] = rnd(64'h1000000); it.y[l] = rnd(64'h1000000);
          end
        end
        x[l] = it.x[l][23:0]; y[l] = it.y[l][23:0]; w[l] = it.w[l][23:0]; fb[l] = it.fb[l][47:0];
      end
      it.issue = cycle;
      in_valid = ($urandom % 8) != 0;
      op = it.op; pk = it.pk; q = it.q[23:0]; qinv = neg_qinv(it.q[23:0], 24);
      if (in_valid) pend.push_back(it);
    end
    @(negedge clk) in_valid = 0;
    repeat (6) @(posedge clk);
    checks++;
    if (pend.size() != 0) begin failures++; $display("FAIL %0d results missing", pend.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
