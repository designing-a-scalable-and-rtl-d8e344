// tb_kam: checks the KAM against published SHAKE digests of the empty message
// and against a Keccak model written here (table-driven round constants,
// separate step functions) for random messages of 0..64 bytes in both modes.
// Each run squeezes three rate blocks, so the automatic re-permutation is
// exercised; pops come with random gaps. It also checks that the first
// output appears 24 / ROUNDS_PER_CYCLE + 1 cycles after the operation, for
// the default instance and for one with four rounds per cycle. Messages of
// up to 400 bytes are also fed in chunks (op_cont / op_more), with chunk
// sizes that exercise full rate blocks and an empty closing chunk.
module tb_kam;
  import pqc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic op_valid, op_ready, done, buf_valid, buf_pop, busy;
  logic op_ready4, done4, buf_valid4, busy4;
  kop_e op;
  logic [511:0] msg;
  logic [7:0] msg_len;
  logic [63:0] buf_data, buf_data4;
  logic op_cont, op_more;

  kam dut (.clk, .rst_n, .op_valid, .op_ready, .op, .msg, .msg_len, .op_cont, .op_more, .done,
           .buf_valid, .buf_data, .buf_pop, .busy);
  kam #(.ROUNDS_PER_CYCLE(4)) dut4 (.clk, .rst_n, .op_valid, .op_ready(op_ready4), .op, .msg,
           .msg_len, .op_cont, .op_more, .done(done4), .buf_valid(buf_valid4), .buf_data(buf_data4),
           .buf_pop(buf_pop && buf_valid4), .busy(busy4));

  int checks = 0, failures = 0;

  localparam logic [63:0] RCT [24] = '{
    64'h0000000000000001, 64'h0000000000008082, 64'h800000000000808A, 64'h8000000080008000,
    64'h000000000000808B, 64'h0000000080000001, 64'h8000000080008081, 64'h8000000000008009,
    64'h000000000000008A, 64'h0000000000000088, 64'h0000000080008009, 64'h000000008000000A,
    64'h000000008000808B, 64'h800000000000008B, 64'h8000000000008089, 64'h8000000000008003,
    64'h8000000000008002, 64'h8000000000000080, 64'h000000000000800A, 64'h800000008000000A,
    64'h8000000080008081, 64'h8000000000008080, 64'h0000000080000001, 64'h8000000080008008};

  // rho offsets as [x][y]
  localparam int RHO [5][5] = '{'{0, 36, 3, 41, 18}, '{1, 44, 10, 45, 2}, '{62, 6, 43, 15, 61},
                                '{28, 55, 25, 21, 56}, '{27, 20, 39, 8, 14}};

  logic [63:0] m [5][5];   // model state, [x][y]

  function automatic logic [63:0] rl(logic [63:0] v, int n);
    return (v << n) | (v >> ((64 - n) % 64));
  endfunction

  task automatic model_perm();
    logic [63:0] c [5], b [5][5];
    for (int r = 0; r < 24; r++) begin
      for (int x = 0; x < 5; x++) c[x] = m[x][0] ^ m[x][1] ^ m[x][2] ^ m[x][3] ^ m[x][4];
      for (int x = 0; x < 5; x++)
        for (int y = 0; y < 5; y++) m[x][y] ^= c[(x + 4) % 5] ^ rl(c[(x + 1) % 5], 1);
      for (int x = 0; x < 5; x++)
        for (int y = 0; y < 5; y++) b[y][(2 * x + 3 * y) % 5] = (RHO[x][y] == 0) ? m[x][y] : rl(m[x][y], RHO[x][y]);
      for (int x = 0; x < 5; x++)
        for (int y = 0; y < 5; y++) m[x][y] = b[x][y] ^ (~b[(x + 1) % 5][y] & b[(x + 2) % 5][y]);
      m[0][0] ^= RCT[r];
    end
  endtask

  task automatic model_start(kop_e o, logic [511:0] mm, int len);
    logic [7:0] blk [200];
    int rate;
    rate = (o == KOP_SHAKE128) ? 168 : 136;
    for (int i = 0; i < 200; i++) blk[i] = (i < len) ? mm[8*i +: 8] : 8'h00;
    blk[len] ^= 8'h1F;
    blk[rate - 1] ^= 8'h80;
    for (int x = 0; x < 5; x++) for (int y = 0; y < 5; y++) m[x][y] = 0;
    for (int i = 0; i < 200; i++) m[(i / 8) % 5][(i / 8) / 5][8 * (i % 8) +: 8] = blk[i];
    model_perm();
  endtask

  task automatic one_hash(kop_e o, int len, input logic [63:0] first_lane, input logic check_first);
    int rate_l, lat, lat4;
    @(negedge clk);
    while (!op_ready || !op_ready4) @(negedge clk);
    msg = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
           $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    msg_len = 8'(len); op = o; op_valid = 1;
    model_start(o, msg, len);
    @(negedge clk) op_valid = 0;
    lat = 1; lat4 = 0;
    while (!done) begin
      if (done4 && lat4 == 0) lat4 = lat;
      @(negedge clk); lat++;
    end
    if (done4 && lat4 == 0) lat4 = lat;
    checks++;
    if (lat != 24 + 1 || lat4 != 24 / 4 + 1) begin
      failures++; $display("FAIL latency %0d / %0d", lat, lat4);
    end
    rate_l = (o == KOP_SHAKE128) ? 21 : 17;
    for (int blk = 0; blk < 3; blk++) begin
      for (int l = 0; l < rate_l; l++) begin
        while (!buf_valid || ($urandom % 3 == 0)) @(negedge clk);
        checks++;
        if (buf_data !== m[l % 5][l / 5]) begin
          failures++;
          $display("FAIL blk %0d lane %0d got %h exp %h", blk, l, buf_data, m[l % 5][l / 5]);
        end
        if (blk == 0 && l == 0 && check_first) begin
          checks++;
          if (buf_data !== first_lane) begin failures++; $display("FAIL known vector %h", buf_data); end
        end
        if (buf_valid4) begin
          checks++;
          if (buf_data4 !== buf_data) begin failures++; $display("FAIL 4-round instance"); end
        end
        buf_pop = 1;
        @(negedge clk) buf_pop = 0;
      end
      model_perm();
    end
  endtask

  // long message in chunks of at most 64 bytes that never cross a block end
  task automatic chunked_hash(kop_e o, int total);
    logic [7:0] mb [];
    int rate, pos, sent, ch, nl;
    logic more;
    logic [7:0] blk [200];
    rate = (o == KOP_SHAKE128) ? 168 : 136;
    mb = new[total];
    foreach (mb[i]) mb[i] = 8'($urandom);
    // model: standard sponge absorb
    for (int x = 0; x < 5; x++) for (int y = 0; y < 5; y++) m[x][y] = 0;
    for (int b = 0; b <= total / rate; b++) begin
      for (int i = 0; i < 200; i++) blk[i] = 8'h00;
      for (int i = 0; i < rate; i++) if (b * rate + i < total) blk[i] = mb[b * rate + i];
      if (b == total / rate) begin blk[total % rate] ^= 8'h1F; blk[rate - 1] ^= 8'h80; end
      for (int i = 0; i < 200; i++) m[(i / 8) % 5][(i / 8) / 5][8 * (i % 8) +: 8] ^= blk[i];
      model_perm();
    end
    // device: chunks
    pos = 0; sent = 0;
    do begin
      ch = total - sent;
      if (ch > 64) ch = 64 - ($urandom % 8);
      if (ch > rate - pos) ch = rate - pos;
      more = (sent + ch < total) || (pos + ch == rate);
      @(negedge clk);
      while (!op_ready || !op_ready4) @(negedge clk);
      msg = '0;
      for (int i = 0; i < ch; i++) msg[8*i +: 8] = mb[sent + i];
      msg_len = 8'(ch); op = o; op_cont = (sent != 0); op_more = more; op_valid = 1;
      @(negedge clk) op_valid = 0;
      sent += ch;
      pos = (pos + ch == rate) ? 0 : pos + ch;
    end while (more);
    op_cont = 0; op_more = 0;
    nl = (o == KOP_SHAKE128) ? 21 : 17;
    for (int l = 0; l < nl + 3; l++) begin
      if (l == nl) model_perm();
      while (!buf_valid || !buf_valid4) @(negedge clk);
      checks++;
      if (buf_data !== m[(l % nl) % 5][(l % nl) / 5] || buf_data4 !== buf_data) begin
        failures++;
        $display("FAIL chunked len %0d lane %0d got %h exp %h", total, l, buf_data, m[(l % nl) % 5][(l % nl) / 5]);
      end
      buf_pop = 1;
      @(negedge clk) buf_pop = 0;
    end
  endtask

  initial begin
    op_cont = 0; op_more = 0;
    op_valid = 0; buf_pop = 0; op = KOP_SHAKE128; msg = '0; msg_len = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    one_hash(KOP_SHAKE128, 0, 64'h7d828fe8a42b9c7f, 1);   // SHAKE128("")
    one_hash(KOP_SHAKE256, 0, 64'h138da80b2bddb946, 1);   // SHAKE256("")
    for (int i = 0; i < 12; i++)
      one_hash((i % 2) ? KOP_SHAKE256 : KOP_SHAKE128, $urandom % 65, 64'd0, 0);
    chunked_hash(KOP_SHAKE256, 136);      // ends exactly at a block end
    chunked_hash(KOP_SHAKE128, 168);
    chunked_hash(KOP_SHAKE256, 96);       // a SPHINCS+-256 F call (seed, address, value)
    chunked_hash(KOP_SHAKE256, 128);      // a SPHINCS+-256 H call
    for (int i = 0; i < 8; i++)
      chunked_hash((i % 2) ? KOP_SHAKE256 : KOP_SHAKE128, 1 + $urandom % 400);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
