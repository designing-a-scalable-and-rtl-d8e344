// kam: Keccak Acceleration Module.
//
// Computes SHAKE128 or SHAKE256 of a message given in chunks of up to MSG_MAX
// bytes and streams the output 64 bits at a time. The core is the
// Keccak-f[1600] permutation, ROUNDS_PER_CYCLE rounds per clock (24 rounds in
// 24 / ROUNDS_PER_CYCLE cycles); the round constants come from the standard
// LFSR, evaluated at elaboration.
//
// Interface and timing:
//  * op_valid with op (KOP_SHAKE128 / KOP_SHAKE256), msg and msg_len hands
//    over one chunk whenever the permutation is not running; it is accepted in
//    that cycle (op_ready high). op_cont = 0 starts a new hash (zero state),
//    op_cont = 1 appends the chunk to the message absorbed so far. op_more = 1
//    says more chunks follow; op_more = 0 marks the last chunk, after which
//    the message is padded (0x1F ... 0x80) and permuted. The chunk is XOR-ed
//    in at the current byte position; when a chunk fills the rate (168 or 136
//    bytes) the block is permuted and op_ready drops for that time. A chunk
//    must not cross the end of a rate block, and a message that ends exactly
//    at a block end is closed with an empty last chunk. A short message is a
//    single chunk with op_cont = op_more = 0.
//  * done pulses for one cycle when the first output block is ready
//    (Keccak_done). From then on buf_valid (the KAM buffer-ready signal) is
//    high while a squeezed lane is available on buf_data; buf_pop consumes
//    it. After the last lane of the rate the module permutes again by itself,
//    buf_valid being low meanwhile, so the output stream is unbounded.
//
// Messages longer than one chunk (SPHINCS+ tree hashing, long seeds) are
// absorbed chunk by chunk with op_cont/op_more.
//
// The module name, its role (Keccak for SHAKE hashing, matrix expansion and
// sampling), the operation/done handshake and the buffer-ready signal follow
// the architecture description. It names three variants (Small, Large, FP)
// without describing them; ROUNDS_PER_CYCLE is this design's way to trade
// area for speed, and everything inside the module is standard Keccak.
module kam
  import pqc_pkg::*;
#(
  parameter int unsigned ROUNDS_PER_CYCLE = 1,
  parameter int unsigned MSG_MAX          = 64
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   op_valid,
  output logic                   op_ready,
  input  kop_e                   op,
  input  logic [8*MSG_MAX-1:0]   msg,
  input  logic [7:0]             msg_len,
  input  logic                   op_cont,    // continue the current message
  input  logic                   op_more,    // more chunks follow
  output logic                   done,
  output logic                   buf_valid,
  output logic [63:0]            buf_data,
  input  logic                   buf_pop,
  output logic                   busy
);

  typedef logic [63:0] state_t [25];

  // ------------------------------------------------------------- constants
  function automatic logic rc_bit(int unsigned t);
    logic [8:0] r;
    r = 9'd1;
    for (int unsigned i = 0; i < t % 255; i++) begin
      r = r << 1;
      r[0] ^= r[8];
      r[4] ^= r[8];
      r[5] ^= r[8];
      r[6] ^= r[8];
      r[8] = 1'b0;
    end
    return r[0];
  endfunction

  function automatic logic [63:0] round_const(int unsigned ir);
    logic [63:0] c;
    c = '0;
    for (int unsigned j = 0; j < 7; j++) c[(1 << j) - 1] = rc_bit(j + 7 * ir);
    return c;
  endfunction

  typedef logic [63:0] rc_table_t [24];
  function automatic rc_table_t build_rc();
    rc_table_t t;
    for (int unsigned i = 0; i < 24; i++) t[i] = round_const(i);
    return t;
  endfunction
  localparam rc_table_t RC = build_rc();

  // rotation offsets, index x + 5*y
  localparam int unsigned ROT [25] = '{
     0,  1, 62, 28, 27,
    36, 44,  6, 55, 20,
     3, 10, 43, 25, 39,
    41, 45, 15, 21,  8,
    18,  2, 61, 56, 14};

  function automatic logic [63:0] rotl(logic [63:0] v, int unsigned n);
    return (n == 0) ? v : ((v << n) | (v >> (64 - n)));
  endfunction

  function automatic state_t keccak_round(state_t a, logic [63:0] rc);
    logic [63:0] c [5], d [5];
    state_t b, r;
    for (int x = 0; x < 5; x++) c[x] = a[x] ^ a[x+5] ^ a[x+10] ^ a[x+15] ^ a[x+20];
    for (int x = 0; x < 5; x++) d[x] = c[(x+4)%5] ^ rotl(c[(x+1)%5], 1);
    // theta, rho and pi
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        b[y + 5*((2*x + 3*y) % 5)] = rotl(a[x + 5*y] ^ d[x], ROT[x + 5*y]);
    // chi
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        r[x + 5*y] = b[x + 5*y] ^ (~b[(x+1)%5 + 5*y] & b[(x+2)%5 + 5*y]);
    // iota
    r[0] ^= rc;
    return r;
  endfunction

  // ------------------------------------------------------------- datapath
  typedef enum logic [1:0] {K_IDLE, K_PERM, K_SQUEEZE} kstate_e;

  kstate_e     st;
  state_t      s;
  logic [4:0]  rnd;
  logic [4:0]  lane;        // next lane to squeeze
  logic [4:0]  rate_lanes;  // 21 (SHAKE128) or 17 (SHAKE256)
  logic        first;
  logic        absorbing;   // permuting a full block of an unfinished message
  logic [7:0]  pos;         // byte position within the rate block

  // chunk XOR-ed into the state at byte position p, padding on the last one
  function automatic state_t absorb(state_t base, kop_e o, logic [8*MSG_MAX-1:0] m,
                                    logic [7:0] len, logic [7:0] p, logic last);
    state_t t;
    int unsigned rate_bytes, rel;
    logic [7:0] byte_v;
    rate_bytes = (o == KOP_SHAKE128) ? 168 : 136;
    t = base;
    for (int unsigned i = 0; i < 200; i++) begin
      rel    = i - 32'(p);
      byte_v = 8'h00;
      if (i >= 32'(p) && rel < MSG_MAX && rel < 32'(len)) byte_v = m[8*rel +: 8];
      if (last && i == 32'(p) + 32'(len)) byte_v ^= 8'h1F;
      if (last && i == rate_bytes - 1) byte_v ^= 8'h80;
      t[i/8][8*(i%8) +: 8] ^= byte_v;
    end
    return t;
  endfunction

  state_t zero_st;
  always_comb for (int i = 0; i < 25; i++) zero_st[i] = '0;

  state_t s_next;
  always_comb begin
    s_next = s;
    for (int unsigned k = 0; k < ROUNDS_PER_CYCLE; k++)
      s_next = keccak_round(s_next, RC[(int'(rnd) + k) % 24]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= K_IDLE;
      rnd        <= '0;
      lane       <= '0;
      rate_lanes <= 5'd21;
      first      <= 1'b0;
      absorbing  <= 1'b0;
      pos        <= '0;
      done       <= 1'b0;
      for (int i = 0; i < 25; i++) s[i] <= '0;
    end else begin
      done <= 1'b0;
      if (op_valid && op_ready) begin
        s          <= absorb(op_cont ? s : zero_st, op, msg, msg_len,
                             op_cont ? pos : 8'd0, !op_more);
        rate_lanes <= (op == KOP_SHAKE128) ? 5'd21 : 5'd17;
        rnd        <= '0;
        if (!op_more) begin
          // last chunk: pad and permute, then squeeze
          first     <= 1'b1;
          absorbing <= 1'b0;
          pos       <= '0;
          st        <= K_PERM;
        end else if ((op_cont ? pos : 8'd0) + msg_len == ((op == KOP_SHAKE128) ? 8'd168 : 8'd136)) begin
          // the chunk completes a rate block: permute, then take more chunks
          absorbing <= 1'b1;
          pos       <= '0;
          st        <= K_PERM;
        end else begin
          pos <= (op_cont ? pos : 8'd0) + msg_len;
          st  <= K_IDLE;
        end
      end else begin
        unique case (st)
          K_PERM: begin
            s <= s_next;
            if (int'(rnd) + ROUNDS_PER_CYCLE >= 24) begin
              rnd       <= '0;
              lane      <= '0;
              st        <= absorbing ? K_IDLE : K_SQUEEZE;
              absorbing <= 1'b0;
              done      <= first;
              first     <= 1'b0;
            end else begin
              rnd <= rnd + 5'(ROUNDS_PER_CYCLE);
            end
          end
          K_SQUEEZE: if (buf_pop) begin
            if (lane == rate_lanes - 1'b1) st <= K_PERM;
            else lane <= lane + 1'b1;
          end
          default: ;
        endcase
      end
    end
  end

  assign op_ready  = (st != K_PERM);
  assign busy      = (st == K_PERM);
  assign buf_valid = (st == K_SQUEEZE);
  assign buf_data  = s[lane];

endmodule
