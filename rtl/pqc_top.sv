// pqc_top: multi-scheme post-quantum accelerator.
//
// One datapath serves Kyber, Dilithium, Falcon (Peregrine variant) and
// SPHINCS+. Work splits three ways: the KAM does all Keccak hashing (the
// whole of SPHINCS+, and the sampling and expansion in the lattice schemes);
// a cluster of NJ JPAUs does all polynomial arithmetic; the main control
// unit sequences an operation and hands each polynomial step to the UPCU as
// a function code, so that the per-scheme detail of addresses and opcodes
// lives in one place instead of in every scheme's state machine.
//
// Host interface:
//  * cmd_valid/cmd_ready/cmd_done with cmd (0 one polynomial function,
//    1 one KAM operation, 2 Dilithium signing opening, 3 Falcon signing
//    opening), scheme, sec, pfunc, polynomial slots, KAM operation, message
//    and seed; rnd_out returns the Falcon random value. A long message goes
//    to the KAM as several cmd 1 chunks (msg_cont, msg_more).
//  * host_mem_*: a word port into the polynomial SRAM (slot s, coefficient i
//    at address s*1024+i; reads return one cycle later). Use it while no
//    command runs.
//  * kam_buf_valid/kam_buf_data/kam_host_pop: the KAM output stream, for
//    results of a direct KAM operation.
//  * mon_*: one-cycle activity pulses (packed issue, product feedback,
//    butterfly, constant multiply, pipeline drain, the UPC_done &
//    Keccak_done join) for performance counters.
//
// Default configuration: 8 JPAUs, the larger of the configurations in the
// architecture description; ROUNDS_PER_CYCLE sets the KAM's speed.
module pqc_top
  import pqc_pkg::*;
#(
  parameter int unsigned NJ               = 8,
  parameter int unsigned ROUNDS_PER_CYCLE = 1,
  parameter int unsigned MSG_MAX          = 64,
  localparam int unsigned SLOT_W = $clog2(NSLOT)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  cmd_valid,
  output logic                  cmd_ready,
  input  logic [1:0]            cmd,
  input  scheme_e               scheme,
  input  sec_t                  sec,
  input  pfunc_e                pfunc,
  input  logic [SLOT_W-1:0]     src_a,
  input  logic [SLOT_W-1:0]     src_b,
  input  logic [SLOT_W-1:0]     dst,
  input  kop_e                  kop,
  input  logic [8*MSG_MAX-1:0]  msg,
  input  logic [7:0]            msg_len,
  input  logic                  msg_cont,   // chunk continues the previous message
  input  logic                  msg_more,   // more chunks follow
  input  logic [255:0]          seed,
  output logic                  cmd_done,
  output logic [255:0]          rnd_out,
  output logic                  upcu_busy,
  output logic                  kam_busy,
  input  logic                  host_mem_we,
  input  logic [MEM_AW-1:0]     host_mem_waddr,
  input  logic [COEF_W-1:0]     host_mem_wdata,
  input  logic [MEM_AW-1:0]     host_mem_raddr,
  output logic [COEF_W-1:0]     host_mem_rdata,
  output logic                  kam_buf_valid,
  output logic [63:0]           kam_buf_data,
  input  logic                  kam_host_pop,
  // activity monitor, one-cycle pulses for performance counting
  output logic                  mon_packed,    // packed (Kyber) issue
  output logic                  mon_feedback,  // reduction of a fed-back product
  output logic                  mon_bfly,      // butterfly issue
  output logic                  mon_scale,     // constant multiply (INTT scaling)
  output logic                  mon_drain,     // UPCU waiting for the pipeline
  output logic                  mon_join       // UPC_done & Keccak_done join
);

  localparam int unsigned NU = 2 * NJ, NP = 4 * NJ, TMP_AW = $clog2(NMAX);

  // main control <-> KAM / UPCU
  logic                 k_op_valid, k_op_ready, k_done, k_pop_mc, k_pop_upcu;
  kop_e                 k_op;
  logic [8*MSG_MAX-1:0] k_msg;
  logic [7:0]           k_msg_len;
  logic                 k_cont, k_more;
  logic                 u_start, u_done;
  pfunc_e               u_func;
  scheme_e              u_scheme;
  sec_t                 u_sec;
  logic [SLOT_W-1:0]    u_a, u_b, u_d;

  main_ctrl #(.MSG_MAX(MSG_MAX)) u_main (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd, .scheme, .sec, .pfunc,
    .src_a, .src_b, .dst, .host_kop(kop), .host_msg(msg), .host_msg_len(msg_len),
    .host_cont(msg_cont), .host_more(msg_more),
    .seed, .cmd_done, .rnd_out,
    .kam_op_valid(k_op_valid), .kam_op_ready(k_op_ready), .kam_op(k_op),
    .kam_msg(k_msg), .kam_msg_len(k_msg_len), .kam_op_cont(k_cont), .kam_op_more(k_more), .kam_done(k_done),
    .kam_buf_valid, .kam_buf_data, .kam_pop(k_pop_mc),
    .upcu_start(u_start), .upcu_func(u_func), .upcu_scheme(u_scheme), .upcu_sec(u_sec),
    .upcu_src_a(u_a), .upcu_src_b(u_b), .upcu_dst(u_d), .upcu_done(u_done),
    .join_evt(mon_join));

  kam #(.ROUNDS_PER_CYCLE(ROUNDS_PER_CYCLE), .MSG_MAX(MSG_MAX)) u_kam (
    .clk, .rst_n, .op_valid(k_op_valid), .op_ready(k_op_ready), .op(k_op),
    .msg(k_msg), .msg_len(k_msg_len), .op_cont(k_cont), .op_more(k_more), .done(k_done), .buf_valid(kam_buf_valid),
    .buf_data(kam_buf_data), .buf_pop(k_pop_mc | k_pop_upcu | kam_host_pop),
    .busy(kam_busy));

  // UPCU <-> datapath
  logic                iss_valid, iss_pk, iss_ycon_sel, iss_wcon_sel, iss_wneg;
  jop_e                iss_op;
  logic [COEF_W-1:0]   iss_q, iss_qinv, iss_ycon, iss_wcon;
  xsrc_e               iss_xsrc;
  logic [63:0]         iss_kam;
  logic [MEM_AW-1:0]   ra_addr [NP], rb_addr [NP], wb_addr [NP], sw_addr [4];
  logic                wb_en [NP], tmp_wen [NU], sw_en [4];
  logic [TW_AW-1:0]    tw_addr [NU];
  logic [TMP_AW-1:0]   tmp_raddr [NU], tmp_waddr [NU];
  logic                res0_valid;
  logic [1:0]          cmp0 [2];

  upcu #(.NJ(NJ)) u_upcu (
    .clk, .rst_n, .start(u_start), .func(u_func), .scheme(u_scheme), .sec(u_sec),
    .src_a(u_a), .src_b(u_b), .dst(u_d), .busy(upcu_busy), .done(u_done), .draining(mon_drain),
    .kam_valid(kam_buf_valid), .kam_data(kam_buf_data), .kam_pop(k_pop_upcu),
    .res0_valid, .cmp0,
    .iss_valid, .iss_op, .iss_pk, .iss_q, .iss_qinv, .iss_xsrc, .iss_ycon_sel, .iss_ycon,
    .iss_wcon_sel, .iss_wcon, .iss_wneg, .iss_kam, .ra_addr, .rb_addr, .tw_addr,
    .tmp_raddr, .wb_en, .wb_addr, .tmp_wen, .tmp_waddr, .sw_en, .sw_addr);

  poly_datapath #(.NJ(NJ)) u_dp (
    .clk, .rst_n,
    .iss_valid, .iss_op, .iss_pk, .iss_q, .iss_qinv, .iss_xsrc, .iss_ycon_sel, .iss_ycon,
    .iss_wcon_sel, .iss_wcon, .iss_wneg, .iss_kam, .ra_addr, .rb_addr, .tw_addr,
    .tmp_raddr, .wb_en, .wb_addr, .tmp_wen, .tmp_waddr, .sw_en, .sw_addr,
    .res0_valid, .cmp0,
    .host_we(host_mem_we), .host_waddr(host_mem_waddr), .host_wdata(host_mem_wdata),
    .host_raddr(host_mem_raddr), .host_rdata(host_mem_rdata));

  assign mon_packed   = iss_valid && iss_pk;
  assign mon_feedback = iss_valid && (iss_op == JOP_RED);
  assign mon_bfly     = iss_valid && (iss_op inside {JOP_BF_CT, JOP_BF_GS});
  assign mon_scale    = iss_valid && (iss_op == JOP_MMUL) && iss_wcon_sel;

endmodule
