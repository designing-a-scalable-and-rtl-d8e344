// main_ctrl: main control unit of the accelerator.
//
// Runs the high-level sequence of an operation and delegates work: Keccak
// hashing to the KAM (operation out, Keccak_done in) and every polynomial
// operation to the UPCU as a function code with scheme and security level
// (start out, UPCU_done in). It never drives JPAU opcodes or SRAM addresses
// itself. A command is accepted when cmd_valid is high and the unit is idle;
// cmd_done pulses when its sequence ends.
//
// Commands (mc_cmd_e):
//  * MC_POLY: one UPCU function with the given slots.
//  * MC_KAM: one KAM operation on the host's message; the host then reads
//    the squeezed stream itself. host_cont/host_more pass a chunk of a long
//    message; a chunk with more to follow ends the command when accepted.
//  * MC_DIL_SIGN: the opening of Dilithium signing: Start, SHAKE256 of the
//    seed (Keccak_done; the first 32 output bytes are kept as rho), matrix
//    expansion (SHAKE128 of rho and a zero nonce, sampled by the UPCU into
//    slot 0; leaves on UPC_done & Keccak_done), NTT of s1 and s2 (slots 1, 2
//    into 4, 5), NTT of t0 (slot 3 into 6).
//  * MC_FALCON_SIGN: the opening of Falcon (Peregrine) signing: Start, random
//    sampling (SHAKE256 of the seed, first 32 bytes kept on rnd_out; leaves
//    on Keccak_done), polynomial multiplication slot1*slot2 into slot 4, a
//    second one slot4*slot3 into slot 5, NTT of slot 5 into slot 6.
//
// The two sequences are the states and transition conditions printed in the
// control-unit diagram of the architecture description, which shows only
// their beginnings; the rest of each scheme's operation is not described and
// is not built. The slot assignment, the one-element matrix expansion, the
// capture of 32 output bytes and the direct commands are this design's.
module main_ctrl
  import pqc_pkg::*;
#(
  parameter int unsigned MSG_MAX = 64,
  localparam int unsigned SLOT_W = $clog2(NSLOT)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // command
  input  logic                  cmd_valid,
  output logic                  cmd_ready,
  input  logic [1:0]            cmd,          // mc_cmd_e
  input  scheme_e               scheme,
  input  sec_t                  sec,
  input  pfunc_e                pfunc,
  input  logic [SLOT_W-1:0]     src_a,
  input  logic [SLOT_W-1:0]     src_b,
  input  logic [SLOT_W-1:0]     dst,
  input  kop_e                  host_kop,
  input  logic [8*MSG_MAX-1:0]  host_msg,
  input  logic [7:0]            host_msg_len,
  input  logic                  host_cont,    // continue the message (chunked)
  input  logic                  host_more,    // more chunks follow
  input  logic [255:0]          seed,
  output logic                  cmd_done,
  output logic [255:0]          rnd_out,
  // KAM
  output logic                  kam_op_valid,
  input  logic                  kam_op_ready,
  output kop_e                  kam_op,
  output logic [8*MSG_MAX-1:0]  kam_msg,
  output logic [7:0]            kam_msg_len,
  output logic                  kam_op_cont,
  output logic                  kam_op_more,
  input  logic                  kam_done,
  input  logic                  kam_buf_valid,
  input  logic [63:0]           kam_buf_data,
  output logic                  kam_pop,
  // UPCU
  output logic                  upcu_start,
  output pfunc_e                upcu_func,
  output scheme_e               upcu_scheme,
  output sec_t                  upcu_sec,
  output logic [SLOT_W-1:0]     upcu_src_a,
  output logic [SLOT_W-1:0]     upcu_src_b,
  output logic [SLOT_W-1:0]     upcu_dst,
  input  logic                  upcu_done,
  // status: matrix expansion left on UPC_done & Keccak_done this cycle
  output logic                  join_evt
);

  typedef enum logic [1:0] {
    MC_POLY        = 2'd0,
    MC_KAM         = 2'd1,
    MC_DIL_SIGN    = 2'd2,
    MC_FALCON_SIGN = 2'd3
  } mc_cmd_e;

  typedef enum logic [4:0] {
    M_IDLE,
    M_POLY,                      // direct UPCU function
    M_KAM,                       // direct KAM operation
    D_START, D_SHAKE256, D_RHO, D_MATRIX_EXPAND, D_NTT_S1S2, D_NTT_T0,
    F_START, F_RANDOM_SAMPLING, F_RND, F_POLY_MULT1, F_POLY_MULT2, F_NTT,
    M_FINISH
  } mstate_e;

  mstate_e           st;
  logic              issued;      // the step's request has been sent
  logic              kdone_seen;  // Keccak_done seen during this step
  logic              second;      // second UPCU call of a state
  logic [1:0]        lane_cnt;
  logic [255:0]      rho;
  scheme_e           sch_r;
  sec_t              sec_r;
  pfunc_e            pf_r;
  logic [SLOT_W-1:0] a_r, b_r, d_r;
  kop_e              kop_r;
  logic              cont_r, more_r;

  assign cmd_ready = (st == M_IDLE);
  assign cmd_done  = (st == M_FINISH);
  assign join_evt  = (st == D_MATRIX_EXPAND) && second && upcu_done && kdone_seen;

  // Request of the current step (issued once per step).
  always_comb begin
    kam_op_valid = 1'b0;
    kam_op       = KOP_SHAKE256;
    kam_msg      = '0;
    kam_msg_len  = '0;
    kam_op_cont  = 1'b0;
    kam_op_more  = 1'b0;
    upcu_start   = 1'b0;
    upcu_func    = PF_NONE;
    upcu_scheme  = sch_r;
    upcu_sec     = sec_r;
    upcu_src_a   = '0;
    upcu_src_b   = '0;
    upcu_dst     = '0;
    kam_pop      = 1'b0;
    unique case (st)
      M_POLY: begin
        upcu_start = !issued;
        upcu_func  = pf_r;
        upcu_src_a = a_r;
        upcu_src_b = b_r;
        upcu_dst   = d_r;
      end
      M_KAM: begin
        kam_op_valid = !issued;
        kam_op       = kop_r;
        kam_msg      = host_msg;
        kam_msg_len  = host_msg_len;
        kam_op_cont  = cont_r;
        kam_op_more  = more_r;
      end
      D_SHAKE256, F_RANDOM_SAMPLING: begin
        kam_op_valid = !issued;
        kam_op       = KOP_SHAKE256;
        kam_msg      = (8*MSG_MAX)'(seed);
        kam_msg_len  = 8'd32;
      end
      D_RHO, F_RND: kam_pop = kam_buf_valid;
      D_MATRIX_EXPAND: begin
        // SHAKE128(rho || nonce 0x0000), then rejection sampling into slot 0
        kam_op_valid = !issued;
        kam_op       = KOP_SHAKE128;
        kam_msg      = (8*MSG_MAX)'(rho);
        kam_msg_len  = 8'd34;
        upcu_start   = issued && kdone_seen && !second;
        upcu_func    = PF_SAMPLE;
        upcu_dst     = SLOT_W'(0);
      end
      D_NTT_S1S2: begin
        upcu_start = !issued;
        upcu_func  = PF_NTT;
        upcu_src_a = second ? SLOT_W'(2) : SLOT_W'(1);
        upcu_dst   = second ? SLOT_W'(5) : SLOT_W'(4);
      end
      D_NTT_T0: begin
        upcu_start = !issued;
        upcu_func  = PF_NTT;
        upcu_src_a = SLOT_W'(3);
        upcu_dst   = SLOT_W'(6);
      end
      F_POLY_MULT1: begin
        upcu_start = !issued;
        upcu_func  = PF_PMUL;
        upcu_src_a = SLOT_W'(1);
        upcu_src_b = SLOT_W'(2);
        upcu_dst   = SLOT_W'(4);
      end
      F_POLY_MULT2: begin
        upcu_start = !issued;
        upcu_func  = PF_PMUL;
        upcu_src_a = SLOT_W'(4);
        upcu_src_b = SLOT_W'(3);
        upcu_dst   = SLOT_W'(5);
      end
      F_NTT: begin
        upcu_start = !issued;
        upcu_func  = PF_NTT;
        upcu_src_a = SLOT_W'(5);
        upcu_dst   = SLOT_W'(6);
      end
      default: ;
    endcase
  end

  // next step, clearing the per-step flags
  task automatic go(input mstate_e nxt);
    st         <= nxt;
    issued     <= 1'b0;
    kdone_seen <= 1'b0;
    second     <= 1'b0;
    lane_cnt   <= '0;
  endtask

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= M_IDLE;
      issued     <= 1'b0;
      kdone_seen <= 1'b0;
      second     <= 1'b0;
      lane_cnt   <= '0;
      rho        <= '0;
      rnd_out    <= '0;
      sch_r      <= SCH_KYBER;
      sec_r      <= '0;
      pf_r       <= PF_NONE;
      a_r        <= '0;
      b_r        <= '0;
      d_r        <= '0;
      kop_r      <= KOP_SHAKE128;
      cont_r     <= 1'b0;
      more_r     <= 1'b0;
    end else begin
      if (kam_op_valid && kam_op_ready) issued <= 1'b1;
      if (upcu_start) issued <= 1'b1;
      if (kam_done) kdone_seen <= 1'b1;
      unique case (st)
        M_IDLE: if (cmd_valid) begin
          sch_r <= scheme;
          sec_r <= sec;
          pf_r  <= pfunc;
          a_r   <= src_a;
          b_r   <= src_b;
          d_r   <= dst;
          kop_r <= host_kop;
          cont_r <= host_cont;
          more_r <= host_more;
          unique case (mc_cmd_e'(cmd))
            MC_POLY:        go(M_POLY);
            MC_KAM:         go(M_KAM);
            MC_DIL_SIGN:    go(D_START);
            default:        go(F_START);
          endcase
        end
        M_POLY: if (issued && upcu_done) go(M_FINISH);
        M_KAM:  if (issued && (more_r || kam_done)) go(M_FINISH);

        // Dilithium_sign
        D_START:    go(D_SHAKE256);                       // init complete
        D_SHAKE256: if (issued && kam_done) go(D_RHO);    // Keccak_done
        D_RHO: if (kam_buf_valid) begin
          rho[64*lane_cnt +: 64] <= kam_buf_data;
          lane_cnt <= lane_cnt + 1'b1;
          if (lane_cnt == 2'd3) go(D_MATRIX_EXPAND);
        end
        D_MATRIX_EXPAND: begin
          if (upcu_start) second <= 1'b1;
          if (second && upcu_done && kdone_seen) go(D_NTT_S1S2);  // UPC_done & Keccak_done
        end
        D_NTT_S1S2: if (issued && upcu_done) begin
          if (!second) begin
            second <= 1'b1;
            issued <= 1'b0;
          end else go(D_NTT_T0);                          // UPC_done
        end
        D_NTT_T0: if (issued && upcu_done) go(M_FINISH);  // UPC_done

        // Falcon_sign
        F_START:           go(F_RANDOM_SAMPLING);         // init complete
        F_RANDOM_SAMPLING: if (issued && kam_done) go(F_RND);
        F_RND: if (kam_buf_valid) begin
          rnd_out[64*lane_cnt +: 64] <= kam_buf_data;
          lane_cnt <= lane_cnt + 1'b1;
          if (lane_cnt == 2'd3) go(F_POLY_MULT1);         // after Keccak_done
        end
        F_POLY_MULT1: if (issued && upcu_done) go(F_POLY_MULT2);  // UPC_done
        F_POLY_MULT2: if (issued && upcu_done) go(F_NTT);         // UPC_done
        F_NTT:        if (issued && upcu_done) go(M_FINISH);      // UPC_done

        M_FINISH: go(M_IDLE);
        default:  go(M_IDLE);
      endcase
    end
  end

endmodule
