// upcu: Unified Polynomial Control Unit.
//
// The main control unit hands the UPCU a polynomial function code together
// with the scheme, the security level and three polynomial slots (sources A
// and B, destination). The UPCU derives q, N, the Montgomery constant and the
// packing mode from scheme and level, then issues one JPAU operation per
// cycle to poly_datapath: SRAM and ROM addresses, multiplexer selects and
// the delayed write-back addresses. When the function is finished and its
// last results are written it pulses done (UPCU_done) for one cycle.
//
// Functions (pqc_pkg::pfunc_e):
//  * PF_SAMPLE: rejection sampling from the KAM squeeze buffer. START waits
//    for the buffer, AND masks the candidates of a 64-bit word (bits 47:0:
//    two 24-bit candidates, or four 12-bit Kyber candidates in packed mode),
//    COMP compares them with q through the JPAU and the ones below q are
//    written to the destination in order until count == N.
//  * PF_PMUL: coefficient-wise Montgomery product A*B*R^-1 in two passes:
//    MUL streams the 48-bit products into the temporary store, RED streams
//    them back through the JPAUs for reduction into the destination.
//  * PF_NTT / PF_INTT: in-place Cooley-Tukey forward transform (bit-reversed
//    output) and Gentleman-Sande inverse with final scaling by 1/N, one
//    butterfly layer after the other, NU butterflies per cycle; Kyber runs
//    its 7-layer transform. Layers are separated by a pipeline drain.
//  * PF_ADD / PF_SUB: coefficient-wise modular sum and difference.
// Kyber's coefficient-wise functions run packed, four coefficients per JPAU.
//
// What follows the architecture description: the function-code interface
// (function, security, scheme in; UPCU_done out; KAM buffer-ready and compare
// result in; memory addresses, multiplexer controls and JPAU opcodes out),
// and the sequence names of its diagram (Sample_polynomial: Start, AND, COMP;
// Polynomial_multiplication: Start, AND, until count == N; NTT_INTT: Start,
// butterfly stages). What each state does beyond its name, the encodings,
// the memory layout and the drain timing are this design's own.
module upcu
  import pqc_pkg::*;
#(
  parameter int unsigned NJ = 8,
  localparam int unsigned NU = 2 * NJ,
  localparam int unsigned NP = 4 * NJ,
  localparam int unsigned TMP_AW = $clog2(NMAX),
  localparam int unsigned SLOT_W = $clog2(NSLOT)
) (
  input  logic                clk,
  input  logic                rst_n,
  // command from the main control unit
  input  logic                start,
  input  pfunc_e              func,
  input  scheme_e             scheme,
  input  sec_t                sec,
  input  logic [SLOT_W-1:0]   src_a,
  input  logic [SLOT_W-1:0]   src_b,
  input  logic [SLOT_W-1:0]   dst,
  output logic                busy,
  output logic                done,
  output logic                draining,     // waiting for the pipeline to empty
  // KAM squeeze buffer
  input  logic                kam_valid,
  input  logic [63:0]         kam_data,
  output logic                kam_pop,
  // compare result of JPAU 0
  input  logic                res0_valid,
  input  logic [1:0]          cmp0 [2],
  // issue to poly_datapath
  output logic                iss_valid,
  output jop_e                iss_op,
  output logic                iss_pk,
  output logic [COEF_W-1:0]   iss_q,
  output logic [COEF_W-1:0]   iss_qinv,
  output xsrc_e               iss_xsrc,
  output logic                iss_ycon_sel,
  output logic [COEF_W-1:0]   iss_ycon,
  output logic                iss_wcon_sel,
  output logic [COEF_W-1:0]   iss_wcon,
  output logic                iss_wneg,
  output logic [63:0]         iss_kam,
  output logic [MEM_AW-1:0]   ra_addr   [NP],
  output logic [MEM_AW-1:0]   rb_addr   [NP],
  output logic [TW_AW-1:0]    tw_addr   [NU],
  output logic [TMP_AW-1:0]   tmp_raddr [NU],
  output logic                wb_en     [NP],
  output logic [MEM_AW-1:0]   wb_addr   [NP],
  output logic                tmp_wen   [NU],
  output logic [TMP_AW-1:0]   tmp_waddr [NU],
  output logic                sw_en     [4],
  output logic [MEM_AW-1:0]   sw_addr   [4]
);

  typedef enum logic [4:0] {
    U_IDLE,
    U_SP_START, U_SP_AND, U_SP_WAIT, U_SP_COMP, U_SP_CHECK, U_SP_WRITE,
    U_PM_START, U_PM_AND, U_PM_RED,
    U_STREAM,
    U_NT_START, U_NT_BFLY, U_NT_SCALE,
    U_DRAIN, U_DONE
  } state_e;

  localparam int unsigned DRAIN_CYC = JPAU_LAT;   // see the drain timing note

  state_e            st, after_drain;
  pfunc_e            fn;
  scheme_e           sch;
  logic [COEF_W-1:0] q_r, qinv_r, scale_r;
  logic              pk_r;
  logic [3:0]        logn_r, loglen_r, minlog_r;
  logic [10:0]       n_r;
  logic [MEM_AW-1:0] a_base, b_base, d_base;
  logic [TW_AW-1:0]  tw_base_r;
  logic [10:0]       cnt;          // coefficient / butterfly counter
  logic [TMP_AW-1:0] wc;           // word counter into the temporary store
  logic              first_layer;
  logic [2:0]        wcnt;
  logic [63:0]       kam_word;

  localparam logic [COEF_W-1:0] QINV_K = neg_qinv(Q_KYBER, 24);
  localparam logic [COEF_W-1:0] QINV_D = neg_qinv(Q_DILITHIUM, 24);
  localparam logic [COEF_W-1:0] QINV_F = neg_qinv(Q_FALCON, 24);
  localparam logic [COEF_W-1:0] SC_K   = intt_scale(SCH_KYBER, 2'd0);
  localparam logic [COEF_W-1:0] SC_D   = intt_scale(SCH_DILITHIUM, 2'd0);
  localparam logic [COEF_W-1:0] SC_F5  = intt_scale(SCH_FALCON, 2'd0);
  localparam logic [COEF_W-1:0] SC_F10 = intt_scale(SCH_FALCON, 2'd1);

  // steps per issue
  logic [10:0] step;
  assign step = pk_r ? 11'(NP) : 11'(NU);

  // --------------------------------------------------------------- FSM
  logic [2:0] n_acc;           // candidates accepted in U_SP_WRITE
  logic       acc [4];

  always_comb begin
    for (int i = 0; i < 4; i++) acc[i] = 1'b0;
    if (pk_r) begin
      acc[0] = cmp0[0][0]; acc[1] = cmp0[0][1]; acc[2] = cmp0[1][0]; acc[3] = cmp0[1][1];
    end else begin
      acc[0] = cmp0[0][0]; acc[2] = cmp0[1][0];
    end
    n_acc = 3'(acc[0]) + 3'(acc[1]) + 3'(acc[2]) + 3'(acc[3]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= U_IDLE;
      after_drain <= U_DONE;
      fn          <= PF_NONE;
      sch         <= SCH_KYBER;
      q_r         <= '0;
      qinv_r      <= '0;
      scale_r     <= '0;
      pk_r        <= 1'b0;
      logn_r      <= '0;
      loglen_r    <= '0;
      minlog_r    <= '0;
      n_r         <= '0;
      a_base      <= '0;
      b_base      <= '0;
      d_base      <= '0;
      tw_base_r   <= '0;
      cnt         <= '0;
      wc          <= '0;
      first_layer <= 1'b0;
      wcnt        <= '0;
      kam_word    <= '0;
    end else begin
      unique case (st)
        U_IDLE: if (start) begin
          fn        <= func;
          sch       <= scheme;
          q_r       <= q_of(scheme);
          logn_r    <= 4'(logn_of(scheme, sec));
          n_r       <= 11'(1 << logn_of(scheme, sec));
          tw_base_r <= TW_AW'(tw_base(scheme, sec));
          minlog_r  <= (scheme == SCH_KYBER) ? 4'd1 : 4'd0;
          unique case (scheme)
            SCH_KYBER:     begin qinv_r <= QINV_K; scale_r <= SC_K; end
            SCH_DILITHIUM: begin qinv_r <= QINV_D; scale_r <= SC_D; end
            default:       begin qinv_r <= QINV_F; scale_r <= (sec == 2'd0) ? SC_F5 : SC_F10; end
          endcase
          // the transforms always run unpacked
          pk_r   <= packed_of(scheme) && !(func inside {PF_NTT, PF_INTT});
          a_base <= MEM_AW'(src_a) * MEM_AW'(NMAX);
          b_base <= MEM_AW'(src_b) * MEM_AW'(NMAX);
          d_base <= MEM_AW'(dst) * MEM_AW'(NMAX);
          cnt    <= '0;
          wc     <= '0;
          unique case (func)
            PF_SAMPLE:      st <= U_SP_START;
            PF_PMUL:        st <= U_PM_START;
            PF_NTT, PF_INTT: st <= U_NT_START;
            PF_ADD, PF_SUB: st <= U_STREAM;
            default:        st <= U_DONE;
          endcase
        end

        // ------------------------------------------- Sample_polynomial
        U_SP_START: if (cnt >= n_r) st <= U_DONE;
                    else if (kam_valid) begin
                      kam_word <= kam_data;
                      st       <= U_SP_AND;
                    end
        U_SP_AND: begin
          wcnt <= 3'd1;
          st   <= U_SP_WAIT;
        end
        U_SP_WAIT: if (wcnt == 0) st <= U_SP_COMP; else wcnt <= wcnt - 1'b1;
        U_SP_COMP: begin
          wcnt <= 3'd2;
          st   <= U_SP_CHECK;
        end
        U_SP_CHECK: if (wcnt == 0) st <= U_SP_WRITE; else wcnt <= wcnt - 1'b1;
        U_SP_WRITE: begin
          cnt <= (cnt + 11'(n_acc) >= n_r) ? n_r : cnt + 11'(n_acc);
          st  <= U_SP_START;
        end

        // ------------------------------------ Polynomial_multiplication
        U_PM_START: st <= U_PM_AND;
        U_PM_AND: begin
          cnt <= cnt + step;
          wc  <= wc + 1'b1;
          if (cnt + step >= n_r) begin
            cnt         <= '0;
            wc          <= '0;
            wcnt        <= 3'(DRAIN_CYC);
            after_drain <= U_PM_RED;
            st          <= U_DRAIN;
          end
        end
        U_PM_RED, U_STREAM: begin
          cnt <= cnt + step;
          wc  <= wc + 1'b1;
          if (cnt + step >= n_r) begin
            wcnt        <= 3'(DRAIN_CYC);
            after_drain <= U_DONE;
            st          <= U_DRAIN;
          end
        end

        // ---------------------------------------------------- NTT_INTT
        U_NT_START: begin
          loglen_r    <= (fn == PF_NTT) ? logn_r - 1'b1 : minlog_r;
          first_layer <= 1'b1;
          cnt         <= '0;
          st          <= U_NT_BFLY;
        end
        U_NT_BFLY: begin
          cnt <= cnt + 11'(NU);
          if (cnt + 11'(NU) >= (n_r >> 1)) begin
            cnt         <= '0;
            first_layer <= 1'b0;
            wcnt        <= 3'(DRAIN_CYC);
            st          <= U_DRAIN;
            if (fn == PF_NTT) begin
              loglen_r    <= loglen_r - 1'b1;
              after_drain <= (loglen_r == minlog_r) ? U_DONE : U_NT_BFLY;
            end else begin
              loglen_r    <= loglen_r + 1'b1;
              after_drain <= (loglen_r == logn_r - 1'b1) ? U_NT_SCALE : U_NT_BFLY;
            end
          end
        end
        U_NT_SCALE: begin
          cnt <= cnt + 11'(NU);
          if (cnt + 11'(NU) >= n_r) begin
            wcnt        <= 3'(DRAIN_CYC);
            after_drain <= U_DONE;
            st          <= U_DRAIN;
          end
        end

        // The last issue of a pass is written back four cycles later; the
        // drain lets the next pass read it (one cycle in the state that
        // issued it plus DRAIN_CYC + 1 here).
        U_DRAIN: if (wcnt == 0) st <= after_drain; else wcnt <= wcnt - 1'b1;
        U_DONE:  st <= U_IDLE;
        default: st <= U_IDLE;
      endcase
    end
  end

  assign busy = (st != U_IDLE);
  assign done = (st == U_DONE);
  assign draining = (st == U_DRAIN);
  assign kam_pop = (st == U_SP_START) && (cnt < n_r) && kam_valid;

  // ------------------------------------------------------------- issue
  always_comb begin
    logic [10:0] len, g, jj, b, idx, grp;
    iss_valid    = 1'b0;
    iss_op       = JOP_NOP;
    iss_pk       = pk_r;
    iss_q        = q_r;
    iss_qinv     = qinv_r;
    iss_xsrc     = XS_MEM;
    iss_ycon_sel = 1'b0;
    iss_ycon     = '0;
    iss_wcon_sel = 1'b0;
    iss_wcon     = '0;
    iss_wneg     = 1'b0;
    iss_kam      = kam_word;
    for (int p = 0; p < NP; p++) begin
      ra_addr[p] = '0;
      rb_addr[p] = '0;
      wb_en[p]   = 1'b0;
      wb_addr[p] = '0;
    end
    for (int u = 0; u < NU; u++) begin
      tw_addr[u]   = '0;
      tmp_raddr[u] = '0;
      tmp_wen[u]   = 1'b0;
      tmp_waddr[u] = '0;
    end
    for (int i = 0; i < 4; i++) begin
      sw_en[i]   = 1'b0;
      sw_addr[i] = '0;
    end
    len = 11'd1 << loglen_r;

    unique case (st)
      U_SP_AND: begin
        iss_valid    = 1'b1;
        iss_op       = JOP_AND;
        iss_xsrc     = XS_KAM;
        iss_ycon_sel = 1'b1;
        unique case (sch)
          SCH_KYBER:     iss_ycon = 24'hFFFFFF;   // two 12-bit candidates
          SCH_DILITHIUM: iss_ycon = 24'h7FFFFF;   // 23-bit candidate
          default:       iss_ycon = 24'h003FFF;   // 14-bit candidate
        endcase
      end
      U_SP_COMP: begin
        iss_valid    = 1'b1;
        iss_op       = JOP_CMP;
        iss_xsrc     = XS_FB;
        iss_ycon_sel = 1'b1;
        iss_ycon     = pk_r ? {q_r[HALF_W-1:0], q_r[HALF_W-1:0]} : q_r;
      end
      U_SP_WRITE: begin
        idx = cnt;
        for (int i = 0; i < 4; i++) begin
          if (acc[i] && idx < n_r) begin
            sw_en[i]   = 1'b1;
            sw_addr[i] = d_base + MEM_AW'(idx);
          end
          idx = idx + 11'(acc[i]);
        end
      end

      U_PM_AND, U_PM_RED, U_STREAM: begin
        iss_valid = 1'b1;
        iss_op    = (st == U_PM_AND) ? JOP_MUL :
                    (st == U_PM_RED) ? JOP_RED :
                    (fn == PF_SUB)   ? JOP_SUB : JOP_ADD;
        for (int p = 0; p < NP; p++) begin
          // packed: every port carries a coefficient; unpacked: even ports
          if (pk_r || p % 2 == 0) begin
            idx = pk_r ? cnt + 11'(p) : cnt + 11'(p / 2);
            ra_addr[p] = a_base + MEM_AW'(idx);
            rb_addr[p] = b_base + MEM_AW'(idx);
            wb_en[p]   = (st != U_PM_AND);
            wb_addr[p] = d_base + MEM_AW'(idx);
          end
        end
        for (int u = 0; u < NU; u++) begin
          tmp_wen[u]   = (st == U_PM_AND);
          tmp_waddr[u] = TMP_AW'(wc * TMP_AW'(NU) + TMP_AW'(u));
          tmp_raddr[u] = TMP_AW'(wc * TMP_AW'(NU) + TMP_AW'(u));
        end
      end

      U_NT_BFLY: begin
        iss_valid = 1'b1;
        iss_op    = (fn == PF_NTT) ? JOP_BF_CT : JOP_BF_GS;
        iss_wneg  = (fn == PF_INTT);
        grp       = (n_r >> 1) >> loglen_r;       // groups in this layer
        for (int u = 0; u < NU; u++) begin
          b  = cnt + 11'(u);
          g  = b >> loglen_r;
          jj = (g << (loglen_r + 1'b1)) + (b & (len - 1'b1));
          ra_addr[2*u]   = (first_layer ? a_base : d_base) + MEM_AW'(jj);
          rb_addr[2*u]   = (first_layer ? a_base : d_base) + MEM_AW'(jj + len);
          wb_en[2*u]     = 1'b1;
          wb_en[2*u+1]   = 1'b1;
          wb_addr[2*u]   = d_base + MEM_AW'(jj);
          wb_addr[2*u+1] = d_base + MEM_AW'(jj + len);
          tw_addr[u]     = tw_base_r + ((fn == PF_NTT) ? TW_AW'(grp + g)
                                                        : TW_AW'((grp << 1) - 11'd1 - g));
        end
      end

      U_NT_SCALE: begin
        iss_valid    = 1'b1;
        iss_op       = JOP_MMUL;
        iss_wcon_sel = 1'b1;
        iss_wcon     = scale_r;
        for (int u = 0; u < NU; u++) begin
          idx = cnt + 11'(u);
          ra_addr[2*u] = d_base + MEM_AW'(idx);
          wb_en[2*u]   = 1'b1;
          wb_addr[2*u] = d_base + MEM_AW'(idx);
        end
      end

      default: ;
    endcase
  end

  // The compare result must arrive exactly when the UPCU looks at it.
  a_cmp_timing: assert property (@(posedge clk) disable iff (!rst_n)
                                 st == U_SP_WRITE |-> res0_valid);

endmodule
