// Controller of the Koblitz-curve point multiplier.
//
// Runs the "Frobenius-and-add-or-subtract" point multiplication: Q <- +-P for the
// leading digit, then for every further tau-NAF digit a Frobenius map Q <- (x1^2, y1^2)
// followed, for a nonzero digit, by Q <- Q + P or Q <- Q - P (affine coordinates,
// inversion by the Dimitrov-Jarvinen addition chain for m = 163).
//
// Each routine is a short micro-program (function ucode); a micro-operation drives the
// FAU and register-file selects for one cycle, or for cnt cycles (repeated squaring),
// or for m cycles (multiplication Z <- T1 x T2). A micro-operation whose condition
// (negative / positive digit) is false is skipped without costing a cycle.
// Routine lengths for m = 163: initialisation 4 cycles, Frobenius map 5, point addition
// 1986 and point subtraction 1988 (11 multiplications of 163 cycles, 162 squaring
// cycles and 31 or 33 single cycles), plus a 1-cycle reload of Z before an addition
// when the preceding Frobenius map left y1 in Z.
//
// Scalar handling: the top bit of the k register tells a zero digit (one left shift)
// from a nonzero one (two left shifts, sign in the second bit); a nonzero digit is
// followed by one more Frobenius map for the zero digit that the code implies, unless
// the expansion ends there. The expansion length in digits, klen, is counted down.
//
// Interface: pulse start for one cycle while idle; k_in, klen, px, py are sampled then
// (the register file and k register load in that cycle). done pulses for one cycle when
// Q is in x1/y1. err (with done) flags a scalar whose leading digit is zero or klen = 0,
// which this affine design cannot represent; nothing is computed then.
// rst_n is an asynchronous, active-low reset. The assertion at the end is disabled
// while rst_n is low; a linter may report rst_n as used both asynchronously and
// synchronously because of it, but the assertion builds no hardware.
//
// The routines follow the described micro-routines; the Frobenius variant that starts
// from x1, the reload, the digit counter and the error flag are this design's own.
module controller
  import kpm_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [LW-1:0] klen,
  input  logic          k_lead,     // top bit of k_in (leading digit nonzero)
  input  logic          k_lead_neg, // second bit of k_in (its sign)
  input  logic [1:0]    k_msbs,     // top two bits of the k register
  // datapath controls
  output s1_e           s1,
  output s2_e           s2,
  output logic          z_en,
  output sr_e           sr,
  output logic          s_t1,
  output logic          s_t2,
  output logic          en_t1,
  output logic          en_t2,
  output logic          en_x1,
  output logic          en_y1,
  output logic          ld_p,
  output logic          s_k,
  output logic          k_shift,
  // status
  output logic          busy,
  output logic          done,
  output logic          err,
  output routine_e      routine,
  output logic          rt_first    // first cycle of a routine
);

  // ---------------------------------------------------------------- micro-program
  function automatic uop_t mk(ukind_e k, s1_e a, s2_e b, sr_e r, dst_e d,
                              int unsigned n, cond_e c, bit l);
    uop_t o;
    o.kind = k; o.s1 = a; o.s2 = b; o.sr = r; o.dst = d;
    o.cnt = 7'(n); o.cond = c; o.last = l;
    return o;
  endfunction
  // Z <- R(r) + s2
  function automatic uop_t zop(sr_e r, s2_e b, cond_e c = C_ALL, bit l = 1'b0);
    return mk(U_ZOP, S1_R, b, r, D_NONE, 1, c, l);
  endfunction
  function automatic uop_t zsq(int unsigned n, bit l = 1'b0);
    return mk(U_ZSQ, S1_ZERO, S2_ZSQ, R_T1, D_NONE, n, C_ALL, l);
  endfunction
  function automatic uop_t t2sq(int unsigned n);
    return mk(U_T2SQ, S1_ZERO, S2_ZERO, R_T1, D_NONE, n, C_ALL, 1'b0);
  endfunction
  function automatic uop_t mul();
    return mk(U_MUL, S1_J, S2_ZSQ, R_T1, D_NONE, 1, C_ALL, 1'b0);
  endfunction
  function automatic uop_t st(dst_e d, bit l = 1'b0);
    return mk(U_ST, S1_ZERO, S2_ZERO, R_T1, d, 1, C_ALL, l);
  endfunction

  function automatic uop_t ucode(logic [UA_W-1:0] a);
    unique case (a)
      // initialisation: Q <- (x, y) or (x, x + y)
      7'd0:  return zop(R_X, S2_ZERO);
      7'd1:  return st(D_X1);
      7'd2:  return zop(R_Y, S2_Z, C_NEG);
      7'd3:  return zop(R_Y, S2_ZERO, C_POS);
      7'd4:  return st(D_Y1, 1'b1);
      // Frobenius map, y1 first (Z = y1 on entry)
      7'd5:  return zsq(1);
      7'd6:  return st(D_Y1);
      7'd7:  return zop(R_X1, S2_ZERO);
      7'd8:  return zsq(1);
      7'd9:  return st(D_X1, 1'b1);
      // Frobenius map, x1 first (Z = x1 on entry)
      7'd10: return zsq(1);
      7'd11: return st(D_X1);
      7'd12: return zop(R_Y1, S2_ZERO);
      7'd13: return zsq(1);
      7'd14: return st(D_Y1, 1'b1);
      // reload Z <- x1
      7'd15: return zop(R_X1, S2_ZERO, C_ALL, 1'b1);
      // point addition / subtraction, Z = x1 on entry
      7'd16: return zop(R_X, S2_Z);          // Z <- x1 + x
      7'd17: return zsq(1);                  // (x1 + x)^2: inversion input
      7'd18: return st(D_T1);
      7'd19: return zsq(1);
      7'd20: return st(D_T2);
      7'd21: return mul();                   // exponent 1+2
      7'd22: return st(D_T1);
      7'd23: return t2sq(1);
      7'd24: return mul();                   // 1+2+2^2
      7'd25: return st(D_T1);
      7'd26: return zsq(3);
      7'd27: return st(D_T2);
      7'd28: return mul();
      7'd29: return st(D_T1);
      7'd30: return t2sq(3);
      7'd31: return mul();                   // x (1+2^3+2^6)
      7'd32: return st(D_T1);
      7'd33: return zsq(9);
      7'd34: return st(D_T2);
      7'd35: return mul();
      7'd36: return st(D_T1);
      7'd37: return t2sq(9);
      7'd38: return mul();                   // x (1+2^9+2^18)
      7'd39: return st(D_T1);
      7'd40: return zsq(27);
      7'd41: return st(D_T2);
      7'd42: return mul();
      7'd43: return st(D_T1);
      7'd44: return t2sq(27);
      7'd45: return mul();                   // x (1+2^27+2^54)
      7'd46: return st(D_T1);
      7'd47: return zsq(81);
      7'd48: return st(D_T2);
      7'd49: return mul();                   // x (1+2^81): (x1 + x)^-1
      7'd50: return st(D_T1);
      7'd51: return zop(R_Y1, S2_ZERO);
      7'd52: return zop(R_Y, S2_Z);
      7'd53: return zop(R_X, S2_Z, C_NEG);   // -P = (x, x + y)
      7'd54: return st(D_T2);
      7'd55: return mul();                   // lambda
      7'd56: return st(D_T1);
      7'd57: return zop(R_T1, S2_ZSQ);       // lambda^2 + lambda
      7'd58: return zop(R_X1, S2_Z);
      7'd59: return zop(R_X, S2_Z);
      7'd60: return st(D_X1);
      7'd61: return zop(R_X1, S2_ONE);       // + a (a = 1)
      7'd62: return st(D_X1);                // x3
      7'd63: return zop(R_X, S2_Z);
      7'd64: return st(D_T2);
      7'd65: return mul();                   // lambda (x3 + x)
      7'd66: return zop(R_X1, S2_Z);
      7'd67: return zop(R_Y, S2_Z);
      7'd68: return zop(R_X, S2_Z, C_NEG);
      7'd69: return st(D_Y1, 1'b1);          // y3
      default: return st(D_NONE, 1'b1);
    endcase
  endfunction

  // ---------------------------------------------------------------- state
  typedef enum logic {ST_IDLE, ST_RUN} state_e;

  state_e          state, state_n;
  logic [UA_W-1:0] pc, pc_n;
  logic [7:0]      rep, rep_n;
  logic [LW-1:0]   dl, dl_n;          // digits still to process
  logic            neg, neg_n;        // sign of the digit being added
  logic            pf, pf_n;          // Frobenius map pending (zero after nonzero)
  logic            pa, pa_n;          // point addition pending
  logic            zx, zx_n;          // Z holds x1 (else y1)
  logic [1:0]      ksh, ksh_n;        // k shifts still to do
  routine_e        rt, rt_n;
  logic            first_n;
  logic            done_n, err_n;

  uop_t        u, u_nx;
  logic [7:0]  reps;
  logic        uop_end;

  function automatic logic cond_ok(cond_e c, logic ng);
    return (c == C_ALL) || (c == C_NEG && ng) || (c == C_POS && !ng);
  endfunction

  assign u       = ucode(pc);
  assign reps    = (u.kind == U_MUL) ? 8'(M) :
                   (u.kind == U_ZSQ || u.kind == U_T2SQ) ? 8'(u.cnt) : 8'd1;
  assign uop_end = (rep == reps - 8'd1);
  assign u_nx    = ucode(pc + UA_W'(1));

  // datapath controls
  always_comb begin
    s1    = S1_ZERO;
    s2    = S2_Z;
    z_en  = 1'b0;
    sr    = u.sr;
    s_t1  = 1'b1;
    s_t2  = 1'b1;
    en_t1 = 1'b0;
    en_t2 = 1'b0;
    en_x1 = 1'b0;
    en_y1 = 1'b0;
    if (state == ST_RUN) begin
      unique case (u.kind)
        U_ZOP: begin
          z_en = 1'b1; s1 = u.s1; s2 = u.s2;
        end
        U_ZSQ: begin
          z_en = 1'b1; s1 = S1_ZERO; s2 = S2_ZSQ;
        end
        U_T2SQ: begin
          en_t2 = 1'b1; s_t2 = 1'b0;
        end
        U_MUL: begin
          z_en = 1'b1; s1 = S1_J; s2 = (rep == 8'd0) ? S2_ZERO : S2_ZSQ;
          en_t1 = 1'b1; en_t2 = 1'b1; s_t1 = 1'b0; s_t2 = 1'b0;
        end
        default: begin // U_ST
          en_t1 = (u.dst == D_T1);
          en_t2 = (u.dst == D_T2);
          en_x1 = (u.dst == D_X1);
          en_y1 = (u.dst == D_Y1);
        end
      endcase
    end
  end

  assign ld_p     = (state == ST_IDLE) && start;
  assign s_k      = (state == ST_IDLE) && start;
  assign k_shift  = (state == ST_RUN) && (ksh != 2'd0);
  assign busy     = (state == ST_RUN);
  assign routine  = rt;

  // sequencing and routine dispatch
  always_comb begin
    logic dl_z;
    dl_z    = 1'b0;
    state_n = state;
    pc_n    = pc;
    rep_n   = rep;
    dl_n    = dl;
    neg_n   = neg;
    pf_n    = pf;
    pa_n    = pa;
    zx_n    = zx;
    ksh_n   = (k_shift) ? ksh - 2'd1 : ksh;
    rt_n    = rt;
    first_n = 1'b0;
    done_n  = 1'b0;
    err_n   = err;

    if (state == ST_IDLE) begin
      if (start) begin
        err_n = 1'b0;
        if (!k_lead || klen == '0) begin
          done_n = 1'b1;
          err_n  = 1'b1;
        end else begin
          state_n = ST_RUN;
          rt_n    = RT_INIT;
          pc_n    = UA_W'(UA_INIT);
          rep_n   = 8'd0;
          first_n = 1'b1;
          neg_n   = k_lead_neg;
          dl_n    = klen - LW'(1);
          ksh_n   = 2'd2;
          pf_n    = 1'b0;
          pa_n    = 1'b0;
        end
      end
    end else if (!uop_end) begin
      rep_n = rep + 8'd1;
    end else if (!u.last) begin
      rep_n = 8'd0;
      pc_n  = cond_ok(u_nx.cond, neg) ? pc + UA_W'(1) : pc + UA_W'(2);
    end else begin
      // end of a routine: bookkeeping, then choose the next one
      rep_n = 8'd0;
      unique case (rt)
        RT_INIT: begin
          zx_n = 1'b0;
          if (dl != '0) begin pf_n = 1'b1; dl_n = dl - LW'(1); end
        end
        RT_FROB_Y: zx_n = 1'b1;
        RT_FROB_X: zx_n = 1'b0;
        RT_RELOAD: zx_n = 1'b1;
        default: begin // RT_PADD
          zx_n = 1'b0;
          pa_n = 1'b0;
          if (dl != '0) begin pf_n = 1'b1; dl_n = dl - LW'(1); end
        end
      endcase
      dl_z    = (dl_n == '0);
      first_n = 1'b1;
      if (pf_n) begin
        pf_n = 1'b0;
        rt_n = zx_n ? RT_FROB_X : RT_FROB_Y;
      end else if (pa_n) begin
        rt_n = zx_n ? RT_PADD : RT_RELOAD;
      end else if (dl_z) begin
        state_n = ST_IDLE;
        rt_n    = RT_NONE;
        first_n = 1'b0;
        done_n  = 1'b1;
      end else begin
        rt_n = zx_n ? RT_FROB_X : RT_FROB_Y;
        dl_n = dl_n - LW'(1);
        if (k_msbs[1]) begin
          pa_n  = 1'b1;
          neg_n = k_msbs[0];
          ksh_n = 2'd2;
        end else begin
          ksh_n = 2'd1;
        end
      end
      unique case (rt_n)
        RT_FROB_Y: pc_n = UA_W'(UA_FROB_Y);
        RT_FROB_X: pc_n = UA_W'(UA_FROB_X);
        RT_RELOAD: pc_n = UA_W'(UA_RELOAD);
        RT_PADD:   pc_n = UA_W'(UA_PADD);
        default:   pc_n = UA_W'(UA_INIT);
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= ST_IDLE;
      pc       <= '0;
      rep      <= '0;
      dl       <= '0;
      neg      <= 1'b0;
      pf       <= 1'b0;
      pa       <= 1'b0;
      zx       <= 1'b0;
      ksh      <= '0;
      rt       <= RT_NONE;
      rt_first <= 1'b0;
      done     <= 1'b0;
      err      <= 1'b0;
    end else begin
      state    <= state_n;
      pc       <= pc_n;
      rep      <= rep_n;
      dl       <= dl_n;
      neg      <= neg_n;
      pf       <= pf_n;
      pa       <= pa_n;
      zx       <= zx_n;
      ksh      <= ksh_n;
      rt       <= rt_n;
      rt_first <= first_n;
      done     <= done_n;
      err      <= err_n;
    end
  end

  // the k register must have finished shifting before the next digit is read
  property p_shift_done;
    @(posedge clk) disable iff (!rst_n)
      (state == ST_RUN && uop_end && u.last) |-> (ksh == 2'd0);
  endproperty
  a_shift_done: assert property (p_shift_done);

endmodule
