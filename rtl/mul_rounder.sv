// mul_rounder: the multiplier/rounder block of the decimal32 BID multiplier.
//
// Given two unpacked operands it produces the unpacked product, rounded to
// 7 digits. Sign and exponent are simple: the signs are XORed and the biased
// exponents added with the bias 101 removed. The coefficient path uses ONE
// 24 x 24 radix-8 Booth multiplier with carry-save output for both jobs:
//
//   MUL  coefficient product IP = A_C * B_C (carry-save).
//   CHK  IP is added up (split_cpa); round_detect decides from the leading
//        one positions, the k-indexed LUT and a comparison with 10^n whether
//        rounding is needed and how many digits d to drop. No rounding: done.
//   R1..R4  IP * w_d (w_d ~ 10^-d, from recip_lut) in four passes of the
//        same multiplier on 24-bit halves of IP and w_d:
//          R1  IP_L * W_L
//          R2  IP_L * W_H + (R1 >> 24)        (feedback after the adder)
//          R3  IP_H * W_L + R2                 (feedback in carry-save form)
//          R4  IP_H * W_H + (R3 >> 24)        (bit 23 of R3 is P bit 47)
//   FIN  R4 gives P[94:48]; with P[47] this is the TP/R field pair that
//        round_increment turns into the final coefficient; exponent + d
//        (+1 when the result reached 10^7 and was re-scaled to 10^6).
//   DONE done is high for one cycle; result holds until the next start.
//
// Where the feedback must be shifted right by 24 bits it is taken from the
// adder output (exact), since a shifted carry-save pair can be off by a
// dropped carry; the unshifted R2 -> R3 feedback stays in carry-save form.
// Latency from the start cycle: 3 cycles without rounding, 8 with.
//
// Out of range exponents, special operands and exception handling are not
// part of the described datapath; this design's choices are: a biased
// exponent above 191 gives infinity (a zero coefficient instead keeps
// exponent 191), below 0 gives a zero of the product's
// sign with exponent 0; NaN in, or infinity times zero, gives NaN;
// infinity times a finite non-zero value gives infinity.
module mul_rounder
  import bid_pkg::*;
#(
  parameter tree_e  TREE  = TREE_WALLACE,
  parameter adder_e ADDER = ADD_CSEL
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  bid_fields_t fa,
  input  bid_fields_t fb,
  input  logic [2:0]  mode,
  output bid_fields_t fz,
  output logic        done,
  output logic        busy,
  output logic        rounded,    // last result needed rounding
  output logic        inexact     // last result dropped non-zero digits
);
  typedef enum logic [3:0] {
    S_IDLE, S_MUL, S_CHK, S_R1, S_R2, S_R3, S_R4, S_FIN, S_DONE
  } state_e;

  state_e      state;
  bid_fields_t a_q, b_q, z_q;
  logic [2:0]  mode_q;
  logic [49:0] ps_q, pc_q;
  logic [46:0] ip_q;
  logic [2:0]  d_q;
  logic        p47_q;
  logic        rounded_q, inexact_q;

  // ---------------- shared multiplier and its input multiplexers ----------
  logic [23:0] mul_m, mul_n;
  logic [49:0] mul_s, mul_c, mul_ps, mul_pc;
  logic [49:0] v_sum;              // ps_q + pc_q
  logic [24:0] v_low25;
  logic [47:0] wd;
  logic [4:0]  v_w;

  recip_lut u_rlut (.d(d_q), .wd, .v(v_w));
  split_cpa #(.ADDER(ADDER)) u_cpa (.ps(ps_q), .pc(pc_q), .ip(v_sum), .low25(v_low25));

  always_comb begin
    mul_m = a_q.c;
    mul_n = b_q.c;
    mul_s = '0;
    mul_c = '0;
    unique case (state)
      S_R1: begin mul_m = ip_q[23:0];          mul_n = wd[23:0];  end
      S_R2: begin mul_m = ip_q[23:0];          mul_n = wd[47:24];
                  mul_s = v_sum >> 24;                            end
      S_R3: begin mul_m = {1'b0, ip_q[46:24]}; mul_n = wd[23:0];
                  mul_s = ps_q; mul_c = pc_q;                     end
      S_R4: begin mul_m = {1'b0, ip_q[46:24]}; mul_n = wd[47:24];
                  mul_s = v_sum >> 24;                            end
      default: ;
    endcase
  end

  booth_multiplier #(.N(24), .W(50), .TREE(TREE), .ADDER(ADDER)) u_mul (
    .m(mul_m), .n(mul_n), .s(mul_s), .c(mul_c), .cin(1'b0), .ps(mul_ps), .pc(mul_pc));

  // ---------------- rounding detection ------------------------------------
  logic [5:0] k;
  logic       round_req;
  logic [2:0] d;
  round_detect #(.ADDER(ADDER)) u_det (
    .a_c(a_q.c), .b_c(b_q.c), .ps(ps_q), .pc(pc_q), .low25(v_low25),
    .k, .round_req, .d);

  // ---------------- final rounding ----------------------------------------
  logic [23:0] r_zc;
  logic        r_adj, r_inexact;
  logic        z_sign;
  assign z_sign = a_q.s ^ b_q.s;

  round_increment u_rinc (
    .x({v_sum[46:0], p47_q}), .v(v_w), .sign(z_sign), .mode(mode_q),
    .zc(r_zc), .adj(r_adj), .inexact(r_inexact));

  // ---------------- exponent ----------------------------------------------
  logic signed [10:0] ie;          // A_E + B_E - bias
  logic signed [10:0] ze_fin;      // after rounding
  assign ie     = $signed({3'b000, a_q.e}) + $signed({3'b000, b_q.e}) - 11'sd101;
  assign ze_fin = ie + $signed({8'd0, d_q}) + $signed({10'd0, r_adj});

  // Pack a finite result, turning an out-of-range exponent into inf or zero
  function automatic bid_fields_t pack_finite(logic s, logic signed [10:0] e,
                                              logic [23:0] c);
    bid_fields_t r;
    r.s   = s;
    r.cls = CLS_FINITE;
    if (e > 11'sd191 && c == '0) begin
      r.e = 8'(EMAX_B);
      r.c = '0;
    end else if (e > 11'sd191) begin
      r.cls = CLS_INF;
      r.e   = '0;
      r.c   = '0;
    end else if (e < 11'sd0) begin
      r.e = '0;
      r.c = '0;
    end else begin
      r.e = e[7:0];
      r.c = c;
    end
    return r;
  endfunction

  // Special operands
  logic a_zero, b_zero, any_nan, any_inf, inf_times_zero;
  assign a_zero         = (a_q.cls == CLS_FINITE) && (a_q.c == '0);
  assign b_zero         = (b_q.cls == CLS_FINITE) && (b_q.c == '0);
  assign any_nan        = (a_q.cls == CLS_NAN) || (b_q.cls == CLS_NAN);
  assign any_inf        = (a_q.cls == CLS_INF) || (b_q.cls == CLS_INF);
  assign inf_times_zero = any_inf && (a_zero || b_zero);

  // ---------------- controller --------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      a_q       <= '0;
      b_q       <= '0;
      z_q       <= '0;
      mode_q    <= '0;
      ps_q      <= '0;
      pc_q      <= '0;
      ip_q      <= '0;
      d_q       <= '0;
      p47_q     <= 1'b0;
      rounded_q <= 1'b0;
      inexact_q <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          a_q    <= fa;
          b_q    <= fb;
          mode_q <= mode;
          state  <= S_MUL;
        end
        S_MUL: begin
          ps_q  <= mul_ps;
          pc_q  <= mul_pc;
          state <= S_CHK;
        end
        S_CHK: begin
          ip_q      <= v_sum[46:0];
          d_q       <= d;
          rounded_q <= 1'b0;
          inexact_q <= 1'b0;
          if (any_nan || inf_times_zero) begin
            z_q   <= '{s: 1'b0, e: '0, c: '0, cls: CLS_NAN};
            state <= S_DONE;
          end else if (any_inf) begin
            z_q   <= '{s: z_sign, e: '0, c: '0, cls: CLS_INF};
            state <= S_DONE;
          end else if (!round_req) begin
            z_q   <= pack_finite(z_sign, ie, v_sum[23:0]);
            state <= S_DONE;
          end else begin
            rounded_q <= 1'b1;
            state     <= S_R1;
          end
        end
        S_R1, S_R2, S_R3: begin
          ps_q  <= mul_ps;
          pc_q  <= mul_pc;
          state <= state_e'(state + 4'd1);
        end
        S_R4: begin
          ps_q  <= mul_ps;
          pc_q  <= mul_pc;
          p47_q <= v_sum[23];
          state <= S_FIN;
        end
        S_FIN: begin
          z_q       <= pack_finite(z_sign, ze_fin, r_zc);
          inexact_q <= r_inexact;
          state     <= S_DONE;
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign fz      = z_q;
  assign done    = (state == S_DONE);
  assign busy    = (state != S_IDLE);
  assign rounded = rounded_q;
  assign inexact = inexact_q;

  // The 10^n comparator needs the carry vector's LSB to be 0.
  a_pc_lsb_zero: assert property (@(posedge clk) disable iff (!rst_n)
                                  (state == S_CHK) |-> (pc_q[0] == 1'b0));
  // Rounding only ever drops 1 to 7 digits.
  a_d_range: assert property (@(posedge clk) disable iff (!rst_n)
                              (state == S_R1) |-> (d_q != 3'd0));

  logic unused;
  assign unused = ^{k, v_sum[49:47], v_low25};
endmodule
