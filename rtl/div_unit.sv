// Straight division unit, base-8 signed-digit (SDNS) operands.
// Digits are 4-bit two's complement, most significant first at address 0.
// The divisor A = a0 a1 .. a(n-1) must be normalised by the host so that its
// leading digit a0 is positive and at least 4 (half the base). The dividend
// B = b0 b1 .. b(m-1) is read as if padded with zeros. Quotient digits
// q0 q1 .. q(p-1) are produced in the same alignment as the dividend, so that
//   B * 8^(n-1) ~= Q * A   (B, Q taken as p-digit integers, A as n digits).
// Step t:
//   gross dividend  G  = 8*S + b_t                  (S: previous remainder)
//   cross product   CP = sum_{j=1..min(n-1,t)} q_{t-j} a_j
//                      = LA_{t-1} + q_{t-1} a1     (previous look-ahead reused)
//   partial div.    D  = G - CP                      -> PDR
//   look-ahead      LA = sum_{j=1..min(n-2,t)} q_{t-j} a_{j+1}  (cross product
//                        engine, two multipliers, quotient x divisor memory)
//   modified PD     D' = D - floor(LA/8)             -> MPDR
//   if |D'| < 8*a0: q_t = trunc(D'/a0) (non-restoring divider on magnitudes
//                   with pre/post complement), S = D - q_t*a0
//   else correction: the correction unit moves the previous quotient digit
//                   by delta = sign(D') and repairs D and LA, then the test
//                   is repeated. If that digit would leave -7..7 it is
//                   wrapped by -8*delta and the change carries into the digit
//                   above, and so on. With J digits touched,
//                   D  -= delta*(8*a0 + a1 + .. + aJ),
//                   LA += delta*((1-8)*(a2 + .. + aJ) + a(J+1)).
//   In step 0 there is no earlier digit: the quotient digit saturates at +-7.
// The data path (PDR, MPDR, look-ahead accumulator, divisor and quotient
// counters, two multipliers, correction determiner, correction unit) follows
// the document; the exact correction bookkeeping above, the wrap rule when a
// digit overflows and the cycle-level sequencing are this design's.
// Interface: ld_* writes the dividend (BANK_A) and divisor (BANK_B) memories;
// dvd_len = m, dvs_len = n, prec = p. start runs; done stays high until the
// next start. quot_we/quot_addr/quot show each quotient write
// (QuotWrEn/QuotAddr/Quotient); corrections are also written there.
// corr_count counts corrections. rd_addr/rd_data read the quotient while idle.
// Timing: 2 set-up cycles, then per digit 5 cycles + ceil(L/2) with
// L = min(n-2, t); each correction adds 4 cycles (correction unit, apply,
// check, decide) plus one per extra digit the carry reaches.
module div_unit
  import ia_pkg::*;
#(
  parameter int unsigned DEPTH = 32,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned ACCW = 16
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            ld_we,
  input  bank_e           ld_sel,
  input  logic [AW-1:0]   ld_addr,
  input  logic [SD_W-1:0] ld_data,
  input  logic [AW:0]     dvd_len,
  input  logic [AW:0]     dvs_len,
  input  logic [AW:0]     prec,
  input  logic            start,
  output logic            done,
  output logic            busy,
  output logic            quot_we,
  output logic [AW-1:0]   quot_addr,
  output logic [SD_W-1:0] quot,
  output logic [15:0]     corr_count,
  input  logic [AW-1:0]   rd_addr,
  output logic [SD_W-1:0] rd_data
);
  typedef enum logic [3:0] {
    D_IDLE,     // wait for start
    D_INIT,     // load a0 and a1, clear counters
    D_LA,       // PDR <= G - CP, start look-ahead cross product
    D_LARUN,    // look-ahead cross product running
    D_CHK,      // MPDR <= PDR - floor(LA/8)
    D_DET,      // correction determiner
    D_CU,       // correction unit: adjust one quotient digit
    D_CUAPPLY,  // correction unit: write back PDR and LA
    D_QUOT,     // divide, write quotient digit, keep remainder
    D_DONE
  } div_state_e;
  div_state_e state;

  typedef logic signed [ACCW-1:0] acc_t;

  logic [AW:0]      t;       // quotient address counter (QAR)
  logic [AW:0]      j;       // correction depth
  acc_t             s_rem, pdr, mpdr, la, la_prev, acc_d, acc_la;
  logic signed [SD_W-1:0] a0, a1, qprev;
  logic             delta_neg, sat;

  // memories
  logic [AW-1:0] dvd_ra, dvs_ra, dvs_rb, quo_ra, quo_rb, quo_wa;
  logic [SD_W-1:0] dvd_da, dvd_db_unused, dvs_da, dvs_db, quo_da, quo_db, quo_wd;
  logic quo_we;

  dp_ram #(.W(SD_W), .DEPTH(DEPTH)) u_dvd (
    .clk, .we(ld_we && ld_sel == BANK_A), .waddr(ld_addr), .wdata(ld_data),
    .raddr_a(dvd_ra), .rdata_a(dvd_da), .raddr_b('0), .rdata_b(dvd_db_unused));
  dp_ram #(.W(SD_W), .DEPTH(DEPTH)) u_dvs (
    .clk, .we(ld_we && ld_sel == BANK_B), .waddr(ld_addr), .wdata(ld_data),
    .raddr_a(dvs_ra), .rdata_a(dvs_da), .raddr_b(dvs_rb), .rdata_b(dvs_db));
  dp_ram #(.W(SD_W), .DEPTH(DEPTH)) u_quo (
    .clk, .we(quo_we), .waddr(quo_wa), .wdata(quo_wd),
    .raddr_a(quo_ra), .rdata_a(quo_da), .raddr_b(quo_rb), .rdata_b(quo_db));

  // look-ahead cross product: quotient digits q[t-L .. t-1] x divisor a[L+1 .. 2]
  logic [AW:0] la_len;
  logic [AW-1:0] cp_s1, cp_e1, cp_s2, cp_e2, cp_xa, cp_xb, cp_ya, cp_yb;
  logic cp_busy, cp_done;
  acc_t cp_acc;

  always_comb begin
    if (dvs_len < 2)                la_len = '0;
    else if (t < dvs_len - (AW+1)'(2))    la_len = t;
    else                            la_len = dvs_len - (AW+1)'(2);
    if (la_len == 0) begin
      cp_s1 = AW'(1); cp_e1 = '0; cp_s2 = AW'(1); cp_e2 = '0;
    end else begin
      cp_s1 = AW'(t - la_len);
      cp_e1 = AW'(t - 1'b1);
      cp_s2 = AW'(2);
      cp_e2 = AW'(la_len + 1'b1);
    end
  end

  cross_product #(.DW(SD_W), .AW(AW), .ACCW(ACCW), .SIGNED(1'b1)) u_cp (
    .clk, .rst, .start(state == D_LA),
    .s1(cp_s1), .e1(cp_e1), .s2(cp_s2), .e2(cp_e2),
    .x_addr_a(cp_xa), .x_addr_b(cp_xb), .y_addr_a(cp_ya), .y_addr_b(cp_yb),
    .x_data_a(quo_da), .x_data_b(quo_db), .y_data_a(dvs_da), .y_data_b(dvs_db),
    .busy(cp_busy), .done(cp_done), .acc(cp_acc));

  // correction unit digit arithmetic
  logic [AW:0] cu_addr;
  logic signed [SD_W:0] q_old, q_inc, q_wrap;
  logic cu_fits;
  acc_t aj, aj1;
  assign cu_addr = t - j;
  assign q_old   = {quo_da[SD_W-1], quo_da};
  assign q_inc   = delta_neg ? q_old - 4'sd1 : q_old + 4'sd1;
  assign q_wrap  = delta_neg ? q_inc + 5'sd8 : q_inc - 5'sd8;
  assign cu_fits = (q_inc <= 5'sd7 && q_inc >= -5'sd7) || (cu_addr == 0);
  assign aj      = (j < dvs_len)        ? acc_t'($signed(dvs_da)) : '0;
  assign aj1     = (j + 1'b1 < dvs_len) ? acc_t'($signed(dvs_db)) : '0;

  // memory address steering
  always_comb begin
    dvd_ra = t[AW-1:0];
    dvs_ra = cp_ya;
    dvs_rb = cp_yb;
    quo_ra = cp_xa;
    quo_rb = cp_xb;
    if (state == D_INIT) begin
      dvs_ra = '0;
      dvs_rb = AW'(1);
    end else if (state == D_CU) begin
      dvs_ra = j[AW-1:0];
      dvs_rb = AW'(j + 1'b1);
      quo_ra = cu_addr[AW-1:0];
    end else if (state == D_IDLE || state == D_DONE) begin
      quo_rb = rd_addr;
    end
  end
  assign rd_data = quo_db;

  // correction determiner
  acc_t lim, mpdr_mag;
  logic is_corr;
  assign lim      = acc_t'($signed({1'b0, a0[SD_W-2:0]})) <<< SD_LOG2_RAD;
  assign mpdr_mag = mpdr[ACCW-1] ? -mpdr : mpdr;
  assign is_corr  = (mpdr_mag >= lim);

  // quotient digit: divide |MPDR| by a0, then restore the sign
  logic [7:0] div_q;
  logic [SD_W-1:0] div_r_unused;
  nr_divider #(.NW(8), .DW(SD_W)) u_divider (
    .dividend(mpdr_mag[7:0]), .divisor(a0), .quotient(div_q), .remainder(div_r_unused));

  logic signed [SD_W-1:0] q_new;
  always_comb begin
    if (sat) q_new = delta_neg ? -4'sd7 : 4'sd7;
    else     q_new = mpdr[ACCW-1] ? -$signed(div_q[SD_W-1:0]) : $signed(div_q[SD_W-1:0]);
  end

  // gross dividend minus cross product
  acc_t gross, cp_now, b_t;
  assign b_t    = (t < dvd_len) ? acc_t'($signed(dvd_da)) : '0;
  assign gross  = (s_rem <<< SD_LOG2_RAD) + b_t;
  assign cp_now = la_prev + acc_t'(qprev) * acc_t'(a1);

  // quotient memory write port: new digits and corrections
  always_comb begin
    quo_we = 1'b0;
    quo_wa = t[AW-1:0];
    quo_wd = q_new;
    if (state == D_QUOT) quo_we = 1'b1;
    if (state == D_CU) begin
      quo_we = 1'b1;
      quo_wa = cu_addr[AW-1:0];
      quo_wd = cu_fits ? q_inc[SD_W-1:0] : q_wrap[SD_W-1:0];
    end
  end
  assign quot_we   = quo_we;
  assign quot_addr = quo_wa;
  assign quot      = quo_wd;

  assign busy = (state != D_IDLE) && (state != D_DONE);
  assign done = (state == D_DONE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= D_IDLE;
      t <= '0; j <= '0;
      s_rem <= '0; pdr <= '0; mpdr <= '0; la <= '0; la_prev <= '0;
      acc_d <= '0; acc_la <= '0;
      a0 <= '0; a1 <= '0; qprev <= '0;
      delta_neg <= 1'b0; sat <= 1'b0;
      corr_count <= '0;
    end else begin
      case (state)
        D_IDLE: if (start) state <= D_INIT;
        D_INIT: begin
          a0      <= $signed(dvs_da);
          a1      <= (dvs_len > 1) ? $signed(dvs_db) : '0;
          t       <= '0;
          s_rem   <= '0;
          la_prev <= '0;
          qprev   <= '0;
          corr_count <= '0;
          state   <= D_LA;
        end
        D_LA: begin
          pdr   <= gross - cp_now;
          state <= D_LARUN;
        end
        D_LARUN: if (cp_done) begin
          la    <= cp_acc;
          state <= D_CHK;
        end
        D_CHK: begin
          mpdr  <= pdr - (la >>> SD_LOG2_RAD);
          sat   <= 1'b0;
          state <= D_DET;
        end
        D_DET: begin
          delta_neg <= mpdr[ACCW-1];
          if (is_corr && t != 0) begin
            j      <= 1;
            acc_d  <= '0;
            acc_la <= '0;
            state  <= D_CU;
          end else begin
            sat   <= is_corr;
            state <= D_QUOT;
          end
        end
        D_CU: begin
          acc_d <= acc_d + aj;
          if (cu_fits) begin
            acc_la <= acc_la + aj1;
            state  <= D_CUAPPLY;
          end else begin
            acc_la <= acc_la + aj1 - (aj1 <<< SD_LOG2_RAD);
            j      <= j + 1'b1;
          end
        end
        D_CUAPPLY: begin
          if (delta_neg) begin
            pdr <= pdr + (lim + acc_d);
            la  <= la - acc_la;
          end else begin
            pdr <= pdr - (lim + acc_d);
            la  <= la + acc_la;
          end
          corr_count <= corr_count + 1'b1;
          state <= D_CHK;
        end
        D_QUOT: begin
          s_rem   <= pdr - acc_t'(q_new) * acc_t'(a0);
          la_prev <= la;
          qprev   <= q_new;
          t       <= t + 1'b1;
          if (t + 1'b1 == prec) state <= D_DONE;
          else                  state <= D_LA;
        end
        D_DONE: if (start) state <= D_INIT;
        default: state <= D_IDLE;
      endcase
    end
  end
endmodule
