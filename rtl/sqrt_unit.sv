// Dwandwa square-root unit, base-8 signed-digit (SDNS) operands.
// The host supplies the first root digit r0 = isqrt(G) of the leading digit
// group G (one or two digits), the first remainder s0 = G - r0^2 (ExtRemd,
// 5 bits) and the remaining digits b1 b2 .. of the number (4-bit two's
// complement, most significant first). The unit produces root digits
// r1 .. rp (4-bit two's complement) with the divisor T = 2*r0, so that
//   R = r0.r1 r2 .. rp (base 8)  ~=  sqrt(G.b1 b2 ..).
// Step k (k = 1 .. p):
//   gross dividend  G_k = 8*s + b_k                  (b_k = 0 past the end)
//   Dwandwa         Dw_k = sum_{i+j=k, i,j>=1} r_i r_j
//                        = LA_{k-1} + 2*r1*r_{k-1}  (r1^2 when k = 2)
//   partial div.    D = G_k - Dw_k                   -> PDR
//   look-ahead      LA_k = Dwandwa of r2 .. r_{k-1}  (modified Dwandwa unit:
//                   the part of the next Dwandwa already known)
//   modified PD     D' = D - floor(LA_k/8)           -> MPDR
//   if |D'| < 8*T:  r_k = trunc(D'/T), s = D - T*r_k  (non-restoring divider)
//   else correction: r_{k-1} moves by delta = sign(D') and
//                   D  -= delta*8*T + delta*2*r1 (+1 when r_{k-1} is r1),
//                   LA += delta*2*r2 (+1 when r_{k-1} is r2; 0 for k = 2),
//                   then the test is repeated. When r_{k-1} would leave
//                   -7..7, or k = 1, r_k saturates at +-7 instead.
// The data path (number memory and shift-add, Dwandwa/look-ahead unit, PDR,
// MPDR, correction determiner, correction unit, divider by 2*r0, remainder
// register Ri loaded first from ExtRemd, dual-port root memory) follows the
// document; the exact correction formulas, the saturation rule and the
// cycle-level sequencing are this design's.
// Root digit r_k is stored at root-memory address k; address 0 holds r0.
// Interface: ld_we/ld_addr/ld_data load b1.. at addresses 0..; num_len gives
// their count, prec = p (at most DEPTH-1). start runs; done stays high until
// the next start. root_we/root_addr/root show every root-memory write
// (DSR_RMWrEn/RootAddr/Root), corrections included. rd_addr/rd_data read the
// root memory while idle.
// Timing per digit without correction: 5 cycles + ceil(L/2), L = max(0,k-2);
// each correction adds 3 cycles.
module sqrt_unit
  import ia_pkg::*;
#(
  parameter int unsigned DEPTH = 32,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned ACCW = 16
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            ld_we,
  input  logic [AW-1:0]   ld_addr,
  input  logic [SD_W-1:0] ld_data,
  input  logic [SD_W-1:0] a0_in,     // r0, unsigned 1..7
  input  logic [4:0]      ext_remd,  // s0, unsigned
  input  logic [AW:0]     num_len,
  input  logic [AW:0]     prec,
  input  logic            start,
  output logic            done,
  output logic            busy,
  output logic            root_we,
  output logic [AW-1:0]   root_addr,
  output logic [SD_W-1:0] root,
  output logic [15:0]     corr_count,
  input  logic [AW-1:0]   rd_addr,
  output logic [SD_W-1:0] rd_data
);
  typedef enum logic [3:0] {
    R_IDLE,   // wait for start; A0 and counters are loaded on leaving
    R_INIT,   // write r0, Ri <= ExtRemd
    R_STEP,   // PDR <= G - Dwandwa, start look-ahead Dwandwa
    R_DWRUN,  // look-ahead Dwandwa running
    R_CHK,    // MPDR <= PDR - floor(LA/8)
    R_DET,    // correction determiner
    R_CORR,   // correction unit
    R_ROOT,   // divide, write root digit
    R_DONE
  } sqrt_state_e;
  sqrt_state_e state;

  typedef logic signed [ACCW-1:0] acc_t;

  logic [AW:0] k;
  acc_t s_rem, pdr, mpdr, la, la_prev, tt;
  logic signed [SD_W-1:0] r1, r2, rprev;
  logic [SD_W-1:0] a0;
  logic delta_neg, sat;

  // memories
  logic [AW-1:0] num_ra, rm_ra, rm_rb, rm_wa;
  logic [SD_W-1:0] num_da, num_db_unused, rm_da, rm_db, rm_wd;
  logic rm_we;

  dp_ram #(.W(SD_W), .DEPTH(DEPTH)) u_num (
    .clk, .we(ld_we), .waddr(ld_addr), .wdata(ld_data),
    .raddr_a(num_ra), .rdata_a(num_da), .raddr_b('0), .rdata_b(num_db_unused));
  dp_ram #(.W(SD_W), .DEPTH(DEPTH)) u_root (
    .clk, .we(rm_we), .waddr(rm_wa), .wdata(rm_wd),
    .raddr_a(rm_ra), .rdata_a(rm_da), .raddr_b(rm_rb), .rdata_b(rm_db));

  // look-ahead Dwandwa over r2 .. r_{k-1}
  logic [AW-1:0] dw_s, dw_e, dw_aa, dw_ab;
  logic dw_busy, dw_done;
  acc_t dw_acc;
  always_comb begin
    if (k >= 3) begin
      dw_s = AW'(2);
      dw_e = AW'(k - 1'b1);
    end else begin
      dw_s = AW'(1);
      dw_e = '0;
    end
  end
  dwandwa #(.DW(SD_W), .AW(AW), .ACCW(ACCW), .SIGNED(1'b1)) u_dw (
    .clk, .rst, .start(state == R_STEP), .s(dw_s), .e(dw_e),
    .addr_a(dw_aa), .addr_b(dw_ab), .data_a(rm_da), .data_b(rm_db),
    .busy(dw_busy), .done(dw_done), .acc(dw_acc));

  assign num_ra = AW'(k - 1'b1);
  always_comb begin
    rm_ra = dw_aa;
    rm_rb = dw_ab;
    if (state == R_IDLE || state == R_DONE) rm_rb = rd_addr;
  end
  assign rd_data = rm_db;

  // shift-add of the remainder and the next number digit, minus the Dwandwa
  acc_t b_k, dw_k, r1e, rpe, r2e;
  assign r1e  = acc_t'(r1);
  assign r2e  = acc_t'(r2);
  assign rpe  = acc_t'(rprev);
  assign b_k  = (k <= num_len) ? acc_t'($signed(num_da)) : '0;
  always_comb begin
    if (k == 1)      dw_k = '0;
    else if (k == 2) dw_k = r1e * r1e;
    else             dw_k = la_prev + ((r1e * rpe) <<< 1);
  end

  // correction determiner
  acc_t lim, mpdr_mag;
  logic is_corr;
  assign lim      = tt <<< SD_LOG2_RAD;
  assign mpdr_mag = mpdr[ACCW-1] ? -mpdr : mpdr;
  assign is_corr  = (mpdr_mag >= lim);

  // correction unit arithmetic
  logic signed [SD_W:0] rp_new;
  acc_t d_pdr, d_la;
  assign rp_new   = delta_neg ? {rprev[SD_W-1], rprev} - 5'sd1 : {rprev[SD_W-1], rprev} + 5'sd1;
  always_comb begin
    // change of PDR for delta = +1; negated for delta = -1 except the +1 terms
    d_pdr = lim + (r1e <<< 1);
    d_la  = (k >= 3) ? (r2e <<< 1) : '0;
  end

  // divider: |MPDR| / T
  logic [7:0] div_q;
  logic [SD_W-1:0] div_r_unused;
  nr_divider #(.NW(8), .DW(SD_W)) u_divider (
    .dividend(mpdr_mag[7:0]), .divisor(tt[SD_W-1:0]), .quotient(div_q), .remainder(div_r_unused));

  logic signed [SD_W-1:0] r_new;
  always_comb begin
    if (sat) r_new = delta_neg ? -4'sd7 : 4'sd7;
    else     r_new = mpdr[ACCW-1] ? -$signed(div_q[SD_W-1:0]) : $signed(div_q[SD_W-1:0]);
  end

  // root memory write port
  always_comb begin
    rm_we = 1'b0;
    rm_wa = k[AW-1:0];
    rm_wd = r_new;
    case (state)
      R_INIT: begin rm_we = 1'b1; rm_wa = '0;                   rm_wd = a0;                end
      R_CORR: begin rm_we = 1'b1; rm_wa = AW'(k - 1'b1);         rm_wd = rp_new[SD_W-1:0];  end
      R_ROOT: begin rm_we = 1'b1;                                                          end
      default: ;
    endcase
  end
  assign root_we   = rm_we;
  assign root_addr = rm_wa;
  assign root      = rm_wd;

  assign busy = (state != R_IDLE) && (state != R_DONE);
  assign done = (state == R_DONE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= R_IDLE;
      k <= '0;
      s_rem <= '0; pdr <= '0; mpdr <= '0; la <= '0; la_prev <= '0; tt <= '0;
      r1 <= '0; r2 <= '0; rprev <= '0; a0 <= '0;
      delta_neg <= 1'b0; sat <= 1'b0;
      corr_count <= '0;
    end else begin
      case (state)
        R_IDLE: if (start) begin
          a0    <= a0_in;
          tt    <= acc_t'(a0_in) <<< 1;
          state <= R_INIT;
        end
        R_INIT: begin
          k       <= 1;
          s_rem   <= acc_t'(ext_remd);
          la_prev <= '0;
          r1 <= '0; r2 <= '0; rprev <= '0;
          corr_count <= '0;
          state   <= R_STEP;
        end
        R_STEP: begin
          pdr   <= (s_rem <<< SD_LOG2_RAD) + b_k - dw_k;
          state <= R_DWRUN;
        end
        R_DWRUN: if (dw_done) begin
          la    <= dw_acc;
          state <= R_CHK;
        end
        R_CHK: begin
          mpdr  <= pdr - (la >>> SD_LOG2_RAD);
          sat   <= 1'b0;
          state <= R_DET;
        end
        R_DET: begin
          delta_neg <= mpdr[ACCW-1];
          if (is_corr) begin
            // can_corr needs the new delta: evaluate it directly here
            if ((k >= 2) && (mpdr[ACCW-1] ? (rprev != -4'sd7) : (rprev != 4'sd7))) begin
              state <= R_CORR;
            end else begin
              sat   <= 1'b1;
              state <= R_ROOT;
            end
          end else begin
            state <= R_ROOT;
          end
        end
        R_CORR: begin
          if (delta_neg) begin
            pdr <= pdr + d_pdr - ((k == 2) ? acc_t'(1) : acc_t'(0));
            la  <= la - d_la + ((k == 3) ? acc_t'(1) : acc_t'(0));
          end else begin
            pdr <= pdr - d_pdr - ((k == 2) ? acc_t'(1) : acc_t'(0));
            la  <= la + d_la + ((k == 3) ? acc_t'(1) : acc_t'(0));
          end
          rprev <= rp_new[SD_W-1:0];
          if (k == 2) r1 <= rp_new[SD_W-1:0];
          if (k == 3) r2 <= rp_new[SD_W-1:0];
          corr_count <= corr_count + 1'b1;
          state <= R_CHK;
        end
        R_ROOT: begin
          s_rem   <= pdr - tt * acc_t'(r_new);
          la_prev <= la;
          rprev   <= r_new;
          if (k == 1) r1 <= r_new;
          if (k == 2) r2 <= r_new;
          if (k == prec) begin
            state <= R_DONE;
          end else begin
            k     <= k + 1'b1;
            state <= R_STEP;
          end
        end
        R_DONE: if (start) begin
          a0    <= a0_in;
          tt    <= acc_t'(a0_in) <<< 1;
          state <= R_INIT;
        end
        default: state <= R_IDLE;
      endcase
    end
  end
endmodule
