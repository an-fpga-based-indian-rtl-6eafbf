// Ekadhika divisibility-testing unit, base-256 unsigned digits.
// The host computes the Ekadhika E (r digits) of an odd divisor M, i.e.
// E = (M*k + 1)/256 for the k that makes the last digit of M*k equal 255, and
// loads the dividend P (L digits) and E, least significant digit first. The
// unit then repeats the osculation
//     P <- floor(P/256) + E * (P mod 256)
// until P has at most r+1 digits. Each osculation keeps P mod M unchanged up
// to a factor of 256, so the reduced P is divisible by M exactly when the
// dividend is; the host finishes the test on the short number.
// Multiply-and-add unit: for digit position k the product E[k]*d plus the
// multiplier carry (MulCarry) gives a low byte that is added to P[k+1] with
// the adder carry (AddCarry); the sum is written back in place at the address
// P[k+1] came from, so "dropping the last digit" is just moving the base
// address of P up by one. The loop runs while Ekadhika digits remain (EQ1) or
// a carry is still non-zero (EQ3); digits above that are already in place.
// The first sum digit becomes the next multiplier digit. When a carry runs
// past the top digit of P, the length of P stays the same (or grows); otherwise it drops
// by one. This follows the document's multiply-and-add unit and state
// machine; the exact loop test and the cycle sequencing are this design's.
// Interface: ld_* write the dividend (BANK_A) and Ekadhika (BANK_B)
// memories; num_len = L, eka_len = r (1 <= r, r+1 < L is the useful case).
// start runs, done ("Over") stays high until the next start. num_we/num_addr/
// num_out show each write into P; res_base/res_len give where the reduced P
// sits (AddrOut). rd_addr/rd_data read the number memory while idle.
// The memory must hold L plus the number of carries past the top digit.
// Timing: 2 set-up cycles, then per osculation 1 + (r + 1 + t) cycles, t the
// number of extra carry digits; 1 final cycle.
module divis_unit
  import ia_pkg::*;
#(
  parameter int unsigned DEPTH = 128,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              ld_we,
  input  bank_e             ld_sel,
  input  logic [AW-1:0]     ld_addr,
  input  logic [BYTE_W-1:0] ld_data,
  input  logic [AW:0]       num_len,
  input  logic [AW:0]       eka_len,
  input  logic              start,
  output logic              done,
  output logic              busy,
  output logic              num_we,
  output logic [AW-1:0]     num_addr,
  output logic [BYTE_W-1:0] num_out,
  output logic [AW-1:0]     res_base,
  output logic [AW:0]       res_len,
  output logic [15:0]       osc_count,
  input  logic [AW-1:0]     rd_addr,
  output logic [BYTE_W-1:0] rd_data
);
  typedef enum logic [2:0] {
    V_IDLE,   // S1: wait for start
    V_LOAD,   // S3: load pointers and lengths, first multiplier digit
    V_OSC,    // S4/S7: start of one osculation
    V_RUN,    // S5: multiply and add, one digit per cycle
    V_DONE
  } divis_state_e;
  divis_state_e state;

  logic [AW:0]       base, len, elen, k;
  logic [BYTE_W-1:0] d, dnext, mc;
  logic              ac;

  logic [AW-1:0] num_ra, eka_ra;
  logic [BYTE_W-1:0] num_da, num_db, eka_da, eka_db_unused;
  logic nm_we;
  logic [AW-1:0] nm_wa;
  logic [BYTE_W-1:0] nm_wd;

  dp_ram #(.W(BYTE_W), .DEPTH(DEPTH)) u_num (
    .clk, .we(nm_we), .waddr(nm_wa), .wdata(nm_wd),
    .raddr_a(num_ra), .rdata_a(num_da), .raddr_b(rd_addr), .rdata_b(num_db));
  dp_ram #(.W(BYTE_W), .DEPTH(DEPTH)) u_eka (
    .clk, .we(ld_we && ld_sel == BANK_B), .waddr(ld_addr), .wdata(ld_data),
    .raddr_a(eka_ra), .rdata_a(eka_da), .raddr_b('0), .rdata_b(eka_db_unused));
  assign rd_data = num_db;

  // multiply and add
  logic [AW:0] pos;            // address of P[k+1]
  logic [BYTE_W-1:0] a_dig, e_dig;
  logic [2*BYTE_W-1:0] prod;
  logic [BYTE_W:0] sum;
  logic cont;
  assign pos    = base + k + 1'b1;
  assign num_ra = (state == V_LOAD) ? '0 : pos[AW-1:0];
  assign eka_ra = k[AW-1:0];
  assign a_dig  = (k + 1'b1 < len) ? num_da : '0;
  assign e_dig  = (k < elen) ? eka_da : '0;
  assign prod   = e_dig * d + {8'h00, mc};
  assign sum    = {1'b0, a_dig} + {1'b0, prod[BYTE_W-1:0]} + {8'h00, ac};
  // EQ1 not reached yet, or a carry remains
  assign cont   = (k + 1'b1 <= elen) || (prod[2*BYTE_W-1:BYTE_W] != 0) || sum[BYTE_W];

  always_comb begin
    nm_we = ld_we && ld_sel == BANK_A;
    nm_wa = ld_addr;
    nm_wd = ld_data;
    if (state == V_RUN) begin
      nm_we = 1'b1;
      nm_wa = pos[AW-1:0];
      nm_wd = sum[BYTE_W-1:0];
    end
  end
  assign num_we   = (state == V_RUN);
  assign num_addr = pos[AW-1:0];
  assign num_out  = sum[BYTE_W-1:0];
  assign res_base = base[AW-1:0];
  assign res_len  = len;

  assign busy = (state != V_IDLE) && (state != V_DONE);
  assign done = (state == V_DONE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= V_IDLE;
      base <= '0; len <= '0; elen <= '0; k <= '0;
      d <= '0; dnext <= '0; mc <= '0; ac <= 1'b0;
      osc_count <= '0;
    end else begin
      case (state)
        V_IDLE: if (start) state <= V_LOAD;
        V_LOAD: begin
          base  <= '0;
          len   <= num_len;
          elen  <= eka_len;
          d     <= num_da;      // least significant dividend digit
          osc_count <= '0;
          state <= V_OSC;
        end
        V_OSC: begin
          k  <= '0;
          mc <= '0;
          ac <= 1'b0;
          if (len <= elen + 1'b1) state <= V_DONE;
          else                    state <= V_RUN;
        end
        V_RUN: begin
          mc <= prod[2*BYTE_W-1:BYTE_W];
          ac <= sum[BYTE_W];
          if (k == 0) dnext <= sum[BYTE_W-1:0];
          if (cont) begin
            k <= k + 1'b1;
          end else begin
            // dropping the last digit shortens P by one unless a carry ran
            // up to or past its top digit
            if (k + 1'b1 < len) len <= len - 1'b1;
            else                len <= k + 1'b1;
            base <= base + 1'b1;
            d    <= (k == 0) ? sum[BYTE_W-1:0] : dnext;
            osc_count <= osc_count + 1'b1;
            state <= V_OSC;
          end
        end
        V_DONE: if (start) state <= V_LOAD;
        default: state <= V_IDLE;
      endcase
    end
  end
endmodule
