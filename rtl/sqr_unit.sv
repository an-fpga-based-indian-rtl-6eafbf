// Dwandwa squaring unit, base-256 unsigned digits.
// The square of an n-digit number is built one digit per iteration: iteration
// k (k = 0 .. 2n-2) forms the Dwandwa (duplex) of the digits Num[s..e] with
// s = max(0, k-n+1) and e = min(k, n-1), i.e. the sum of 2*Num[i]*Num[j] over
// i < j, i+j = k, plus Num[k/2]^2 for even k. The previous carry is added,
// the low byte goes to the output memory at address k and the rest is kept as
// carry; the last carry becomes digit 2n-1. Digits are least significant
// first. The Start and End pointers are loaded from the number's start and
// end; End is incremented until it reaches the last digit, Start afterwards,
// which reproduces the growing and shrinking Dwandwa vectors of the document's
// squaring state machine. The Dwandwa runs on the one-multiplier `dwandwa`
// engine.
// Interface: ld_we/ld_addr/ld_data load the number, len gives n, start runs,
// done stays high until the next start; mem_we/out_addr/out_value show each
// result digit as it is written (MemEnable/OutAddress/OutValue); rd_addr and
// rd_data read the result.
// Timing: 2 set-up cycles, ceil(L_k/2)+2 cycles per iteration, 1 cycle for
// the final carry.
module sqr_unit
  import ia_pkg::*;
#(
  parameter int unsigned DEPTH  = 32,
  parameter int unsigned ODEPTH = 2 * DEPTH,
  localparam int unsigned AW    = $clog2(DEPTH),
  localparam int unsigned OAW   = $clog2(ODEPTH),
  localparam int unsigned ACCW  = 2 * BYTE_W + AW + 3
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              ld_we,
  input  logic [AW-1:0]     ld_addr,
  input  logic [BYTE_W-1:0] ld_data,
  input  logic [AW:0]       len,
  input  logic              start,
  output logic              done,
  output logic              busy,
  output logic              mem_we,
  output logic [OAW-1:0]    out_addr,
  output logic [BYTE_W-1:0] out_value,
  input  logic [OAW-1:0]    rd_addr,
  output logic [BYTE_W-1:0] rd_data
);
  typedef enum logic [2:0] {
    Q_IDLE, Q_INIT, Q_ITER, Q_DWRUN, Q_CARRY, Q_DONE
  } sqr_state_e;
  sqr_state_e state;

  logic [AW:0]     sptr, eptr;
  logic [OAW:0]    k;
  logic [ACCW-1:0] carry;

  logic [AW-1:0] aa, ab;
  logic [BYTE_W-1:0] da, db;
  logic dw_done, dw_busy;
  logic signed [ACCW-1:0] dw_acc;

  dp_ram #(.W(BYTE_W), .DEPTH(DEPTH)) u_num (
    .clk, .we(ld_we), .waddr(ld_addr), .wdata(ld_data),
    .raddr_a(aa), .rdata_a(da), .raddr_b(ab), .rdata_b(db));

  dwandwa #(.DW(BYTE_W), .AW(AW), .ACCW(ACCW), .SIGNED(1'b0)) u_dw (
    .clk, .rst, .start(state == Q_ITER), .s(sptr[AW-1:0]), .e(eptr[AW-1:0]),
    .addr_a(aa), .addr_b(ab), .data_a(da), .data_b(db),
    .busy(dw_busy), .done(dw_done), .acc(dw_acc));

  logic [ACCW-1:0] sum;
  assign sum = $unsigned(dw_acc) + carry;

  logic [BYTE_W-1:0] out_unused;
  dp_ram #(.W(BYTE_W), .DEPTH(ODEPTH)) u_out (
    .clk, .we(mem_we), .waddr(out_addr), .wdata(out_value),
    .raddr_a(rd_addr), .rdata_a(rd_data), .raddr_b('0), .rdata_b(out_unused));

  logic last_iter;
  assign last_iter = (k == ((OAW+1)'(len) << 1) - (OAW+1)'(2));

  assign busy = (state != Q_IDLE) && (state != Q_DONE);
  assign done = (state == Q_DONE);

  always_comb begin
    mem_we    = 1'b0;
    out_addr  = k[OAW-1:0];
    out_value = sum[BYTE_W-1:0];
    if (state == Q_DWRUN && dw_done) mem_we = 1'b1;
    if (state == Q_CARRY) begin
      mem_we    = 1'b1;
      out_value = carry[BYTE_W-1:0];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= Q_IDLE;
      k     <= '0;
      carry <= '0;
      sptr  <= '0;
      eptr  <= '0;
    end else begin
      case (state)
        Q_IDLE: if (start) state <= Q_INIT;
        Q_INIT: begin
          sptr  <= '0;
          eptr  <= '0;
          k     <= '0;
          carry <= '0;
          state <= Q_ITER;
        end
        Q_ITER: state <= Q_DWRUN;
        Q_DWRUN: if (dw_done) begin
          carry <= sum >> BYTE_W;
          k     <= k + 1'b1;
          if (last_iter) begin
            state <= Q_CARRY;
          end else begin
            if (eptr + 1'b1 < len) eptr <= eptr + 1'b1;
            else                   sptr <= sptr + 1'b1;
            state <= Q_ITER;
          end
        end
        Q_CARRY: state <= Q_DONE;
        Q_DONE:  if (start) state <= Q_INIT;
        default: state <= Q_IDLE;
      endcase
    end
  end
endmodule
