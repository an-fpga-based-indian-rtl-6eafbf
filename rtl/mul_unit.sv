// Urdhva Tiryak multiplication unit, base-256 unsigned digits.
// The product of Num1 (m digits) and Num2 (n digits) is built one product
// digit per iteration: iteration k (k = 0 .. m+n-2) forms the cross product of
// all digit pairs Num1[i]*Num2[j] with i+j = k, adds the carry left by the
// previous iteration, writes the low byte to the output memory at address k
// and keeps the rest as the next carry. A final step writes the last carry as
// digit m+n-1. Digits are stored least significant first at address 0.
// Four pointer registers (Start1, End1, Start2, End2) select the digits of
// each cross product: the vector grows while k < min(m,n), keeps its length
// while one operand is exhausted, and shrinks at the end, as in the
// document's control state machine. The pointers move by one each iteration
// (End1 until it reaches m-1, then Start2; End2 until n-1, then Start1).
// The cross product itself runs on the two-multiplier `cross_product` engine.
// Interface: the host writes operands with ld_we/ld_sel/ld_addr/ld_data and
// gives the lengths; `start` runs the unit; `done` (MulOver) stays high until
// the next start. While running, mem_we/op_addr/op_data show each product
// digit as it is written (MemWrEn/OpData). rd_addr/rd_data read the result.
// Timing: 2 cycles of set-up, ceil(L_k/2)+2 cycles per iteration (L_k the
// cross product length), 1 cycle for the last carry.
module mul_unit
  import ia_pkg::*;
#(
  parameter int unsigned DEPTH  = 32,         // operand digits
  parameter int unsigned ODEPTH = 2 * DEPTH,  // product digits
  localparam int unsigned AW    = $clog2(DEPTH),
  localparam int unsigned OAW   = $clog2(ODEPTH),
  localparam int unsigned ACCW  = 2 * BYTE_W + AW + 2
) (
  input  logic                clk,
  input  logic                rst,
  // host load port
  input  logic                ld_we,
  input  bank_e               ld_sel,
  input  logic [AW-1:0]       ld_addr,
  input  logic [BYTE_W-1:0]   ld_data,
  input  logic [AW:0]         len1,      // m, 1..DEPTH
  input  logic [AW:0]         len2,      // n, 1..DEPTH
  input  logic                start,
  output logic                done,
  output logic                busy,
  // product digit stream
  output logic                mem_we,
  output logic [OAW-1:0]      op_addr,
  output logic [BYTE_W-1:0]   op_data,
  // result read port
  input  logic [OAW-1:0]      rd_addr,
  output logic [BYTE_W-1:0]   rd_data
);
  typedef enum logic [2:0] {
    M_IDLE,   // S1: wait for start
    M_INIT,   // S2: load pointers, clear carry
    M_ITER,   // S3/S5/S7: start one cross product
    M_CPRUN,  // S4/S6/S8: cross product running, then add carry and write
    M_CARRY,  // S9: write last carry
    M_DONE    // S10: finished
  } mul_state_e;
  mul_state_e state;

  logic [AW:0] start1, end1, start2, end2;
  logic [OAW:0] k;
  logic [ACCW-1:0] carry;

  // cross product engine and operand memories
  logic [AW-1:0] xa, xb, ya, yb;
  logic [BYTE_W-1:0] xda, xdb, yda, ydb;
  logic cp_start, cp_done, cp_busy;
  logic signed [ACCW-1:0] cp_acc;

  dp_ram #(.W(BYTE_W), .DEPTH(DEPTH)) u_num1 (
    .clk, .we(ld_we && ld_sel == BANK_A), .waddr(ld_addr), .wdata(ld_data),
    .raddr_a(xa), .rdata_a(xda), .raddr_b(xb), .rdata_b(xdb));
  dp_ram #(.W(BYTE_W), .DEPTH(DEPTH)) u_num2 (
    .clk, .we(ld_we && ld_sel == BANK_B), .waddr(ld_addr), .wdata(ld_data),
    .raddr_a(ya), .rdata_a(yda), .raddr_b(yb), .rdata_b(ydb));

  cross_product #(.DW(BYTE_W), .AW(AW), .ACCW(ACCW), .SIGNED(1'b0)) u_cp (
    .clk, .rst, .start(cp_start),
    .s1(start1[AW-1:0]), .e1(end1[AW-1:0]), .s2(start2[AW-1:0]), .e2(end2[AW-1:0]),
    .x_addr_a(xa), .x_addr_b(xb), .y_addr_a(ya), .y_addr_b(yb),
    .x_data_a(xda), .x_data_b(xdb), .y_data_a(yda), .y_data_b(ydb),
    .busy(cp_busy), .done(cp_done), .acc(cp_acc));

  // carry register and adder
  logic [ACCW-1:0] sum;
  assign sum = $unsigned(cp_acc) + carry;

  // output memory (one write port used, one read port for the host)
  logic [BYTE_W-1:0] out_unused;
  dp_ram #(.W(BYTE_W), .DEPTH(ODEPTH)) u_out (
    .clk, .we(mem_we), .waddr(op_addr), .wdata(op_data),
    .raddr_a(rd_addr), .rdata_a(rd_data), .raddr_b('0), .rdata_b(out_unused));

  logic last_iter;
  assign last_iter = (k == (OAW+1)'(len1) + (OAW+1)'(len2) - (OAW+1)'(2));

  assign cp_start = (state == M_ITER);
  assign busy     = (state != M_IDLE) && (state != M_DONE);
  assign done     = (state == M_DONE);

  always_comb begin
    mem_we  = 1'b0;
    op_addr = k[OAW-1:0];
    op_data = sum[BYTE_W-1:0];
    if (state == M_CPRUN && cp_done) mem_we = 1'b1;
    if (state == M_CARRY) begin
      mem_we  = 1'b1;
      op_data = carry[BYTE_W-1:0];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= M_IDLE;
      k      <= '0;
      carry  <= '0;
      start1 <= '0; end1 <= '0; start2 <= '0; end2 <= '0;
    end else begin
      case (state)
        M_IDLE: if (start) state <= M_INIT;
        M_INIT: begin
          start1 <= '0; end1 <= '0; start2 <= '0; end2 <= '0;
          k      <= '0;
          carry  <= '0;
          state  <= M_ITER;
        end
        M_ITER: state <= M_CPRUN;
        M_CPRUN: if (cp_done) begin
          carry <= sum >> BYTE_W;
          if (last_iter) begin
            k     <= k + 1'b1;
            state <= M_CARRY;
          end else begin
            // Num1 side: grow End1 until the last digit, then advance Start2
            if (end1 + 1'b1 < len1) end1   <= end1 + 1'b1;
            else                    start2 <= start2 + 1'b1;
            // Num2 side: grow End2 until the last digit, then advance Start1
            if (end2 + 1'b1 < len2) end2   <= end2 + 1'b1;
            else                    start1 <= start1 + 1'b1;
            k     <= k + 1'b1;
            state <= M_ITER;
          end
        end
        M_CARRY: state <= M_DONE;
        M_DONE:  if (start) state <= M_INIT;
        default: state <= M_IDLE;
      endcase
    end
  end
endmodule
