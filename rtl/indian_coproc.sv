// Indian-arithmetic co-processor: five long-precision arithmetic units built
// on ancient Indian (Vedic) methods, fed through a 4-bit host port.
//   UNIT_MUL   Urdhva Tiryak multiplication, base 256       (mul_unit)
//   UNIT_SQR   Dwandwa squaring, base 256                  (sqr_unit)
//   UNIT_DIV   straight division, base-8 signed digits     (div_unit)
//   UNIT_SQRT  Dwandwa square root, base-8 signed digits   (sqrt_unit)
//   UNIT_DIVIS Ekadhika divisibility osculation, base 256  (divis_unit)
// The host selects a unit with unit_sel; in the original system only the
// selected unit was configured into the FPGA at a time, here all five sit side
// by side and unit_sel steers the host port, start, done and the read-back
// path. The host sends operand digits as nibbles (nib_in/nib_valid) into the
// bank chosen by `bank`; with reg_sel high the same port writes bytes into
// the operand registers (0 length A, 1 length B, 2 precision, 3 a0, 4 the
// 5-bit external remainder, each sent as two nibbles). It pulses start and
// waits for done, then reads the result back a nibble at a time
// (nib_req/nib_out). wr_we/wr_waddr/wr_wdata show the selected unit's result
// writes as they happen (sign-extended for the 4-bit units), the buses seen
// in the document's timing simulations. Pre- and post-processing (normalisation, signed-digit conversion, the Ekadhika, the
// final short divisibility check) belong to the host.
// Result locations: MUL/SQR product digits from address 0, least significant
// first; DIV quotient digits from address 0, most significant first; SQRT root
// digits r1.. from address 1; DIVIS reduced number from res_base, res_len
// digits, least significant first (the read-back address is offset by
// res_base automatically).
// The five units, their digit bases and the nibble host path follow the
// document, as does sending lengths, precision and the square-root inputs
// through the assembling unit into registers; placing the units side by
// side, the register addresses, reg_sel and the read-back multiplexer are
// this design's. res_base is 8 bits for the host;
// with the default 128-digit divisibility memory its top bit is always 0, as
// is the top bit of wr_waddr (no unit memory has more than 128 addresses).
module indian_coproc
  import ia_pkg::*;
#(
  parameter int unsigned MUL_DEPTH   = 32,
  parameter int unsigned SQR_DEPTH   = 32,
  parameter int unsigned DIV_DEPTH   = 32,
  parameter int unsigned SQRT_DEPTH  = 32,
  parameter int unsigned DIVIS_DEPTH = 128,
  localparam int unsigned HAW        = 8   // host-side address width
) (
  input  logic       clk,
  input  logic       rst,
  input  unit_sel_e  unit_sel,
  input  bank_e      bank,
  input  logic       reg_sel,
  input  logic       clr,
  input  logic [3:0] nib_in,
  input  logic       nib_valid,
  input  logic       nib_req,
  output logic [3:0] nib_out,
  input  logic       start,
  output logic       done,
  output logic       busy,
  output logic [7:0] res_base,
  output logic [7:0] res_len,
  output logic [15:0] corr_count,
  // write stream of the selected unit (product, square, quotient, root or
  // osculated digits as they are written)
  output logic       wr_we,
  output logic [7:0] wr_waddr,
  output logic [7:0] wr_wdata
);
  localparam int unsigned MAW  = $clog2(MUL_DEPTH);
  localparam int unsigned MOAW = $clog2(2 * MUL_DEPTH);
  localparam int unsigned SAW  = $clog2(SQR_DEPTH);
  localparam int unsigned SOAW = $clog2(2 * SQR_DEPTH);
  localparam int unsigned DAW  = $clog2(DIV_DEPTH);
  localparam int unsigned RAW  = $clog2(SQRT_DEPTH);
  localparam int unsigned VAW  = $clog2(DIVIS_DEPTH);

  logic          wide;
  logic          wr_en;
  logic [HAW-1:0] wr_addr, rd_addr;
  logic [7:0]    wr_data, rd_data;

  assign wide = reg_sel || (unit_sel == UNIT_MUL) || (unit_sel == UNIT_SQR) ||
                (unit_sel == UNIT_DIVIS);

  // operand registers, written as bytes through the host port with reg_sel
  // high: address 0 length A, 1 length B, 2 precision, 3 a0, 4 ext_remd
  logic [7:0] len_a, len_b, prec;
  logic [3:0] a0;
  logic [4:0] ext_remd;
  logic       mem_wr;
  assign mem_wr = wr_en && !reg_sel;
  always_ff @(posedge clk) begin
    if (rst) begin
      len_a <= '0; len_b <= '0; prec <= '0; a0 <= '0; ext_remd <= '0;
    end else if (wr_en && reg_sel) begin
      case (wr_addr)
        8'd0: len_a    <= wr_data;
        8'd1: len_b    <= wr_data;
        8'd2: prec     <= wr_data;
        8'd3: a0       <= wr_data[3:0];
        8'd4: ext_remd <= wr_data[4:0];
        default: ;
      endcase
    end
  end

  nibble_assembler #(.AW(HAW)) u_asm (
    .clk, .rst, .wide, .clr,
    .nib_in, .nib_valid, .wr_en, .wr_addr, .wr_data,
    .nib_req, .rd_addr, .rd_data, .nib_out);

  logic sel_mul, sel_sqr, sel_div, sel_sqrt, sel_divis;
  assign sel_mul   = (unit_sel == UNIT_MUL);
  assign sel_sqr   = (unit_sel == UNIT_SQR);
  assign sel_div   = (unit_sel == UNIT_DIV);
  assign sel_sqrt  = (unit_sel == UNIT_SQRT);
  assign sel_divis = (unit_sel == UNIT_DIVIS);

  // ---------------- multiplication
  logic mul_done, mul_busy, mul_we;
  logic [MOAW-1:0] mul_oa;
  logic [7:0] mul_od, mul_rd;
  mul_unit #(.DEPTH(MUL_DEPTH)) u_mul (
    .clk, .rst, .ld_we(mem_wr && sel_mul), .ld_sel(bank), .ld_addr(wr_addr[MAW-1:0]),
    .ld_data(wr_data), .len1(len_a[MAW:0]), .len2(len_b[MAW:0]),
    .start(start && sel_mul), .done(mul_done), .busy(mul_busy),
    .mem_we(mul_we), .op_addr(mul_oa), .op_data(mul_od),
    .rd_addr(rd_addr[MOAW-1:0]), .rd_data(mul_rd));

  // ---------------- squaring
  logic sqr_done, sqr_busy, sqr_we;
  logic [SOAW-1:0] sqr_oa;
  logic [7:0] sqr_od, sqr_rd;
  sqr_unit #(.DEPTH(SQR_DEPTH)) u_sqr (
    .clk, .rst, .ld_we(mem_wr && sel_sqr && bank == BANK_A), .ld_addr(wr_addr[SAW-1:0]),
    .ld_data(wr_data), .len(len_a[SAW:0]),
    .start(start && sel_sqr), .done(sqr_done), .busy(sqr_busy),
    .mem_we(sqr_we), .out_addr(sqr_oa), .out_value(sqr_od),
    .rd_addr(rd_addr[SOAW-1:0]), .rd_data(sqr_rd));

  // ---------------- straight division
  logic div_done, div_busy, div_we;
  logic [DAW-1:0] div_qa;
  logic [3:0] div_q, div_rd;
  logic [15:0] div_corr;
  div_unit #(.DEPTH(DIV_DEPTH)) u_div (
    .clk, .rst, .ld_we(mem_wr && sel_div), .ld_sel(bank), .ld_addr(wr_addr[DAW-1:0]),
    .ld_data(wr_data[3:0]), .dvd_len(len_a[DAW:0]), .dvs_len(len_b[DAW:0]),
    .prec(prec[DAW:0]), .start(start && sel_div), .done(div_done), .busy(div_busy),
    .quot_we(div_we), .quot_addr(div_qa), .quot(div_q), .corr_count(div_corr),
    .rd_addr(rd_addr[DAW-1:0]), .rd_data(div_rd));

  // ---------------- square root
  logic sqrt_done, sqrt_busy, sqrt_we;
  logic [RAW-1:0] sqrt_ra;
  logic [3:0] sqrt_r, sqrt_rd;
  logic [15:0] sqrt_corr;
  sqrt_unit #(.DEPTH(SQRT_DEPTH)) u_sqrt (
    .clk, .rst, .ld_we(mem_wr && sel_sqrt && bank == BANK_A), .ld_addr(wr_addr[RAW-1:0]),
    .ld_data(wr_data[3:0]), .a0_in(a0), .ext_remd, .num_len(len_a[RAW:0]),
    .prec(prec[RAW:0]), .start(start && sel_sqrt), .done(sqrt_done), .busy(sqrt_busy),
    .root_we(sqrt_we), .root_addr(sqrt_ra), .root(sqrt_r), .corr_count(sqrt_corr),
    .rd_addr(rd_addr[RAW-1:0]), .rd_data(sqrt_rd));

  // ---------------- divisibility
  logic divis_done, divis_busy, divis_we;
  logic [VAW-1:0] divis_na, divis_base, divis_raddr;
  logic [VAW:0] divis_len;
  logic [7:0] divis_no, divis_rd;
  logic [15:0] divis_osc;
  assign divis_raddr = divis_base + rd_addr[VAW-1:0];
  divis_unit #(.DEPTH(DIVIS_DEPTH)) u_divis (
    .clk, .rst, .ld_we(mem_wr && sel_divis), .ld_sel(bank), .ld_addr(wr_addr[VAW-1:0]),
    .ld_data(wr_data), .num_len(len_a[VAW:0]), .eka_len(len_b[VAW:0]),
    .start(start && sel_divis), .done(divis_done), .busy(divis_busy),
    .num_we(divis_we), .num_addr(divis_na), .num_out(divis_no),
    .res_base(divis_base), .res_len(divis_len), .osc_count(divis_osc),
    .rd_addr(divis_raddr), .rd_data(divis_rd));

  // ---------------- selected unit back to the host
  always_comb begin
    rd_data    = '0;
    done       = 1'b0;
    busy       = 1'b0;
    res_base   = '0;
    res_len    = '0;
    corr_count = '0;
    wr_we      = 1'b0;
    wr_waddr   = '0;
    wr_wdata   = '0;
    case (unit_sel)
      UNIT_MUL:   begin rd_data = mul_rd;  done = mul_done;  busy = mul_busy;
                        wr_we = mul_we; wr_waddr = 8'(mul_oa); wr_wdata = mul_od; end
      UNIT_SQR:   begin rd_data = sqr_rd;  done = sqr_done;  busy = sqr_busy;
                        wr_we = sqr_we; wr_waddr = 8'(sqr_oa); wr_wdata = sqr_od; end
      UNIT_DIV:   begin rd_data = {4'h0, div_rd};  done = div_done;  busy = div_busy;
                        corr_count = div_corr;
                        wr_we = div_we; wr_waddr = 8'(div_qa); wr_wdata = {{4{div_q[3]}}, div_q}; end
      UNIT_SQRT:  begin rd_data = {4'h0, sqrt_rd}; done = sqrt_done; busy = sqrt_busy;
                        corr_count = sqrt_corr;
                        wr_we = sqrt_we; wr_waddr = 8'(sqrt_ra); wr_wdata = {{4{sqrt_r[3]}}, sqrt_r}; end
      UNIT_DIVIS: begin rd_data = divis_rd; done = divis_done; busy = divis_busy;
                        res_base = 8'(divis_base); res_len = 8'(divis_len);
                        corr_count = divis_osc;
                        wr_we = divis_we; wr_waddr = 8'(divis_na); wr_wdata = divis_no; end
      default: ;
    endcase
  end
endmodule
