// End-to-end testbench for the whole co-processor at its default sizes.
// Everything goes through the host port as a host would do it: select a unit,
// clear the assembler, send each operand as nibbles into its bank, send the
// lengths, precision and square-root inputs into the operand registers,
// pulse start, wait for done and read the result back as nibbles.
// Operations:
//   - the document's examples: 131313h x 131313h, 03020100h squared,
//     747000 / 5713 (base 8), the square root of 33420 (base 8) and the
//     divisibility reduction of 111E76270103h by the Ekadhika 031694h,
//     plus a root whose first digit saturates;
//   - the largest size each unit holds (32 x 32 bytes, 32-byte square,
//     32-digit division and root, 120-byte dividend) and random operations,
//     switching between units and between wide (byte) and narrow (digit)
//     host transfers.
// Results are compared with models in this testbench: exact products and
// squares, the quotient and root within a few units of their last digit
// (see the unit testbenches for the bounds), the divisibility result digit by
// digit against a model of the osculation.
// The write stream (wr_we/wr_waddr/wr_wdata) is followed in a shadow memory
// and must agree with the digits read back.
// Mechanisms counted, each of which must happen at least once: division
// corrections, division corrections carried into an earlier quotient digit,
// square-root corrections, saturated root digits, osculations whose carry
// reaches the top digit, result addresses rewritten by corrections, and
// switches between wide and narrow transfers.
module tb_indian_coproc;
  import ia_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  unit_sel_e unit_sel = UNIT_MUL;
  bank_e bank = BANK_A;
  logic clr = 0, nib_valid = 0, nib_req = 0, start = 0;
  logic reg_sel = 0;
  logic [3:0] nib_in = 0, nib_out;
  logic [7:0] res_base, res_len;
  logic wr_we;
  logic [7:0] wr_waddr, wr_wdata;
  logic done, busy;
  logic [15:0] corr_count;

  indian_coproc dut (.*);

  // mechanism counters
  int n_div_corr = 0, n_div_carry = 0, n_sqrt_corr = 0, n_sqrt_sat = 0, n_kept = 0, n_switch = 0;
  always @(posedge clk) if (!rst) begin
    if (dut.u_div.state == dut.u_div.D_CU) begin
      n_div_corr++;
      if (!dut.u_div.cu_fits) n_div_carry++;
    end
    if (dut.u_sqrt.state == dut.u_sqrt.R_CORR) n_sqrt_corr++;
    if (dut.u_sqrt.state == dut.u_sqrt.R_ROOT && dut.u_sqrt.sat) n_sqrt_sat++;
    if (dut.u_divis.state == dut.u_divis.V_RUN && !dut.u_divis.cont && dut.u_divis.k + 1 >= dut.u_divis.len)
      n_kept++;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [127:0] pow8(input int e);
    logic signed [127:0] r = 1;
    for (int i = 0; i < e; i++) r = r * 8;
    return r;
  endfunction

  // ---------------- host port
  logic last_wide = 1'b1;
  task automatic select(input unit_sel_e u);
    logic w = (u == UNIT_MUL || u == UNIT_SQR || u == UNIT_DIVIS);
    @(negedge clk); unit_sel = u;
    if (w != last_wide) n_switch++;
    last_wide = w;
  endtask

  task automatic send(input bank_e b, input int v [256], input int n, input logic wide);
    @(negedge clk); bank = b; clr = 1;
    @(negedge clk); clr = 0;
    for (int i = 0; i < n; i++) begin
      nib_valid = 1; nib_in = 4'(v[i]);
      @(negedge clk);
      if (wide) begin nib_in = 4'(v[i] >> 4); @(negedge clk); end
    end
    nib_valid = 0;
    @(negedge clk);
  endtask

  // operand registers: lengths, precision, a0 and ext_remd as bytes
  task automatic set_regs(input int la, input int lb, input int pr, input int r0, input int er);
    int v [256];
    v = '{default: 0};
    v[0] = la; v[1] = lb; v[2] = pr; v[3] = r0; v[4] = er;
    @(negedge clk); reg_sel = 1;
    send(BANK_A, v, 5, 1'b1);
    reg_sel = 0;
  endtask

  // shadow of the result writes seen on the write stream during one run
  int wmem [256], wcnt [256];
  always @(posedge clk) if (!rst && wr_we) begin
    wmem[wr_waddr] = int'(wr_wdata);
    wcnt[wr_waddr]++;
  end

  // the streamed writes must agree with what is read back; all must have
  // been written when `all` is set (the osculation leaves the top digits in
  // place); in division and square root an address written more than once
  // was rewritten by a correction
  int n_rewrite = 0;
  task automatic check_stream(input int v [256], input int n, input int base, input logic sgn,
                              input logic all, input string what);
    int bad = 0, w;
    for (int i = 0; i < n; i++) begin
      w = wmem[base + i];
      if (sgn && w > 127) w -= 256;
      if (wcnt[base + i] > 0 ? (w != v[i]) : all) bad++;
    end
    if (sgn) for (int i = 0; i < 256; i++) if (wcnt[i] > 1) n_rewrite++;
    check(bad == 0, $sformatf("%s: %0d streamed writes differ from the read-back", what, bad));
  endtask

  task automatic run(output int cyc);
    wmem = '{default: 0}; wcnt = '{default: 0};
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
  endtask

  task automatic fetch(output int v [256], input int n, input logic wide, input logic sgn);
    @(negedge clk); clr = 1;
    @(negedge clk); clr = 0;
    v = '{default: 0};
    for (int i = 0; i < n; i++) begin
      #1 v[i] = int'(nib_out);
      if (sgn && v[i] > 7) v[i] -= 16;
      nib_req = 1; @(negedge clk); nib_req = 0;
      if (wide) begin
        #1 v[i] += 16 * int'(nib_out);
        nib_req = 1; @(negedge clk); nib_req = 0;
      end
    end
  endtask

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- operations
  task automatic op_mul(input int a [256], input int m, input int b [256], input int n);
    int prod [256], got [256];
    int c, cyc, bad = 0;
    prod = '{default: 0};
    for (int i = 0; i < m; i++) begin
      c = 0;
      for (int j = 0; j < n; j++) begin
        c = prod[i+j] + a[i] * b[j] + c; prod[i+j] = c % 256; c = c / 256;
      end
      prod[i+n] = c;
    end
    select(UNIT_MUL);
    send(BANK_A, a, m, 1'b1); send(BANK_B, b, n, 1'b1);
    set_regs(m, n, 0, 0, 0);
    run(cyc);
    fetch(got, m + n, 1'b1, 1'b0);
    check_stream(got, m + n, 0, 1'b0, 1'b1, "multiplication");
    for (int i = 0; i < m + n; i++) if (got[i] != prod[i]) bad++;
    check(bad == 0, $sformatf("multiplication %0d x %0d: %0d wrong digits", m, n, bad));
  endtask

  task automatic op_sqr(input int a [256], input int n);
    int prod [256], got [256];
    int c, cyc, bad = 0;
    prod = '{default: 0};
    for (int i = 0; i < n; i++) begin
      c = 0;
      for (int j = 0; j < n; j++) begin
        c = prod[i+j] + a[i] * a[j] + c; prod[i+j] = c % 256; c = c / 256;
      end
      prod[i+n] = c;
    end
    select(UNIT_SQR);
    send(BANK_A, a, n, 1'b1);
    set_regs(n, 0, 0, 0, 0);
    run(cyc);
    fetch(got, 2 * n, 1'b1, 1'b0);
    check_stream(got, 2 * n, 0, 1'b0, 1'b1, "squaring");
    for (int i = 0; i < 2 * n; i++) if (got[i] != prod[i]) bad++;
    check(bad == 0, $sformatf("squaring %0d digits: %0d wrong digits", n, bad));
  endtask

  task automatic op_div(input int b [256], input int m, input int a [256], input int n, input int p);
    int q [256];
    int cyc, bad = 0;
    logic signed [127:0] bi = 0, qi = 0, ai = 0, res;
    select(UNIT_DIV);
    send(BANK_A, b, m, 1'b0); send(BANK_B, a, n, 1'b0);
    set_regs(m, n, p, 0, 0);
    run(cyc);
    fetch(q, p, 1'b0, 1'b1);
    check_stream(q, p, 0, 1'b1, 1'b1, "division");
    for (int t = 0; t < p; t++) begin
      qi = qi * 8 + q[t];
      bi = bi * 8 + ((t < m) ? b[t] : 0);
    end
    for (int j = 0; j < n; j++) ai = ai * 8 + a[j];
    res = bi * pow8(n - 1) - qi * ai;
    if (res < 0) res = -res;
    check(res < 4 * ai, $sformatf("division m=%0d n=%0d p=%0d: residual %0d", m, n, p, res));
  endtask

  task automatic op_sqrt(input int r0, input int g, input int b [256], input int len, input int p);
    int r [256];
    int cyc;
    logic signed [127:0] ni, ri, res;
    select(UNIT_SQRT);
    send(BANK_A, b, len, 1'b0);
    set_regs(len, 0, p, r0, g - r0 * r0);
    run(cyc);
    fetch(r, p + 1, 1'b0, 1'b1);
    check_stream(r, p + 1, 0, 1'b1, 1'b1, "square root");
    ni = g; ri = r0;
    for (int k = 1; k <= 2 * p; k++) ni = ni * 8 + ((k <= len) ? b[k-1] : 0);
    for (int k = 1; k <= p; k++) ri = ri * 8 + r[k];
    res = ni - ri * ri;
    if (res < 0) res = -res;
    check(r[0] == r0 && res < (2 * r0 + 16) * pow8(p),
          $sformatf("square root r0=%0d len=%0d p=%0d: residual %0d", r0, len, p, res));
  endtask

  task automatic op_divis(input int pv [256], input int l, input int e [256], input int r,
                          output int red [256], output int rl);
    int pm [256];
    int got [256];
    int cyc, d, c, v, plen, bad = 0;
    pm = pv; plen = l;
    while (plen > r + 1) begin
      d = pm[0];
      for (int i = 0; i < 255; i++) pm[i] = pm[i+1];
      pm[255] = 0;
      c = 0;
      for (int i = 0; i < 200; i++) begin
        v = pm[i] + ((i < r) ? e[i] * d : 0) + c; pm[i] = v % 256; c = v / 256;
      end
      plen--;
      for (int i = 0; i < 200; i++) if (pm[i] != 0 && i + 1 > plen) plen = i + 1;
    end
    select(UNIT_DIVIS);
    send(BANK_A, pv, l, 1'b1); send(BANK_B, e, r, 1'b1);
    set_regs(l, r, 0, 0, 0);
    run(cyc);
    rl = int'(res_len);
    fetch(got, rl, 1'b1, 1'b0);
    check_stream(got, rl, int'(res_base), 1'b0, 1'b0, "divisibility");
    for (int i = 0; i < 256; i++) if ((i < rl ? got[i] : 0) != pm[i]) bad++;
    check(bad == 0 && rl <= r + 2, $sformatf("divisibility L=%0d r=%0d: %0d wrong digits", l, r, bad));
    red = got;
  endtask

  initial begin
    int a [256], b [256], red [256];
    int m, n, p, rl, r0, g;
    repeat (3) @(negedge clk);
    rst = 0;

    // document examples
    a = '{default: 0}; b = '{default: 0};
    a[0] = 'h13; a[1] = 'h13; a[2] = 'h13;
    op_mul(a, 3, a, 3);
    a[0] = 'h00; a[1] = 'h01; a[2] = 'h02; a[3] = 'h03;
    op_sqr(a, 4);
    a = '{default: 0};
    a[0] = 5; a[1] = 7; a[2] = 1; a[3] = 3;
    b[0] = 7; b[1] = 4; b[2] = 7;
    op_div(b, 6, a, 4, 6);
    b = '{default: 0};
    b[0] = 3; b[1] = 4; b[2] = 2; b[3] = 0;
    op_sqrt(1, 3, b, 4, 6);
    // 3.7777 (base 8) has a root just under 2: the first root digit wants
    // to be 8 and saturates at 7
    b[0] = 7; b[1] = 7; b[2] = 7; b[3] = 7;
    op_sqrt(1, 3, b, 4, 4);
    a = '{default: 0}; b = '{default: 0};
    a[5] = 'h11; a[4] = 'h1E; a[3] = 'h76; a[2] = 'h27; a[1] = 'h01; a[0] = 'h03;
    b[0] = 'h94; b[1] = 'h16; b[2] = 'h03;
    op_divis(a, 6, b, 3, red, rl);
    check(rl == 4 && red[3] == 'h13 && red[2] == 'h66 && red[1] == 'h2A && red[0] == 'hAE,
          "divisibility example does not give 13662AAEh");

    // largest sizes, then random operations across the units
    for (int t = 0; t < 150; t++) begin
      a = '{default: 0}; b = '{default: 0};
      case (t % 5)
        0: begin
          m = (t == 0) ? 32 : $urandom_range(1, 32); n = (t == 0) ? 32 : $urandom_range(1, 32);
          for (int i = 0; i < m; i++) a[i] = $urandom_range(0, 255);
          for (int i = 0; i < n; i++) b[i] = $urandom_range(0, 255);
          op_mul(a, m, b, n);
        end
        1: begin
          n = (t == 1) ? 32 : $urandom_range(1, 32);
          for (int i = 0; i < n; i++) a[i] = $urandom_range(0, 255);
          op_sqr(a, n);
        end
        2: begin
          n = (t == 2) ? 32 : $urandom_range(2, 12);
          p = (t == 2) ? 32 : $urandom_range(2, 14);
          m = (t == 2) ? 32 : $urandom_range(1, p);
          a[0] = $urandom_range(4, 7);
          for (int j = 1; j < n; j++) a[j] = int'($urandom_range(0, 14)) - 7;
          for (int i = 0; i < m; i++) b[i] = int'($urandom_range(0, 14)) - 7;
          op_div(b, m, a, n, p);
        end
        3: begin
          p = (t == 3) ? 31 : $urandom_range(2, 12);
          n = (t == 3) ? 31 : $urandom_range(1, 2 * p);
          if (n > 31) n = 31;
          r0 = $urandom_range(1, 7);
          g = r0 * r0 + int'($urandom_range(1, 2 * r0 - 1));
          for (int i = 0; i < n; i++) b[i] = int'($urandom_range(0, 14)) - 7;
          op_sqrt(r0, g, b, n, p);
        end
        default: begin
          n = $urandom_range(1, 8);
          m = (t == 4) ? 120 : $urandom_range(n + 2, 120);
          for (int i = 0; i < m; i++) a[i] = $urandom_range(0, 255);
          for (int i = 0; i < n; i++) b[i] = $urandom_range(0, 255);
          op_divis(a, m, b, n, red, rl);
        end
      endcase
    end

    $display("division corrections %0d (carried %0d), root corrections %0d, saturated root digits %0d",
             n_div_corr, n_div_carry, n_sqrt_corr, n_sqrt_sat);
    $display("osculations with a carry into the top digit %0d, wide/narrow switches %0d, rewritten result addresses %0d",
             n_kept, n_switch, n_rewrite);
    check(n_div_corr > 0, "no division correction happened");
    check(n_div_carry > 0, "no carried division correction happened");
    check(n_sqrt_corr > 0, "no square-root correction happened");
    check(n_sqrt_sat > 0, "no saturated root digit happened");
    check(n_kept > 0, "no osculation carried into the top digit");
    check(n_switch > 0, "no switch between wide and narrow transfers");
    check(n_rewrite > 0, "no result address was rewritten by a correction");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
