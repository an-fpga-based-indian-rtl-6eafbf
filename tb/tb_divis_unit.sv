// Self-checking testbench for the Ekadhika divisibility-testing unit.
// The reference model repeats P <- floor(P/256) + E*(P mod 256) on byte
// arrays until P has at most r+1 digits. Checks:
//   - the document's example: dividend 111E76270103h with Ekadhika 031694h
//     (divisor 0B2289h) reduces to 13662AAEh;
//   - random cases: the reduced number read back from the unit equals the
//     model's, the number of osculations matches, and the reduced number R
//     satisfies R * 256^osc = P (mod M), so R is divisible by M exactly when
//     P is; half of the dividends are multiples of M, and for those R mod M
//     must be 0;
//   - cycles: 3 + sum over osculations of (2 + r + t), t >= 0 the extra carry
//     digits, so 3 + osc*(r+2) <= cycles <= 3 + osc*(L+2); the measured count
//     is printed next to the document's 3 + (2+n+t-p)(m-n-1+p) for the table
//     sizes (t = 0).
// Length-kept osculations (a carry into the top digit) must occur.
module tb_divis_unit;
  import ia_pkg::*;
  localparam int DEPTH = 128;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic ld_we = 0; bank_e ld_sel = BANK_A; logic [6:0] ld_addr = 0; logic [7:0] ld_data = 0;
  logic [7:0] num_len = 0, eka_len = 0;
  logic start = 0, done, busy, num_we;
  logic [6:0] num_addr, res_base, rd_addr = 0;
  logic [7:0] num_out, rd_data, res_len;
  logic [15:0] osc_count;

  divis_unit #(.DEPTH(DEPTH)) dut (.*);

  int kept = 0;
  always @(posedge clk)
    if (!rst && dut.state == dut.V_RUN && !dut.cont && dut.k + 1 >= dut.len) kept++;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int pm [256];   // model number, least significant byte first
  int em [128];
  int plen, elen_m;

  // one osculation on the model
  task automatic model_osc();
    int d = pm[0], c = 0, v;
    int n = plen - 1;
    for (int i = 0; i < n; i++) pm[i] = pm[i+1];
    for (int i = n; i < 256; i++) pm[i] = 0;
    for (int i = 0; i < 200; i++) begin
      v = pm[i] + ((i < elen_m) ? em[i] * d : 0) + c;
      pm[i] = v % 256; c = v / 256;
    end
    plen = n;
    for (int i = 0; i < 200; i++) if (pm[i] != 0 && i + 1 > plen) plen = i + 1;
  endtask

  function automatic longint mod_of(input int a [256], input int n, input longint m);
    longint r = 0;
    for (int i = n - 1; i >= 0; i--) r = (r * 256 + a[i]) % m;
    return r;
  endfunction

  task automatic run_case(input int p_in [256], input int l, input longint m, input logic show);
    int r [256];
    int cyc, osc_m, bad, rl;
    longint pmod, rmod, f;
    for (int i = 0; i < 256; i++) pm[i] = (i < l) ? p_in[i] : 0;
    plen = l; osc_m = 0;
    while (plen > elen_m + 1) begin model_osc(); osc_m++; end
    for (int i = 0; i < l; i++) begin
      @(negedge clk); ld_we = 1; ld_sel = BANK_A; ld_addr = 7'(i); ld_data = 8'(p_in[i]);
    end
    for (int i = 0; i < elen_m; i++) begin
      @(negedge clk); ld_we = 1; ld_sel = BANK_B; ld_addr = 7'(i); ld_data = 8'(em[i]);
    end
    @(negedge clk); ld_we = 0; num_len = 8'(l); eka_len = 8'(elen_m);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    rl = int'(res_len); bad = 0;
    for (int i = 0; i < 256; i++) r[i] = 0;
    for (int i = 0; i < rl; i++) begin rd_addr = 7'(int'(res_base) + i); #1; r[i] = int'(rd_data); end
    for (int i = 0; i < 256; i++) if (r[i] != pm[i]) bad++;
    checks++;
    if (bad != 0 || int'(osc_count) != osc_m || rl > elen_m + 2) begin
      failures++;
      $display("divis L=%0d r=%0d: %0d wrong digits, %0d/%0d osculations, length %0d",
               l, elen_m, bad, osc_count, osc_m, rl);
    end
    if (m > 1) begin
      pmod = mod_of(p_in, l, m);
      rmod = mod_of(r, rl, m);
      for (int i = 0; i < osc_m; i++) rmod = (rmod * 256) % m;
      checks++;
      if (rmod != pmod) begin
        failures++;
        $display("divis L=%0d: R*256^osc mod M = %0d, P mod M = %0d", l, rmod, pmod);
      end
    end
    checks++;
    if (cyc < 3 + osc_m * (elen_m + 2) || cyc > 3 + osc_m * (l + 2)) begin
      failures++;
      $display("divis L=%0d r=%0d: %0d cycles out of range", l, elen_m, cyc);
    end
    if (show) begin
      f = 3 + (2 + elen_m) * osc_m;
      $display("divis dividend %0d digits, Ekadhika %0d digits: %0d cycles, %.2f us at 13.902 MHz (formula with t = 0: %0d)",
               l, elen_m, cyc, real'(cyc) / 13.902, f);
    end
  endtask

  // Ekadhika of odd m: E = (m*k + 1)/256 with m*k = 255 (mod 256)
  task automatic set_eka(input longint m);
    longint e = 0;
    for (int k = 1; k < 256; k++) if ((m * k) % 256 == 255) e = (m * k + 1) / 256;
    elen_m = 0;
    while (e != 0) begin em[elen_m] = int'(e % 256); e = e / 256; elen_m++; end
    if (elen_m == 0) begin em[0] = 0; elen_m = 1; end
  endtask

  initial begin
    int p [256];
    int l, c, v;
    longint m;
    repeat (2) @(posedge clk);
    rst = 0;
    // document example
    p = '{default: 0};
    p[5] = 'h11; p[4] = 'h1E; p[3] = 'h76; p[2] = 'h27; p[1] = 'h01; p[0] = 'h03;
    em[0] = 'h94; em[1] = 'h16; em[2] = 'h03; elen_m = 3;
    run_case(p, 6, 'h0B2289, 1'b0);
    checks++;
    if (!(pm[0] == 'hAE && pm[1] == 'h2A && pm[2] == 'h66 && pm[3] == 'h13 && plen == 4)) begin
      failures++; $display("document example: model result differs from 13662AAEh");
    end
    for (int t = 0; t < 120; t++) begin
      m = longint'($urandom_range(1, 32'hFFFFFF)) | 1;
      if (t < 20) m = longint'($urandom_range(1, 255)) | 1;
      set_eka(m);
      l = $urandom_range(elen_m + 1, 120);
      if (t < 3) begin
        // sizes of the document's table: a random Ekadhika of 20, 30, 70
        // digits without a divisor, so only the model comparison applies
        m = 0;
        l = (t == 0) ? 40 : (t == 1) ? 60 : 120;
        elen_m = (t == 0) ? 20 : (t == 1) ? 30 : 70;
        for (int i = 0; i < elen_m; i++) em[i] = $urandom_range(0, 255);
      end
      p = '{default: 0};
      if (t % 2 == 0 || t < 3) begin
        for (int i = 0; i < l; i++) p[i] = $urandom_range(0, 255);
      end else begin
        // multiple of m: random bytes times m
        c = 0;
        for (int i = 0; i < l; i++) begin
          v = ((i < l - 4) ? int'($urandom_range(0, 255)) : 0);
          p[i] = v;
        end
        for (int i = 0; i < l; i++) begin
          longint w = longint'(p[i]) * m + c;
          p[i] = int'(w % 256); c = int'(w / 256);
        end
      end
      run_case(p, l, m, t < 3);
      if (t % 2 == 1 && t >= 3) begin
        checks++;
        if (mod_of(pm, plen, m) != 0) begin failures++; $display("multiple of M not reduced to one"); end
      end
    end
    $display("length-kept osculations: %0d", kept);
    checks++;
    if (kept == 0) begin failures++; $display("no carry into the top digit seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
