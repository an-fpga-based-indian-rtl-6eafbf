// Self-checking testbench for the straight division unit (base 8, signed
// digits). For each case the dividend B (m digits), divisor A (n digits, the
// leading one 4..7) and precision p are loaded, the unit is run, and the
// quotient digits Q are read back. Checks, all on integers built by the
// testbench:
//   - every quotient digit lies in -7..7;
//   - |B*8^(n-1) - Q*A| < 4*|A|, i.e. Q is the quotient to within four units
//     of its last digit (B and Q read as p-digit integers). The bound covers
//     the truncation of the last step (< a0), the cross products of the last
//     digits that a p-digit quotient never subtracts (< 49/8 + 2*49/64 + ..)
//     and a normalised divisor (A >= (a0-1)*8^(n-1)), for a0 >= 4;
//   - the cycle count equals 2 + sum_t (ceil(L_t/2) + 5), L_t = min(n-2, t),
//     plus 4 cycles per correction and 1 more for each earlier digit a
//     correction carries into.
// Cases: the example divisor 5713 / dividend 747000 (base 8), the sizes of
// the document's performance table (n = p = 10 and 20), unsigned and signed
// random digits. The number of cases that needed a correction is counted and
// must not be zero.
module tb_div_unit;
  import ia_pkg::*;
  localparam int DEPTH = 32;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic ld_we = 0; bank_e ld_sel = BANK_A;
  logic [4:0] ld_addr = 0; logic [3:0] ld_data = 0;
  logic [5:0] dvd_len = 1, dvs_len = 1, prec = 1;
  logic start = 0, done, busy, quot_we;
  logic [4:0] quot_addr, rd_addr = 0;
  logic [3:0] quot, rd_data;
  logic [15:0] corr_count;

  div_unit #(.DEPTH(DEPTH)) dut (.*);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int b [DEPTH], a [DEPTH];
  // corrections whose carry reached a second quotient digit
  int wraps = 0;
  always @(posedge clk) if (!rst && dut.state == dut.D_CU && !dut.cu_fits) wraps++;
  int corr_cases = 0, total_corr = 0;

  function automatic logic signed [127:0] pow8(input int e);
    logic signed [127:0] r = 1;
    for (int i = 0; i < e; i++) r = r * 8;
    return r;
  endfunction

  task automatic run_case(input int m, input int n, input int p);
    logic signed [127:0] bi, qi, ai, res, lim;
    int q, cyc, base_cyc, lt, bad, wraps0;
    for (int i = 0; i < m; i++) begin
      @(negedge clk); ld_we = 1; ld_sel = BANK_A; ld_addr = 5'(i); ld_data = 4'(b[i]);
    end
    for (int i = 0; i < n; i++) begin
      @(negedge clk); ld_we = 1; ld_sel = BANK_B; ld_addr = 5'(i); ld_data = 4'(a[i]);
    end
    @(negedge clk); ld_we = 0;
    dvd_len = 6'(m); dvs_len = 6'(n); prec = 6'(p);
    wraps0 = wraps;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    bi = 0; qi = 0; ai = 0; bad = 0;
    for (int t = 0; t < p; t++) begin
      rd_addr = 5'(t); #1;
      q = int'($signed(rd_data));
      if (q > 7 || q < -7) bad++;
      qi = qi * 8 + q;
      bi = bi * 8 + ((t < m) ? b[t] : 0);
    end
    for (int j = 0; j < n; j++) ai = ai * 8 + a[j];
    res = bi * pow8(n - 1) - qi * ai;
    if (res < 0) res = -res;
    lim = (ai < 0) ? -4 * ai : 4 * ai;
    checks++;
    if (bad != 0 || res >= lim) begin
      failures++;
      $display("div m=%0d n=%0d p=%0d: residual %0d vs limit %0d, %0d bad digits", m, n, p, res, lim, bad);
    end
    base_cyc = 2;
    for (int t = 0; t < p; t++) begin
      lt = (n < 2) ? 0 : ((t < n - 2) ? t : n - 2);
      base_cyc += (lt + 1) / 2 + 5;
    end
    checks++;
    if (cyc != base_cyc + 4 * int'(corr_count) + (wraps - wraps0)) begin
      failures++;
      $display("div m=%0d n=%0d p=%0d: %0d cycles, base %0d, %0d corrections", m, n, p, cyc, base_cyc, corr_count);
    end
    if (corr_count != 0) corr_cases++;
    if (m == n && (n == 10 || n == 20) && (p == 10 || p == 20))
      $display("div n=%0d p=%0d: %0d cycles, %.2f us at 16.313 MHz (%0d corrections)",
               n, p, cyc, real'(cyc) / 16.313, corr_count);
    total_corr += int'(corr_count);
  endtask

  initial begin
    int m, n, p;
    logic sdns;
    repeat (2) @(posedge clk);
    rst = 0;
    // divisor 5713, dividend 747000 (base 8)
    a[0] = 5; a[1] = 7; a[2] = 1; a[3] = 3;
    b[0] = 7; b[1] = 4; b[2] = 7; b[3] = 0; b[4] = 0; b[5] = 0;
    run_case(6, 4, 6);
    $display("example 747000/5713 (base 8): quotient digits written, %0d corrections", corr_count);
    for (int t = 0; t < 300; t++) begin
      sdns = (t % 2 == 1);
      case (t)
        0: begin n = 10; m = 10; p = 10; end
        1: begin n = 10; m = 10; p = 20; end
        2: begin n = 20; m = 20; p = 10; end
        3: begin n = 20; m = 20; p = 20; end
        4: begin n = 1; m = 3; p = 6; end
        5: begin n = 2; m = 2; p = 8; end
        6: begin n = 32; m = 32; p = 32; end
        default: begin
          n = $urandom_range(1, 12); p = $urandom_range(1, 14); m = $urandom_range(1, p);
        end
      endcase
      a[0] = $urandom_range(4, 7);
      for (int j = 1; j < n; j++) a[j] = sdns ? int'($urandom_range(0, 14)) - 7 : int'($urandom_range(0, 7));
      for (int i = 0; i < m; i++) b[i] = sdns ? int'($urandom_range(0, 14)) - 7 : int'($urandom_range(0, 7));
      run_case(m, n, p);
    end
    $display("cases with corrections: %0d, corrections in total: %0d, carried corrections: %0d",
             corr_cases, total_corr, wraps);
    checks++;
    if (corr_cases == 0) begin failures++; $display("no correction was exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
