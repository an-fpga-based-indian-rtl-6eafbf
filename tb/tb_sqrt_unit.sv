// Self-checking testbench for the Dwandwa square-root unit (base 8, signed
// digits). Each case picks a first root digit r0 = 1..7 and a leading group
// G with isqrt(G) = r0 (G <= 63), gives s0 = G - r0^2 as the external
// remainder, loads the remaining digits b1..bL and asks for p root digits.
// Checks, on integers built by the testbench:
//   - every root digit r1..rp lies in -7..7 and address 0 holds r0;
//   - with N = G.b1 b2 .. b2p and R = r0.r1 .. rp (base 8), scaled to
//     integers, |N - R^2| < (2*r0 + 16) * 8^p: the leftover after p digits is
//     the last remainder (< T = 2*r0) plus the part of the next Dwandwa never
//     subtracted (< 2*49/8 + ...), so R is the root to a few units of its
//     last digit;
//     For long numbers N and R^2 overflow 128 bits, but both wrap modulo
//     2^128 and their difference is small, so the difference stays exact;
//   - the cycle count equals 2 + sum_k (ceil(L_k/2) + 5), L_k = max(0, k-2),
//     plus 3 cycles per correction.
// The unit takes r0 as given, so the testbench keeps r0 the integer root
// of the whole number, also when the digits are signed.
// Cases: the example number 33420 (base 8), the sizes of the document's
// performance table (p = 10 and 20) and random cases with unsigned and
// signed digits. Corrections and saturated digits must both occur.
module tb_sqrt_unit;
  localparam int DEPTH = 32;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic ld_we = 0; logic [4:0] ld_addr = 0; logic [3:0] ld_data = 0;
  logic [3:0] a0_in = 1; logic [4:0] ext_remd = 0;
  logic [5:0] num_len = 1, prec = 1;
  logic start = 0, done, busy, root_we;
  logic [4:0] root_addr, rd_addr = 0;
  logic [3:0] root, rd_data;
  logic [15:0] corr_count;

  sqrt_unit #(.DEPTH(DEPTH)) dut (.*);

  int sats = 0;
  always @(posedge clk) if (!rst && dut.state == dut.R_ROOT && dut.sat) sats++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int b [64];
  int corr_cases = 0;

  function automatic logic signed [127:0] pow8(input int e);
    logic signed [127:0] r = 1;
    for (int i = 0; i < e; i++) r = r * 8;
    return r;
  endfunction

  task automatic run_case(input int r0, input int g, input int len, input int p);
    logic signed [127:0] ni, ri, res, lim;
    int cyc, base_cyc, bad, r;
    for (int i = 0; i < len; i++) begin
      @(negedge clk); ld_we = 1; ld_addr = 5'(i); ld_data = 4'(b[i]);
    end
    @(negedge clk); ld_we = 0;
    a0_in = 4'(r0); ext_remd = 5'(g - r0 * r0); num_len = 6'(len); prec = 6'(p);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    ni = g; ri = r0; bad = 0;
    for (int k = 1; k <= 2 * p; k++) ni = ni * 8 + ((k <= len) ? b[k-1] : 0);
    rd_addr = 0; #1;
    if (int'(rd_data) != r0) bad++;
    for (int k = 1; k <= p; k++) begin
      rd_addr = 5'(k); #1;
      r = int'($signed(rd_data));
      if (r > 7 || r < -7) bad++;
      ri = ri * 8 + r;
    end
    res = ni - ri * ri;
    if (res < 0) res = -res;
    lim = (2 * r0 + 16) * pow8(p);
    checks++;
    if (bad != 0 || res >= lim) begin
      failures++;
      for (int k = 0; k < len; k++) $write("%0d ", b[k]);
      $write("-> ");
      for (int k = 1; k <= p; k++) begin rd_addr = 5'(k); #1; $write("%0d ", $signed(rd_data)); end
      $display("");
      $display("sqrt r0=%0d G=%0d len=%0d p=%0d: |N-R^2| = %0d, limit %0d, %0d bad digits",
               r0, g, len, p, res, lim, bad);
    end
    base_cyc = 2;
    for (int k = 1; k <= p; k++) base_cyc += ((k > 2 ? k - 2 : 0) + 1) / 2 + 5;
    checks++;
    if (cyc != base_cyc + 3 * int'(corr_count)) begin
      failures++;
      $display("sqrt p=%0d: %0d cycles, expected %0d + 3*%0d", p, cyc, base_cyc, corr_count);
    end
    if (corr_count != 0) corr_cases++;
    if ((len == 10 || len == 20) && (p == 10 || p == 20))
      $display("sqrt n=%0d p=%0d: %0d cycles, %.2f us at 17.039 MHz (%0d corrections)",
               len, p, cyc, real'(cyc) / 17.039, corr_count);
  endtask

  initial begin
    int r0, g, len, p;
    logic sdns;
    repeat (2) @(posedge clk);
    rst = 0;
    // 33420 (base 8): leading group 3, then 3 4 2 0
    b[0] = 3; b[1] = 4; b[2] = 2; b[3] = 0;
    run_case(1, 3, 4, 6);
    for (int t = 0; t < 300; t++) begin
      sdns = (t % 2 == 1);
      r0 = $urandom_range(1, 7);
      g  = r0 * r0 + int'($urandom_range(0, 2 * r0));
      // signed digits can move the value by almost one unit either way:
      // keep G one unit inside r0^2 .. (r0+1)^2 - 1 so that r0 stays the
      // integer root of the whole number
      if (sdns) g = r0 * r0 + int'($urandom_range(1, 2 * r0 - 1));
      if (g > 63) g = 63;
      case (t)
        0, 1: begin len = 10; p = 10; end
        2, 3: begin len = 20; p = 20; end
        4:    begin len = 10; p = 20; end
        5:    begin len = 31; p = 31; end
        6:    begin len = 20; p = 10; end
        default: begin p = $urandom_range(1, 12); len = $urandom_range(1, 2 * p); end
      endcase
      if (len > 31) len = 31;
      for (int i = 0; i < len; i++) b[i] = sdns ? int'($urandom_range(0, 14)) - 7 : int'($urandom_range(0, 7));
      run_case(r0, g, len, p);
    end
    $display("cases with corrections: %0d, saturated digits: %0d", corr_cases, sats);
    checks++;
    if (corr_cases == 0 || sats == 0) begin failures++; $display("correction or saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
