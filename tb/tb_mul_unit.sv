// Self-checking testbench for the Urdhva Tiryak multiplication unit.
// Loads operands through the host load port, runs the unit and compares every
// product digit with a schoolbook long multiplication done in the testbench.
// Cases: the 3-digit example 131313h x 131313h = 016BD63DD369h, the largest
// size (32 x 32 digits), unequal lengths both ways and random sizes. The
// cycle count from start to done is checked against
//   3 + sum over iterations k of (ceil(L_k/2) + 2),  L_k = cross-product length,
// and the streamed digit writes (MemWrEn) are counted.
module tb_mul_unit;
  import ia_pkg::*;
  localparam int DEPTH = 32;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic ld_we = 0; bank_e ld_sel = BANK_A;
  logic [4:0] ld_addr = 0; logic [7:0] ld_data = 0;
  logic [5:0] len1 = 1, len2 = 1;
  logic start = 0, done, busy, mem_we;
  logic [5:0] op_addr, rd_addr = 0;
  logic [7:0] op_data, rd_data;

  mul_unit #(.DEPTH(DEPTH)) dut (.*);

  int writes;
  always @(posedge clk) if (mem_we) writes++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] a [DEPTH], b [DEPTH];

  task automatic load(input bank_e sel, input int n, input logic [7:0] v [DEPTH]);
    for (int i = 0; i < n; i++) begin
      @(negedge clk); ld_we = 1; ld_sel = sel; ld_addr = 5'(i); ld_data = v[i];
    end
    @(negedge clk); ld_we = 0;
  endtask

  task automatic run_case(input int m, input int n);
    int prod [2*DEPTH];
    int carry, cyc, exp_cyc, len_k, bad;
    for (int i = 0; i < 2 * DEPTH; i++) prod[i] = 0;
    for (int i = 0; i < m; i++) begin
      carry = 0;
      for (int j = 0; j < n; j++) begin
        carry = prod[i + j] + int'(a[i]) * int'(b[j]) + carry;
        prod[i + j] = carry % 256;
        carry = carry / 256;
      end
      prod[i + n] = carry;
    end
    exp_cyc = 3;
    for (int k = 0; k <= m + n - 2; k++) begin
      len_k = 0;
      for (int i = 0; i < m; i++) if (k - i >= 0 && k - i < n) len_k++;
      exp_cyc += (len_k + 1) / 2 + 2;
    end
    load(BANK_A, m, a);
    load(BANK_B, n, b);
    len1 = 6'(m); len2 = 6'(n);
    writes = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    bad = 0;
    for (int i = 0; i < m + n; i++) begin
      rd_addr = 6'(i); #1;
      if (int'(rd_data) != prod[i]) bad++;
    end
    checks++;
    if (bad != 0) begin
      failures++; $display("mul %0dx%0d: %0d wrong digits", m, n, bad);
    end
    checks++;
    if (cyc != exp_cyc) begin
      failures++; $display("mul %0dx%0d: %0d cycles, expected %0d", m, n, cyc, exp_cyc);
    end
    checks++;
    if (writes != m + n) begin
      failures++; $display("mul %0dx%0d: %0d digit writes", m, n, writes);
    end
    $display("mul %0d x %0d digits: %0d cycles, %.2f us at 15.576 MHz (document's count mn+m+n-1 = %0d)",
             m, n, cyc, real'(cyc) / 15.576, m * n + m + n - 1);
  endtask

  initial begin
    int m, n;
    repeat (2) @(posedge clk);
    rst = 0;
    // the document's example: 131313h squared by the multiplier
    for (int i = 0; i < 3; i++) begin a[i] = 8'h13; b[i] = 8'h13; end
    run_case(3, 3);
    begin
      logic [47:0] got;
      for (int i = 0; i < 6; i++) begin rd_addr = 6'(i); #1; got[8*i +: 8] = rd_data; end
      checks++;
      if (got != 48'h016BD63DD369) begin
        failures++; $display("example product %h", got);
      end
    end
    for (int t = 0; t < 14; t++) begin
      for (int i = 0; i < DEPTH; i++) begin
        a[i] = (t == 1) ? 8'hFF : 8'($urandom);
        b[i] = (t == 1) ? 8'hFF : 8'($urandom);
      end
      case (t)
        0, 1: begin m = 32; n = 32; end
        2: begin m = 10; n = 10; end
        3: begin m = 20; n = 10; end
        4: begin m = 20; n = 20; end
        5: begin m = 1;  n = 1;  end
        6: begin m = 1;  n = 7;  end
        7: begin m = 9;  n = 1;  end
        default: begin m = $urandom_range(1, 32); n = $urandom_range(1, 32); end
      endcase
      run_case(m, n);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
