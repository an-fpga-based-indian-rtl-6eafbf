// Self-checking testbench for the Dwandwa squaring unit.
// Each case loads a number, runs the unit and compares all 2n result digits
// with a schoolbook square computed in the testbench. Cases: the 4-digit
// example 03020100h -> 00090C0A04010000h, all-FF digits at the largest size,
// the sizes of the document's performance table (10 and 20 digits) and random
// sizes. The cycle count is checked against
//   3 + sum over k of (ceil(L_k/2) + 2),  L_k = digits in the k-th Dwandwa.
module tb_sqr_unit;
  localparam int DEPTH = 32;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic ld_we = 0; logic [4:0] ld_addr = 0; logic [7:0] ld_data = 0;
  logic [5:0] len = 1;
  logic start = 0, done, busy, mem_we;
  logic [5:0] out_addr, rd_addr = 0;
  logic [7:0] out_value, rd_data;

  sqr_unit #(.DEPTH(DEPTH)) dut (.*);

  int writes;
  always @(posedge clk) if (mem_we) writes++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] a [DEPTH];

  task automatic run_case(input int n);
    int sq [2*DEPTH];
    int carry, cyc, exp_cyc, lk, bad;
    for (int i = 0; i < 2 * DEPTH; i++) sq[i] = 0;
    for (int i = 0; i < n; i++) begin
      carry = 0;
      for (int j = 0; j < n; j++) begin
        carry = sq[i + j] + int'(a[i]) * int'(a[j]) + carry;
        sq[i + j] = carry % 256;
        carry = carry / 256;
      end
      sq[i + n] = carry;
    end
    exp_cyc = 3;
    for (int k = 0; k <= 2 * n - 2; k++) begin
      lk = (k < n) ? k + 1 : 2 * n - 1 - k;
      exp_cyc += (lk + 1) / 2 + 2;
    end
    for (int i = 0; i < n; i++) begin
      @(negedge clk); ld_we = 1; ld_addr = 5'(i); ld_data = a[i];
    end
    @(negedge clk); ld_we = 0; len = 6'(n); writes = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    bad = 0;
    for (int i = 0; i < 2 * n; i++) begin
      rd_addr = 6'(i); #1;
      if (int'(rd_data) != sq[i]) bad++;
    end
    checks += 3;
    if (bad != 0) begin failures++; $display("sqr n=%0d: %0d wrong digits", n, bad); end
    if (cyc != exp_cyc) begin failures++; $display("sqr n=%0d: %0d cycles, expected %0d", n, cyc, exp_cyc); end
    if (writes != 2 * n) begin failures++; $display("sqr n=%0d: %0d writes", n, writes); end
    $display("square of %0d digits: %0d cycles, %.2f us at 14.272 MHz (document's count n^2+2n-1 = %0d)",
             n, cyc, real'(cyc) / 14.272, n * n + 2 * n - 1);
  endtask

  initial begin
    int n;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 4; i++) a[i] = 8'(i);
    run_case(4);
    begin
      logic [63:0] got;
      for (int i = 0; i < 8; i++) begin rd_addr = 6'(i); #1; got[8*i +: 8] = rd_data; end
      checks++;
      if (got != 64'h00090C0A04010000) begin failures++; $display("example square %h", got); end
    end
    for (int t = 0; t < 12; t++) begin
      for (int i = 0; i < DEPTH; i++) a[i] = (t == 0) ? 8'hFF : 8'($urandom);
      case (t)
        0, 1: n = 32;
        2: n = 10;
        3: n = 20;
        4: n = 1;
        5: n = 2;
        default: n = $urandom_range(1, 32);
      endcase
      run_case(n);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
