// Self-checking testbench for the cross product engine.
// Two small digit memories are modelled in the testbench; random vectors of
// length 0..12 are run in unsigned and signed instances and the result is
// compared with a directly summed cross product. The run length is checked
// against ceil(L/2) accumulate cycles plus the done cycle.
module tb_cross_product;
  localparam int AW = 5;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [7:0] xm [32], ym [32];
  logic start;
  logic [AW-1:0] s1, e1, s2, e2, xa, xb, ya, yb;
  logic busy, done;
  logic signed [23:0] acc;

  cross_product #(.DW(8), .AW(AW), .ACCW(24), .SIGNED(1'b0)) dut (
    .clk, .rst, .start, .s1, .e1, .s2, .e2,
    .x_addr_a(xa), .x_addr_b(xb), .y_addr_a(ya), .y_addr_b(yb),
    .x_data_a(xm[xa]), .x_data_b(xm[xb]), .y_data_a(ym[ya]), .y_data_b(ym[yb]),
    .busy, .done, .acc);

  // signed instance on 4-bit digits
  logic [3:0] xs [32], ys [32];
  logic [AW-1:0] sxa, sxb, sya, syb;
  logic sbusy, sdone;
  logic signed [15:0] sacc;
  cross_product #(.DW(4), .AW(AW), .ACCW(16), .SIGNED(1'b1)) dut_s (
    .clk, .rst, .start, .s1, .e1, .s2, .e2,
    .x_addr_a(sxa), .x_addr_b(sxb), .y_addr_a(sya), .y_addr_b(syb),
    .x_data_a(xs[sxa]), .x_data_b(xs[sxb]), .y_data_a(ys[sya]), .y_data_b(ys[syb]),
    .busy(sbusy), .done(sdone), .acc(sacc));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int len, cyc;
    longint exp_u, exp_s;
    start = 0; s1 = 0; e1 = 0; s2 = 0; e2 = 0;
    for (int i = 0; i < 32; i++) begin
      xm[i] = 8'($urandom); ym[i] = 8'($urandom);
      xs[i] = 4'($urandom); ys[i] = 4'($urandom);
    end
    repeat (2) @(posedge clk);
    rst = 0;
    for (int trial = 0; trial < 200; trial++) begin
      len = (trial < 13) ? trial : int'($urandom_range(0, 12));
      s1 = AW'($urandom_range(1, 12));
      s2 = AW'($urandom_range(1, 12));
      e1 = AW'(int'(s1) + len - 1);
      e2 = AW'(int'(s2) + len - 1);
      exp_u = 0; exp_s = 0;
      for (int t = 0; t < len; t++) begin
        exp_u += longint'(xm[s1 + t]) * longint'(ym[e2 - t]);
        exp_s += longint'($signed(xs[s1 + t])) * longint'($signed(ys[e2 - t]));
      end
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (longint'(acc) != exp_u) begin
        failures++;
        $display("unsigned CP mismatch len=%0d got %0d exp %0d", len, acc, exp_u);
      end
      checks++;
      if (longint'(sacc) != exp_s) begin
        failures++;
        $display("signed CP mismatch len=%0d got %0d exp %0d", len, sacc, exp_s);
      end
      checks++;
      if (cyc != (len + 1) / 2 + 1) begin
        failures++;
        $display("CP cycles len=%0d got %0d exp %0d", len, cyc, (len + 1) / 2 + 1);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
