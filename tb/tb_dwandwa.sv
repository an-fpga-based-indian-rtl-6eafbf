// Self-checking testbench for the Dwandwa engine.
// Random vectors of length 0..13 are run through an unsigned (8-bit digit)
// and a signed (4-bit digit) instance; results are compared with the duplex
// summed pair by pair in the testbench, and the run length with ceil(L/2)
// accumulate cycles plus the done cycle.
module tb_dwandwa;
  localparam int AW = 5;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [7:0] zm [32];
  logic [3:0] zs [32];
  logic start;
  logic [AW-1:0] s, e, aa, ab, saa, sab;
  logic busy, done, sbusy, sdone;
  logic signed [23:0] acc;
  logic signed [15:0] sacc;

  dwandwa #(.DW(8), .AW(AW), .ACCW(24), .SIGNED(1'b0)) dut (
    .clk, .rst, .start, .s, .e, .addr_a(aa), .addr_b(ab),
    .data_a(zm[aa]), .data_b(zm[ab]), .busy, .done, .acc);
  dwandwa #(.DW(4), .AW(AW), .ACCW(16), .SIGNED(1'b1)) dut_s (
    .clk, .rst, .start, .s, .e, .addr_a(saa), .addr_b(sab),
    .data_a(zs[saa]), .data_b(zs[sab]), .busy(sbusy), .done(sdone), .acc(sacc));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int len, cyc;
    longint exp_u, exp_s;
    start = 0; s = 0; e = 0;
    for (int i = 0; i < 32; i++) begin
      zm[i] = 8'($urandom); zs[i] = 4'($urandom);
    end
    repeat (2) @(posedge clk);
    rst = 0;
    for (int trial = 0; trial < 200; trial++) begin
      len = (trial < 14) ? trial : int'($urandom_range(0, 13));
      s = AW'($urandom_range(1, 15));
      e = AW'(int'(s) + len - 1);
      exp_u = 0; exp_s = 0;
      // duplex: every ordered pair (i, j) with i + j = s + e
      for (int i = 0; i < len; i++) begin
        exp_u += longint'(zm[s + i]) * longint'(zm[e - i]);
        exp_s += longint'($signed(zs[s + i])) * longint'($signed(zs[e - i]));
      end
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks += 3;
      if (longint'(acc) != exp_u) begin
        failures++; $display("unsigned Dwandwa len=%0d got %0d exp %0d", len, acc, exp_u);
      end
      if (longint'(sacc) != exp_s) begin
        failures++; $display("signed Dwandwa len=%0d got %0d exp %0d", len, sacc, exp_s);
      end
      if (cyc != (len + 1) / 2 + 1) begin
        failures++; $display("Dwandwa cycles len=%0d got %0d", len, cyc);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
