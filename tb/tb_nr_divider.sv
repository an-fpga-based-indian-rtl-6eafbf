// Exhaustive self-checking testbench for the non-restoring divider at the
// size the division and square-root units use (8-bit dividend, 4-bit
// divisor): every dividend and every non-zero divisor is compared with the
// integer quotient and remainder.
module tb_nr_divider;
  int checks = 0, failures = 0;
  logic [7:0] n, q;
  logic [3:0] d, r;
  nr_divider #(.NW(8), .DW(4)) dut (.dividend(n), .divisor(d), .quotient(q), .remainder(r));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int dv = 1; dv < 16; dv++) begin
      for (int nv = 0; nv < 256; nv++) begin
        n = 8'(nv); d = 4'(dv);
        #1;
        checks++;
        if (int'(q) != nv / dv || int'(r) != nv % dv) begin
          failures++;
          if (failures < 10) $display("div %0d/%0d got q=%0d r=%0d", nv, dv, q, r);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
