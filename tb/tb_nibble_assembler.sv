// Self-checking testbench for the nibble assembling unit.
// A memory model in the testbench takes the unit's writes and answers its
// reads. Each round clears the unit, sends a random number of digits as
// nibbles (with random idle cycles between them) in wide or narrow mode and
// checks:
//   - every write appears exactly one cycle after the nibble that completes
//     the digit, at consecutive addresses from 0, with the right value;
//   - the number of writes equals the number of digits;
//   - reading back with nib_req pulses returns the same nibble stream.
module tb_nibble_assembler;
  localparam int AW = 8;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic wide = 0, clr = 0, nib_valid = 0, nib_req = 0;
  logic [3:0] nib_in = 0, nib_out;
  logic wr_en;
  logic [AW-1:0] wr_addr, rd_addr;
  logic [7:0] wr_data, rd_data;

  nibble_assembler #(.AW(AW)) dut (.*);

  logic [7:0] mem [2**AW];
  assign rd_data = mem[rd_addr];

  // write monitor with its own model of the unit: a nibble that completes a
  // digit at one clock edge must produce the write at the next edge
  int writes = 0, exp_addr = 0;
  logic expect_wr = 0, m_have_lo = 0;
  logic [3:0] m_lo;
  logic [7:0] exp_data;
  always @(posedge clk) begin
    if (!rst) begin
      if (wr_en) begin
        mem[wr_addr] <= wr_data;
        writes++;
      end
      checks++;
      if (wr_en != expect_wr || (wr_en && (int'(wr_addr) != exp_addr || wr_data != exp_data))) begin
        failures++;
        $display("write mismatch at %0t: en=%b addr=%0d data=%h, expected en=%0d addr=%0d data=%h",
                 $time, wr_en, wr_addr, wr_data, expect_wr, exp_addr, exp_data);
      end
      if (expect_wr) exp_addr++;
      expect_wr = 0;
      if (clr) begin
        m_have_lo = 0; exp_addr = 0;
      end else if (nib_valid) begin
        if (!wide) begin
          expect_wr = 1; exp_data = {4'h0, nib_in};
        end else if (!m_have_lo) begin
          m_have_lo = 1; m_lo = nib_in;
        end else begin
          expect_wr = 1; exp_data = {nib_in, m_lo}; m_have_lo = 0;
        end
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [3:0] nibs [512];
  initial begin
    int n, nn, digits;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int round = 0; round < 60; round++) begin
      wide = round[0];
      digits = $urandom_range(1, 2**AW - 1);
      nn = wide ? 2 * digits : digits;
      for (int i = 0; i < nn; i++) nibs[i] = 4'($urandom);
      clr = 1; @(negedge clk); clr = 0;
      writes = 0;
      for (int i = 0; i < nn; i++) begin
        while ($urandom_range(0, 3) == 0) @(negedge clk);
        nib_valid = 1; nib_in = nibs[i];
        @(negedge clk);
        nib_valid = 0;
      end
      @(negedge clk);
      @(negedge clk);
      checks++;
      if (writes != digits) begin
        failures++; $display("round %0d: %0d writes for %0d digits", round, writes, digits);
      end
      // read back
      for (int i = 0; i < nn; i++) begin
        checks++;
        if (nib_out != nibs[i]) begin
          failures++; $display("round %0d: read nibble %0d = %h, expected %h", round, i, nib_out, nibs[i]);
        end
        nib_req = 1; @(negedge clk); nib_req = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
