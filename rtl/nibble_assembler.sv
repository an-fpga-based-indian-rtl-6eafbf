// Assembling unit: the bridge between the 4-bit parallel-port path from the
// host and the digit memories inside the co-processor.
// Write side: in wide mode (base-256 units) two successive nibbles, low
// nibble first, are assembled into one byte and written to the next address;
// in narrow mode (base-8 signed-digit units) every nibble is one digit and is
// written as it arrives. Read side: the result memory is read at rd_addr and
// handed out a nibble at a time, low nibble first in wide mode; every
// nib_req pulse moves to the next nibble. `clr` restarts both address
// counters at zero, e.g. before a new operand bank is sent.
// That the document's assembling unit packs 4-bit values into 8-bit values
// (and passes 4-bit digits straight through) is taken from it; the nibble
// order, the auto-incrementing addresses and the clr strobe are this design's.
// Timing: a write is issued in the cycle after the nibble that completes a
// digit (registered outputs); nib_out follows rd_data combinationally.
module nibble_assembler #(
  parameter int unsigned AW = 8
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          wide,
  input  logic          clr,
  // host to memory
  input  logic [3:0]    nib_in,
  input  logic          nib_valid,
  output logic          wr_en,
  output logic [AW-1:0] wr_addr,
  output logic [7:0]    wr_data,
  // memory to host
  input  logic          nib_req,
  output logic [AW-1:0] rd_addr,
  input  logic [7:0]    rd_data,
  output logic [3:0]    nib_out
);
  logic          have_lo;
  logic [3:0]    lo;
  logic [AW-1:0] waddr_next;
  logic          rd_hi;

  always_ff @(posedge clk) begin
    if (rst || clr) begin
      have_lo    <= 1'b0;
      lo         <= '0;
      waddr_next <= '0;
      wr_en      <= 1'b0;
      wr_addr    <= '0;
      wr_data    <= '0;
      rd_addr    <= '0;
      rd_hi      <= 1'b0;
    end else begin
      wr_en <= 1'b0;
      if (nib_valid) begin
        if (!wide) begin
          wr_en      <= 1'b1;
          wr_addr    <= waddr_next;
          wr_data    <= {4'h0, nib_in};
          waddr_next <= waddr_next + 1'b1;
        end else if (!have_lo) begin
          lo      <= nib_in;
          have_lo <= 1'b1;
        end else begin
          wr_en      <= 1'b1;
          wr_addr    <= waddr_next;
          wr_data    <= {nib_in, lo};
          waddr_next <= waddr_next + 1'b1;
          have_lo    <= 1'b0;
        end
      end
      if (nib_req) begin
        if (wide && !rd_hi) begin
          rd_hi <= 1'b1;
        end else begin
          rd_hi   <= 1'b0;
          rd_addr <= rd_addr + 1'b1;
        end
      end
    end
  end

  assign nib_out = (wide && rd_hi) ? rd_data[7:4] : rd_data[3:0];
endmodule
