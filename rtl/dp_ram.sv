// Dual-read, single-write digit memory.
// Models the small RAMs inside each arithmetic unit: one synchronous write
// port and two asynchronous read ports, like the distributed dual-port RAM of
// the FPGA family the units were built for. Two read ports let the cross
// product and Dwandwa engines fetch two digits per cycle.
// Interface: we/waddr/wdata write on the rising clock edge; raddr_a/raddr_b
// read combinationally. The contents are not reset: the host loads operands
// before a unit is started, and results are only read after they are written.
module dp_ram #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 32,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr_a,
  output logic [W-1:0]  rdata_a,
  input  logic [AW-1:0] raddr_b,
  output logic [W-1:0]  rdata_b
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata_a = mem[raddr_a];
  assign rdata_b = mem[raddr_b];
endmodule
