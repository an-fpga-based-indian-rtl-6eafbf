// Dwandwa (duplex) engine.
// For the digits Z[s .. e] it computes D = sum of 2*Z[s+t]*Z[e-t] over the
// pairs with s+t < e-t, plus Z[m]^2 when the vector has a middle digit m.
// One multiplier is fed from the two read ports of a dual-port memory; the
// doubling is a one-bit left shift of the product, skipped for the middle
// digit (the document's "shift/transfer" stage, steered by the comparator of
// the start and end pointers). After each cycle start is incremented and end
// decremented; the comparator ends the run when start passes end.
// Timing: start is sampled in IDLE; ceil(L/2) accumulate cycles follow, then
// one cycle with `done` high (combinational) and the result on `acc`.
// An empty vector (s > e) gives 0 after one cycle.
// SIGNED selects two's-complement digits (square root) or unsigned digits
// (squaring). The shift-and-add structure follows the document; cycle-level
// details are this design's choice.
module dwandwa #(
  parameter int unsigned DW     = 8,
  parameter int unsigned AW     = 5,
  parameter int unsigned ACCW   = 24,
  parameter bit          SIGNED = 1'b0
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   start,
  input  logic [AW-1:0]          s,
  input  logic [AW-1:0]          e,
  output logic [AW-1:0]          addr_a,   // Z[start]
  output logic [AW-1:0]          addr_b,   // Z[end]
  input  logic [DW-1:0]          data_a,
  input  logic [DW-1:0]          data_b,
  output logic                   busy,
  output logic                   done,
  output logic signed [ACCW-1:0] acc
);
  typedef enum logic [0:0] {DW_IDLE, DW_RUN} dw_state_e;
  dw_state_e state;

  logic signed [AW+1:0] ps, pe;
  localparam logic signed [AW+1:0] PTR_ONE = 1;

  function automatic logic signed [DW:0] ext(input logic [DW-1:0] v);
    if (SIGNED) return {v[DW-1], v};
    else        return {1'b0, v};
  endfunction

  logic signed [2*DW+1:0] prod;
  logic signed [ACCW-1:0] addend;
  assign prod   = ext(data_a) * ext(data_b);
  assign addend = (ps == pe) ? ACCW'(prod) : (ACCW'(prod) <<< 1);

  assign addr_a = ps[AW-1:0];
  assign addr_b = pe[AW-1:0];
  assign busy   = (state == DW_RUN);
  assign done   = (state == DW_RUN) && (ps > pe);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= DW_IDLE;
      acc   <= '0;
      ps    <= '0;
      pe    <= '0;
    end else begin
      case (state)
        DW_IDLE: if (start) begin
          ps    <= $signed({2'b00, s});
          pe    <= $signed({2'b00, e});
          acc   <= '0;
          state <= DW_RUN;
        end
        DW_RUN: begin
          if (ps > pe) begin
            state <= DW_IDLE;
          end else begin
            acc <= acc + addend;
            ps  <= ps + PTR_ONE;
            pe  <= pe - PTR_ONE;
          end
        end
        default: state <= DW_IDLE;
      endcase
    end
  end
endmodule
