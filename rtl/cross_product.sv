// Cross product (Urdhva Tiryak "vertically and crosswise") engine.
// Computes CP = sum over t of X[s1+t] * Y[e2-t] for t = 0 .. L-1, where
// L = e1-s1+1 = e2-s2+1: the digits of X are taken in ascending address order
// and paired with the digits of Y in descending order. The engine holds no
// memory; it drives four read addresses into two dual-port memories and takes
// the four digits back in the same cycle (asynchronous reads).
// Two multipliers work on the two ends of the vectors at once: Mul1 forms
// X[start1]*Y[end2] and Mul2 forms X[end1]*Y[start2]. After each cycle the
// start pointers are incremented and the end pointers decremented; a compare
// of start1 with end1 ends the run, and when the pointers meet in the middle
// only Mul1's product is added. All of this follows the document's cross
// product unit; the single-cycle accumulate and the end test are this
// design's choices.
// Timing: start is sampled in IDLE; the run then takes ceil(L/2) accumulate
// cycles plus one cycle in which `done` is high and `acc` holds the result
// (`done` is combinational). An empty vector (s1 > e1) gives 0 after one cycle.
// SIGNED selects two's-complement digits (division) or unsigned digits
// (multiplication).
module cross_product #(
  parameter int unsigned DW     = 8,   // digit width
  parameter int unsigned AW     = 5,   // memory address width
  parameter int unsigned ACCW   = 24,  // accumulator width
  parameter bit          SIGNED = 1'b0
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   start,
  input  logic [AW-1:0]          s1, e1, s2, e2,
  output logic [AW-1:0]          x_addr_a, x_addr_b,  // X[start1], X[end1]
  output logic [AW-1:0]          y_addr_a, y_addr_b,  // Y[end2],   Y[start2]
  input  logic [DW-1:0]          x_data_a, x_data_b,
  input  logic [DW-1:0]          y_data_a, y_data_b,
  output logic                   busy,
  output logic                   done,
  output logic signed [ACCW-1:0] acc
);
  typedef enum logic [0:0] {CP_IDLE, CP_RUN} cp_state_e;
  cp_state_e state;

  // one extra bit so that end pointers may step below zero
  logic signed [AW+1:0] p1, q1, p2, q2;
  localparam logic signed [AW+1:0] PTR_ONE = 1;

  function automatic logic signed [DW:0] ext(input logic [DW-1:0] v);
    if (SIGNED) return {v[DW-1], v};
    else        return {1'b0, v};
  endfunction

  logic signed [2*DW+1:0] mul1, mul2;
  assign mul1 = ext(x_data_a) * ext(y_data_a);
  assign mul2 = ext(x_data_b) * ext(y_data_b);

  logic signed [ACCW-1:0] addend;
  always_comb begin
    addend = ACCW'(mul1);
    if (p1 != q1) addend = addend + ACCW'(mul2);
  end

  assign x_addr_a = p1[AW-1:0];
  assign x_addr_b = q1[AW-1:0];
  assign y_addr_a = q2[AW-1:0];
  assign y_addr_b = p2[AW-1:0];

  assign busy = (state == CP_RUN);
  assign done = (state == CP_RUN) && (p1 > q1);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= CP_IDLE;
      acc   <= '0;
      p1 <= '0; q1 <= '0; p2 <= '0; q2 <= '0;
    end else begin
      case (state)
        CP_IDLE: if (start) begin
          p1    <= $signed({2'b00, s1});
          q1    <= $signed({2'b00, e1});
          p2    <= $signed({2'b00, s2});
          q2    <= $signed({2'b00, e2});
          acc   <= '0;
          state <= CP_RUN;
        end
        CP_RUN: begin
          if (p1 > q1) begin
            state <= CP_IDLE;
          end else begin
            acc <= acc + addend;
            p1  <= p1 + PTR_ONE;
            q1  <= q1 - PTR_ONE;
            p2  <= p2 + PTR_ONE;
            q2  <= q2 - PTR_ONE;
          end
        end
        default: state <= CP_IDLE;
      endcase
    end
  end
endmodule
