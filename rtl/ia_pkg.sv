// Shared types and constants of the Indian-arithmetic co-processor.
// The five arithmetic units share nothing at run time; this package only
// fixes the names used to choose a unit, to choose an operand bank and the
// digit formats (base 256 unsigned for multiply, square and divisibility,
// base 8 signed digits for division and square root).
package ia_pkg;

  // Which of the five arithmetic units the co-processor is running. On the
  // original FPGA board this choice was a reconfiguration; here it is a select.
  typedef enum logic [2:0] {
    UNIT_MUL   = 3'd0,  // Urdhva Tiryak multiplication
    UNIT_SQR   = 3'd1,  // Dwandwa squaring
    UNIT_DIV   = 3'd2,  // straight division (SDNS)
    UNIT_SQRT  = 3'd3,  // Dwandwa square root (SDNS)
    UNIT_DIVIS = 3'd4   // Ekadhika divisibility osculation
  } unit_sel_e;

  // Operand banks written by the host. Each unit uses the banks it needs:
  //   MUL  : BANK_A = multiplicand, BANK_B = multiplier
  //   SQR  : BANK_A = number
  //   DIV  : BANK_A = dividend,     BANK_B = divisor
  //   SQRT : BANK_A = number digits after the leading group
  //   DIVIS: BANK_A = dividend,     BANK_B = Ekadhika
  typedef enum logic [0:0] {
    BANK_A = 1'b0,
    BANK_B = 1'b1
  } bank_e;

  localparam int unsigned BYTE_W      = 8;  // base-256 digit width
  localparam int unsigned SD_W        = 4;  // base-8 signed digit width
  localparam int unsigned SD_LOG2_RAD = 3;  // log2 of the SDNS base (8)

endpackage
