// X pipe functional unit: the single-cycle integer adder used by add and
// addi. The I stage supplies the second operand already selected between
// the register value and the immediate, so the unit is one 32-bit adder
// (wrap-around, as RV32). Combinational; the X stage pipeline register
// around it lives in the core. That add and addi execute in a one-stage X
// pipe follows the lecture; the rest is the obvious implementation.
module rr_x_unit
  import rr_pkg::*;
(
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  output logic [XLEN-1:0] y
);
  assign y = a + b;
endmodule
