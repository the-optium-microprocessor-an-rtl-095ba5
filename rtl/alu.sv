// alu - arithmetic and logic unit of the Optium execution unit.
//
// Combinational. Operand a is always the accumulator; operand b comes from
// the addressing-mode unit (memory or immediate value) or from the input port,
// chosen outside. Operations follow the instruction set table:
//   PASS  y = b                     (LOAD A,m and LOAD A,$N)
//   ADD   y = a + b, c = carry out of bit 7
//   AND   y = a & b
//   CPL   y = ~a
//   RRC   y = a >> 1 (bit 7 becomes 0), c = a[0]
// The shift follows the printed formula A <- A/2, C <- A0 literally rather
// than the rotate-through-carry the mnemonic suggests. z is set when y is zero;
// which flags an instruction actually writes is decided by the control unit.
// For operations that do not define a carry, c_out repeats c_in.
module alu
  import optium_pkg::*;
(
  input  alu_op_t    op,
  input  logic [7:0] a,
  input  logic [7:0] b,
  input  logic       c_in,
  output logic [7:0] y,
  output logic       c_out,
  output logic       z_out
);

  always_comb begin
    c_out = c_in;
    unique case (op)
      ALU_PASS: y = b;
      ALU_ADD:  {c_out, y} = {1'b0, a} + {1'b0, b};
      ALU_AND:  y = a & b;
      ALU_CPL:  y = ~a;
      ALU_RRC:  begin y = {1'b0, a[7:1]}; c_out = a[0]; end
      default:  y = b;
    endcase
    z_out = (y == 8'h00);
  end

endmodule
