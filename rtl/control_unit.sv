// control_unit - command generator of the Optium execution unit.
//
// Built as the two-ROM arrangement the document describes:
//   * the instruction decoder maps the first instruction register's opcode and
//     AM bits to the state of the first cycle, and to the state of a second
//     cycle for indirect operands;
//   * the state decoder maps a state to the command variables (ctrl_t) of the
//     whole execution unit for that cycle.
// An indirect instruction starts in ST_PTR (read the pointer); its operation
// state is held in a register and drives the state decoder one clock later, so
// the second cycle is commanded by the previous cycle's decode.
//
// Decoding rules, from the instruction set tables: double-byte opcodes start
// with 0, single-byte with 1; AM 10 and any opcode not in the table decode to a
// one-cycle NOP that writes nothing; STORE with immediate AM is a NOP. JUMP
// (unconditional) is executed in the fetch/decode unit and never arrives here;
// if it did it would be a NOP. A conditional jump only validates a prediction.
// ROM contents are written as case statements; the encodings are this design's.
//
// Interface: ir_valid/ir0 describe the instruction register for this cycle;
// ctrl and second_cycle are combinational. ctrl.last is 1 in the final cycle of
// an instruction, when the execution unit may accept the next one.
module control_unit
  import optium_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       ir_valid,
  input  logic [7:0] ir0,
  output ctrl_t      ctrl,
  output logic       second_cycle
);

  // ---------------- instruction decoder ROM ----------------
  function automatic cu_state_t op_state(input logic [3:0] opc, input logic [1:0] am);
    cu_state_t s;
    s = ST_NOP;
    if (!opc[3] && am == AM_BAD) return ST_NOP;
    unique case (opc)
      OP_LOAD:  s = ST_LOAD;
      OP_STORE: s = (am == AM_IMM) ? ST_NOP : ST_STORE;
      OP_ADD:   s = ST_ADD;
      OP_AND:   s = ST_AND;
      OP_JCOND: s = (am == AM_ABS) ? ST_JCOND : ST_NOP;
      OP_CPL:   s = ST_CPL;
      OP_RRC:   s = ST_RRC;
      OP_IN:    s = ST_IN;
      OP_OUT:   s = ST_OUT;
      default:  s = ST_NOP;
    endcase
    return s;
  endfunction

  cu_state_t dec_first, dec_second;
  always_comb begin
    dec_second = op_state(ir0[7:4], ir0[3:2]);
    // operations with a memory operand spend a first cycle on the pointer
    if (!ir0[7] && ir0[3:2] == AM_IND &&
        dec_second inside {ST_LOAD, ST_STORE, ST_ADD, ST_AND})
      dec_first = ST_PTR;
    else
      dec_first = dec_second;
  end

  // ---------------- state register (second cycle) ----------------
  logic      sec_q;
  cu_state_t sec_state_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      sec_q       <= 1'b0;
      sec_state_q <= ST_NOP;
    end else if (sec_q) begin
      sec_q       <= 1'b0;
    end else if (ir_valid && dec_first == ST_PTR) begin
      sec_q       <= 1'b1;
      sec_state_q <= dec_second;
    end
  end

  assign second_cycle = sec_q;

  cu_state_t cur;
  assign cur = sec_q ? sec_state_q : (ir_valid ? dec_first : ST_NOP);

  // ---------------- state decoder ROM ----------------
  always_comb begin
    ctrl        = '0;
    ctrl.alu_op = ALU_PASS;
    ctrl.src    = SRC_AMU;
    ctrl.last   = 1'b1;
    unique case (cur)
      ST_LOAD:  begin ctrl.alu_op = ALU_PASS; ctrl.a_we = 1'b1; ctrl.z_we = 1'b1; end
      ST_STORE: begin ctrl.mem_we = 1'b1; end
      ST_ADD:   begin ctrl.alu_op = ALU_ADD;  ctrl.a_we = 1'b1; ctrl.z_we = 1'b1; ctrl.c_we = 1'b1; end
      ST_AND:   begin ctrl.alu_op = ALU_AND;  ctrl.a_we = 1'b1; ctrl.z_we = 1'b1; end
      ST_JCOND: begin ctrl.jcond  = 1'b1; end
      ST_CPL:   begin ctrl.alu_op = ALU_CPL;  ctrl.a_we = 1'b1; ctrl.z_we = 1'b1; end
      ST_RRC:   begin ctrl.alu_op = ALU_RRC;  ctrl.a_we = 1'b1; ctrl.z_we = 1'b1; ctrl.c_we = 1'b1; end
      ST_IN:    begin ctrl.alu_op = ALU_PASS; ctrl.src = SRC_IN; ctrl.a_we = 1'b1; ctrl.z_we = 1'b1; ctrl.in_rd = 1'b1; end
      ST_OUT:   begin ctrl.out_wr = 1'b1; end
      ST_PTR:   begin ctrl.ptr_load = 1'b1; ctrl.last = 1'b0; end
      default:  ;
    endcase
  end

endmodule
