// execution_unit - second pipeline stage of the Optium processor.
//
// Takes one complete instruction (both bytes at once) from the fetch/decode
// unit into its two instruction registers and executes it: one cycle, or two
// when the operand is indirect. It holds the accumulator A and the carry and
// zero flags, and contains the control unit (decoder ROMs), the ALU and the
// addressing mode unit (AMU), which owns the data memory port.
//
// A conditional jump is checked here against the flags left by the preceding
// instructions, which are always complete because execution is in order and
// one at a time. If the outcome differs from the prediction carried with the
// jump, the unit overwrites the jump's BTB entry with the outcome, raises
// redirect with the address of the other path, and refuses the instruction
// offered in that cycle, which lies on the wrong path.
//
// Handshake: in_ack is high in a cycle where in_instr.valid is high and the
// instruction registers are free or hold an instruction in its last cycle.
// Ports: OUT[7:0] is the accumulator itself (the document wires it directly to
// the output port); STORE $N,A pulses out_wr with N on out_n, LOAD A,$N reads
// in_port and pulses in_rd with N on in_n. The strobes and port numbers are
// this design's way of presenting N. acc and the flags are brought out only
// for observation.
module execution_unit
  import optium_pkg::*;
#(
  parameter int unsigned AW = 7
) (
  input  logic          clk,
  input  logic          rst,
  // from fetch/decode
  input  fd_instr_t     in_instr,
  output logic          in_ack,
  // misprediction
  output logic          redirect,
  output logic [7:0]    redirect_pc,
  output logic          btb_upd_we,
  output logic [7:0]    btb_upd_pc,
  output logic          btb_upd_taken,
  // data memory
  output logic [AW-1:0] data_addr,
  output logic          data_we,
  output logic [7:0]    data_wdata,
  input  logic [7:0]    data_rdata,
  // I/O ports
  input  logic [7:0]    in_port,
  output logic          in_rd,
  output logic [3:0]    in_n,
  output logic [7:0]    out_port,
  output logic          out_wr,
  output logic [3:0]    out_n,
  // observation
  output logic [7:0]    acc,
  output logic          flag_c,
  output logic          flag_z,
  output logic          retire,     // an instruction finishes this cycle
  output logic          busy_stall  // second cycle of an indirect access
);

  // instruction registers
  logic      ir_v;
  fd_instr_t ir;

  ctrl_t ctrl;
  logic  second_cycle;

  control_unit u_cu (
    .clk, .rst,
    .ir_valid    (ir_v),
    .ir0         (ir.b0),
    .ctrl,
    .second_cycle
  );

  logic [7:0] operand;
  amu #(.AW(AW)) u_amu (
    .clk,
    .am          (ir.b0[3:2]),
    .m           (ir.b1),
    .second_cycle,
    .ptr_load    (ctrl.ptr_load),
    .mem_write   (ctrl.mem_we),
    .acc         (acc),
    .data_addr, .data_we, .data_wdata, .data_rdata,
    .operand
  );

  logic [7:0] alu_b, alu_y;
  logic       alu_c, alu_z;
  assign alu_b = (ctrl.src == SRC_IN) ? in_port : operand;

  alu u_alu (
    .op    (ctrl.alu_op),
    .a     (acc),
    .b     (alu_b),
    .c_in  (flag_c),
    .y     (alu_y),
    .c_out (alu_c),
    .z_out (alu_z)
  );

  // conditional jump validation
  logic cond, mispredict;
  always_comb begin
    unique case (ir.b0[1:0])
      JC_CS:   cond = flag_c;
      JC_CC:   cond = !flag_c;
      JC_ZS:   cond = flag_z;
      default: cond = !flag_z;  // JC_ZC
    endcase
  end
  assign mispredict    = ctrl.jcond && (cond != ir.pred);
  assign redirect      = mispredict;
  assign redirect_pc   = ir.alt_pc;
  assign btb_upd_we    = mispredict;
  assign btb_upd_pc    = ir.jpc;
  assign btb_upd_taken = cond;

  logic accept;
  assign accept = (!ir_v || ctrl.last) && !mispredict;
  assign in_ack = accept && in_instr.valid;

  always_ff @(posedge clk) begin
    if (rst) begin
      ir_v   <= 1'b0;
      ir     <= '0;
      acc    <= '0;
      flag_c <= 1'b0;
      flag_z <= 1'b0;
    end else begin
      if (accept) begin
        ir_v <= in_instr.valid;
        ir   <= in_instr;
      end else if (mispredict) begin
        ir_v <= 1'b0;
      end
      if (ctrl.a_we) acc    <= alu_y;
      if (ctrl.c_we) flag_c <= alu_c;
      if (ctrl.z_we) flag_z <= alu_z;
    end
  end

  assign in_rd      = ctrl.in_rd;
  assign in_n       = ir.b0[3:0];
  assign out_wr     = ctrl.out_wr;
  assign out_n      = ir.b0[3:0];
  assign out_port   = acc;
  assign retire     = ir_v && ctrl.last;
  assign busy_stall = ir_v && !ctrl.last;

  a_valid_handoff: assert property (@(posedge clk) disable iff (rst)
    in_ack |-> in_instr.valid);

endmodule
