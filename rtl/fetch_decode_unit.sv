// fetch_decode_unit - first pipeline stage of the Optium processor.
//
// Owns the 8-bit program counter and reads the program memory one byte per
// clock. A single-byte instruction (first bit 1) goes straight to the output
// register. The first byte of a double-byte instruction is held until its
// operand byte arrives, so that both bytes reach the execution unit together
// in one transfer ("burst" access). The output register's valid bit is the
// validation bit the execution unit waits for; out_ack takes the instruction.
//
// Control transfer is handled here:
//   * JUMP m (absolute) loads the PC with m and is never passed on;
//   * JUMP t,m (absolute) is predicted and passed on for validation. On its
//     first encounter the prediction is static: taken if m is below the jump's
//     own address (a loop), not taken otherwise; the prediction is stored in the
//     BTB and later encounters use the stored bit. The instruction carries its
//     own address and the address of the path not taken (alt_pc).
//   * redirect (from the execution unit, on a misprediction) discards the held
//     byte and the output register and restarts fetching at redirect_pc.
// A jump with an AM other than absolute is passed on as a two-byte NOP.
//
// Timing: a byte read at cycle t is in the output register at t+1. A held byte
// does not stop fetching of the operand byte; only a full output register that
// is not taken stalls the PC. The program memory ignores PC bit 7. The held
// byte and one output register are this design's choice of buffer depth.
module fetch_decode_unit
  import optium_pkg::*;
#(
  parameter int unsigned AW = 7
) (
  input  logic          clk,
  input  logic          rst,
  // program memory
  output logic [AW-1:0] prog_addr,
  input  logic [7:0]    prog_rdata,
  // branch target buffer
  output logic [7:0]    btb_lookup_pc,
  input  logic          btb_hit,
  input  logic          btb_taken,
  output logic          btb_alloc_we,
  output logic          btb_alloc_taken,
  // to the execution unit
  output fd_instr_t     out,
  input  logic          out_ack,
  // misprediction recovery
  input  logic          redirect,
  input  logic [7:0]    redirect_pc,
  // events
  output logic          ev_static_pred,  // conditional jump predicted statically
  output logic          ev_btb_pred,     // conditional jump predicted from the BTB
  output logic          ev_jump          // unconditional jump executed
);

  logic [7:0] pc;
  logic       hold_v;
  logic [7:0] hold_b0;
  logic [7:0] hold_pc;

  logic [7:0] byte_in;
  assign prog_addr = pc[AW-1:0];
  assign byte_in   = prog_rdata;

  logic out_free;
  assign out_free = !out.valid || out_ack;

  // decode of the held first byte
  logic is_jump, is_jcond;
  assign is_jump  = hold_v && hold_b0[7:4] == OP_JUMP  && hold_b0[3:2] == AM_ABS;
  assign is_jcond = hold_v && hold_b0[7:4] == OP_JCOND && hold_b0[3:2] == AM_ABS;

  // prediction: dynamic from the BTB, or static (backward = taken)
  logic static_taken, pred;
  assign static_taken    = byte_in < hold_pc;
  assign pred            = btb_hit ? btb_taken : static_taken;
  assign btb_lookup_pc   = hold_pc;
  assign btb_alloc_taken = static_taken;
  assign btb_alloc_we    = !redirect && is_jcond && out_free && !btb_hit;

  assign ev_static_pred  = btb_alloc_we;
  assign ev_btb_pred     = !redirect && is_jcond && out_free && btb_hit;
  assign ev_jump         = !redirect && is_jump;

  always_ff @(posedge clk) begin
    if (rst) begin
      pc      <= '0;
      hold_v  <= 1'b0;
      hold_b0 <= '0;
      hold_pc <= '0;
      out     <= '0;
    end else if (redirect) begin
      pc        <= redirect_pc;
      hold_v    <= 1'b0;
      out.valid <= 1'b0;
    end else begin
      if (out_ack) out.valid <= 1'b0;
      if (!hold_v) begin
        if (byte_in[7]) begin
          // single-byte instruction
          if (out_free) begin
            out <= '{valid: 1'b1, b0: byte_in, b1: 8'h00, pred: 1'b0,
                     jpc: pc, alt_pc: 8'h00};
            pc  <= pc + 8'd1;
          end
        end else begin
          // first byte of a double-byte instruction: hold it
          hold_v  <= 1'b1;
          hold_b0 <= byte_in;
          hold_pc <= pc;
          pc      <= pc + 8'd1;
        end
      end else if (is_jump) begin
        pc     <= byte_in;
        hold_v <= 1'b0;
      end else if (out_free) begin
        hold_v <= 1'b0;
        if (is_jcond) begin
          out <= '{valid: 1'b1, b0: hold_b0, b1: byte_in, pred: pred,
                   jpc: hold_pc, alt_pc: pred ? pc + 8'd1 : byte_in};
          pc  <= pred ? byte_in : pc + 8'd1;
        end else begin
          out <= '{valid: 1'b1, b0: hold_b0, b1: byte_in, pred: 1'b0,
                   jpc: hold_pc, alt_pc: 8'h00};
          pc  <= pc + 8'd1;
        end
      end
    end
  end

  // The execution unit may only take an instruction that is marked valid.
  a_no_ack_without_valid: assert property (@(posedge clk) disable iff (rst)
    out_ack |-> out.valid);

endmodule
