// tb_control_unit - checks the decoder/state ROM pair for every first byte:
// which registers each instruction writes (from the instruction set table),
// that undefined opcodes, AM 10 and STORE immediate decode to a NOP, and that
// indirect operands take a pointer cycle followed by the operation cycle.
module tb_control_unit;
  import optium_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic       ir_valid = 0;
  logic [7:0] ir0 = 0;
  ctrl_t      ctrl;
  logic       second_cycle;
  int checks = 0, failures = 0;

  control_unit dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  // expected {a_we, c_we, z_we, mem_we, in_rd, out_wr, jcond} of the operation cycle
  function automatic logic [6:0] expect_ops(input logic [7:0] b);
    logic [3:0] op = b[7:4];
    logic [1:0] am = b[3:2];
    if (!op[3] && am == 2'b10) return 7'b0;
    case (op)
      4'b0000: return 7'b1010000;
      4'b0001: return (am == 2'b00) ? 7'b0 : 7'b0001000;
      4'b0010: return 7'b1110000;
      4'b0011: return 7'b1010000;
      4'b0101: return (am == 2'b01) ? 7'b0000001 : 7'b0;
      4'b1000: return 7'b1010000;
      4'b1001: return 7'b1110000;
      4'b1010: return 7'b1010100;
      4'b1011: return 7'b0000010;
      default: return 7'b0;
    endcase
  endfunction

  function automatic logic [6:0] got(input ctrl_t c);
    return {c.a_we, c.c_we, c.z_we, c.mem_we, c.in_rd, c.out_wr, c.jcond};
  endfunction

  initial begin
    logic [6:0] e;
    bit ind;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int b = 0; b < 256; b++) begin
      ir0 = 8'(b); ir_valid = 1;
      e = expect_ops(8'(b));
      ind = !ir0[7] && ir0[3:2] == 2'b11 && ir0[7:4] inside {4'h0, 4'h1, 4'h2, 4'h3};
      #1;
      if (ind) begin
        chk(ctrl.ptr_load && !ctrl.last && got(ctrl) == 0 && !second_cycle, $sformatf("pointer cycle %02h", b));
        @(negedge clk);
        ir_valid = 0;   // the operation cycle must not depend on a new decode
        #1;
        chk(second_cycle && ctrl.last && !ctrl.ptr_load && got(ctrl) == e, $sformatf("operation cycle %02h got %b exp %b", b, got(ctrl), e));
      end else begin
        chk(ctrl.last && !ctrl.ptr_load && got(ctrl) == e, $sformatf("one-cycle %02h got %b exp %b", b, got(ctrl), e));
      end
      if (e[6]) begin
        case (ir0[7:4])
          4'b0010: chk(ctrl.alu_op == ALU_ADD, "ALU add");
          4'b0011: chk(ctrl.alu_op == ALU_AND, "ALU and");
          4'b1000: chk(ctrl.alu_op == ALU_CPL, "ALU cpl");
          4'b1001: chk(ctrl.alu_op == ALU_RRC, "ALU rrc");
          4'b1010: chk(ctrl.alu_op == ALU_PASS && ctrl.src == SRC_IN, "input");
          default: chk(ctrl.alu_op == ALU_PASS && ctrl.src == SRC_AMU, "load");
        endcase
      end
      @(negedge clk);
      ir_valid = 0;
      #1;
      chk(got(ctrl) == 0 && !second_cycle, "idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
