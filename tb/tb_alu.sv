// tb_alu - exhaustive-ish check of the Optium ALU against expected values
// computed here from the instruction set definitions (random operands, all
// operations, carry in both ways).
module tb_alu;
  import optium_pkg::*;

  alu_op_t    op;
  logic [7:0] a, b, y;
  logic       c_in, c_out, z_out;
  int checks = 0, failures = 0;

  alu dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] ey;
    logic       ec;
    logic [8:0] s;
    for (int i = 0; i < 4000; i++) begin
      a    = 8'($urandom);
      b    = (i % 17 == 0) ? 8'(-a) : 8'($urandom);
      c_in = 1'($urandom);
      op   = alu_op_t'($urandom_range(0, 4));
      #1;
      ec = c_in;
      case (op)
        ALU_PASS: ey = b;
        ALU_ADD:  begin s = 9'(a) + 9'(b); ey = s[7:0]; ec = s[8]; end
        ALU_AND:  ey = a & b;
        ALU_CPL:  ey = 8'hFF ^ a;
        default:  begin ey = a / 2; ec = a[0]; end
      endcase
      checks++;
      if (y !== ey || c_out !== ec || z_out !== (ey == 0)) begin
        failures++;
        if (failures < 10) $display("FAIL op=%0d a=%02h b=%02h y=%02h/%02h c=%0d/%0d z=%0d", op, a, b, y, ey, c_out, ec, z_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
