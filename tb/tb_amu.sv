// tb_amu - checks the addressing mode unit with a behavioural data memory:
// immediate, absolute and two-cycle indirect operands, stores to absolute and
// indirect addresses, and that the top bit of every data address is ignored.
module tb_amu;
  import optium_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [1:0] am;
  logic [7:0] m, acc, data_wdata, data_rdata, operand;
  logic       second_cycle, ptr_load, mem_write, data_we;
  logic [6:0] data_addr;
  logic [7:0] mem [128];
  int checks = 0, failures = 0;

  amu dut (.*);

  assign data_rdata = mem[data_addr];
  always @(posedge clk) if (data_we) mem[data_addr] <= data_wdata;

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

  initial begin
    logic [7:0] exp_v, p;
    logic       wr;
    logic [7:0] shadow [128];
    for (int i = 0; i < 128; i++) begin mem[i] = 8'($urandom); shadow[i] = mem[i]; end
    second_cycle = 0; ptr_load = 0; mem_write = 0; acc = 0; am = 0; m = 0;
    for (int k = 0; k < 1000; k++) begin
      @(negedge clk);
      am  = 2'($urandom_range(0, 3));
      if (am == AM_BAD) am = AM_IND;
      m   = 8'($urandom);
      acc = 8'($urandom);
      wr = 1'($urandom);
      if (am == AM_IMM) wr = 0;
      mem_write = 0;
      if (am == AM_IND) begin
        // first cycle: pointer fetch
        ptr_load = 1; second_cycle = 0;
        #1;
        chk(data_addr == m[6:0] && !data_we, "indirect cycle 1 address");
        @(negedge clk);
        ptr_load = 0; second_cycle = 1;
        p = shadow[m[6:0]];
      end else begin
        p = m;
      end
      mem_write = wr;
      #1;
      exp_v = (am == AM_IMM) ? m : shadow[p[6:0]];
      if (mem_write) begin
        chk(data_we && data_addr == p[6:0] && data_wdata == acc, $sformatf("store am=%0d", am));
        shadow[p[6:0]] = acc;
      end else begin
        chk(operand == exp_v, $sformatf("operand am=%0d m=%02h got %02h exp %02h", am, m, operand, exp_v));
      end
      @(negedge clk);
      second_cycle = 0; mem_write = 0;
    end
    for (int i = 0; i < 128; i++) chk(mem[i] == shadow[i], "final memory");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
