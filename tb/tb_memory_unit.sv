// tb_memory_unit - checks the split program/data memory: loading through the
// load port into both halves, combinational reads on both unit ports, data
// writes from the execution side, that the top address bit selects the half
// on the load/debug ports and is ignored on the unit ports, and that the two
// halves never alias.
module tb_memory_unit;
  logic       clk = 0;
  always #5 clk = ~clk;
  logic [6:0] prog_addr = 0, data_addr = 0;
  logic [7:0] prog_rdata, data_rdata, data_wdata = 0, load_wdata = 0, load_addr = 0, dbg_addr = 0, dbg_rdata;
  logic       data_we = 0, load_we = 0;
  int checks = 0, failures = 0;
  logic [7:0] model [256];

  memory_unit dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    @(negedge clk);
    for (int i = 0; i < 256; i++) begin
      model[i] = 8'($urandom);
      load_we = 1; load_addr = 8'(i); load_wdata = model[i];
      @(negedge clk);
    end
    load_we = 0;
    for (int i = 0; i < 128; i++) begin
      prog_addr = 7'(i); data_addr = 7'(127 - i); dbg_addr = 8'(i * 2);
      #1;
      chk(prog_rdata == model[i], $sformatf("prog[%0d]", i));
      chk(data_rdata == model[128 + 127 - i], $sformatf("data[%0d]", 127 - i));
      chk(dbg_rdata == model[(i * 2) % 256], "dbg");
    end
    // execution-side writes go to the data half only
    for (int k = 0; k < 300; k++) begin
      @(negedge clk);
      data_we = 1; data_addr = 7'($urandom); data_wdata = 8'($urandom);
      model[128 + int'(data_addr)] = data_wdata;
      @(negedge clk);
      data_we = 0;
      prog_addr = data_addr;
      #1;
      chk(data_rdata == model[128 + int'(data_addr)], "data write/readback");
      chk(prog_rdata == model[int'(data_addr)], "program half untouched");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
