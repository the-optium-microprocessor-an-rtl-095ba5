// tb_btb - checks the branch target buffer against a reference model of a
// fully associative, round-robin, one-bit table: misses on new jumps,
// allocation of the static prediction, hits with the stored bit, correction
// by the execution unit, replacement of the oldest entry, and reset.
module tb_btb;
  localparam int N = 4;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [7:0] lookup_pc = 0, upd_pc = 0;
  logic lookup_hit, lookup_taken, alloc_we = 0, alloc_taken = 0, upd_we = 0, upd_taken = 0;
  int checks = 0, failures = 0;

  btb #(.ENTRIES(N)) dut (.*);

  // reference
  bit         mv [N];
  logic [7:0] mt [N];
  bit         mp [N];
  int         vic;

  function automatic int find(input logic [7:0] pc);
    for (int i = 0; i < N; i++) if (mv[i] && mt[i] == pc) return i;
    return -1;
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    int h, u;
    for (int i = 0; i < N; i++) mv[i] = 0;
    vic = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int k = 0; k < 3000; k++) begin
      lookup_pc   = 8'($urandom_range(0, 11)) * 8'd3;
      alloc_taken = 1'($urandom);
      upd_pc      = 8'($urandom_range(0, 11)) * 8'd3;
      upd_taken   = 1'($urandom);
      upd_we      = ($urandom_range(0, 3) == 0);
      #1;
      h = find(lookup_pc);
      chk(lookup_hit == (h >= 0), $sformatf("hit pc=%0d", lookup_pc));
      if (h >= 0) chk(lookup_taken == mp[h], "stored prediction");
      alloc_we = (h < 0) && $urandom_range(0, 1) == 1;
      @(posedge clk);
      u = find(upd_pc);
      if (alloc_we && !(upd_we && u >= 0 && u == vic) && !(upd_we && upd_pc == lookup_pc)) begin
        mv[vic] = 1; mt[vic] = lookup_pc; mp[vic] = alloc_taken;
        vic = (vic + 1) % N;
      end
      if (upd_we && u >= 0) mp[u] = upd_taken;
      @(negedge clk);
      alloc_we = 0; upd_we = 0;
    end
    rst = 1;
    @(negedge clk);
    rst = 0;
    for (int i = 0; i < 12; i++) begin
      lookup_pc = 8'(i * 3);
      #1;
      chk(!lookup_hit, "empty after reset");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
