// tb_execution_unit - checks the execution unit on its own. A stream of random
// complete instructions (every opcode, every AM, conditional jumps with random
// predictions) is offered with random gaps; a behavioural data memory and an
// input port source sit on its other ports. An in-order reference model
// applies each instruction when it is accepted and gives the expected
// accumulator, flags, data memory, OUT writes and input reads, and for each
// conditional jump whether a redirect (with its address and BTB correction)
// must follow. Timing is checked: with a full input stream the unit needs one
// cycle per instruction plus one per indirect operand, and it refuses the
// instruction offered in the cycle of a misprediction.
module tb_execution_unit;
  import optium_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  fd_instr_t  in_instr;
  logic       in_ack, redirect, btb_upd_we, btb_upd_taken;
  logic [7:0] redirect_pc, btb_upd_pc;
  logic [6:0] data_addr;
  logic       data_we;
  logic [7:0] data_wdata, data_rdata;
  logic [7:0] in_port, out_port, acc;
  logic       in_rd, out_wr, flag_c, flag_z, retire, busy_stall;
  logic [3:0] in_n, out_n;

  execution_unit dut (.*);

  logic [7:0] dmem [128];
  assign data_rdata = dmem[data_addr];
  always @(posedge clk) if (data_we) dmem[data_addr] <= data_wdata;

  int in_cnt = 0;
  assign in_port = 8'(in_cnt * 29 + 3);
  always @(posedge clk) if (!rst && in_rd) in_cnt <= in_cnt + 1;

  logic [11:0] dut_out [$];
  always @(posedge clk) if (!rst && out_wr) dut_out.push_back({out_n, out_port});

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model
  logic [7:0]  r_mem [128];
  logic [7:0]  r_a;
  logic        r_c, r_z;
  int          r_in;
  logic [11:0] ref_out [$];
  logic [16:0] exp_redirect [$];   // {taken, jpc, alt}
  int          n_ind_exp;

  function automatic void model(input fd_instr_t i);
    logic [7:0] b0, m, addr, val;
    logic [8:0] sum;
    bit cond;
    b0 = i.b0; m = i.b1;
    if (b0[7]) begin
      case (b0[7:4])
        OP_CPL: begin r_a = ~r_a; r_z = (r_a == 0); end
        OP_RRC: begin r_c = r_a[0]; r_a = r_a >> 1; r_z = (r_a == 0); end
        OP_IN:  begin r_a = 8'(r_in * 29 + 3); r_in++; r_z = (r_a == 0); end
        OP_OUT: ref_out.push_back({b0[3:0], r_a});
        default: ;
      endcase
      return;
    end
    if (b0[3:2] == AM_BAD) return;
    addr = (b0[3:2] == AM_IND) ? r_mem[m[6:0]] : m;
    val  = (b0[3:2] == AM_IMM) ? m : r_mem[addr[6:0]];
    if (b0[3:2] == AM_IND && b0[7:4] inside {OP_LOAD, OP_ADD, OP_AND} ) n_ind_exp++;
    if (b0[3:2] == AM_IND && b0[7:4] == OP_STORE) n_ind_exp++;
    case (b0[7:4])
      OP_LOAD:  begin r_a = val; r_z = (r_a == 0); end
      OP_STORE: if (b0[3:2] != AM_IMM) r_mem[addr[6:0]] = r_a;
      OP_ADD:   begin sum = r_a + val; r_a = sum[7:0]; r_c = sum[8]; r_z = (r_a == 0); end
      OP_AND:   begin r_a = r_a & val; r_z = (r_a == 0); end
      OP_JCOND: if (b0[3:2] == AM_ABS) begin
        case (b0[1:0])
          JC_CS: cond = r_c;
          JC_CC: cond = !r_c;
          JC_ZS: cond = r_z;
          default: cond = !r_z;
        endcase
        if (cond != i.pred) exp_redirect.push_back({cond, i.jpc, i.alt_pc});
      end
      default: ;
    endcase
  endfunction

  function automatic fd_instr_t rand_instr(input int idx);
    fd_instr_t i;
    i = '0;
    i.valid = 1;
    i.jpc = 8'(idx * 2);
    if ($urandom_range(0, 2) == 0) begin
      i.b0 = 8'h80 | 8'($urandom);
    end else begin
      i.b0 = 8'($urandom) & 8'h7F;
      if ($urandom_range(0, 3) == 0) i.b0 = {OP_JCOND, AM_ABS, 2'($urandom)};
      i.b1 = 8'($urandom);
      i.pred = 1'($urandom);
      i.alt_pc = 8'($urandom);
    end
    return i;
  endfunction

  int n_redirect = 0, n_ind = 0, n_retire = 0, ret_goal = 0;
  always @(posedge clk) if (!rst) begin
    n_ind    += int'(busy_stall);
    n_retire += int'(retire);
  end

  // redirects must match the model's expectations, in order
  always @(negedge clk) if (!rst && redirect) begin
    logic [16:0] e;
    n_redirect++;
    chk(exp_redirect.size() > 0, "unexpected redirect");
    if (exp_redirect.size() > 0) begin
      e = exp_redirect.pop_front();
      chk(btb_upd_we && btb_upd_taken == e[16] && btb_upd_pc == e[15:8] && redirect_pc == e[7:0],
          $sformatf("redirect got t%0d j%02h a%02h exp %05h", btb_upd_taken, btb_upd_pc, redirect_pc, e));
    end
    chk(!in_ack, "instruction accepted during a misprediction");
  end

  task automatic run(input int n, input int valid_pct, output int cycles);
    fd_instr_t cur;
    int sent, c0;
    sent = 0;
    ret_goal = n_retire + n;
    in_instr = '0;
    cur = rand_instr(0);
    c0 = -1;
    cycles = 0;
    while (sent < n) begin
      @(negedge clk);
      in_instr = ($urandom_range(0, 99) < valid_pct) ? cur : '0;
      #1;
      if (in_ack) begin
        if (c0 < 0) c0 = 0;
        model(cur);
        sent++;
        cur = rand_instr(sent);
      end
      if (c0 >= 0) cycles++;
    end
    // drain: count cycles until the last accepted instruction has retired
    while (n_retire < ret_goal && cycles < 100000) begin
      @(negedge clk);
      in_instr = '0;
      cycles++;
    end
    repeat (2) @(negedge clk);
  endtask

  initial begin
    int cyc, ind0, red0, ret0;
    for (int i = 0; i < 128; i++) begin dmem[i] = 8'($urandom); r_mem[i] = dmem[i]; end
    r_a = 0; r_c = 0; r_z = 0; r_in = 0; n_ind_exp = 0;
    in_instr = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    run(3000, 70, cyc);
    // full-rate run, counted from the cycle the first instruction is taken to
    // the cycle after the last one retires: two cycles of hand-over and
    // observation, then one per instruction, one more per indirect operand
    // and one idle cycle after each misprediction
    ind0 = n_ind; red0 = n_redirect; ret0 = n_retire;
    run(2000, 100, cyc);
    chk(cyc == 2 + 2000 + (n_ind - ind0) + (n_redirect - red0),
        $sformatf("timing: %0d cycles for 2000 instructions, %0d indirect, %0d redirects", cyc, n_ind - ind0, n_redirect - red0));
    chk(n_retire - ret0 == 2000, "retire count");
    chk(n_ind == n_ind_exp, $sformatf("indirect cycles %0d expected %0d", n_ind, n_ind_exp));
    chk(exp_redirect.size() == 0, "missing redirects");
    chk(acc == r_a && flag_c == r_c && flag_z == r_z, $sformatf("final A %02h/%02h C %0d/%0d Z %0d/%0d", acc, r_a, flag_c, r_c, flag_z, r_z));
    for (int i = 0; i < 128; i++) chk(dmem[i] == r_mem[i], $sformatf("mem[%0d]", i));
    chk(in_cnt == r_in, "input reads");
    chk(dut_out.size() == ref_out.size(), "output write count");
    foreach (dut_out[i]) if (i < ref_out.size()) chk(dut_out[i] == ref_out[i], $sformatf("OUT %0d", i));
    chk(n_redirect > 0 && n_ind > 0, "mispredictions and indirect operands exercised");
    $display("events: redirects=%0d indirect=%0d retired=%0d", n_redirect, n_ind, n_retire);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
