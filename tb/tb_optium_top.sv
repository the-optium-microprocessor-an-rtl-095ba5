// tb_optium_top - end-to-end test of the Optium processor.
//
// Loads programs through the load port, runs them until the processor halts
// (a JUMP to its own address), and compares the final accumulator, flags, data
// memory and the sequence of OUT writes with an instruction-level reference
// model written in this testbench from the instruction set alone.
//
// Programs: one directed program (a counted loop with indirect operands, port
// I/O, RRC/CPL, NOPs, taken and not-taken forward jumps) and NPROG random
// programs. Each random program is a random body of all instruction kinds with
// forward jumps only, wrapped in an outer loop run a few times from a counter
// in data memory, so that conditional jumps are met again and predicted from
// the BTB. Every mechanism of the pipeline is counted and must occur: burst
// hand-over of two-byte instructions, static and BTB predictions, mispredict
// recovery, the extra indirect cycle, a stalled hand-over, unconditional
// jumps, port reads and writes. Every executed instruction other than an
// unconditional jump must retire exactly once, and a straight run of
// single-byte instructions must retire one instruction per clock.
module tb_optium_top;
  import optium_pkg::*;

  localparam int NPROG    = 40;
  localparam int MAXCYC   = 200000;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic       load_we = 0;
  logic [7:0] load_addr = 0, load_wdata = 0, dbg_addr = 0, dbg_rdata;
  logic [7:0] in_port, out_port, acc;
  logic       in_rd, out_wr, flag_c, flag_z;
  logic [3:0] in_n, out_n;
  logic stat_retire, stat_burst, stat_mispredict, stat_static_pred, stat_btb_pred;
  logic stat_jump, stat_indirect, stat_fd_stall;

  optium_top dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // watchdog
  initial begin
    repeat (MAXCYC) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ---------------- input port stimulus ----------------
  int in_cnt = 0;
  function automatic logic [7:0] in_value(input int k);
    return 8'(k * 37 + 8'h5A);
  endfunction
  assign in_port = in_value(in_cnt);
  always @(posedge clk) if (!rst && in_rd) in_cnt <= in_cnt + 1;

  // ---------------- observed output writes ----------------
  logic [11:0] dut_out [$];
  always @(posedge clk) if (!rst && out_wr) dut_out.push_back({out_n, out_port});

  // ---------------- event counters ----------------
  int n_retire, n_mis, n_static, n_btb, n_jump, n_ind, n_stall, n_in, n_out;
  int n_burst;
  always @(posedge clk) if (!rst) begin
    n_retire += int'(stat_retire);
    n_mis    += int'(stat_mispredict);
    n_static += int'(stat_static_pred);
    n_btb    += int'(stat_btb_pred);
    n_jump   += int'(stat_jump);
    n_ind    += int'(stat_indirect);
    n_stall  += int'(stat_fd_stall);
    n_in     += int'(in_rd);
    n_out    += int'(out_wr);
    n_burst  += int'(stat_burst);
  end

  // ---------------- program image and assembler ----------------
  logic [7:0] img [256];
  int ap;  // assembly pointer

  function automatic void emit1(input logic [3:0] op, input logic [3:0] n);
    img[ap] = {op, n}; ap++;
  endfunction
  function automatic void emit2(input logic [3:0] op, input logic [1:0] am,
                                input logic [1:0] jc, input logic [7:0] m);
    img[ap] = {op, am, jc}; img[ap+1] = m; ap += 2;
  endfunction

  // ---------------- reference model ----------------
  logic [7:0]  r_mem [256];
  logic [7:0]  r_a;
  logic        r_c, r_z;
  int          r_in;
  int          r_steps, r_jumps;   // instructions executed, unconditional jumps among them
  logic [11:0] ref_out [$];

  function automatic logic [7:0] dget(input logic [7:0] a);
    return r_mem[{1'b1, a[6:0]}];
  endfunction

  // returns 1 when the program halted
  function automatic bit ref_run(input int max_steps);
    logic [7:0] pc, b0, m, addr, val;
    logic [8:0] sum;
    bit cond;
    pc = 0; r_a = 0; r_c = 0; r_z = 0; r_in = 0; r_steps = 0; r_jumps = 0;
    ref_out.delete();
    for (int s = 0; s < max_steps; s++) begin
      b0 = r_mem[{1'b0, pc[6:0]}];
      r_steps++;
      if (b0[7]) begin
        case (b0[7:4])
          OP_CPL: begin r_a = ~r_a; r_z = (r_a == 0); end
          OP_RRC: begin r_c = r_a[0]; r_a = r_a >> 1; r_z = (r_a == 0); end
          OP_IN:  begin r_a = in_value(r_in); r_in++; r_z = (r_a == 0); end
          OP_OUT: ref_out.push_back({b0[3:0], r_a});
          default: ;
        endcase
        pc = pc + 1;
      end else begin
        m = r_mem[{1'b0, 7'(pc[6:0] + 7'd1)}];
        addr = (b0[3:2] == AM_IND) ? dget(m) : m;
        val  = (b0[3:2] == AM_IMM) ? m : dget(addr);
        if (b0[3:2] == AM_BAD) begin
          pc = pc + 2;
        end else begin
          case (b0[7:4])
            OP_LOAD:  begin r_a = val; r_z = (r_a == 0); pc = pc + 2; end
            OP_STORE: begin if (b0[3:2] != AM_IMM) r_mem[{1'b1, addr[6:0]}] = r_a; pc = pc + 2; end
            OP_ADD:   begin sum = r_a + val; r_a = sum[7:0]; r_c = sum[8]; r_z = (r_a == 0); pc = pc + 2; end
            OP_AND:   begin r_a = r_a & val; r_z = (r_a == 0); pc = pc + 2; end
            OP_JUMP:  begin
              if (b0[3:2] == AM_ABS) begin
                r_jumps++;
                if (m == pc) begin r_steps--; r_jumps--; return 1; end
                pc = m;
              end else pc = pc + 2;
            end
            OP_JCOND: begin
              case (b0[1:0])
                JC_CS: cond = r_c;
                JC_CC: cond = !r_c;
                JC_ZS: cond = r_z;
                default: cond = !r_z;
              endcase
              if (b0[3:2] == AM_ABS && cond) pc = m; else pc = pc + 2;
            end
            default: pc = pc + 2;
          endcase
        end
      end
    end
    return 0;
  endfunction

  // ---------------- program generators ----------------
  // Directed: sum the bytes of a table through pointers, in a counted loop.
  function automatic void gen_directed();
    for (int i = 0; i < 256; i++) img[i] = 8'h80 + 8'(i % 5); // fill with NOP-ish ops
    for (int i = 0; i < 128; i++) img[i] = 8'hC0;            // program area: NOPs
    for (int i = 128; i < 256; i++) img[i] = 8'(i * 7);
    // data: 0xF0 loop counter, 0xA0.. pointers to 0xB0.., 0xE0 accumulator sum
    img[8'hF0] = 8'd6;
    for (int i = 0; i < 8; i++) begin img[8'(8'hA0 + i)] = 8'hB0 + 8'(i); img[8'(8'hB0 + i)] = 8'(i * 3 + 1); end
    img[8'hE0] = 8'h00;
    img[8'hE1] = 8'hA0;   // current pointer address (a pointer to a pointer slot)
    ap = 0;
    emit1(OP_IN, 4'h2);                       // 00 A <- IN(2)
    emit1(OP_OUT, 4'h1);                      // 01 OUT(1) <- A
    // loop:                                    02
    emit2(OP_LOAD, AM_ABS, 2'b00, 8'hE0);     // 02 A <- sum
    emit2(OP_ADD, AM_IND, 2'b00, 8'hE1);      // 04 A += mem[mem[E1]]   (indirect)
    emit2(OP_STORE, AM_ABS, 2'b00, 8'hE0);    // 06 sum <- A
    emit2(OP_LOAD, AM_ABS, 2'b00, 8'hE1);     // 08 advance pointer address
    emit2(OP_ADD, AM_IMM, 2'b00, 8'h01);      // 0A
    emit2(OP_STORE, AM_ABS, 2'b00, 8'hE1);    // 0C
    emit1(OP_RRC, 4'h0);                      // 0E
    emit2(OP_JCOND, AM_ABS, JC_CC, 8'h14);    // 0F forward, taken on even pointer
    emit1(OP_CPL, 4'h0);                      // 11
    emit1(OP_OUT, 4'h3);                      // 12
    emit1(4'hC, 4'h0);                        // 13 NOP (undefined opcode)
    emit2(OP_LOAD, AM_IND, 2'b00, 8'hE1);     // 14 A <- mem[mem[E1]]  (indirect)
    emit2(OP_STORE, AM_IND, 2'b00, 8'hE1);    // 16 mem[mem[E1]] <- A  (indirect store)
    emit2(OP_LOAD, AM_ABS, 2'b00, 8'hF0);     // 18 counter
    emit2(OP_ADD, AM_IMM, 2'b00, 8'hFF);      // 1A counter - 1
    emit2(OP_STORE, AM_ABS, 2'b00, 8'hF0);    // 1C
    emit2(OP_JCOND, AM_ABS, JC_ZC, 8'h02);    // 1E backward loop
    emit2(OP_LOAD, AM_ABS, 2'b00, 8'hE0);     // 20
    emit1(OP_OUT, 4'h0);                      // 22
    emit2(OP_JUMP, AM_ABS, 2'b00, 8'h27);     // 23 skip
    emit1(OP_CPL, 4'h0);                      // 25 skipped
    emit1(OP_CPL, 4'h0);                      // 26 skipped
    emit2(OP_STORE, AM_IMM, 2'b00, 8'hE5);    // 27 STORE immediate: NOP
    emit2(OP_LOAD, AM_BAD, 2'b00, 8'h00);     // 29 bad AM: NOP
    emit2(OP_JUMP, AM_ABS, 2'b00, 8'h2B);     // 2B halt
  endfunction

  // Random body with forward jumps, inside an outer counted loop.
  function automatic void gen_random(input int body_len);
    int tail, k, c;
    int starts [$];
    int jumps [$];
    logic [3:0] op;
    logic [1:0] am, jc;
    logic [7:0] m;
    for (int i = 0; i < 128; i++) img[i] = 8'hC0;
    for (int i = 128; i < 256; i++) img[i] = 8'($urandom);
    for (int i = 0; i < 16; i++) img[8'(8'h90 + i)] = 8'h80 + 8'($urandom_range(0, 15)); // pointers
    img[8'hFF] = 8'($urandom_range(2, 4));  // outer loop count
    tail = body_len;
    ap = 0;
    while (ap < body_len - 1) begin
      starts.push_back(ap);
      k = $urandom_range(0, 99);
      if (k < 40) begin
        // double-byte data instruction
        op = 4'($urandom_range(0, 3));
        am = 2'($urandom_range(0, 3));
        if ($urandom_range(0, 9) == 0) am = AM_BAD;
        if (op == OP_STORE) begin
          if (am == AM_ABS)      m = 8'h80 + 8'($urandom_range(0, 15));
          else if (am == AM_IND) m = 8'h90 + 8'($urandom_range(0, 15));
          else                   m = 8'($urandom);
        end else begin
          if (am == AM_IMM)      m = 8'($urandom);
          else if (am == AM_IND) m = 8'h90 + 8'($urandom_range(0, 15));
          else                   m = 8'h80 + 8'($urandom_range(0, 31));
        end
        emit2(op, am, 2'b00, m);
      end else if (k < 55) begin
        // conditional jump forward within the body
        jc = 2'($urandom);
        am = ($urandom_range(0, 9) == 0) ? 2'b00 : AM_ABS;
        jumps.push_back(ap);
        emit2(OP_JCOND, am, jc, 8'h00);
      end else if (k < 60) begin
        jumps.push_back(ap);
        emit2(OP_JUMP, AM_ABS, 2'b00, 8'h00);
      end else begin
        op = 4'($urandom_range(8, 15));
        emit1(op, 4'($urandom));
      end
    end
    while (ap < tail) begin starts.push_back(ap); emit1(4'hC, 4'h0); end
    starts.push_back(tail);
    // forward jump targets: the start of a later instruction, never an operand
    foreach (jumps[j]) begin
      do c = starts[$urandom_range(0, starts.size() - 1)]; while (c <= jumps[j]);
      img[jumps[j] + 1] = 8'(c);
    end
    // tail: counter decrement and backward loop, then halt
    emit2(OP_LOAD, AM_ABS, 2'b00, 8'hFF);
    emit2(OP_ADD, AM_IMM, 2'b00, 8'hFF);
    emit2(OP_STORE, AM_ABS, 2'b00, 8'hFF);
    emit2(OP_JCOND, AM_ABS, JC_ZC, 8'h00);
    emit2(OP_JUMP, AM_ABS, 2'b00, 8'(ap));
  endfunction

  // ---------------- run one program on DUT and model ----------------
  task automatic run_program(input string name);
    bit halted;
    int quiet, start, ret0;
    for (int i = 0; i < 256; i++) r_mem[i] = img[i];
    halted = ref_run(20000);
    check(halted, {name, ": reference model halts"});
    // load
    rst = 1;
    @(negedge clk);
    for (int i = 0; i < 256; i++) begin
      load_we = 1; load_addr = 8'(i); load_wdata = img[i];
      @(negedge clk);
    end
    load_we = 0;
    dut_out.delete();
    in_cnt = 0;
    ret0 = n_retire;
    @(negedge clk);
    rst = 0;
    start = cyc;
    quiet = 0;
    while (quiet < 40 && cyc - start < 60000) begin
      @(negedge clk);
      if (stat_retire) quiet = 0; else quiet++;
    end
    check(quiet >= 40, {name, ": processor halts"});
    check(acc == r_a, $sformatf("%s: A dut=%02h ref=%02h", name, acc, r_a));
    check(flag_c == r_c, $sformatf("%s: C dut=%0d ref=%0d", name, flag_c, r_c));
    check(flag_z == r_z, $sformatf("%s: Z dut=%0d ref=%0d", name, flag_z, r_z));
    for (int i = 128; i < 256; i++) begin
      dbg_addr = 8'(i);
      #1;
      check(dbg_rdata == r_mem[i], $sformatf("%s: mem[%02h] dut=%02h ref=%02h", name, i, dbg_rdata, r_mem[i]));
    end
    check(in_cnt == r_in, $sformatf("%s: input reads dut=%0d ref=%0d", name, in_cnt, r_in));
    check(dut_out.size() == ref_out.size(), $sformatf("%s: output writes dut=%0d ref=%0d", name, dut_out.size(), ref_out.size()));
    for (int i = 0; i < dut_out.size() && i < ref_out.size(); i++)
      check(dut_out[i] == ref_out[i], $sformatf("%s: OUT #%0d dut=%03h ref=%03h", name, i, dut_out[i], ref_out[i]));
    // every instruction the model executed, except unconditional jumps,
    // retired exactly once
    check(n_retire - ret0 == r_steps - r_jumps,
          $sformatf("%s: retired %0d, expected %0d", name, n_retire - ret0, r_steps - r_jumps));
    @(negedge clk);
    rst = 1;
  endtask

  // Straight-line timing: single-byte instructions back to back retire one per
  // cycle once the pipeline is full.
  task automatic run_rate();
    int r0;
    for (int i = 0; i < 128; i++) img[i] = {OP_CPL, 4'h0};
    for (int i = 128; i < 256; i++) img[i] = 8'h00;
    ap = 100;
    emit2(OP_JUMP, AM_ABS, 2'b00, 8'd100);
    for (int i = 0; i < 256; i++) r_mem[i] = img[i];
    run_program("rate");
    // rerun and measure retire rate in the middle of the stream
    rst = 1;
    repeat (2) @(negedge clk);
    rst = 0;
    r0 = 0;
    repeat (10) @(negedge clk);
    for (int i = 0; i < 50; i++) begin
      @(negedge clk);
      r0 += int'(stat_retire);
    end
    check(r0 == 50, $sformatf("rate: %0d retired in 50 cycles", r0));
    @(negedge clk);
    rst = 1;
  endtask

  initial begin
    n_retire = 0; n_mis = 0; n_static = 0; n_btb = 0; n_jump = 0; n_ind = 0;
    n_stall = 0; n_in = 0; n_out = 0; n_burst = 0;
    repeat (3) @(negedge clk);
    gen_directed();
    run_program("directed");
    run_rate();
    for (int p = 0; p < NPROG; p++) begin
      gen_random($urandom_range(40, 110));
      run_program($sformatf("random%0d", p));
    end
    $display("events: retired=%0d burst=%0d static=%0d btb=%0d mispredict=%0d jump=%0d indirect=%0d fd_stall=%0d in=%0d out=%0d",
             n_retire, n_burst, n_static, n_btb, n_mis, n_jump, n_ind, n_stall, n_in, n_out);
    check(n_burst  > 0, "two-byte hand-over never happened");
    check(n_static > 0, "static prediction never happened");
    check(n_btb    > 0, "BTB prediction never happened");
    check(n_mis    > 0, "misprediction never happened");
    check(n_jump   > 0, "unconditional jump never happened");
    check(n_ind    > 0, "indirect extra cycle never happened");
    check(n_stall  > 0, "hand-over stall never happened");
    check(n_in     > 0, "input port never read");
    check(n_out    > 0, "output port never written");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
