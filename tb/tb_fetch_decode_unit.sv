// tb_fetch_decode_unit - checks the fetch/decode unit with a behavioural
// program memory, the BTB, and a consumer that stands in for the execution
// unit (random acceptance, random mispredictions with redirect and BTB
// correction). The delivered stream is compared with an expected stream worked
// out from the program: unconditional jumps are followed and never delivered,
// two-byte instructions arrive whole, conditional jumps carry the static
// prediction (backward = taken) on first sight and the BTB's bit afterwards,
// and after a redirect delivery resumes at the redirect address. Delivery rate
// is checked too: one single-byte instruction per cycle, one two-byte
// instruction per two cycles.
module tb_fetch_decode_unit;
  import optium_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [6:0] prog_addr;
  logic [7:0] prog_rdata;
  logic [7:0] btb_lookup_pc, redirect_pc = 0;
  logic btb_hit, btb_taken, btb_alloc_we, btb_alloc_taken;
  logic upd_we = 0, upd_taken = 0;
  logic [7:0] upd_pc = 0;
  fd_instr_t out;
  logic out_ack, redirect = 0;
  logic ev_static_pred, ev_btb_pred, ev_jump;
  logic [7:0] pmem [128];

  assign prog_rdata = pmem[prog_addr];

  fetch_decode_unit dut (.*);
  btb u_btb (.clk, .rst, .lookup_pc(btb_lookup_pc), .lookup_hit(btb_hit), .lookup_taken(btb_taken),
             .alloc_we(btb_alloc_we), .alloc_taken(btb_alloc_taken),
             .upd_we(upd_we), .upd_pc(upd_pc), .upd_taken(upd_taken));

  int checks = 0, failures = 0;
  int n_static = 0, n_btb = 0, n_jump = 0, n_redirect = 0, n_double = 0;
  always @(posedge clk) if (!rst) begin
    n_static += int'(ev_static_pred);
    n_btb    += int'(ev_btb_pred);
    n_jump   += int'(ev_jump);
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  // expected-stream model
  logic [7:0] exp_pc;
  bit         pv [256];
  bit         pt [256];

  // advance exp_pc past unconditional jumps; return expected instruction
  function automatic fd_instr_t next_expected();
    fd_instr_t e;
    logic [7:0] b0, b1;
    bit p;
    for (int guard = 0; guard < 100; guard++) begin
      b0 = pmem[exp_pc[6:0]];
      b1 = pmem[7'(exp_pc[6:0] + 1)];
      if (!b0[7] && b0[7:4] == OP_JUMP && b0[3:2] == AM_ABS) exp_pc = b1;
      else break;
    end
    e = '0;
    e.valid = 1; e.b0 = b0; e.jpc = exp_pc;
    if (b0[7]) begin
      exp_pc = exp_pc + 1;
    end else begin
      e.b1 = b1;
      if (b0[7:4] == OP_JCOND && b0[3:2] == AM_ABS) begin
        p = pv[exp_pc] ? pt[exp_pc] : (b1 < exp_pc);
        pv[exp_pc] = 1; pt[exp_pc] = p;
        e.pred = p;
        e.alt_pc = p ? exp_pc + 2 : b1;
        exp_pc = p ? b1 : exp_pc + 2;
      end else begin
        exp_pc = exp_pc + 2;
      end
    end
    return e;
  endfunction

  // random program: instruction starts recorded, <= 4 conditional jumps,
  // unconditional jumps forward only, last instruction jumps back to 0
  function automatic void gen_program();
    int starts [$];
    int fixups [$];
    int a, njc, t;
    a = 0; njc = 0;
    for (int i = 0; i < 128; i++) pmem[i] = 8'hC0;
    while (a < 120) begin
      int k;
      starts.push_back(a);
      k = $urandom_range(0, 99);
      if (k < 45) begin
        pmem[a] = 8'h80 | 8'($urandom);
        a += 1;
      end else if (k < 85 || njc >= 4) begin
        pmem[a] = {4'($urandom_range(0, 3)), 4'($urandom)};
        pmem[a + 1] = 8'($urandom);
        a += 2;
      end else if (k < 95) begin
        pmem[a] = {OP_JCOND, AM_ABS, 2'($urandom)};
        fixups.push_back(a);
        njc++;
        a += 2;
      end else begin
        pmem[a] = {OP_JUMP, AM_ABS, 2'b00};
        fixups.push_back(a);
        a += 2;
      end
    end
    pmem[a] = {OP_JUMP, AM_ABS, 2'b00};
    pmem[a + 1] = 8'h00;
    starts.push_back(a);
    foreach (fixups[i]) begin
      if (pmem[fixups[i]][7:4] == OP_JUMP)
        do t = starts[$urandom_range(0, starts.size() - 1)]; while (t <= fixups[i]);
      else
        do t = starts[$urandom_range(0, starts.size() - 1)]; while (t == fixups[i]);
      pmem[fixups[i] + 1] = 8'(t);
    end
  endfunction

  bit ack_rand;
  assign out_ack = out.valid && ack_rand && !redirect;

  task automatic reset_all();
    rst = 1;
    for (int i = 0; i < 256; i++) begin pv[i] = 0; pt[i] = 0; end
    exp_pc = 0;
    repeat (2) @(negedge clk);
    rst = 0;
  endtask

  task automatic run_stream(input int deliveries, input int ack_pct, input int mis_pct);
    fd_instr_t e;
    int got;
    bit do_redirect;
    got = 0;
    do_redirect = 0;
    while (got < deliveries) begin
      @(negedge clk);
      redirect = 0; upd_we = 0;
      if (do_redirect) begin
        redirect = 1; upd_we = 1;
        do_redirect = 0;
      end
      ack_rand = ($urandom_range(0, 99) < ack_pct);
      #1;
      if (out_ack) begin
        e = next_expected();
        chk(out == e, $sformatf("delivery %0d: got %02h %02h p%0d j%02h a%02h exp %02h %02h p%0d j%02h a%02h",
            got, out.b0, out.b1, out.pred, out.jpc, out.alt_pc, e.b0, e.b1, e.pred, e.jpc, e.alt_pc));
        if (!e.b0[7]) n_double++;
        got++;
        if (e.b0[7:4] == OP_JCOND && e.b0[3:2] == AM_ABS && $urandom_range(0, 99) < mis_pct) begin
          do_redirect = 1;
          redirect_pc = e.alt_pc;
          upd_pc = e.jpc; upd_taken = !e.pred;
          pt[e.jpc] = !e.pred;
          exp_pc = e.alt_pc;
          n_redirect++;
        end
      end
    end
    @(negedge clk);
    redirect = 0; upd_we = 0; ack_rand = 0;
  endtask

  task automatic rate(input bit single, input int expect_n);
    int n;
    for (int i = 0; i < 128; i++) pmem[i] = single ? 8'h80 : 8'h00;
    reset_all();
    ack_rand = 1;
    repeat (6) @(negedge clk);
    n = 0;
    repeat (40) begin
      @(negedge clk);
      n += int'(out_ack);
    end
    chk(n == expect_n, $sformatf("rate single=%0d: %0d in 40 cycles", single, n));
    ack_rand = 0;
  endtask

  initial begin
    ack_rand = 0;
    for (int p = 0; p < 30; p++) begin
      gen_program();
      reset_all();
      run_stream(400, (p % 3 == 0) ? 100 : 60, 40);
    end
    rate(1, 40);
    rate(0, 20);
    $display("events: static=%0d btb=%0d jump=%0d redirect=%0d double=%0d", n_static, n_btb, n_jump, n_redirect, n_double);
    chk(n_static > 0 && n_btb > 0 && n_jump > 0 && n_redirect > 0 && n_double > 0, "all mechanisms exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
