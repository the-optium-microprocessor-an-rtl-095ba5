// tb_optium_encoder - the processor used as a data encoder and decoder.
//
// An encoder program reads NBYTES bytes from the input port, encodes each one
// as ~(x + key), writes the code to the output port and stores it in a buffer
// in data memory through an indirect pointer. Then only the program half is
// reloaded with a decoder, which reads the buffer back through a pointer,
// undoes the encoding (complement, then add -key) and writes the plain bytes
// to the output port. The testbench checks every encoded and decoded byte, the
// buffer contents, and the branch behaviour of each counted loop: one static
// prediction (backward, taken), BTB predictions on every later pass, and a
// single misprediction at the loop exit. It also reports the clocks per loop
// pass.
module tb_optium_encoder;
  import optium_pkg::*;

  localparam int NBYTES = 100;
  localparam logic [7:0] KEY = 8'h3B;

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
  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // plain text source
  int in_cnt = 0;
  function automatic logic [7:0] plain(input int k);
    return 8'(k * 53 + 7);
  endfunction
  assign in_port = plain(in_cnt);
  always @(posedge clk) if (!rst && in_rd) in_cnt <= in_cnt + 1;

  logic [7:0] outs [$];
  always @(posedge clk) if (!rst && out_wr) outs.push_back(out_port);

  int n_mis, n_static, n_btb, n_cyc;
  always @(posedge clk) if (!rst) begin
    n_mis    += int'(stat_mispredict);
    n_static += int'(stat_static_pred);
    n_btb    += int'(stat_btb_pred);
    n_cyc++;
  end

  logic [7:0] img [256];
  int ap;
  function automatic void e1(input logic [3:0] op, input logic [3:0] n);
    img[ap] = {op, n}; ap++;
  endfunction
  function automatic void e2(input logic [3:0] op, input logic [1:0] am, input logic [1:0] jc, input logic [7:0] m);
    img[ap] = {op, am, jc}; img[ap + 1] = m; ap += 2;
  endfunction

  // data layout: 0x80 key, 0x81 count, 0x82 buffer pointer, buffer 0x90..
  function automatic void data_init();
    for (int i = 128; i < 256; i++) img[i] = 8'h00;
    img[8'h80] = KEY;
    img[8'h81] = 8'(NBYTES);
    img[8'h82] = 8'h90;
  endfunction

  function automatic void encoder();
    for (int i = 0; i < 128; i++) img[i] = 8'hC0;
    ap = 0;
    e1(OP_IN, 4'h0);                        // 00 A <- IN
    e2(OP_ADD, AM_ABS, 2'b00, 8'h80);       // 01 A += key
    e1(OP_CPL, 4'h0);                       // 03 A <- ~A
    e2(OP_STORE, AM_IND, 2'b00, 8'h82);     // 04 buf[ptr] <- A
    e1(OP_OUT, 4'h1);                       // 06 OUT
    e2(OP_LOAD, AM_ABS, 2'b00, 8'h82);      // 07 ptr++
    e2(OP_ADD, AM_IMM, 2'b00, 8'h01);       // 09
    e2(OP_STORE, AM_ABS, 2'b00, 8'h82);     // 0B
    e2(OP_LOAD, AM_ABS, 2'b00, 8'h81);      // 0D count--
    e2(OP_ADD, AM_IMM, 2'b00, 8'hFF);       // 0F
    e2(OP_STORE, AM_ABS, 2'b00, 8'h81);     // 11
    e2(OP_JCOND, AM_ABS, JC_ZC, 8'h00);     // 13 loop
    e2(OP_JUMP, AM_ABS, 2'b00, 8'h15);      // 15 halt
  endfunction

  function automatic void decoder();
    for (int i = 0; i < 128; i++) img[i] = 8'hC0;
    ap = 0;
    e2(OP_LOAD, AM_IND, 2'b00, 8'h82);      // 00 A <- buf[ptr]
    e1(OP_CPL, 4'h0);                       // 02
    e2(OP_ADD, AM_IMM, 2'b00, 8'(-KEY));    // 03 A -= key
    e1(OP_OUT, 4'h2);                       // 05 OUT
    e2(OP_LOAD, AM_ABS, 2'b00, 8'h82);      // 06 ptr++
    e2(OP_ADD, AM_IMM, 2'b00, 8'h01);       // 08
    e2(OP_STORE, AM_ABS, 2'b00, 8'h82);     // 0A
    e2(OP_LOAD, AM_ABS, 2'b00, 8'h81);      // 0C count--
    e2(OP_ADD, AM_IMM, 2'b00, 8'hFF);       // 0E
    e2(OP_STORE, AM_ABS, 2'b00, 8'h81);     // 10
    e2(OP_JCOND, AM_ABS, JC_ZC, 8'h00);     // 12 loop
    e2(OP_JUMP, AM_ABS, 2'b00, 8'h14);      // 14 halt
  endfunction

  task automatic load(input int lo, input int hi);
    rst = 1;
    @(negedge clk);
    for (int i = lo; i <= hi; i++) begin
      load_we = 1; load_addr = 8'(i); load_wdata = img[i];
      @(negedge clk);
    end
    load_we = 0;
  endtask

  task automatic run(input string name);
    int quiet;
    outs.delete();
    n_mis = 0; n_static = 0; n_btb = 0; n_cyc = 0;
    @(negedge clk);
    rst = 0;
    quiet = 0;
    while (quiet < 40) begin
      @(negedge clk);
      if (stat_retire) quiet = 0; else quiet++;
    end
    n_cyc -= 40;
    $display("%s: %0d bytes in %0d clocks, %0d.%02d clocks per byte", name, NBYTES, n_cyc,
             n_cyc / NBYTES, (n_cyc * 100 / NBYTES) % 100);
    chk(n_static == 1, $sformatf("%s: static predictions %0d", name, n_static));
    chk(n_btb == NBYTES - 1, $sformatf("%s: BTB predictions %0d", name, n_btb));
    chk(n_mis == 1, $sformatf("%s: mispredictions %0d", name, n_mis));
    chk(outs.size() == NBYTES, $sformatf("%s: %0d output bytes", name, outs.size()));
  endtask

  initial begin
    logic [7:0] code;
    repeat (2) @(negedge clk);
    data_init();
    encoder();
    load(0, 255);
    run("encoder");
    for (int k = 0; k < NBYTES && k < outs.size(); k++) begin
      code = ~(plain(k) + KEY);
      chk(outs[k] == code, $sformatf("encoded %0d: %02h expected %02h", k, outs[k], code));
      dbg_addr = 8'(8'h90 + k);
      #1;
      chk(dbg_rdata == code, $sformatf("buffer %0d", k));
    end
    chk(in_cnt == NBYTES, "input bytes read");
    // new algorithm: reload the program half and reset the counters only
    decoder();
    load(0, 127);
    img[8'h81] = 8'(NBYTES); img[8'h82] = 8'h90;
    load(8'h81, 8'h82);
    run("decoder");
    for (int k = 0; k < NBYTES && k < outs.size(); k++)
      chk(outs[k] == plain(k), $sformatf("decoded %0d: %02h expected %02h", k, outs[k], plain(k)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
