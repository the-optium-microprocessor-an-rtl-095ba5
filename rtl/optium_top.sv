// optium_top - the Optium 8-bit pipelined microprocessor.
//
// Three units, wired as in the processor's block diagram: the memory unit
// (program half and data half), the fetch/decode unit with its program
// counter and branch target buffer, and the execution unit with the IN and
// OUT ports. Fetch/decode reads only the program half and execution reads and
// writes only the data half, so the two pipeline stages never contend for
// memory. Conditional jumps are predicted in fetch/decode and checked in
// execution, which corrects the BTB and redirects fetch on a misprediction.
//
// Use: hold rst high, write the program (addresses 0x00-0x7F) and its data
// (0x80-0xFF) through the load port, release rst; execution starts at address
// 0. A JUMP to its own address halts the processor (fetch spins on it, nothing
// reaches execution). The load and debug ports and the stat_* event pulses
// are this design's additions for loading and observing the processor.
module optium_top
  import optium_pkg::*;
#(
  parameter int unsigned AW          = 7,   // 128-byte program and data halves
  parameter int unsigned BTB_ENTRIES = 4
) (
  input  logic       clk,
  input  logic       rst,
  // memory load and inspection
  input  logic       load_we,
  input  logic [AW:0] load_addr,
  input  logic [7:0] load_wdata,
  input  logic [AW:0] dbg_addr,
  output logic [7:0] dbg_rdata,
  // I/O ports
  input  logic [7:0] in_port,
  output logic       in_rd,
  output logic [3:0] in_n,
  output logic [7:0] out_port,
  output logic       out_wr,
  output logic [3:0] out_n,
  // observation
  output logic [7:0] acc,
  output logic       flag_c,
  output logic       flag_z,
  output logic       stat_retire,
  output logic       stat_burst,
  output logic       stat_mispredict,
  output logic       stat_static_pred,
  output logic       stat_btb_pred,
  output logic       stat_jump,
  output logic       stat_indirect,
  output logic       stat_fd_stall
);

  logic [AW-1:0] prog_addr, data_addr;
  logic [7:0]    prog_rdata, data_rdata, data_wdata;
  logic          data_we;

  memory_unit #(.AW(AW)) u_mem (
    .clk,
    .prog_addr, .prog_rdata,
    .data_addr, .data_we, .data_wdata, .data_rdata,
    .load_we, .load_addr, .load_wdata,
    .dbg_addr, .dbg_rdata
  );

  logic [7:0] btb_lookup_pc, btb_upd_pc, redirect_pc;
  logic       btb_hit, btb_taken, btb_alloc_we, btb_alloc_taken;
  logic       btb_upd_we, btb_upd_taken, redirect;

  btb #(.ENTRIES(BTB_ENTRIES)) u_btb (
    .clk, .rst,
    .lookup_pc    (btb_lookup_pc),
    .lookup_hit   (btb_hit),
    .lookup_taken (btb_taken),
    .alloc_we     (btb_alloc_we),
    .alloc_taken  (btb_alloc_taken),
    .upd_we       (btb_upd_we),
    .upd_pc       (btb_upd_pc),
    .upd_taken    (btb_upd_taken)
  );

  fd_instr_t fd_out;
  logic      fd_ack;

  fetch_decode_unit #(.AW(AW)) u_fdu (
    .clk, .rst,
    .prog_addr, .prog_rdata,
    .btb_lookup_pc, .btb_hit, .btb_taken, .btb_alloc_we, .btb_alloc_taken,
    .out            (fd_out),
    .out_ack        (fd_ack),
    .redirect, .redirect_pc,
    .ev_static_pred (stat_static_pred),
    .ev_btb_pred    (stat_btb_pred),
    .ev_jump        (stat_jump)
  );

  execution_unit #(.AW(AW)) u_eu (
    .clk, .rst,
    .in_instr   (fd_out),
    .in_ack     (fd_ack),
    .redirect, .redirect_pc,
    .btb_upd_we, .btb_upd_pc, .btb_upd_taken,
    .data_addr, .data_we, .data_wdata, .data_rdata,
    .in_port, .in_rd, .in_n, .out_port, .out_wr, .out_n,
    .acc, .flag_c, .flag_z,
    .retire     (stat_retire),
    .busy_stall (stat_indirect)
  );

  assign stat_mispredict = redirect;
  assign stat_fd_stall   = fd_out.valid && !fd_ack;
  assign stat_burst      = fd_ack && !fd_out.b0[7];

endmodule
