// memory_unit - the Optium's 256-byte on-chip memory.
//
// The memory is two independent 128-byte arrays. The lower half (addresses
// 0x00-0x7F) is the program memory, read by the fetch/decode unit; the upper
// half (0x80-0xFF) is the data memory, read and written by the execution unit.
// Because each unit only ever reaches its own half, the top address bit is
// ignored by the units' ports: a jump cannot land in data, and a store cannot
// overwrite code. Giving each half its own port is what lets fetch and
// execution work at the same time.
//
// Timing: reads are combinational (address in, byte out in the same cycle),
// writes happen at the rising clock edge. This matches the distributed RAM of
// small FPGAs and lets an absolute operand be read and used in one cycle.
//
// The load port (full 8-bit address, bit 7 selects the half) and the debug
// read port are this design's own additions, used to place a program and its
// data before reset is released and to inspect memory afterwards. The document
// only says that memory images are loaded onto the processor.
module memory_unit #(
  parameter int unsigned AW         = 7,         // address bits per half
  parameter int unsigned HALF_BYTES = 1 << AW    // 128 bytes per half
) (
  input  logic          clk,
  // program half, read by fetch/decode
  input  logic [AW-1:0] prog_addr,
  output logic [7:0]    prog_rdata,
  // data half, read/written by execution
  input  logic [AW-1:0] data_addr,
  input  logic          data_we,
  input  logic [7:0]    data_wdata,
  output logic [7:0]    data_rdata,
  // external load and inspection
  input  logic          load_we,
  input  logic [AW:0]   load_addr,
  input  logic [7:0]    load_wdata,
  input  logic [AW:0]   dbg_addr,
  output logic [7:0]    dbg_rdata
);

  logic [7:0] prog_mem [HALF_BYTES];
  logic [7:0] data_mem [HALF_BYTES];

  assign prog_rdata = prog_mem[prog_addr];
  assign data_rdata = data_mem[data_addr];
  assign dbg_rdata  = dbg_addr[AW] ? data_mem[dbg_addr[AW-1:0]]
                                   : prog_mem[dbg_addr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (load_we && !load_addr[AW]) prog_mem[load_addr[AW-1:0]] <= load_wdata;
  end

  // The execution unit's write wins over the load port if both hit at once.
  always_ff @(posedge clk) begin
    if (data_we)
      data_mem[data_addr] <= data_wdata;
    else if (load_we && load_addr[AW])
      data_mem[load_addr[AW-1:0]] <= load_wdata;
  end

endmodule
