// amu - addressing mode unit of the Optium execution unit.
//
// From the AM bits of the first instruction byte and the operand byte m it
// produces the ALU's memory operand and drives the data memory port:
//   immediate (00): operand = m, no memory access
//   absolute  (01): address = m, operand = mem[m]       one cycle
//   indirect  (11): cycle 1 reads mem[m] into the pointer register,
//                   cycle 2 uses address = pointer, operand = mem[pointer]
// A STORE writes the accumulator at the same address a read would use. The
// data memory reads combinationally, so the operand is ready in the cycle the
// address is driven. Every data address drops its top bit (the data memory is
// its own 128-byte space), including a pointer read from memory. The pointer
// register is this design's way of spending the one extra indirect cycle the
// document describes. data_we and data_wdata are the control unit's store
// command and the accumulator passed straight to the memory port.
module amu
  import optium_pkg::*;
#(
  parameter int unsigned AW = 7
) (
  input  logic          clk,
  input  logic [1:0]    am,
  input  logic [7:0]    m,
  input  logic          second_cycle,  // second cycle of an indirect access
  input  logic          ptr_load,      // capture mem[m] as pointer
  input  logic          mem_write,     // STORE
  input  logic [7:0]    acc,
  output logic [AW-1:0] data_addr,
  output logic          data_we,
  output logic [7:0]    data_wdata,
  input  logic [7:0]    data_rdata,
  output logic [7:0]    operand
);

  logic [7:0] ptr;

  always_ff @(posedge clk) begin
    if (ptr_load) ptr <= data_rdata;
  end

  always_comb begin
    data_addr = (am == AM_IND && second_cycle) ? ptr[AW-1:0] : m[AW-1:0];
    operand   = (am == AM_IMM) ? m : data_rdata;
  end

  assign data_we    = mem_write;
  assign data_wdata = acc;

endmodule
