// rm_lutram: distributed (LUT) RAM of the Real Machine.
//
// The RM keeps all of its state in LUT RAM rather than flip-flops, because
// LUT RAM contents can be replaced one RM at a time when a process migrates.
// This block is used three times per RM: as the 32x16 program memory, the
// 32x16 data memory and the 8x16 register file store.
//
// Interface and timing: one synchronous write port (written on the rising
// clock edge when we is high) and two asynchronous read ports, as a
// dual-port distributed RAM provides. Reads of the address being written
// return the old word until the clock edge. There is no reset; the contents
// are state that is written before use. The sizes follow the description;
// the second read port is this design's choice (it serves migration readback).
module rm_lutram #(
  parameter int unsigned DEPTH = 32,
  parameter int unsigned WIDTH = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr0,
  output logic [WIDTH-1:0] rdata0,
  input  logic [AW-1:0]    raddr1,
  output logic [WIDTH-1:0] rdata1
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata0 = mem[raddr0];
  assign rdata1 = mem[raddr1];

endmodule
