// rm_regfile: register file of the Real Machine.
//
// Eight 16-bit registers held in distributed RAM (rm_lutram), some of them
// aliased to the RM's inputs and output as the description states. In this
// design r6 and r7 read the two inputs in0 and in1, and r5 is the output:
// every write to r5 also loads a flip-flop copy that drives the out port, so
// nothing outside the RM needs a read port of the RAM. Writes to r6/r7 still
// land in the RAM (their values migrate) but reads return the inputs.
//
// Timing: reads are combinational (rdata follows raddr in the same cycle);
// writes and the out copy take effect on the rising edge. The second RAM read
// port (mraddr/mrdata) returns the raw stored word for migration readback.
// rst clears only the out copy; the RAM itself has no reset.
module rm_regfile
  import rm_pkg::*;
#(
  parameter int unsigned WORD_W = WORD,
  parameter int unsigned NREG   = NREGS,
  localparam int unsigned AW    = $clog2(NREG)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [AW-1:0]     raddr,
  output logic [WORD_W-1:0] rdata,
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  logic [WORD_W-1:0] wdata,
  input  logic [AW-1:0]     mraddr,
  output logic [WORD_W-1:0] mrdata,
  input  logic [WORD_W-1:0] in0,
  input  logic [WORD_W-1:0] in1,
  output logic [WORD_W-1:0] out
);

  logic [WORD_W-1:0] ram_rdata;

  rm_lutram #(.DEPTH(NREG), .WIDTH(WORD_W)) u_ram (
    .clk    (clk),
    .we     (we),
    .waddr  (waddr),
    .wdata  (wdata),
    .raddr0 (raddr),
    .rdata0 (ram_rdata),
    .raddr1 (mraddr),
    .rdata1 (mrdata)
  );

  always_comb begin
    unique case (raddr)
      AW'(REG_IN0): rdata = in0;
      AW'(REG_IN1): rdata = in1;
      default:      rdata = ram_rdata;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst)                              out <= '0;
    else if (we && waddr == AW'(REG_OUT)) out <= wdata;
  end

endmodule
