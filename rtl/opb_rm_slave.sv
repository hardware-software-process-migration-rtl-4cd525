// opb_rm_slave: On-chip Peripheral Bus (OPB) slave of the RM array.
//
// The simulator software reaches the RMs' slave registers over the OPB. This
// slave claims the address window C_BASEADDR .. C_BASEADDR + 2**C_ADDR_BITS - 1
// and turns each OPB transfer into one register access of the RM array:
//
//   cycle 1  OPB_select is high with an address in the window and no
//            acknowledge pending: a write drives reg_we for this one cycle;
//            a read captures reg_rdata (reads have no side effects).
//   cycle 2  Sl_xferAck is high; on a read Sl_DBus carries the captured word.
//
// Sl_DBus is zero whenever the slave does not acknowledge, so it can be
// OR-ed onto the bus. Byte enables are not used (all accesses are 32-bit
// words); error, retry and timeout-suppress are never raised. The bus
// signal names and the two-cycle access follow the usual OPB slave
// conventions; the address window and its size are this design's choice.
// Reset is synchronous.
module opb_rm_slave #(
  parameter logic [31:0] C_BASEADDR  = 32'h7000_0000,
  parameter int unsigned C_ADDR_BITS = 20
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   OPB_select,
  input  logic                   OPB_RNW,
  input  logic [31:0]            OPB_ABus,
  input  logic [31:0]            OPB_DBus,
  output logic [31:0]            Sl_DBus,
  output logic                   Sl_xferAck,
  output logic                   Sl_errAck,
  output logic                   Sl_retry,
  output logic                   Sl_toutSup,
  output logic                   reg_we,
  output logic [C_ADDR_BITS-1:0] reg_addr,
  output logic [31:0]            reg_wdata,
  input  logic [31:0]            reg_rdata
);

  logic        hit, access;
  logic        ack_q;
  logic [31:0] rdata_q;

  assign hit    = OPB_ABus[31:C_ADDR_BITS] == C_BASEADDR[31:C_ADDR_BITS];
  assign access = OPB_select && hit && !ack_q;

  assign reg_we    = access && !OPB_RNW;
  assign reg_addr  = OPB_ABus[C_ADDR_BITS-1:0];
  assign reg_wdata = OPB_DBus;

  always_ff @(posedge clk) begin
    if (rst) begin
      ack_q   <= 1'b0;
      rdata_q <= '0;
    end else begin
      ack_q   <= access;
      rdata_q <= (access && OPB_RNW) ? reg_rdata : '0;
    end
  end

  assign Sl_xferAck = ack_q;
  assign Sl_DBus    = ack_q ? rdata_q : '0;
  assign Sl_errAck  = 1'b0;
  assign Sl_retry   = 1'b0;
  assign Sl_toutSup = 1'b0;

  // The acknowledge may only answer a transfer that is still selected.
  a_ack_sel: assert property (@(posedge clk) disable iff (rst) Sl_xferAck |-> OPB_select)
    else $error("opb_rm_slave: acknowledge without select");

endmodule
