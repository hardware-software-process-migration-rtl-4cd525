// rtr_sim_top: migration co-processor of a parallel cycle-based RTL simulator.
//
// The simulator runs each RTL process of a design under test as a small
// program in a common instruction set. A process can run in software on the
// host processor or, after migration, on one of N_RM Real Machines (RMs) in
// this peripheral; the busiest processes are kept in hardware, much as a cache
// keeps the most used data. This top joins the RM array (rm_array) to the
// host's On-chip Peripheral Bus through its slave (opb_rm_slave).
//
// Use, per simulation cycle: the host writes the inputs of RMs that use
// software connectivity, writes CTRL to start the simcycle, polls CTRL (or
// watches simcycle_done) until every active RM has run its process to HALT,
// and reads the outputs. Migration copies a process's program memory, data
// memory and registers through the state window between simcycles. See
// rm_array for the register map; addresses are C_BASEADDR plus the offset.
//
// Timing: every OPB access is acknowledged in the cycle after it is
// selected. Each RM takes two clock cycles per instruction. Reset (rst) is
// synchronous and active high. The host processor, the bus itself, the
// memory controller and the FPGA configuration port are outside this RTL.
module rtr_sim_top #(
  parameter int unsigned N_RM       = 35,
  parameter logic [31:0] C_BASEADDR = 32'h7000_0000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        OPB_select,
  input  logic        OPB_RNW,
  input  logic [31:0] OPB_ABus,
  input  logic [31:0] OPB_DBus,
  output logic [31:0] Sl_DBus,
  output logic        Sl_xferAck,
  output logic        Sl_errAck,
  output logic        Sl_retry,
  output logic        Sl_toutSup,
  output logic        running,
  output logic        simcycle_done
);

  logic        reg_we;
  logic [19:0] reg_addr;
  logic [31:0] reg_wdata, reg_rdata;

  opb_rm_slave #(.C_BASEADDR(C_BASEADDR), .C_ADDR_BITS(20)) u_opb (
    .clk        (clk),
    .rst        (rst),
    .OPB_select (OPB_select),
    .OPB_RNW    (OPB_RNW),
    .OPB_ABus   (OPB_ABus),
    .OPB_DBus   (OPB_DBus),
    .Sl_DBus    (Sl_DBus),
    .Sl_xferAck (Sl_xferAck),
    .Sl_errAck  (Sl_errAck),
    .Sl_retry   (Sl_retry),
    .Sl_toutSup (Sl_toutSup),
    .reg_we     (reg_we),
    .reg_addr   (reg_addr),
    .reg_wdata  (reg_wdata),
    .reg_rdata  (reg_rdata)
  );

  rm_array #(.N_RM(N_RM)) u_array (
    .clk           (clk),
    .rst           (rst),
    .reg_we        (reg_we),
    .reg_addr      (reg_addr),
    .reg_wdata     (reg_wdata),
    .reg_rdata     (reg_rdata),
    .running       (running),
    .simcycle_done (simcycle_done)
  );

endmodule
