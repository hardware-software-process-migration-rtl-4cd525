// rm_core: one Real Machine (RM).
//
// An RM runs a single simulation process, compiled to the Common Instruction
// Set, once per simulation cycle (simcycle). It is built, as in the block
// diagram of the description, from an execution unit, a program memory, a
// data memory and a register file whose registers double as the process's
// inputs and output. Program and data memories are 32x16 distributed RAMs;
// the register file is 8x16 distributed RAM.
//
// Migration: a process moves between software and this RM by copying its
// program memory, data memory and register file. Because an invocation always
// starts at PC 0 and ends at HALT, those three memories are the whole state of
// the process between simcycles. This RM exposes them through the mig_* port:
// mig_sel picks the memory (rm_pkg::mig_sel_e), mig_addr the word; reads are
// combinational, writes take effect on the clock edge and are ignored while
// the RM is busy. (The description performs this copy through the FPGA's
// configuration port; a direct port is this design's stand-in for it.)
//
// Timing: see rm_exec_unit; done pulses 2*N cycles after start for an
// invocation of N instructions.
module rm_core
  import rm_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  logic            start,
  output logic            busy,
  output logic            done,
  input  logic [WORD-1:0] in0,
  input  logic [WORD-1:0] in1,
  output logic [WORD-1:0] out,
  input  mig_sel_e        mig_sel,
  input  logic [4:0]      mig_addr,
  input  logic            mig_we,
  input  logic [WORD-1:0] mig_wdata,
  output logic [WORD-1:0] mig_rdata
);

  logic [PA_W-1:0] pm_addr;
  logic [WORD-1:0] pm_data, pm_mdata;
  logic [RA_W-1:0] rf_raddr, eu_rf_waddr;
  logic [WORD-1:0] rf_rdata, rf_mdata, eu_rf_wdata;
  logic            eu_rf_we, eu_dm_we;
  logic [DA_W-1:0] dm_addr;
  logic [WORD-1:0] dm_rdata, dm_mdata, eu_dm_wdata;

  logic            mig_ok;
  assign mig_ok = mig_we && !busy;

  rm_exec_unit u_eu (
    .clk      (clk),
    .rst      (rst),
    .start    (start),
    .busy     (busy),
    .done     (done),
    .pm_addr  (pm_addr),
    .pm_data  (pm_data),
    .rf_raddr (rf_raddr),
    .rf_rdata (rf_rdata),
    .rf_we    (eu_rf_we),
    .rf_waddr (eu_rf_waddr),
    .rf_wdata (eu_rf_wdata),
    .dm_addr  (dm_addr),
    .dm_rdata (dm_rdata),
    .dm_we    (eu_dm_we),
    .dm_wdata (eu_dm_wdata)
  );

  // Program memory: written only by migration.
  rm_lutram #(.DEPTH(PMEM_DEPTH), .WIDTH(WORD)) u_pmem (
    .clk    (clk),
    .we     (mig_ok && mig_sel == MIG_PMEM),
    .waddr  (PA_W'(mig_addr)),
    .wdata  (mig_wdata),
    .raddr0 (pm_addr),
    .rdata0 (pm_data),
    .raddr1 (PA_W'(mig_addr)),
    .rdata1 (pm_mdata)
  );

  // Data memory: the process's stores while busy, migration while idle.
  rm_lutram #(.DEPTH(DMEM_DEPTH), .WIDTH(WORD)) u_dmem (
    .clk    (clk),
    .we     (busy ? eu_dm_we : (mig_ok && mig_sel == MIG_DMEM)),
    .waddr  (busy ? dm_addr : DA_W'(mig_addr)),
    .wdata  (busy ? eu_dm_wdata : mig_wdata),
    .raddr0 (dm_addr),
    .rdata0 (dm_rdata),
    .raddr1 (DA_W'(mig_addr)),
    .rdata1 (dm_mdata)
  );

  rm_regfile u_rf (
    .clk    (clk),
    .rst    (rst),
    .raddr  (rf_raddr),
    .rdata  (rf_rdata),
    .we     (busy ? eu_rf_we : (mig_ok && mig_sel == MIG_RF)),
    .waddr  (busy ? eu_rf_waddr : RA_W'(mig_addr)),
    .wdata  (busy ? eu_rf_wdata : mig_wdata),
    .mraddr (RA_W'(mig_addr)),
    .mrdata (rf_mdata),
    .in0    (in0),
    .in1    (in1),
    .out    (out)
  );

  always_comb begin
    unique case (mig_sel)
      MIG_PMEM: mig_rdata = pm_mdata;
      MIG_DMEM: mig_rdata = dm_mdata;
      MIG_RF:   mig_rdata = rf_mdata;
      default:  mig_rdata = '0;
    endcase
  end

endmodule
