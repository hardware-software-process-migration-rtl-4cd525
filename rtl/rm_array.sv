// rm_array: the array of Real Machines with their slave registers.
//
// N_RM Real Machines (35 by default, the number the description fits into its
// device) each run one simulation process. Around them sit the registers the
// simulator on the processor uses:
//
//  * per RM, two input slave registers feeding the RM's inputs (r6, r7), its
//    output (r5, read only), and a configuration register holding the RM's
//    "active" bit (it holds a migrated process) and one hardware-connectivity
//    bit per input;
//  * per RM, an activity monitor: the inputs of its last executed invocation
//    and two counters, invocations run and invocations skipped;
//  * a control register that starts a simcycle, a simcycle counter;
//  * a state window through which a process's program memory, data memory and
//    register file are copied in or out when it migrates.
//
// Software connectivity: between simcycles the simulator reads RM outputs and
// writes RM inputs through the slave registers. Hardware connectivity: an
// input whose bit is set is instead loaded, at the start of every simcycle,
// from the neighbouring RM's output: input 0 from RM i-1, input 1 from RM
// i+1, the linear chain of the even-odd transposition sort. The end inputs
// with no neighbour read 16'h0000 (left) and 16'hFFFF (right). Because
// inputs are captured when the simcycle starts, every RM sees its
// neighbours' outputs from the previous simcycle, whatever order the RMs
// finish in. The chain topology, the edge constants and the register map
// are this design's choices; the description wires connectivity into fixed
// logic and does not give run-time routing.
//
// Activity monitoring: a process whose inputs have not changed since its
// last invocation produces the same outputs again, so it need not run. When
// an RM's skip bit is set, the array compares the inputs it is about to
// capture with those of the RM's last executed invocation and does not start
// the RM if they are equal. Only processes whose outputs depend on their
// inputs alone (state kept between simcycles must arrive as an input) may
// use it. The first simcycle after the RM's configuration or state is
// written always runs. The two counters tell the host which processes are
// busy and which idle, the information a migration policy needs; a write
// to a counter clears it.
//
// Register map (byte offsets, 32-bit words; i = RM index in offset[17:12]):
//   0x00000 CTRL    W: bit0=1 starts a simcycle; R: bit0 running
//   0x00004 CYCLES  R: completed simcycles
//   0x00008 NRM     R: N_RM
//   0x40000+i*0x1000 + 0x0  IN0   RW      + 0x4 IN1 RW
//                   + 0x8  OUT   R       + 0xC CFG RW: bit0 hw in0, bit1 hw in1,
//                                                     bit2 active, bit3 skip
//                   + 0x10 RUNS  R, W clears     + 0x14 SKIPS R, W clears
//   0x80000+i*0x1000 + sel*0x100 + w*4   state word w of memory sel (0 program,
//                                        1 data, 2 registers)
// Register and state writes are ignored while a simcycle runs.
//
// Timing: reg_rdata is combinational in reg_addr. A simcycle started by a
// CTRL write ends, one cycle after the last active RM's done, with a
// one-cycle simcycle_done pulse. Reset is synchronous and clears every
// register (all RMs inactive, software connectivity).
module rm_array
  import rm_pkg::*;
#(
  parameter int unsigned N_RM = 35
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        reg_we,
  input  logic [19:0] reg_addr,
  input  logic [31:0] reg_wdata,
  output logic [31:0] reg_rdata,
  output logic        running,
  output logic        simcycle_done
);

  localparam logic [WORD-1:0] LEFT_EDGE  = '0;
  localparam logic [WORD-1:0] RIGHT_EDGE = '1;

  typedef struct packed {
    logic skip_idle;
    logic active;
    logic hw_in1;
    logic hw_in0;
  } rm_cfg_t;

  logic [WORD-1:0] in0_q [N_RM];
  logic [WORD-1:0] in1_q [N_RM];
  logic [WORD-1:0] rm_out [N_RM];
  logic [WORD-1:0] rm_mrdata [N_RM];
  rm_cfg_t         cfg_q [N_RM];
  logic [WORD-1:0] last0_q [N_RM];
  logic [WORD-1:0] last1_q [N_RM];
  logic [31:0]     runs_q [N_RM];
  logic [31:0]     skips_q [N_RM];
  logic [N_RM-1:0] seen_q;
  logic [N_RM-1:0] rm_busy, rm_done, pending, rm_run;
  logic [31:0]     cycles_q;

  // Address decode.
  logic [1:0]  region;
  logic [5:0]  idx;
  logic [2:0]  ioreg;
  mig_sel_e    msel;
  logic [4:0]  mword;
  logic        idx_ok;
  assign region = reg_addr[19:18];
  assign idx    = reg_addr[17:12];
  assign ioreg  = reg_addr[4:2];
  assign msel   = mig_sel_e'(reg_addr[9:8]);
  assign mword  = reg_addr[6:2];
  assign idx_ok = (32'(idx) < N_RM);

  logic start_sc;
  assign start_sc = reg_we && !running && region == 2'd0 && reg_addr[4:2] == 3'd0
                    && reg_wdata[0];

  logic io_we;
  assign io_we = reg_we && !running && region == 2'd1 && idx_ok;

  for (genvar i = 0; i < N_RM; i++) begin : g_rm
    logic [WORD-1:0] left_out, right_out, next_in0, next_in1;
    logic            mig_we, same_inputs;

    if (i == 0) begin : g_le
      assign left_out = LEFT_EDGE;
    end else begin : g_l
      assign left_out = rm_out[i-1];
    end
    if (i == N_RM - 1) begin : g_re
      assign right_out = RIGHT_EDGE;
    end else begin : g_r
      assign right_out = rm_out[i+1];
    end

    // Inputs the RM will see in the next simcycle, and whether it must run.
    assign next_in0    = cfg_q[i].hw_in0 ? left_out  : in0_q[i];
    assign next_in1    = cfg_q[i].hw_in1 ? right_out : in1_q[i];
    assign same_inputs = seen_q[i] && next_in0 == last0_q[i] && next_in1 == last1_q[i];
    assign rm_run[i]   = cfg_q[i].active && !(cfg_q[i].skip_idle && same_inputs);

    always_ff @(posedge clk) begin
      if (rst) begin
        seen_q[i]  <= 1'b0;
        last0_q[i] <= '0;
        last1_q[i] <= '0;
        runs_q[i]  <= '0;
        skips_q[i] <= '0;
      end else if (start_sc) begin
        if (rm_run[i]) begin
          seen_q[i]  <= 1'b1;
          last0_q[i] <= next_in0;
          last1_q[i] <= next_in1;
          runs_q[i]  <= runs_q[i] + 1'b1;
        end else if (cfg_q[i].active) begin
          skips_q[i] <= skips_q[i] + 1'b1;
        end
      end else if (io_we && 32'(idx) == i) begin
        if (ioreg == 3'd3) seen_q[i]  <= 1'b0;
        if (ioreg == 3'd4) runs_q[i]  <= '0;
        if (ioreg == 3'd5) skips_q[i] <= '0;
      end else if (mig_we) begin
        seen_q[i] <= 1'b0;
      end
    end

    always_ff @(posedge clk) begin
      if (rst) begin
        in0_q[i] <= '0;
        in1_q[i] <= '0;
        cfg_q[i] <= '0;
      end else if (start_sc) begin
        if (cfg_q[i].hw_in0) in0_q[i] <= left_out;
        if (cfg_q[i].hw_in1) in1_q[i] <= right_out;
      end else if (io_we && 32'(idx) == i) begin
        unique case (ioreg)
          3'd0:    in0_q[i] <= reg_wdata[WORD-1:0];
          3'd1:    in1_q[i] <= reg_wdata[WORD-1:0];
          3'd3:    cfg_q[i] <= rm_cfg_t'(reg_wdata[3:0]);
          default: ;
        endcase
      end
    end

    assign mig_we = reg_we && !running && region == 2'd2 && 32'(idx) == i;

    rm_core u_rm (
      .clk       (clk),
      .rst       (rst),
      .start     (start_sc && rm_run[i]),
      .busy      (rm_busy[i]),
      .done      (rm_done[i]),
      .in0       (in0_q[i]),
      .in1       (in1_q[i]),
      .out       (rm_out[i]),
      .mig_sel   (msel),
      .mig_addr  (mword),
      .mig_we    (mig_we),
      .mig_wdata (reg_wdata[WORD-1:0]),
      .mig_rdata (rm_mrdata[i])
    );
  end

  // Simcycle control: wait for every active RM to report done.
  always_ff @(posedge clk) begin
    if (rst) begin
      running       <= 1'b0;
      pending       <= '0;
      cycles_q      <= '0;
      simcycle_done <= 1'b0;
    end else begin
      simcycle_done <= 1'b0;
      if (start_sc) begin
        running <= 1'b1;
        pending <= rm_run;
      end else if (running) begin
        if ((pending & ~rm_done) == '0) begin
          running       <= 1'b0;
          pending       <= '0;
          cycles_q      <= cycles_q + 1'b1;
          simcycle_done <= 1'b1;
        end else begin
          pending <= pending & ~rm_done;
        end
      end
    end
  end

  // Register read.
  always_comb begin
    reg_rdata = '0;
    unique case (region)
      2'd0: begin
        unique case (reg_addr[4:2])
          3'd0:    reg_rdata = {31'd0, running};
          3'd1:    reg_rdata = cycles_q;
          3'd2:    reg_rdata = 32'(N_RM);
          default: reg_rdata = '0;
        endcase
      end
      2'd1: if (idx_ok) begin
        unique case (ioreg)
          3'd0:    reg_rdata = 32'(in0_q[idx]);
          3'd1:    reg_rdata = 32'(in1_q[idx]);
          3'd2:    reg_rdata = 32'(rm_out[idx]);
          3'd3:    reg_rdata = 32'(cfg_q[idx]);
          3'd4:    reg_rdata = runs_q[idx];
          3'd5:    reg_rdata = skips_q[idx];
          default: reg_rdata = '0;
        endcase
      end
      2'd2: if (idx_ok) reg_rdata = 32'(rm_mrdata[idx]);
      default: reg_rdata = '0;
    endcase
  end

  // RMs only run, and only finish, while a simcycle is in progress.
  a_busy_in_sc: assert property (@(posedge clk) disable iff (rst) |rm_busy |-> running)
    else $error("rm_array: RM running outside a simcycle");
  a_done_in_sc: assert property (@(posedge clk) disable iff (rst) |rm_done |-> running)
    else $error("rm_array: RM finished outside a simcycle");

endmodule
