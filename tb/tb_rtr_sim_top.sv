// tb_rtr_sim_top: end-to-end test of the migration co-processor at its full
// size (35 RMs, every parameter at its default).
//
// The testbench plays the host processor of the simulator: it holds 35
// even-odd transposition sort processes in CIS form, runs those still in
// software in the CIS interpreter (the virtual machines), and talks to the
// RMs only over the OPB. The run goes through all the mechanisms of the
// design:
//   simcycles 0-2    all processes in software (no RM in use);
//   after 3          processes 11..34 migrate into RMs (24 RMs, mixed run:
//                    RM-to-RM inputs in hardware, the boundary in software);
//   after 10         processes 0..10 migrate in too (all 35 in hardware);
//   after 20         process 34 migrates back out to software;
//   after 27         it migrates into its RM again;
//   40-43            activity monitoring on: with the numbers sorted no
//                    input changes, so each RM runs once and is then skipped.
// After every simcycle every output is compared with a reference run of all
// processes in the interpreter, and a migrated-out state with the
// reference state. The end result must be sorted. Each simcycle's length is
// checked against two cycles per instruction of the slowest RM plus one.
// Each mechanism is counted and a mechanism that never happened is a failure.
module tb_rtr_sim_top;
  import rm_pkg::*;
  import cis_pkg::*;
  localparam int P = 35;
  localparam logic [31:0] BASE = 32'h7000_0000;

  logic clk = 0, rst = 1;
  logic OPB_select = 0, OPB_RNW = 0;
  logic [31:0] OPB_ABus = '0, OPB_DBus = '0, Sl_DBus;
  logic Sl_xferAck, Sl_errAck, Sl_retry, Sl_toutSup, running, simcycle_done;

  rtr_sim_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  longint t_done = 0;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (simcycle_done) t_done <= cycle;
  end

  // mechanism counters
  int n_sw_in = 0, n_sw_out = 0, n_hw_in = 0, n_mig_in = 0, n_mig_out = 0;
  int n_vm_run = 0, n_mixed = 0, n_all_rm = 0, n_no_rm = 0, n_polls = 0, n_skips = 0;

  proc_state_t vm [P];     // processes held in software
  proc_state_t refp [P];   // reference: every process in the interpreter
  bit in_rm [P];
  word_t outs [P];         // outputs at the end of the previous simcycle

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #200000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- OPB master -------------------------------------------------------
  longint t_ack;
  task automatic opb(logic rnw, logic [31:0] addr, logic [31:0] wdata, output logic [31:0] rdata);
    @(posedge clk); #1;
    OPB_select = 1; OPB_RNW = rnw; OPB_ABus = addr; OPB_DBus = wdata;
    do @(negedge clk); while (!Sl_xferAck);
    rdata = Sl_DBus;
    t_ack = cycle;
    @(posedge clk); #1;
    OPB_select = 0; OPB_RNW = 0; OPB_ABus = '0; OPB_DBus = '0;
  endtask
  task automatic wr(logic [31:0] off, logic [31:0] d);
    logic [31:0] dummy;
    opb(1'b0, BASE | off, d, dummy);
  endtask
  task automatic rd(logic [31:0] off, output logic [31:0] d);
    opb(1'b1, BASE | off, '0, d);
  endtask

  function automatic logic [31:0] io_a(int i, int r);        return 32'h40000 | 32'(i << 12) | 32'(r << 2); endfunction
  function automatic logic [31:0] st_a(int i, int sel, int w); return 32'h80000 | 32'(i << 12) | 32'(sel << 8) | 32'(w << 2); endfunction

  // ---- host software ------------------------------------------------------
  function automatic bit hw_left(int p);  return in_rm[p] && p > 0 && in_rm[p-1]; endfunction
  function automatic bit hw_right(int p); return in_rm[p] && p < P-1 && in_rm[p+1]; endfunction

  bit use_skip = 0;
  task automatic write_cfg(int p);
    wr(io_a(p, 3), {28'd0, use_skip, in_rm[p], (p == P-1) || hw_right(p), (p == 0) || hw_left(p)});
  endtask

  task automatic migrate_in(int p);
    for (int w = 0; w < 32; w++) wr(st_a(p, 0, w), 32'(vm[p].pm[w]));
    for (int w = 0; w < 32; w++) wr(st_a(p, 1, w), 32'(vm[p].dm[w]));
    for (int w = 0; w < 8; w++)  wr(st_a(p, 2, w), 32'(vm[p].rf[w]));
    in_rm[p] = 1;
    n_mig_in++;
  endtask

  task automatic migrate_out(int p);
    logic [31:0] d;
    in_rm[p] = 0;
    write_cfg(p);
    for (int w = 0; w < 32; w++) begin rd(st_a(p, 0, w), d); vm[p].pm[w] = word_t'(d); end
    for (int w = 0; w < 32; w++) begin rd(st_a(p, 1, w), d); vm[p].dm[w] = word_t'(d); end
    for (int w = 0; w < 8; w++)  begin rd(st_a(p, 2, w), d); vm[p].rf[w] = word_t'(d); end
    check("migrated-out program", longint'(vm[p].pm == refp[p].pm), 1);
    check("migrated-out data", longint'(vm[p].dm == refp[p].dm), 1);
    check("migrated-out registers", longint'(vm[p].rf == refp[p].rf), 1);
    n_mig_out++;
  endtask

  task automatic update_all_cfg();
    for (int p = 0; p < P; p++) write_cfg(p);
  endtask

  function automatic word_t left_of(int p);  return p == 0 ? 16'h0000 : outs[p-1]; endfunction
  function automatic word_t right_of(int p); return p == P-1 ? 16'hFFFF : outs[p+1]; endfunction

  task automatic simcycle(int c);
    logic [31:0] d;
    int n_rm = 0, max_rm = 0;
    longint t_start;
    for (int p = 0; p < P; p++) n_rm += int'(in_rm[p]);
    // software connectivity into the RMs
    for (int p = 0; p < P; p++) if (in_rm[p]) begin
      if (hw_left(p) || p == 0) n_hw_in++;
      else begin wr(io_a(p, 0), 32'(left_of(p))); n_sw_in++; end
      if (hw_right(p) || p == P-1) n_hw_in++;
      else begin wr(io_a(p, 1), 32'(right_of(p))); n_sw_in++; end
    end
    // reference step
    begin
      word_t o [P];
      for (int p = 0; p < P; p++) o[p] = refp[p].rf[5];
      for (int p = 0; p < P; p++) begin
        int n = run_invocation(refp[p], p == 0 ? 16'h0 : o[p-1], p == P-1 ? 16'hFFFF : o[p+1]);
        if (in_rm[p] && n > max_rm) max_rm = n;
      end
    end
    // start the RMs, run the software processes meanwhile
    if (n_rm > 0) begin
      wr(32'h0, 32'd1);
      t_start = t_ack;
    end
    for (int p = 0; p < P; p++) if (!in_rm[p]) begin
      void'(run_invocation(vm[p], left_of(p), right_of(p)));
      n_vm_run++;
    end
    if (n_rm > 0) begin
      do begin rd(32'h0, d); n_polls++; end while (d[0]);
      if (!use_skip) check($sformatf("simcycle %0d length", c), t_done - t_start, 2 * max_rm + 1);
    end
    if (n_rm == P) n_all_rm++; else if (n_rm == 0) n_no_rm++; else n_mixed++;
    // software connectivity out of the RMs; collect all outputs
    for (int p = 0; p < P; p++) begin
      if (in_rm[p]) begin rd(io_a(p, 2), d); outs[p] = word_t'(d); n_sw_out++; end
      else outs[p] = vm[p].rf[5];
      check($sformatf("output %0d simcycle %0d", p, c), longint'(outs[p]), longint'(refp[p].rf[5]));
    end
  endtask

  initial begin
    logic [31:0] d;
    int n_cycles_hw;
    n_cycles_hw = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    rd(32'h8, d);
    check("N_RM register", longint'(d), longint'(P));
    for (int p = 0; p < P; p++) begin
      eot_init(vm[p], p, word_t'($urandom_range(0, 65534)));
      refp[p] = vm[p];
      outs[p] = vm[p].rf[5];
      in_rm[p] = 0;
    end
    for (int c = 0; c < 40; c++) begin
      if (c == 3) begin
        for (int p = 11; p < P; p++) migrate_in(p);
        update_all_cfg();
      end
      if (c == 10) begin
        for (int p = 0; p < 11; p++) migrate_in(p);
        update_all_cfg();
      end
      if (c == 20) begin
        migrate_out(P - 1);
        update_all_cfg();
      end
      if (c == 27) begin
        migrate_in(P - 1);
        update_all_cfg();
      end
      simcycle(c);
      if (c >= 3) n_cycles_hw++;
    end
    for (int p = 1; p < P; p++) check("sorted", longint'(outs[p] >= outs[p-1]), 1);
    rd(32'h4, d);
    check("simcycle counter", longint'(d), longint'(n_cycles_hw));
    // Activity monitoring: once sorted, no RM's inputs change any more, so
    // with skipping enabled every RM runs once and is then skipped.
    use_skip = 1;
    update_all_cfg();
    for (int c = 40; c < 44; c++) simcycle(c);
    for (int p = 0; p < P; p++) begin
      rd(io_a(p, 5), d);
      n_skips += int'(d);
      check("skipped invocations per RM", longint'(d), 3);
    end
    $display("mechanisms: sw_in=%0d sw_out=%0d hw_in=%0d mig_in=%0d mig_out=%0d vm_runs=%0d",
             n_sw_in, n_sw_out, n_hw_in, n_mig_in, n_mig_out, n_vm_run);
    $display("simcycles: no_rm=%0d mixed=%0d all_rm=%0d polls=%0d skipped=%0d", n_no_rm, n_mixed, n_all_rm, n_polls, n_skips);
    check("software connectivity in happened", longint'(n_sw_in > 0), 1);
    check("software connectivity out happened", longint'(n_sw_out > 0), 1);
    check("hardware connectivity happened", longint'(n_hw_in > 0), 1);
    check("migration in happened", longint'(n_mig_in > 0), 1);
    check("migration out happened", longint'(n_mig_out > 0), 1);
    check("virtual machine runs happened", longint'(n_vm_run > 0), 1);
    check("mixed simcycles happened", longint'(n_mixed > 0), 1);
    check("all-RM simcycles happened", longint'(n_all_rm > 0), 1);
    check("no-RM simcycles happened", longint'(n_no_rm > 0), 1);
    check("skipped invocations happened", longint'(n_skips > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
