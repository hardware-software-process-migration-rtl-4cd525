// tb_eot_workload: the even-odd transposition sort runs of the evaluation,
// on the full-size co-processor (35 RMs).
//
// 35 sort processes are run for C simcycles with r of them migrated into RMs
// once, before the first simcycle (one migration per RM), and the other
// P - r run in software by the testbench:
//   C = 35    with r = 0, 24, 30, 34, 35 and hardware connectivity between
//             neighbouring RMs, and r = 24, 35 with software connectivity only;
//   C = 1024 and C = 10240 with r = 35 and hardware connectivity.
// Software connectivity moves values through the slave registers between
// simcycles; with hardware connectivity the RMs exchange them on chip and
// the host reads the outputs only at the end. Every run must end with the
// same outputs as a reference run of all processes in the interpreter, in
// ascending order after C >= 35 simcycles, and with the simcycle counter at
// C. The clock cycles per simcycle of each run are printed.
module tb_eot_workload;
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
  int n_vm_run = 0, n_mixed = 0, n_all_rm = 0, n_no_rm = 0, n_polls = 0;

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
    #2000000000;
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
  bit use_hw = 1;
  function automatic bit hw_left(int p);  return use_hw && in_rm[p] && p > 0 && in_rm[p-1]; endfunction
  function automatic bit hw_right(int p); return use_hw && in_rm[p] && p < P-1 && in_rm[p+1]; endfunction
  // an RM output must be read if a software process or a software-connected
  // RM input needs it
  function automatic bit needs_read(int p);
    return (p > 0 && !(in_rm[p-1] && hw_right(p-1))) || (p < P-1 && !(in_rm[p+1] && hw_left(p+1)));
  endfunction

  task automatic write_cfg(int p);
    wr(io_a(p, 3), {29'd0, in_rm[p], (use_hw && p == P-1) || hw_right(p), (use_hw && p == 0) || hw_left(p)});
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

  longint rm_cycles = 0;
  task automatic simcycle(int c, bit last);
    logic [31:0] d;
    int n_rm = 0, max_rm = 0;
    longint t_start;
    for (int p = 0; p < P; p++) n_rm += int'(in_rm[p]);
    // software connectivity into the RMs
    for (int p = 0; p < P; p++) if (in_rm[p]) begin
      if (hw_left(p) || (use_hw && p == 0)) n_hw_in++;
      else begin wr(io_a(p, 0), 32'(left_of(p))); n_sw_in++; end
      if (hw_right(p) || (use_hw && p == P-1)) n_hw_in++;
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
      if (t_done - t_start != 2 * max_rm + 1) check($sformatf("simcycle %0d length", c), t_done - t_start, 2 * max_rm + 1);
      rm_cycles += t_done - t_start;
    end
    if (n_rm == P) n_all_rm++; else if (n_rm == 0) n_no_rm++; else n_mixed++;
    // software connectivity out of the RMs; collect all outputs
    for (int p = 0; p < P; p++) begin
      if (in_rm[p]) begin
        if (last || needs_read(p)) begin rd(io_a(p, 2), d); outs[p] = word_t'(d); n_sw_out++; end
      end else outs[p] = vm[p].rf[5];
      if (last || !in_rm[p] || needs_read(p))
        if (outs[p] != refp[p].rf[5])
          check($sformatf("output %0d simcycle %0d", p, c), longint'(outs[p]), longint'(refp[p].rf[5]));
    end
  endtask

  task automatic run(int C, int r, bit hw);
    logic [31:0] d;
    longint t0;
    int fails0 = failures;
    rst = 1;
    repeat (3) @(negedge clk);
    rst = 0;
    use_hw = hw;
    rm_cycles = 0;
    for (int p = 0; p < P; p++) begin
      eot_init(vm[p], p, word_t'($urandom_range(0, 65534)));
      refp[p] = vm[p];
      outs[p] = vm[p].rf[5];
      in_rm[p] = 0;
    end
    for (int p = P - r; p < P; p++) migrate_in(p);
    update_all_cfg();
    t0 = cycle;
    for (int c = 0; c < C; c++) simcycle(c, c == C - 1);
    for (int p = 0; p < P; p++) check("final output", longint'(outs[p]), longint'(refp[p].rf[5]));
    for (int p = 1; p < P; p++) check("sorted", longint'(outs[p] >= outs[p-1]), 1);
    rd(32'h4, d);
    check("simcycle counter", longint'(d), (r > 0 ? longint'(C) : longint'(0)));
    $display("run C=%0d r=%0d %s: %0d clock cycles, %0d in RMs per simcycle (avg x100 = %0d), failures %0d",
             C, r, hw ? "hw" : "sw", cycle - t0, rm_cycles / longint'(C), rm_cycles * 100 / longint'(C), failures - fails0);
  endtask

  initial begin
    run(35, 0, 1);
    run(35, 24, 1);
    run(35, 30, 1);
    run(35, 34, 1);
    run(35, 35, 1);
    run(35, 24, 0);
    run(35, 35, 0);
    run(1024, 35, 1);
    run(10240, 35, 1);
    check("software connectivity happened", longint'(n_sw_in > 0), 1);
    check("hardware connectivity happened", longint'(n_hw_in > 0), 1);
    check("migration happened", longint'(n_mig_in > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
