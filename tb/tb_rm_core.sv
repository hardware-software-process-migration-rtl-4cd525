// tb_rm_core: self-checking test of one Real Machine.
// Migrates random process states in through the state port, reads every word
// back, runs one invocation, and migrates the state out again, comparing
// with the reference interpreter in cis_pkg. It also runs the sort process
// and a loop, checks the two-cycles-per-instruction timing, checks that the
// output port follows r5, and that state writes are ignored while busy.
module tb_rm_core;
  import rm_pkg::*;
  import cis_pkg::*;

  logic clk = 0, rst = 1, start = 0, busy, done;
  word_t in0 = '0, in1 = '0, out, mig_wdata = '0, mig_rdata;
  mig_sel_e mig_sel = MIG_NONE;
  logic [4:0] mig_addr = '0;
  logic mig_we = 0;
  int checks = 0, failures = 0;

  rm_core dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic mig_write(mig_sel_e sel, int addr, word_t data);
    @(negedge clk);
    mig_sel = sel; mig_addr = 5'(addr); mig_wdata = data; mig_we = 1;
    @(negedge clk);
    mig_we = 0;
  endtask

  task automatic mig_read(mig_sel_e sel, int addr, output word_t data);
    @(negedge clk);
    mig_sel = sel; mig_addr = 5'(addr);
    #1 data = mig_rdata;
  endtask

  task automatic migrate_in(ref proc_state_t s);
    for (int i = 0; i < 32; i++) mig_write(MIG_PMEM, i, s.pm[i]);
    for (int i = 0; i < 32; i++) mig_write(MIG_DMEM, i, s.dm[i]);
    for (int i = 0; i < 8; i++)  mig_write(MIG_RF, i, s.rf[i]);
  endtask

  task automatic compare_state(string tag, ref proc_state_t s);
    word_t w;
    for (int i = 0; i < 32; i++) begin mig_read(MIG_PMEM, i, w); check({tag, " pm"}, int'(w), int'(s.pm[i])); end
    for (int i = 0; i < 32; i++) begin mig_read(MIG_DMEM, i, w); check({tag, " dm"}, int'(w), int'(s.dm[i])); end
    for (int i = 0; i < 8; i++)  begin mig_read(MIG_RF, i, w);   check({tag, " rf"}, int'(w), int'(s.rf[i])); end
  endtask

  task automatic run_one(ref proc_state_t s);
    proc_state_t ref_s = s;
    int n_exp, cyc;
    migrate_in(s);
    compare_state("migrated in", s);
    check("out = r5 after migration", int'(out), int'(s.rf[5]));
    n_exp = run_invocation(ref_s, in0, in1);
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    // a state write while busy must be ignored
    mig_sel = MIG_DMEM; mig_addr = 5'd31; mig_wdata = ~ref_s.dm[31]; mig_we = 1;
    cyc = 0;
    while (!done && cyc < 1000) begin
      @(negedge clk);
      mig_we = 0;
      cyc++;
    end
    check("cycles = 2 x instructions", cyc, 2 * n_exp);
    compare_state("after invocation", ref_s);
    check("out = r5", int'(out), int'(ref_s.rf[5]));
    s = ref_s;
  endtask

  initial begin
    proc_state_t s;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 30; t++) begin
      random_program(s, int'($urandom_range(2, 32)));
      foreach (s.dm[i]) s.dm[i] = word_t'($urandom);
      foreach (s.rf[i]) s.rf[i] = word_t'($urandom);
      in0 = word_t'($urandom); in1 = word_t'($urandom);
      run_one(s);
    end
    loop_program(s, 7);
    foreach (s.dm[i]) s.dm[i] = '0;
    foreach (s.rf[i]) s.rf[i] = word_t'($urandom);
    run_one(s);
    check("loop sum stored", int'(s.dm[17]), int'(16'(7 * s.rf[2])));
    // sort process: compare right with a smaller right neighbour, then left
    eot_init(s, 0, 16'd500);
    in0 = 16'd0; in1 = 16'd100;
    run_one(s);
    check("sort: keeps smaller when comparing right", int'(out), 100);
    in0 = 16'd700; in1 = 16'd5;
    run_one(s);
    check("sort: keeps larger when comparing left", int'(out), 700);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
