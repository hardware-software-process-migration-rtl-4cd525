// tb_rm_exec_unit: self-checking test of the RM execution unit.
// The testbench supplies program memory, data memory and register file as
// plain arrays (asynchronous reads, r6/r7 reading two inputs). It runs
// random programs with forward branches and a loop with a backward branch,
// and compares the final registers and data memory with the reference
// interpreter in cis_pkg. It also checks the two-cycles-per-instruction
// timing: done must rise exactly 2*N cycles after start for N instructions.
module tb_rm_exec_unit;
  import rm_pkg::*;
  import cis_pkg::*;

  logic clk = 0, rst = 1, start = 0, busy, done;
  logic [4:0] pm_addr, dm_addr;
  logic [15:0] pm_data, rf_rdata, rf_wdata, dm_rdata, dm_wdata;
  logic [2:0] rf_raddr, rf_waddr;
  logic rf_we, dm_we;
  logic [15:0] in0 = '0, in1 = '0;
  word_t pm [32], dm [32], rf [8];
  int checks = 0, failures = 0;

  rm_exec_unit dut (.*);

  always #5 clk = ~clk;

  assign pm_data  = pm[pm_addr];
  assign dm_rdata = dm[dm_addr];
  assign rf_rdata = (rf_raddr == 6) ? in0 : (rf_raddr == 7) ? in1 : rf[rf_raddr];
  always_ff @(posedge clk) begin
    if (rf_we) rf[rf_waddr] <= rf_wdata;
    if (dm_we) dm[dm_addr] <= dm_wdata;
  end

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

  task automatic run_one(ref proc_state_t s);
    proc_state_t ref_s = s;
    int n_exp, cyc;
    n_exp = run_invocation(ref_s, in0, in1);
    pm = s.pm; dm = s.dm; rf = s.rf;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 0;  // edges after the one that took start
    while (!done && cyc < 1000) begin
      @(negedge clk);
      cyc++;
    end
    check("cycles = 2 x instructions", cyc, 2 * n_exp);
    if (!done) begin   // a runaway program: recover with a reset
      rst = 1; @(negedge clk); rst = 0;
    end
    check("idle after done", int'(busy), 0);
    for (int i = 0; i < 8; i++) check($sformatf("r%0d", i), int'(rf[i]), int'(ref_s.rf[i]));
    for (int i = 0; i < 32; i++) check($sformatf("dm[%0d]", i), int'(dm[i]), int'(ref_s.dm[i]));
  endtask

  initial begin
    proc_state_t s;
    repeat (2) @(negedge clk);
    rst = 0;
    check("idle after reset", int'(busy), 0);
    for (int t = 0; t < 60; t++) begin
      random_program(s, int'($urandom_range(2, 32)));
      foreach (s.dm[i]) s.dm[i] = word_t'($urandom);
      foreach (s.rf[i]) s.rf[i] = word_t'($urandom);
      in0 = word_t'($urandom); in1 = word_t'($urandom);
      run_one(s);
    end
    for (int n = 1; n <= 6; n++) begin
      loop_program(s, n);
      foreach (s.dm[i]) s.dm[i] = '0;
      foreach (s.rf[i]) s.rf[i] = word_t'($urandom);
      run_one(s);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
