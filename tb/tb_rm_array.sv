// tb_rm_array: self-checking test of the RM array (six RMs).
// Through the register port it migrates six even-odd transposition sort
// processes into the RMs and runs the sort twice: once with every RM input
// hardware-connected, once with only part of the chain in hardware and the
// rest connected in software by the testbench. After every simcycle each
// output is compared with a reference run of the same processes in the CIS
// interpreter, and at the end the numbers must be in ascending order. It also
// checks the simcycle length (one cycle o_now the slowest RM's done), the
// control, counter and configuration registers, that inactive RMs are not
// started, that state and input writes are ignored during a simcycle, and
// migration of every process's state back out.
module tb_rm_array;
  import rm_pkg::*;
  import cis_pkg::*;
  localparam int N = 6;

  logic clk = 0, rst = 1;
  logic reg_we = 0;
  logic [19:0] reg_addr = '0;
  logic [31:0] reg_wdata = '0, reg_rdata;
  logic running, simcycle_done;
  int checks = 0, failures = 0;
  proc_state_t ref_p [N];

  rm_array #(.N_RM(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [19:0] io_addr(int i, int r);   return 20'h40000 | 20'(i << 12) | 20'(r << 2); endfunction
  function automatic logic [19:0] st_addr(int i, int sel, int w); return 20'h80000 | 20'(i << 12) | 20'(sel << 8) | 20'(w << 2); endfunction

  task automatic wr(logic [19:0] a, logic [31:0] d);
    @(negedge clk); reg_addr = a; reg_wdata = d; reg_we = 1;
    @(negedge clk); reg_we = 0;
  endtask
  task automatic rd(logic [19:0] a, output logic [31:0] d);
    @(negedge clk); reg_addr = a; #1 d = reg_rdata;
  endtask

  task automatic migrate_in(int i, proc_state_t s);
    for (int w = 0; w < 32; w++) wr(st_addr(i, 0, w), 32'(s.pm[w]));
    for (int w = 0; w < 32; w++) wr(st_addr(i, 1, w), 32'(s.dm[w]));
    for (int w = 0; w < 8; w++)  wr(st_addr(i, 2, w), 32'(s.rf[w]));
  endtask

  function automatic int max2(int a, int b); return a > b ? a : b; endfunction

  // One simcycle of the reference model.
  // Returns the longest invocation in instructions.
  task automatic ref_simcycle(output int max_n);
    word_t o [N];
    max_n = 0;
    for (int i = 0; i < N; i++) o[i] = ref_p[i].rf[5];
    for (int i = 0; i < N; i++)
      max_n = max2(max_n, run_invocation(ref_p[i], i == 0 ? 16'h0000 : o[i-1], i == N-1 ? 16'hFFFF : o[i+1]));
  endtask

  // hw_mask bit i: RM i's inputs come from its neighbours in hardware.
  task automatic sort_run(logic [N-1:0] hw_mask);
    logic [31:0] d;
    word_t outs [N];
    for (int i = 0; i < N; i++) begin
      eot_init(ref_p[i], i, word_t'($urandom_range(0, 60000)));
      migrate_in(i, ref_p[i]);
      wr(io_addr(i, 3), {29'd0, 1'b1, hw_mask[i], hw_mask[i]});
    end
    for (int i = 0; i < N; i++) begin
      rd(io_addr(i, 2), d); outs[i] = word_t'(d);
    end
    for (int c = 0; c < N; c++) begin
      int cyc = 0;
      int max_n;
      logic [31:0] cnt0;
      rd(20'h4, cnt0);
      // software connectivity for the RMs that are not hardware-connected
      for (int i = 0; i < N; i++) if (!hw_mask[i]) begin
        wr(io_addr(i, 0), 32'(i == 0 ? 16'h0000 : outs[i-1]));
        wr(io_addr(i, 1), 32'(i == N-1 ? 16'hFFFF : outs[i+1]));
      end
      wr(20'h0, 32'd1);                     // start
      rd(20'h0, d);
      check("running bit", int'(d[0]), 1);
      // writes during the simcycle are ignored
      wr(st_addr(N-1, 1, 31), 32'hDEAD);
      wr(io_addr(N-1, 0), 32'hBEEF);
      cyc = 5;  // rising edges since the one that took the start write
      while (!simcycle_done && cyc < 500) begin @(negedge clk); cyc++; end
      ref_simcycle(max_n);
      // two cycles per instruction of the slowest RM, one for the array
      check("simcycle length", cyc, 2 * max_n + 1);
      rd(20'h4, d);
      check("cycle counter", int'(d), int'(cnt0) + 1);
      for (int i = 0; i < N; i++) begin
        rd(io_addr(i, 2), d); outs[i] = word_t'(d);
        check($sformatf("out[%0d] simcycle %0d", i, c), int'(outs[i]), int'(ref_p[i].rf[5]));
      end
    end
    for (int i = 1; i < N; i++)
      check("sorted", int'(outs[i] >= outs[i-1]), 1);
    rd(st_addr(N-1, 1, 31), d);
    check("state write ignored while running", int'(d), 0);
    if (!hw_mask[N-1]) begin
      rd(io_addr(N-1, 0), d);
      check("input write ignored while running", int'(d == 32'hBEEF), 0);
    end
    // migrate out: data and registers must match the reference
    for (int i = 0; i < N; i++) begin
      for (int w = 0; w < 8; w++) begin rd(st_addr(i, 2, w), d); check("rf out", int'(d), int'(ref_p[i].rf[w])); end
      rd(st_addr(i, 1, 0), d); check("dm out", int'(d), int'(ref_p[i].dm[0]));
    end
  endtask


  // Activity monitor: every RM runs out = in0 + in1 with skipping enabled.
  task automatic skip_test();
    logic [31:0] d;
    word_t a [N], b [N];
    int cyc;
    proc_state_t s;
    foreach (s.pm[w]) s.pm[w] = {OP_HALT, 12'h000};
    s.pm[0] = enc_r(OP_ADD, 5, 6, 7);
    foreach (s.dm[w]) s.dm[w] = '0;
    foreach (s.rf[w]) s.rf[w] = '0;
    for (int i = 0; i < N; i++) begin
      migrate_in(i, s);
      wr(io_addr(i, 3), 32'b1100);              // active, skip, software inputs
      wr(io_addr(i, 4), 32'd0);
      wr(io_addr(i, 5), 32'd0);
      a[i] = word_t'($urandom); b[i] = word_t'($urandom);
      wr(io_addr(i, 0), 32'(a[i]));
      wr(io_addr(i, 1), 32'(b[i]));
    end
    for (int step = 0; step < 4; step++) begin
      // step 1: only RM 2 gets a new input; step 2: nothing changes;
      // step 3: RM 4's registers are rewritten (a migration), inputs unchanged
      if (step == 1) begin a[2] = a[2] + 16'd1; wr(io_addr(2, 0), 32'(a[2])); end
      if (step == 3) for (int w = 0; w < 8; w++) wr(st_addr(4, 2, w), 32'd0);
      wr(20'h0, 32'd1);
      cyc = 0;  // rising edges since the one that took the start write
      while (!simcycle_done) begin @(negedge clk); cyc++; end
      for (int i = 0; i < N; i++) begin
        int exp_runs = 1 + int'(step >= 1 && i == 2) + int'(step >= 3 && i == 4);
        rd(io_addr(i, 2), d);
        check($sformatf("sum out[%0d] step %0d", i, step), int'(d), int'(word_t'(a[i] + b[i])));
        rd(io_addr(i, 4), d);
        check($sformatf("runs[%0d] step %0d", i, step), int'(d), exp_runs);
        rd(io_addr(i, 5), d);
        check($sformatf("skips[%0d] step %0d", i, step), int'(d), step + 1 - exp_runs);
      end
      // two instructions when any RM runs, else the simcycle ends at once
      check($sformatf("skip simcycle length step %0d", step), cyc, step == 2 ? 1 : 2 * 2 + 1);
    end
    wr(io_addr(0, 4), 32'd7);
    rd(io_addr(0, 4), d);
    check("runs counter cleared by a write", int'(d), 0);
  endtask

  initial begin
    logic [31:0] d;
    repeat (3) @(negedge clk);
    rst = 0;
    rd(20'h8, d);
    check("NRM register", int'(d), N);
    rd(20'h0, d);
    check("idle o_now reset", int'(d), 0);
    sort_run('1);          // all hardware connectivity
    sort_run(6'b000111);   // RMs 0..2 in hardware, 3..5 in software
    sort_run(6'b000000);   // all software connectivity
    skip_test();
    // an inactive RM is not started and keeps its output
    begin
      logic [31:0] o_prev, o_now, cfg;
      wr(io_addr(0, 3), 32'd3);
      rd(io_addr(0, 3), cfg);
      check("cfg readback", int'(cfg), 3);
      rd(io_addr(0, 2), o_prev);
      wr(io_addr(0, 1), 32'd0);        // would make it take 0 if it ran
      wr(20'h0, 32'd1);
      while (!simcycle_done) @(negedge clk);
      rd(io_addr(0, 2), o_now);
      check("inactive RM output unchanged", int'(o_now), int'(o_prev));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
