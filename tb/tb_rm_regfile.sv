// tb_rm_regfile: self-checking test of the RM register file.
// Writes random words to random registers and checks: r0..r5 read back what
// was written, r6 and r7 read the inputs, the out port follows writes to r5
// only, and the migration read port returns the stored word of every
// register (r6/r7 included).
module tb_rm_regfile;
  import rm_pkg::*;
  logic clk = 0, rst = 1;
  logic [2:0] raddr = '0, waddr = '0, mraddr = '0;
  logic [15:0] rdata, wdata = '0, mrdata, in0 = '0, in1 = '0, out;
  logic we = 0;
  logic [15:0] model [8];
  logic [15:0] out_model;
  int checks = 0, failures = 0;

  rm_regfile dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #500000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    out_model = '0;
    check("out after reset", out, 16'h0);
    for (int i = 0; i < 8; i++) begin
      @(negedge clk); we = 1; waddr = 3'(i); wdata = 16'($urandom); model[i] = wdata;
    end
    @(negedge clk); we = 0; out_model = model[5];
    for (int k = 0; k < 400; k++) begin
      @(negedge clk);
      we = 1'($urandom); waddr = 3'($urandom); wdata = 16'($urandom);
      raddr = 3'($urandom); mraddr = 3'($urandom);
      in0 = 16'($urandom); in1 = 16'($urandom);
      #1;
      check("read", rdata, raddr == 6 ? in0 : raddr == 7 ? in1 : model[raddr]);
      check("migration read", mrdata, model[mraddr]);
      check("out", out, out_model);
      @(posedge clk);
      if (we) begin
        model[waddr] = wdata;
        if (waddr == 5) out_model = wdata;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
