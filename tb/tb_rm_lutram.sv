// tb_rm_lutram: self-checking test of the distributed RAM.
// Fills a 32x16 RAM with random words, reads every word back through both
// asynchronous read ports against a testbench copy, and checks that a read of
// the address being written returns the old word until the clock edge.
module tb_rm_lutram;
  localparam int DEPTH = 32, WIDTH = 16;
  logic clk = 0;
  logic we = 0;
  logic [4:0] waddr = '0, raddr0 = '0, raddr1 = '0;
  logic [WIDTH-1:0] wdata = '0, rdata0, rdata1;
  logic [WIDTH-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  rm_lutram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, logic [WIDTH-1:0] got, logic [WIDTH-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1; waddr = 5'(i); wdata = WIDTH'($urandom); model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < DEPTH; i++) begin
      raddr0 = 5'(i); raddr1 = 5'(DEPTH - 1 - i);
      #1;
      check("port0", rdata0, model[i]);
      check("port1", rdata1, model[DEPTH-1-i]);
    end
    // random writes interleaved with reads on both ports
    for (int k = 0; k < 200; k++) begin
      @(negedge clk);
      we = 1'($urandom); waddr = 5'($urandom); wdata = WIDTH'($urandom);
      raddr0 = waddr; raddr1 = 5'($urandom);
      #1;
      check("old word before edge", rdata0, model[raddr0]);
      check("port1 random", rdata1, model[raddr1]);
      @(posedge clk);
      if (we) model[waddr] = wdata;
      #1;
      check("new word after edge", rdata0, model[raddr0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
