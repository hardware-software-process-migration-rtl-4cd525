// tb_opb_rm_slave: self-checking test of the OPB slave.
// A register model behind the slave answers reads with a function of the
// address. The test performs random reads and writes inside and outside the
// slave's window, some of them back to back, and checks: acknowledge exactly
// one cycle after select for hits and never for misses, read data on Sl_DBus
// only during the acknowledge, exactly one write strobe per write transfer
// with the right offset and data, and the unused responses held low.
module tb_opb_rm_slave;
  localparam logic [31:0] BASE = 32'h7000_0000;
  logic clk = 0, rst = 1;
  logic OPB_select = 0, OPB_RNW = 0;
  logic [31:0] OPB_ABus = '0, OPB_DBus = '0, Sl_DBus;
  logic Sl_xferAck, Sl_errAck, Sl_retry, Sl_toutSup;
  logic reg_we;
  logic [19:0] reg_addr;
  logic [31:0] reg_wdata, reg_rdata;
  int checks = 0, failures = 0;
  int n_we = 0;
  logic [19:0] last_waddr;
  logic [31:0] last_wdata;

  opb_rm_slave #(.C_BASEADDR(BASE), .C_ADDR_BITS(20)) dut (.*);

  assign reg_rdata = {12'hABC, reg_addr} ^ 32'h0F0F_0F0F;

  always #5 clk = ~clk;
  always @(posedge clk) if (reg_we) begin
    n_we++; last_waddr = reg_addr; last_wdata = reg_wdata;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One transfer, started just after a rising edge; select is held until
  // the acknowledge (or for 4 cycles on a miss). With keep set, the next
  // transfer follows in the cycle after the acknowledge, without a gap.
  task automatic xfer(logic rnw, logic [31:0] addr, logic [31:0] data, logic hit, logic keep);
    int wait_cyc = 0;
    int we_before = n_we;
    OPB_select = 1; OPB_RNW = rnw; OPB_ABus = addr; OPB_DBus = data;
    forever begin
      @(negedge clk);
      if (Sl_xferAck || wait_cyc == 4) break;
      check("no data without ack", Sl_DBus, 32'h0);
      wait_cyc++;
    end
    if (hit) begin
      check("ack one cycle after select", 32'(wait_cyc), 32'd1);
      if (rnw) begin
        check("read data", Sl_DBus, {12'hABC, addr[19:0]} ^ 32'h0F0F_0F0F);
        check("no write strobe on a read", 32'(n_we - we_before), 32'd0);
      end
      else begin
        check("one write strobe", 32'(n_we - we_before), 32'd1);
        check("write offset", 32'(last_waddr), 32'(addr[19:0]));
        check("write data", last_wdata, data);
      end
    end else begin
      check("no ack outside window", 32'(Sl_xferAck), 32'd0);
      check("no strobe outside window", 32'(n_we - we_before), 32'd0);
    end
    check("errAck/retry/toutSup low", {29'd0, Sl_errAck, Sl_retry, Sl_toutSup}, 32'd0);
    @(posedge clk); #1;
    if (!keep) begin
      OPB_select = 0;
      @(posedge clk); #1;
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    @(posedge clk); #1;
    for (int k = 0; k < 300; k++) begin
      logic hit;
      logic [31:0] a;
      hit = 1'($urandom_range(0, 3) != 0);
      a = hit ? (BASE | {12'h0, 20'($urandom)} & ~32'h3)
              : (32'h8000_0000 | 32'($urandom) & ~32'h3);
      xfer(1'($urandom), a, $urandom, hit, 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
