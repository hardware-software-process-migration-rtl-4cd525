// rm_exec_unit: execution unit (controller and ALU) of the Real Machine.
//
// Runs one invocation of a CIS process: on start it begins at program
// address 0 and executes instructions until HALT, then pulses done and waits
// for the next simcycle. As in the description, it is not pipelined and
// spends two clock cycles on every instruction, which lets the register file
// get by with one read port and removes all data hazards:
//
//   FETCH  the instruction is read from program memory (asynchronous LUT RAM)
//          into the instruction register; register rs, addressed straight
//          from the memory output, is read into operand latch A.
//   EXEC   the second register (rt, or rd for a store) is read, the result is
//          computed and written back, data memory is loaded or stored at
//          A + offset, and the program counter moves on or branches.
//
// Timing: start is taken in IDLE only. An invocation of N instructions
// (HALT included) raises done exactly 2*N cycles after the edge that took
// start; busy is high from the edge after start until that done cycle.
// rst returns the controller to IDLE with PC 0. The opcode set and encoding
// are this design's own (see rm_pkg); the two-cycle schedule is the
// description's.
module rm_exec_unit
  import rm_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  logic            start,
  output logic            busy,
  output logic            done,
  // program memory
  output logic [PA_W-1:0] pm_addr,
  input  logic [WORD-1:0] pm_data,
  // register file (one read port, one write port)
  output logic [RA_W-1:0] rf_raddr,
  input  logic [WORD-1:0] rf_rdata,
  output logic            rf_we,
  output logic [RA_W-1:0] rf_waddr,
  output logic [WORD-1:0] rf_wdata,
  // data memory
  output logic [DA_W-1:0] dm_addr,
  input  logic [WORD-1:0] dm_rdata,
  output logic            dm_we,
  output logic [WORD-1:0] dm_wdata
);

  typedef enum logic [1:0] {S_IDLE, S_FETCH, S_EXEC} state_e;

  state_e          state;
  logic [PA_W-1:0] pc;
  instr_t          ir;
  logic [WORD-1:0] a;

  instr_t          fetched;
  logic [WORD-1:0] b;
  logic [WORD-1:0] result;
  logic            writes_rd;
  logic            taken;

  assign fetched = instr_t'(pm_data);
  assign pm_addr = pc;
  assign busy    = (state != S_IDLE);

  // Register read port: rs while fetching, rt (rd for a store) while executing.
  always_comb begin
    if (state == S_EXEC) rf_raddr = (ir.op == OP_ST) ? ir.rd : ir.rt;
    else                 rf_raddr = fetched.rs;
  end
  assign b = rf_rdata;

  // ALU and write-back selection.
  always_comb begin
    result    = '0;
    writes_rd = 1'b0;
    taken     = 1'b0;
    unique case (ir.op)
      OP_ADD:  begin result = a + b;                      writes_rd = 1'b1; end
      OP_SUB:  begin result = a - b;                      writes_rd = 1'b1; end
      OP_AND:  begin result = a & b;                      writes_rd = 1'b1; end
      OP_OR:   begin result = a | b;                      writes_rd = 1'b1; end
      OP_XOR:  begin result = a ^ b;                      writes_rd = 1'b1; end
      OP_SLTU: begin result = WORD'(a < b);               writes_rd = 1'b1; end
      OP_LDI:  begin result = WORD'($signed(ir[7:0]));    writes_rd = 1'b1; end
      OP_LD:   begin result = dm_rdata;                   writes_rd = 1'b1; end
      OP_MOV:  begin result = a;                          writes_rd = 1'b1; end
      OP_NOT:  begin result = ~a;                         writes_rd = 1'b1; end
      OP_BZ:   taken = (a == '0);
      OP_BNZ:  taken = (a != '0);
      OP_JMP:  taken = 1'b1;
      default: ;
    endcase
  end

  assign dm_addr  = DA_W'(a) + DA_W'(ir[4:0]);
  assign dm_we    = (state == S_EXEC) && (ir.op == OP_ST);
  assign dm_wdata = b;
  assign rf_we    = (state == S_EXEC) && writes_rd;
  assign rf_waddr = ir.rd;
  assign rf_wdata = result;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      pc    <= '0;
      ir    <= '0;
      a     <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          pc <= '0;
          if (start) state <= S_FETCH;
        end
        S_FETCH: begin
          ir    <= fetched;
          a     <= rf_rdata;
          state <= S_EXEC;
        end
        S_EXEC: begin
          if (ir.op == OP_HALT) begin
            state <= S_IDLE;
            pc    <= '0;
            done  <= 1'b1;
          end else begin
            state <= S_FETCH;
            pc    <= taken ? PA_W'(ir[4:0]) : pc + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A new invocation may only be requested while the previous one is over.
  a_start_idle: assert property (@(posedge clk) disable iff (rst) start |-> !busy)
    else $error("rm_exec_unit: start while busy");

endmodule
