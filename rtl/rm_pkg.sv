// rm_pkg: shared types and constants of the Real Machine (RM).
//
// An RM executes processes written in the Common Instruction Set (CIS), a
// small assembly-like instruction set with 16-bit instructions and eight
// 16-bit registers. The word width, register count and memory depths follow
// the design description (16-bit words, eight registers, 32x16 program and data
// memories). The instruction encoding itself is this design's own:
//
//   [15:12] opcode   [11:9] rd (or store source)   [8:6] rs   [5:3] rt
//   LDI:    [7:0]  sign-extended 8-bit immediate
//   LD/ST:  [4:0]  5-bit offset added to rs
//   BZ/BNZ/JMP: [4:0] absolute target address
//
// Registers r5, r6 and r7 are aliased to the RM's I/O: r5 is the output,
// r6 and r7 read input 0 and input 1.
package rm_pkg;

  localparam int unsigned WORD       = 16;
  localparam int unsigned NREGS      = 8;
  localparam int unsigned PMEM_DEPTH = 32;
  localparam int unsigned DMEM_DEPTH = 32;
  localparam int unsigned RA_W       = $clog2(NREGS);
  localparam int unsigned PA_W       = $clog2(PMEM_DEPTH);
  localparam int unsigned DA_W       = $clog2(DMEM_DEPTH);

  localparam logic [RA_W-1:0] REG_OUT = 3'd5;
  localparam logic [RA_W-1:0] REG_IN0 = 3'd6;
  localparam logic [RA_W-1:0] REG_IN1 = 3'd7;

  typedef enum logic [3:0] {
    OP_HALT = 4'h0,  // end of this invocation
    OP_ADD  = 4'h1,  // rd = rs + rt
    OP_SUB  = 4'h2,  // rd = rs - rt
    OP_AND  = 4'h3,  // rd = rs & rt
    OP_OR   = 4'h4,  // rd = rs | rt
    OP_XOR  = 4'h5,  // rd = rs ^ rt
    OP_SLTU = 4'h6,  // rd = (rs < rt) unsigned ? 1 : 0
    OP_LDI  = 4'h7,  // rd = sext(imm8)
    OP_LD   = 4'h8,  // rd = dmem[rs + off5]
    OP_ST   = 4'h9,  // dmem[rs + off5] = rd
    OP_BZ   = 4'hA,  // if rs == 0 goto tgt5
    OP_BNZ  = 4'hB,  // if rs != 0 goto tgt5
    OP_JMP  = 4'hC,  // goto tgt5
    OP_MOV  = 4'hD,  // rd = rs
    OP_NOT  = 4'hE,  // rd = ~rs
    OP_NOP  = 4'hF
  } opcode_e;

  typedef struct packed {
    opcode_e         op;
    logic [RA_W-1:0] rd;
    logic [RA_W-1:0] rs;
    logic [RA_W-1:0] rt;
    logic [2:0]      lo;
  } instr_t;

  // State spaces reachable through the migration port.
  typedef enum logic [1:0] {
    MIG_PMEM = 2'd0,
    MIG_DMEM = 2'd1,
    MIG_RF   = 2'd2,
    MIG_NONE = 2'd3
  } mig_sel_e;

endpackage
