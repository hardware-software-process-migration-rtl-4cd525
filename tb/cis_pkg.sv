// cis_pkg: testbench helpers for the Common Instruction Set (CIS).
//
// Holds an assembler (instruction builders), a reference interpreter that
// runs one invocation of a process on a software copy of its state (the
// testbenches use it both as the expected-value model and as the software
// "virtual machine" that runs processes not migrated to hardware), and the
// CIS program of one even-odd transposition sort process.
package cis_pkg;
  import rm_pkg::*;

  typedef logic [WORD-1:0] word_t;

  typedef struct {
    word_t pm [PMEM_DEPTH];
    word_t dm [DMEM_DEPTH];
    word_t rf [NREGS];
  } proc_state_t;

  function automatic word_t enc_r(opcode_e op, int rd, int rs, int rt);
    return {op, 3'(rd), 3'(rs), 3'(rt), 3'b000};
  endfunction

  function automatic word_t enc_i(opcode_e op, int rd, int rs, int imm);
    return {op, 3'(rd), 3'(rs), 1'b0, 5'(imm)};
  endfunction

  function automatic word_t enc_ldi(int rd, int imm);
    return {OP_LDI, 3'(rd), 1'b0, 8'(imm)};
  endfunction

  // Runs one invocation from address 0 to HALT (or max_instr instructions).
  // Returns the number of instructions executed, HALT included.
  function automatic int run_invocation(ref proc_state_t s, input word_t in0,
                                        input word_t in1, input int max_instr = 1000);
    int pc = 0;
    int n = 0;
    while (n < max_instr) begin
      word_t ins = s.pm[pc];
      int op = int'(ins[15:12]);
      int rd = int'(ins[11:9]);
      int rs = int'(ins[8:6]);
      int rt = int'(ins[5:3]);
      int off = int'(ins[4:0]);
      word_t a, b;
      a = (rs == 6) ? in0 : (rs == 7) ? in1 : s.rf[rs];
      b = (rt == 6) ? in0 : (rt == 7) ? in1 : s.rf[rt];
      n++;
      pc = (pc + 1) % PMEM_DEPTH;
      case (op)
        0:  return n;
        1:  s.rf[rd] = a + b;
        2:  s.rf[rd] = a - b;
        3:  s.rf[rd] = a & b;
        4:  s.rf[rd] = a | b;
        5:  s.rf[rd] = a ^ b;
        6:  s.rf[rd] = (a < b) ? 16'd1 : 16'd0;
        7:  s.rf[rd] = {{8{ins[7]}}, ins[7:0]};
        8:  s.rf[rd] = s.dm[(int'(a) + off) % DMEM_DEPTH];
        9:  s.dm[(int'(a) + off) % DMEM_DEPTH] =
              (rd == 6) ? in0 : (rd == 7) ? in1 : s.rf[rd];
        10: if (a == 0) pc = off;
        11: if (a != 0) pc = off;
        12: pc = off;
        13: s.rf[rd] = a;
        14: s.rf[rd] = ~a;
        default: ;
      endcase
    end
    return n;
  endfunction


  // Random program of len instructions (2..PMEM_DEPTH) ending in HALT. Every
  // branch jumps forward, so each invocation terminates.
  function automatic void random_program(ref proc_state_t s, input int len);
    for (int pc = 0; pc < PMEM_DEPTH; pc++) begin
      word_t w = word_t'($urandom);
      if (pc >= len - 1) w = {OP_HALT, 12'h000};
      else if (w[15:12] inside {4'hA, 4'hB, 4'hC})
        w[4:0] = 5'(pc + 1 + int'($urandom_range(0, len - 2 - pc)));
      else if (w[15:12] == 4'h0) w[15:12] = 4'hF;
      s.pm[pc] = w;
    end
  endfunction

  // Loop test: r0 counts n down to 0 while r1 accumulates r2 into r1 and the
  // running sum is stored to data word r0 + 16; a backward branch closes the
  // loop. Executes 3 + 4*n + 2 instructions for n >= 1.
  function automatic void loop_program(ref proc_state_t s, input int n);
    foreach (s.pm[i]) s.pm[i] = {OP_HALT, 12'h000};
    s.pm[0] = enc_ldi(0, n);
    s.pm[1] = enc_ldi(3, 1);
    s.pm[2] = enc_ldi(1, 0);
    s.pm[3] = enc_r(OP_ADD, 1, 1, 2);      // r1 += r2
    s.pm[4] = enc_i(OP_ST, 1, 0, 16);      // dm[r0+16] = r1
    s.pm[5] = enc_r(OP_SUB, 0, 0, 3);      // r0 -= 1
    s.pm[6] = enc_i(OP_BNZ, 0, 0, 3);
    s.pm[7] = enc_r(OP_OR, 5, 1, 6);       // out = r1 | in0
    s.pm[8] = {OP_HALT, 12'h000};
  endfunction

  // One process of the even-odd transposition sort. The process keeps its
  // number in r5 (its output) and, in data word 0, whether it compares with
  // its right neighbour (nonzero) or its left neighbour (zero) in this
  // simcycle; the role flips every simcycle. Comparing right keeps the
  // smaller number, comparing left keeps the larger, so greater numbers move
  // right. Inputs: r6 = left neighbour's output, r7 = right neighbour's.
  localparam int EOT_LEN = 14;
  function automatic void eot_program(ref proc_state_t s);
    word_t p [EOT_LEN];
    p[0]  = enc_ldi(4, 0);                  // r4 = 0
    p[1]  = enc_i(OP_LD, 0, 4, 0);          // r0 = role
    p[2]  = enc_ldi(1, 1);
    p[3]  = enc_r(OP_XOR, 2, 0, 1);         // r2 = role ^ 1
    p[4]  = enc_i(OP_ST, 2, 4, 0);          // role for next simcycle
    p[5]  = enc_i(OP_BZ, 0, 0, 10);    // if role == 0 goto LEFT
    p[6]  = enc_r(OP_SLTU, 3, 7, 5);        // right < own ?
    p[7]  = enc_i(OP_BZ, 0, 3, 13);
    p[8]  = enc_r(OP_MOV, 5, 7, 0);         // own = right
    p[9]  = enc_i(OP_JMP, 0, 0, 13);
    p[10] = enc_r(OP_SLTU, 3, 5, 6);        // LEFT: own < left ?
    p[11] = enc_i(OP_BZ, 0, 3, 13);
    p[12] = enc_r(OP_MOV, 5, 6, 0);         // own = left
    p[13] = {OP_HALT, 12'h000};
    foreach (s.pm[i]) s.pm[i] = (i < EOT_LEN) ? p[i] : {OP_HALT, 12'h000};
  endfunction

  // Initial state of sort process `idx` holding `value`.
  function automatic void eot_init(ref proc_state_t s, input int idx, input word_t value);
    eot_program(s);
    foreach (s.dm[i]) s.dm[i] = '0;
    foreach (s.rf[i]) s.rf[i] = '0;
    s.dm[0] = (idx % 2 == 0) ? 16'd1 : 16'd0;
    s.rf[5] = value;
  endfunction

endpackage
