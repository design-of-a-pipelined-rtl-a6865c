// simd_pkg: opcodes, instruction field layout and shared types of the
// two-lane SIMD CPU.
//
// Instruction formats (32 bits):
//   R  : op[31:26] rd[25:21] rs[20:16] rt[15:11] (unused[10:0])
//   I  : op[31:26] rs[25:21] rt[20:16] imm[15:0]  (loads, stores, movs, beqs, gts)
//   J  : op[31:26] target[25:0]                   (jals)
// The R layout and the opcodes 1..10 of the integer arithmetic instructions
// follow the published assembler listing; lws2 = 14 and movs = 42 come from
// the published test program; every other opcode number is this design's own
// choice. Opcode 0 is a no-operation.
// A double-data ("...2") instruction works on a register pair: the named
// register n and its neighbour n+1.
package simd_pkg;

  typedef enum logic [5:0] {
    OP_NOP    = 6'd0,
    OP_ADDS2  = 6'd1,  OP_ADDS  = 6'd2,
    OP_SUBS2  = 6'd3,  OP_SUBS  = 6'd4,
    OP_ANDS2  = 6'd5,  OP_ANDS  = 6'd6,
    OP_ORS2   = 6'd7,  OP_ORS   = 6'd8,
    OP_XORS2  = 6'd9,  OP_XORS  = 6'd10,
    OP_LWS    = 6'd13, OP_LWS2  = 6'd14,
    OP_SWS    = 6'd23, OP_SWS2  = 6'd24,
    OP_BEQS   = 6'd25, OP_GTS   = 6'd26,
    OP_JALS   = 6'd27, OP_JRS   = 6'd28,
    OP_FLWS   = 6'd32, OP_FLWS2 = 6'd33,
    OP_FSWS   = 6'd34, OP_FSWS2 = 6'd35,
    OP_MOVS   = 6'd42,
    OP_FADDS  = 6'd48, OP_FADDS2 = 6'd49,
    OP_FSUBS  = 6'd50, OP_FSUBS2 = 6'd51,
    OP_FMULS  = 6'd52, OP_FMULS2 = 6'd53,
    OP_FDIVS  = 6'd54, OP_FDIVS2 = 6'd55,
    OP_FSQRTS = 6'd56, OP_FSQRTS2 = 6'd57,
    OP_FI2FS  = 6'd58, OP_FI2FS2 = 6'd59,
    OP_FF2IS  = 6'd60, OP_FF2IS2 = 6'd61
  } opcode_e;

  // Integer ALU operations.
  typedef enum logic [2:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_PASSB
  } alu_op_e;

  // FPU operations; the encoding mirrors the published select signals:
  // bit 0 = sel[0] (add/subtract), bits 2:1 = sel[2:1] (adder, multiplier,
  // divider, square root), bit 3 = conversion, bit 4 = i_f (1: int->float).
  typedef enum logic [4:0] {
    FOP_ADD  = 5'b00000,
    FOP_SUB  = 5'b00001,
    FOP_MUL  = 5'b00010,
    FOP_DIV  = 5'b00100,
    FOP_SQRT = 5'b00110,
    FOP_F2I  = 5'b01000,
    FOP_I2F  = 5'b11000
  } fop_e;

  // Decoded control of one instruction.
  typedef struct packed {
    logic        valid;       // a real instruction (not a bubble/nop)
    logic        dual;        // double-data: also acts on register n+1
    logic        int_wr;      // writes the integer register file
    logic        fp_wr;       // writes the FP register file
    logic        fp_op;       // executes in the FPU (E1..E3)
    logic        ld;          // memory read (lws/lws2/flws/flws2)
    logic        st;          // memory write (sws/sws2/fsws/fsws2)
    logic        st_fp;       // store data comes from the FP registers
    logic        use_a;       // reads integer register src_a (pair if dual)
    logic        use_b;       // reads integer register src_b (pair if dual)
    logic        use_fa;      // reads FP register src_a (pair if dual)
    logic        use_fb;      // reads FP register src_b (pair if dual)
    logic        use_imm;     // ALU B operand is the sign-extended immediate
    logic        is_divsqrt;  // needs the Newton-Raphson iteration in ID
    logic        beq;         // branch if rs == rt
    logic        bgt;         // branch if rs > rt (signed)
    logic        jal;         // jump and link (r31 <- return address)
    logic        jr;          // jump to register rs
    alu_op_e     alu_op;
    fop_e        fop;
    logic [4:0]  dst;         // destination register
    logic [4:0]  src_a;       // first source (R: [20:16], I: base [25:21])
    logic [4:0]  src_b;       // second source (R: [15:11], I: data [20:16])
    logic [15:0] imm;
    logic [25:0] target;
  } ctrl_t;

  // What the hazard logic needs to know about an instruction in flight.
  typedef struct packed {
    logic       valid;
    logic       int_wr;   // result goes to the integer registers
    logic       fp_wr;    // result goes to the FP registers
    logic       ld;       // result comes from memory (ready after MEM)
    logic       conv;     // FP conversion (ready after E1)
    logic       dual;
    logic [4:0] dst;
  } stage_t;

  // Second register of a pair.
  function automatic logic [4:0] pair(input logic [4:0] r);
    return r + 5'd1;
  endfunction

  // Does an instruction writing dst (and dst+1 if dual) write register r?
  function automatic logic writes_reg(input stage_t s, input logic [4:0] r);
    return s.valid && (r == s.dst || (s.dual && r == pair(s.dst)));
  endfunction

endpackage
