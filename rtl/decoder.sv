// decoder: turns a 32-bit instruction into the control bundle (ctrl_t) used
// by the ID stage of the SIMD CPU.
//
// Purely combinational. Integer arithmetic (adds/subs/ands/ors/xors and their
// double-data "2" forms) uses the R format rd, rs, rt; loads, stores and movs
// use the I format with the base register in [25:21] and the data register in
// [20:16]; beqs/gts compare [25:21] with [20:16] and branch by the 16-bit
// word offset; jals jumps to the 26-bit word target and links r31; jrs jumps
// to [25:21]. FP arithmetic uses the R format on the FP registers; fi2fs and
// ff2is convert between FP-register contents (as in the published
// instruction table: f6 = i2f[f2]). Unknown opcodes decode as a no-operation.
// The instruction list follows the document; the field positions of the
// I/J formats and most opcode numbers are this design's own (see simd_pkg).
module decoder
  import simd_pkg::*;
(
  input  logic [31:0] inst,
  output ctrl_t       ctrl
);

  logic [5:0] op;
  assign op = inst[31:26];

  always_comb begin
    ctrl          = '0;
    ctrl.alu_op   = ALU_ADD;
    ctrl.fop      = FOP_ADD;
    ctrl.imm      = inst[15:0];
    ctrl.target   = inst[25:0];
    ctrl.valid    = 1'b1;
    unique case (op)
      OP_ADDS2, OP_ADDS, OP_SUBS2, OP_SUBS, OP_ANDS2, OP_ANDS,
      OP_ORS2, OP_ORS, OP_XORS2, OP_XORS: begin
        ctrl.dual   = op[0];  // the "2" forms have odd opcodes
        ctrl.int_wr = 1'b1;
        ctrl.use_a  = 1'b1;
        ctrl.use_b  = 1'b1;
        ctrl.dst    = inst[25:21];
        ctrl.src_a  = inst[20:16];
        ctrl.src_b  = inst[15:11];
        case (op)
          OP_ADDS2, OP_ADDS: ctrl.alu_op = ALU_ADD;
          OP_SUBS2, OP_SUBS: ctrl.alu_op = ALU_SUB;
          OP_ANDS2, OP_ANDS: ctrl.alu_op = ALU_AND;
          OP_ORS2,  OP_ORS:  ctrl.alu_op = ALU_OR;
          default:           ctrl.alu_op = ALU_XOR;
        endcase
      end
      OP_MOVS: begin
        ctrl.int_wr  = 1'b1;
        ctrl.use_imm = 1'b1;
        ctrl.alu_op  = ALU_PASSB;
        ctrl.dst     = inst[20:16];
      end
      OP_LWS, OP_LWS2, OP_FLWS, OP_FLWS2: begin
        ctrl.dual    = (op == OP_LWS2) || (op == OP_FLWS2);
        ctrl.ld      = 1'b1;
        ctrl.int_wr  = (op == OP_LWS) || (op == OP_LWS2);
        ctrl.fp_wr   = (op == OP_FLWS) || (op == OP_FLWS2);
        ctrl.use_a   = 1'b1;
        ctrl.use_imm = 1'b1;
        ctrl.src_a   = inst[25:21];
        ctrl.dst     = inst[20:16];
      end
      OP_SWS, OP_SWS2, OP_FSWS, OP_FSWS2: begin
        ctrl.dual    = (op == OP_SWS2) || (op == OP_FSWS2);
        ctrl.st      = 1'b1;
        ctrl.st_fp   = (op == OP_FSWS) || (op == OP_FSWS2);
        ctrl.use_a   = 1'b1;
        ctrl.use_b   = (op == OP_SWS) || (op == OP_SWS2);
        ctrl.use_fb  = (op == OP_FSWS) || (op == OP_FSWS2);
        ctrl.use_imm = 1'b1;
        ctrl.src_a   = inst[25:21];
        ctrl.src_b   = inst[20:16];
      end
      OP_BEQS, OP_GTS: begin
        ctrl.beq    = (op == OP_BEQS);
        ctrl.bgt    = (op == OP_GTS);
        ctrl.use_a  = 1'b1;
        ctrl.use_b  = 1'b1;
        ctrl.src_a  = inst[25:21];
        ctrl.src_b  = inst[20:16];
      end
      OP_JALS: begin
        ctrl.jal    = 1'b1;
        ctrl.int_wr = 1'b1;
        ctrl.alu_op = ALU_PASSB;
        ctrl.dst    = 5'd31;
      end
      OP_JRS: begin
        ctrl.jr     = 1'b1;
        ctrl.use_a  = 1'b1;
        ctrl.src_a  = inst[25:21];
      end
      OP_FADDS, OP_FADDS2, OP_FSUBS, OP_FSUBS2, OP_FMULS, OP_FMULS2,
      OP_FDIVS, OP_FDIVS2, OP_FSQRTS, OP_FSQRTS2, OP_FI2FS, OP_FI2FS2,
      OP_FF2IS, OP_FF2IS2: begin
        ctrl.dual   = op[0];
        ctrl.fp_op  = 1'b1;
        ctrl.fp_wr  = 1'b1;
        ctrl.use_fa = 1'b1;
        ctrl.dst    = inst[25:21];
        ctrl.src_a  = inst[20:16];
        ctrl.src_b  = inst[15:11];
        case (op)
          OP_FADDS, OP_FADDS2: begin ctrl.fop = FOP_ADD; ctrl.use_fb = 1'b1; end
          OP_FSUBS, OP_FSUBS2: begin ctrl.fop = FOP_SUB; ctrl.use_fb = 1'b1; end
          OP_FMULS, OP_FMULS2: begin ctrl.fop = FOP_MUL; ctrl.use_fb = 1'b1; end
          OP_FDIVS, OP_FDIVS2: begin
            ctrl.fop = FOP_DIV; ctrl.use_fb = 1'b1; ctrl.is_divsqrt = 1'b1;
          end
          OP_FSQRTS, OP_FSQRTS2: begin ctrl.fop = FOP_SQRT; ctrl.is_divsqrt = 1'b1; end
          OP_FI2FS, OP_FI2FS2:   ctrl.fop = FOP_I2F;
          default:               ctrl.fop = FOP_F2I;
        endcase
      end
      default: ctrl.valid = 1'b0;  // nop and unused opcodes
    endcase
  end

endmodule
