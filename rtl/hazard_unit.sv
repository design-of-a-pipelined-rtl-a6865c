// hazard_unit: detects the data hazards that the forwarding paths of the
// SIMD CPU cannot cover and raises the matching stall (pipeline suspend)
// signal for the instruction in ID.
//
//   stall_lw  : an integer source is loaded by lws/lws2 now in EXE; the data
//               appears only at the end of MEM, so ID waits one cycle and
//               then takes it from MEM.
//   stall_flw : an FP source (operand of an FP operation or data of
//               fsws/fsws2) is loaded by flws/flws2 now in EXE.
//   stall_fpu : an FP operation reads a register an older FP operation will
//               write and that result is not out yet (producer in E1, or in
//               E2 unless it is a conversion, which is done after E1).
//   stall_fsw : the same for the store data of fsws/fsws2.
// Register pairs of double-data instructions are compared lane by lane.
// Purely combinational; inputs are the decoded ID instruction and the
// instructions in EXE (integer pipe), E1 and E2 (FP pipe). The four signals
// are the document's; which producer/consumer pairs stall follows from the
// forwarding paths this design provides.
module hazard_unit
  import simd_pkg::*;
(
  input  ctrl_t  id,
  input  stage_t ex,
  input  stage_t e1,
  input  stage_t e2,
  output logic   stall_lw,
  output logic   stall_flw,
  output logic   stall_fpu,
  output logic   stall_fsw
);

  // Integer and FP registers read by the ID instruction (up to 4 each).
  logic [3:0]      int_rd, fp_rd;
  logic [3:0][4:0] rreg;

  assign rreg   = {pair(id.src_b), id.src_b, pair(id.src_a), id.src_a};
  assign int_rd = {id.use_b & id.dual, id.use_b, id.use_a & id.dual, id.use_a};
  assign fp_rd  = {id.use_fb & id.dual, id.use_fb, id.use_fa & id.dual, id.use_fa};

  always_comb begin
    logic hit_ld_int, hit_ld_fp, hit_fp_busy;
    stage_t e2_slow;
    e2_slow       = e2;
    e2_slow.valid = e2.valid & ~e2.conv;
    hit_ld_int  = 1'b0;
    hit_ld_fp   = 1'b0;
    hit_fp_busy = 1'b0;
    for (int p = 0; p < 4; p++) begin
      if (int_rd[p] && ex.ld && ex.int_wr && writes_reg(ex, rreg[p])) hit_ld_int = 1'b1;
      if (fp_rd[p]  && ex.ld && ex.fp_wr  && writes_reg(ex, rreg[p])) hit_ld_fp  = 1'b1;
      if (fp_rd[p]  && (writes_reg(e1, rreg[p]) || writes_reg(e2_slow, rreg[p])))
        hit_fp_busy = 1'b1;
    end
    stall_lw  = id.valid & hit_ld_int;
    stall_flw = id.valid & hit_ld_fp;
    stall_fpu = id.valid & id.fp_op & hit_fp_busy;
    stall_fsw = id.valid & id.st_fp & hit_fp_busy;
  end

endmodule
