// simd_cpu: pipelined CPU with two integer ALUs and two FPUs working as a
// two-lane SIMD machine (single instruction, double data).
//
// One instruction is fetched and decoded per cycle. Integer instructions,
// loads, stores and jumps then flow through the integer module
// (IF ID EXE MEM WB); FP arithmetic and conversions through the
// floating-point module (IF ID E1 E2 E3 WB). Each module has its own
// register file; both share one data memory. A double-data ("2")
// instruction drives both lanes: lane 0 works on the named registers, lane
// 1 on their neighbours (n+1), so adds2 r6,r4,r2 gives r6 = r4 + r2 and
// r7 = r5 + r3 in the same cycle.
//
// Hazards:
//   * internal forwarding: integer results go to ID from EXE (ALU output)
//     and MEM (ALU result or load data); FP results from E2 (conversions),
//     E3, and loaded FP data from MEM; both register files write through
//     during WB.
//   * suspend: stall_lw, stall_flw, stall_fpu, stall_fsw (hazard_unit) and
//     stall_div_sqrt, which holds fdivs/fsqrts in ID while nr_iter runs the
//     Newton-Raphson iteration (ITE merged with ID; fetch is suspended).
//     A stall holds PC and the IF/ID register and sends a bubble on.
//   * movs needs only IF and ID: it writes its immediate into the integer
//     register file at the end of ID (third write port, which wins over
//     the WB port) and sends a bubble on. So that an older instruction
//     cannot overwrite it later, movs waits in ID (stall_movs, internal)
//     while an instruction in EXE or MEM still has to write the same
//     register.
//   * control: beqs, gts, jals and jrs are resolved in ID (comparison of
//     forwarded operands) with one delay slot: the instruction after a
//     branch or jump always executes. Branch target = address of the
//     delay slot + 4 x offset; jals links r31 = own address + 8.
//
// Ports: rst_n is an asynchronous active-low reset; the host ports load the
// instruction memory (imem_we) and data memory (host_dmem_we, which takes
// lane-0's memory port, meant for use while rst_n is low) and read back the
// registers and memory. The stall_* and fwd_* outputs and branch_taken are
// one-cycle event flags; retire_int/retire_fp pulse when an instruction
// writes back (retire_int also when movs writes from ID). Structure, stage
// counts, the two-stage movs, the stall signals and the delayed branch
// follow the document; memory sizes, encodings, the host ports, the exact
// forwarding sources and the movs write-after-write wait are this design's
// choices.
module simd_cpu
  import simd_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024,
  parameter int unsigned NR_ITER    = 3
) (
  input  logic        clk,
  input  logic        rst_n,
  // host access
  input  logic        imem_we,
  input  logic [31:0] imem_addr,
  input  logic [31:0] imem_wdata,
  input  logic        host_dmem_we,
  input  logic [31:0] host_dmem_addr,
  input  logic [31:0] host_dmem_wdata,
  input  logic [31:0] dbg_dmem_addr,
  output logic [31:0] dbg_dmem_rdata,
  input  logic [4:0]  dbg_ireg_addr,
  output logic [31:0] dbg_ireg_rdata,
  input  logic [4:0]  dbg_freg_addr,
  output logic [31:0] dbg_freg_rdata,
  // status
  output logic [31:0] pc,
  output logic        stall_lw,
  output logic        stall_flw,
  output logic        stall_fpu,
  output logic        stall_fsw,
  output logic        stall_div_sqrt,
  output logic        fwd_exe,
  output logic        fwd_mem,
  output logic        fwd_fp,
  output logic        branch_taken,
  output logic        retire_int,
  output logic        retire_fp
);

  // ------------------------------------------------------------------ IF
  logic [31:0] if_inst;
  logic        stall;

  inst_mem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk, .pc(pc), .inst(if_inst),
    .we(imem_we), .waddr(imem_addr), .wdata(imem_wdata)
  );

  logic [31:0] id_inst, id_pc;
  logic [31:0] next_pc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc      <= '0;
      id_inst <= '0;
      id_pc   <= '0;
    end else if (!stall) begin
      pc      <= next_pc;
      id_inst <= if_inst;
      id_pc   <= pc;
    end
  end

  // ------------------------------------------------------------------ ID
  ctrl_t id;
  decoder u_dec (.inst(id_inst), .ctrl(id));

  // Integer pipeline registers
  typedef struct packed {
    ctrl_t            c;
    logic [1:0][31:0] a;     // ALU operand A per lane
    logic [1:0][31:0] b;     // ALU operand B per lane
    logic [1:0][31:0] sd;    // store data per lane
  } ex_t;

  typedef struct packed {
    ctrl_t            c;
    logic [1:0][31:0] y;     // ALU result / address
    logic [1:0][31:0] sd;
  } mem_t;

  typedef struct packed {
    ctrl_t            c;
    logic [1:0][31:0] d;
  } wb_t;

  // FP pipeline registers
  typedef struct packed {
    logic             valid;
    logic             dual;
    logic [4:0]       dst;
    fop_e             fop;
  } fstage_t;

  ex_t              ex_q;
  mem_t             mem_q;
  wb_t              wb_q;
  fstage_t          e1_q, e2_q, e3_q, fwb_q;
  logic [1:0][31:0] e1_a, e1_b, e1_r;
  logic [1:0][31:0] fwb_d;

  // Register files
  logic [3:0][4:0]  rf_addr;
  logic [3:0][31:0] irf_rd, frf_rd;
  logic [2:0]       irf_we;
  logic [2:0][4:0]  irf_wa;
  logic [2:0][31:0] irf_wd;
  logic [3:0]       frf_we;
  logic [3:0][4:0]  frf_wa;
  logic [3:0][31:0] frf_wd;

  // read ports: 0 = src_a, 1 = src_a+1, 2 = src_b, 3 = src_b+1
  assign rf_addr = {pair(id.src_b), id.src_b, pair(id.src_a), id.src_a};

  int_regfile #(.NREGS(32), .NWR(3)) u_irf (
    .clk, .rst_n, .raddr(rf_addr), .rdata(irf_rd),
    .we(irf_we), .waddr(irf_wa), .wdata(irf_wd),
    .dbg_addr(dbg_ireg_addr), .dbg_rdata(dbg_ireg_rdata)
  );

  fp_regfile #(.NREGS(32), .NWR(4)) u_frf (
    .clk, .rst_n, .raddr(rf_addr), .rdata(frf_rd),
    .we(frf_we), .waddr(frf_wa), .wdata(frf_wd),
    .dbg_addr(dbg_freg_addr), .dbg_rdata(dbg_freg_rdata)
  );

  // Results available for forwarding
  logic [1:0][31:0] ex_y;        // ALU outputs in EXE
  logic [1:0][31:0] mem_res;     // MEM stage result (ALU or load)
  logic [1:0][31:0] cvt_e2;      // FPU conversion results in E2
  logic [1:0][31:0] fpu_y;       // FPU results in E3

  function automatic stage_t int_stage(input ctrl_t c);
    stage_t s;
    s.valid  = c.valid & (c.int_wr | c.fp_wr);
    s.int_wr = c.int_wr;
    s.fp_wr  = c.fp_wr;
    s.ld     = c.ld;
    s.conv   = 1'b0;
    s.dual   = c.dual;
    s.dst    = c.dst;
    return s;
  endfunction

  function automatic stage_t fp_stage(input fstage_t f);
    stage_t s;
    s.valid  = f.valid;
    s.int_wr = 1'b0;
    s.fp_wr  = 1'b1;
    s.ld     = 1'b0;
    s.conv   = f.fop[3];
    s.dual   = f.dual;
    s.dst    = f.dst;
    return s;
  endfunction

  stage_t st_ex, st_mem, st_e1, st_e2, st_e3;
  assign st_ex  = int_stage(ex_q.c);
  assign st_mem = int_stage(mem_q.c);
  assign st_e1  = fp_stage(e1_q);
  assign st_e2  = fp_stage(e2_q);
  assign st_e3  = fp_stage(e3_q);

  // Forwarding: the youngest producer wins; the register files write through.
  logic [3:0][31:0] iop, fop;
  logic [3:0]       fwd_exe_p, fwd_mem_p, fwd_fp_p;
  always_comb begin
    for (int p = 0; p < 4; p++) begin
      logic lane;
      lane   = 1'b0;
      iop[p] = irf_rd[p];
      fop[p] = frf_rd[p];
      fwd_exe_p[p] = 1'b0;
      fwd_mem_p[p] = 1'b0;
      fwd_fp_p[p]  = 1'b0;
      // integer sources
      if (st_ex.int_wr && !st_ex.ld && writes_reg(st_ex, rf_addr[p])) begin
        lane = (rf_addr[p] != st_ex.dst);
        iop[p] = ex_y[lane];
        fwd_exe_p[p] = 1'b1;
      end else if (st_mem.int_wr && writes_reg(st_mem, rf_addr[p])) begin
        lane = (rf_addr[p] != st_mem.dst);
        iop[p] = mem_res[lane];
        fwd_mem_p[p] = 1'b1;
      end
      // FP sources (an E1/EXE producer always stalls)
      if (st_e2.conv && writes_reg(st_e2, rf_addr[p])) begin
        lane = (rf_addr[p] != st_e2.dst);
        fop[p] = cvt_e2[lane];
        fwd_fp_p[p] = 1'b1;
      end else if (st_mem.fp_wr && writes_reg(st_mem, rf_addr[p])) begin
        lane = (rf_addr[p] != st_mem.dst);
        fop[p] = mem_res[lane];
        fwd_fp_p[p] = 1'b1;
      end else if (writes_reg(st_e3, rf_addr[p])) begin
        lane = (rf_addr[p] != st_e3.dst);
        fop[p] = fpu_y[lane];
        fwd_fp_p[p] = 1'b1;
      end
    end
  end

  logic [3:0] int_used, fp_used;
  assign int_used = {id.use_b & id.dual, id.use_b, id.use_a & id.dual, id.use_a};
  assign fp_used  = {id.use_fb & id.dual, id.use_fb, id.use_fa & id.dual, id.use_fa};

  // Stalls
  logic stall_haz, stall_movs, id_movs, movs_go;
  logic [1:0] ds_busy, ds_done;
  logic [1:0][31:0] ds_r;
  logic ds_start, ds_ack;

  hazard_unit u_haz (
    .id(id), .ex(st_ex), .e1(st_e1), .e2(st_e2),
    .stall_lw, .stall_flw, .stall_fpu, .stall_fsw
  );

  assign stall_haz      = stall_lw | stall_flw | stall_fpu | stall_fsw;
  assign stall_div_sqrt = id.valid & id.is_divsqrt & ~ds_done[0];
  assign ds_start       = id.valid & id.is_divsqrt & ~stall_haz & ~ds_done[0];
  assign ds_ack         = id.valid & id.is_divsqrt & ~stall_haz & ds_done[0];
  assign id_movs        = id.valid & (id_inst[31:26] == 6'(OP_MOVS));
  assign stall_movs     = id_movs & ((st_ex.int_wr & writes_reg(st_ex, id.dst)) |
                                     (st_mem.int_wr & writes_reg(st_mem, id.dst)));
  assign stall          = stall_haz | stall_div_sqrt | stall_movs;
  assign movs_go        = id_movs & ~stall;

  // Branches and jumps (decided in ID, one delay slot)
  logic [31:0] imm_sx, pc4, br_target;
  logic        taken;
  assign imm_sx    = {{16{id.imm[15]}}, id.imm};
  assign pc4       = id_pc + 32'd4;
  assign br_target = pc4 + (imm_sx << 2);
  always_comb begin
    taken   = 1'b0;
    next_pc = pc + 32'd4;
    if (id.beq && ~|(iop[0] ^ iop[2])) begin
      taken = 1'b1; next_pc = br_target;
    end else if (id.bgt && ($signed(iop[0]) > $signed(iop[2]))) begin
      taken = 1'b1; next_pc = br_target;
    end else if (id.jal) begin
      taken = 1'b1; next_pc = {pc4[31:28], id.target, 2'b00};
    end else if (id.jr) begin
      taken = 1'b1; next_pc = iop[0];
    end
  end

  // ID -> EXE / E1
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ex_q <= '0;
      e1_q <= '0;
      e1_a <= '0;
      e1_b <= '0;
      e1_r <= '0;
    end else begin
      ex_q   <= '0;
      e1_q   <= '0;
      if (!stall && id.valid && !id.fp_op && !id_movs) begin
        ex_q.c    <= id;
        ex_q.a[0] <= iop[0];
        ex_q.a[1] <= iop[1];
        ex_q.b[0] <= id.jal ? id_pc + 32'd8 : (id.use_imm ? imm_sx : iop[2]);
        ex_q.b[1] <= id.use_imm ? imm_sx : iop[3];
        ex_q.sd[0] <= id.st_fp ? fop[2] : iop[2];
        ex_q.sd[1] <= id.st_fp ? fop[3] : iop[3];
      end
      if (!stall && id.valid && id.fp_op) begin
        e1_q.valid <= 1'b1;
        e1_q.dual  <= id.dual;
        e1_q.dst   <= id.dst;
        e1_q.fop   <= id.fop;
      end
      if (!stall) begin
        e1_a <= {fop[1], fop[0]};
        e1_b <= {fop[3], fop[2]};
        e1_r <= ds_r;
      end
    end
  end

  // ------------------------------------------------------------------ EXE
  for (genvar l = 0; l < 2; l++) begin : g_alu
    int_alu u_alu (.op(ex_q.c.alu_op), .a(ex_q.a[l]), .b(ex_q.b[l]), .y(ex_y[l]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) mem_q <= '0;
    else begin
      mem_q.c  <= ex_q.c;
      mem_q.y  <= ex_y;
      mem_q.sd <= ex_q.sd;
    end
  end

  // ------------------------------------------------------------------ MEM
  logic [1:0]       dm_we;
  logic [1:0][31:0] dm_addr, dm_wdata, dm_rdata;

  always_comb begin
    dm_we    = {mem_q.c.st & mem_q.c.dual, mem_q.c.st};
    dm_addr  = mem_q.y;
    dm_wdata = mem_q.sd;
    if (host_dmem_we) begin
      dm_we[0]    = 1'b1;
      dm_addr[0]  = host_dmem_addr;
      dm_wdata[0] = host_dmem_wdata;
    end
  end

  data_mem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk, .we(dm_we), .addr(dm_addr), .wdata(dm_wdata), .rdata(dm_rdata),
    .dbg_addr(dbg_dmem_addr), .dbg_rdata(dbg_dmem_rdata)
  );

  assign mem_res = mem_q.c.ld ? dm_rdata : mem_q.y;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) wb_q <= '0;
    else begin
      wb_q.c <= mem_q.c;
      wb_q.d <= mem_res;
    end
  end

  // ------------------------------------------------------------------ WB (integer module)
  // ports 0/1: WB lanes; port 2: movs from ID (younger, so it wins)
  assign irf_we = {movs_go, {2{wb_q.c.valid & wb_q.c.int_wr}} & {wb_q.c.dual, 1'b1}};
  assign irf_wa = {id.dst, pair(wb_q.c.dst), wb_q.c.dst};
  assign irf_wd = {imm_sx, wb_q.d};

  // ------------------------------------------------------------------ E1..E3 (FP module)
  for (genvar l = 0; l < 2; l++) begin : g_fpu
    fpu #(.NR_ITER(NR_ITER)) u_fpu (
      .clk, .rst_n,
      .ds_start(ds_start), .ds_mode(id.fop == FOP_SQRT),
      .ds_x(id.fop == FOP_SQRT ? fop[l] : fop[2+l]), .ds_ack(ds_ack),
      .ds_busy(ds_busy[l]), .ds_done(ds_done[l]), .ds_r(ds_r[l]),
      .op(e1_q.fop), .a(e1_a[l]), .b(e1_b[l]), .r(e1_r[l]),
      .cvt_e2(cvt_e2[l]), .y(fpu_y[l])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e2_q  <= '0;
      e3_q  <= '0;
      fwb_q <= '0;
      fwb_d <= '0;
    end else begin
      e2_q  <= e1_q;
      e3_q  <= e2_q;
      fwb_q <= e3_q;
      fwb_d <= fpu_y;
    end
  end

  // ------------------------------------------------------------------ WB (FP module)
  // ports 0/1: FPU lanes; ports 2/3: flws/flws2 (younger, so they win)
  assign frf_we = {{2{wb_q.c.valid & wb_q.c.fp_wr}} & {wb_q.c.dual, 1'b1},
                   {2{fwb_q.valid}} & {fwb_q.dual, 1'b1}};
  assign frf_wa = {pair(wb_q.c.dst), wb_q.c.dst, pair(fwb_q.dst), fwb_q.dst};
  assign frf_wd = {wb_q.d, fwb_d};

  // ------------------------------------------------------------------ status
  assign fwd_exe      = ~stall & |(fwd_exe_p & int_used);
  assign fwd_mem      = ~stall & |(fwd_mem_p & int_used);
  assign fwd_fp       = ~stall & |(fwd_fp_p & fp_used);
  assign branch_taken = ~stall & taken;
  assign retire_int   = wb_q.c.valid | movs_go;
  assign retire_fp    = fwb_q.valid;

endmodule
