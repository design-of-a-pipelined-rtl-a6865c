// tb_simd_cpu: end-to-end test of the SIMD CPU at its default parameters.
//
// A program is assembled into the instruction memory and data into the data
// memory through the host ports, then the CPU runs from reset. The program
//   * loads six words with lws2 and sums them with adds2/adds, stores the
//     sum, reloads it and uses it at once (load-use stall),
//   * runs a counted loop closed by gts and takes a beqs and a jals/jrs
//     call, each with an instruction in the delay slot that must execute,
//   * in the subroutine, writes with movs (which finishes in ID) a register
//     that an adds and an lws still in flight also write: the younger movs
//     value must be the one that stays,
//   * loads FP pairs with flws2 and uses them at once (stall_flw), chains
//     fadds2 -> fmuls2 (stall_fpu), runs fdivs2 and fsqrts2 (stall_div_sqrt,
//     whose length is checked), converts with fi2fs2/ff2is2 and stores
//     FP results right after they are computed (stall_fsw).
// Registers and memory are then compared with values worked out by hand
// or with double-precision arithmetic, and each hazard mechanism (every
// stall signal, forwarding from EXE, MEM and the FP stages, taken branches)
// must have occurred.
module tb_simd_cpu;
  import tb_fp_pkg::*;

  localparam int NR_ITER = 3;   // default of the CPU

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        imem_we = 1'b0, host_dmem_we = 1'b0;
  logic [31:0] imem_addr = '0, imem_wdata = '0;
  logic [31:0] host_dmem_addr = '0, host_dmem_wdata = '0;
  logic [31:0] dbg_dmem_addr = '0, dbg_dmem_rdata;
  logic [4:0]  dbg_ireg_addr = '0, dbg_freg_addr = '0;
  logic [31:0] dbg_ireg_rdata, dbg_freg_rdata, pc;
  logic        stall_lw, stall_flw, stall_fpu, stall_fsw, stall_div_sqrt;
  logic        fwd_exe, fwd_mem, fwd_fp, branch_taken, retire_int, retire_fp;
  int          checks = 0, failures = 0;

  simd_cpu dut (
    .clk, .rst_n,
    .imem_we, .imem_addr, .imem_wdata,
    .host_dmem_we, .host_dmem_addr, .host_dmem_wdata,
    .dbg_dmem_addr, .dbg_dmem_rdata, .dbg_ireg_addr, .dbg_ireg_rdata,
    .dbg_freg_addr, .dbg_freg_rdata,
    .pc, .stall_lw, .stall_flw, .stall_fpu, .stall_fsw, .stall_div_sqrt,
    .fwd_exe, .fwd_mem, .fwd_fp, .branch_taken, .retire_int, .retire_fp
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- assembler
  function automatic logic [31:0] R(int op, int rd, int rs, int rt);
    return {6'(op), 5'(rd), 5'(rs), 5'(rt), 11'd0};
  endfunction
  function automatic logic [31:0] I(int op, int rs, int rt, int imm);
    return {6'(op), 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] J(int op, int target);
    return {6'(op), 26'(target)};
  endfunction

  localparam int ADDS2 = 1, ADDS = 2, SUBS = 4, LWS = 13, LWS2 = 14, SWS = 23,
                 BEQS = 25, GTS = 26, JALS = 27, JRS = 28, FLWS2 = 33, FSWS = 34,
                 FSWS2 = 35, MOVS = 42, FADDS = 48, FADDS2 = 49, FSUBS = 50, FMULS2 = 53,
                 FDIVS2 = 55, FSQRTS2 = 57, FI2FS2 = 59, FF2IS2 = 61;

  logic [31:0] prog [64];

  task automatic load_program();
    for (int i = 0; i < 64; i++) prog[i] = 32'd0;
    prog[0]  = I(MOVS, 0, 1, 4);
    prog[1]  = I(MOVS, 0, 2, 8);
    prog[2]  = I(MOVS, 0, 3, 12);
    prog[3]  = I(MOVS, 0, 4, 16);
    prog[4]  = I(MOVS, 0, 5, 20);
    prog[5]  = I(LWS2, 0, 6, 0);          // r6 = d[0], r7 = d[1]
    prog[6]  = I(LWS2, 2, 8, 0);          // r8 = d[2], r9 = d[3]
    prog[7]  = I(LWS2, 4, 10, 0);         // r10 = d[4], r11 = d[5]
    prog[8]  = R(ADDS2, 12, 6, 8);
    prog[9]  = R(ADDS2, 14, 10, 12);
    prog[10] = R(ADDS, 16, 14, 15);       // sum of d[0..5]
    prog[11] = I(SWS, 0, 16, 24);         // d[6] = sum
    prog[12] = I(LWS, 0, 17, 24);
    prog[13] = R(SUBS, 18, 17, 1);        // load-use
    prog[14] = I(SWS, 0, 18, 28);         // d[7] = sum - 4
    prog[15] = I(MOVS, 0, 20, 3);
    prog[16] = I(MOVS, 0, 21, 0);
    prog[17] = I(MOVS, 0, 22, 1);
    prog[18] = R(ADDS, 21, 21, 20);       // loop:
    prog[19] = R(SUBS, 20, 20, 22);
    prog[20] = I(GTS, 20, 0, -3);         // r20 > r0 -> loop
    prog[21] = R(ADDS, 23, 23, 22);       // delay slot
    prog[22] = I(BEQS, 20, 0, 2);         // -> 25
    prog[23] = R(ADDS, 24, 22, 22);       // delay slot
    prog[24] = I(MOVS, 0, 25, 99);        // skipped
    prog[25] = J(JALS, 56);
    prog[26] = I(MOVS, 0, 26, 7);         // delay slot
    prog[27] = I(MOVS, 0, 2, 64);
    prog[28] = I(MOVS, 0, 3, 68);
    prog[29] = I(FLWS2, 2, 0, 0);         // f0 = 8.0, f1 = 4.0
    prog[30] = I(FLWS2, 2, 2, 8);         // f2 = 1.5, f3 = 1.5
    prog[31] = R(FADDS2, 4, 0, 2);        // stall_flw
    prog[32] = R(FMULS2, 6, 4, 0);        // stall_fpu
    prog[33] = R(FSUBS, 8, 0, 1);
    prog[34] = R(FDIVS2, 10, 0, 2);       // stall_div_sqrt
    prog[35] = R(FSQRTS2, 12, 0, 0);      // stall_div_sqrt
    prog[36] = I(FSWS2, 2, 6, 32);        // d[24], d[25] = f6, f7
    prog[37] = R(FADDS, 14, 8, 8);
    prog[38] = I(FSWS, 2, 14, 40);        // stall_fsw; d[26] = f14
    prog[39] = I(FLWS2, 2, 16, 24);       // f16 = 7, f17 = -3 (integers)
    prog[40] = R(FI2FS2, 18, 16, 0);      // stall_flw
    prog[41] = R(FADDS2, 20, 18, 18);     // conversion forwarded from E2
    prog[42] = R(FF2IS2, 22, 10, 0);
    prog[43] = I(FSWS2, 2, 22, 48);       // d[28], d[29]
    prog[44] = I(FSWS2, 2, 20, 56);       // d[30], d[31]
    prog[45] = I(FSWS2, 2, 10, 64);       // d[32], d[33]
    prog[46] = I(FSWS2, 2, 12, 72);       // d[34], d[35]
    prog[47] = I(FSWS, 2, 8, 80);         // d[36]
    prog[48] = I(FSWS2, 2, 4, 84);        // d[37], d[38]
    prog[49] = I(BEQS, 0, 0, -1);         // halt: spin here
    prog[56] = R(ADDS, 27, 31, 0);        // subroutine
    prog[57] = R(ADDS, 29, 31, 31);
    prog[58] = I(MOVS, 0, 29, 9);         // must not be overwritten by the adds
    prog[59] = I(LWS, 0, 30, 24);
    prog[60] = I(MOVS, 0, 30, 11);        // must not be overwritten by the load
    prog[61] = R(ADDS, 19, 29, 30);       // reads both movs results at once
    prog[62] = I(JRS, 31, 0, 0);
    prog[63] = I(MOVS, 0, 28, 5);         // delay slot
  endtask

  task automatic host_write_dmem(int word, logic [31:0] v);
    @(negedge clk);
    host_dmem_we = 1'b1; host_dmem_addr = 32'(4 * word); host_dmem_wdata = v;
    @(negedge clk);
    host_dmem_we = 1'b0;
  endtask

  task automatic expect_reg(input bit fp, input int r, input logic [31:0] want);
    if (fp) dbg_freg_addr = 5'(r); else dbg_ireg_addr = 5'(r);
    #1;
    checks++;
    if ((fp ? dbg_freg_rdata : dbg_ireg_rdata) !== want) begin
      failures++;
      $display("%s%0d = %h expected %h", fp ? "f" : "r", r,
               fp ? dbg_freg_rdata : dbg_ireg_rdata, want);
    end
  endtask

  task automatic expect_mem(input int word, input logic [31:0] want, input int tol);
    dbg_dmem_addr = 32'(4 * word);
    #1;
    checks++;
    if (tol == 0 ? (dbg_dmem_rdata !== want) : (ulp_diff(dbg_dmem_rdata, want) > tol)) begin
      failures++;
      $display("d[%0d] = %h expected %h", word, dbg_dmem_rdata, want);
    end
  endtask

  task automatic expect_count(input string what, input int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("mechanism never happened: %s", what);
    end else $display("%s: %0d", what, n);
  endtask

  int n_lw, n_flw, n_fpu, n_fsw, n_ds, n_exe, n_mem, n_fp, n_br, n_rint, n_rfp;
  always @(posedge clk) if (rst_n) begin
    n_lw   += int'(stall_lw);
    n_flw  += int'(stall_flw);
    n_fpu  += int'(stall_fpu);
    n_fsw  += int'(stall_fsw);
    n_ds   += int'(stall_div_sqrt);
    n_exe  += int'(fwd_exe);
    n_mem  += int'(fwd_mem);
    n_fp   += int'(fwd_fp);
    n_br   += int'(branch_taken);
    n_rint += int'(retire_int);
    n_rfp  += int'(retire_fp);
  end

  initial begin
    logic [31:0] d [8];
    int          halt_cycle;
    {n_lw, n_flw, n_fpu, n_fsw, n_ds, n_exe, n_mem, n_fp, n_br, n_rint, n_rfp} = '0;
    d = '{32'h0, 32'ha3, 32'h27, 32'h79, 32'h0, 32'h143, 32'h0, 32'h0};
    load_program();
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      imem_we = 1'b1; imem_addr = 32'(4 * i); imem_wdata = prog[i];
    end
    @(negedge clk);
    imem_we = 1'b0;
    for (int i = 0; i < 6; i++) host_write_dmem(i, d[i]);
    host_write_dmem(16, 32'h41000000);   // 8.0
    host_write_dmem(17, 32'h40800000);   // 4.0
    host_write_dmem(18, 32'h3fc00000);   // 1.5
    host_write_dmem(19, 32'h3fc00000);   // 1.5
    host_write_dmem(22, 32'd7);
    host_write_dmem(23, -32'sd3);
    @(negedge clk);
    rst_n = 1'b1;
    halt_cycle = 0;
    for (int c = 0; c < 400; c++) begin
      @(negedge clk);
      if (pc == 32'(4 * 50) && halt_cycle == 0) halt_cycle = c;
    end
    $display("program reached its final loop after %0d cycles", halt_cycle);
    checks++;
    if (halt_cycle == 0) begin failures++; $display("final loop never reached"); end

    // integer part
    expect_mem(6, 32'h286, 0);
    expect_mem(7, 32'h282, 0);
    expect_reg(0, 12, 32'h27);
    expect_reg(0, 13, 32'h11c);
    expect_reg(0, 14, 32'h27);
    expect_reg(0, 15, 32'h25f);
    expect_reg(0, 16, 32'h286);
    expect_reg(0, 17, 32'h286);
    expect_reg(0, 18, 32'h282);
    expect_reg(0, 20, 32'd0);
    expect_reg(0, 21, 32'd6);     // 3 + 2 + 1
    expect_reg(0, 23, 32'd3);     // gts delay slot ran on every pass
    expect_reg(0, 24, 32'd2);     // beqs delay slot
    expect_reg(0, 25, 32'd0);     // skipped by beqs
    expect_reg(0, 26, 32'd7);     // jals delay slot
    expect_reg(0, 27, 32'd108);   // return address seen in the subroutine
    expect_reg(0, 28, 32'd5);     // jrs delay slot
    expect_reg(0, 29, 32'd9);     // movs after adds to the same register
    expect_reg(0, 30, 32'd11);    // movs after lws to the same register
    expect_reg(0, 19, 32'd20);
    expect_reg(0, 31, 32'd108);
    // FP part
    expect_mem(24, r2f(76.0), 0);
    expect_mem(25, r2f(22.0), 0);
    expect_mem(26, r2f(8.0), 0);
    expect_mem(28, 32'd5, 0);
    expect_mem(29, 32'd2, 0);
    expect_mem(30, r2f(14.0), 0);
    expect_mem(31, r2f(-6.0), 0);
    expect_mem(32, r2f(8.0 / 1.5), 1);
    expect_mem(33, r2f(4.0 / 1.5), 1);
    expect_mem(34, r2f($sqrt(8.0)), 1);
    expect_mem(35, r2f(2.0), 1);
    expect_mem(36, r2f(4.0), 0);
    expect_mem(37, r2f(9.5), 0);
    expect_mem(38, r2f(5.5), 0);
    expect_reg(1, 18, r2f(7.0));
    expect_reg(1, 19, r2f(-3.0));

    // mechanisms
    expect_count("stall_lw cycles", n_lw);
    expect_count("stall_flw cycles", n_flw);
    expect_count("stall_fpu cycles", n_fpu);
    expect_count("stall_fsw cycles", n_fsw);
    expect_count("stall_div_sqrt cycles", n_ds);
    expect_count("forwards from EXE", n_exe);
    expect_count("forwards from MEM", n_mem);
    expect_count("FP forwards", n_fp);
    expect_count("taken branches/jumps", n_br);
    // the iteration holds each of fdivs2 and fsqrts2 in ID for NR_ITER+1 cycles
    checks++;
    if (n_ds != 2 * (NR_ITER + 1)) begin
      failures++;
      $display("stall_div_sqrt lasted %0d cycles, expected %0d", n_ds, 2 * (NR_ITER + 1));
    end
    // nine FP-pipe instructions write back
    checks++;
    if (n_rfp != 9) begin
      failures++;
      $display("%0d FP write-backs, expected 9", n_rfp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
