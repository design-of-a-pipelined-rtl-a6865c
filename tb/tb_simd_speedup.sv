// tb_simd_speedup: runs the same job, c[i] = a[i] + b[i] for 32 elements,
// once as scalar code (lws, lws, adds, sws per element) and once as
// double-data code (lws2, lws2, adds2, sws2 per pair of elements), from
// reset each time. Both results are checked word by word, and the cycle
// counts up to the final self-loop are compared: the double-data program
// must take close to half the cycles (speed-up of at least 1.8).
module tb_simd_speedup;
  localparam int N = 32;
  localparam int A = 0, B = 4 * N, C = 8 * N;   // byte addresses of the arrays

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
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] R(int op, int rd, int rs, int rt);
    return {6'(op), 5'(rd), 5'(rs), 5'(rt), 11'd0};
  endfunction
  function automatic logic [31:0] I(int op, int rs, int rt, int imm);
    return {6'(op), 5'(rs), 5'(rt), 16'(imm)};
  endfunction

  localparam int ADDS2 = 1, ADDS = 2, LWS = 13, LWS2 = 14, SWS = 23, SWS2 = 24,
                 BEQS = 25, MOVS = 42;

  logic [31:0] prog [256];
  logic [31:0] va [N], vb [N];
  int          plen;

  task automatic emit(logic [31:0] w);
    prog[plen] = w;
    plen++;
  endtask

  // Build the program, load program and data, run, return cycles to the end.
  task automatic run(input bit simd, output int cycles);
    int end_pc;
    plen = 0;
    for (int i = 0; i < 256; i++) prog[i] = '0;
    emit(I(MOVS, 0, 10, A)); emit(I(MOVS, 0, 11, A + 4));
    emit(I(MOVS, 0, 12, B)); emit(I(MOVS, 0, 13, B + 4));
    emit(I(MOVS, 0, 14, C)); emit(I(MOVS, 0, 15, C + 4));
    if (simd) begin
      for (int k = 0; k < N / 2; k++) begin
        emit(I(LWS2, 10, 4, 8 * k));
        emit(I(LWS2, 12, 6, 8 * k));
        emit(R(ADDS2, 8, 4, 6));
        emit(I(SWS2, 14, 8, 8 * k));
      end
    end else begin
      for (int i = 0; i < N; i++) begin
        emit(I(LWS, 10, 4, 4 * i));
        emit(I(LWS, 12, 5, 4 * i));
        emit(R(ADDS, 6, 4, 5));
        emit(I(SWS, 14, 6, 4 * i));
      end
    end
    end_pc = 4 * plen;
    emit(I(BEQS, 0, 0, -1));
    rst_n = 1'b0;
    for (int i = 0; i < plen + 1; i++) begin
      @(negedge clk);
      imem_we = 1'b1; imem_addr = 32'(4 * i); imem_wdata = prog[i];
    end
    for (int i = 0; i < 3 * N; i++) begin
      @(negedge clk);
      imem_we = 1'b0;
      host_dmem_we = 1'b1;
      host_dmem_addr = 32'(4 * i);
      host_dmem_wdata = (i < N) ? va[i] : (i < 2 * N) ? vb[i - N] : 32'hdeadbeef;
    end
    @(negedge clk);
    host_dmem_we = 1'b0;
    rst_n = 1'b1;
    cycles = 0;
    while (pc != 32'(end_pc) && cycles < 5000) begin
      @(negedge clk);
      cycles++;
    end
    repeat (5) @(negedge clk);   // drain the last store
    for (int i = 0; i < N; i++) begin
      dbg_dmem_addr = 32'(C + 4 * i);
      #1;
      checks++;
      if (dbg_dmem_rdata !== va[i] + vb[i]) begin
        failures++;
        $display("%s c[%0d] = %h expected %h", simd ? "simd" : "scalar", i, dbg_dmem_rdata,
                 va[i] + vb[i]);
      end
    end
  endtask

  initial begin
    int c_scalar, c_simd;
    for (int i = 0; i < N; i++) begin
      va[i] = $urandom;
      vb[i] = $urandom;
    end
    run(1'b0, c_scalar);
    run(1'b1, c_simd);
    $display("scalar: %0d cycles, double-data: %0d cycles, speed-up %.2f", c_scalar, c_simd,
             real'(c_scalar) / real'(c_simd));
    checks++;
    if (real'(c_scalar) / real'(c_simd) < 1.8) begin
      failures++;
      $display("speed-up below 1.8");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
