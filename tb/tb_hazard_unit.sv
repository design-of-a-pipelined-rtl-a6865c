// tb_hazard_unit: directed cases for each stall signal (load-use on an
// integer source, on the pair register of a double-data source, flws
// followed by an FP use, FP result in E1/E2 needed by an FP operation or by
// fsws, conversion in E2 that needs no stall) and random cases against a
// register-by-register reference.
module tb_hazard_unit;
  import simd_pkg::*;
  logic   clk = 1'b0;
  ctrl_t  id;
  stage_t ex, e1, e2;
  logic   s_lw, s_flw, s_fpu, s_fsw;
  int     checks = 0, failures = 0;

  hazard_unit dut (.id, .ex, .e1, .e2, .stall_lw(s_lw), .stall_flw(s_flw),
                   .stall_fpu(s_fpu), .stall_fsw(s_fsw));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic stage_t mk(logic v, logic iw, logic fw, logic ld, logic cv, logic du, int d);
    stage_t s;
    s.valid = v; s.int_wr = iw; s.fp_wr = fw; s.ld = ld; s.conv = cv; s.dual = du; s.dst = 5'(d);
    return s;
  endfunction

  // Does stage s write register r?
  function automatic logic hits(stage_t s, int r);
    return s.valid && (r == int'(s.dst) || (s.dual && r == (int'(s.dst) + 1) % 32));
  endfunction

  task automatic expect4(input string what, input logic [3:0] want);
    #1;
    checks++;
    if ({s_lw, s_flw, s_fpu, s_fsw} !== want) begin
      failures++;
      $display("%s: lw/flw/fpu/fsw = %b expected %b", what, {s_lw, s_flw, s_fpu, s_fsw}, want);
    end
  endtask

  initial begin
    id = '0; ex = '0; e1 = '0; e2 = '0;
    // adds r3, r1, r2 after lws r2
    id.valid = 1; id.use_a = 1; id.use_b = 1; id.src_a = 1; id.src_b = 2;
    ex = mk(1, 1, 0, 1, 0, 0, 2);
    expect4("load-use", 4'b1000);
    ex = mk(1, 1, 0, 0, 0, 0, 2);
    expect4("ALU result is forwarded", 4'b0000);
    // adds2 r4, r2, r6 after lws2 r6 (pair r7 read by lane 1)
    id.dual = 1; id.src_a = 2; id.src_b = 7;
    ex = mk(1, 1, 0, 1, 0, 1, 6);
    expect4("pair load-use", 4'b1000);
    id.dual = 0; id.src_b = 8;
    expect4("no dependence", 4'b0000);
    // fadds f1, f2, f3 after flws f3
    id = '0; id.valid = 1; id.fp_op = 1; id.use_fa = 1; id.use_fb = 1; id.src_a = 2; id.src_b = 3;
    ex = mk(1, 0, 1, 1, 0, 0, 3);
    expect4("flws then FP use", 4'b0100);
    ex = '0;
    e1 = mk(1, 0, 1, 0, 0, 0, 2);
    expect4("FP result in E1", 4'b0010);
    e1 = '0;
    e2 = mk(1, 0, 1, 0, 0, 0, 3);
    expect4("FP result in E2", 4'b0010);
    e2.conv = 1;
    expect4("conversion in E2 forwarded", 4'b0000);
    // fsws f3 after FP op in E1
    id = '0; id.valid = 1; id.st = 1; id.st_fp = 1; id.use_a = 1; id.use_fb = 1; id.src_a = 9; id.src_b = 3;
    e2 = '0; e1 = mk(1, 0, 1, 0, 0, 0, 3);
    expect4("fsws after FP op", 4'b0001);
    ex = mk(1, 1, 0, 1, 0, 0, 9); e1 = '0;
    expect4("fsws base loaded", 4'b1000);
    // random
    for (int i = 0; i < 3000; i++) begin
      logic [3:0] want;
      logic       hl, hf, hb;
      id = '0;
      id.valid  = 1'($urandom);
      id.dual   = 1'($urandom);
      id.use_a  = 1'($urandom); id.use_b  = 1'($urandom);
      id.use_fa = 1'($urandom); id.use_fb = 1'($urandom);
      id.fp_op  = 1'($urandom); id.st_fp = ~id.fp_op & 1'($urandom);
      id.src_a  = 5'($urandom % 8); id.src_b = 5'($urandom % 8);
      ex = mk(1'($urandom), 1'($urandom), 1'($urandom), 1'($urandom), 0, 1'($urandom), $urandom % 8);
      e1 = mk(1'($urandom), 0, 1, 0, 1'($urandom), 1'($urandom), $urandom % 8);
      e2 = mk(1'($urandom), 0, 1, 0, 1'($urandom), 1'($urandom), $urandom % 8);
      hl = 0; hf = 0; hb = 0;
      for (int k = 0; k < 2; k++) begin
        int ra, rb;
        if (k == 1 && !id.dual) continue;
        ra = (int'(id.src_a) + k) % 32;
        rb = (int'(id.src_b) + k) % 32;
        if (ex.ld && ex.int_wr && ((id.use_a && hits(ex, ra)) || (id.use_b && hits(ex, rb)))) hl = 1;
        if (ex.ld && ex.fp_wr && ((id.use_fa && hits(ex, ra)) || (id.use_fb && hits(ex, rb)))) hf = 1;
        if ((id.use_fa && (hits(e1, ra) || (!e2.conv && hits(e2, ra)))) ||
            (id.use_fb && (hits(e1, rb) || (!e2.conv && hits(e2, rb))))) hb = 1;
      end
      want = {id.valid & hl, id.valid & hf, id.valid & id.fp_op & hb, id.valid & id.st_fp & hb};
      expect4("random", want);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
