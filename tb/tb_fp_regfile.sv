// tb_fp_regfile: reset clears every register; random writes on all ports
// (higher port wins on the same register) and reads on all ports, checking
// the write-through of a same-cycle write, against a model array.
module tb_fp_regfile;
  localparam int NWR = 4;
  logic                  clk = 1'b0, rst_n = 1'b0;
  logic [3:0][4:0]       raddr = '0;
  logic [3:0][31:0]      rdata;
  logic [NWR-1:0]        we = '0;
  logic [NWR-1:0][4:0]   waddr = '0;
  logic [NWR-1:0][31:0]  wdata = '0;
  logic [4:0]            dbg_addr = '0;
  logic [31:0]           dbg_rdata;
  logic [31:0]           model [32];
  int                    checks = 0, failures = 0;

  fp_regfile #(.NREGS(32), .NWR(NWR)) dut (.clk, .rst_n, .raddr, .rdata, .we, .waddr, .wdata,
                                            .dbg_addr, .dbg_rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) model[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 32; i++) begin
      dbg_addr = 5'(i);
      #1;
      checks++;
      if (dbg_rdata !== 32'd0) begin failures++; $display("r%0d not reset", i); end
    end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      for (int w = 0; w < NWR; w++) begin
        we[w]    = 1'($urandom);
        waddr[w] = 5'($urandom);
        wdata[w] = $urandom;
      end
      if (i % 4 == 0) waddr[NWR-1] = waddr[0];
      for (int p = 0; p < 4; p++) raddr[p] = (i % 3 == 0 && we[0]) ? waddr[p % NWR] : 5'($urandom);
      #1;
      for (int p = 0; p < 4; p++) begin
        logic [31:0] e;
        e = model[raddr[p]];
        for (int w = 0; w < NWR; w++) if (we[w] && waddr[w] == raddr[p]) e = wdata[w];
        checks++;
        if (rdata[p] !== e) begin
          failures++;
          $display("port %0d r%0d: %h expected %h", p, raddr[p], rdata[p], e);
        end
      end
      for (int w = 0; w < NWR; w++) if (we[w]) model[waddr[w]] = wdata[w];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
