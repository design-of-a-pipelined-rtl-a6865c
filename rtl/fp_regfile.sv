// fp_regfile: floating-point register file f0..f31 of the FP SIMD module.
//
// NREGS x 32-bit registers, cleared by reset. Four asynchronous read ports
// serve the ID stage (source A, its pair, source B, its pair). NWR = 4 write
// ports: two for the FPU lanes leaving E3 and two for the lanes of flws/flws2
// leaving MEM, which can reach write-back in the same cycle; a
// higher-numbered port wins on the same register, so the CPU connects the
// younger load to the upper ports. Reads see a same-cycle write
// (write-through). A fifth read port lets a host inspect the registers.
module fp_regfile #(
  parameter int unsigned NREGS = 32,
  parameter int unsigned NWR   = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [3:0][4:0]         raddr,
  output logic [3:0][31:0]        rdata,
  input  logic [NWR-1:0]          we,
  input  logic [NWR-1:0][4:0]     waddr,
  input  logic [NWR-1:0][31:0]    wdata,
  input  logic [4:0]              dbg_addr,
  output logic [31:0]             dbg_rdata
);

  logic [31:0] regs [NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NREGS); i++) regs[i] <= '0;
    end else begin
      for (int w = 0; w < int'(NWR); w++)
        if (we[w]) regs[waddr[w]] <= wdata[w];
    end
  end

  always_comb begin
    for (int p = 0; p < 4; p++) begin
      rdata[p] = regs[raddr[p]];
      for (int w = 0; w < int'(NWR); w++)
        if (we[w] && waddr[w] == raddr[p]) rdata[p] = wdata[w];
    end
  end

  assign dbg_rdata = regs[dbg_addr];

endmodule
