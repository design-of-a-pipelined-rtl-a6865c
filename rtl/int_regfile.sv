// int_regfile: integer register file r0..r31 of the integer SIMD module.
//
// NREGS x 32-bit registers, all cleared by reset (r0 is an ordinary
// register: the published listings write it). Four asynchronous read ports
// serve the ID stage (source A, its pair, source B, its pair) and NWR write
// ports are written at the rising edge by the WB stage; a higher-numbered
// write port wins when two write the same register. A read of a register
// being written in the same cycle returns the new value (write-through), so
// the WB stage needs no separate forwarding path. A fifth read port is for
// a host to inspect the registers.
module int_regfile #(
  parameter int unsigned NREGS = 32,
  parameter int unsigned NWR   = 2
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
