// data_mem: data memory shared by the integer and floating-point modules.
//
// WORDS x 32-bit words, byte addressed (address bits [1:0] ignored, wrap
// modulo WORDS). Two independent word ports serve the two data lanes of
// lws2/sws2/flws2/fsws2 in one MEM cycle: reads are asynchronous, writes
// happen at the rising clock edge. If both lanes write the same word in one
// cycle, lane 1 wins. A third read-only port lets a host inspect the memory.
// The two-port organisation follows from the double-data load/store
// semantics; port timing and the host port are this design's own.
module data_mem #(
  parameter int unsigned WORDS = 1024
) (
  input  logic              clk,
  input  logic [1:0]        we,
  input  logic [1:0][31:0]  addr,   // byte addresses, one per lane
  input  logic [1:0][31:0]  wdata,
  output logic [1:0][31:0]  rdata,
  input  logic [31:0]       dbg_addr,
  output logic [31:0]       dbg_rdata
);

  localparam int unsigned AW = $clog2(WORDS);

  logic [31:0] mem [WORDS];

  initial begin
    for (int i = 0; i < int'(WORDS); i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (we[0]) mem[addr[0][AW+1:2]] <= wdata[0];
    if (we[1]) mem[addr[1][AW+1:2]] <= wdata[1];
  end

  assign rdata[0]  = mem[addr[0][AW+1:2]];
  assign rdata[1]  = mem[addr[1][AW+1:2]];
  assign dbg_rdata = mem[dbg_addr[AW+1:2]];

endmodule
