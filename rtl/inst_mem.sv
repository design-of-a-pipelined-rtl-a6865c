// inst_mem: instruction memory of the SIMD CPU.
//
// WORDS x 32-bit words, read asynchronously by the IF stage with the byte
// address pc (pc[1:0] ignored, address wraps modulo WORDS). A synchronous
// write port loads a program (the role played by an FPGA memory
// initialisation file); contents are cleared to zero (no-operation) when the
// array is declared, so unloaded words execute as nops.
module inst_mem #(
  parameter int unsigned WORDS = 1024
) (
  input  logic        clk,
  input  logic [31:0] pc,
  output logic [31:0] inst,
  input  logic        we,
  input  logic [31:0] waddr,   // byte address
  input  logic [31:0] wdata
);

  localparam int unsigned AW = $clog2(WORDS);

  logic [31:0] mem [WORDS];

  initial begin
    for (int i = 0; i < int'(WORDS); i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr[AW+1:2]] <= wdata;
  end

  assign inst = mem[pc[AW+1:2]];

endmodule
