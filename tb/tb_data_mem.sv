// tb_data_mem: random two-lane writes and reads against a model array,
// including both lanes writing in the same cycle (lane 1 wins on the same
// word) and the host read port.
module tb_data_mem;
  localparam int WORDS = 32;
  logic             clk = 1'b0;
  logic [1:0]       we = '0;
  logic [1:0][31:0] addr = '0, wdata = '0, rdata;
  logic [31:0]      dbg_addr = '0, dbg_rdata;
  logic [31:0]      model [WORDS];
  int               checks = 0, failures = 0;

  data_mem #(.WORDS(WORDS)) dut (.clk, .we, .addr, .wdata, .rdata, .dbg_addr, .dbg_rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < WORDS; i++) model[i] = '0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      // check reads of the current state
      for (int l = 0; l < 2; l++) begin
        checks++;
        if (rdata[l] !== model[addr[l][6:2]]) begin
          failures++;
          $display("lane %0d addr %h: %h expected %h", l, addr[l], rdata[l], model[addr[l][6:2]]);
        end
      end
      checks++;
      if (dbg_rdata !== model[dbg_addr[6:2]]) failures++;
      // next operation
      for (int l = 0; l < 2; l++) begin
        we[l]    = 1'($urandom);
        addr[l]  = {25'd0, 5'($urandom), 2'b00};
        wdata[l] = $urandom;
      end
      if (i % 5 == 0) addr[1] = addr[0];
      dbg_addr = {25'd0, 5'($urandom), 2'b00};
      if (we[0]) model[addr[0][6:2]] = wdata[0];
      if (we[1]) model[addr[1][6:2]] = wdata[1];
      @(posedge clk);
      #1;
      we = '0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
