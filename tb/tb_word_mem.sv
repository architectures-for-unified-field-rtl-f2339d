// tb_word_mem: writes random words to random addresses of the operand
// register and checks both read ports against a shadow copy, including a read
// of the word being written in the same cycle (old contents expected).
module tb_word_mem;
  import inv_pkg::*;
  localparam int unsigned W    = W_DEF;
  localparam int unsigned EMAX = EMAX_DEF;
  localparam int unsigned IW   = (EMAX > 1) ? $clog2(EMAX) : 1;

  logic          clk = 1'b0;
  logic          we = 1'b0;
  logic [IW-1:0] waddr = '0, raddr0 = '0, raddr1 = '0;
  logic [W-1:0]  wdata = '0, rdata0, rdata1;
  logic [W-1:0]  shadow [EMAX];
  int checks = 0, failures = 0;

  word_mem #(.W(W), .EMAX(EMAX)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every word
    for (int i = 0; i < EMAX; i++) begin
      @(negedge clk); we = 1'b1; waddr = IW'(i); wdata = $urandom; shadow[i] = wdata;
    end
    @(negedge clk); we = 1'b0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      raddr0 = IW'($urandom % EMAX);
      raddr1 = IW'($urandom % EMAX);
      we     = t[0];
      waddr  = t[1] ? raddr0 : IW'($urandom % EMAX);
      wdata  = $urandom;
      #1;
      checks += 2;
      if (rdata0 != shadow[raddr0]) begin failures++; $display("FAIL port0 @%0d", raddr0); end
      if (rdata1 != shadow[raddr1]) begin failures++; $display("FAIL port1 @%0d", raddr1); end
      @(posedge clk);
      if (we) shadow[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
