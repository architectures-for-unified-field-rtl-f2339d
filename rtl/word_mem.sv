// word_mem: multi-word operand register.
//
// Holds one variable of the inverter (u, v, r, s or the modulus p) as EMAX
// words of W bits; an operation of precision e uses words 0 .. e-1. One
// synchronous write port, written at the clock edge, and two asynchronous read
// ports: the stream port, which the datapaths walk through word by word, and a
// second port the controller uses to look at the most significant word (the
// sign of a two's complement value) or to read out the result. A read of the
// word being written returns the old contents, so a datapath may read word j
// and overwrite it, or word j-1, in the same cycle.
//
// The document draws these as registers feeding the adders; the array with
// two read ports is this design's choice. The contents are not reset: every
// word that is read is first written by the load or the initialisation pass.
module word_mem
  import inv_pkg::*;
#(
  parameter int unsigned W    = W_DEF,
  parameter int unsigned EMAX = EMAX_DEF,
  localparam int unsigned IW  = (EMAX > 1) ? $clog2(EMAX) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [IW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [IW-1:0] raddr0,
  output logic [W-1:0]  rdata0,
  input  logic [IW-1:0] raddr1,
  output logic [W-1:0]  rdata1
);

  logic [W-1:0] mem [EMAX];

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;

  assign rdata0 = mem[raddr0];
  assign rdata1 = mem[raddr1];

endmodule
