// wdfas: word dual-field adder/subtractor (WDFA/S).
//
// Adds or subtracts one W-bit word of two multi-word operands per clock cycle.
// In GF(p) mode every bit cell is a full adder: sum = a + (b xor sub) + cin,
// with the carry passed out (cout) to be registered by the datapath and fed
// back as cin for the next, more significant word. For subtraction the caller
// sets cin = 1 on the least significant word. In GF(2^n) mode each cell's carry
// is gated off, so the word result is a xor b and cout is 0: the same adder
// performs addition without carry, which is what makes the architecture
// unified. Purely combinational.
//
// The carry-gated full-adder cell is this design's choice of dual-field
// adder; the document asks only for an adder/subtractor that works in both
// fields on one word at a time.
module wdfas
  import inv_pkg::*;
#(
  parameter int unsigned W = W_DEF
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         sub,    // GF(p): 1 = a - b (with cin = 1 on the first word)
  input  field_t       field,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  logic [W:0]   c;
  logic [W-1:0] bx;
  logic         fsel;

  assign fsel = (field == FIELD_GFP);
  assign bx   = b ^ {W{sub & fsel}};

  assign c[0] = cin & fsel;

  for (genvar i = 0; i < W; i++) begin : g_cell
    assign sum[i]  = a[i] ^ bx[i] ^ c[i];
    // the carry cell is enabled only in GF(p) mode
    assign c[i+1]  = fsel & ((a[i] & bx[i]) | (a[i] & c[i]) | (bx[i] & c[i]));
  end

  assign cout = c[W];

endmodule
