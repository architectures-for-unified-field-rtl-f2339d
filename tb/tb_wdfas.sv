// tb_wdfas: checks the word dual-field adder/subtractor against integer and
// xor arithmetic, word by word and chained over several words.
module tb_wdfas;
  import inv_pkg::*;
  localparam int unsigned W = W_DEF;

  logic [W-1:0] a, b, sum;
  logic         sub, cin, cout;
  field_t       field;
  int checks = 0, failures = 0;

  wdfas #(.W(W)) dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W:0]       exp;
    logic [4*W-1:0]   x, y, z, zexp;
    // single words
    for (int t = 0; t < 2000; t++) begin
      a = $urandom; b = $urandom; sub = t[1]; cin = t[2];
      if (t < 8) begin a = '1; b = (t < 4) ? '0 : '1; end
      field = t[0] ? FIELD_GF2N : FIELD_GFP;
      #1;
      checks++;
      if (field == FIELD_GFP) begin
        exp = {1'b0, a} + {1'b0, sub ? ~b : b} + (W+1)'(cin);
        if ({cout, sum} != exp) begin
          failures++; $display("FAIL gfp a=%h b=%h sub=%0d cin=%0d -> %h/%0d", a, b, sub, cin, sum, cout);
        end
      end else if (sum != (a ^ b) || cout) begin
        failures++; $display("FAIL gf2 a=%h b=%h -> %h/%0d", a, b, sum, cout);
      end
    end
    // four-word chains, as the datapaths use them
    for (int t = 0; t < 500; t++) begin
      logic c;
      for (int i = 0; i < 4; i++) begin x[i*W +: W] = $urandom; y[i*W +: W] = $urandom; end
      sub = t[0];
      field = t[1] ? FIELD_GF2N : FIELD_GFP;
      c = sub;
      for (int i = 0; i < 4; i++) begin
        a = x[i*W +: W]; b = y[i*W +: W]; cin = c; #1;
        z[i*W +: W] = sum; c = cout;
      end
      zexp = (field == FIELD_GF2N) ? (x ^ y) : (sub ? x - y : x + y);
      checks++;
      if (z != zexp) begin failures++; $display("FAIL chain sub=%0d field=%0d", sub, field); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
