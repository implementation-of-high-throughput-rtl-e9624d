// cla_adder: W-bit carry look-ahead adder used inside the ACS units.
//
// Each bit produces generate g = a & b and propagate p = a ^ b.  Every carry
// is formed directly from the g/p terms of the bits below it and the carry
// input (c[i] = g[i-1] | p[i-1]g[i-2] | ... | p[i-1]..p[0]cin), so no carry
// ripples through a chain of full adders.  The sum is p ^ c.  The design names
// a "modified carry look-ahead adder" for the ACS loop without giving its
// structure; this plain two-level look-ahead is this design's own reading.
//
// Interface: sum = a + b + cin modulo 2^W, cout = carry out.  Combinational.
module cla_adder #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  logic [W-1:0] g, p;
  logic [W:0]   c;

  always_comb begin
    g = a & b;
    p = a ^ b;
    for (int i = 0; i <= W; i++) begin
      logic term;
      // carry input propagated through all lower bits
      term = cin;
      for (int j = 0; j < i; j++) term = term & p[j];
      c[i] = term;
      // generate at bit j propagated through bits j+1 .. i-1
      for (int j = 0; j < i; j++) begin
        logic t;
        t = g[j];
        for (int m = j + 1; m < i; m++) t = t & p[m];
        c[i] = c[i] | t;
      end
    end
    sum  = p ^ c[W-1:0];
    cout = c[W];
  end

endmodule
