// Ripple carry adder.
//
// W full-adder cells chained through their carries: sum = a + b + cin
// (modulo 2^W), cout is the carry out of the top cell.  A ripple carry adder
// is what the published architecture uses for the folded filter's adder, for low power;
// the cell-level description is this design's own (the source only names
// the adder type).  Purely combinational, delay grows linearly with W.
module rca_adder #(
  parameter int unsigned W = 17
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  logic [W:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_fa
    assign sum[i]  = a[i] ^ b[i] ^ c[i];
    assign c[i+1]  = (a[i] & b[i]) | (a[i] & c[i]) | (b[i] & c[i]);
  end

  assign cout = c[W];

endmodule
