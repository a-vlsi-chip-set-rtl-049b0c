// 30-bit address adder of the upper data path, used for branch targets
// (word address plus sign-extended word offset).
//
// Built as a Manchester carry chain: each bit classifies itself as
// generate, propagate or kill and passes the carry along a single chain,
// which keeps it compact at the price of a longer carry path than the
// ALU's lookahead adder. Combinational.
module spur_addr_adder #(
  parameter int unsigned W = 30
)(
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W:0] chain;
  logic [W-1:0] gen, prop;

  assign gen  = a & b;
  assign prop = a ^ b;

  assign chain[0] = cin;
  for (genvar i = 0; i < W; i++) begin : g_chain
    // generate / propagate / kill
    assign chain[i+1] = gen[i] ? 1'b1 : (prop[i] ? chain[i] : 1'b0);
  end

  assign sum  = prop ^ chain[W-1:0];
  assign cout = chain[W];
endmodule
