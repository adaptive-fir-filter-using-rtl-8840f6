// adder_tree: binary adder tree over Q signed words.
//
// The large filter adds the Q sum words of its inner-product blocks in one
// tree and the Q carry words in another. Each block leaves a pending +1
// (the carry-in of its sign-slice subtraction) that belongs to its sum word;
// since a carry word weighs twice a sum word, two of those equal one carry-in
// on the carry tree. With CIN = 1 every first-level adder of the tree takes a
// carry-in of 1, Q/2 in all, which settles all Q pending bits. The tree shape
// and the carry-in placement follow the filter's description.
// Nodes are numbered as a heap: node 0 is the root, nodes Q-1 .. 2Q-2 are the
// inputs, node i adds nodes 2i+1 and 2i+2. All nodes are WO bits wide; the
// default WO = WI + log2(Q) holds any sum. Q must be a power of two, >= 2.
// Purely combinational.
module adder_tree #(
  parameter int unsigned Q   = 4,
  parameter int unsigned WI  = da_lms_pkg::DA_L + 2,
  parameter int unsigned WO  = WI + $clog2(Q),
  parameter bit          CIN = 1'b0
) (
  input  logic signed [WI-1:0] in  [Q],
  output logic signed [WO-1:0] sum
);
  logic signed [WO-1:0] node [2*Q-1];

  for (genvar i = 0; i < int'(Q); i++) begin : g_leaf
    assign node[Q-1+i] = WO'(in[i]);
  end

  for (genvar i = 0; i < int'(Q) - 1; i++) begin : g_add
    // a first-level adder has two leaves as children
    localparam bit FIRST = (2*i + 1 >= int'(Q) - 1);
    assign node[i] = node[2*i+1] + node[2*i+2] + WO'(CIN && FIRST);
  end

  assign sum = node[0];
endmodule
