// k_adder_tree -- common aggregator: pipelined K-operand adder tree.
//
// Sums the K users' chip estimates so that the total can be subtracted from
// the received chip. The published design uses a full adder tree; here each
// tree level adds pairs of the level below (an odd element passes through) and
// is registered, so the tree has LVL = ceil(log2 K) levels and as many cycles
// of latency. This matches the log2(K) delay that each user puts on its own
// estimate before adding it back. The sum keeps its full width, W + LVL bits,
// so it cannot overflow.
//
// Interface: `in_vals` (K two's-complement values of W bits) is sampled with
// `in_valid`; `out_sum` and `out_valid` appear LVL cycles later. The tree
// accepts a new set every cycle.
module k_adder_tree #(
  parameter int unsigned K  = 50,
  parameter int unsigned W  = 11,
  localparam int unsigned LVL = $clog2(K),
  localparam int unsigned OW  = W + LVL
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [W-1:0]  in_vals [K],
  output logic                 out_valid,
  output logic signed [OW-1:0] out_sum
);

  // Number of nodes on level l and the position of level l in the node array.
  function automatic int unsigned nodes(int unsigned l);
    int unsigned n;
    n = K;
    for (int unsigned i = 0; i < l; i++) n = (n + 1) / 2;
    return n;
  endfunction

  function automatic int unsigned offset(int unsigned l);
    int unsigned o;
    o = 0;
    for (int unsigned i = 0; i < l; i++) o += nodes(i);
    return o;
  endfunction

  localparam int unsigned TOTAL = offset(LVL + 1);

  logic signed [OW-1:0] node [TOTAL];
  logic [LVL-1:0]       vpipe;

  for (genvar i = 0; i < K; i++) begin : g_leaf
    assign node[i] = OW'(in_vals[i]);
  end

  for (genvar l = 1; l <= LVL; l++) begin : g_level
    for (genvar i = 0; i < nodes(l); i++) begin : g_node
      localparam int unsigned A = offset(l - 1) + 2 * i;
      localparam int unsigned B = A + 1;
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) node[offset(l) + i] <= '0;
        else if (2 * i + 1 < nodes(l - 1)) node[offset(l) + i] <= node[A] + node[B];
        else node[offset(l) + i] <= node[A];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vpipe <= '0;
    else        vpipe <= {vpipe[LVL-2:0], in_valid};
  end

  assign out_valid = vpipe[LVL-1];
  assign out_sum   = node[TOTAL-1];

  initial begin
    assert (K >= 4) else $error("k_adder_tree: K must be at least 4");
  end

endmodule
