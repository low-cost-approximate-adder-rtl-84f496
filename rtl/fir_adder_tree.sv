// fir_adder_tree: balanced tree of approximate adders that sums the products
// of a folded FIR filter.
//
// N sign-magnitude inputs of IW bits are added pairwise, level by level,
// with approx_addsub units: N/2 adders on the first level, N/4 on the next,
// down to one, N-1 adders in all. Each adder output is one bit wider than its
// inputs, so the tree never overflows, and each level is followed by a
// register layer, so the clock period is set by one adder.
//
// Interface: x_i[j] is input j (sign in bit IW-1); y_o is the sum as a
// sign-magnitude word of OW = IW + log2(N) bits. Timing: y_o holds the sum of
// the inputs presented LEVELS = log2(N) clocks earlier. No reset: the tree
// holds data only. N must be a power of two. Each adder's carry_drop_o is
// brought to a local wire, drop, that nothing reads: it is there so that a
// testbench or waveform viewer can see where a rotated carry was neglected.
//
// The tree shape and the use of the approximate adder for every addition
// follow the filter structure described for this design; the register after
// each level and the bit growth are this design's own choices.
module fir_adder_tree #(
  parameter int unsigned N      = 8,
  parameter int unsigned IW     = 32,
  parameter int unsigned LEVELS = $clog2(N),
  parameter int unsigned OW     = IW + LEVELS
) (
  input  logic          clk,
  input  logic [IW-1:0] x_i [N],
  output logic [OW-1:0] y_o
);
  localparam int unsigned MM = OW - 1; // widest magnitude

  // Tree nodes; the nodes of level l start at index N - (N >> (l-1)).
  logic          nd_s [N-1];
  logic [MM-1:0] nd_m [N-1];

  for (genvar l = 1; l <= LEVELS; l++) begin : g_lvl
    localparam int unsigned WL  = IW + l - 1;        // adder input width
    localparam int unsigned OFF = N - (N >> (l - 1)); // first node of this level
    localparam int unsigned PRV = (l >= 2) ? N - (N >> (l - 2)) : 0; // first node of level l-1
    for (genvar j = 0; j < (N >> l); j++) begin : g_add
      logic [WL-1:0] a, b;
      logic [WL:0]   y;
      logic          drop; // rotated carry neglected here (observation only)
      if (l == 1) begin : g_leaf
        assign a = x_i[2*j];
        assign b = x_i[2*j+1];
      end else begin : g_node
        assign a = {nd_s[PRV+2*j],   nd_m[PRV+2*j][WL-2:0]};
        assign b = {nd_s[PRV+2*j+1], nd_m[PRV+2*j+1][WL-2:0]};
      end
      approx_addsub #(.W(WL)) u_add (
        .a_i(a), .b_i(b), .sub_i(1'b0), .y_o(y), .carry_drop_o(drop)
      );
      always_ff @(posedge clk) begin
        nd_s[OFF+j] <= y[WL];
        nd_m[OFF+j] <= MM'(y[WL-1:0]);
      end
    end
  end

  assign y_o = {nd_s[N-2], nd_m[N-2]};

  initial begin
    assert (N >= 2 && (N & (N - 1)) == 0) else $error("fir_adder_tree: N must be a power of two");
    assert (OW == IW + LEVELS) else $error("fir_adder_tree: OW must be IW + log2(N)");
  end
endmodule
