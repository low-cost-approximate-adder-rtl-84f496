// ppsa_mult: pipelined parallel shift-and-add multiplier for sign-magnitude
// operands.
//
// The magnitude of a_i is multiplied by the magnitude of b_i with one
// shift-and-add step per magnitude bit of b_i, and a register layer after
// every step: stage k adds (a << k) to the running partial product when bit k
// of b is set. The operands travel down the pipeline with the partial
// product, so a new pair can enter every clock. The product sign is the XOR
// of the two operand signs (sign-magnitude needs no correction step).
//
// Interface: a_i is AW bits, b_i is BW bits, both sign-magnitude with the
// sign in the top bit. p_o is sign-magnitude with PW = AW + BW - 1 bits
// (sign plus (AW-1)+(BW-1) magnitude bits), so it never overflows.
// Timing: p_o shows the product of the operands presented LAT = BW-1 clocks
// earlier. There is no reset: the pipeline holds data only.
//
// That the filter uses a pipelined parallel shift-and-add multiplier with a
// latency of several clocks follows the description of the filter; the
// one-bit-per-stage arrangement and the widths are this design's choices.
module ppsa_mult #(
  parameter int unsigned AW = 17,
  parameter int unsigned BW = 16,
  parameter int unsigned PW = AW + BW - 1
) (
  input  logic          clk,
  input  logic [AW-1:0] a_i,
  input  logic [BW-1:0] b_i,
  output logic [PW-1:0] p_o
);
  localparam int unsigned AM  = AW - 1;  // magnitude bits of a
  localparam int unsigned BM  = BW - 1;  // magnitude bits of b, = stages
  localparam int unsigned PM  = PW - 1;  // magnitude bits of the product
  localparam int unsigned LAT = BM;

  logic [AM-1:0] a_q [LAT];
  logic [BM-1:0] b_q [LAT];
  logic          s_q [LAT];
  logic [PM-1:0] p_q [LAT];

  // Stage 0 takes the first partial product straight from the inputs.
  always_ff @(posedge clk) begin
    a_q[0] <= a_i[AM-1:0];
    b_q[0] <= b_i[BM-1:0];
    s_q[0] <= a_i[AW-1] ^ b_i[BW-1];
    p_q[0] <= b_i[0] ? PM'(a_i[AM-1:0]) : '0;
  end

  for (genvar k = 1; k < LAT; k++) begin : g_stage
    always_ff @(posedge clk) begin
      a_q[k] <= a_q[k-1];
      b_q[k] <= b_q[k-1];
      s_q[k] <= s_q[k-1];
      p_q[k] <= p_q[k-1] + (b_q[k-1][k] ? (PM'(a_q[k-1]) << k) : '0);
    end
  end

  assign p_o = {s_q[LAT-1], p_q[LAT-1]};

  initial begin
    assert (PW == AW + BW - 1) else $error("ppsa_mult: PW must be AW+BW-1");
    assert (BW >= 2 && AW >= 2) else $error("ppsa_mult: operands need a magnitude bit");
  end
endmodule
