// approx_fir_top: folded linear-phase FIR filter built from low-cost
// approximate adder/subtractors.
//
// Structure (TAPS = 16 by default):
//   * fir_delay_line: TAPS-1 registers holding the sample history x[0..TAPS-1]
//     (x[0] is the incoming sample).
//   * TAPS/2 pre-adders (approx_addsub) forming x[k] + x[TAPS-1-k], or
//     x[k] - x[TAPS-1-k] when pre_sub_i is high (antisymmetric filters).
//   * TAPS/2 pipelined shift-and-add multipliers (ppsa_mult), pre-adder k by
//     coefficient coef_i[k].
//   * fir_adder_tree: TAPS/2-1 approximate adders summing the products.
// That is TAPS-1 buffers, TAPS/2 multipliers and TAPS-1 adder/subtractors.
// All arithmetic is sign-magnitude. Every adder drops the one's-complement
// end-around carry, so a result can be one LSB low each time two operands of
// different sign give a positive sum; the output is therefore an
// approximation of the exact filter output.
//
// Interface: one DW-bit sign-magnitude sample per clock at most, marked by
// in_valid_i (the delay line shifts only then). coef_i holds TAPS/2
// sign-magnitude coefficients of CW bits and must be held steady while
// samples flow. dout_o is the filter output, OW = DW + CW + log2(TAPS/2)
// bits, sign in the top bit; out_valid_o marks it.
// Timing: one register layer after the pre-adders, CW-1 multiplier stages
// and one layer per tree level, so dout_o appears LATENCY = CW + log2(TAPS/2)
// clocks after the in_valid_i clock of the newest sample in it (18 clocks at
// the defaults). Throughput is one sample per clock. rst_ni is an active-low
// synchronous reset that clears the history and the valid pipeline.
// pre_drop[k] shows when pre-adder k neglected a rotated carry; it is for
// observation only and drives nothing.
//
// The tap/multiplier/adder structure, the 16 taps and the use of the
// approximate adder/subtractor for every addition follow the described
// filter. The input conversion block that precedes the delay line in that
// filter is not built: din_i takes its output. Widths, the register layers,
// the valid flag, pre_sub_i and coefficient ports are this design's choices.
module approx_fir_top #(
  parameter int unsigned TAPS    = 16,
  parameter int unsigned DW      = 16,
  parameter int unsigned CW      = 16,
  parameter int unsigned NPROD   = TAPS / 2,
  parameter int unsigned LEVELS  = $clog2(NPROD),
  parameter int unsigned OW      = DW + CW + LEVELS,
  parameter int unsigned LATENCY = CW + LEVELS
) (
  input  logic          clk,
  input  logic          rst_ni,
  input  logic          in_valid_i,
  input  logic [DW-1:0] din_i,
  input  logic          pre_sub_i,
  input  logic [CW-1:0] coef_i [NPROD],
  output logic          out_valid_o,
  output logic [OW-1:0] dout_o
);
  localparam int unsigned SW = DW + 1;      // pre-adder output width
  localparam int unsigned PW = SW + CW - 1; // product width

  logic [DW-1:0] taps [TAPS];
  logic [SW-1:0] pre_d [NPROD];
  logic [SW-1:0] pre_q [NPROD];
  logic [PW-1:0] prod  [NPROD];
  logic [LATENCY-1:0] valid_q;
  logic          pre_drop [NPROD]; // rotated carry neglected (observation only)

  fir_delay_line #(.TAPS(TAPS), .DW(DW)) u_dline (
    .clk, .rst_ni, .shift_i(in_valid_i), .din_i, .taps_o(taps)
  );

  for (genvar k = 0; k < NPROD; k++) begin : g_pair
    approx_addsub #(.W(DW)) u_pre (
      .a_i(taps[k]), .b_i(taps[TAPS-1-k]), .sub_i(pre_sub_i),
      .y_o(pre_d[k]), .carry_drop_o(pre_drop[k])
    );
    always_ff @(posedge clk) pre_q[k] <= pre_d[k];

    ppsa_mult #(.AW(SW), .BW(CW)) u_mult (
      .clk, .a_i(pre_q[k]), .b_i(coef_i[k]), .p_o(prod[k])
    );
  end

  fir_adder_tree #(.N(NPROD), .IW(PW)) u_tree (
    .clk, .x_i(prod), .y_o(dout_o)
  );

  always_ff @(posedge clk) begin
    if (!rst_ni) valid_q <= '0;
    else         valid_q <= {valid_q[LATENCY-2:0], in_valid_i};
  end
  assign out_valid_o = valid_q[LATENCY-1];

  initial begin
    assert (TAPS >= 4 && TAPS % 2 == 0) else $error("approx_fir_top: TAPS must be even");
    assert (OW == DW + CW + LEVELS) else $error("approx_fir_top: OW must be DW+CW+log2(TAPS/2)");
    assert (LATENCY == CW + LEVELS) else $error("approx_fir_top: LATENCY must be CW+log2(TAPS/2)");
  end
endmodule
