// fir_delay_line: the sample buffers of an n-tap FIR filter.
//
// TAPS-1 D flip-flop registers form one shift chain. Tap 0 is the incoming
// sample itself; tap k (k >= 1) is the sample that entered k shifts earlier.
// In the folded filter the chain is drawn as two rows, the first running
// away from the input and the second running back, so that taps k and
// TAPS-1-k sit next to each other for the pre-adders; electrically it is a
// single chain, which is what this module builds.
//
// Interface: din_i is a DW-bit sample; shift_i advances the chain by one on
// the rising clock edge; taps_o[k] is tap k. Registers clear to zero on the
// active-low synchronous reset rst_ni, so the filter starts from a silent
// history.
//
// The register count (TAPS-1 for TAPS taps) and the tap order follow the
// filter structure described for this design; the shift enable and the
// reset are this design's own choices.
module fir_delay_line #(
  parameter int unsigned TAPS = 16,
  parameter int unsigned DW   = 16
) (
  input  logic          clk,
  input  logic          rst_ni,
  input  logic          shift_i,
  input  logic [DW-1:0] din_i,
  output logic [DW-1:0] taps_o [TAPS]
);
  logic [DW-1:0] buf_q [1:TAPS-1];

  always_ff @(posedge clk) begin
    if (!rst_ni) begin
      for (int k = 1; k < TAPS; k++) buf_q[k] <= '0;
    end else if (shift_i) begin
      buf_q[1] <= din_i;
      for (int k = 2; k < TAPS; k++) buf_q[k] <= buf_q[k-1];
    end
  end

  always_comb begin
    taps_o[0] = din_i;
    for (int k = 1; k < TAPS; k++) taps_o[k] = buf_q[k];
  end

  initial assert (TAPS >= 2) else $error("fir_delay_line: TAPS must be at least 2");
endmodule
