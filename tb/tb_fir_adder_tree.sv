// tb_fir_adder_tree: checks the 8-input, 32-bit approximate adder tree.
// Random sign-magnitude inputs are fed every clock; the output three clocks
// later is compared with the same pairwise tree evaluated with the reference
// approximate adder, and the distance to the exact sum is checked to equal
// the number of dropped carries in that evaluation.
module tb_fir_adder_tree;
  import sm_ref_pkg::*;
  localparam int unsigned N = 8, IW = 32, LV = 3, OW = IW + LV;
  localparam int unsigned NRAND = 3000;
  int checks = 0, failures = 0, approx_cnt = 0;

  logic clk = 0;
  always #5 clk = ~clk;

  logic [IW-1:0] x [N];
  logic [OW-1:0] y;
  logic [OW-1:0] ey   [NRAND + LV];
  int            edrop[NRAND + LV];
  longint        exact[NRAND + LV];

  fir_adder_tree dut (.clk, .x_i(x), .y_o(y));

  initial begin
    for (int c = 0; c < int'(NRAND + LV); c++) begin
      smv_t v [N];
      int   nd;
      logic d;
      if (c >= int'(LV)) begin
        checks++;
        if (y !== ey[c-LV]) begin
          failures++;
          if (failures < 10) $display("FAIL cycle %0d: %h expected %h", c, y, ey[c-LV]);
        end
        checks++;
        if (exact[c-LV] - smv_value({y[OW-1], 63'(y[OW-2:0])}) != longint'(edrop[c-LV])) failures++;
      end
      exact[c] = 0;
      for (int j = 0; j < int'(N); j++) begin
        x[j] = {1'($urandom), 31'($urandom)};
        if (c % 5 == 0) x[j][30:0] = 31'($urandom % 4);  // small values, many near-zero sums
        v[j].s = x[j][IW-1]; v[j].m = 63'(x[j][IW-2:0]);
        exact[c] += smv_value(v[j]);
      end
      nd = 0;
      for (int w = N; w > 1; w = w / 2)
        for (int j = 0; j < w / 2; j++) begin
          v[j] = approx_ref(v[2*j], v[2*j+1], 1'b0, d);
          nd += int'(d);
        end
      ey[c] = {v[0].s, v[0].m[OW-2:0]};
      edrop[c] = nd;
      if (nd > 0) approx_cnt++;
      @(negedge clk);
    end
    checks++;
    if (approx_cnt == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
