// tb_approx_fir_top: end-to-end test of the 16-tap folded FIR filter at its
// default sizes (16-bit samples and coefficients, 35-bit output).
//
// The testbench keeps its own sample history and, for every accepted
// sample, evaluates the filter twice: once with the reference approximate
// adder of sm_ref_pkg in every pre-adder and tree adder (this must match
// dout_o bit for bit), and once exactly. The exact result must exceed the
// approximate one by exactly the sum of the dropped carries, a pre-adder's
// dropped carry weighing as much as its coefficient. Each output must appear
// LATENCY = 18 clocks after its sample.
//
// Run: an impulse, then random samples with random gaps in in_valid,
// symmetric mode; a reset in mid-stream; then antisymmetric mode
// (pre_sub_i = 1) with new coefficients. The mechanisms exercised are counted
// and each must occur at least once: pre-adder and tree carries dropped,
// two negative pre-adder operands, subtract mode, input gaps, reset with
// outputs in flight.
module tb_approx_fir_top;
  import sm_ref_pkg::*;
  localparam int unsigned TAPS = 16, DW = 16, CW = 16, NP = 8, LV = 3;
  localparam int unsigned OW = DW + CW + LV, LAT = CW + LV;
  int checks = 0, failures = 0;

  logic clk = 0;
  always #5 clk = ~clk;

  logic          rst_n, in_valid, pre_sub, out_valid;
  logic [DW-1:0] din;
  logic [CW-1:0] coef [NP];
  logic [OW-1:0] dout;

  approx_fir_top dut (
    .clk, .rst_ni(rst_n), .in_valid_i(in_valid), .din_i(din), .pre_sub_i(pre_sub),
    .coef_i(coef), .out_valid_o(out_valid), .dout_o(dout)
  );

  // expected outputs in flight
  logic [OW-1:0] q_val  [$];
  longint        q_gap  [$];  // exact - approximate, from the model
  longint        q_ex   [$];
  int            q_cyc  [$];

  smv_t hist [TAPS];
  int   cyc = 0;
  int   n_pre_drop = 0, n_tree_drop = 0, n_both_neg = 0, n_sub = 0, n_gap = 0,
        n_reset_flush = 0, n_out = 0;

  always @(posedge clk) cyc <= cyc + 1;

  function automatic smv_t sm_of(logic [DW-1:0] w);
    smv_t v; v.s = w[DW-1]; v.m = 63'(w[DW-2:0]); return v;
  endfunction
  function automatic smv_t cm_of(logic [CW-1:0] w);
    smv_t v; v.s = w[CW-1]; v.m = 63'(w[CW-2:0]); return v;
  endfunction

  // Model one accepted sample: shift history, evaluate, queue the result.
  task automatic accept(logic [DW-1:0] sample);
    smv_t   v [NP];
    smv_t   pr;
    logic   d;
    longint ex, gap;
    for (int k = TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = sm_of(sample);
    ex = 0; gap = 0;
    for (int k = 0; k < int'(NP); k++) begin
      smv_t xa, xb;
      xa = hist[k]; xb = hist[TAPS-1-k];
      if (xa.s && (xb.s ^ pre_sub)) n_both_neg++;
      pr = approx_ref(xa, xb, pre_sub, d);
      if (d) begin
        n_pre_drop++;
        gap += smv_value(cm_of(coef[k]));
      end
      v[k] = mul_ref(pr, cm_of(coef[k]));
      ex += smv_value(cm_of(coef[k])) *
            (smv_value(xa) + (pre_sub ? -smv_value(xb) : smv_value(xb)));
    end
    for (int w = NP; w > 1; w = w / 2)
      for (int j = 0; j < w / 2; j++) begin
        v[j] = approx_ref(v[2*j], v[2*j+1], 1'b0, d);
        if (d) begin n_tree_drop++; gap += 1; end
      end
    q_val.push_back({v[0].s, v[0].m[OW-2:0]});
    q_gap.push_back(gap);
    q_ex.push_back(ex);
    q_cyc.push_back(cyc);
  endtask

  // Output checker
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      n_out++;
      checks++;
      if (q_val.size() == 0) begin
        failures++;
        $display("FAIL unexpected output %h at cycle %0d", dout, cyc);
      end else begin
        logic [OW-1:0] e;
        longint g, x;
        int c0;
        e = q_val.pop_front(); g = q_gap.pop_front(); x = q_ex.pop_front(); c0 = q_cyc.pop_front();
        if (dout !== e) begin
          failures++;
          if (failures < 10) $display("FAIL output %h expected %h (cycle %0d)", dout, e, cyc);
        end
        checks++;
        if (x - smv_value({dout[OW-1], 63'(dout[OW-2:0])}) != g) begin
          failures++;
          if (failures < 10) $display("FAIL exact %0d approx %0d gap %0d", x,
                                      smv_value({dout[OW-1], 63'(dout[OW-2:0])}), g);
        end
        checks++;
        if (cyc - c0 != int'(LAT)) begin
          failures++;
          if (failures < 10) $display("FAIL latency %0d expected %0d", cyc - c0, LAT);
        end
      end
    end
  end

  task automatic do_reset();
    rst_n = 0; in_valid = 0;
    @(negedge clk);
    @(negedge clk);
    if (q_val.size() != 0) n_reset_flush++;
    q_val.delete(); q_gap.delete(); q_ex.delete(); q_cyc.delete();
    for (int k = 0; k < int'(TAPS); k++) hist[k] = '0;
    rst_n = 1;
  endtask

  // Present one sample (valid) or a gap at the next clock edge.
  task automatic drive(logic v, logic [DW-1:0] s);
    in_valid = v; din = v ? s : DW'($urandom);
    if (v) begin
      accept(s);
      if (pre_sub) n_sub++;
    end else n_gap++;
    @(negedge clk);
  endtask

  task automatic run_random(int n);
    for (int i = 0; i < n; i++) begin
      if ($urandom % 4 == 0) drive(1'b0, '0);
      drive(1'b1, DW'($urandom));
    end
  endtask

  initial begin
    pre_sub = 0; din = '0;
    for (int k = 0; k < int'(NP); k++) coef[k] = CW'($urandom);
    do_reset();
    // impulse: the output sequence is the coefficient set, mirrored
    drive(1'b1, 16'h0001);
    for (int i = 0; i < 20; i++) drive(1'b1, 16'h0000);
    run_random(300);
    // reset while outputs are in flight
    do_reset();
    pre_sub = 1;
    for (int k = 0; k < int'(NP); k++) coef[k] = CW'($urandom);
    run_random(300);
    in_valid = 0;
    repeat (LAT + 2) @(negedge clk);
    checks++;
    if (q_val.size() != 0) begin failures++; $display("FAIL %0d outputs missing", q_val.size()); end

    $display("mechanisms: outputs=%0d pre_drop=%0d tree_drop=%0d both_negative=%0d subtract=%0d gaps=%0d reset_flush=%0d",
             n_out, n_pre_drop, n_tree_drop, n_both_neg, n_sub, n_gap, n_reset_flush);
    checks++; if (n_pre_drop == 0)    failures++;
    checks++; if (n_tree_drop == 0)   failures++;
    checks++; if (n_both_neg == 0)    failures++;
    checks++; if (n_sub == 0)         failures++;
    checks++; if (n_gap == 0)         failures++;
    checks++; if (n_reset_flush == 0) failures++;
    checks++; if (n_out < 500)        failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
