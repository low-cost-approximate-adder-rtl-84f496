// tb_fir_noise: additional output noise of a 128-tap filter with an 8-bit and
// with a 16-bit data bus (coefficients as wide as the samples).
//
// Both filters are fed the same stream of full-scale random samples with
// random coefficients. The testbench computes every output exactly and
// checks that the approximate output differs from it by no more than the
// largest possible sum of dropped carries (the sum of the coefficient
// magnitudes for the pre-adders plus one per tree adder), that the output
// appears LATENCY clocks after its sample, and that some outputs are in fact
// approximate. It prints the error power relative to a full-scale output
// word and to the power of the exact output, and the fraction of outputs that are inexact.
module tb_fir_noise;
  localparam int unsigned TAPS = 128, NP = TAPS / 2, LV = 6;
  localparam int unsigned NSAMP = 1500;
  int checks = 0, failures = 0;

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n = 0, in_valid = 0;

  // ---- 8-bit instance
  localparam int unsigned DA = 8, OA = DA + DA + LV, LA = DA + LV;
  logic [DA-1:0] din_a;
  logic [DA-1:0] coef_a [NP];
  logic [OA-1:0] dout_a;
  logic          ov_a;
  approx_fir_top #(.TAPS(TAPS), .DW(DA), .CW(DA)) dut_a (
    .clk, .rst_ni(rst_n), .in_valid_i(in_valid), .din_i(din_a), .pre_sub_i(1'b0),
    .coef_i(coef_a), .out_valid_o(ov_a), .dout_o(dout_a)
  );

  // ---- 16-bit instance
  localparam int unsigned DB = 16, OB = DB + DB + LV, LB = DB + LV;
  logic [DB-1:0] din_b;
  logic [DB-1:0] coef_b [NP];
  logic [OB-1:0] dout_b;
  logic          ov_b;
  approx_fir_top #(.TAPS(TAPS), .DW(DB), .CW(DB)) dut_b (
    .clk, .rst_ni(rst_n), .in_valid_i(in_valid), .din_i(din_b), .pre_sub_i(1'b0),
    .coef_i(coef_b), .out_valid_o(ov_b), .dout_o(dout_b)
  );

  longint hx_a [TAPS], hx_b [TAPS];
  longint ex_a [NSAMP + 64], ex_b [NSAMP + 64];
  int     in_cyc [NSAMP + 64];
  longint bound_a, bound_b;
  int     n_in = 0, n_oa = 0, n_ob = 0, bad_a = 0, bad_b = 0, cyc = 0;
  real    pe_a = 0.0, pe_b = 0.0, ps_a = 0.0, ps_b = 0.0;

  always @(posedge clk) cyc <= cyc + 1;

  function automatic longint smval(logic [63:0] w, int unsigned n);
    longint m;
    m = longint'(w & ((64'd1 << (n - 1)) - 1));
    return w[n-1] ? -m : m;
  endfunction

  task automatic check_out(longint got, longint ex, longint bound, int c0, int unsigned lat,
                           inout real pe, inout real ps, inout int bad);
    checks++;
    if (ex - got > bound || got - ex > bound) begin
      failures++;
      if (failures < 10) $display("FAIL exact %0d approx %0d beyond %0d", ex, got, bound);
    end
    checks++;
    if (cyc - c0 != int'(lat)) begin
      failures++;
      if (failures < 10) $display("FAIL latency %0d expected %0d", cyc - c0, lat);
    end
    pe += real'(ex - got) * real'(ex - got);
    ps += real'(ex) * real'(ex);
    if (ex != got) bad++;
  endtask

  always @(negedge clk) begin
    if (rst_n && ov_a) begin
      check_out(smval(64'(dout_a), OA), ex_a[n_oa], bound_a, in_cyc[n_oa], LA, pe_a, ps_a, bad_a);
      n_oa++;
    end
    if (rst_n && ov_b) begin
      check_out(smval(64'(dout_b), OB), ex_b[n_ob], bound_b, in_cyc[n_ob], LB, pe_b, ps_b, bad_b);
      n_ob++;
    end
  end

  initial begin
    real fa, fb, ra, rb;
    bound_a = NP - 1; bound_b = NP - 1;
    for (int k = 0; k < int'(NP); k++) begin
      coef_a[k] = DA'($urandom); coef_b[k] = DB'($urandom);
      bound_a += longint'(coef_a[k][DA-2:0]);
      bound_b += longint'(coef_b[k][DB-2:0]);
    end
    for (int k = 0; k < int'(TAPS); k++) begin hx_a[k] = 0; hx_b[k] = 0; end
    din_a = '0; din_b = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < int'(NSAMP); i++) begin
      longint sa, sb;
      din_a = DA'($urandom); din_b = DB'($urandom); in_valid = 1;
      for (int k = TAPS - 1; k > 0; k--) begin hx_a[k] = hx_a[k-1]; hx_b[k] = hx_b[k-1]; end
      hx_a[0] = smval(64'(din_a), DA); hx_b[0] = smval(64'(din_b), DB);
      sa = 0; sb = 0;
      for (int k = 0; k < int'(NP); k++) begin
        sa += smval(64'(coef_a[k]), DA) * (hx_a[k] + hx_a[TAPS-1-k]);
        sb += smval(64'(coef_b[k]), DB) * (hx_b[k] + hx_b[TAPS-1-k]);
      end
      ex_a[i] = sa; ex_b[i] = sb; in_cyc[i] = cyc;
      n_in++;
      @(negedge clk);
    end
    in_valid = 0;
    repeat (LB + 4) @(negedge clk);
    checks++;
    if (n_oa != n_in || n_ob != n_in) begin
      failures++;
      $display("FAIL outputs %0d/%0d of %0d", n_oa, n_ob, n_in);
    end
    checks++;
    if (bad_a == 0 || bad_b == 0) failures++;
    fa = 10.0 * $log10((pe_a / n_oa) / (2.0 ** (2 * (OA - 1))));
    fb = 10.0 * $log10((pe_b / n_ob) / (2.0 ** (2 * (OB - 1))));
    ra = 10.0 * $log10(pe_a / ps_a);
    rb = 10.0 * $log10(pe_b / ps_b);
    $display("8-bit bus : %0d of %0d outputs inexact, error power %f dB below full scale, %f dB below signal", bad_a, n_oa, -fa, -ra);
    $display("16-bit bus: %0d of %0d outputs inexact, error power %f dB below full scale, %f dB below signal", bad_b, n_ob, -fb, -rb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NSAMP + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
