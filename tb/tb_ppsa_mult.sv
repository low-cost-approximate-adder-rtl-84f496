// tb_ppsa_mult: checks the pipelined shift-and-add multiplier at its default
// size (17-bit by 16-bit sign-magnitude operands, 15 pipeline stages).
// A single product entering after a run of zeros must appear exactly
// LAT = 15 clocks later; then a new random pair (with some extreme values)
// is fed every clock and every product is compared with the exact
// sign-magnitude product LAT clocks later.
module tb_ppsa_mult;
  import sm_ref_pkg::*;
  localparam int unsigned AW = 17, BW = 16, PW = AW + BW - 1, LAT = BW - 1;
  localparam int unsigned NRAND = 3000;
  int checks = 0, failures = 0;

  logic clk = 0;
  always #5 clk = ~clk;

  logic [AW-1:0] a;
  logic [BW-1:0] b;
  logic [PW-1:0] p;
  logic [AW-1:0] ha [NRAND + LAT];
  logic [BW-1:0] hb [NRAND + LAT];

  ppsa_mult dut (.clk, .a_i(a), .b_i(b), .p_o(p));

  function automatic logic [PW-1:0] expect_p(logic [AW-1:0] x, logic [BW-1:0] y);
    smv_t va, vb, r;
    va.s = x[AW-1]; va.m = 63'(x[AW-2:0]);
    vb.s = y[BW-1]; vb.m = 63'(y[BW-2:0]);
    r = mul_ref(va, vb);
    return {r.s, r.m[PW-2:0]};
  endfunction

  initial begin
    int seen;
    // latency: impulse after zeros
    a = '0; b = '0;
    repeat (LAT + 3) @(negedge clk);
    a = {1'b1, 16'd1234}; b = {1'b0, 15'd567};
    @(negedge clk);
    a = '0; b = '0;
    seen = -1;
    for (int c = 1; c <= LAT + 3; c++) begin
      @(negedge clk);
      if (seen < 0 && p[PW-2:0] != '0) seen = c + 1;  // clock edges since the pair was presented
    end
    checks++;
    if (seen != int'(LAT)) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", seen, LAT);
    end

    // streaming random products
    for (int c = 0; c < int'(NRAND + LAT); c++) begin
      if (c >= int'(LAT)) begin
        checks++;
        if (p !== expect_p(ha[c-LAT], hb[c-LAT])) begin
          failures++;
          if (failures < 10)
            $display("FAIL %h * %h -> %h, expected %h", ha[c-LAT], hb[c-LAT], p, expect_p(ha[c-LAT], hb[c-LAT]));
        end
      end
      case (c % 7)
        0:       begin a = '1; b = '1; end                     // largest magnitudes
        3:       begin a = AW'($urandom); b = {1'b1, 15'd0}; end // negative zero coefficient
        default: begin a = AW'($urandom); b = BW'($urandom); end
      endcase
      ha[c] = a; hb[c] = b;
      @(negedge clk);
    end
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
