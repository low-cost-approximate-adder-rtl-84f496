// tb_approx_addsub: checks the approximate adder/subtractor.
//  * the four 4-bit cases of the worked example: (+5)+(+2)=+7,
//    (-5)+(+2)=-3, (+5)+(-2)=+2 (one LSB low, carry dropped) and
//    (-5)+(-2)=-7 (the equal-sign path keeps two negatives exact);
//  * every operand pair and both modes of a 6-bit instance;
//  * random operands on the 16-bit default instance, against the
//    integer reference of sm_ref_pkg; the rate of one-LSB errors with
//    random signs is checked to be near one in four.
module tb_approx_addsub;
  import sm_ref_pkg::*;
  int checks = 0, failures = 0;

  logic [3:0]  a4, b4;   logic [4:0]  y4;  logic d4;
  logic [5:0]  a6, b6;   logic [6:0]  y6;  logic d6;  logic s6;
  logic [15:0] a16, b16; logic [16:0] y16; logic d16; logic s16;

  approx_addsub #(.W(4)) dut4  (.a_i(a4),  .b_i(b4),  .sub_i(1'b0), .y_o(y4),  .carry_drop_o(d4));
  approx_addsub #(.W(6)) dut6  (.a_i(a6),  .b_i(b6),  .sub_i(s6),   .y_o(y6),  .carry_drop_o(d6));
  approx_addsub          dut16 (.a_i(a16), .b_i(b16), .sub_i(s16),  .y_o(y16), .carry_drop_o(d16));

  task automatic check4(logic [3:0] a, logic [3:0] b, logic [4:0] y_exp, logic d_exp);
    a4 = a; b4 = b;
    #1;
    checks++;
    if (y4 !== y_exp || d4 !== d_exp) begin
      failures++;
      $display("FAIL 4-bit %b + %b -> %b drop=%b, expected %b drop=%b", a, b, y4, d4, y_exp, d_exp);
    end
  endtask

  function automatic smv_t mk(logic s, logic [62:0] m);
    smv_t v; v.s = s; v.m = 63'(m); return v;
  endfunction

  int drops16, diff16, n16;

  initial begin
    // Worked example, sign-magnitude operands.
    check4(4'b0101, 4'b0010, 5'b0_0111, 1'b0); // +5 + +2 = +7
    check4(4'b1101, 4'b0010, 5'b1_0011, 1'b0); // -5 + +2 = -3
    check4(4'b0101, 4'b1010, 5'b0_0010, 1'b1); // +5 + -2 = +2 (exact +3)
    check4(4'b1101, 4'b1010, 5'b1_0111, 1'b0); // -5 + -2 = -7
    check4(4'b0101, 4'b1101, 5'b1_0000, 1'b0); // +5 + -5 = -0

    for (int m = 0; m < 2; m++)
      for (int i = 0; i < 64; i++)
        for (int j = 0; j < 64; j++) begin
          smv_t r; logic dr;
          a6 = 6'(i); b6 = 6'(j); s6 = m[0];
          #1;
          r = approx_ref(mk(a6[5], 63'(a6[4:0])), mk(b6[5], 63'(b6[4:0])), s6, dr);
          checks++;
          if (y6 !== {r.s, r.m[5:0]} || d6 !== dr) begin
            failures++;
            if (failures < 10) $display("FAIL 6-bit %b %s %b -> %b drop=%b", a6, s6 ? "-" : "+", b6, y6, d6);
          end
        end

    drops16 = 0; diff16 = 0; n16 = 20000;
    for (int i = 0; i < n16; i++) begin
      smv_t r; logic dr; longint exact;
      a16 = 16'($urandom); b16 = 16'($urandom); s16 = 1'($urandom);
      #1;
      r = approx_ref(mk(a16[15], 63'(a16[14:0])), mk(b16[15], 63'(b16[14:0])), s16, dr);
      exact = smv_value(mk(a16[15], 63'(a16[14:0]))) +
              (s16 ? -smv_value(mk(b16[15], 63'(b16[14:0]))) : smv_value(mk(b16[15], 63'(b16[14:0]))));
      checks++;
      if (y16 !== {r.s, r.m[15:0]} || d16 !== dr) begin
        failures++;
        if (failures < 10) $display("FAIL 16-bit %h %s %h -> %h drop=%b", a16, s16 ? "-" : "+", b16, y16, d16);
      end
      // error against the exact result is one LSB exactly when a carry was dropped
      checks++;
      if ((exact - smv_value(mk(y16[16], 63'(y16[15:0])))) != (d16 ? 1 : 0)) failures++;
      if (d16) drops16++;
      if (smv_value(mk(y16[16], 63'(y16[15:0]))) != exact) diff16++;
    end
    $display("16-bit random: %0d of %0d results one LSB low", diff16, n16);
    checks++;
    if (drops16 < n16 / 5 || drops16 > (n16 * 3) / 10) begin
      failures++;
      $display("FAIL error rate %0d/%0d is not near 1/4", drops16, n16);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
