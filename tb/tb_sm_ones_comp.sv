// tb_sm_ones_comp: checks the sign-magnitude / one's-complement converter.
// A 6-bit instance is checked exhaustively against the integer value each
// form stands for, and the 16-bit default instance with random words,
// including the round trip through two converters.
module tb_sm_ones_comp;
  int checks = 0, failures = 0;

  logic [5:0]  d6, q6;
  logic [15:0] d16, q16, r16;

  sm_ones_comp #(.W(6))  dut6  (.d_i(d6),  .q_o(q6));
  sm_ones_comp           dut16 (.d_i(d16), .q_o(q16));
  sm_ones_comp           back16(.d_i(q16), .q_o(r16));

  function automatic int sm_int6(logic [5:0] v);
    return v[5] ? -int'(v[4:0]) : int'(v[4:0]);
  endfunction
  function automatic int oc_int6(logic [5:0] v);
    return v[5] ? -int'(6'(~v)) : int'(v);
  endfunction

  initial begin
    for (int i = 0; i < 64; i++) begin
      d6 = 6'(i);
      #1;
      checks++;
      if (oc_int6(q6) != sm_int6(d6)) begin
        failures++;
        $display("FAIL W=6 d=%b q=%b", d6, q6);
      end
    end
    for (int i = 0; i < 2000; i++) begin
      d16 = 16'($urandom);
      #1;
      checks++;
      if (q16[15] != d16[15] ||
          q16[14:0] != (d16[15] ? ~d16[14:0] : d16[14:0]) || r16 != d16) begin
        failures++;
        $display("FAIL W=16 d=%h q=%h r=%h", d16, q16, r16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
