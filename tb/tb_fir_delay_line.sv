// tb_fir_delay_line: checks the 16-tap sample buffer. After reset all
// registered taps must be zero; then random samples are offered with a
// random shift enable, and every tap is compared each clock with a
// software history of the accepted samples. Tap 0 must follow the input.
module tb_fir_delay_line;
  localparam int unsigned TAPS = 16, DW = 16;
  int checks = 0, failures = 0;

  logic clk = 0;
  always #5 clk = ~clk;

  logic          rst_n, shift;
  logic [DW-1:0] din;
  logic [DW-1:0] taps [TAPS];
  logic [DW-1:0] hist [TAPS];
  int            nshift;

  fir_delay_line dut (.clk, .rst_ni(rst_n), .shift_i(shift), .din_i(din), .taps_o(taps));

  initial begin
    rst_n = 0; shift = 1; din = '1;
    repeat (2) @(negedge clk);
    rst_n = 1; shift = 0;
    for (int k = 0; k < int'(TAPS); k++) hist[k] = '0;
    nshift = 0;
    for (int c = 0; c < 2000; c++) begin
      din   = DW'($urandom);
      shift = ($urandom % 3) != 0;
      #1;
      hist[0] = din;
      for (int k = 0; k < int'(TAPS); k++) begin
        checks++;
        if (taps[k] !== hist[k]) begin
          failures++;
          if (failures < 10) $display("FAIL cycle %0d tap %0d = %h, expected %h", c, k, taps[k], hist[k]);
        end
      end
      @(posedge clk);
      if (shift) begin
        for (int k = int'(TAPS) - 1; k > 0; k--) hist[k] = hist[k-1];
        nshift++;
      end
      @(negedge clk);
    end
    checks++;
    if (nshift < 1000 || nshift > 1700) failures++;
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
