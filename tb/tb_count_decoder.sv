// tb_count_decoder: drives every 6-bit value into a 36-output decoder and
// checks the 1-out-of-36 code: bit k-1 high for a count of k, all zeros for
// a count of zero or above 36.
module tb_count_decoder;
  int checks = 0, failures = 0;
  logic [5:0]  count;
  logic [35:0] code;

  count_decoder #(.K(36), .CW(6)) dut (.count, .code);

  initial begin
    for (int v = 0; v < 64; v++) begin
      logic [35:0] exp;
      count = 6'(v);
      #1;
      exp = (v >= 1 && v <= 36) ? (36'(1) << (v - 1)) : '0;
      checks++;
      if (code !== exp) begin
        failures++;
        $display("FAIL count=%0d code=%h expected %h", v, code, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
