// tb_coincidence_circuit: all 4096 pairs of 6-bit count and maximum; match
// must be high exactly when they are equal.
module tb_coincidence_circuit;
  int checks = 0, failures = 0;
  logic [5:0] count, max_value;
  logic       match;

  coincidence_circuit #(.CW(6)) dut (.count, .max_value, .match);

  initial begin
    for (int a = 0; a < 64; a++) begin
      for (int b = 0; b < 64; b++) begin
        count = 6'(a); max_value = 6'(b);
        #1;
        checks++;
        if (match !== (a == b)) begin
          failures++;
          $display("FAIL count=%0d max=%0d match=%b", a, b, match);
        end
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
