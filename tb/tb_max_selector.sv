// tb_max_selector: random sets of ten counts in 0..36 (the 45-unit x 4
// range), with forced ties, a single clear winner, all zeros and all at 36.
// Checks the largest value, the winner flags and the lowest winning digit
// against a direct model.
module tb_max_selector;
  int checks = 0, failures = 0;
  int ties = 0;
  logic [9:0][5:0] counts;
  logic [5:0]      max_value;
  logic [9:0]      winners;
  logic [3:0]      digit;

  max_selector #(.N_CNT(10), .K(36), .CW(6), .DW(4)) dut (
    .counts, .max_value, .winners, .digit
  );

  task automatic check;
    int m = 0, d = -1, nw = 0;
    logic [9:0] w;
    for (int i = 0; i < 10; i++) if (int'(counts[i]) > m) m = int'(counts[i]);
    for (int i = 0; i < 10; i++) begin
      w[i] = (int'(counts[i]) == m);
      if (w[i]) begin
        nw++;
        if (d < 0) d = i;
      end
    end
    if (nw > 1) ties++;
    checks++;
    if (int'(max_value) != m || winners !== w || int'(digit) != d) begin
      failures++;
      $display("FAIL max=%0d/%0d winners=%b/%b digit=%0d/%0d",
               max_value, m, winners, w, digit, d);
    end
  endtask

  initial begin
    counts = '0; #1; check();
    for (int i = 0; i < 10; i++) counts[i] = 6'd36;
    #1; check();
    for (int t = 0; t < 5000; t++) begin
      for (int i = 0; i < 10; i++) counts[i] = 6'($urandom_range(0, 36));
      case (t % 3)
        0: counts[$urandom_range(0, 9)] = counts[$urandom_range(0, 9)]; // likely tie
        1: counts[$urandom_range(0, 9)] = 6'd36;                        // strong winner
        default: ;
      endcase
      #1; check();
    end
    if (ties == 0) begin
      failures++;
      $display("FAIL no tie was exercised");
    end
    $display("ties exercised: %0d", ties);
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
