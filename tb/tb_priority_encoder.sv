// tb_priority_encoder: checks that the encoder returns one plus the number
// of the highest high column (zero when none is high), for every single
// column, for random patterns and for the empty pattern.
module tb_priority_encoder;
  int checks = 0, failures = 0;
  logic [35:0] cols;
  logic [5:0]  value;

  priority_encoder #(.K(36), .CW(6)) dut (.cols, .value);

  task automatic check;
    int exp = 0;
    for (int k = 0; k < 36; k++) if (cols[k]) exp = k + 1;
    checks++;
    if (int'(value) != exp) begin
      failures++;
      $display("FAIL cols=%h value=%0d expected %0d", cols, value, exp);
    end
  endtask

  initial begin
    cols = '0; #1; check();
    for (int k = 0; k < 36; k++) begin
      cols = 36'(1) << k; #1; check();
    end
    for (int t = 0; t < 2000; t++) begin
      // random low part below a random top bit
      automatic int top = $urandom_range(0, 35);
      cols = ({4'($urandom), 32'($urandom)} & ((36'(1) << top) - 1)) | (36'(1) << top);
      #1; check();
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
