// tb_or_array: drives random sparse rows (one-hot, zero or random) into a
// 10 x 36 OR array and checks every column against a per-bit OR model.
module tb_or_array;
  int checks = 0, failures = 0;
  logic [9:0][35:0] rows;
  logic [35:0]      cols;

  or_array #(.ROWS(10), .K(36)) dut (.rows, .cols);

  initial begin
    for (int t = 0; t < 3000; t++) begin
      logic [35:0] exp;
      for (int r = 0; r < 10; r++) begin
        case ($urandom_range(0, 2))
          0: rows[r] = '0;
          1: rows[r] = 36'(1) << $urandom_range(0, 35);
          default: rows[r] = {4'($urandom), 32'($urandom)};
        endcase
      end
      #1;
      for (int k = 0; k < 36; k++) begin
        exp[k] = 1'b0;
        for (int r = 0; r < 10; r++) if (rows[r][k]) exp[k] = 1'b1;
      end
      checks++;
      if (cols !== exp) begin
        failures++;
        $display("FAIL cols=%h expected %h", cols, exp);
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
