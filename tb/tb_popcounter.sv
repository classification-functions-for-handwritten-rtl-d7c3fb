// tb_popcounter: checks the population counter against a bit-by-bit count,
// for the counter sizes the classifier uses (9, 18 and 36 inputs) and for
// small odd sizes that exercise the leaves of the tree. Exhaustive where the
// input space is small, random patterns plus all-ones/all-zeros otherwise.
module tb_popcounter;
  int checks = 0, failures = 0;

  logic [2:0]  i3;  logic [1:0] c3;
  logic [8:0]  i9;  logic [3:0] c9;
  logic [17:0] i18; logic [4:0] c18;
  logic [35:0] i36; logic [5:0] c36;

  popcounter #(.N_IN(3))  u3  (.in(i3),  .count(c3));
  popcounter #(.N_IN(9))  u9  (.in(i9),  .count(c9));
  popcounter #(.N_IN(18)) u18 (.in(i18), .count(c18));
  popcounter #(.N_IN(36)) u36 (.in(i36), .count(c36));

  function automatic int ones(input logic [63:0] v);
    int n = 0;
    for (int b = 0; b < 64; b++) n += int'(v[b]);
    return n;
  endfunction

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    for (int v = 0; v < 8; v++) begin
      i3 = 3'(v); #1; check(int'(c3), ones(64'(i3)), "n3");
    end
    for (int v = 0; v < 512; v++) begin
      i9 = 9'(v); #1; check(int'(c9), ones(64'(i9)), "n9");
    end
    for (int t = 0; t < 2000; t++) begin
      i18 = 18'($urandom);
      i36 = {4'($urandom), 32'($urandom)};
      if (t == 0) begin i18 = '1; i36 = '1; end
      if (t == 1) begin i18 = '0; i36 = '0; end
      #1;
      check(int'(c18), ones(64'(i18)), "n18");
      check(int'(c36), ones(64'(i36)), "n36");
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
