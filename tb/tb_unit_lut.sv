// tb_unit_lut: full-size unit memory (2**16 two-bit words). Writes random
// words at random addresses, keeping a model in an associative array, and
// reads back only written addresses. Checks the one-clock read latency:
// rdata after an edge is the word at the address presented before it, and a
// read in the same cycle as a write to that address returns the old word.
module tb_unit_lut;
  localparam int P = 16;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic         we = 0;
  logic [P-1:0] waddr = '0, raddr = '0;
  logic [1:0]   wdata = '0, rdata;
  logic [1:0]   model [int];
  int           addrs [$];

  unit_lut #(.P(P), .W(2)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    @(negedge clk);
    for (int t = 0; t < 3000; t++) begin
      automatic int a = (t < 4) ? t * 21845 : int'($urandom_range(0, 2**P - 1));
      we = 1; waddr = P'(a); wdata = 2'($urandom);
      if (!model.exists(a)) addrs.push_back(a);
      model[a] = wdata;
      @(negedge clk);
    end
    we = 0;
    for (int t = 0; t < 3000; t++) begin
      automatic int a = addrs[$urandom_range(0, addrs.size() - 1)];
      raddr = P'(a);
      @(posedge clk); #1;
      checks++;
      if (rdata !== model[a]) begin
        failures++;
        $display("FAIL addr=%0d rdata=%b expected %b", a, rdata, model[a]);
      end
      @(negedge clk);
    end
    // read-during-write to the same address returns the old word
    begin
      automatic int a = addrs[0];
      automatic logic [1:0] old = model[a];
      raddr = P'(a); we = 1; waddr = P'(a); wdata = ~old;
      @(posedge clk); #1;
      checks++;
      if (rdata !== old) begin
        failures++;
        $display("FAIL read-during-write gave %b expected old %b", rdata, old);
      end
      @(negedge clk); we = 0;
      @(posedge clk); #1;
      checks++;
      if (rdata !== ~old) begin
        failures++;
        $display("FAIL read after write gave %b expected %b", rdata, ~old);
      end
    end
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
