// tb_linear_circuit: full-size linear circuit (784 inputs, 16 compound
// variables). Checks that all masks are zero after reset (every y bit 0),
// then loads masks of several kinds (single bit = primitive variable,
// random dense = compound, zero = unused, all ones = parity of the image)
// and compares y with the XOR of the selected input bits for random images.
// A mask write must take effect at the next clock edge.
module tb_linear_circuit;
  localparam int N = 784;
  localparam int P = 16;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic         mask_we = 0;
  logic [3:0]   mask_sel = '0;
  logic [N-1:0] mask_wdata = '0;
  logic [N-1:0] x = '0;
  logic [P-1:0] y;
  logic [N-1:0] ref_mask [P];

  linear_circuit #(.N(N), .P(P)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [N-1:0] rand_vec();
    logic [N-1:0] v;
    for (int k = 0; k < N; k++) v[k] = 1'($urandom);
    return v;
  endfunction

  task automatic check_y(input string what);
    logic [P-1:0] exp;
    for (int j = 0; j < P; j++) begin
      exp[j] = 1'b0;
      for (int k = 0; k < N; k++) exp[j] ^= ref_mask[j][k] & x[k];
    end
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL %s: y=%h expected %h", what, y, exp);
    end
  endtask

  initial begin
    for (int j = 0; j < P; j++) ref_mask[j] = '0;
    repeat (2) @(posedge clk);
    x = rand_vec();
    #1 check_y("after reset");
    rst_n = 1;
    @(negedge clk);
    // load masks
    for (int j = 0; j < P; j++) begin
      case (j % 4)
        0: ref_mask[j] = N'(1) << $urandom_range(0, N - 1);
        1: ref_mask[j] = rand_vec();
        2: ref_mask[j] = '0;
        default: ref_mask[j] = (j == 15) ? '1 : (rand_vec() & rand_vec() & rand_vec());
      endcase
      mask_we = 1; mask_sel = 4'(j); mask_wdata = ref_mask[j];
      @(negedge clk);
    end
    mask_we = 0;
    for (int t = 0; t < 300; t++) begin
      x = rand_vec();
      if (t == 0) x = '0;
      if (t == 1) x = '1;
      #1 check_y("random image");
      @(negedge clk);
    end
    // one more mask write: takes effect at the next edge only
    mask_we = 1; mask_sel = 4'd2; mask_wdata = '1;
    #1 check_y("before edge");
    @(negedge clk);
    mask_we = 0;
    ref_mask[2] = '1;
    #1 check_y("after edge");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
