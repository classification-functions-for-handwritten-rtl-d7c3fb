// tb_pair_unit: full-size pair unit (784 inputs, 16 compound variables).
// Loads a mix of primitive, compound and unused (zero) masks, then "trains"
// the unit as the method does: every training image of digit i has its
// address (the compound variables) written with 2'b10, of digit j with
// 2'b01, and images of other digits with 2'b00. The images are then applied
// back to back, one per clock, and each vote must appear exactly one clock
// after its image and equal the trained word. An independent model computes
// the addresses.
module tb_pair_unit;
  localparam int N = 784;
  localparam int P = 16;
  localparam int NIMG = 60;

  int checks = 0, failures = 0;
  int n_i = 0, n_j = 0, n_none = 0;
  logic clk = 0, rst_n = 0;
  logic         mask_we = 0;
  logic [3:0]   mask_sel = '0;
  logic [N-1:0] mask_wdata = '0;
  logic         lut_we = 0;
  logic [P-1:0] lut_waddr = '0;
  logic [1:0]   lut_wdata = '0;
  logic [N-1:0] x = '0;
  logic [1:0]   vote;

  logic [N-1:0] ref_mask [P];
  logic [N-1:0] img [NIMG];
  logic [1:0]   word [NIMG];
  logic [1:0]   table_model [int];

  pair_unit #(.N(N), .P(P)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [N-1:0] rand_vec();
    logic [N-1:0] v;
    for (int k = 0; k < N; k++) v[k] = 1'($urandom);
    return v;
  endfunction

  function automatic int addr_of(input logic [N-1:0] im);
    logic [P-1:0] a;
    a = '0;
    for (int k = 0; k < N * P; k++) a[k / N] ^= im[k % N] & ref_mask[k / N][k % N];
    return int'(a);
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int j = 0; j < P; j++) begin
      if (j < 5)       ref_mask[j] = N'(1) << $urandom_range(0, N - 1);  // primitive
      else if (j < 14) ref_mask[j] = rand_vec();                         // compound
      else             ref_mask[j] = '0;                                 // unused
      mask_we = 1; mask_sel = 4'(j); mask_wdata = ref_mask[j];
      @(negedge clk);
    end
    mask_we = 0;
    // training: label 0 -> digit i, 1 -> digit j, 2 -> other
    for (int t = 0; t < NIMG; t++) begin
      automatic int a;
      img[t] = rand_vec();
      a = addr_of(img[t]);
      if (table_model.exists(a)) begin
        word[t] = table_model[a];   // collision: keep the first word
      end else begin
        case (t % 3)
          0: word[t] = 2'b10;
          1: word[t] = 2'b01;
          default: word[t] = 2'b00;
        endcase
        table_model[a] = word[t];
        lut_we = 1; lut_waddr = P'(a); lut_wdata = word[t];
        @(negedge clk);
      end
    end
    lut_we = 0;
    // classification, one image per clock
    fork
      for (int t = 0; t < NIMG; t++) begin
        x = img[t];
        @(negedge clk);
      end
      begin
        for (int t = 0; t < NIMG; t++) begin
          @(posedge clk); #1;
          checks++;
          case (word[t])
            2'b10: n_i++;
            2'b01: n_j++;
            default: n_none++;
          endcase
          if (vote !== word[t]) begin
            failures++;
            $display("FAIL image %0d vote=%b expected %b", t, vote, word[t]);
          end
        end
      end
    join
    if (n_i == 0 || n_j == 0 || n_none == 0) begin
      failures++;
      $display("FAIL not every vote kind was seen");
    end
    $display("votes i=%0d j=%0d none=%0d", n_i, n_j, n_none);
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
