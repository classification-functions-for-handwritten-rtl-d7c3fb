// tb_digit_classifier_r1: the single-group configuration (R = 1, the plain
// 45-unit classifier) with 12 variables per unit. It checks the property that
// makes this classifier exact on its training set: every training image of
// digit d gets all 9 votes of the units that involve d, and every other
// digit gets fewer than 9, so the image is always recognised without a tie.
// It also checks the counter and max-selector sizes of this configuration
// (9 inputs per counter, 4-bit counts) and compares the ten counts of unseen
// noisy images with an independent model.
module tb_digit_classifier_r1;
  import cls_pkg::*;
  localparam int R  = 1;
  localparam int P  = 12;
  localparam int N  = N_PIXELS;
  localparam int CW = 4;
  localparam int NTR = 6;                 // training images per digit
  localparam int NTRAIN = N_DIGITS * NTR;
  localparam int NNEW = 20;

  int checks = 0, failures = 0, n_conflict = 0;
  logic clk = 0, rst_n = 0;
  logic [0:0]   cfg_group = '0;
  logic [5:0]   cfg_pair = '0;
  logic         cfg_bcast = 0;
  logic         cfg_mask_we = 0;
  logic [3:0]   cfg_mask_sel = '0;
  logic [N-1:0] cfg_mask_wdata = '0;
  logic         cfg_lut_we = 0;
  logic [P-1:0] cfg_lut_waddr = '0;
  logic [1:0]   cfg_lut_wdata = '0;
  logic         in_valid = 0;
  logic [N-1:0] image = '0;
  logic         out_valid;
  logic [3:0]   out_digit;
  logic [N_DIGITS-1:0] out_winners;
  logic [CW-1:0] out_max;
  logic [N_DIGITS-1:0][CW-1:0] out_counts;

  digit_classifier #(.R(R), .P(P)) dut (.*);

  always #5 clk = ~clk;

  logic [N-1:0] ref_mask [N_PAIRS][P];
  logic [1:0]   table_model [N_PAIRS][int];
  logic [N-1:0] proto [N_DIGITS];
  logic [N-1:0] img [NTRAIN + NNEW];
  int           lbl [NTRAIN + NNEW];

  function automatic logic [N-1:0] rand_vec();
    logic [N-1:0] v;
    for (int k = 0; k < N; k++) v[k] = 1'($urandom);
    return v;
  endfunction

  function automatic logic [N-1:0] noisy(input logic [N-1:0] v, input int flips);
    for (int f = 0; f < flips; f++) v[$urandom_range(0, N - 1)] ^= 1'b1;
    return v;
  endfunction

  function automatic int addr_of(input int u, input logic [N-1:0] im);
    logic [P-1:0] a;
    a = '0;
    for (int k = 0; k < N * P; k++) a[k / N] ^= im[k % N] & ref_mask[u][k / N][k % N];
    return int'(a);
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // data set
    for (int d = 0; d < N_DIGITS; d++) proto[d] = rand_vec();
    for (int t = 0; t < NTRAIN; t++) begin
      img[t] = noisy(proto[t % N_DIGITS], 30); lbl[t] = t % N_DIGITS;
    end
    for (int t = 0; t < NNEW; t++) begin
      img[NTRAIN + t] = noisy(proto[t % N_DIGITS], 60); lbl[NTRAIN + t] = -1;
    end
    // every unit gets masks of its own (3 primitive, 9 compound variables),
    // redrawn until they separate the unit's training images of i and j,
    // which is what training guarantees
    for (int u = 0; u < N_PAIRS; u++) begin
      automatic bit ok = 0;
      while (!ok) begin
        automatic int seen [int];
        seen.delete();
        ok = 1;
        for (int j = 0; j < P; j++)
          ref_mask[u][j] = (j < 3) ? N'(1) << $urandom_range(0, N - 1) : rand_vec();
        for (int t = 0; t < NTRAIN; t++) begin
          automatic int a;
          if (lbl[t] != pair_i(u) && lbl[t] != pair_j(u)) continue;
          a = addr_of(u, img[t]);
          if (seen.exists(a) && seen[a] != lbl[t]) ok = 0;
          seen[a] = lbl[t];
        end
      end
      for (int j = 0; j < P; j++) begin
        cfg_pair = 6'(u); cfg_mask_we = 1; cfg_mask_sel = 4'(j); cfg_mask_wdata = ref_mask[u][j];
        @(negedge clk);
      end
    end
    cfg_mask_we = 0;
    for (int a = 0; a < 2 ** P; a++) begin
      cfg_bcast = 1; cfg_lut_we = 1; cfg_lut_waddr = P'(a); cfg_lut_wdata = 2'b00;
      @(negedge clk);
    end
    cfg_bcast = 0; cfg_lut_we = 0;
    // training
    for (int u = 0; u < N_PAIRS; u++) begin
      for (int t = 0; t < NTRAIN; t++) begin
        automatic int a;
        automatic logic [1:0] w;
        if (lbl[t] != pair_i(u) && lbl[t] != pair_j(u)) continue;
        w = (lbl[t] == pair_i(u)) ? 2'b10 : 2'b01;
        a = addr_of(u, img[t]);
        if (table_model[u].exists(a) && table_model[u][a] != w) begin
          n_conflict++;
          continue;
        end
        table_model[u][a] = w;
        cfg_pair = 6'(u); cfg_lut_we = 1; cfg_lut_waddr = P'(a); cfg_lut_wdata = w;
        @(negedge clk);
      end
    end
    cfg_lut_we = 0;
    if (n_conflict != 0) begin
      failures++;
      $display("FAIL %0d training conflicts: masks do not separate the training set", n_conflict);
    end
    // classify each image and compare
    for (int t = 0; t < NTRAIN + NNEW; t++) begin
      automatic int cnt [N_DIGITS];
      automatic int m = 0;
      for (int d = 0; d < N_DIGITS; d++) cnt[d] = 0;
      for (int u = 0; u < N_PAIRS; u++) begin
        automatic int a = addr_of(u, img[t]);
        automatic logic [1:0] v = table_model[u].exists(a) ? table_model[u][a] : 2'b00;
        if (v[1]) cnt[pair_i(u)]++;
        if (v[0]) cnt[pair_j(u)]++;
      end
      for (int d = 0; d < N_DIGITS; d++) if (cnt[d] > m) m = cnt[d];
      in_valid = 1; image = img[t];
      @(negedge clk);
      in_valid = 0;
      @(posedge clk); #1;
      checks++;
      if (!out_valid) begin
        failures++;
        $display("FAIL image %0d: no result after 2 clocks", t);
      end
      for (int d = 0; d < N_DIGITS; d++) begin
        checks++;
        if (int'(out_counts[d]) != cnt[d]) begin
          failures++;
          $display("FAIL image %0d digit %0d count %0d expected %0d", t, d, out_counts[d], cnt[d]);
        end
      end
      checks++;
      if (int'(out_max) != m) begin
        failures++;
        $display("FAIL image %0d max %0d expected %0d", t, out_max, m);
      end
      if (lbl[t] >= 0) begin
        // training image: 9 votes for its digit, fewer for every other
        checks++;
        if (int'(out_counts[lbl[t]]) != 9 || out_winners != (N_DIGITS'(1) << lbl[t]) ||
            int'(out_digit) != lbl[t]) begin
          failures++;
          $display("FAIL training image %0d (digit %0d): count %0d winners %b digit %0d",
                   t, lbl[t], out_counts[lbl[t]], out_winners, out_digit);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
