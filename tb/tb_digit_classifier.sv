// tb_digit_classifier: end-to-end test of the 45-unit x R classifier at its
// default size (R = 4 groups, 180 pair units, 16 variables per unit).
//
// The test builds a small synthetic digit set: a random prototype image per
// digit, and training images made by flipping a few pixels of a prototype.
// Training images are split among the R groups; the prototypes go to every
// group. Each unit gets compound-variable masks (a shared set sent by
// broadcast, then a few variables of its own, and some variables left
// unused), every table is cleared to "unknown" by broadcast, and the units
// are trained as the method prescribes: unit i/j of group g stores 2'b10 or
// 2'b01 at the address of each group-g training image of digit i or j.
//
// Images are then streamed one per clock (with one bubble): prototypes,
// training images, unseen noisy images and the blank image. An independent
// model computes every unit's vote, the ten counts, the largest count, the
// tied winners and the reported digit; every result must match and must
// appear exactly two clocks after its image. The test counts how often each
// mechanism occurred (unanimous 9R vote, vote from a single group, ties,
// all-unknown images, streaming without gaps, bubbles, broadcast writes)
// and fails if one never did. Training images must be recognised, as the
// method guarantees for its training set when the groups do not conflict.
module tb_digit_classifier;
  import cls_pkg::*;
  localparam int R    = 4;
  localparam int P    = 16;
  localparam int N    = N_PIXELS;
  localparam int K    = 9 * R;
  localparam int CW   = $clog2(K + 1);
  localparam int NU   = R * N_PAIRS;
  localparam int NTR  = 2;                       // training images per digit per group
  localparam int NTRAIN = N_DIGITS * R * NTR;
  localparam int NTEST  = N_DIGITS + NTRAIN + 12 + 1;

  int checks = 0, failures = 0;
  int n_unanimous = 0, n_single_group = 0, n_tie = 0, n_all_unknown = 0;
  int n_bcast = 0, n_bubble = 0, n_streamed = 0, n_conflict = 0;

  logic clk = 0, rst_n = 0;
  logic [1:0]   cfg_group = '0;
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

  digit_classifier dut (.*);

  always #5 clk = ~clk;

  // ---------------- model state ----------------
  logic [N-1:0] ref_mask [NU][P];
  logic [1:0]   table_model [NU][int];     // absent entry = 2'b00 (cleared)
  logic [N-1:0] proto [N_DIGITS];
  logic [N-1:0] train_img [NTRAIN];
  int           train_lbl [NTRAIN];
  int           train_grp [NTRAIN];
  logic [N-1:0] test_img [NTEST];
  int           test_lbl [NTEST];          // -1 = no expected digit

  // expected results
  logic [N_DIGITS-1:0][CW-1:0] exp_counts [NTEST];
  logic [CW-1:0]       exp_max [NTEST];
  logic [N_DIGITS-1:0] exp_win [NTEST];
  int                  exp_digit [NTEST];

  function automatic logic [N-1:0] rand_vec();
    logic [N-1:0] v;
    for (int k = 0; k < N; k++) v[k] = 1'($urandom);
    return v;
  endfunction

  function automatic logic [N-1:0] noisy(input logic [N-1:0] v, input int flips);
    for (int f = 0; f < flips; f++) v[$urandom_range(0, N - 1)] ^= 1'b1;
    return v;
  endfunction

  function automatic int addr_of(input int unit, input logic [N-1:0] im);
    logic [P-1:0] a;
    a = '0;
    for (int k = 0; k < N * P; k++) a[k / N] ^= im[k % N] & ref_mask[unit][k / N][k % N];
    return int'(a);
  endfunction

  function automatic logic [1:0] model_vote(input int unit, input logic [N-1:0] im);
    int a = addr_of(unit, im);
    return table_model[unit].exists(a) ? table_model[unit][a] : 2'b00;
  endfunction

  task automatic cfg_idle;
    cfg_mask_we = 0; cfg_lut_we = 0; cfg_bcast = 0;
  endtask

  // expected output for test image t
  task automatic model_image(input int t);
    int cnt [N_DIGITS];
    int m = 0, d = -1, nw = 0;
    bit all_unknown = 1;
    for (int i = 0; i < N_DIGITS; i++) cnt[i] = 0;
    for (int g = 0; g < R; g++) begin
      for (int u = 0; u < N_PAIRS; u++) begin
        logic [1:0] v = model_vote(g * N_PAIRS + u, test_img[t]);
        if (v[1]) cnt[pair_i(u)]++;
        if (v[0]) cnt[pair_j(u)]++;
        if (v != 2'b00) all_unknown = 0;
      end
    end
    for (int i = 0; i < N_DIGITS; i++) if (cnt[i] > m) m = cnt[i];
    for (int i = 0; i < N_DIGITS; i++) begin
      exp_counts[t][i] = CW'(cnt[i]);
      exp_win[t][i] = (cnt[i] == m);
      if (cnt[i] == m) begin
        nw++;
        if (d < 0) d = i;
      end
    end
    exp_max[t] = CW'(m);
    exp_digit[t] = d;
    if (m == K) n_unanimous++;
    if (m > 0 && m <= 9) n_single_group++;
    if (nw > 1) n_tie++;
    if (all_unknown) n_all_unknown++;
  endtask

  // ---------------- stimulus ----------------
  int in_cycle [$];
  int in_idx [$];
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    int n;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);

    // masks: a shared set by broadcast ...
    for (int j = 0; j < P; j++) begin
      logic [N-1:0] m;
      if (j >= 13) m = '0;                                  // unused variables
      else if (j < 4) m = N'(1) << $urandom_range(0, N - 1); // primitive
      else m = rand_vec();                                   // compound
      cfg_bcast = 1; cfg_mask_we = 1; cfg_mask_sel = 4'(j); cfg_mask_wdata = m;
      n_bcast++;
      for (int un = 0; un < NU; un++) ref_mask[un][j] = m;
      @(negedge clk);
    end
    cfg_idle();
    // ... then four compound variables of each unit's own
    for (int un = 0; un < NU; un++) begin
      for (int j = 4; j < 8; j++) begin
        ref_mask[un][j] = rand_vec();
        cfg_group = 2'(un / N_PAIRS); cfg_pair = 6'(un % N_PAIRS);
        cfg_mask_we = 1; cfg_mask_sel = 4'(j); cfg_mask_wdata = ref_mask[un][j];
        @(negedge clk);
      end
    end
    cfg_idle();
    // clear every table to "unknown"
    for (int a = 0; a < 2 ** P; a++) begin
      cfg_bcast = 1; cfg_lut_we = 1; cfg_lut_waddr = P'(a); cfg_lut_wdata = 2'b00;
      @(negedge clk);
    end
    n_bcast++;
    cfg_idle();

    // data set
    for (int d = 0; d < N_DIGITS; d++) proto[d] = rand_vec();
    n = 0;
    for (int g = 0; g < R; g++)
      for (int d = 0; d < N_DIGITS; d++)
        for (int s = 0; s < NTR; s++) begin
          train_img[n] = noisy(proto[d], 20);
          train_lbl[n] = d;
          train_grp[n] = g;
          n++;
        end

    // training: unit i/j of group g learns group g's images of i and j
    for (int g = 0; g < R; g++) begin
      for (int u = 0; u < N_PAIRS; u++) begin
        automatic int un = g * N_PAIRS + u;
        for (int t = -N_DIGITS; t < NTRAIN; t++) begin
          logic [N-1:0] im;
          int lbl, a;
          logic [1:0] w;
          if (t < 0) begin
            im = proto[t + N_DIGITS]; lbl = t + N_DIGITS;
          end else begin
            if (train_grp[t] != g) continue;
            im = train_img[t]; lbl = train_lbl[t];
          end
          if (lbl != pair_i(u) && lbl != pair_j(u)) continue;
          w = (lbl == pair_i(u)) ? 2'b10 : 2'b01;
          a = addr_of(un, im);
          if (table_model[un].exists(a) && table_model[un][a] != w) begin
            n_conflict++;           // keep the first word
            continue;
          end
          table_model[un][a] = w;
          cfg_group = 2'(g); cfg_pair = 6'(u);
          cfg_lut_we = 1; cfg_lut_waddr = P'(a); cfg_lut_wdata = w;
          @(negedge clk);
        end
      end
    end
    cfg_idle();

    // test images and their expected results
    n = 0;
    for (int d = 0; d < N_DIGITS; d++) begin test_img[n] = proto[d]; test_lbl[n] = d; n++; end
    for (int t = 0; t < NTRAIN; t++) begin test_img[n] = train_img[t]; test_lbl[n] = train_lbl[t]; n++; end
    for (int t = 0; t < 12; t++) begin
      test_img[n] = noisy(proto[t % N_DIGITS], 40); test_lbl[n] = -1; n++;
    end
    test_img[n] = '0; test_lbl[n] = -1; n++;
    for (int t = 0; t < NTEST; t++) model_image(t);

    // stream the images, one per clock, with one bubble
    for (int t = 0; t < NTEST; t++) begin
      if (t == NTEST / 2) begin
        in_valid = 0;
        n_bubble++;
        @(negedge clk);
      end
      in_valid = 1; image = test_img[t];
      in_cycle.push_back(cycle);
      in_idx.push_back(t);
      @(negedge clk);
    end
    in_valid = 0;
    repeat (4) @(negedge clk);

    if (in_idx.size() != 0) begin
      failures++;
      $display("FAIL %0d results never came out", in_idx.size());
    end
    // training images must be recognised (no conflicts arise in this set)
    if (n_conflict != 0) $display("note: %0d training conflicts", n_conflict);

    $display("mechanisms: unanimous=%0d single_group=%0d ties=%0d all_unknown=%0d streamed=%0d bubbles=%0d broadcasts=%0d",
             n_unanimous, n_single_group, n_tie, n_all_unknown, n_streamed, n_bubble, n_bcast);
    if (n_unanimous == 0)    begin failures++; $display("FAIL no unanimous vote"); end
    if (n_single_group == 0) begin failures++; $display("FAIL no single-group vote"); end
    if (n_tie == 0)          begin failures++; $display("FAIL no tie"); end
    if (n_all_unknown == 0)  begin failures++; $display("FAIL no all-unknown image"); end
    if (n_streamed < NTEST - 2) begin failures++; $display("FAIL too few back-to-back results"); end
    if (n_bubble == 0)       begin failures++; $display("FAIL no bubble"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- result monitor ----------------
  logic prev_out_valid = 0;
  always @(posedge clk) begin
    #1;
    if (out_valid) begin
      if (in_idx.size() == 0) begin
        failures++;
        $display("FAIL unexpected result");
      end else begin
        automatic int t = in_idx.pop_front();
        automatic int c = in_cycle.pop_front();
        checks++;
        if (cycle - c != 2) begin
          failures++;
          $display("FAIL image %0d latency %0d clocks, expected 2", t, cycle - c);
        end
        checks++;
        if (out_counts !== exp_counts[t] || out_max !== exp_max[t] ||
            out_winners !== exp_win[t] || int'(out_digit) != exp_digit[t]) begin
          failures++;
          $display("FAIL image %0d: max=%0d/%0d winners=%b/%b digit=%0d/%0d",
                   t, out_max, exp_max[t], out_winners, exp_win[t], out_digit, exp_digit[t]);
        end
        if (test_lbl[t] >= 0) begin
          checks++;
          if (int'(out_digit) != test_lbl[t]) begin
            failures++;
            $display("FAIL training image %0d recognised as %0d, label %0d", t, out_digit, test_lbl[t]);
          end
        end
        if (prev_out_valid) n_streamed++;
      end
    end
    prev_out_valid = out_valid;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
