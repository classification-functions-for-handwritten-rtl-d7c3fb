// tb_unit_group45: one full-size group of 45 pair units. Checks the
// configuration routing and that every unit sees the image:
//  - a broadcast mask write reaches all 45 units, a targeted one only its
//    unit (each unit then gets masks of its own);
//  - a broadcast table write at address 0 (the all-zero image maps there in
//    every unit) gives the same vote in all units, and a targeted write then
//    changes only the named unit;
//  - for random images, each unit's word is written at that unit's own
//    address, and all 45 votes are checked one clock after the image.
module tb_unit_group45;
  import cls_pkg::*;
  localparam int N = 784;
  localparam int P = 16;
  localparam int NIMG = 8;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [5:0]   cfg_pair = '0;
  logic         cfg_bcast = 0;
  logic         mask_we = 0;
  logic [3:0]   mask_sel = '0;
  logic [N-1:0] mask_wdata = '0;
  logic         lut_we = 0;
  logic [P-1:0] lut_waddr = '0;
  logic [1:0]   lut_wdata = '0;
  logic [N-1:0] x = '0;
  logic [N_PAIRS-1:0][1:0] votes;

  logic [N-1:0] ref_mask [N_PAIRS][P];
  logic [1:0]   table_model [N_PAIRS][int];

  unit_group45 #(.N(N), .P(P)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [N-1:0] rand_vec();
    logic [N-1:0] v;
    for (int k = 0; k < N; k++) v[k] = 1'($urandom);
    return v;
  endfunction

  function automatic int addr_of(input int u, input logic [N-1:0] im);
    logic [P-1:0] a;
    a = '0;
    for (int k = 0; k < N * P; k++) a[k / N] ^= im[k % N] & ref_mask[u][k / N][k % N];
    return int'(a);
  endfunction

  task automatic write_lut(input int u, input bit bc, input int a, input logic [1:0] w);
    cfg_pair = 6'(u); cfg_bcast = bc; lut_we = 1; lut_waddr = P'(a); lut_wdata = w;
    @(negedge clk);
    lut_we = 0; cfg_bcast = 0;
    if (bc) for (int v = 0; v < N_PAIRS; v++) table_model[v][a] = w;
    else table_model[u][a] = w;
  endtask

  task automatic check_votes(input int a_known, input logic [N-1:0] im, input string what);
    @(posedge clk); #1;
    for (int u = 0; u < N_PAIRS; u++) begin
      automatic int a = (a_known >= 0) ? a_known : addr_of(u, im);
      checks++;
      if (votes[u] !== table_model[u][a]) begin
        failures++;
        $display("FAIL %s unit %0d vote=%b expected %b", what, u, votes[u], table_model[u][a]);
      end
    end
    @(negedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // broadcast the same masks to all units
    for (int j = 0; j < P; j++) begin
      automatic logic [N-1:0] m = rand_vec();
      cfg_bcast = 1; mask_we = 1; mask_sel = 4'(j); mask_wdata = m;
      for (int u = 0; u < N_PAIRS; u++) ref_mask[u][j] = m;
      @(negedge clk);
    end
    cfg_bcast = 0;
    // then give every unit its own first six variables
    for (int u = 0; u < N_PAIRS; u++) begin
      for (int j = 0; j < 6; j++) begin
        ref_mask[u][j] = rand_vec();
        cfg_pair = 6'(u); mask_we = 1; mask_sel = 4'(j); mask_wdata = ref_mask[u][j];
        @(negedge clk);
      end
    end
    mask_we = 0;
    // all-zero image -> address 0 in every unit
    write_lut(0, 1, 0, 2'b10);
    x = '0;
    check_votes(0, x, "broadcast");
    write_lut(7, 0, 0, 2'b01);
    write_lut(44, 0, 0, 2'b00);
    check_votes(0, x, "targeted");
    // random images, one word per unit at that unit's address
    for (int t = 0; t < NIMG; t++) begin
      automatic logic [N-1:0] im = rand_vec();
      for (int u = 0; u < N_PAIRS; u++)
        write_lut(u, 0, addr_of(u, im), 2'((u + t) % 3));
      x = im;
      check_votes(-1, im, "image");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
