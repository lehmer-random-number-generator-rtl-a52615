// tb_lrng_top: end-to-end test of all generator implementations side by
// side, at their default configuration. Every generator starts from the
// same seeds and must follow Z <- 16807*Z mod (2^31-1):
//  - the five word-parallel generators, one number per cycle, must agree
//    with the reference and with each other; after 10000 numbers from
//    seed 1 they must show 1043618065;
//  - the word-serial (6 cycles) and bit-serial (219 cycles) generators run
//    alongside and are checked after each of their numbers.
// It counts the mechanisms of the design and fails if one never occurred:
// seed load, nop, next, end-around carry in the final adder of the main
// carry-save tree, carry of bit 30 rotated into bit 0 by a carry-save adder,
// and an op ignored by a busy serial generator.
module tb_lrng_top;
  import lrng_pkg::*;
  localparam longint unsigned MM = 64'h7FFF_FFFF;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic [1:0]  op_wp = 2'd0, op_ws = 2'd0, op_bs = 2'd0;
  logic [30:0] seed_wp = '0, seed_ws = '0, seed_bs = '0;
  logic [30:0] z_wp [5];
  logic [30:0] z_ws, z_bs;
  logic        busy_ws, busy_bs;
  int checks = 0, failures = 0;
  int n_seed = 0, n_nop = 0, n_next = 0, n_endaround = 0, n_rotcarry = 0;
  int n_ignore_ws = 0, n_ignore_bs = 0, n_ws = 0, n_bs = 0;
  bit wp_done = 0, ws_done = 0, bs_done = 0;

  lrng_top dut (.*);

  always #5 clk = ~clk;

  function automatic logic [30:0] ref_next(logic [30:0] v);
    return 31'((longint'(v) * 16807) % MM);
  endfunction

  task automatic expect_eq(longint unsigned got, longint unsigned exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d exp %0d", what, got, exp);
    end
  endtask

  // Mechanism monitors inside the main (carry-save tree) generator.
  always @(posedge clk) if (rst_n && op_wp == OP_NEXT) begin
    if (dut.g_wp[0].u_gen.g_csa_tree.u_nrn.u_cpa.c0[31]) n_endaround++;
    if (dut.g_wp[0].u_gen.g_csa_tree.u_nrn.u_csa_e.dh[0]) n_rotcarry++;
  end

  // Word-parallel stream.
  initial begin : wp
    logic [30:0] e;
    @(posedge rst_n); #1;
    op_wp = OP_SEED; seed_wp = 31'd1; @(posedge clk); #1; n_seed++;
    for (int k = 0; k < 5; k++) expect_eq(z_wp[k], 1, "wp seed");
    op_wp = OP_NOP; @(posedge clk); #1; n_nop++;
    for (int k = 0; k < 5; k++) expect_eq(z_wp[k], 1, "wp nop");
    e = 31'd1;
    for (int i = 1; i <= 10000; i++) begin
      op_wp = OP_NEXT; @(posedge clk); #1; n_next++;
      e = ref_next(e);
      if (i % 10 == 0 || i < 100)
        for (int k = 0; k < 5; k++) expect_eq(z_wp[k], e, $sformatf("wp gen %0d step %0d", k, i));
    end
    expect_eq(z_wp[0], 1043618065, "wp 10000th number from seed 1");
    op_wp = OP_NOP;
    wp_done = 1;
  end

  // Word-serial stream.
  initial begin : ws
    logic [30:0] e;
    @(posedge rst_n); #1;
    op_ws = OP_SEED; seed_ws = 31'd1; @(posedge clk); #1; n_seed++;
    expect_eq(z_ws, 1, "ws seed");
    e = 31'd1;
    for (int i = 0; i < 300; i++) begin
      op_ws = OP_NEXT; @(posedge clk); #1;
      op_ws = (i % 4 == 1) ? OP_SEED : OP_NOP; seed_ws = 31'd77;
      if (busy_ws && op_ws == OP_SEED) n_ignore_ws++;
      @(posedge clk); #1; op_ws = OP_NOP;
      while (busy_ws) begin @(posedge clk); #1; end
      e = ref_next(e);
      expect_eq(z_ws, e, "ws number"); n_ws++;
    end
    ws_done = 1;
  end

  // Bit-serial stream.
  initial begin : bs
    logic [30:0] e;
    @(posedge rst_n); #1;
    op_bs = OP_SEED; seed_bs = 31'd1; @(posedge clk); #1; n_seed++;
    expect_eq(z_bs, 1, "bs seed");
    e = 31'd1;
    for (int i = 0; i < 40; i++) begin
      int lat;
      op_bs = OP_NEXT; @(posedge clk); #1; lat = 1;
      op_bs = (i % 4 == 1) ? OP_SEED : OP_NOP; seed_bs = 31'd77;
      if (busy_bs && op_bs == OP_SEED) n_ignore_bs++;
      @(posedge clk); #1; lat++; op_bs = OP_NOP;
      while (busy_bs) begin @(posedge clk); #1; lat++; end
      e = ref_next(e);
      expect_eq(z_bs, e, "bs number"); n_bs++;
      expect_eq(lat, 219, "bs latency");
    end
    bs_done = 1;
  end

  initial begin : main
    repeat (2) @(posedge clk);
    #1;
    for (int k = 0; k < 5; k++) expect_eq(z_wp[k], 1, "reset wp");
    expect_eq(z_ws, 1, "reset ws");
    expect_eq(z_bs, 1, "reset bs");
    rst_n = 1'b1;
    wait (wp_done && ws_done && bs_done);
    $display("mechanisms: seed=%0d nop=%0d next=%0d end_around_carry=%0d rotated_csa_carry=%0d ignored_ws=%0d ignored_bs=%0d ws_numbers=%0d bs_numbers=%0d",
             n_seed, n_nop, n_next, n_endaround, n_rotcarry, n_ignore_ws, n_ignore_bs, n_ws, n_bs);
    if (n_seed == 0 || n_nop == 0 || n_next == 0 || n_endaround == 0 || n_rotcarry == 0 ||
        n_ignore_ws == 0 || n_ignore_bs == 0 || n_ws == 0 || n_bs == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
