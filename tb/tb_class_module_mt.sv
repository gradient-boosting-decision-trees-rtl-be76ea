// tb_class_module_mt: self-checking test of the multi-threaded class module.
//
// Random models of three unequal tree sets are loaded, random pixels are applied, and
// the class score and the exact number of cycles from start to done (3*n_t + t for the
// slowest set t visiting n_t nodes) are compared with the software walk of the model.
module tb_class_module_mt;
  import gbdt_pkg::*;
  import tb_gbdt_model::*;

  localparam int NF = 40;
  localparam int AW = 11;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic [FEAT_W-1:0] features [NF];
  logic busy, done;
  logic [RESULT_W-1:0] result;
  logic mem_we = 1'b0, init_we = 1'b0, init_sel = 1'b0;
  logic [AW-1:0] mem_waddr = '0, init_addr = '0;
  node_word_t mem_wdata = '0;
  logic node_valid, node_right;
  logic [1:0] node_thread;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  class_module_mt #(.N_FEATURES(NF), .ADDR_W(AW)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(gbdt_class_model m);
    for (int a = 0; a < m.size; a++) begin
      @(negedge clk);
      mem_we = 1'b1; mem_waddr = AW'(a); mem_wdata = m.mem[a];
    end
    @(negedge clk);
    mem_we = 1'b0;
    init_we = 1'b1; init_sel = 1'b0; init_addr = AW'(m.set_start[1]);
    @(negedge clk);
    init_sel = 1'b1; init_addr = AW'(m.set_start[2]);
    @(negedge clk);
    init_we = 1'b0;
  endtask

  task automatic run_pixel(gbdt_class_model m);
    logic [FEAT_W-1:0] f [];
    int n [3];
    int expect_score, expect_cycles, cycles, slots;
    f = new[NF];
    foreach (f[i]) begin
      f[i] = FEAT_W'($urandom);
      features[i] = f[i];
    end
    expect_score = 0;
    expect_cycles = 0;
    for (int s = 0; s < 3; s++) begin
      expect_score += m.eval_set(s, f, n[s]);
      if (3 * n[s] + s > expect_cycles) expect_cycles = 3 * n[s] + s;
    end
    @(negedge clk);
    start = 1'b1;
    @(posedge clk);
    #1 start = 1'b0;
    cycles = 0;
    slots = 0;
    while (!done) begin
      if (node_valid) slots++;
      @(posedge clk);
      cycles++;
      #1;
    end
    checks++;
    if (result !== RESULT_W'(expect_score)) begin
      failures++;
      $display("score mismatch: got %0d expected %0d", $signed(result), expect_score);
    end
    checks++;
    if (cycles != expect_cycles) begin
      failures++;
      $display("cycle mismatch: got %0d expected %0d (n = %0d %0d %0d)", cycles, expect_cycles, n[0], n[1], n[2]);
    end
    checks++;
    if (slots != n[0] + n[1] + n[2]) begin
      failures++;
      $display("executed node count %0d, expected %0d", slots, n[0] + n[1] + n[2]);
    end
    checks++;
    if (busy) begin
      failures++;
      $display("busy still high after done");
    end
  endtask

  initial begin
    gbdt_class_model m;
    foreach (features[i]) features[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // Model 1: unbalanced sets.
    m = new(2 ** AW, NF);
    m.gen_set(6, 5, 60);
    m.gen_set(2, 3, 70);
    m.gen_set(9, 6, 55);
    load(m);
    repeat (25) run_pixel(m);

    // Model 2: one set is a single leaf, another a single stump.
    m = new(2 ** AW, NF);
    m.gen_set(1, 0, 0);
    m.gen_set(4, 6, 65);
    m.gen_set(1, 1, 100);
    load(m);
    repeat (25) run_pixel(m);

    // Model 3: larger, near-balanced sets.
    m = new(2 ** AW, NF);
    m.gen_set(12, 6, 60);
    m.gen_set(12, 6, 60);
    m.gen_set(12, 6, 60);
    load(m);
    repeat (15) run_pixel(m);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
