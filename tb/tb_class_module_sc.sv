// tb_class_module_sc: self-checking test of the multi-threaded class module.
//
// Random models of three unequal tree sets are loaded, random pixels are applied, and
// the class score and the exact number of cycles from start to done (3*n_t + t for the
// slowest set t visiting n_t nodes) are compared with the software walk of the model.
module tb_class_module_sc;
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
  logic mem_we = 1'b0;
  logic [AW-1:0] mem_waddr = '0;
  node_word_t mem_wdata = '0;
  logic node_valid, node_right;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  class_module_sc #(.N_FEATURES(NF), .ADDR_W(AW)) dut (.*);

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
  endtask

  task automatic run_pixel(gbdt_class_model m);
    logic [FEAT_W-1:0] f [];
    int n [1];
    int expect_score, expect_cycles, cycles, slots;
    f = new[NF];
    foreach (f[i]) begin
      f[i] = FEAT_W'($urandom);
      features[i] = f[i];
    end
    expect_score = 0;
    expect_cycles = 0;
    expect_score = m.eval_set(0, f, n[0]);
    expect_cycles = n[0];
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
      $display("cycle mismatch: got %0d expected %0d", cycles, expect_cycles);
    end
    checks++;
    if (slots != n[0]) begin
      failures++;
      $display("executed node count %0d, expected %0d", slots, n[0]);
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

    // Model 1: a chain of trees of mixed depth.
    m = new(2 ** AW, NF);
    m.gen_set(17, 6, 60);
    load(m);
    repeat (25) run_pixel(m);

    // Model 2: a single leaf, the shortest possible model.
    m = new(2 ** AW, NF);
    m.gen_set(1, 0, 0);
    load(m);
    repeat (5) run_pixel(m);

    // Model 3: many shallow trees.
    m = new(2 ** AW, NF);
    m.gen_set(40, 2, 80);
    load(m);
    repeat (25) run_pixel(m);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
