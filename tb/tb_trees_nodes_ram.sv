// tb_trees_nodes_ram: checks the node memory against an associative-array model:
// writes to random addresses, one-cycle read latency, and that rdata holds while re
// is low.
module tb_trees_nodes_ram;
  localparam int AW = 13;
  localparam int DW = 32;

  logic clk = 1'b0;
  logic we = 1'b0, re = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [DW-1:0] wdata = '0, rdata;
  logic [DW-1:0] model [int];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  trees_nodes_ram #(.ADDR_W(AW), .DATA_W(DW)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a;
    logic [DW-1:0] held;
    // Fill the whole memory, then overwrite random words.
    for (int i = 0; i < 2 ** AW; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = AW'(i); wdata = $urandom; model[i] = wdata;
    end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      a = $urandom_range(0, 2 ** AW - 1);
      waddr = AW'(a); wdata = $urandom; model[a] = wdata;
    end
    @(negedge clk);
    we = 1'b0;
    // Random reads, each checked one cycle later.
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      a = $urandom_range(0, 2 ** AW - 1);
      re = 1'b1; raddr = AW'(a);
      @(negedge clk);
      re = 1'b0;
      checks++;
      if (rdata !== model[a]) begin
        failures++;
        $display("read %0d: got %h expected %h", a, rdata, model[a]);
      end
      // With re low the output must hold even if the address changes.
      held = rdata;
      raddr = ~raddr;
      @(negedge clk);
      checks++;
      if (rdata !== held) begin
        failures++;
        $display("rdata changed while re was low");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
