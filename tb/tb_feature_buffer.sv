// tb_feature_buffer: streams pixels with random valid gaps, loads each complete pixel
// and checks the features register, back-pressure (s_ready low while full), and that a
// new pixel fills the shadow buffer while the previous one stays in the register.
module tb_feature_buffer;
  import gbdt_pkg::*;
  localparam int NF = 224;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic s_valid = 1'b0, s_ready;
  logic [FEAT_W-1:0] s_data = '0;
  logic full, load = 1'b0;
  logic [FEAT_W-1:0] features [NF];
  int checks = 0, failures = 0;
  int stalls = 0;

  always #5 clk = ~clk;

  feature_buffer #(.N_FEATURES(NF)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [FEAT_W-1:0] px [10][NF];
  int sent_px = 0;

  // Producer: random gaps, holds data while not accepted.
  initial begin
    @(posedge rst_n);
    for (int p = 0; p < 10; p++) begin
      for (int i = 0; i < NF; i++) begin
        @(negedge clk);
        while ($urandom_range(0, 3) == 0) begin
          s_valid = 1'b0;
          @(negedge clk);
        end
        s_valid = 1'b1;
        s_data  = px[p][i];
        // s_ready changes only at a clock edge: sample it between edges.
        while (!s_ready) begin
          stalls++;
          @(negedge clk);
        end
        @(posedge clk);
      end
      @(negedge clk);
      s_valid = 1'b0;
      sent_px++;
    end
  end

  initial begin
    foreach (px[p, i]) px[p][i] = FEAT_W'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < 10; p++) begin
      // Wait for a complete pixel; while waiting, the register must keep the previous one.
      while (!full) begin
        @(negedge clk);
        if (p > 0) begin
          checks++;
          if (features[5] !== px[p - 1][5]) begin
            failures++;
            $display("features register changed before load");
          end
        end
      end
      // Keep it full for a while to exercise back-pressure.
      repeat ($urandom_range(0, 20)) begin
        @(negedge clk);
        checks++;
        if (s_ready) begin
          failures++;
          $display("s_ready high while full");
        end
      end
      @(negedge clk);
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      for (int i = 0; i < NF; i++) begin
        checks++;
        if (features[i] !== px[p][i]) begin
          failures++;
          $display("pixel %0d feature %0d: got %h expected %h", p, i, features[i], px[p][i]);
        end
      end
    end
    checks++;
    if (stalls == 0) begin
      failures++;
      $display("back-pressure never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
