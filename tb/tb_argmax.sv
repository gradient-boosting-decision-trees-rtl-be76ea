// tb_argmax: checks the arg-max against a linear search, with random signed scores,
// forced ties (lowest index must win) and all-equal inputs, for 16 and 13 classes.
module tb_argmax;
  int checks = 0, failures = 0;

  localparam int W = 32;

  logic [W-1:0] s16 [16];
  logic [3:0]   i16;
  logic [W-1:0] b16;
  logic [W-1:0] s13 [13];
  logic [3:0]   i13;
  logic [W-1:0] b13;

  argmax #(.N_CLASSES(16), .W(W)) dut16 (.scores(s16), .idx(i16), .best(b16));
  argmax #(.N_CLASSES(13), .W(W)) dut13 (.scores(s13), .idx(i13), .best(b13));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bi, mode;
    for (int t = 0; t < 2000; t++) begin
      mode = t % 4;
      foreach (s16[i]) begin
        case (mode)
          0: s16[i] = $urandom;
          1: s16[i] = W'($urandom_range(0, 7) - 4);   // many ties, negatives
          2: s16[i] = 32'h8000_0000;                   // all equal, most negative
          default: s16[i] = W'(int'($urandom_range(0, 2000)) - 1000);
        endcase
      end
      foreach (s13[i]) s13[i] = s16[i + 3];
      #1;
      bi = 0;
      for (int i = 1; i < 16; i++) if ($signed(s16[i]) > $signed(s16[bi])) bi = i;
      checks++;
      if (i16 != 4'(bi) || b16 !== s16[bi]) begin
        failures++;
        $display("16: got %0d (%0d), expected %0d (%0d)", i16, $signed(b16), bi, $signed(s16[bi]));
      end
      bi = 0;
      for (int i = 1; i < 13; i++) if ($signed(s13[i]) > $signed(s13[bi])) bi = i;
      checks++;
      if (i13 != 4'(bi) || b13 !== s13[bi]) begin
        failures++;
        $display("13: got %0d, expected %0d", i13, bi);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
