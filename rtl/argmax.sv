// argmax: picks the class with the highest score.
//
// Scores are signed two's complement sums of leaf values. The comparison is a binary
// reduction tree of two-input "keep the larger" cells; on equal scores the lower class
// index wins. Purely combinational. What the block computes follows the published
// accelerator; the tree structure and the tie rule are this design's.
module argmax #(
  parameter int N_CLASSES = 16,
  parameter int W         = 32,
  localparam int IDX_W    = (N_CLASSES > 1) ? $clog2(N_CLASSES) : 1
) (
  input  logic [W-1:0]     scores [N_CLASSES],
  output logic [IDX_W-1:0] idx,
  output logic [W-1:0]     best
);

  // The inputs are padded to a power of two; padding entries are marked not ok and
  // never win a comparison against a real class.
  localparam int LEVELS = IDX_W;
  localparam int P      = 2**LEVELS;

  logic signed [W-1:0] val [LEVELS+1][P];
  logic [IDX_W-1:0]    ix  [LEVELS+1][P];
  logic                ok  [LEVELS+1][P];  // entry holds a real class

  always_comb begin
    for (int i = 0; i < P; i++) begin
      val[0][i] = (i < N_CLASSES) ? scores[i] : '0;
      ix[0][i]  = IDX_W'(i);
      ok[0][i]  = (i < N_CLASSES);
    end
    for (int l = 0; l < LEVELS; l++) begin
      for (int i = 0; i < P; i++) begin
        val[l+1][i] = '0;
        ix[l+1][i]  = '0;
        ok[l+1][i]  = 1'b0;
      end
      for (int i = 0; i < (P >> (l + 1)); i++) begin
        if (!ok[l][2*i+1] || (ok[l][2*i] && val[l][2*i] >= val[l][2*i+1])) begin
          val[l+1][i] = val[l][2*i];
          ix[l+1][i]  = ix[l][2*i];
          ok[l+1][i]  = ok[l][2*i];
        end else begin
          val[l+1][i] = val[l][2*i+1];
          ix[l+1][i]  = ix[l][2*i+1];
          ok[l+1][i]  = ok[l][2*i+1];
        end
      end
    end
    idx  = ix[LEVELS][0];
    best = val[LEVELS][0];
  end

endmodule
