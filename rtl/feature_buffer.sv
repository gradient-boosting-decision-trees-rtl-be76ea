// feature_buffer: input side of the accelerator, a double-buffered feature register.
//
// Features of a pixel arrive as a stream, one 16-bit feature per beat (valid/ready),
// feature 0 first, and are written into a shadow buffer. Once N_FEATURES beats have
// arrived the shadow buffer is full and the stream is held off (s_ready low). A one
// cycle load pulse copies the whole shadow buffer into the features register that
// feeds the class modules and frees the shadow buffer at once, so the next pixel can
// stream in while the current one is being classified. The features register is read
// by every class module and holds its value until the next load. The stream protocol
// and the double buffer are this design's choice; the published accelerator states
// only that input transfer overlaps with the processing of the preceding pixel.
module feature_buffer
  import gbdt_pkg::*;
#(
  parameter int N_FEATURES = 224
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              s_valid,
  output logic              s_ready,
  input  logic [FEAT_W-1:0] s_data,
  output logic              full,
  input  logic              load,
  output logic [FEAT_W-1:0] features [N_FEATURES]
);

  localparam int CNT_W = (N_FEATURES > 1) ? $clog2(N_FEATURES) : 1;

  logic [FEAT_W-1:0] shadow [N_FEATURES];
  logic [CNT_W-1:0]  wr_idx;

  assign s_ready = !full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full   <= 1'b0;
      wr_idx <= '0;
    end else if (load) begin
      full <= 1'b0;
    end else if (s_valid && s_ready) begin
      if (wr_idx == CNT_W'(N_FEATURES-1)) begin
        wr_idx <= '0;
        full   <= 1'b1;
      end else begin
        wr_idx <= wr_idx + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (s_valid && s_ready && !load) shadow[wr_idx] <= s_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_FEATURES; i++) features[i] <= '0;
    end else if (load) begin
      features <= shadow;
    end
  end

  // Stream rule for the source: a beat that is not accepted stays offered, unchanged.
  a_s_hold: assert property (@(posedge clk) disable iff (!rst_n)
                             s_valid && !s_ready |=> s_valid && $stable(s_data));
  a_load_full: assert property (@(posedge clk) disable iff (!rst_n) load |-> full);

endmodule
