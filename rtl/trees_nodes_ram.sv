// trees_nodes_ram: the on-chip memory that holds every tree node of one class.
//
// A simple dual-port memory of 2**ADDR_W words: one write port, used to load the
// model, and one read port used by the traversal. The read is synchronous, as in an
// FPGA block RAM: the word at raddr appears on rdata one clock after re is high, and
// rdata holds its value while re is low. The default of 8192 x 32 bits matches eight
// 32-Kbit block RAMs per class. The write port and the read timing are this design's
// choice; contents are not reset.
module trees_nodes_ram #(
  parameter int ADDR_W = 13,
  parameter int DATA_W = 32
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [DATA_W-1:0] wdata,
  input  logic              re,
  input  logic [ADDR_W-1:0] raddr,
  output logic [DATA_W-1:0] rdata
);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end

endmodule
