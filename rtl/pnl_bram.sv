// pnl_bram: the stand-alone block RAM that the secure memory access
// controller loads and unloads.
//
// Single port, synchronous: on a rising clock edge with we high, din is
// written to mem[addr]; on every rising edge dout takes the word at addr
// (write-first: during a write dout shows the word being written). Read
// latency is one clock. The memory has no reset and its contents are
// undefined until written.
//
// Only the memory's name and role (a stand-alone on-chip RAM with a write
// enable, a data input and a data output) come from the controller's
// description; the single-port organisation, the one-cycle read and the
// write-first behaviour are this design's choices and match a block RAM
// primitive in its common configuration.
module pnl_bram #(
  parameter int unsigned ADDR_W = smac_pkg::SMAC_ADDR_W,
  parameter int unsigned DATA_W = smac_pkg::SMAC_DATA_W
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  input  logic              we,
  input  logic [DATA_W-1:0] din,
  output logic [DATA_W-1:0] dout
);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (we) begin
      mem[addr] <= din;
      dout      <= din;
    end else begin
      dout      <= mem[addr];
    end
  end

endmodule
