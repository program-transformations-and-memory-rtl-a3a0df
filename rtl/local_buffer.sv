// local_buffer: on-chip tile buffer (a_tmp, b_tmp or c_tmp of the strip-mined
// loop) holding one tile of DEPTH words.
//
// Simple dual-port RAM: one write port and one read port, both synchronous.
// Read data appears on rdata the cycle after rd_en with rd_addr; a read and a
// write to the same address in one cycle return the old word. The document
// gives the buffers' role and their size (one tile of int elements); the
// one-cycle synchronous read, which maps onto FPGA block memory, is this
// design's choice. Contents are not reset.
module local_buffer #(
  parameter int unsigned DEPTH  = 8192,
  parameter int unsigned DATA_W = 32,
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              wr_en,
  input  logic [AW-1:0]     wr_addr,
  input  logic [DATA_W-1:0] wdata,
  input  logic              rd_en,
  input  logic [AW-1:0]     rd_addr,
  output logic [DATA_W-1:0] rdata
);
  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rdata <= mem[rd_addr];
  end

endmodule
