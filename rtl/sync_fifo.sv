// sync_fifo: synchronisation FIFO between two accelerator processes.
//
// Processes of the accelerator hand each other tokens ("tile loaded",
// "buffer free", "your turn on DDR") through small FIFOs, by default of size
// one, as the document prescribes. A producer pushes with push when full is
// low; a consumer pops with pop when empty is low. Push and pop act on the
// rising clock edge; a push into a full FIFO or a pop from an empty one is an
// error and is flagged by assertions. INIT_COUNT preloads that many tokens
// (data zero) at reset and on clear, which is how "buffer initially free" and
// "first on the DDR ring" are expressed; that preload is this design's choice.
// The FIFO carries a DATA_W-bit payload (default 1 bit) in case a token
// needs to name something; the accelerator itself only uses its presence.
module sync_fifo #(
  parameter int unsigned DEPTH      = 1,
  parameter int unsigned DATA_W     = 1,
  parameter int unsigned INIT_COUNT = 0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              push,
  input  logic [DATA_W-1:0] din,
  output logic              full,
  input  logic              pop,
  output logic [DATA_W-1:0] dout,
  output logic              empty
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [DATA_W-1:0] mem [DEPTH];
  logic [PW-1:0]     wr_ptr, rd_ptr;
  logic [CW-1:0]     count;

  function automatic logic [PW-1:0] next_ptr(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  assign full  = (count == CW'(DEPTH));
  assign empty = (count == '0);
  assign dout  = mem[rd_ptr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= PW'(INIT_COUNT % DEPTH);
      rd_ptr <= '0;
      count  <= CW'(INIT_COUNT);
      for (int i = 0; i < int'(DEPTH); i++) mem[i] <= '0;
    end else if (clear) begin
      wr_ptr <= PW'(INIT_COUNT % DEPTH);
      rd_ptr <= '0;
      count  <= CW'(INIT_COUNT);
      for (int i = 0; i < int'(DEPTH); i++) mem[i] <= '0;
    end else begin
      if (push && !full) begin
        mem[wr_ptr] <= din;
        wr_ptr      <= next_ptr(wr_ptr);
      end
      if (pop && !empty) rd_ptr <= next_ptr(rd_ptr);
      case ({push && !full, pop && !empty})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  initial begin
    assert (INIT_COUNT <= DEPTH) else $error("sync_fifo: INIT_COUNT exceeds DEPTH");
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && full && !clear));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty && !clear));

endmodule
