// compute_proc: the compute process (COMP0 / COMP1) of the double-buffered
// accelerator.
//
// It processes the tiles in order 0 .. NT-1, alternating between buffer set 0
// (even tiles) and buffer set 1 (odd tiles). For tile t in set k = t mod 2 it
// waits until both "tile loaded" from Load k and "c buffer free" from Store k
// are present, takes both tokens, and then computes
//     c_tmp[k][j] = a_tmp[k][j] + b_tmp[k][j]      (KERNEL_VSUM)
//     c_tmp[k][j] = a_tmp[k][j]                    (KERNEL_COPY, DMA)
// for j = 0 .. BLOCK-1, one element per cycle (a fully pipelined inner loop).
// With the write of the last element it hands "a/b buffers free" back to
// Load k and "tile computed" to Store k.
//
// Timing: the local buffers have a one-cycle read, so element j is read in one
// cycle and written the next; a tile takes BLOCK + 2 cycles once its tokens
// are present. The tile order, buffer alternation and tokens follow the
// document; the pipelining is this design's choice. Additions wrap modulo
// 2^32 like C int arithmetic on a two's-complement machine.
module compute_proc
  import vsum_pkg::*;
#(
  parameter int unsigned BLOCK  = 8192,
  parameter kernel_e     KERNEL = KERNEL_VSUM,
  localparam int unsigned AW    = (BLOCK > 1) ? $clog2(BLOCK) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [31:0]   n_tiles,
  output logic          busy,
  output logic          done,
  // tokens, indexed by buffer set
  input  logic [1:0]    loaded_empty,
  output logic [1:0]    loaded_pop,
  input  logic [1:0]    cfree_empty,
  output logic [1:0]    cfree_pop,
  output logic [1:0]    abfree_push,
  output logic [1:0]    computed_push,
  // a/b buffer read ports (address shared by both sets)
  output logic [1:0]    ab_rd_en,
  output logic [AW-1:0] ab_rd_addr,
  input  word_t         a_rdata [2],
  input  word_t         b_rdata [2],
  // c buffer write ports
  output logic [1:0]    c_we,
  output logic [AW-1:0] c_waddr,
  output word_t         c_wdata
);
  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_RUN, S_LAST} state_e;
  state_e state;

  logic [31:0]   tile;
  logic          k;          // current buffer set
  logic [AW:0]   idx;        // read index
  logic          v1;         // element read last cycle, written this cycle
  logic [AW-1:0] idx1;
  logic          go;

  assign k  = tile[0];
  assign go = (state == S_WAIT) && !loaded_empty[k] && !cfree_empty[k];

  always_comb begin
    loaded_pop    = '0;
    cfree_pop     = '0;
    abfree_push   = '0;
    computed_push = '0;
    ab_rd_en      = '0;
    c_we          = '0;
    if (go) begin
      loaded_pop[k] = 1'b1;
      cfree_pop[k]  = 1'b1;
    end
    if (state == S_RUN) ab_rd_en[k] = 1'b1;
    if (v1) c_we[k] = 1'b1;
    if (state == S_LAST) begin
      abfree_push[k]   = 1'b1;
      computed_push[k] = 1'b1;
    end
  end

  assign ab_rd_addr = AW'(idx);
  assign c_waddr    = idx1;
  assign c_wdata    = (KERNEL == KERNEL_VSUM) ? a_rdata[k] + b_rdata[k] : a_rdata[k];
  assign busy       = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      tile  <= '0;
      idx   <= '0;
      v1    <= 1'b0;
      idx1  <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      v1   <= (state == S_RUN);
      idx1 <= AW'(idx);
      unique case (state)
        S_IDLE: if (start) begin
          tile  <= '0;
          state <= (n_tiles == 0) ? S_IDLE : S_WAIT;
          done  <= (n_tiles == 0);
        end
        S_WAIT: if (go) begin
          idx   <= '0;
          state <= S_RUN;
        end
        S_RUN: begin
          idx <= idx + 1'b1;
          if (idx == (AW+1)'(BLOCK - 1)) state <= S_LAST;
        end
        S_LAST: begin
          // last element is written this cycle (v1); tokens pushed with it
          tile <= tile + 1;
          if (tile + 1 == n_tiles) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else state <= S_WAIT;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
