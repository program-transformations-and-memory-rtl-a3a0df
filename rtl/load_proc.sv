// load_proc: one of the two load processes (Load0 / Load1) of the
// double-buffered accelerator.
//
// The vector of n elements is cut into tiles of BLOCK elements; tile t goes to
// buffer set t mod 2, so Load0 (BUF_ID 0) handles the even tiles and Load1
// (BUF_ID 1) the odd ones. For each of its tiles the process
//   1. waits for its turn on DDR: a token from the previous process of the DDR
//      ring Load0 -> Load1 -> Store0 -> Store1 -> Load0;
//   2. waits until the compute process has released its a/b buffers;
//   3. issues BLOCK pipelined reads of a, then BLOCK reads of b (one per
//      accepted cycle, never interleaving the two arrays, so DDR rows are read
//      in bursts), and passes the DDR token on as soon as the last read is
//      issued;
//   4. writes each returning word into a_tmp / b_tmp, in order, and when all
//      words are in, signals "tile loaded" to the compute process.
// In KERNEL_COPY (DMA) mode only a is read.
//
// Every process runs ceil(NT/2)+1 rounds of the DDR ring (NT = n/BLOCK tiles);
// a round with no tile of its own (the last one for the loads) only passes the
// token on. This keeps the stores one round behind the loads, the coarse-grain
// software pipeline of the document (load of round t, then store of round
// t-1). The ring order and the dataflow tokens follow the document; the
// "pass the ring token at the last request" rule and the round bookkeeping are
// this design's choices.
//
// Timing: one read request per cycle while the DDR port accepts; data words
// are written into the buffer in the cycle they return.
module load_proc
  import vsum_pkg::*;
#(
  parameter int unsigned BLOCK  = 8192,
  parameter int unsigned BUF_ID = 0,
  parameter kernel_e     KERNEL = KERNEL_VSUM,
  localparam int unsigned AW    = (BLOCK > 1) ? $clog2(BLOCK) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // control
  input  logic          start,      // pulse, parameters below are stable while busy
  input  logic [31:0]   n_tiles,
  input  addr_t         a_base,
  input  addr_t         b_base,
  output logic          busy,
  output logic          done,       // pulse at the end of the last round
  // DDR ring token
  input  logic          ring_empty,
  output logic          ring_pop,
  output logic          ring_push,
  // "a/b buffers free" from compute, "tile loaded" to compute
  input  logic          free_empty,
  output logic          free_pop,
  output logic          loaded_push,
  // DDR master port
  output mem_req_t      req,
  input  mem_rsp_t      rsp,
  // buffer write ports
  output logic          a_we,
  output logic          b_we,
  output logic [AW-1:0] waddr,
  output word_t         wdata
);
  localparam int unsigned NWORDS = (KERNEL == KERNEL_VSUM) ? 2 * BLOCK : BLOCK;
  localparam int unsigned CW     = $clog2(NWORDS + 1);

  typedef enum logic [2:0] {S_IDLE, S_RING, S_FREE, S_ISSUE, S_DRAIN, S_NEXT} state_e;
  state_e state;

  logic [31:0]   round, last_round, tile;
  addr_t         tile_off;
  logic [CW-1:0] issue_cnt, rcv_cnt;
  logic          real_tile;

  assign tile       = 2 * round + BUF_ID;
  assign real_tile  = (tile < n_tiles);
  assign last_round = (n_tiles + 1) / 2;     // rounds 0 .. last_round

  always_comb begin
    req = MEM_REQ_IDLE;
    if (state == S_ISSUE) begin
      req.read = 1'b1;
      if (issue_cnt < CW'(BLOCK)) req.address = a_base + tile_off + ADDR_W'(issue_cnt);
      else                        req.address = b_base + tile_off + ADDR_W'(issue_cnt - CW'(BLOCK));
    end
  end

  assign ring_pop    = (state == S_RING) && !ring_empty;
  assign free_pop    = (state == S_FREE) && !free_empty;
  assign ring_push   = ((state == S_RING) && !ring_empty && !real_tile) ||
                       ((state == S_ISSUE) && !rsp.waitrequest && (issue_cnt == CW'(NWORDS - 1)));
  assign loaded_push = (state == S_DRAIN) && (rcv_cnt == CW'(NWORDS));
  assign busy        = (state != S_IDLE);

  assign a_we  = rsp.readdatavalid && (rcv_cnt < CW'(BLOCK));
  assign b_we  = rsp.readdatavalid && (rcv_cnt >= CW'(BLOCK));
  assign waddr = (rcv_cnt < CW'(BLOCK)) ? AW'(rcv_cnt) : AW'(rcv_cnt - CW'(BLOCK));
  assign wdata = rsp.readdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      round     <= '0;
      tile_off  <= '0;
      issue_cnt <= '0;
      rcv_cnt   <= '0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      if (rsp.readdatavalid) rcv_cnt <= rcv_cnt + 1'b1;
      unique case (state)
        S_IDLE: if (start) begin
          round    <= '0;
          tile_off <= ADDR_W'(BUF_ID * BLOCK);
          state    <= S_RING;
        end
        S_RING: if (!ring_empty) state <= real_tile ? S_FREE : S_NEXT;
        S_FREE: if (!free_empty) begin
          issue_cnt <= '0;
          rcv_cnt   <= '0;
          state     <= S_ISSUE;
        end
        S_ISSUE: if (!rsp.waitrequest) begin
          issue_cnt <= issue_cnt + 1'b1;
          if (issue_cnt == CW'(NWORDS - 1)) state <= S_DRAIN;
        end
        S_DRAIN: if (rcv_cnt == CW'(NWORDS)) state <= S_NEXT;
        S_NEXT: begin
          tile_off <= tile_off + ADDR_W'(2 * BLOCK);
          round    <= round + 1;
          if (round == last_round) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else state <= S_RING;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_no_stray_data: assert property (@(posedge clk) disable iff (!rst_n)
                                    rsp.readdatavalid |-> (state inside {S_ISSUE, S_DRAIN}));

endmodule
