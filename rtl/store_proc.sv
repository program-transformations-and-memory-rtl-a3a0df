// store_proc: one of the two store processes (Store0 / Store1) of the
// double-buffered accelerator.
//
// Store k (BUF_ID k) writes back the tiles of buffer set k. It takes part in
// the DDR ring Load0 -> Load1 -> Store0 -> Store1 -> Load0 one round behind
// the loads: in round r it stores tile 2(r-1)+k, so that DDR sees "load tiles
// 2r and 2r+1, then store tiles 2r-2 and 2r-1", the coarse-grain software
// pipeline of the document. Round 0, and any round whose tile does not exist,
// only passes the ring token on. For a real round it waits for the ring token
// and for "tile computed" from the compute process, then streams BLOCK writes
// of c_tmp[k] to consecutive DDR words (one burst, one row change per DDR
// row), and with the last accepted write hands "c buffer free" back to the
// compute process and the ring token to the next process.
//
// Timing: the local buffer has a one-cycle read; a two-entry read-ahead queue
// lets the process present one write per cycle and absorb waitrequest stalls.
// The ring position and tokens follow the document; the read-ahead queue is
// this design's choice.
module store_proc
  import vsum_pkg::*;
#(
  parameter int unsigned BLOCK  = 8192,
  parameter int unsigned BUF_ID = 0,
  localparam int unsigned AW    = (BLOCK > 1) ? $clog2(BLOCK) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [31:0]   n_tiles,
  input  addr_t         c_base,
  output logic          busy,
  output logic          done,
  // DDR ring token
  input  logic          ring_empty,
  output logic          ring_pop,
  output logic          ring_push,
  // "tile computed" from compute, "c buffer free" to compute
  input  logic          computed_empty,
  output logic          computed_pop,
  output logic          cfree_push,
  // c buffer read port
  output logic          rd_en,
  output logic [AW-1:0] rd_addr,
  input  word_t         rdata,
  // DDR master port
  output mem_req_t      req,
  input  mem_rsp_t      rsp
);
  typedef enum logic [2:0] {S_IDLE, S_RING, S_FULL, S_RUN, S_NEXT} state_e;
  state_e state;

  logic [31:0] round, last_round, tile;
  logic        real_tile;
  addr_t       tile_off;
  logic [AW:0] rd_cnt, wr_cnt;
  logic        pend;                // read issued last cycle
  word_t       q [2];
  logic [1:0]  qcnt;
  logic        wr_acc, last_wr;
  logic [1:0]  occ;

  // round r stores tile 2(r-1)+BUF_ID
  assign tile       = 2 * round + BUF_ID - 2;
  assign real_tile  = (round != 0) && (tile < n_tiles);
  assign last_round = (n_tiles + 1) / 2;

  assign occ     = qcnt + 2'(pend);
  assign wr_acc  = (state == S_RUN) && (qcnt != 0) && !rsp.waitrequest;
  assign last_wr = wr_acc && (wr_cnt == (AW+1)'(BLOCK - 1));
  assign rd_en   = (state == S_RUN) && (rd_cnt < (AW+1)'(BLOCK)) && ((occ < 2) || (occ == 2 && wr_acc));
  assign rd_addr = AW'(rd_cnt);

  always_comb begin
    req = MEM_REQ_IDLE;
    if (state == S_RUN && qcnt != 0) begin
      req.write     = 1'b1;
      req.address   = c_base + tile_off + ADDR_W'(wr_cnt);
      req.writedata = q[0];
    end
  end

  assign ring_pop     = (state == S_RING) && !ring_empty;
  assign computed_pop = (state == S_FULL) && !computed_empty;
  assign ring_push    = ((state == S_RING) && !ring_empty && !real_tile) || last_wr;
  assign cfree_push   = last_wr;
  assign busy         = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      round    <= '0;
      tile_off <= '0;
      rd_cnt   <= '0;
      wr_cnt   <= '0;
      pend     <= 1'b0;
      qcnt     <= '0;
      q[0]     <= '0;
      q[1]     <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      pend <= rd_en;
      if (rd_en) rd_cnt <= rd_cnt + 1'b1;
      if (wr_acc) wr_cnt <= wr_cnt + 1'b1;
      // read-ahead queue: push returning buffer word, pop accepted write
      case ({pend, wr_acc})
        2'b10: begin q[qcnt[0]] <= rdata; qcnt <= qcnt + 1'b1; end
        2'b01: begin q[0] <= q[1]; qcnt <= qcnt - 1'b1; end
        2'b11: begin
          if (qcnt == 2'd1) q[0] <= rdata;
          else begin q[0] <= q[1]; q[1] <= rdata; end
        end
        default: ;
      endcase
      unique case (state)
        S_IDLE: if (start) begin
          round    <= '0;
          tile_off <= ADDR_W'(BUF_ID * BLOCK);
          state    <= S_RING;
        end
        S_RING: if (!ring_empty) state <= real_tile ? S_FULL : S_NEXT;
        S_FULL: if (!computed_empty) begin
          rd_cnt <= '0;
          wr_cnt <= '0;
          state  <= S_RUN;
        end
        S_RUN: if (last_wr) state <= S_NEXT;
        S_NEXT: begin
          if (real_tile) tile_off <= tile_off + ADDR_W'(2 * BLOCK);
          round <= round + 1;
          if (round == last_round) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else state <= S_RING;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_queue_bound: assert property (@(posedge clk) disable iff (!rst_n) qcnt <= 2'd2);

endmodule
