// ddr_arbiter: shares the accelerator's single DDR master port between its
// NM DDR-accessing processes (Load0, Load1, Store0, Store1).
//
// Arbitration is round-robin with an "arbitration share": once a master is
// granted, it keeps the port for up to ARB_SHARE accepted accesses while it
// keeps requesting, so a burst of a tile is not broken by other masters; after
// ARB_SHARE accesses, or when it stops requesting, the next requesting master
// in round-robin order gets the port. The document names the arbitration-share
// pragma and the need for latency-aware pipelined DDR accesses with internal
// FIFOs; the round-robin order and the default share are this design's
// choices.
//
// Interface: each master drives a mem_req_t and sees a mem_rsp_t; a request is
// taken in a cycle where the master's waitrequest is low. Read data returns in
// order; the arbiter remembers in an ID FIFO (MAX_OUT entries) which master
// issued each outstanding read and raises readdatavalid only for that master.
// When the ID FIFO is full, further reads wait. The grant is combinational
// (zero added latency); readdata is broadcast.
module ddr_arbiter
  import vsum_pkg::*;
#(
  parameter int unsigned NM        = 4,
  parameter int unsigned ARB_SHARE = 8192,
  parameter int unsigned MAX_OUT   = 16
) (
  input  logic     clk,
  input  logic     rst_n,
  input  mem_req_t m_req [NM],
  output mem_rsp_t m_rsp [NM],
  output mem_req_t s_req,
  input  mem_rsp_t s_rsp,
  output logic     rearb      // pulse: a new arbitration round granted the port
);
  localparam int unsigned IDW = (NM > 1) ? $clog2(NM) : 1;
  localparam int unsigned SW  = $clog2(ARB_SHARE + 1);

  logic [IDW-1:0] owner, gnt;
  logic           any_req, keep;
  logic [SW-1:0]  share_cnt;
  logic [NM-1:0]  active;

  // ID FIFO of outstanding reads
  logic           id_full, id_empty;
  logic [IDW-1:0] id_head;
  logic           accept, rd_accept;

  always_comb begin
    for (int i = 0; i < int'(NM); i++) active[i] = m_req[i].read | m_req[i].write;
  end

  // Grant selection
  always_comb begin
    any_req = |active;
    keep    = active[owner] && (share_cnt != '0) && (share_cnt < SW'(ARB_SHARE));
    gnt     = owner;
    if (!keep) begin
      // round-robin starting after the current owner
      for (int k = int'(NM); k >= 1; k--) begin
        if (active[(int'(owner) + k) % int'(NM)]) gnt = IDW'((int'(owner) + k) % int'(NM));
      end
    end
  end

  logic blocked;  // read waits for room in the ID FIFO
  assign blocked   = m_req[gnt].read && id_full;
  assign s_req     = (any_req && !blocked) ? m_req[gnt] : MEM_REQ_IDLE;
  assign accept    = any_req && !blocked && !s_rsp.waitrequest;
  assign rd_accept = accept && m_req[gnt].read;

  always_comb begin
    for (int i = 0; i < int'(NM); i++) begin
      m_rsp[i].waitrequest   = !(any_req && (gnt == IDW'(i)) && !blocked) || s_rsp.waitrequest;
      m_rsp[i].readdata      = s_rsp.readdata;
      m_rsp[i].readdatavalid = s_rsp.readdatavalid && !id_empty && (id_head == IDW'(i));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      owner     <= '0;
      share_cnt <= '0;
    end else if (accept) begin
      if (keep) share_cnt <= share_cnt + 1'b1;
      else begin
        owner     <= gnt;
        share_cnt <= SW'(1);
      end
    end else if (!active[owner]) begin
      share_cnt <= '0;   // owner released the port: next access re-arbitrates
    end
  end

  assign rearb = accept && !keep;

  sync_fifo #(.DEPTH(MAX_OUT), .DATA_W(IDW), .INIT_COUNT(0)) u_idq (
    .clk, .rst_n, .clear(1'b0),
    .push(rd_accept), .din(gnt), .full(id_full),
    .pop(s_rsp.readdatavalid), .dout(id_head), .empty(id_empty)
  );

  a_rsp_expected: assert property (@(posedge clk) disable iff (!rst_n)
                                   s_rsp.readdatavalid |-> !id_empty);

endmodule
