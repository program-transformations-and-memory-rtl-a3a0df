// vsum_accel: tiled, double-buffered vector-sum accelerator
// c[i] = a[i] + b[i], i = 0 .. n-1 (or the DMA copy c[i] = a[i]), reading and
// writing its arrays directly in external DDR SDRAM.
//
// DDR delivers one word per cycle only while successive accesses stay in one
// row; alternating between a, b and c forces a precharge/activate per word.
// The design therefore splits the loop into tiles of BLOCK elements and
// decomposes it into five communicating processes:
//   Load0, Load1   read tile a and tile b (as two separate bursts) into
//                  buffer set 0 (even tiles) or 1 (odd tiles);
//   Compute        computes c_tmp = a_tmp + b_tmp tile by tile, alternating
//                  the two buffer sets, one element per cycle;
//   Store0, Store1 write c_tmp of set 0 / set 1 back to DDR in one burst.
// The processes are synchronised only through size-1 FIFOs (sync_fifo):
//   - a DDR ring Load0 -> Load1 -> Store0 -> Store1 -> Load0 fixes the order
//     of DDR bursts (stores run one round behind the loads);
//   - "tile loaded" Load k -> Compute and "tile computed" Compute -> Store k
//     carry the data flow;
//   - "a/b free" Compute -> Load k and "c free" Store k -> Compute carry the
//     anti-dependences that make double buffering safe.
// While Compute works on one buffer set, the DDR port loads or stores the
// other, so computation overlaps communication. The four DDR processes share
// one master port through ddr_arbiter (round robin with arbitration share);
// an assertion checks that the ring indeed leaves at most one of them
// requesting the port in any cycle.
//
// Interface: set a_base, b_base, c_base (word addresses) and n (a multiple of
// BLOCK) and pulse start while busy is low; done pulses when the last word of
// c has been accepted by the DDR port. The DDR port is a pipelined word
// master: a request is taken in a cycle with ddr_waitrequest low, read data
// returns in order with ddr_readdatavalid.
//
// The process decomposition, the tokens, the ring order and the buffer sizes
// follow the document; the port protocol, the start/done control and the
// restriction of n to whole tiles are this design's choices.
module vsum_accel
  import vsum_pkg::*;
#(
  parameter int unsigned BLOCK     = 8192,
  parameter kernel_e     KERNEL    = KERNEL_VSUM,
  parameter int unsigned ARB_SHARE = 8192,
  parameter int unsigned MAX_OUT   = 16,
  localparam int unsigned AW       = (BLOCK > 1) ? $clog2(BLOCK) : 1
) (
  input  logic        clk,
  input  logic        rst_n,
  // control (host side)
  input  logic        start,
  input  logic [31:0] n,
  input  addr_t       a_base,
  input  addr_t       b_base,
  input  addr_t       c_base,
  output logic        busy,
  output logic        done,
  // DDR master port
  output addr_t       ddr_address,
  output logic        ddr_read,
  output logic        ddr_write,
  output word_t       ddr_writedata,
  input  logic        ddr_waitrequest,
  input  word_t       ddr_readdata,
  input  logic        ddr_readdatavalid
);
  localparam int unsigned LD0 = 0, ST0 = 2;   // arbiter ports: Load0, Load1, Store0, Store1

  // ---------------------------------------------------------------- control
  logic [31:0] n_tiles;
  addr_t       a_base_q, b_base_q, c_base_q;
  logic        go;
  logic [4:0]  fin;          // Load0, Load1, Compute, Store0, Store1 finished
  logic [4:0]  pdone;

  assign go = start && !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      done     <= 1'b0;
      fin      <= '0;
      n_tiles  <= '0;
      a_base_q <= '0;
      b_base_q <= '0;
      c_base_q <= '0;
    end else begin
      done <= 1'b0;
      if (go) begin
        busy     <= 1'b1;
        fin      <= '0;
        n_tiles  <= n / BLOCK;
        a_base_q <= a_base;
        b_base_q <= b_base;
        c_base_q <= c_base;
      end else if (busy) begin
        if (&(fin | pdone)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
        fin <= fin | pdone;
      end
    end
  end

  // processes start one cycle after go, when the parameters are registered
  logic pstart;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pstart <= 1'b0;
    else        pstart <= go;
  end

  a_whole_tiles: assert property (@(posedge clk) disable iff (!rst_n)
                                  go |-> (n % BLOCK == 0));

  // ---------------------------------------------------------------- tokens
  // DDR ring: idx 0: ST1->LD0, 1: LD0->LD1, 2: LD1->ST0, 3: ST0->ST1
  logic [3:0] ring_push, ring_pop, ring_empty;
  logic [1:0] ld_push, ld_pop, ld_empty;       // tile loaded   Load k -> Compute
  logic [1:0] abf_push, abf_pop, abf_empty;    // a/b free      Compute -> Load k
  logic [1:0] cmp_push, cmp_pop, cmp_empty;    // tile computed Compute -> Store k
  logic [1:0] cf_push, cf_pop, cf_empty;       // c free        Store k -> Compute

  for (genvar r = 0; r < 4; r++) begin : g_ring
    sync_fifo #(.DEPTH(1), .DATA_W(1), .INIT_COUNT(r == 0 ? 1 : 0)) u_ring (
      .clk, .rst_n, .clear(go), .push(ring_push[r]), .din(1'b0), .full(),
      .pop(ring_pop[r]), .dout(), .empty(ring_empty[r]));
  end

  for (genvar k = 0; k < 2; k++) begin : g_tok
    sync_fifo #(.DEPTH(1), .DATA_W(1), .INIT_COUNT(0)) u_loaded (
      .clk, .rst_n, .clear(go), .push(ld_push[k]), .din(1'b0), .full(),
      .pop(ld_pop[k]), .dout(), .empty(ld_empty[k]));
    sync_fifo #(.DEPTH(1), .DATA_W(1), .INIT_COUNT(1)) u_abfree (
      .clk, .rst_n, .clear(go), .push(abf_push[k]), .din(1'b0), .full(),
      .pop(abf_pop[k]), .dout(), .empty(abf_empty[k]));
    sync_fifo #(.DEPTH(1), .DATA_W(1), .INIT_COUNT(0)) u_computed (
      .clk, .rst_n, .clear(go), .push(cmp_push[k]), .din(1'b0), .full(),
      .pop(cmp_pop[k]), .dout(), .empty(cmp_empty[k]));
    sync_fifo #(.DEPTH(1), .DATA_W(1), .INIT_COUNT(1)) u_cfree (
      .clk, .rst_n, .clear(go), .push(cf_push[k]), .din(1'b0), .full(),
      .pop(cf_pop[k]), .dout(), .empty(cf_empty[k]));
  end

  // ---------------------------------------------------------------- buffers
  logic [1:0]    a_we, b_we;
  logic [AW-1:0] ld_waddr [2];
  word_t         ld_wdata [2];
  logic [1:0]    ab_rd_en;
  logic [AW-1:0] ab_rd_addr;
  word_t         a_rdata [2], b_rdata [2];
  logic [1:0]    c_we;
  logic [AW-1:0] c_waddr;
  word_t         c_wdata;
  logic [1:0]    c_rd_en;
  logic [AW-1:0] c_rd_addr [2];
  word_t         c_rdata [2];

  for (genvar k = 0; k < 2; k++) begin : g_buf
    local_buffer #(.DEPTH(BLOCK), .DATA_W(DATA_W)) u_a_tmp (
      .clk, .wr_en(a_we[k]), .wr_addr(ld_waddr[k]), .wdata(ld_wdata[k]),
      .rd_en(ab_rd_en[k]), .rd_addr(ab_rd_addr), .rdata(a_rdata[k]));
    if (KERNEL == KERNEL_VSUM) begin : g_b
      local_buffer #(.DEPTH(BLOCK), .DATA_W(DATA_W)) u_b_tmp (
        .clk, .wr_en(b_we[k]), .wr_addr(ld_waddr[k]), .wdata(ld_wdata[k]),
        .rd_en(ab_rd_en[k]), .rd_addr(ab_rd_addr), .rdata(b_rdata[k]));
    end else begin : g_nob
      assign b_rdata[k] = '0;
    end
    local_buffer #(.DEPTH(BLOCK), .DATA_W(DATA_W)) u_c_tmp (
      .clk, .wr_en(c_we[k]), .wr_addr(c_waddr), .wdata(c_wdata),
      .rd_en(c_rd_en[k]), .rd_addr(c_rd_addr[k]), .rdata(c_rdata[k]));
  end

  // ---------------------------------------------------------------- DDR port
  mem_req_t m_req [4];
  mem_rsp_t m_rsp [4];
  mem_req_t s_req;
  mem_rsp_t s_rsp;

  ddr_arbiter #(.NM(4), .ARB_SHARE(ARB_SHARE), .MAX_OUT(MAX_OUT)) u_arb (
    .clk, .rst_n, .m_req, .m_rsp, .s_req, .s_rsp, .rearb());

  // The DDR ring lets one process at a time drive the port.
  logic [2:0] n_requesting;
  always_comb begin
    n_requesting = '0;
    for (int m = 0; m < 4; m++) n_requesting += 3'(m_req[m].read | m_req[m].write);
  end
  a_ring_exclusive: assert property (@(posedge clk) disable iff (!rst_n) n_requesting <= 3'd1);

  assign ddr_address         = s_req.address;
  assign ddr_read            = s_req.read;
  assign ddr_write           = s_req.write;
  assign ddr_writedata       = s_req.writedata;
  assign s_rsp.waitrequest   = ddr_waitrequest;
  assign s_rsp.readdata      = ddr_readdata;
  assign s_rsp.readdatavalid = ddr_readdatavalid;

  // ---------------------------------------------------------------- processes
  for (genvar k = 0; k < 2; k++) begin : g_proc
    load_proc #(.BLOCK(BLOCK), .BUF_ID(k), .KERNEL(KERNEL)) u_load (
      .clk, .rst_n,
      .start(pstart), .n_tiles, .a_base(a_base_q), .b_base(b_base_q),
      .busy(), .done(pdone[k]),
      .ring_empty(ring_empty[k]), .ring_pop(ring_pop[k]), .ring_push(ring_push[k+1]),
      .free_empty(abf_empty[k]), .free_pop(abf_pop[k]), .loaded_push(ld_push[k]),
      .req(m_req[LD0+k]), .rsp(m_rsp[LD0+k]),
      .a_we(a_we[k]), .b_we(b_we[k]), .waddr(ld_waddr[k]), .wdata(ld_wdata[k]));

    store_proc #(.BLOCK(BLOCK), .BUF_ID(k)) u_store (
      .clk, .rst_n,
      .start(pstart), .n_tiles, .c_base(c_base_q),
      .busy(), .done(pdone[3+k]),
      .ring_empty(ring_empty[2+k]), .ring_pop(ring_pop[2+k]), .ring_push(ring_push[(3+k)%4]),
      .computed_empty(cmp_empty[k]), .computed_pop(cmp_pop[k]), .cfree_push(cf_push[k]),
      .rd_en(c_rd_en[k]), .rd_addr(c_rd_addr[k]), .rdata(c_rdata[k]),
      .req(m_req[ST0+k]), .rsp(m_rsp[ST0+k]));
  end

  compute_proc #(.BLOCK(BLOCK), .KERNEL(KERNEL)) u_comp (
    .clk, .rst_n,
    .start(pstart), .n_tiles, .busy(), .done(pdone[2]),
    .loaded_empty(ld_empty), .loaded_pop(ld_pop),
    .cfree_empty(cf_empty), .cfree_pop(cf_pop),
    .abfree_push(abf_push), .computed_push(cmp_push),
    .ab_rd_en, .ab_rd_addr, .a_rdata, .b_rdata,
    .c_we, .c_waddr, .c_wdata);

endmodule
