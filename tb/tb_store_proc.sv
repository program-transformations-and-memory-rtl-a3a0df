// tb_store_proc: self-checking test of a store process (Store0, BLOCK 16,
// 3 tiles).
//
// The testbench plays the ring neighbours and the compute process: it hands
// over the ring token after random delays, and fills the c buffer (a
// one-cycle-read memory) with a random tile before raising "tile computed",
// only once the store has released it. The DDR is the behavioural model with
// random stalls. Store0 must run 3 ring rounds: round 0 without a tile, then
// tiles 0 and 2. Checks: the DDR words of tiles 0 and 2, tile 1 and guard
// words untouched, writes in one gap-free burst of BLOCK consecutive words
// (a write presented every cycle from the first to the last), ring token and
// "c free" with the last accepted write, round and token counts, done pulse.
module tb_store_proc;
  import vsum_pkg::*;
  localparam int BLOCK = 16, NT = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        start, busy, done;
  logic        ring_empty, ring_pop, ring_push, computed_empty, computed_pop, cfree_push;
  logic        rd_en;
  logic [3:0]  rd_addr;
  word_t       rdata;
  mem_req_t    req;
  mem_rsp_t    rsp;
  addr_t       c_base = 22'h00230;

  store_proc #(.BLOCK(BLOCK), .BUF_ID(0)) dut (
    .clk, .rst_n, .start, .n_tiles(32'(NT)), .c_base, .busy, .done,
    .ring_empty, .ring_pop, .ring_push, .computed_empty, .computed_pop, .cfree_push,
    .rd_en, .rd_addr, .rdata, .req, .rsp);

  ddr_model #(.MEM_AW(12), .READ_LAT(3), .STALL_PCT(30)) ddr (
    .clk, .rst_n, .address(req.address), .read(req.read), .write(req.write),
    .writedata(req.writedata), .waitrequest(rsp.waitrequest),
    .readdata(rsp.readdata), .readdatavalid(rsp.readdatavalid));

  function automatic void chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endfunction

  word_t cmem [BLOCK];
  word_t expd [NT * BLOCK];
  bit    ring_tok, comp_tok, c_free;
  int    ring_pushes, frees, writes, dones, ring_delay, fills, gaps, in_burst;

  assign ring_empty     = !ring_tok;
  assign computed_empty = !comp_tok;

  always @(posedge clk) if (rd_en) rdata <= cmem[rd_addr];

  always @(posedge clk) if (rst_n) begin
    if (ring_pop) ring_tok <= 0;
    if (computed_pop) comp_tok <= 0;
    if (req.write && !rsp.waitrequest) writes++;
    // burst continuity: once a burst has started, a write is presented each cycle
    if (req.write) in_burst = 1;
    else if (in_burst && writes % BLOCK != 0) gaps++;
    if (writes % BLOCK == 0 && !(req.write && !rsp.waitrequest)) in_burst = 0;
    if (ring_push) begin
      ring_pushes++;
      if (ring_pushes >= 2)
        chk(req.write && !rsp.waitrequest && writes == BLOCK * (ring_pushes - 1),
            "ring passed with last write of the tile");
      ring_delay = 1 + $urandom % 6;
    end
    if (cfree_push) begin
      frees++;
      chk(req.write && !rsp.waitrequest, "c free with last write");
      c_free = 1;
    end
    if (ring_delay > 0) begin
      ring_delay--;
      if (ring_delay == 0) ring_tok <= 1;
    end
    if (done) dones++;
  end

  // compute stand-in: tiles 0 and 2 go to set 0
  always @(posedge clk) if (rst_n && c_free && fills < 2 && ($urandom % 4 == 0)) begin
    automatic int tile = 2 * fills;
    c_free = 0;
    for (int j = 0; j < BLOCK; j++) begin
      cmem[j] = $urandom;
      expd[tile * BLOCK + j] = cmem[j];
    end
    fills++;
    comp_tok <= 1;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; ring_tok = 0; comp_tok = 0; c_free = 1;
    ring_pushes = 0; frees = 0; writes = 0; dones = 0; ring_delay = 0; fills = 0; gaps = 0; in_burst = 0;
    for (int i = 0; i < 4096; i++) ddr.mem[i] = 32'h5A5A_0000 + i;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    repeat (3) @(negedge clk);
    ring_tok = 1;
    wait (dones == 1);
    repeat (10) @(posedge clk);
    for (int t = 0; t < NT; t++)
      for (int j = 0; j < BLOCK; j++) begin
        automatic int a = int'(c_base) + t * BLOCK + j;
        if (t % 2 == 0) chk(ddr.mem[a] == expd[t * BLOCK + j], $sformatf("c tile %0d [%0d]", t, j));
        else            chk(ddr.mem[a] == 32'h5A5A_0000 + a, $sformatf("tile %0d untouched", t));
      end
    chk(ddr.mem[int'(c_base) - 1] == 32'h5A5A_0000 + int'(c_base) - 1, "guard below");
    chk(ddr.mem[int'(c_base) + NT * BLOCK] == 32'h5A5A_0000 + int'(c_base) + NT * BLOCK, "guard above");
    chk(writes == 2 * BLOCK, $sformatf("write count %0d", writes));
    chk(gaps == 0, $sformatf("bursts without gaps (%0d gaps)", gaps));
    chk(ring_pushes == 3 && frees == 2, $sformatf("rounds %0d, frees %0d", ring_pushes, frees));
    chk(!busy && dones == 1, "idle with one done pulse");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
