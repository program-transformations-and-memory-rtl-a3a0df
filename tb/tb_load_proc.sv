// tb_load_proc: self-checking test of a load process (Load1, BLOCK 12, a
// tile size that is not a power of two).
//
// The testbench plays the rest of the accelerator: it hands the DDR ring
// token and the "a/b free" token to the process after random delays, plays
// the DDR through the behavioural model (random stalls), captures the buffer
// writes, and on "tile loaded" compares the captured a and b tiles with the
// DDR contents of the tile. With 5 tiles, Load1 owns tiles 1 and 3 and must
// run 4 ring rounds, the last two without a tile. Also checked: no buffer
// write while the buffer belongs to compute, the ring token is passed in the
// cycle the last read of the tile is accepted, a reads all precede b reads,
// the read count, and the done pulse.
module tb_load_proc;
  import vsum_pkg::*;
  localparam int BLOCK = 12, NT = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        start, busy, done;
  logic        ring_empty, ring_pop, ring_push, free_empty, free_pop, loaded_push;
  logic        a_we, b_we;
  logic [3:0]  waddr;
  word_t       wdata;
  mem_req_t    req;
  mem_rsp_t    rsp;
  addr_t       a_base = 22'h00100, b_base = 22'h00408;

  load_proc #(.BLOCK(BLOCK), .BUF_ID(1), .KERNEL(KERNEL_VSUM)) dut (
    .clk, .rst_n, .start, .n_tiles(32'(NT)), .a_base, .b_base, .busy, .done,
    .ring_empty, .ring_pop, .ring_push, .free_empty, .free_pop, .loaded_push,
    .req, .rsp, .a_we, .b_we, .waddr, .wdata);

  ddr_model #(.MEM_AW(12), .READ_LAT(5), .STALL_PCT(20)) ddr (
    .clk, .rst_n, .address(req.address), .read(req.read), .write(req.write),
    .writedata(req.writedata), .waitrequest(rsp.waitrequest),
    .readdata(rsp.readdata), .readdatavalid(rsp.readdatavalid));

  function automatic void chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endfunction

  word_t abuf [BLOCK], bbuf [BLOCK];
  bit    ring_tok, free_tok, owned_by_comp;
  int    reads, ring_pushes, loads, dones, b_seen;
  int    ring_delay, free_delay;

  assign ring_empty = !ring_tok;
  assign free_empty = !free_tok;

  always @(posedge clk) if (rst_n) begin
    if (ring_pop)  ring_tok <= 1'b0;
    if (free_pop)  free_tok <= 1'b0;
    if (a_we) abuf[waddr] <= wdata;
    if (b_we) bbuf[waddr] <= wdata;
    if ((a_we || b_we) && owned_by_comp) chk(0, "buffer written while compute owns it");
    if (req.read && !rsp.waitrequest) begin
      reads++;
      if (int'(req.address) >= int'(b_base)) b_seen++;
      else chk(b_seen % BLOCK == 0 && (reads - 1) % (2 * BLOCK) < BLOCK, "a reads before b reads");
    end
    if (ring_push) begin
      ring_pushes++;
      if (ring_pushes <= 2)
        chk(req.read && !rsp.waitrequest && reads == 2 * BLOCK * ring_pushes,
            "ring passed with last read of the tile");
      ring_delay = 1 + $urandom % 8;
    end
    if (ring_delay > 0) begin
      ring_delay--;
      if (ring_delay == 0) ring_tok <= 1'b1;
    end
    if (done) dones++;
  end

  // compute stand-in: check a loaded tile, then release it later
  always @(posedge clk) if (rst_n && loaded_push) begin
    automatic int tile = 2 * loads + 1;
    #1;
    for (int j = 0; j < BLOCK; j++) begin
      chk(abuf[j] == ddr.mem[int'(a_base) + tile * BLOCK + j], $sformatf("a tile %0d [%0d]", tile, j));
      chk(bbuf[j] == ddr.mem[int'(b_base) + tile * BLOCK + j], $sformatf("b tile %0d [%0d]", tile, j));
    end
    loads++;
    owned_by_comp = 1;
    repeat (3 + $urandom % 20) @(posedge clk);
    owned_by_comp = 0;
    free_tok <= 1'b1;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; ring_tok = 0; free_tok = 1; owned_by_comp = 0;
    reads = 0; ring_pushes = 0; loads = 0; dones = 0; b_seen = 0; ring_delay = 0;
    for (int i = 0; i < 4096; i++) ddr.mem[i] = $urandom;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    repeat (4) @(negedge clk);
    ring_tok = 1;
    wait (dones == 1);
    repeat (30) @(posedge clk);
    chk(loads == 2, $sformatf("two tiles loaded (%0d)", loads));
    chk(reads == 2 * 2 * BLOCK, $sformatf("read count %0d", reads));
    chk(ring_pushes == 4, $sformatf("four ring rounds (%0d)", ring_pushes));
    chk(!busy && dones == 1, "idle with one done pulse");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
