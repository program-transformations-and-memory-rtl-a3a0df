// tb_compute_proc: self-checking test of the compute process (BLOCK 16,
// 5 tiles).
//
// The testbench models the two a/b and c buffer sets as one-cycle-read
// memories and plays Load k and Store k: it fills set t mod 2 with random
// tile t once that set's a/b buffers are free, raises "tile loaded", and on
// "tile computed" compares c of that set with a + b, then frees the c buffer
// after a random delay. Checks: every c word, tiles taken in order, no write
// into a c buffer owned by the store side, one element per cycle (BLOCK + 1
// cycles from taking the tokens to "tile computed"), token counts and the
// done pulse.
module tb_compute_proc;
  import vsum_pkg::*;
  localparam int BLOCK = 16, NT = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        start, busy, done;
  logic [1:0]  loaded_empty, loaded_pop, cfree_empty, cfree_pop, abfree_push, computed_push;
  logic [1:0]  ab_rd_en, c_we;
  logic [3:0]  ab_rd_addr, c_waddr;
  word_t       a_rdata [2], b_rdata [2], c_wdata;

  compute_proc #(.BLOCK(BLOCK), .KERNEL(KERNEL_VSUM)) dut (
    .clk, .rst_n, .start, .n_tiles(32'(NT)), .busy, .done,
    .loaded_empty, .loaded_pop, .cfree_empty, .cfree_pop, .abfree_push, .computed_push,
    .ab_rd_en, .ab_rd_addr, .a_rdata, .b_rdata, .c_we, .c_waddr, .c_wdata);

  function automatic void chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endfunction

  word_t amem [2][BLOCK], bmem [2][BLOCK], cmem [2][BLOCK];
  word_t expc [NT][BLOCK];
  int    nst [2];
  bit    loaded_tok [2], cfree_tok [2], abfree [2], c_owned [2];
  int    next_load, stored, dones, go_cycle, cyc;

  assign loaded_empty = {!loaded_tok[1], !loaded_tok[0]};
  assign cfree_empty  = {!cfree_tok[1], !cfree_tok[0]};

  // buffers
  always @(posedge clk) begin
    for (int k = 0; k < 2; k++) begin
      if (ab_rd_en[k]) begin a_rdata[k] <= amem[k][ab_rd_addr]; b_rdata[k] <= bmem[k][ab_rd_addr]; end
      if (c_we[k]) begin
        cmem[k][c_waddr] <= c_wdata;
        if (c_owned[k]) chk(0, "c buffer written while store owns it");
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    cyc++;
    for (int k = 0; k < 2; k++) begin
      if (loaded_pop[k]) begin loaded_tok[k] <= 0; go_cycle = cyc; end
      if (cfree_pop[k])  cfree_tok[k] <= 0;
      if (abfree_push[k]) abfree[k] = 1;
      if (computed_push[k]) begin
        chk(cyc - go_cycle == BLOCK + 1, $sformatf("tile computed %0d cycles after start", cyc - go_cycle));
        chk(k == stored % 2, "tiles computed in order");
      end
    end
    if (done) dones++;
  end

  // load side: fill the next tile when its set is free
  always @(posedge clk) if (rst_n && next_load < NT && abfree[next_load % 2] && ($urandom % 3 == 0)) begin
    automatic int k = next_load % 2;
    abfree[k] = 0;
    for (int j = 0; j < BLOCK; j++) begin
      amem[k][j] = $urandom; bmem[k][j] = $urandom; expc[next_load][j] = amem[k][j] + bmem[k][j];
    end
    next_load++;
    loaded_tok[k] <= 1;
  end

  // store side
  for (genvar k = 0; k < 2; k++) begin : g_st
    always @(posedge clk) if (rst_n && computed_push[k]) begin
      automatic int tile = 2 * nst[k] + k;
      #1;
      c_owned[k] = 1;
      nst[k]++;
      for (int j = 0; j < BLOCK; j++)
        chk(cmem[k][j] == expc[tile][j], $sformatf("c tile %0d [%0d]", tile, j));
      stored++;
      repeat ($urandom % 25) @(posedge clk);
      c_owned[k] = 0;
      cfree_tok[k] <= 1;
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; next_load = 0; stored = 0; dones = 0; cyc = 0; go_cycle = 0;
    for (int k = 0; k < 2; k++) begin nst[k] = 0; loaded_tok[k] = 0; cfree_tok[k] = 1; abfree[k] = 1; c_owned[k] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    wait (dones == 1);
    repeat (40) @(posedge clk);
    chk(stored == NT, $sformatf("%0d tiles computed", stored));
    chk(!busy && dones == 1, "idle with one done pulse");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
