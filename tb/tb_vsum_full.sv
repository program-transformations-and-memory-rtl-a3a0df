// tb_vsum_full: one complete operation of the accelerator at its default
// size (BLOCK 8192 words per tile, vector-sum kernel, default arbitration
// share and read window) on a 16 MB DDR model.
//
// Five tiles (40960 elements) of random a and b are summed; the odd tile count
// makes the last ring round carry no tile. Checks every c word, guard words
// around c, and that the run takes no more than 1.1 x the 3n DDR words moved
// plus the row-change penalties and a fixed pipeline fill and drain.
module tb_vsum_full;
  import vsum_pkg::*;
  localparam int BLOCK = 8192, NT = 5, N = NT * BLOCK;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        start, busy, done;
  logic [31:0] n;
  addr_t       a_base = 22'h000000, b_base = 22'h100000, c_base = 22'h200000;
  addr_t       ad;
  logic        rd, wr, wt, rv;
  word_t       wd, rdd;

  vsum_accel dut (
    .clk, .rst_n, .start, .n, .a_base, .b_base, .c_base, .busy, .done,
    .ddr_address(ad), .ddr_read(rd), .ddr_write(wr), .ddr_writedata(wd),
    .ddr_waitrequest(wt), .ddr_readdata(rdd), .ddr_readdatavalid(rv));

  ddr_model ddr (
    .clk, .rst_n, .address(ad), .read(rd), .write(wr), .writedata(wd),
    .waitrequest(wt), .readdata(rdd), .readdatavalid(rv));

  function automatic void chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL: %s", s); end
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc = 0, limit;
    start = 0; n = N;
    for (int i = 0; i < N; i++) begin
      ddr.mem[int'(a_base) + i] = $urandom;
      ddr.mem[int'(b_base) + i] = $urandom;
      ddr.mem[int'(c_base) + i] = 32'hDEAD_BEEF;
    end
    ddr.mem[int'(c_base) - 1] = 32'hDEAD_BEEF;
    ddr.mem[int'(c_base) + N] = 32'hDEAD_BEEF;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    do begin @(posedge clk); cyc++; end while (!done);
    @(negedge clk);
    for (int i = 0; i < N; i++)
      chk(ddr.mem[int'(c_base) + i] == ddr.mem[int'(a_base) + i] + ddr.mem[int'(b_base) + i],
          $sformatf("c[%0d]", i));
    chk(ddr.mem[int'(c_base) - 1] == 32'hDEAD_BEEF && ddr.mem[int'(c_base) + N] == 32'hDEAD_BEEF,
        "guard words");
    limit = (3 * N * 11) / 10 + int'(ddr.n_row_misses) * 3 + 200;
    chk(cyc <= limit, $sformatf("%0d cycles, limit %0d", cyc, limit));
    $display("full size: %0d elements in %0d cycles (%0d DDR words, %0d row changes)",
             N, cyc, 3 * N, ddr.n_row_misses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
