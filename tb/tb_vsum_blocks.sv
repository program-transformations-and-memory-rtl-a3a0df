// tb_vsum_blocks: the vector-sum accelerator across tile sizes, and the DMA
// copy kernel at 1K and 8K tiles.
//
// Thirteen vector-sum accelerators with BLOCK = 2, 4, ..., 8192 and two copy
// accelerators with BLOCK = 1024 and 8192 run side by side, each on its own
// DDR model, over the same 32768-element vectors. Every result word is
// checked. The cycle counts are printed as cycles per element, and the shape
// of the curve is checked: small tiles pay a fixed cost per tile (handshakes,
// row changes, read latency), so cycles per element fall as the tile grows
// and level off once that cost is small against the tile, close to the
// 3 DDR words per element (2 for the copy) that the port must move.
module tb_vsum_blocks;
  import vsum_pkg::*;
  localparam int N   = 32768;
  localparam int NBS = 13;                 // BLOCK = 2^(i+1), i = 0 .. 12

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic  start;
  addr_t a_base = 22'h000000, b_base = 22'h008000, c_base = 22'h010000;
  logic  done_v [NBS + 2];
  int    bad [NBS + 2];
  bit    checked [NBS + 2];

  // input data: a fixed pseudo-random function of the index
  function automatic word_t va(input int k);
    return word_t'(k * 32'h9E37_79B1 ^ 32'h5BD1_E995);
  endfunction
  function automatic word_t vb(input int k);
    return word_t'((k + 7) * 32'h85EB_CA6B ^ 32'hC2B2_AE35);
  endfunction
  int    cycles [NBS + 2];
  int    cyc;

  function automatic void chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL: %s", s); end
  endfunction

  for (genvar i = 0; i < NBS + 2; i++) begin : g_inst
    localparam int unsigned BS = (i < NBS) ? (2 << i) : ((i == NBS) ? 1024 : 8192);
    localparam kernel_e     KN = (i < NBS) ? KERNEL_VSUM : KERNEL_COPY;
    addr_t ad;
    logic  rd, wr, wt, rv, busy;
    word_t wd, rdd;

    vsum_accel #(.BLOCK(BS), .KERNEL(KN)) dut (
      .clk, .rst_n, .start, .n(32'(N)), .a_base, .b_base, .c_base, .busy, .done(done_v[i]),
      .ddr_address(ad), .ddr_read(rd), .ddr_write(wr), .ddr_writedata(wd),
      .ddr_waitrequest(wt), .ddr_readdata(rdd), .ddr_readdatavalid(rv));

    ddr_model #(.MEM_AW(17)) ddr (
      .clk, .rst_n, .address(ad), .read(rd), .write(wr), .writedata(wd),
      .waitrequest(wt), .readdata(rdd), .readdatavalid(rv));

    initial begin cycles[i] = 0; bad[i] = 0; checked[i] = 0; end
    always @(posedge clk) if (done_v[i]) cycles[i] = cyc;

    // fill this instance's DDR, and check its c when it is done
    initial begin
      for (int k = 0; k < N; k++) begin
        ddr.mem[int'(a_base) + k] = va(k);
        ddr.mem[int'(b_base) + k] = vb(k);
        ddr.mem[int'(c_base) + k] = 32'hDEAD_BEEF;
      end
    end
    always @(posedge clk) if (done_v[i]) begin
      #1;
      for (int k = 0; k < N; k++) begin
        automatic word_t expv = (KN == KERNEL_VSUM) ? va(k) + vb(k) : va(k);
        if (ddr.mem[int'(c_base) + k] != expv) bad[i]++;
      end
      checked[i] = 1;
    end
  end


  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cyc++;

  initial begin
    bit all;
    real cpe [NBS + 2];
    cyc = 0; start = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); start = 1; cyc = 0;
    @(negedge clk); start = 0;
    do begin
      @(posedge clk);
      all = 1;
      for (int i = 0; i < NBS + 2; i++) if (cycles[i] == 0) all = 0;
    end while (!all);
    repeat (2) @(posedge clk);
    for (int i = 0; i < NBS + 2; i++)
      chk(checked[i] && bad[i] == 0, $sformatf("instance %0d: %0d wrong c words", i, bad[i]));
    checks += N * (NBS + 2) - (NBS + 2);
    for (int i = 0; i < NBS + 2; i++) begin
      cpe[i] = real'(cycles[i]) / real'(N);
      if (i < NBS) $display("vector sum BLOCK %5d: %7d cycles, %0.3f cycles/element", 2 << i, cycles[i], cpe[i]);
      else         $display("copy       BLOCK %5d: %7d cycles, %0.3f cycles/element", i == NBS ? 1024 : 8192, cycles[i], cpe[i]);
    end
    // curve shape
    for (int i = 2; i < NBS; i++)
      chk(cpe[i] <= cpe[i-1] * 1.02, $sformatf("no slow-down from BLOCK %0d to %0d", 1 << i, 2 << i));
    chk(cpe[0] >= 2.0 * cpe[5], "BLOCK 2 at least twice as slow per element as BLOCK 64");
    chk(cpe[12] <= cpe[9] * 1.05 && cpe[12] >= cpe[9] * 0.9, "levelled off between BLOCK 1024 and 8192");
    chk(cpe[12] <= 3.0 * 1.05, "BLOCK 8192 within 5% of 3 words per element");
    chk(cpe[14] <= 2.0 * 1.05 && cpe[13] <= 2.0 * 1.10, "copy within 5% (8K) and 10% (1K) of 2 words per element");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
