// tb_local_buffer: self-checking test of the tile buffer RAM.
//
// A 64-word instance is filled with random words, then read back with random
// addresses while other words are written, checking the one-cycle read
// latency, that rd_en low holds rdata, and that a read and write of the same
// address in one cycle return the old word.
module tb_local_buffer;
  localparam int DEPTH = 64;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        wr_en, rd_en;
  logic [5:0]  wr_addr, rd_addr;
  logic [31:0] wdata, rdata;
  logic [31:0] ref_mem [DEPTH];

  local_buffer #(.DEPTH(DEPTH), .DATA_W(32)) dut (.clk, .wr_en, .wr_addr, .wdata, .rd_en, .rd_addr, .rdata);

  function automatic void chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endfunction

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] expect_v, held;
    wr_en = 0; rd_en = 0; wr_addr = 0; rd_addr = 0; wdata = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 6'(i); wdata = $urandom; ref_mem[i] = wdata;
    end
    @(negedge clk); wr_en = 0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      rd_en   = ($urandom % 4 != 0);
      rd_addr = 6'($urandom);
      wr_en   = ($urandom % 2);
      wr_addr = (i % 5 == 0) ? rd_addr : 6'($urandom);
      wdata   = $urandom;
      expect_v = ref_mem[rd_addr];
      held     = rdata;
      @(posedge clk);
      if (wr_en) ref_mem[wr_addr] = wdata;
      #1;
      if (rd_en) chk(rdata == expect_v, $sformatf("read %0d", i));
      else       chk(rdata == held, $sformatf("hold %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
