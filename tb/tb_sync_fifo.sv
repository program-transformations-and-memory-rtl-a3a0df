// tb_sync_fifo: self-checking test of the synchronisation FIFO.
//
// Three instances: the size-1 token FIFO used between processes (empty at
// reset), the same preloaded with one token, and a 4-deep 8-bit FIFO. Random
// push/pop traffic, obeying full/empty as a process would, is compared every
// cycle against a queue kept by the testbench (flags and head data); clear is
// pulsed mid-run and must restore the preload.
module tb_sync_fifo;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic       p1, q1, f1, e1, d1;
  logic       p2, q2, f2, e2, d2;
  logic       p3, q3, f3, e3;
  logic [7:0] din3, d3;

  sync_fifo #(.DEPTH(1), .DATA_W(1), .INIT_COUNT(0)) u1 (
    .clk, .rst_n, .clear, .push(p1), .din(1'b1), .full(f1), .pop(q1), .dout(d1), .empty(e1));
  sync_fifo #(.DEPTH(1), .DATA_W(1), .INIT_COUNT(1)) u2 (
    .clk, .rst_n, .clear, .push(p2), .din(1'b1), .full(f2), .pop(q2), .dout(d2), .empty(e2));
  sync_fifo #(.DEPTH(4), .DATA_W(8), .INIT_COUNT(0)) u3 (
    .clk, .rst_n, .clear, .push(p3), .din(din3), .full(f3), .pop(q3), .dout(d3), .empty(e3));

  int m1, m2;               // reference occupancy
  logic [7:0] m3[$];

  function automatic void chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int pushes1 = 0, pops1 = 0;

  initial begin
    p1 = 0; q1 = 0; p2 = 0; q2 = 0; p3 = 0; q3 = 0; din3 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    m1 = 0; m2 = 1; m3.delete();
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      // compare state
      chk(e1 == (m1 == 0) && f1 == (m1 == 1), $sformatf("u1 flags cyc %0d", cyc));
      chk(e2 == (m2 == 0) && f2 == (m2 == 1), $sformatf("u2 flags cyc %0d", cyc));
      chk(e3 == (m3.size() == 0) && f3 == (m3.size() == 4), $sformatf("u3 flags cyc %0d", cyc));
      if (m3.size() != 0) chk(d3 == m3[0], $sformatf("u3 data cyc %0d", cyc));
      if (cyc == 1000) begin
        clear = 1;
        p1 = 0; q1 = 0; p2 = 0; q2 = 0; p3 = 0; q3 = 0;
        @(negedge clk);
        clear = 0;
        m1 = 0; m2 = 1; m3.delete();
        continue;
      end
      // random legal traffic
      p1 = !f1 && ($urandom % 2);  q1 = !e1 && ($urandom % 2);
      p2 = !f2 && ($urandom % 2);  q2 = !e2 && ($urandom % 2);
      p3 = !f3 && ($urandom % 3 != 0); q3 = !e3 && ($urandom % 2);
      din3 = 8'($urandom);
      // reference update (takes effect at next edge)
      if (p1) pushes1++;
      if (q1) pops1++;
      m1 = m1 + int'(p1) - int'(q1);
      m2 = m2 + int'(p2) - int'(q2);
      if (q3) void'(m3.pop_front());
      if (p3) m3.push_back(din3);
    end
    chk(pushes1 > 100 && pops1 > 100, "traffic happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
