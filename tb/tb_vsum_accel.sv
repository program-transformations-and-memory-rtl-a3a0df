// tb_vsum_accel: end-to-end test of the double-buffered vector-sum
// accelerator against the DDR behavioural model.
//
// Two accelerators run side by side, each with its own DDR model:
//   A: vector sum, BLOCK 32, arbitration share 20, at most 4 reads in
//      flight, DDR read latency 6 (so the outstanding-read limit is hit);
//   B: DMA copy kernel, BLOCK 32, default share, DDR with random stalls.
// For several vector lengths (0, 1, 2, 5, 8 tiles) and random data, the
// test checks
//   - every c word against a + b (or a) computed here, a and b untouched, and
//     guard words around c untouched;
//   - the order of DDR bursts against the coarse-grain software pipeline:
//     round r loads tile 2r (a then b), tile 2r+1, then stores tiles 2r-2 and
//     2r-1, each burst BLOCK consecutive words;
//   - for A without random stalls, total cycles within 1.25 x the words moved
//     plus the row-change and per-tile overheads;
// and counts how often each mechanism happened: row changes, DDR stalls,
// computation overlapping DDR traffic, compute waiting on a token, ring
// rounds without a tile, arbitration share expiry, outstanding-read limit,
// store queue back-pressure. A mechanism that never happened is a failure.
module tb_vsum_accel;
  import vsum_pkg::*;

  localparam int unsigned BLOCK = 32;
  localparam int unsigned MAXN  = 8 * BLOCK;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ------------------------------------------------------------ DUT A
  logic        start_a, busy_a, done_a;
  logic [31:0] n_a;
  addr_t       ab_a, bb_a, cb_a;
  addr_t       ad_a;
  logic        rd_a, wr_a, wt_a, rv_a;
  word_t       wd_a, rdd_a;

  vsum_accel #(.BLOCK(BLOCK), .KERNEL(KERNEL_VSUM), .ARB_SHARE(20), .MAX_OUT(4)) dut_a (
    .clk, .rst_n, .start(start_a), .n(n_a), .a_base(ab_a), .b_base(bb_a), .c_base(cb_a),
    .busy(busy_a), .done(done_a),
    .ddr_address(ad_a), .ddr_read(rd_a), .ddr_write(wr_a), .ddr_writedata(wd_a),
    .ddr_waitrequest(wt_a), .ddr_readdata(rdd_a), .ddr_readdatavalid(rv_a));

  ddr_model #(.MEM_AW(16), .READ_LAT(6), .STALL_PCT(0)) ddr_a (
    .clk, .rst_n, .address(ad_a), .read(rd_a), .write(wr_a), .writedata(wd_a),
    .waitrequest(wt_a), .readdata(rdd_a), .readdatavalid(rv_a));

  // ------------------------------------------------------------ DUT B
  logic        start_b, busy_b, done_b;
  logic [31:0] n_b;
  addr_t       ab_b, bb_b, cb_b;
  addr_t       ad_b;
  logic        rd_b, wr_b, wt_b, rv_b;
  word_t       wd_b, rdd_b;

  vsum_accel #(.BLOCK(BLOCK), .KERNEL(KERNEL_COPY)) dut_b (
    .clk, .rst_n, .start(start_b), .n(n_b), .a_base(ab_b), .b_base(bb_b), .c_base(cb_b),
    .busy(busy_b), .done(done_b),
    .ddr_address(ad_b), .ddr_read(rd_b), .ddr_write(wr_b), .ddr_writedata(wd_b),
    .ddr_waitrequest(wt_b), .ddr_readdata(rdd_b), .ddr_readdatavalid(rv_b));

  ddr_model #(.MEM_AW(16), .READ_LAT(4), .STALL_PCT(20)) ddr_b (
    .clk, .rst_n, .address(ad_b), .read(rd_b), .write(wr_b), .writedata(wd_b),
    .waitrequest(wt_b), .readdata(rdd_b), .readdatavalid(rv_b));

  // ------------------------------------------------------------ mechanism counters
  int unsigned m_overlap, m_tokwait, m_dummy, m_share, m_outlim, m_stq, m_set1;

  always @(posedge clk) if (rst_n) begin
    // computation (a c_tmp write) while the DDR port moves data of another tile
    if ((dut_a.c_we != 0) && (rd_a || wr_a) && !wt_a) m_overlap++;
    // compute process waiting for a token
    if (int'(dut_a.u_comp.state) == 1 && !dut_a.u_comp.go) m_tokwait++;
    // ring round with no tile: a load passes the DDR token without loading
    if (dut_a.g_proc[0].u_load.ring_pop && !dut_a.g_proc[0].u_load.real_tile) m_dummy++;
    if (dut_a.g_proc[1].u_load.ring_pop && !dut_a.g_proc[1].u_load.real_tile) m_dummy++;
    // arbitration share used up while the owner still requests
    if (dut_a.u_arb.accept && !dut_a.u_arb.keep && dut_a.u_arb.share_cnt == 20) m_share++;
    // read held back because MAX_OUT reads are outstanding
    if (dut_a.u_arb.blocked) m_outlim++;
    // store read-ahead queue full while DDR stalls the write
    if (dut_b.g_proc[0].u_store.qcnt == 2 && wt_b) m_stq++;
    if (dut_a.ld_push[1]) m_set1++;
  end

  // ------------------------------------------------------------ burst trace
  typedef struct packed { logic [1:0] kind; logic [15:0] tile; } burst_t;  // kind 0 a, 1 b, 2 c
  burst_t trace_a[$], trace_b[$];
  int     cur_off_a, cur_off_b;

  task automatic classify(input addr_t ad, input addr_t ab, input addr_t bb, input addr_t cb,
                          input int n, input logic is_wr, output burst_t bt, output int off, output bit ok);
    int a = int'(ad);
    ok = 1'b1;
    if (is_wr && a >= int'(cb) && a < int'(cb) + n)      begin bt.kind = 2; off = a - int'(cb); end
    else if (!is_wr && a >= int'(ab) && a < int'(ab) + n) begin bt.kind = 0; off = a - int'(ab); end
    else if (!is_wr && a >= int'(bb) && a < int'(bb) + n) begin bt.kind = 1; off = a - int'(bb); end
    else begin bt.kind = 3; off = 0; ok = 1'b0; end
    bt.tile = 16'(off / BLOCK);
    off     = off % BLOCK;
  endtask

  bit stray_a, stray_b, seq_bad_a, seq_bad_b;

  always @(posedge clk) if (rst_n) begin
    burst_t bt; int off; bit ok;
    if ((rd_a || wr_a) && !wt_a) begin
      classify(ad_a, ab_a, bb_a, cb_a, int'(n_a), wr_a, bt, off, ok);
      if (!ok) stray_a = 1;
      if (off == 0) begin trace_a.push_back(bt); cur_off_a = 0; end
      else begin
        if (trace_a.size() == 0 || trace_a[$] != bt || off != cur_off_a + 1) seq_bad_a = 1;
        cur_off_a = off;
      end
    end
    if ((rd_b || wr_b) && !wt_b) begin
      classify(ad_b, ab_b, bb_b, cb_b, int'(n_b), wr_b, bt, off, ok);
      if (!ok) stray_b = 1;
      if (off == 0) begin trace_b.push_back(bt); cur_off_b = 0; end
      else begin
        if (trace_b.size() == 0 || trace_b[$] != bt || off != cur_off_b + 1) seq_bad_b = 1;
        cur_off_b = off;
      end
    end
  end

  function automatic void expected_trace(input int nt, input bit with_b, ref burst_t q[$]);
    q.delete();
    for (int r = 0; r <= (nt + 1) / 2; r++) begin
      for (int k = 0; k < 2; k++) if (2*r + k < nt) begin
        q.push_back('{kind: 2'd0, tile: 16'(2*r + k)});
        if (with_b) q.push_back('{kind: 2'd1, tile: 16'(2*r + k)});
      end
      for (int k = 0; k < 2; k++) if (r >= 1 && 2*(r-1) + k < nt)
        q.push_back('{kind: 2'd2, tile: 16'(2*(r-1) + k)});
    end
  endfunction

  function automatic void chk(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endfunction

  // ------------------------------------------------------------ one run on both DUTs
  localparam int GUARD = 4;
  word_t ea [MAXN], eb [MAXN];

  task automatic run(input int nt);
    int n = nt * BLOCK;
    int cyc = 0;
    bit fin_a = 0, fin_b = 0;
    burst_t exp_q[$];
    int miss0, stall0;
    ab_a = 22'h01000; bb_a = 22'h02000 + 22'(BLOCK/2); cb_a = 22'h03100;
    ab_b = 22'h04000; bb_b = 22'h05000;                cb_b = 22'h06040;
    for (int i = 0; i < n; i++) begin
      ea[i] = $urandom; eb[i] = $urandom;
      ddr_a.mem[int'(ab_a) + i] = ea[i];
      ddr_a.mem[int'(bb_a) + i] = eb[i];
      ddr_b.mem[int'(ab_b) + i] = ea[i];
      ddr_b.mem[int'(bb_b) + i] = eb[i];
    end
    for (int i = -GUARD; i < n + GUARD; i++) begin
      ddr_a.mem[int'(cb_a) + i] = 32'hDEAD_BEEF;
      ddr_b.mem[int'(cb_b) + i] = 32'hDEAD_BEEF;
    end
    trace_a.delete(); trace_b.delete();
    seq_bad_a = 0; seq_bad_b = 0; stray_a = 0; stray_b = 0;
    miss0  = int'(ddr_a.n_row_misses);
    n_a = n; n_b = n;
    @(negedge clk); start_a = 1; start_b = 1;
    @(negedge clk); start_a = 0; start_b = 0;
    while (!(fin_a && fin_b) && cyc < 200000) begin
      @(posedge clk);
      cyc++;
      if (done_a && !fin_a) begin
        fin_a = 1;
        // words moved: 3 per element; row changes and per-tile handshakes on top
        chk(cyc <= (3 * n * 5) / 4 + (int'(ddr_a.n_row_misses) - miss0) * 3 + 40 * nt + 40,
            $sformatf("A: %0d cycles for %0d elements", cyc, n));
        $display("A: n=%0d tiles=%0d cycles=%0d row misses=%0d", n, nt, cyc,
                 int'(ddr_a.n_row_misses) - miss0);
      end
      if (done_b) fin_b = 1;
    end
    chk(fin_a && fin_b, $sformatf("both accelerators finish, %0d tiles", nt));
    @(negedge clk);
    for (int i = 0; i < n; i++) begin
      chk(ddr_a.mem[int'(cb_a) + i] == ea[i] + eb[i], $sformatf("A c[%0d]", i));
      chk(ddr_b.mem[int'(cb_b) + i] == ea[i],         $sformatf("B c[%0d]", i));
      chk(ddr_a.mem[int'(ab_a) + i] == ea[i] && ddr_a.mem[int'(bb_a) + i] == eb[i],
          $sformatf("A inputs kept at %0d", i));
    end
    for (int g = 1; g <= GUARD; g++) begin
      chk(ddr_a.mem[int'(cb_a) - g] == 32'hDEAD_BEEF && ddr_a.mem[int'(cb_a) + n - 1 + g] == 32'hDEAD_BEEF,
          "A guard words");
      chk(ddr_b.mem[int'(cb_b) - g] == 32'hDEAD_BEEF && ddr_b.mem[int'(cb_b) + n - 1 + g] == 32'hDEAD_BEEF,
          "B guard words");
    end
    chk(!stray_a && !stray_b, "no DDR access outside a, b, c");
    chk(!seq_bad_a && !seq_bad_b, "every burst is BLOCK consecutive words");
    expected_trace(nt, 1'b1, exp_q);
    chk(trace_a == exp_q, $sformatf("A burst order (%0d bursts, expected %0d)", trace_a.size(), exp_q.size()));
    expected_trace(nt, 1'b0, exp_q);
    chk(trace_b == exp_q, $sformatf("B burst order (%0d bursts, expected %0d)", trace_b.size(), exp_q.size()));
    chk(!busy_a && !busy_b, "idle after done");
  endtask

  // ------------------------------------------------------------ watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; start_a = 0; start_b = 0; n_a = 0; n_b = 0;
    ab_a = '0; bb_a = '0; cb_a = '0; ab_b = '0; bb_b = '0; cb_b = '0;
    m_overlap = 0; m_tokwait = 0; m_dummy = 0; m_share = 0; m_outlim = 0; m_stq = 0; m_set1 = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    run(0);
    run(1);
    run(2);
    run(5);
    run(8);
    $display("mechanisms: overlap=%0d token_wait=%0d empty_rounds=%0d share_expiry=%0d outstanding_limit=%0d store_queue_full=%0d set1_tiles=%0d row_misses=%0d ddr_stall_cycles=%0d/%0d",
             m_overlap, m_tokwait, m_dummy, m_share, m_outlim, m_stq, m_set1,
             ddr_a.n_row_misses, ddr_a.n_stall_cycles, ddr_b.n_stall_cycles);
    chk(m_overlap > 0, "computation overlapped DDR traffic");
    chk(m_tokwait > 0, "compute waited on a token");
    chk(m_dummy > 0,   "ring round without a tile");
    chk(m_share > 0,   "arbitration share expired");
    chk(m_outlim > 0,  "outstanding-read limit reached");
    chk(m_stq > 0,     "store queue full under DDR stall");
    chk(m_set1 > 0,    "buffer set 1 used");
    chk(ddr_a.n_row_misses > 0 && ddr_b.n_stall_cycles > 0, "DDR row changes and stalls");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
