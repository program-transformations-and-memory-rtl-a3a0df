// tb_ddr_arbiter: self-checking test of the DDR port arbiter.
//
// Four random masters share one DDR behavioural model (random stalls, read
// latency 6) through the arbiter with ARB_SHARE 3 and MAX_OUT 4. Each master
// issues 200 accesses, mixed reads of a pre-filled region and writes to its
// own region, holding each request until it is accepted. Checks: every read
// returns, to the master that issued it and in order, the word at the address
// it asked for; all writes land; at most one master is accepted per cycle; a
// master is never accepted more than ARB_SHARE times in a row while another
// master is waiting; every master is served; the outstanding-read limit and
// the share expiry both occur.
module tb_ddr_arbiter;
  import vsum_pkg::*;
  localparam int NM = 4, SHARE = 3, NOPS = 200;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  mem_req_t m_req [NM];
  mem_rsp_t m_rsp [NM];
  mem_req_t s_req;
  mem_rsp_t s_rsp;
  logic     rearb;

  ddr_arbiter #(.NM(NM), .ARB_SHARE(SHARE), .MAX_OUT(4)) dut (
    .clk, .rst_n, .m_req, .m_rsp, .s_req, .s_rsp, .rearb);

  ddr_model #(.MEM_AW(14), .READ_LAT(6), .STALL_PCT(15)) ddr (
    .clk, .rst_n, .address(s_req.address), .read(s_req.read), .write(s_req.write),
    .writedata(s_req.writedata), .waitrequest(s_rsp.waitrequest),
    .readdata(s_rsp.readdata), .readdatavalid(s_rsp.readdatavalid));

  function automatic word_t pattern(input int a);
    return word_t'(a * 32'h9E37_79B1 + 32'h1234);
  endfunction

  function automatic void chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endfunction

  int    issued [NM], returned [NM];
  word_t exp_q [NM][$];
  word_t wr_ref [int];
  int    last_m = -1, run_len = 0, outlim = 0, expiry = 0;
  bit    started = 0;

  // masters
  for (genvar m = 0; m < NM; m++) begin : g_m
    always @(posedge clk) begin
      if (!rst_n || !started) begin
        m_req[m] <= MEM_REQ_IDLE;
      end else begin
        // read data return
        if (m_rsp[m].readdatavalid) begin
          returned[m]++;
          if (exp_q[m].size() == 0) chk(0, $sformatf("m%0d unexpected data", m));
          else chk(m_rsp[m].readdata == exp_q[m].pop_front(), $sformatf("m%0d read data", m));
        end
        // request handshake
        begin
          automatic bit active   = m_req[m].read || m_req[m].write;
          automatic bit accepted = active && !m_rsp[m].waitrequest;
          automatic mem_req_t r  = MEM_REQ_IDLE;
          if (accepted) begin
            if (m_req[m].read) exp_q[m].push_back(pattern(int'(m_req[m].address)));
            else wr_ref[int'(m_req[m].address)] = m_req[m].writedata;
            issued[m]++;
          end
          if (!active || accepted) begin
            if (issued[m] + int'(active && !accepted) < NOPS && ($urandom % 4 != 0)) begin
              if ($urandom % 2) begin
                r.read    = 1'b1;
                r.address = addr_t'($urandom % 1024);
              end else begin
                r.write     = 1'b1;
                r.address   = addr_t'(4096 + m * 1024 + (issued[m] % 1024));
                r.writedata = $urandom;
              end
            end
            m_req[m] <= r;
          end
        end
      end
    end
  end

  // protocol monitors
  always @(posedge clk) if (rst_n && started) begin
    automatic int nacc = 0, who = -1;
    automatic bit others_waiting = 0;
    for (int m = 0; m < NM; m++)
      if ((m_req[m].read || m_req[m].write) && !m_rsp[m].waitrequest) begin nacc++; who = m; end
    chk(nacc <= 1, "one master accepted per cycle");
    if (who >= 0) begin
      chk(s_req == m_req[who], "slave sees the accepted master's request");
      for (int m = 0; m < NM; m++) if (m != who && (m_req[m].read || m_req[m].write)) others_waiting = 1;
      if (who == last_m) run_len++; else run_len = 1;
      last_m = who;
      if (others_waiting) chk(run_len <= SHARE, $sformatf("share respected (run %0d)", run_len));
      if (run_len == SHARE) expiry++;
    end
    if (dut.blocked) outlim++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all_done;
    for (int m = 0; m < NM; m++) begin issued[m] = 0; returned[m] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < 1024; a++) ddr.mem[a] = pattern(a);
    @(posedge clk);
    started = 1;
    do begin
      @(posedge clk);
      all_done = 1;
      for (int m = 0; m < NM; m++) if (issued[m] < NOPS || exp_q[m].size() != 0) all_done = 0;
    end while (!all_done);
    repeat (10) @(posedge clk);
    for (int m = 0; m < NM; m++) begin
      chk(issued[m] == NOPS, $sformatf("m%0d issued all", m));
      chk(exp_q[m].size() == 0, $sformatf("m%0d got all reads", m));
    end
    foreach (wr_ref[a]) chk(ddr.mem[a] == wr_ref[a], $sformatf("write to %0d landed", a));
    chk(wr_ref.size() > 100, "writes happened");
    chk(outlim > 0, "outstanding-read limit reached");
    chk(expiry > 0, "share used up");
    $display("arbiter: outstanding-limit cycles=%0d share expiries=%0d", outlim, expiry);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
