// ddr_model: behavioural model (not synthesizable, testbench only) of the
// external DDR SDRAM and its controller as seen from the accelerator's
// pipelined word master port.
//
// Memory is an array of 2^MEM_AW 32-bit words. The model keeps one open row
// per bank (word address = row | bank | column, ROW_WORDS words per row). An
// access to the open row of its bank is accepted at once, so a burst within
// a row delivers one word per cycle. An access to another row holds
// waitrequest for ROW_MISS cycles (precharge + activate) and then opens that
// row. Read data returns READ_LAT cycles after acceptance, in order. With
// STALL_PCT > 0 waitrequest is also raised at random on that share of cycles,
// to imitate refresh and other masters. Counters report accesses, row misses
// and stall cycles. The numbers are nominal: a DDR-400 part at CAS 3, seen from
// an accelerator clocked at 100 MHz, with 1 KB rows.
module ddr_model
  import vsum_pkg::*;
#(
  parameter int unsigned MEM_AW    = 22,
  parameter int unsigned COL_BITS  = 8,     // 256 words = 1 KB per row
  parameter int unsigned BANK_BITS = 2,
  parameter int unsigned ROW_MISS  = 3,
  parameter int unsigned READ_LAT  = 4,
  parameter int unsigned STALL_PCT = 0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  addr_t address,
  input  logic  read,
  input  logic  write,
  input  word_t writedata,
  output logic  waitrequest,
  output word_t readdata,
  output logic  readdatavalid
);
  localparam int unsigned NB = 1 << BANK_BITS;

  word_t mem [2**MEM_AW];

  int unsigned open_row [NB];
  logic        row_valid [NB];
  int unsigned miss_cnt;
  logic        rand_stall;

  logic  pipe_v [READ_LAT];
  word_t pipe_d [READ_LAT];

  int unsigned n_reads, n_writes, n_row_misses, n_stall_cycles;

  function automatic int unsigned bank_of(addr_t a);
    return (int'(a) >> COL_BITS) & (NB - 1);
  endfunction
  function automatic int unsigned row_of(addr_t a);
    return int'(a) >> (COL_BITS + BANK_BITS);
  endfunction

  logic hit;
  always_comb begin
    hit = row_valid[bank_of(address)] && (open_row[bank_of(address)] == row_of(address));
    waitrequest = (read || write) && (!hit || rand_stall);
  end

  assign readdatavalid = pipe_v[READ_LAT-1];
  assign readdata      = pipe_d[READ_LAT-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < int'(NB); b++) begin
        row_valid[b] <= 1'b0;
        open_row[b]  <= 0;
      end
      for (int s = 0; s < int'(READ_LAT); s++) begin
        pipe_v[s] <= 1'b0;
        pipe_d[s] <= '0;
      end
      miss_cnt       <= 0;
      rand_stall     <= 1'b0;
      n_reads        <= 0;
      n_writes       <= 0;
      n_row_misses   <= 0;
      n_stall_cycles <= 0;
    end else begin
      rand_stall <= (STALL_PCT > 0) && (($urandom % 100) < STALL_PCT);
      if (waitrequest) n_stall_cycles <= n_stall_cycles + 1;
      // row opening
      if ((read || write) && !hit) begin
        if (miss_cnt + 1 >= ROW_MISS) begin
          row_valid[bank_of(address)] <= 1'b1;
          open_row[bank_of(address)]  <= row_of(address);
          miss_cnt     <= 0;
          n_row_misses <= n_row_misses + 1;
        end else miss_cnt <= miss_cnt + 1;
      end
      // read pipeline
      pipe_v[0] <= read && !waitrequest;
      pipe_d[0] <= (read && !waitrequest) ? mem[address[MEM_AW-1:0]] : '0;
      for (int s = 1; s < int'(READ_LAT); s++) begin
        pipe_v[s] <= pipe_v[s-1];
        pipe_d[s] <= pipe_d[s-1];
      end
      if (read && !waitrequest) n_reads <= n_reads + 1;
      if (write && !waitrequest) begin
        mem[address[MEM_AW-1:0]] <= writedata;
        n_writes <= n_writes + 1;
      end
    end
  end

  a_one_op: assert property (@(posedge clk) disable iff (!rst_n) !(read && write));

endmodule
