// tb_mesi_dual_core: end-to-end test of the dual-processor MESI system at its
// default sizes (4 sets x 4 words per cache, 32-word memory).
//
// Two processor models issue random loads and stores with random gaps, on
// the whole 32-word memory, so lines are shared, stolen, evicted and written
// back all the time. A reference memory, updated in the order the system
// acknowledges stores, gives the value every load must return (sequential
// consistency of a single bus). Also checked every idle cycle: in every set,
// each cache's valid/dirty bits agree with its 7-bit code in the coherency tag
// (valid = not I, dirty = M), and no line is M or E in one cache while valid
// in the other. Hits must take 1 cycle after the
// controller accepts them, misses 3 to 5. Every mechanism of
// the controller (direct read/write, S->M upgrade, fills in E and S, store
// miss, write-back, silent eviction, flush, cache-to-cache transfer,
// invalidation, S->M conflict) and bus contention must occur at least once.
module tb_mesi_dual_core;
  import mesi_pkg::*;

  localparam int NOPS = 4000;   // operations per processor

  logic clk = 0, rst;
  logic [1:0] p_rd, p_wr, p_ack;
  logic [1:0][ADDR_W-1:0] p_addr;
  logic [1:0][DATA_W-1:0] p_wdata;
  logic [DATA_W-1:0] rdata;
  logic [1:0][1:0] mphit;
  mesi_code_t [1:0] outmesi;
  ctrl_events_t events;
  logic busy;

  mesi_dual_core dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [DATA_W-1:0] ref_mem [MEM_WORDS];
  int cnt [13];
  string cnt_name [13] = '{"direct read", "direct write", "S->M upgrade", "fill in E",
                           "fill in S", "store miss I->M", "write-back", "silent evict",
                           "flush", "cache-to-cache", "invalidate", "conflict", "bus wait"};
  int done_ops [2];

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // Mechanism counters.
  always @(posedge clk) if (!rst) begin
    cnt[0] += int'(events.rd_hit);       cnt[1] += int'(events.wr_hit);
    cnt[2] += int'(events.upgrade);      cnt[3] += int'(events.rd_miss_excl);
    cnt[4] += int'(events.rd_miss_shared); cnt[5] += int'(events.wr_miss);
    cnt[6] += int'(events.writeback);    cnt[7] += int'(events.silent_evict);
    cnt[8] += int'(events.flush);        cnt[9] += int'(events.c2c);
    cnt[10] += int'(events.invalidate);  cnt[11] += int'(events.conflict);
    cnt[12] += int'((p_rd | p_wr) == 2'b11 && busy);
  end

  // Stores take effect in the order they are acknowledged.
  always @(posedge clk) if (!rst) begin
    for (int p = 0; p < 2; p++)
      if (p_ack[p] && p_wr[p]) ref_mem[p_addr[p][6:2]] <= p_wdata[p];
  end

  // Coherence invariants over all sets, checked while the controller is idle.
  always @(negedge clk) if (!rst && !busy) begin
    for (int s = 0; s < SETS; s++) begin
      mesi_state_e st0, st1;
      st0 = decode_code(dut.u_ctag.mesi_q[0][s], 1'b0);
      st1 = decode_code(dut.u_ctag.mesi_q[1][s], 1'b1);
      chk(dut.g_cache[0].u_cache.valid_q[s] == (st0 != ST_I) &&
          dut.g_cache[0].u_cache.dirty_q[s] == (st0 == ST_M) &&
          dut.g_cache[1].u_cache.valid_q[s] == (st1 != ST_I) &&
          dut.g_cache[1].u_cache.dirty_q[s] == (st1 == ST_M),
          $sformatf("set %0d: cache bits disagree with codes (%s, %s)", s, st0.name(), st1.name()));
      if (st0 != ST_I && st1 != ST_I &&
          dut.u_ctag.tag_q[0][s] == dut.u_ctag.tag_q[1][s])
        chk(st0 == ST_S && st1 == ST_S,
            $sformatf("set %0d: same line %s in cache1 and %s in cache2", s, st0.name(), st1.name()));
    end
  end

  task automatic processor(input int p);
    for (int n = 0; n < NOPS; n++) begin
      logic wr;
      logic [31:0] a, d, got;
      int lat;
      logic hit_op;
      repeat ($urandom_range(0, 3)) @(negedge clk);
      wr = ($urandom_range(0, 2) == 0);
      // favour a few hot words so that lines are shared and contended
      if ($urandom_range(0, 1)) a = {25'h0, 3'($urandom_range(0, 2)), 4'($urandom) & 4'hC};
      else                      a = {25'h0, 5'($urandom), 2'b00};
      d = $urandom;
      @(negedge clk);
      p_addr[p] = a; p_wdata[p] = d;
      if (wr) p_wr[p] = 1'b1; else p_rd[p] = 1'b1;
      lat = -1;
      hit_op = 1'b0;
      forever begin
        @(posedge clk);
        // count from the edge at which the controller accepts this request
        if (lat >= 0) lat++;
        else if (!busy && dut.gnt[p]) lat = 0;
        if (p_ack[p]) begin
          hit_op = events.rd_hit || events.wr_hit || events.upgrade;
          if (!wr) chk(rdata == ref_mem[a[6:2]],
                       $sformatf("MP%0d load %h: %h want %h", p + 1, a, rdata, ref_mem[a[6:2]]));
          break;
        end
      end
      if (hit_op) chk(lat == 1, $sformatf("MP%0d hit latency %0d", p + 1, lat));
      else        chk(lat >= 3 && lat <= 5, $sformatf("MP%0d miss latency %0d", p + 1, lat));
      @(negedge clk);
      p_rd[p] = 1'b0; p_wr[p] = 1'b0;
      done_ops[p]++;
    end
  endtask

  initial begin
    rst = 1; p_rd = 0; p_wr = 0; p_addr = '0; p_wdata = '0;
    for (int i = 0; i < MEM_WORDS; i++) ref_mem[i] = '0;
    for (int i = 0; i < 13; i++) cnt[i] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    fork
      processor(0);
      processor(1);
    join
    for (int i = 0; i < 13; i++) begin
      $display("  %-16s %0d", cnt_name[i], cnt[i]);
      chk(cnt[i] > 0, $sformatf("mechanism '%s' never happened", cnt_name[i]));
    end
    chk(done_ops[0] == NOPS && done_ops[1] == NOPS, "all operations completed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NOPS * 40) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
