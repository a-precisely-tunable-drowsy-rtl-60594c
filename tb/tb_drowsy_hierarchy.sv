// tb_drowsy_hierarchy: end-to-end test of the two-level drowsy hierarchy at
// its full size (32 KB L1 with RD5, 512 KB L2 with RD1, 10-cycle L2), with
// mem_model as a 97-cycle main memory.
//
// The stimulus is random loads and stores: mostly to a few hot lines (L1
// hits, awake and drowsy), the rest to a pool of lines that collide in a
// few L1 and L2 sets (L1 and L2 misses, dirty evictions at both levels),
// and now and then to any line of a 16 MB region. Two cache_ref models, one
// per level, predict for every access the hits, drowsy accesses and
// write-backs of both levels, from which the testbench derives the exact
// latency seen by the core:
//   L1 hit                        1 cycle, 2 if the line was drowsy
//   L1 miss, clean victim         3 + T(L2 read)
//   L1 miss, dirty victim         5 + T(L2 write-back) + T(L2 read)
//   T(L2 access) = 10 (11 if drowsy) on a hit, 3 + 97 on a clean miss,
//                  5 + 2*97 on a miss with a dirty victim.
// Checked per access: the loaded word against a flat memory model, the
// latency, that the awake L1 frames are exactly the model's (at most 5) and
// that at most one L2 line is awake and it is the model's. At the end the
// event counts of both levels are compared with the models, and every
// mechanism (awake and drowsy hits, misses, lines put to sleep and
// write-backs at each level, memory reads and writes) must have occurred.
module tb_drowsy_hierarchy;
  import cache_ref_pkg::*;

  localparam int AW = 32;
  localparam int LB = 32;
  localparam int WB = 8;
  localparam int L1_SIZE = 32 * 1024;
  localparam int L2_SIZE = 512 * 1024;
  localparam int RD1 = 5;
  localparam int RD2 = 1;
  localparam int L2_LAT = 10;
  localparam int MEM_LAT = 97;
  localparam int L1_LINES = L1_SIZE / LB;
  localparam int N_ACCESS = 30000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  logic            core_req_valid, core_req_ready, core_req_we;
  logic [AW-1:0]   core_req_addr;
  logic [63:0]     core_req_wdata;
  logic [7:0]      core_req_wstrb;
  logic            core_resp_valid;
  logic [63:0]     core_resp_rdata;
  logic            mem_req_valid, mem_req_ready, mem_req_we;
  logic [AW-1:0]   mem_req_addr;
  logic [8*LB-1:0] mem_req_wdata;
  logic            mem_resp_valid;
  logic [8*LB-1:0] mem_resp_rdata;
  logic [1:0] ev_access, ev_hit, ev_drowsy_hit, ev_miss, ev_sleep, ev_writeback;
  int mem_reads, mem_writes;

  // All parameters at their defaults
  drowsy_hierarchy dut (
    .clk(clk), .rst_n(rst_n),
    .core_req_valid(core_req_valid), .core_req_ready(core_req_ready),
    .core_req_we(core_req_we), .core_req_addr(core_req_addr),
    .core_req_wdata(core_req_wdata), .core_req_wstrb(core_req_wstrb),
    .core_resp_valid(core_resp_valid), .core_resp_rdata(core_resp_rdata),
    .mem_req_valid(mem_req_valid), .mem_req_ready(mem_req_ready),
    .mem_req_we(mem_req_we), .mem_req_addr(mem_req_addr),
    .mem_req_wdata(mem_req_wdata), .mem_resp_valid(mem_resp_valid),
    .mem_resp_rdata(mem_resp_rdata),
    .ev_access(ev_access), .ev_hit(ev_hit), .ev_drowsy_hit(ev_drowsy_hit),
    .ev_miss(ev_miss), .ev_sleep(ev_sleep), .ev_writeback(ev_writeback));

  mem_model #(.ADDR_W(AW), .LINE_BITS(8 * LB), .LATENCY(MEM_LAT)) u_mem (
    .clk(clk), .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req_we(mem_req_we),
    .req_addr(mem_req_addr), .req_wdata(mem_req_wdata),
    .resp_valid(mem_resp_valid), .resp_rdata(mem_resp_rdata),
    .reads(mem_reads), .writes(mem_writes));

  // Event counters, per level
  int c_acc[2], c_hit[2], c_drowsy[2], c_miss[2], c_sleep[2], c_wb[2];
  initial
    for (int l = 0; l < 2; l++) begin
      c_acc[l] = 0; c_hit[l] = 0; c_drowsy[l] = 0; c_miss[l] = 0; c_sleep[l] = 0; c_wb[l] = 0;
    end
  always @(posedge clk) begin
    if (rst_n) begin
      for (int l = 0; l < 2; l++) begin
        c_acc[l]    <= c_acc[l] + int'(ev_access[l]);
        c_hit[l]    <= c_hit[l] + int'(ev_hit[l]);
        c_drowsy[l] <= c_drowsy[l] + int'(ev_drowsy_hit[l]);
        c_miss[l]   <= c_miss[l] + int'(ev_miss[l]);
        c_sleep[l]  <= c_sleep[l] + int'(ev_sleep[l]);
        c_wb[l]     <= c_wb[l] + int'(ev_writeback[l]);
      end
    end
  end

  cache_ref l1_ref, l2_ref;
  logic [63:0] r_mem [int unsigned];   // by word address

  function automatic logic [63:0] ref_word(input int unsigned addr);
    logic [8*LB-1:0] l;
    if (r_mem.exists(addr / WB)) return r_mem[addr / WB];
    l = u_mem.init_line(AW'(addr & ~(LB - 1)));
    return l[((addr % LB) / WB) * 64 +: 64];
  endfunction

  function automatic int l2_time(input int unsigned addr, input bit we);
    bit hit, drowsy, wb;
    int unsigned wb_addr;
    l2_ref.access(addr, we, hit, drowsy, wb, wb_addr);
    if (hit) return L2_LAT + (drowsy ? 1 : 0);
    return wb ? 5 + 2 * MEM_LAT : 3 + MEM_LAT;
  endfunction

  function automatic int expected_latency(input int unsigned addr, input bit we);
    bit hit, drowsy, wb;
    int unsigned wb_addr;
    int t_wb;
    l1_ref.access(addr, we, hit, drowsy, wb, wb_addr);
    if (hit) return 1 + (drowsy ? 1 : 0);
    if (wb) begin
      t_wb = l2_time(wb_addr, 1'b1);
      return 5 + t_wb + l2_time(addr & ~(LB - 1), 1'b0);
    end
    return 3 + l2_time(addr & ~(LB - 1), 1'b0);
  endfunction

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Lines that collide: 16 sets x 8 tags, 128 KB apart (same L1 and L2 set)
  function automatic int unsigned pool_line(input int unsigned i);
    return (i % 16) * LB + (i / 16) * (128 * 1024);
  endfunction

  int unsigned hot[8];
  int n_l1_awake_hit = 0;

  // One core access, checked against the models
  task automatic do_access(input int unsigned addr, input bit we,
                           input logic [63:0] wdata, input logic [7:0] wstrb);
    logic [63:0] expect_d, w;
    int lat, exp_lat, awake, l2_awake;
    expect_d = ref_word(addr);
    exp_lat = expected_latency(addr, we);
    if (exp_lat == 1) n_l1_awake_hit++;
    if (we) begin
      w = expect_d;
      for (int b = 0; b < WB; b++) if (wstrb[b]) w[8*b +: 8] = wdata[8*b +: 8];
      r_mem[addr / WB] = w;
    end

    @(negedge clk);
    while (!core_req_ready) @(negedge clk);
    core_req_valid = 1'b1; core_req_we = we; core_req_addr = AW'(addr);
    core_req_wdata = wdata; core_req_wstrb = wstrb;
    @(posedge clk);
    #1;
    core_req_valid = 1'b0;
    lat = 1;
    while (!core_resp_valid) begin
      @(posedge clk);
      #1;
      lat++;
    end
    check(lat == exp_lat, $sformatf("access addr %h we %0b: latency %0d expected %0d", addr, we, lat, exp_lat));
    if (!we) check(core_resp_rdata == expect_d,
                   $sformatf("access addr %h: read %h expected %h", addr, core_resp_rdata, expect_d));
    // Awake lines: the L1's exactly as modelled, at most one in the L2
    awake = 0;
    for (int f = 0; f < L1_LINES; f++) begin
      bit a;
      a = !dut.u_l1.u_bits.drowsy_q[f];
      if (a) awake++;
      if (a != l1_ref.is_awake(f)) check(1'b0, $sformatf("L1 frame %0d awake=%0b", f, a));
    end
    check(awake <= RD1, $sformatf("%0d L1 lines awake", awake));
    l2_awake = $countones(~dut.u_l2.u_bits.drowsy_q);
    check(l2_awake <= RD2, $sformatf("%0d L2 lines awake", l2_awake));
    if (l2_ref.awake.size() != 0)
      check(!dut.u_l2.u_bits.drowsy_q[l2_ref.awake[0]], "the L2's last used line is awake");
  endtask

  initial begin
    int unsigned addr;
    bit we;
    logic [63:0] wdata;
    logic [7:0] wstrb;
    longint t_start, t_end;

    l1_ref = new(L1_SIZE, 4, LB, RD1);
    l2_ref = new(L2_SIZE, 4, LB, RD2);
    core_req_valid = 1'b0; core_req_we = 1'b0; core_req_addr = '0;
    core_req_wdata = '0; core_req_wstrb = '0;
    for (int i = 0; i < 8; i++) hot[i] = pool_line($urandom_range(0, 127));
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // Both levels clear their tag and LRU arrays after reset, one set per
    // cycle; the L2 (4096 sets) is ready last.
    repeat (L2_SIZE / LB / 4 + 2) @(posedge clk);
    #1;
    check(dut.u_l2.up_req_ready && core_req_ready, "both levels ready after the reset sweep");
    t_start = $time;

    // Directed: a dirty line evicted right after it was fetched is the L2's
    // last used line, so its write-back hits an awake L2 line. Lines 8 KB
    // apart share an L1 set.
    for (int j = 1; j <= 3; j++) do_access(100 * LB + j * 8192, 1'b0, '0, '0);
    do_access(100 * LB + 4 * 8192, 1'b1, 64'h0123_4567_89AB_CDEF, 8'hFF);
    for (int j = 1; j <= 3; j++) do_access(100 * LB + j * 8192, 1'b0, '0, '0);
    do_access(100 * LB + 5 * 8192, 1'b0, '0, '0);

    for (int k = 0; k < N_ACCESS; k++) begin
      int r;
      r = $urandom_range(0, 99);
      if (r < 70)      addr = hot[$urandom_range(0, 7)];
      else if (r < 97) addr = pool_line($urandom_range(0, 127));
      else             addr = $urandom_range(0, (16 << 20) / LB - 1) * LB;
      addr += $urandom_range(0, 3) * WB;
      if ($urandom_range(0, 99) < 4) hot[$urandom_range(0, 7)] = pool_line($urandom_range(0, 127));
      we = ($urandom_range(0, 2) == 0);
      wdata = {$urandom, $urandom};
      wstrb = we ? 8'($urandom) : '0;
      do_access(addr, we, wdata, wstrb);
    end
    t_end = $time;

    repeat (2) @(posedge clk);
    check(c_hit[0] == int'(l1_ref.n_hit) && c_drowsy[0] == int'(l1_ref.n_drowsy) &&
          c_miss[0] == int'(l1_ref.n_miss) && c_sleep[0] == int'(l1_ref.n_sleep) &&
          c_wb[0] == int'(l1_ref.n_wb), "L1 event counts match the model");
    check(c_hit[1] == int'(l2_ref.n_hit) && c_drowsy[1] == int'(l2_ref.n_drowsy) &&
          c_miss[1] == int'(l2_ref.n_miss) && c_sleep[1] == int'(l2_ref.n_sleep) &&
          c_wb[1] == int'(l2_ref.n_wb), "L2 event counts match the model");
    check(c_acc[0] == N_ACCESS + 8, "one L1 lookup per access");

    $display("L1: accesses=%0d awake_hits=%0d drowsy_hits=%0d misses=%0d sleeps=%0d writebacks=%0d",
             c_acc[0], c_hit[0] - c_drowsy[0], c_drowsy[0], c_miss[0], c_sleep[0], c_wb[0]);
    $display("L2: accesses=%0d awake_hits=%0d drowsy_hits=%0d misses=%0d sleeps=%0d writebacks=%0d",
             c_acc[1], c_hit[1] - c_drowsy[1], c_drowsy[1], c_miss[1], c_sleep[1], c_wb[1]);
    $display("memory: reads=%0d writes=%0d  cycles=%0d", mem_reads, mem_writes, (t_end - t_start) / 10);
    // Every mechanism must have happened
    check(n_l1_awake_hit > 0 && c_hit[0] - c_drowsy[0] > 0, "L1 awake hit occurred");
    check(c_drowsy[0] > 0, "L1 drowsy hit occurred");
    check(c_miss[0] > 0, "L1 miss occurred");
    check(c_sleep[0] > 0, "L1 line put to sleep");
    check(c_wb[0] > 0, "L1 write-back occurred");
    check(c_hit[1] - c_drowsy[1] > 0, "L2 awake hit occurred");
    check(c_drowsy[1] > 0, "L2 drowsy hit occurred");
    check(c_miss[1] > 0, "L2 miss occurred");
    check(c_sleep[1] > 0, "L2 line put to sleep");
    check(c_wb[1] > 0, "L2 write-back occurred");
    check(mem_reads > 0 && mem_writes > 0, "memory read and written");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
