// hier_config_run: one drowsy_hierarchy in a chosen configuration, driven
// with a fixed pseudo-random access stream and checked access by access.
//
// Used by tb_drowsy_configs, which places one of these per configuration.
// The stream comes from a 32-bit xorshift generator with a fixed seed, so
// every instance sees exactly the same sequence of core accesses whatever
// its sizes: most accesses go to a few hot lines, the rest to a pool of
// 128 lines that share 16 L1 sets and, being 512 KB apart, 16 sets of the
// L2 at any of its sizes, and a few to any line of a 16 MB
// region. Two cache_ref models predict hits, drowsy accesses and write-backs
// of both levels; from them the expected latency follows:
//   L1 hit                        L1_LAT, +1 if the line was drowsy
//   L1 miss, clean victim         L1_LAT + 2 + T(L2 read)
//   L1 miss, dirty victim         L1_LAT + 4 + T(L2 write-back) + T(L2 read)
//   T(L2 access) = L2_LAT (+1 if drowsy) on a hit, 3 + M on a clean miss,
//                  5 + 2M on a miss with a dirty victim (M = memory latency).
// Per access it checks the loaded word, the latency, that the awake L1
// frames are exactly the model's and that no more than RD_L2 L2 lines are
// awake. At the end it checks the event counts of both levels against the
// models and raises done; the counts are outputs for the enclosing test.
// The first eight accesses are a directed sequence that makes a write-back
// hit the L2's one awake line.
module hier_config_run
  import cache_ref_pkg::*;
#(
  parameter int L2_SIZE  = 512 * 1024,
  parameter int L2_LAT   = 10,
  parameter int RD_L1    = 5,
  parameter int RD_L2    = 1,
  parameter int N_ACCESS = 4000,
  parameter int MEM_LAT  = 97
) (
  output bit done,
  output int checks,
  output int failures,
  output int l1_hits,
  output int l1_drowsy,
  output int l1_misses,
  output int l1_sleeps,
  output int l2_awake_hits,
  output int l2_drowsy,
  output int max_l1_awake,
  output longint cycles
);

  localparam int AW = 32;
  localparam int LB = 32;
  localparam int WB = 8;
  localparam int L1_SIZE = 32 * 1024;
  localparam int L1_LAT = 1;
  localparam int L1_LINES = L1_SIZE / LB;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  initial begin
    done = 1'b0;
    checks = 0;
    failures = 0;
    max_l1_awake = 0;
    cycles = 0;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL [L2 %0dKB RD%0d/%0d]: %s", L2_SIZE / 1024, RD_L1, RD_L2, what);
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

  drowsy_hierarchy #(
    .L2_SIZE(L2_SIZE), .L2_LAT(L2_LAT), .RD_L1(RD_L1), .RD_L2(RD_L2)
  ) dut (
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
  int c_hit[2], c_drowsy[2], c_miss[2], c_sleep[2], c_wb[2];
  initial
    for (int l = 0; l < 2; l++) begin
      c_hit[l] = 0; c_drowsy[l] = 0; c_miss[l] = 0; c_sleep[l] = 0; c_wb[l] = 0;
    end
  always @(posedge clk) begin
    if (rst_n) begin
      for (int l = 0; l < 2; l++) begin
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

  // Fixed-seed xorshift32: the same stream in every instance
  int unsigned rng_state = 32'h1234_5678;
  function automatic int unsigned rnd(input int unsigned n);
    rng_state ^= rng_state << 13;
    rng_state ^= rng_state >> 17;
    rng_state ^= rng_state << 5;
    return rng_state % n;
  endfunction

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
    if (hit) return L1_LAT + (drowsy ? 1 : 0);
    if (wb) begin
      t_wb = l2_time(wb_addr, 1'b1);
      return L1_LAT + 4 + t_wb + l2_time(addr & ~(LB - 1), 1'b0);
    end
    return L1_LAT + 2 + l2_time(addr & ~(LB - 1), 1'b0);
  endfunction

  function automatic int unsigned pool_line(input int unsigned i);
    return (i % 16) * LB + (i / 16) * (512 * 1024);
  endfunction

  task automatic do_access(input int unsigned addr, input bit we,
                           input logic [63:0] wdata, input logic [7:0] wstrb);
    logic [63:0] expect_d, w;
    int lat, exp_lat, awake, l2_awake;
    expect_d = ref_word(addr);
    exp_lat = expected_latency(addr, we);
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
    awake = 0;
    for (int f = 0; f < L1_LINES; f++) begin
      bit a;
      a = !dut.u_l1.u_bits.drowsy_q[f];
      if (a) awake++;
      if (a != l1_ref.is_awake(f)) check(1'b0, $sformatf("L1 frame %0d awake=%0b", f, a));
    end
    check(awake <= RD_L1, $sformatf("%0d L1 lines awake", awake));
    if (awake > max_l1_awake) max_l1_awake = awake;
    l2_awake = $countones(~dut.u_l2.u_bits.drowsy_q);
    check(l2_awake <= RD_L2, $sformatf("%0d L2 lines awake", l2_awake));
  endtask

  initial begin
    int unsigned hot[8];
    int unsigned addr;
    bit we;
    logic [63:0] wdata;
    logic [7:0] wstrb;
    longint t_start;

    l1_ref = new(L1_SIZE, 4, LB, RD_L1);
    l2_ref = new(L2_SIZE, 4, LB, RD_L2);
    core_req_valid = 1'b0; core_req_we = 1'b0; core_req_addr = '0;
    core_req_wdata = '0; core_req_wstrb = '0;
    for (int i = 0; i < 8; i++) hot[i] = pool_line(rnd(128));
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // Wait for the L2's reset sweep (one set per cycle)
    repeat (L2_SIZE / LB / 4 + 2) @(posedge clk);
    #1;
    check(core_req_ready && dut.u_l2.up_req_ready, "both levels ready after the reset sweep");
    t_start = $time;

    for (int j = 1; j <= 3; j++) do_access(100 * LB + j * 8192, 1'b0, '0, '0);
    do_access(100 * LB + 4 * 8192, 1'b1, 64'h0123_4567_89AB_CDEF, 8'hFF);
    for (int j = 1; j <= 3; j++) do_access(100 * LB + j * 8192, 1'b0, '0, '0);
    do_access(100 * LB + 5 * 8192, 1'b0, '0, '0);

    for (int k = 0; k < N_ACCESS; k++) begin
      int r;
      r = int'(rnd(100));
      if (r < 70)      addr = hot[rnd(8)];
      else if (r < 95) addr = pool_line(rnd(128));
      else             addr = rnd((16 << 20) / LB) * LB;
      addr += rnd(4) * WB;
      if (rnd(100) < 4) hot[rnd(8)] = pool_line(rnd(128));
      we = (rnd(3) == 0);
      wdata = {rnd(32'hFFFF_FFFF), rnd(32'hFFFF_FFFF)};
      wstrb = we ? 8'(rnd(256)) : '0;
      do_access(addr, we, wdata, wstrb);
    end
    cycles = ($time - t_start) / 10;

    repeat (2) @(posedge clk);
    check(c_hit[0] == int'(l1_ref.n_hit) && c_drowsy[0] == int'(l1_ref.n_drowsy) &&
          c_miss[0] == int'(l1_ref.n_miss) && c_sleep[0] == int'(l1_ref.n_sleep) &&
          c_wb[0] == int'(l1_ref.n_wb), "L1 event counts match the model");
    check(c_hit[1] == int'(l2_ref.n_hit) && c_drowsy[1] == int'(l2_ref.n_drowsy) &&
          c_miss[1] == int'(l2_ref.n_miss) && c_sleep[1] == int'(l2_ref.n_sleep) &&
          c_wb[1] == int'(l2_ref.n_wb), "L2 event counts match the model");
    check(c_miss[1] > 0 && c_wb[1] > 0 && c_sleep[1] > 0 && c_drowsy[1] > 0 &&
          c_hit[1] - c_drowsy[1] > 0 && mem_writes > 0,
          "L2 awake and drowsy hits, misses, sleeps and write-backs all occurred");
    l1_hits = c_hit[0];
    l1_drowsy = c_drowsy[0];
    l1_misses = c_miss[0];
    l1_sleeps = c_sleep[0];
    l2_awake_hits = c_hit[1] - c_drowsy[1];
    l2_drowsy = c_drowsy[1];
    $display("L2 %0dKB (%0d cycles) RD%0d/%0d: L1 hits=%0d drowsy=%0d misses=%0d sleeps=%0d | L2 awake hits=%0d drowsy=%0d misses=%0d | cycles=%0d",
             L2_SIZE / 1024, L2_LAT, RD_L1, RD_L2, c_hit[0], c_drowsy[0], c_miss[0], c_sleep[0],
             c_hit[1] - c_drowsy[1], c_drowsy[1], c_miss[1], cycles);
    done = 1'b1;
  end

endmodule
