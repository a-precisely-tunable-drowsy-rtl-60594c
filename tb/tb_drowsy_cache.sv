// tb_drowsy_cache: self-checking test of one drowsy cache level.
//
// A small cache (1 KB, 4-way, 32-byte lines, 8-byte words, 2-cycle hit, RD
// of 3) sits in front of mem_model (4-cycle latency). Random loads and
// stores with random byte masks, mostly to a few hot lines and sometimes
// anywhere in a 4 KB region, are applied one at a time. The testbench keeps
// its own model of the cache (tags, valid and dirty bits, LRU ways), of the
// RD list of awake frames and of memory, and checks for every access:
//   * the loaded word;
//   * the latency: 2 cycles for a hit to an awake line, 3 for a hit to a
//     drowsy line, 3 + M for a clean miss and 5 + 2M for a miss that writes
//     back a dirty line (M = memory latency);
//   * that exactly the frames in the RD list are awake (never more than 3);
// and at the end the counts of hits, drowsy hits, misses, lines put to
// sleep and write-backs from the event strobes.
module tb_drowsy_cache;

  localparam int SIZE = 1024;
  localparam int WAYS = 4;
  localparam int LB = 32;
  localparam int WB = 8;
  localparam int LAT = 2;
  localparam int RD = 3;
  localparam int MEM_LAT = 4;
  localparam int AW = 32;
  localparam int LINES = SIZE / LB;
  localparam int SETS = LINES / WAYS;
  localparam int OFF_W = $clog2(LB);
  localparam int SET_W = $clog2(SETS);
  localparam int N_ACCESS = 4000;

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

  logic              up_req_valid, up_req_ready, up_req_we;
  logic [AW-1:0]     up_req_addr;
  logic [8*WB-1:0]   up_req_wdata;
  logic [WB-1:0]     up_req_wstrb;
  logic              up_resp_valid;
  logic [8*WB-1:0]   up_resp_rdata;
  logic              dn_req_valid, dn_req_ready, dn_req_we;
  logic [AW-1:0]     dn_req_addr;
  logic [8*LB-1:0]   dn_req_wdata;
  logic              dn_resp_valid;
  logic [8*LB-1:0]   dn_resp_rdata;
  logic ev_access, ev_hit, ev_drowsy_hit, ev_miss, ev_sleep, ev_writeback;
  int mem_reads, mem_writes;

  drowsy_cache #(
    .SIZE_BYTES(SIZE), .WAYS(WAYS), .LINE_BYTES(LB), .WORD_BYTES(WB),
    .HIT_LATENCY(LAT), .RD_N(RD), .ADDR_W(AW)
  ) dut (
    .clk(clk), .rst_n(rst_n),
    .up_req_valid(up_req_valid), .up_req_ready(up_req_ready), .up_req_we(up_req_we),
    .up_req_addr(up_req_addr), .up_req_wdata(up_req_wdata), .up_req_wstrb(up_req_wstrb),
    .up_resp_valid(up_resp_valid), .up_resp_rdata(up_resp_rdata),
    .dn_req_valid(dn_req_valid), .dn_req_ready(dn_req_ready), .dn_req_we(dn_req_we),
    .dn_req_addr(dn_req_addr), .dn_req_wdata(dn_req_wdata),
    .dn_resp_valid(dn_resp_valid), .dn_resp_rdata(dn_resp_rdata),
    .ev_access(ev_access), .ev_hit(ev_hit), .ev_drowsy_hit(ev_drowsy_hit),
    .ev_miss(ev_miss), .ev_sleep(ev_sleep), .ev_writeback(ev_writeback));

  mem_model #(.ADDR_W(AW), .LINE_BITS(8 * LB), .LATENCY(MEM_LAT)) u_mem (
    .clk(clk), .req_valid(dn_req_valid), .req_ready(dn_req_ready), .req_we(dn_req_we),
    .req_addr(dn_req_addr), .req_wdata(dn_req_wdata),
    .resp_valid(dn_resp_valid), .resp_rdata(dn_resp_rdata),
    .reads(mem_reads), .writes(mem_writes));

  // Event counters
  int n_hit = 0, n_drowsy = 0, n_miss = 0, n_sleep = 0, n_wb = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      n_hit    <= n_hit + int'(ev_hit);
      n_drowsy <= n_drowsy + int'(ev_drowsy_hit);
      n_miss   <= n_miss + int'(ev_miss);
      n_sleep  <= n_sleep + int'(ev_sleep);
      n_wb     <= n_wb + int'(ev_writeback);
    end
  end

  // ------------------------------------------------------- reference model
  bit          r_valid [SETS][WAYS];
  bit          r_dirty [SETS][WAYS];
  int unsigned r_tag   [SETS][WAYS];
  int unsigned r_age   [SETS][WAYS];
  int unsigned r_rd[$];                       // awake frames, most recent first
  logic [63:0] r_mem [int unsigned];          // by word address
  int e_hit = 0, e_drowsy = 0, e_miss = 0, e_sleep = 0, e_wb = 0;

  function automatic logic [63:0] ref_word(input int unsigned addr);
    logic [8*LB-1:0] l;
    int unsigned waddr = addr / WB;
    if (r_mem.exists(waddr)) return r_mem[waddr];
    l = u_mem.init_line(AW'(addr & ~(LB - 1)));
    return l[((addr % LB) / WB) * 64 +: 64];
  endfunction

  // Returns the expected latency and updates the model
  function automatic int ref_access(input int unsigned addr, input bit we,
                                    input logic [63:0] wdata, input logic [WB-1:0] wstrb);
    int unsigned set = (addr >> OFF_W) % SETS;
    int unsigned tag = addr >> (OFF_W + SET_W);
    int way = -1;
    int lat;
    int unsigned frame;
    int idx[$];
    logic [63:0] w;
    for (int i = 0; i < WAYS; i++)
      if (r_valid[set][i] && r_tag[set][i] == tag) way = i;
    if (way >= 0) begin
      frame = set * WAYS + way;
      idx = r_rd.find_first_index(x) with (x == frame);
      lat = LAT + ((idx.size() == 0) ? 1 : 0);
      e_hit++;
      if (idx.size() == 0) e_drowsy++;
      if (we) r_dirty[set][way] = 1'b1;
    end else begin
      e_miss++;
      for (int i = WAYS - 1; i >= 0; i--) if (!r_valid[set][i]) way = i;
      if (way < 0)
        for (int i = 0; i < WAYS; i++) if (r_age[set][i] == WAYS - 1) way = i;
      if (r_valid[set][way] && r_dirty[set][way]) begin
        lat = 5 + 2 * MEM_LAT;
        e_wb++;
      end else begin
        lat = 3 + MEM_LAT;
      end
      r_valid[set][way] = 1'b1;
      r_tag[set][way] = tag;
      r_dirty[set][way] = we;
      frame = set * WAYS + way;
    end
    for (int i = 0; i < WAYS; i++)
      if (i != way && r_age[set][i] < r_age[set][way]) r_age[set][i]++;
    r_age[set][way] = 0;
    idx = r_rd.find_first_index(x) with (x == frame);
    if (idx.size() != 0) r_rd.delete(idx[0]);
    r_rd.push_front(frame);
    if (r_rd.size() > RD) begin
      void'(r_rd.pop_back());
      e_sleep++;
    end
    if (we) begin
      w = ref_word(addr);
      for (int b = 0; b < WB; b++) if (wstrb[b]) w[8*b +: 8] = wdata[8*b +: 8];
      r_mem[addr / WB] = w;
    end
    return lat;
  endfunction

  // ----------------------------------------------------------------- driver
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned hot[6];

  initial begin
    int unsigned addr;
    bit we;
    logic [63:0] wdata, expect_d;
    logic [WB-1:0] wstrb;
    int lat, exp_lat, awake;

    up_req_valid = 1'b0; up_req_we = 1'b0; up_req_addr = '0;
    up_req_wdata = '0; up_req_wstrb = '0;
    for (int s = 0; s < SETS; s++)
      for (int w = 0; w < WAYS; w++) begin
        r_valid[s][w] = 1'b0; r_dirty[s][w] = 1'b0; r_tag[s][w] = 0; r_age[s][w] = w;
      end
    for (int i = 0; i < 6; i++) hot[i] = $urandom_range(0, 127);
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    for (int k = 0; k < N_ACCESS; k++) begin
      if ($urandom_range(0, 99) < 75) addr = hot[$urandom_range(0, 5)] * LB + $urandom_range(0, 3) * WB;
      else addr = $urandom_range(0, 127) * LB + $urandom_range(0, 3) * WB;
      if ($urandom_range(0, 99) < 3) hot[$urandom_range(0, 5)] = $urandom_range(0, 127);
      we = ($urandom_range(0, 2) == 0);
      wdata = {$urandom, $urandom};
      wstrb = we ? WB'($urandom) : '0;
      expect_d = ref_word(addr);
      exp_lat = ref_access(addr, we, wdata, wstrb);

      @(negedge clk);
      while (!up_req_ready) @(negedge clk);
      up_req_valid = 1'b1; up_req_we = we; up_req_addr = AW'(addr);
      up_req_wdata = wdata; up_req_wstrb = wstrb;
      @(posedge clk);
      #1;
      up_req_valid = 1'b0;
      lat = 1;
      while (!up_resp_valid) begin
        @(posedge clk);
        #1;
        lat++;
      end
      check(lat == exp_lat, $sformatf("access %0d addr %h we %0b: latency %0d expected %0d", k, addr, we, lat, exp_lat));
      if (!we) check(up_resp_rdata == expect_d,
                     $sformatf("access %0d addr %h: read %h expected %h", k, addr, up_resp_rdata, expect_d));
      @(posedge clk);
      #1;
      check(!up_resp_valid, "a single response pulse");
      // The awake frames are exactly the RD list
      awake = 0;
      for (int f = 0; f < LINES; f++) begin
        int idx[$];
        idx = r_rd.find_first_index(x) with (x == f);
        if (!dut.u_bits.drowsy_q[f]) awake++;
        if (dut.u_bits.drowsy_q[f] != (idx.size() == 0)) begin
          check(1'b0, $sformatf("access %0d: frame %0d drowsy=%0b", k, f, dut.u_bits.drowsy_q[f]));
        end
      end
      check(awake <= RD, $sformatf("%0d lines awake", awake));
    end

    repeat (2) @(posedge clk);
    check(n_hit == e_hit, $sformatf("hits %0d expected %0d", n_hit, e_hit));
    check(n_drowsy == e_drowsy, $sformatf("drowsy hits %0d expected %0d", n_drowsy, e_drowsy));
    check(n_miss == e_miss, $sformatf("misses %0d expected %0d", n_miss, e_miss));
    check(n_sleep == e_sleep, $sformatf("sleeps %0d expected %0d", n_sleep, e_sleep));
    check(n_wb == e_wb, $sformatf("write-backs %0d expected %0d", n_wb, e_wb));
    check(e_drowsy > 0 && e_wb > 0 && e_sleep > 0 && (e_hit - e_drowsy) > 0,
          "every kind of access occurred");
    $display("hits=%0d drowsy_hits=%0d misses=%0d sleeps=%0d writebacks=%0d",
             n_hit, n_drowsy, n_miss, n_sleep, n_wb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
