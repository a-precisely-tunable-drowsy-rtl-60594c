// tb_drowsy_configs: runs the hierarchy in each configuration the design
// was evaluated in, on one and the same access stream.
//
// Configurations (32 KB 4-way L1 with a 1-cycle access in all of them):
//   L2 size sweep, RD 5 in the L1 and 1 in the L2:
//     256 KB / 4 cycles, 512 KB / 10 cycles, 1 MB / 27 cycles, 2 MB / 32 cycles
//   L1 RD sweep at the 512 KB L2 (RD 1 in the L2): L1 RD 1, 15, 50 and 100
// Each configuration is a hier_config_run instance, which checks every
// access (data, latency, awake lines) and its event counts against its
// own models. Across configurations this test checks two properties of the
// RD policy that follow from the L1 seeing the same stream everywhere:
//   * the L1's hits, drowsy hits and lines put to sleep do not depend on the
//     L2 size or latency (the RD buffer counts only L1 accesses, not cycles);
//   * a larger L1 RD buffer never gives more drowsy hits (the N most recent
//     lines are always among the N+1 most recent), and with RD 1 the L1
//     keeps exactly one line awake, with RD 5 five.
// A watchdog ends the run if the instances do not finish.
module tb_drowsy_configs;

  localparam int N_CFG = 8;
  localparam int N_ACC = 3000;

  bit     done [N_CFG];
  int     checks_i [N_CFG], failures_i [N_CFG];
  int     l1_hits [N_CFG], l1_drowsy [N_CFG], l1_misses [N_CFG], l1_sleeps [N_CFG];
  int     l2_awake_hits [N_CFG], l2_drowsy [N_CFG], max_awake [N_CFG];
  longint cycles [N_CFG];

  // 0..3: L2 size sweep at RD5/1
  hier_config_run #(.L2_SIZE(256 * 1024),  .L2_LAT(4),  .RD_L1(5), .N_ACCESS(N_ACC)) u_l2_256k (
    done[0], checks_i[0], failures_i[0], l1_hits[0], l1_drowsy[0], l1_misses[0], l1_sleeps[0],
    l2_awake_hits[0], l2_drowsy[0], max_awake[0], cycles[0]);
  hier_config_run #(.L2_SIZE(512 * 1024),  .L2_LAT(10), .RD_L1(5), .N_ACCESS(N_ACC)) u_l2_512k (
    done[1], checks_i[1], failures_i[1], l1_hits[1], l1_drowsy[1], l1_misses[1], l1_sleeps[1],
    l2_awake_hits[1], l2_drowsy[1], max_awake[1], cycles[1]);
  hier_config_run #(.L2_SIZE(1024 * 1024), .L2_LAT(27), .RD_L1(5), .N_ACCESS(N_ACC)) u_l2_1m (
    done[2], checks_i[2], failures_i[2], l1_hits[2], l1_drowsy[2], l1_misses[2], l1_sleeps[2],
    l2_awake_hits[2], l2_drowsy[2], max_awake[2], cycles[2]);
  hier_config_run #(.L2_SIZE(2048 * 1024), .L2_LAT(32), .RD_L1(5), .N_ACCESS(N_ACC)) u_l2_2m (
    done[3], checks_i[3], failures_i[3], l1_hits[3], l1_drowsy[3], l1_misses[3], l1_sleeps[3],
    l2_awake_hits[3], l2_drowsy[3], max_awake[3], cycles[3]);
  // 4..7: L1 RD sweep at the 512 KB L2 (RD5 is instance 1)
  hier_config_run #(.L2_SIZE(512 * 1024), .L2_LAT(10), .RD_L1(1),   .N_ACCESS(N_ACC)) u_rd1 (
    done[4], checks_i[4], failures_i[4], l1_hits[4], l1_drowsy[4], l1_misses[4], l1_sleeps[4],
    l2_awake_hits[4], l2_drowsy[4], max_awake[4], cycles[4]);
  hier_config_run #(.L2_SIZE(512 * 1024), .L2_LAT(10), .RD_L1(15),  .N_ACCESS(N_ACC)) u_rd15 (
    done[5], checks_i[5], failures_i[5], l1_hits[5], l1_drowsy[5], l1_misses[5], l1_sleeps[5],
    l2_awake_hits[5], l2_drowsy[5], max_awake[5], cycles[5]);
  hier_config_run #(.L2_SIZE(512 * 1024), .L2_LAT(10), .RD_L1(50),  .N_ACCESS(N_ACC)) u_rd50 (
    done[6], checks_i[6], failures_i[6], l1_hits[6], l1_drowsy[6], l1_misses[6], l1_sleeps[6],
    l2_awake_hits[6], l2_drowsy[6], max_awake[6], cycles[6]);
  hier_config_run #(.L2_SIZE(512 * 1024), .L2_LAT(10), .RD_L1(100), .N_ACCESS(N_ACC)) u_rd100 (
    done[7], checks_i[7], failures_i[7], l1_hits[7], l1_drowsy[7], l1_misses[7], l1_sleeps[7],
    l2_awake_hits[7], l2_drowsy[7], max_awake[7], cycles[7]);

  int checks = 0;
  int failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #(64'd50_000_000);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    bit all_done;
    all_done = 1'b0;
    while (!all_done) begin
      #1000;
      all_done = 1'b1;
      for (int i = 0; i < N_CFG; i++) if (!done[i]) all_done = 1'b0;
    end
    for (int i = 0; i < N_CFG; i++) begin
      checks += checks_i[i];
      failures += failures_i[i];
    end
    // L1 behaviour is the same for every L2 size
    for (int i = 1; i < 4; i++)
      check(l1_hits[i] == l1_hits[0] && l1_drowsy[i] == l1_drowsy[0] &&
            l1_sleeps[i] == l1_sleeps[0] && l1_misses[i] == l1_misses[0],
            $sformatf("L1 counts of L2 configuration %0d equal those of the 256 KB one", i));
    // Larger RD, fewer or equal drowsy hits: RD 1, 5, 15, 50, 100
    check(l1_drowsy[4] >= l1_drowsy[1], "RD1 drowsy hits >= RD5");
    check(l1_drowsy[1] >= l1_drowsy[5], "RD5 drowsy hits >= RD15");
    check(l1_drowsy[5] >= l1_drowsy[6], "RD15 drowsy hits >= RD50");
    check(l1_drowsy[6] >= l1_drowsy[7], "RD50 drowsy hits >= RD100");
    check(l1_drowsy[4] > l1_drowsy[6], "RD1 has strictly more drowsy hits than RD50");
    check(max_awake[4] == 1 && max_awake[1] == 5 && max_awake[5] == 15,
          $sformatf("L1 awake lines reach the cap: %0d/%0d/%0d", max_awake[4], max_awake[1], max_awake[5]));
    check(max_awake[6] <= 50 && max_awake[7] <= 100, "RD50 and RD100 keep at most 50 and 100 lines awake");
    for (int i = 0; i < N_CFG; i++) begin
      check(l1_drowsy[i] > 0 || i >= 6, $sformatf("configuration %0d had L1 drowsy hits", i));
      check(l1_hits[i] > l1_drowsy[i], $sformatf("configuration %0d had L1 awake hits", i));
      check(l1_sleeps[i] > 0, $sformatf("configuration %0d put L1 lines to sleep", i));
    end
    for (int i = 0; i < N_CFG; i++)
      $display("config %0d: L1 drowsy share of hits %0d.%01d%%, max L1 awake %0d, cycles %0d",
               i, l1_drowsy[i] * 100 / l1_hits[i], (l1_drowsy[i] * 1000 / l1_hits[i]) % 10,
               max_awake[i], cycles[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
