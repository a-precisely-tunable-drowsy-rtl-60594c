// tb_rd_buffer: self-checking test of the reuse-distance buffer.
//
// Part 1 rebuilds the eight-entry example state (IDs 124, 11, 325, 804, 806,
// 125, 803, 805 in entries 0..7 with LRU ages 3, 4, 7, 0, 2, 6, 5, 1): eight
// drowsy misses fill the entries in order, then eight hits re-order them.
// The ages are checked against that table, then one more drowsy miss must
// put line 325 (age 7) to sleep, give its entry the new ID and advance every
// age by one modulo 8.
// Part 2 drives random line IDs from a small pool into buffers of 8, 5 and
// 1 entries and compares hit, sleep_valid and sleep_id in every access with
// a reference list of the most recently used IDs kept in the testbench.
module tb_rd_buffer;

  localparam int ID_W = 10;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL: %s", what);
    end
  endtask

  // Three buffers, N = 8, 5 and 1, driven with the same access stream
  logic            acc_valid;
  logic [ID_W-1:0] acc_id;

  logic            hit8, sv8;
  logic [ID_W-1:0] sid8;
  logic [7:0]           ev8;
  logic [7:0][ID_W-1:0] eid8;
  logic [7:0][2:0]      eage8;

  logic            hit5, sv5;
  logic [ID_W-1:0] sid5;
  logic            hit1, sv1;
  logic [ID_W-1:0] sid1;

  rd_buffer #(.N(8), .ID_W(ID_W)) dut8 (
    .clk(clk), .rst_n(rst_n), .access_valid(acc_valid), .access_id(acc_id),
    .hit(hit8), .sleep_valid(sv8), .sleep_id(sid8),
    .entry_valid(ev8), .entry_id(eid8), .entry_age(eage8));

  rd_buffer #(.N(5), .ID_W(ID_W)) dut5 (
    .clk(clk), .rst_n(rst_n), .access_valid(acc_valid), .access_id(acc_id),
    .hit(hit5), .sleep_valid(sv5), .sleep_id(sid5),
    .entry_valid(), .entry_id(), .entry_age());

  rd_buffer #(.N(1), .ID_W(ID_W)) dut1 (
    .clk(clk), .rst_n(rst_n), .access_valid(acc_valid), .access_id(acc_id),
    .hit(hit1), .sleep_valid(sv1), .sleep_id(sid1),
    .entry_valid(), .entry_id(), .entry_age());

  // Reference: most recently used first
  int unsigned ref8[$], ref5[$], ref1[$];

  task automatic ref_step(ref int unsigned q[$], input int n, input int unsigned id,
                          output bit r_hit, output bit r_sleep, output int unsigned r_sid);
    int idx[$];
    idx = q.find_first_index(x) with (x == id);
    r_hit = (idx.size() != 0);
    r_sleep = 1'b0;
    r_sid = 0;
    if (r_hit) begin
      q.delete(idx[0]);
    end else if (q.size() == n) begin
      r_sleep = 1'b1;
      r_sid = q[n-1];
      q.delete(n-1);
    end
    q.push_front(id);
  endtask

  // One access; the outputs are compared in the access cycle
  task automatic access(input int unsigned id, input bit compare_ref);
    bit h, s;
    int unsigned sid;
    acc_valid = 1'b1;
    acc_id = ID_W'(id);
    #1;
    if (compare_ref) begin
      ref_step(ref8, 8, id, h, s, sid);
      check(hit8 == h && sv8 == s && (!s || sid8 == ID_W'(sid)),
            $sformatf("N=8 id=%0d hit=%0b/%0b sleep=%0b/%0b sid=%0d/%0d", id, hit8, h, sv8, s, sid8, sid));
      ref_step(ref5, 5, id, h, s, sid);
      check(hit5 == h && sv5 == s && (!s || sid5 == ID_W'(sid)),
            $sformatf("N=5 id=%0d hit=%0b/%0b sleep=%0b/%0b", id, hit5, h, sv5, s));
      ref_step(ref1, 1, id, h, s, sid);
      check(hit1 == h && sv1 == s && (!s || sid1 == ID_W'(sid)),
            $sformatf("N=1 id=%0d hit=%0b/%0b sleep=%0b/%0b", id, hit1, h, sv1, s));
    end
    @(posedge clk);
    #1;
    acc_valid = 1'b0;
  endtask

  // Watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int unsigned FIG_ID[8]  = '{124, 11, 325, 804, 806, 125, 803, 805};
  localparam int unsigned FIG_AGE[8] = '{3, 4, 7, 0, 2, 6, 5, 1};

  initial begin
    acc_valid = 1'b0;
    acc_id = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk);
    #1;

    // ---- Part 1: the eight-entry example
    check(ev8 == 8'h00, "buffer empty after reset");
    for (int i = 0; i < 8; i++) begin
      acc_valid = 1'b1;
      acc_id = ID_W'(FIG_ID[i]);
      #1;
      check(!hit8 && !sv8, $sformatf("fill %0d: no hit and nothing put to sleep", i));
      @(posedge clk);
      #1;
    end
    acc_valid = 1'b0;
    check(ev8 == 8'hFF, "buffer full after eight new lines");
    // Touch the lines from the oldest (age 7) to the newest (age 0)
    for (int a = 7; a >= 0; a--) begin
      for (int i = 0; i < 8; i++) begin
        if (FIG_AGE[i] == a) begin
          acc_valid = 1'b1;
          acc_id = ID_W'(FIG_ID[i]);
          #1;
          check(hit8 && !sv8, $sformatf("re-access of %0d hits", FIG_ID[i]));
          @(posedge clk);
          #1;
        end
      end
    end
    acc_valid = 1'b0;
    for (int i = 0; i < 8; i++) begin
      check(eid8[i] == ID_W'(FIG_ID[i]), $sformatf("entry %0d ID %0d", i, eid8[i]));
      check(eage8[i] == 3'(FIG_AGE[i]), $sformatf("entry %0d age %0d expected %0d", i, eage8[i], FIG_AGE[i]));
    end
    // A drowsy miss: line 325 (entry 2, age 7) goes to sleep
    acc_valid = 1'b1;
    acc_id = ID_W'(900);
    #1;
    check(!hit8 && sv8 && sid8 == ID_W'(325), "drowsy miss puts line 325 to sleep");
    @(posedge clk);
    #1;
    acc_valid = 1'b0;
    check(eid8[2] == ID_W'(900), "new line takes entry 2");
    for (int i = 0; i < 8; i++)
      check(eage8[i] == 3'((FIG_AGE[i] + 1) % 8), $sformatf("entry %0d age advanced", i));
    // A hit on the entry of age 3 (line 124): younger entries age, it becomes 0
    acc_valid = 1'b1;
    acc_id = ID_W'(124);
    #1;
    check(hit8 && !sv8, "hit on line 124");
    @(posedge clk);
    #1;
    acc_valid = 1'b0;
    begin
      int unsigned exp_age[8] = '{0, 5, 1, 2, 4, 7, 6, 3};
      for (int i = 0; i < 8; i++)
        check(eage8[i] == 3'(exp_age[i]), $sformatf("after hit: entry %0d age %0d exp %0d", i, eage8[i], exp_age[i]));
    end

    // ---- Part 2: random stream against the reference
    rst_n = 1'b0;
    @(posedge clk);
    #1 rst_n = 1'b1;
    ref8.delete();
    ref5.delete();
    ref1.delete();
    for (int k = 0; k < 3000; k++) begin
      // Mostly a small working set, sometimes far lines
      int unsigned id;
      id = ($urandom_range(0, 3) == 0) ? $urandom_range(0, 1023) : $urandom_range(0, 11);
      access(id, 1'b1);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
