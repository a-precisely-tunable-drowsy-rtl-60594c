// tb_drowsy_bits: self-checking test of the drowsy bit array and its
// word-line gate.
//
// After reset every line must be drowsy and every read gated to zero. Random
// wake and sleep orders (sometimes for the same line in one cycle, where the
// wake wins) are applied while a reference bit vector is kept in the
// testbench; every cycle the drowsy flags and the gated data of a random set
// are compared with it. Each order must take effect at the next clock edge.
module tb_drowsy_bits;

  localparam int LINES = 64;
  localparam int WAYS = 4;
  localparam int DW = 16;
  localparam int ID_W = 6;
  localparam int SETS = LINES / WAYS;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #50 clk = ~clk;  // long enough for a full compare() between edges

  int checks = 0;
  int failures = 0;

  logic                    wake_valid, sleep_valid;
  logic [ID_W-1:0]         wake_id, sleep_id;
  logic [3:0]              query_set;
  logic [WAYS-1:0][DW-1:0] array_rdata, gated;
  logic [WAYS-1:0]         set_drowsy;
  logic [LINES-1:0]        model;

  drowsy_bits #(.LINES(LINES), .WAYS(WAYS), .DATA_W(DW)) dut (
    .clk(clk), .rst_n(rst_n),
    .wake_valid(wake_valid), .wake_id(wake_id),
    .sleep_valid(sleep_valid), .sleep_id(sleep_id),
    .query_set(query_set), .array_rdata(array_rdata),
    .set_drowsy(set_drowsy), .gated_rdata(gated));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int s = 0; s < SETS; s++) begin
      query_set = 4'(s);
      for (int w = 0; w < WAYS; w++) array_rdata[w] = DW'($urandom) | 16'h0001;
      #1;
      for (int w = 0; w < WAYS; w++) begin
        checks++;
        if (set_drowsy[w] != model[s * WAYS + w] ||
            gated[w] != (model[s * WAYS + w] ? '0 : array_rdata[w])) begin
          failures++;
          $display("FAIL: line %0d drowsy=%0b expected %0b", s * WAYS + w, set_drowsy[w], model[s * WAYS + w]);
        end
      end
    end
  endtask

  initial begin
    wake_valid = 1'b0; sleep_valid = 1'b0; wake_id = '0; sleep_id = '0;
    query_set = '0; array_rdata = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    model = '1;
    compare();
    for (int k = 0; k < 1500; k++) begin
      @(negedge clk);
      wake_valid  = ($urandom_range(0, 2) != 0);
      sleep_valid = ($urandom_range(0, 2) != 0);
      wake_id  = ID_W'($urandom_range(0, LINES - 1));
      sleep_id = ($urandom_range(0, 7) == 0) ? wake_id : ID_W'($urandom_range(0, LINES - 1));
      // Orders must not act before the clock edge
      compare();
      @(posedge clk);
      if (sleep_valid) model[sleep_id] = 1'b1;
      if (wake_valid)  model[wake_id]  = 1'b0;
      #1;
      wake_valid = 1'b0;
      sleep_valid = 1'b0;
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
