// tb_sram_sp: self-checking test of the single-port synchronous RAM.
//
// Writes random words with random byte masks to random addresses and keeps
// a reference copy in the testbench; every read is checked one cycle after
// its address is given, including read-before-write (a read in a write cycle
// returns the old contents) and that rdata holds while the RAM is idle.
module tb_sram_sp;

  localparam int DEPTH = 64;
  localparam int WIDTH = 20;   // not a whole number of bytes on purpose
  localparam int BW = (WIDTH + 7) / 8;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic             en;
  logic [5:0]       addr;
  logic [BW-1:0]    wstrb;
  logic [WIDTH-1:0] wdata, rdata;
  logic [WIDTH-1:0] model [DEPTH];

  sram_sp #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (
    .clk(clk), .en(en), .addr(addr), .wstrb(wstrb), .wdata(wdata), .rdata(rdata));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WIDTH-1:0] expect_q;
    en = 1'b0;
    addr = '0;
    wstrb = '0;
    wdata = '0;
    // Initialise every word
    for (int a = 0; a < DEPTH; a++) begin
      model[a] = WIDTH'($urandom);
      @(negedge clk);
      en = 1'b1; addr = 6'(a); wstrb = '1; wdata = model[a];
    end
    @(negedge clk);
    en = 1'b0;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      en = 1'b1;
      addr = 6'($urandom_range(0, DEPTH - 1));
      wstrb = ($urandom_range(0, 1) == 0) ? '0 : BW'($urandom);
      wdata = WIDTH'($urandom);
      expect_q = model[addr];
      for (int b = 0; b < BW; b++)
        if (wstrb[b])
          for (int i = 8 * b; i < 8 * b + 8 && i < WIDTH; i++) model[addr][i] = wdata[i];
      @(negedge clk);
      en = 1'b0;
      checks++;
      if (rdata !== expect_q) begin
        failures++;
        $display("FAIL: addr %0d read %h expected %h", addr, rdata, expect_q);
      end
      @(negedge clk);
      checks++;
      if (rdata !== expect_q) begin
        failures++;
        $display("FAIL: rdata did not hold");
      end
      // Read back the updated word
      en = 1'b1;
      wstrb = '0;
      @(negedge clk);
      en = 1'b0;
      checks++;
      if (rdata !== model[addr]) begin
        failures++;
        $display("FAIL: addr %0d after write read %h expected %h", addr, rdata, model[addr]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
