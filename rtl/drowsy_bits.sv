// drowsy_bits: the drowsy bit of every data line of a cache, with the
// word-line gate that keeps a drowsy line from being read.
//
// Bit i is 1 while line i sits at the low, state-preserving voltage and 0
// while it is awake at the full voltage. A wake order (wake_valid/wake_id)
// clears the bit and a sleep order (sleep_valid/sleep_id) sets it, at the
// next clock edge; each transition takes that one cycle. If both name the
// same line in one cycle the wake wins. For the WAYS lines of one set
// (query_set) the module reports which are drowsy and passes the data read
// from the array only for awake lines (the rest read as zero), which is what
// the word-line gate does: a drowsy line must be raised to full voltage
// before its contents reach the sense amplifiers. At reset every line is
// drowsy. The bits and the gate are from the document; the zeroing of gated
// data, the reset state and the set-wise query port are this design's. The
// voltage switching itself is analog and is not modelled here.
module drowsy_bits #(
  parameter int unsigned LINES  = 1024,
  parameter int unsigned WAYS   = 4,
  parameter int unsigned DATA_W = 256,
  localparam int unsigned ID_W  = $clog2(LINES),
  localparam int unsigned SETS  = LINES / WAYS,
  localparam int unsigned SET_W = (SETS > 1) ? $clog2(SETS) : 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        wake_valid,
  input  logic [ID_W-1:0]             wake_id,
  input  logic                        sleep_valid,
  input  logic [ID_W-1:0]             sleep_id,
  input  logic [SET_W-1:0]            query_set,
  input  logic [WAYS-1:0][DATA_W-1:0] array_rdata,
  output logic [WAYS-1:0]             set_drowsy,
  output logic [WAYS-1:0][DATA_W-1:0] gated_rdata);

  logic [LINES-1:0] drowsy_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      drowsy_q <= '1;
    end else begin
      if (sleep_valid) drowsy_q[sleep_id] <= 1'b1;
      if (wake_valid)  drowsy_q[wake_id]  <= 1'b0;
    end
  end

  always_comb begin
    for (int w = 0; w < WAYS; w++) begin
      set_drowsy[w]  = drowsy_q[ID_W'(query_set) * ID_W'(WAYS) + ID_W'(w)];
      gated_rdata[w] = set_drowsy[w] ? '0 : array_rdata[w];
    end
  end

endmodule
