// mem_model: behavioural main memory for the testbenches.
//
// Answers line requests on the downstream handshake of drowsy_cache: it is
// always ready, takes one request at a time and answers it exactly LATENCY
// cycles after the request was taken (a read with the line, a write with an
// acknowledge pulse). Lines never written read as init_line(addr), a fixed
// pattern made of the line address and the word number, so that testbenches
// can predict them. Not synthesizable; timing only as stated.
module mem_model #(
  parameter int ADDR_W = 32,
  parameter int LINE_BITS = 256,
  parameter int LATENCY = 97
) (
  input  logic                 clk,
  input  logic                 req_valid,
  output logic                 req_ready,
  input  logic                 req_we,
  input  logic [ADDR_W-1:0]    req_addr,
  input  logic [LINE_BITS-1:0] req_wdata,
  output logic                 resp_valid,
  output logic [LINE_BITS-1:0] resp_rdata,
  output int                   reads,
  output int                   writes
);

  logic [LINE_BITS-1:0] mem [logic [ADDR_W-1:0]];

  function automatic logic [LINE_BITS-1:0] init_line(input logic [ADDR_W-1:0] a);
    logic [LINE_BITS-1:0] l;
    for (int k = 0; k < LINE_BITS / 64; k++)
      l[k*64 +: 64] = {8'hA5, 8'(k), 16'h0, 32'(a)} ^ {32'(a) * 32'h9E3779B1, 32'h0};
    return l;
  endfunction

  int unsigned wait_q = 0;
  bit busy = 1'b0;
  logic [LINE_BITS-1:0] data_q;

  assign req_ready = !busy;

  initial begin
    reads = 0;
    writes = 0;
    resp_valid = 1'b0;
    resp_rdata = '0;
  end

  always @(posedge clk) begin
    resp_valid <= 1'b0;
    if (busy) begin
      if (wait_q == 1) begin
        busy <= 1'b0;
        resp_valid <= 1'b1;
        resp_rdata <= data_q;
      end
      wait_q <= wait_q - 1;
    end else if (req_valid) begin
      logic [LINE_BITS-1:0] d;
      if (req_we) begin
        mem[req_addr] = req_wdata;
        writes <= writes + 1;
        d = '0;
      end else begin
        d = mem.exists(req_addr) ? mem[req_addr] : init_line(req_addr);
        reads <= reads + 1;
      end
      if (LATENCY <= 1) begin
        resp_valid <= 1'b1;
        resp_rdata <= d;
      end else begin
        busy   <= 1'b1;
        wait_q <= LATENCY - 1;
        data_q <= d;
      end
    end
  end

endmodule
