// drowsy_hierarchy: a two-level drowsy data-cache hierarchy managed by the
// reuse-distance (RD) policy.
//
// A 32 KB, 4-way L1 data cache with a 1-cycle access keeps only its five
// most recently used lines awake (RD5). Its misses and write-backs go, as
// whole 32-byte lines, to a 512 KB, 4-way L2 with a 10-cycle access that
// keeps only its most recently used line awake (RD1). The L2's misses and
// write-backs leave on the memory port, which a main memory (not part of
// this design) must answer. All other lines of both caches sit at the low,
// state-preserving voltage, so the number of awake data lines, and with it
// the data-array leakage, is bounded by RD_L1 + RD_L2 whatever the program
// does.
//
// Core port: word-wide (64-bit) loads and stores with a valid/ready request
// and one response pulse per request, see drowsy_cache. Memory port: line
// requests with the same handshake; a read is answered by one mem_resp_valid
// pulse with the line, a write by one acknowledge pulse. Latencies: an L1
// hit takes 1 cycle (2 if the line was drowsy); an L1 miss that hits in the
// L2 takes the L1 lookup, the L2's 10 (or 11) cycles and two handshake
// cycles.
//
// The sizes, latencies and RD values are the configuration the document
// evaluates as its main one; the port protocol, the address width, the
// word width and the write-back/write-allocate policy are this design's.
// The per-level event strobes (accesses, hits, drowsy hits, misses, lines
// put to sleep, write-backs) are brought out for counting.
module drowsy_hierarchy
  import drowsy_pkg::*;
#(
  parameter int unsigned ADDR_W     = DEF_ADDR_W,
  parameter int unsigned LINE_BYTES = DEF_LINE_BYTES,
  parameter int unsigned WORD_BYTES = DEF_WORD_BYTES,
  parameter int unsigned L1_SIZE    = L1_SIZE_BYTES,
  parameter int unsigned L1_ASSOC   = L1_WAYS,
  parameter int unsigned L1_LAT     = L1_HIT_LATENCY,
  parameter int unsigned RD_L1      = L1_RD_N,
  parameter int unsigned L2_SIZE    = L2_SIZE_BYTES,
  parameter int unsigned L2_ASSOC   = L2_WAYS,
  parameter int unsigned L2_LAT     = L2_HIT_LATENCY,
  parameter int unsigned RD_L2      = L2_RD_N,
  localparam int unsigned WORD_BITS = 8 * WORD_BYTES,
  localparam int unsigned LINE_BITS = 8 * LINE_BYTES
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // Core (load/store) port
  input  logic                  core_req_valid,
  output logic                  core_req_ready,
  input  logic                  core_req_we,
  input  logic [ADDR_W-1:0]     core_req_addr,
  input  logic [WORD_BITS-1:0]  core_req_wdata,
  input  logic [WORD_BYTES-1:0] core_req_wstrb,
  output logic                  core_resp_valid,
  output logic [WORD_BITS-1:0]  core_resp_rdata,
  // Main memory port
  output logic                  mem_req_valid,
  input  logic                  mem_req_ready,
  output logic                  mem_req_we,
  output logic [ADDR_W-1:0]     mem_req_addr,
  output logic [LINE_BITS-1:0]  mem_req_wdata,
  input  logic                  mem_resp_valid,
  input  logic [LINE_BITS-1:0]  mem_resp_rdata,
  // Event strobes, index 0 = L1, 1 = L2
  output logic [1:0]            ev_access,
  output logic [1:0]            ev_hit,
  output logic [1:0]            ev_drowsy_hit,
  output logic [1:0]            ev_miss,
  output logic [1:0]            ev_sleep,
  output logic [1:0]            ev_writeback
);

  // L1 <-> L2 line link
  logic                 l2_req_valid, l2_req_ready, l2_req_we;
  logic [ADDR_W-1:0]    l2_req_addr;
  logic [LINE_BITS-1:0] l2_req_wdata;
  logic                 l2_resp_valid;
  logic [LINE_BITS-1:0] l2_resp_rdata;

  drowsy_cache #(
    .SIZE_BYTES  (L1_SIZE),
    .WAYS        (L1_ASSOC),
    .LINE_BYTES  (LINE_BYTES),
    .WORD_BYTES  (WORD_BYTES),
    .HIT_LATENCY (L1_LAT),
    .RD_N        (RD_L1),
    .ADDR_W      (ADDR_W)
  ) u_l1 (
    .clk           (clk),
    .rst_n         (rst_n),
    .up_req_valid  (core_req_valid),
    .up_req_ready  (core_req_ready),
    .up_req_we     (core_req_we),
    .up_req_addr   (core_req_addr),
    .up_req_wdata  (core_req_wdata),
    .up_req_wstrb  (core_req_wstrb),
    .up_resp_valid (core_resp_valid),
    .up_resp_rdata (core_resp_rdata),
    .dn_req_valid  (l2_req_valid),
    .dn_req_ready  (l2_req_ready),
    .dn_req_we     (l2_req_we),
    .dn_req_addr   (l2_req_addr),
    .dn_req_wdata  (l2_req_wdata),
    .dn_resp_valid (l2_resp_valid),
    .dn_resp_rdata (l2_resp_rdata),
    .ev_access     (ev_access[0]),
    .ev_hit        (ev_hit[0]),
    .ev_drowsy_hit (ev_drowsy_hit[0]),
    .ev_miss       (ev_miss[0]),
    .ev_sleep      (ev_sleep[0]),
    .ev_writeback  (ev_writeback[0])
  );

  // The L2 is accessed a whole line at a time: its word is the line.
  drowsy_cache #(
    .SIZE_BYTES  (L2_SIZE),
    .WAYS        (L2_ASSOC),
    .LINE_BYTES  (LINE_BYTES),
    .WORD_BYTES  (LINE_BYTES),
    .HIT_LATENCY (L2_LAT),
    .RD_N        (RD_L2),
    .ADDR_W      (ADDR_W)
  ) u_l2 (
    .clk           (clk),
    .rst_n         (rst_n),
    .up_req_valid  (l2_req_valid),
    .up_req_ready  (l2_req_ready),
    .up_req_we     (l2_req_we),
    .up_req_addr   (l2_req_addr),
    .up_req_wdata  (l2_req_wdata),
    .up_req_wstrb  ({LINE_BYTES{1'b1}}),
    .up_resp_valid (l2_resp_valid),
    .up_resp_rdata (l2_resp_rdata),
    .dn_req_valid  (mem_req_valid),
    .dn_req_ready  (mem_req_ready),
    .dn_req_we     (mem_req_we),
    .dn_req_addr   (mem_req_addr),
    .dn_req_wdata  (mem_req_wdata),
    .dn_resp_valid (mem_resp_valid),
    .dn_resp_rdata (mem_resp_rdata),
    .ev_access     (ev_access[1]),
    .ev_hit        (ev_hit[1]),
    .ev_drowsy_hit (ev_drowsy_hit[1]),
    .ev_miss       (ev_miss[1]),
    .ev_sleep      (ev_sleep[1]),
    .ev_writeback  (ev_writeback[1])
  );

endmodule
