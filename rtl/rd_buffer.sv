// rd_buffer: the reuse-distance (RD) structure that decides which cache
// lines go drowsy.
//
// It holds the IDs of the N most recently used lines of a cache, one entry
// per line, each with an LRU age counter of log2(N) bits. Every cache access
// presents the accessed line's ID (access_valid/access_id); the IDs of all
// entries are compared with it:
//   * found in entry h ("hit", the line is awake): entries younger than h
//     age by one and h's counter is reset to 0;
//   * not found (a "drowsy miss", the line was drowsy): every counter
//     advances by one modulo N, so the oldest entry (age N-1) wraps to 0 and
//     becomes the newest. Its ID is overwritten by the accessed line's and,
//     if the entry held a line, that line is ordered to sleep on
//     sleep_valid/sleep_id.
// The buffer never wakes a line: the cache wakes the line it accesses. The
// ages are always a permutation of 0..N-1; at reset every entry is empty and
// entry 0 is the oldest, so the buffer fills from entry 0 upward and evicts
// nothing until all N entries are in use.
//
// Timing: hit, sleep_valid and sleep_id are combinational from access_id and
// the current contents, valid in the access cycle; the entries update at the
// clock edge that ends it. The state is updated on accesses only, not every
// cycle.
//
// From the document: the ID buffer, one log2(N)-bit LRU counter per entry,
// evicting the LRU entry into drowsiness only once the buffer is full, and
// the 8-entry, 10-bit-ID example (104 bits). The exact counter update rules,
// the reset state and the per-entry valid bits are this design's.
module rd_buffer
  import drowsy_pkg::*;
#(
  parameter int unsigned N    = 8,   // reuse distance: lines kept awake
  parameter int unsigned ID_W = 10,  // line ID width (1024 lines)
  localparam int unsigned AGE_W = age_width(N)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  access_valid,
  input  logic [ID_W-1:0]       access_id,
  output logic                  hit,
  output logic                  sleep_valid,
  output logic [ID_W-1:0]       sleep_id,
  // Contents, for observation
  output logic [N-1:0]            entry_valid,
  output logic [N-1:0][ID_W-1:0]  entry_id,
  output logic [N-1:0][AGE_W-1:0] entry_age
);

  localparam logic [AGE_W-1:0] OLDEST = AGE_W'(N - 1);

  logic [N-1:0]            valid_q;
  logic [N-1:0][ID_W-1:0]  id_q;
  logic [N-1:0][AGE_W-1:0] age_q;

  logic [N-1:0]    match;
  logic [AGE_W-1:0] hit_age;
  logic [N-1:0]    is_oldest;

  always_comb begin
    hit_age   = '0;
    sleep_id  = '0;
    sleep_valid = 1'b0;
    for (int i = 0; i < N; i++) begin
      match[i]     = valid_q[i] && (id_q[i] == access_id);
      is_oldest[i] = (age_q[i] == OLDEST);
      if (match[i]) hit_age = age_q[i];
    end
    hit = |match;
    for (int i = 0; i < N; i++) begin
      if (access_valid && !hit && is_oldest[i] && valid_q[i]) begin
        sleep_valid = 1'b1;
        sleep_id    = id_q[i];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
      id_q    <= '0;
      for (int i = 0; i < N; i++) age_q[i] <= AGE_W'(N - 1 - i);
    end else if (access_valid) begin
      for (int i = 0; i < N; i++) begin
        if (hit) begin
          if (match[i])               age_q[i] <= '0;
          else if (age_q[i] < hit_age) age_q[i] <= age_q[i] + 1'b1;
        end else begin
          if (is_oldest[i]) begin
            age_q[i]   <= '0;
            id_q[i]    <= access_id;
            valid_q[i] <= 1'b1;
          end else begin
            age_q[i] <= age_q[i] + 1'b1;
          end
        end
      end
    end
  end

  assign entry_valid = valid_q;
  assign entry_id    = id_q;
  assign entry_age   = age_q;

  // The ages must stay a permutation of 0..N-1: exactly one entry per age.
  logic [N-1:0] age_seen;
  always_comb begin
    age_seen = '0;
    for (int i = 0; i < N; i++) begin
      if (int'(age_q[i]) < N) age_seen[age_q[i]] = 1'b1;
    end
  end

  a_ages_permutation: assert property (@(posedge clk) disable iff (!rst_n) &age_seen)
    else $error("rd_buffer: LRU ages are not a permutation");
  a_one_match: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(match))
    else $error("rd_buffer: line ID held twice");

endmodule
