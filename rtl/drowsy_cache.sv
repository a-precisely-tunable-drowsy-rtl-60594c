// drowsy_cache: set-associative, write-back cache whose data lines are kept
// drowsy except the few that its reuse-distance buffer holds awake.
//
// Leakage is cut by holding the data lines at a low, state-preserving
// voltage. Only the RD_N most recently used lines are awake: every access
// presents its line frame (set * WAYS + way) to an rd_buffer, which, when an
// access brings in a line it does not hold, orders its least recently used
// line back to sleep. The tags (and valid/dirty bits) always stay awake, so
// a lookup is never delayed; only a hit to a drowsy line pays the wake-up
// penalty of one cycle. A miss wakes the frame it refills, and that wake
// overlaps the refill.
//
// Tags, valid and dirty bits live in one synchronous RAM per way, the LRU
// order of the ways in one RAM per cache; after reset the controller spends
// one cycle per set clearing them (SETS cycles) before it takes requests.
//
// Upstream port (a load/store word of WORD_BYTES): a request is taken in a
// cycle where up_req_valid and up_req_ready are both high; up_req_ready is
// high only when the cache is idle (one access at a time, no pipelining).
// Exactly one up_resp_valid pulse answers each request, with the loaded word
// on up_resp_rdata (a store gets a pulse too). Accesses are aligned to a
// word. Downstream port (whole lines, line-aligned addresses): the same
// valid/ready request, answered by exactly one dn_resp_valid pulse; reads
// return the line on dn_resp_rdata, write-backs are acknowledged.
//
// Timing: a request accepted in cycle t that hits an awake line is answered
// in cycle t + HIT_LATENCY; a hit to a drowsy line in cycle
// t + HIT_LATENCY + 1. Misses take as long as the level below, plus the
// lookup and one response cycle. The next request can be taken the cycle
// after the response.
//
// Events are strobed for one cycle in the lookup cycle (ev_access, ev_hit,
// ev_drowsy_hit, ev_miss, ev_sleep) and when a write-back is sent
// (ev_writeback).
//
// From the document: the sizes (32 KB, 4-way, 32-byte lines, 1-cycle L1;
// 512 KB, 4-way, 10-cycle L2), the RD policy, the one-cycle wake-up penalty
// paid only by hits to drowsy lines, and tags that never sleep. This
// design's own choices: write-back with write-allocate, LRU way replacement
// (invalid ways first), the blocking controller, its handshakes, and the
// 32-bit address.
module drowsy_cache
  import drowsy_pkg::*;
#(
  parameter int unsigned SIZE_BYTES  = L1_SIZE_BYTES,
  parameter int unsigned WAYS        = L1_WAYS,
  parameter int unsigned LINE_BYTES  = DEF_LINE_BYTES,
  parameter int unsigned WORD_BYTES  = DEF_WORD_BYTES,
  parameter int unsigned HIT_LATENCY = L1_HIT_LATENCY,
  parameter int unsigned RD_N        = L1_RD_N,
  parameter int unsigned ADDR_W      = DEF_ADDR_W,
  localparam int unsigned WORD_BITS  = 8 * WORD_BYTES,
  localparam int unsigned LINE_BITS  = 8 * LINE_BYTES
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // Upstream (towards the processor)
  input  logic                   up_req_valid,
  output logic                   up_req_ready,
  input  logic                   up_req_we,
  input  logic [ADDR_W-1:0]      up_req_addr,
  input  logic [WORD_BITS-1:0]   up_req_wdata,
  input  logic [WORD_BYTES-1:0]  up_req_wstrb,
  output logic                   up_resp_valid,
  output logic [WORD_BITS-1:0]   up_resp_rdata,
  // Downstream (towards the next level)
  output logic                   dn_req_valid,
  input  logic                   dn_req_ready,
  output logic                   dn_req_we,
  output logic [ADDR_W-1:0]      dn_req_addr,
  output logic [LINE_BITS-1:0]   dn_req_wdata,
  input  logic                   dn_resp_valid,
  input  logic [LINE_BITS-1:0]   dn_resp_rdata,
  // Event strobes
  output logic                   ev_access,
  output logic                   ev_hit,
  output logic                   ev_drowsy_hit,
  output logic                   ev_miss,
  output logic                   ev_sleep,
  output logic                   ev_writeback
);

  localparam int unsigned LINES  = SIZE_BYTES / LINE_BYTES;
  localparam int unsigned SETS   = LINES / WAYS;
  localparam int unsigned OFF_W  = $clog2(LINE_BYTES);
  localparam int unsigned SET_W  = (SETS > 1) ? $clog2(SETS) : 1;
  localparam int unsigned TAG_W  = ADDR_W - OFF_W - SET_W;
  localparam int unsigned ID_W   = $clog2(LINES);
  localparam int unsigned WAY_W  = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int unsigned WPL    = LINE_BYTES / WORD_BYTES;       // words per line
  localparam int unsigned WSEL_W = (WPL > 1) ? $clog2(WPL) : 1;
  localparam int unsigned BSEL_W = $clog2(WORD_BYTES);
  localparam int unsigned RAGE_W = age_width(WAYS);
  localparam int unsigned CNT_W  = $clog2(HIT_LATENCY + 2) + 1;
  localparam int unsigned META_W = TAG_W + 2;                     // {dirty, valid, tag}
  localparam int unsigned LRU_W  = WAYS * RAGE_W;

  // ---------------------------------------------------------------- request
  cache_state_e state_q, state_d;

  logic                  req_we_q;
  logic [ADDR_W-1:0]     req_addr_q;
  logic [WORD_BITS-1:0]  req_wdata_q;
  logic [WORD_BYTES-1:0] req_wstrb_q;
  logic [CNT_W-1:0]      cnt_q;
  logic [CNT_W-1:0]      target_q;
  logic [WAY_W-1:0]      way_q;
  logic [WORD_BITS-1:0]  rdata_q;
  logic [LINE_BITS-1:0]  victim_data_q;
  logic [TAG_W-1:0]      victim_tag_q;
  logic [SET_W-1:0]      init_set_q;

  logic                  accept;
  logic [SET_W-1:0]      set_idx;      // set of the array access this cycle
  logic [SET_W-1:0]      req_set;
  logic [TAG_W-1:0]      req_tag;
  logic [WSEL_W-1:0]     req_word;

  assign accept  = (state_q == C_IDLE) && up_req_valid;
  assign req_set = SET_W'(req_addr_q[OFF_W +: SET_W] & {SET_W{SETS > 1}});
  assign req_tag = req_addr_q[ADDR_W-1 -: TAG_W];
  if (WPL > 1) begin : g_word_sel
    assign req_word = req_addr_q[OFF_W-1:BSEL_W];
  end else begin : g_one_word
    assign req_word = '0;
  end
  assign set_idx = (state_q == C_INIT) ? init_set_q :
                   accept ? SET_W'(up_req_addr[OFF_W +: SET_W] & {SET_W{SETS > 1}}) : req_set;

  // The store, placed at its word within a line
  logic [LINE_BITS-1:0]  store_line;
  logic [LINE_BYTES-1:0] store_strb;
  always_comb begin
    store_line = '0;
    store_strb = '0;
    for (int k = 0; k < WPL; k++) begin
      store_line[k*WORD_BITS +: WORD_BITS] = req_wdata_q;
      if (WSEL_W'(k) == req_word) store_strb[k*WORD_BYTES +: WORD_BYTES] = req_wstrb_q;
    end
  end

  // ----------------------------------------------------------------- arrays
  logic [WAYS-1:0]                    tag_en, data_en;
  logic [WAYS-1:0][LINE_BYTES-1:0]    data_wstrb;
  logic [WAYS-1:0][(META_W+7)/8-1:0]  tag_wstrb;
  logic [META_W-1:0]                  tag_wdata;
  logic [LINE_BITS-1:0]               data_wdata;
  logic [WAYS-1:0][META_W-1:0]        meta_rdata;
  logic [WAYS-1:0][TAG_W-1:0]         tag_rdata;
  logic [WAYS-1:0]                    valid_rd, dirty_rd;
  logic [WAYS-1:0][LINE_BITS-1:0]     data_rdata;
  logic [WAYS-1:0][LINE_BITS-1:0]     data_gated;
  logic [WAYS-1:0]                    set_drowsy;
  logic                               lru_en;
  logic [WAYS-1:0][RAGE_W-1:0]        lru_rd, lru_new, lru_reset, lru_wdata;

  for (genvar w = 0; w < WAYS; w++) begin : g_way
    sram_sp #(.DEPTH(SETS), .WIDTH(META_W)) u_tag (
      .clk   (clk),
      .en    (tag_en[w]),
      .addr  (set_idx),
      .wstrb (tag_wstrb[w]),
      .wdata (tag_wdata),
      .rdata (meta_rdata[w])
    );
    sram_sp #(.DEPTH(SETS), .WIDTH(LINE_BITS)) u_data (
      .clk   (clk),
      .en    (data_en[w]),
      .addr  (set_idx),
      .wstrb (data_wstrb[w]),
      .wdata (data_wdata),
      .rdata (data_rdata[w])
    );
    assign tag_rdata[w] = meta_rdata[w][TAG_W-1:0];
    assign valid_rd[w]  = meta_rdata[w][TAG_W];
    assign dirty_rd[w]  = meta_rdata[w][TAG_W+1];
    assign lru_reset[w] = RAGE_W'(w);
  end

  // LRU ages of the ways of every set, 0 = most recently used
  sram_sp #(.DEPTH(SETS), .WIDTH(LRU_W)) u_lru (
    .clk   (clk),
    .en    (lru_en),
    .addr  (set_idx),
    .wstrb ('1),
    .wdata (lru_wdata),
    .rdata (lru_rd)
  );

  // ------------------------------------------------------- lookup and victim
  logic [WAYS-1:0]  hit_vec;
  logic             hit_any;
  logic [WAY_W-1:0] hit_way;
  logic [WAY_W-1:0] victim_way;
  logic             victim_found;

  always_comb begin
    hit_vec  = '0;
    hit_way  = '0;
    victim_way = '0;
    victim_found = 1'b0;
    for (int w = 0; w < WAYS; w++) begin
      hit_vec[w] = valid_rd[w] && (tag_rdata[w] == req_tag);
      if (hit_vec[w]) hit_way = WAY_W'(w);
    end
    // First invalid way, otherwise the least recently used one
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (!valid_rd[w]) begin
        victim_way   = WAY_W'(w);
        victim_found = 1'b1;
      end
    end
    if (!victim_found) begin
      for (int w = 0; w < WAYS; w++) begin
        if (lru_rd[w] == RAGE_W'(WAYS - 1)) victim_way = WAY_W'(w);
      end
    end
  end
  assign hit_any = |hit_vec;

  // ----------------------------------------------------- drowsy management
  logic            rd_access;
  logic [ID_W-1:0] rd_id;
  logic            rd_hit;
  logic            rd_sleep_valid;
  logic [ID_W-1:0] rd_sleep_id;
  logic            wake_valid;
  logic [ID_W-1:0] frame_id;

  assign frame_id  = ID_W'(req_set) * ID_W'(WAYS) + ID_W'(hit_any ? hit_way : victim_way);
  assign rd_access = (state_q == C_LOOKUP);
  assign rd_id     = frame_id;
  // A drowsy hit wakes its line; a miss wakes the frame it will refill
  assign wake_valid = (state_q == C_LOOKUP) &&
                      (hit_any ? set_drowsy[hit_way] : set_drowsy[victim_way]);

  rd_buffer #(.N(RD_N), .ID_W(ID_W)) u_rd (
    .clk          (clk),
    .rst_n        (rst_n),
    .access_valid (rd_access),
    .access_id    (rd_id),
    .hit          (rd_hit),
    .sleep_valid  (rd_sleep_valid),
    .sleep_id     (rd_sleep_id),
    .entry_valid  (),
    .entry_id     (),
    .entry_age    ()
  );

  drowsy_bits #(.LINES(LINES), .WAYS(WAYS), .DATA_W(LINE_BITS)) u_bits (
    .clk         (clk),
    .rst_n       (rst_n),
    .wake_valid  (wake_valid),
    .wake_id     (frame_id),
    .sleep_valid (rd_sleep_valid),
    .sleep_id    (rd_sleep_id),
    .query_set   (req_set),
    .array_rdata (data_rdata),
    .set_drowsy  (set_drowsy),
    .gated_rdata (data_gated)
  );

  // ------------------------------------------------------------ controller
  // "Completing" a hit: the hit line is awake and its data passes the gate.
  logic complete_hit;
  logic fill_done;
  logic [LINE_BITS-1:0] fill_line;
  logic [WORD_BITS-1:0] hit_word;
  logic [WAY_W-1:0]     cur_way;    // way of the line being completed

  assign complete_hit = ((state_q == C_LOOKUP) && hit_any && !set_drowsy[hit_way]) ||
                        (state_q == C_WAKE);
  assign fill_done    = (state_q == C_FILL_RESP) && dn_resp_valid;
  assign cur_way      = (state_q == C_LOOKUP) ? hit_way : way_q;
  assign hit_word     = data_gated[cur_way][req_word*WORD_BITS +: WORD_BITS];

  always_comb begin
    for (int b = 0; b < LINE_BYTES; b++) begin
      fill_line[8*b +: 8] = (req_we_q && store_strb[b]) ? store_line[8*b +: 8]
                                                        : dn_resp_rdata[8*b +: 8];
    end
  end

  // LRU ages of the set once cur_way has been used: it becomes the youngest
  always_comb begin
    for (int w = 0; w < WAYS; w++) begin
      if (WAY_W'(w) == cur_way)             lru_new[w] = '0;
      else if (lru_rd[w] < lru_rd[cur_way]) lru_new[w] = lru_rd[w] + 1'b1;
      else                                  lru_new[w] = lru_rd[w];
    end
  end

  always_comb begin
    tag_en     = '0;
    tag_wstrb  = '0;
    tag_wdata  = {1'b1, 1'b1, req_tag};
    data_en    = '0;
    data_wstrb = '0;
    data_wdata = store_line;
    lru_en     = 1'b0;
    lru_wdata  = lru_new;
    if (state_q == C_INIT) begin
      tag_en    = '1;         // invalidate every way of the set
      tag_wstrb = '1;
      tag_wdata = '0;
      lru_en    = 1'b1;
      lru_wdata = lru_reset;
    end else if (accept) begin
      tag_en  = '1;           // read the whole set
      data_en = '1;
      lru_en  = 1'b1;
    end else if (complete_hit) begin
      lru_en = 1'b1;
      if (req_we_q) begin
        data_en[cur_way]    = 1'b1;
        data_wstrb[cur_way] = store_strb;
        tag_en[cur_way]     = 1'b1;   // mark the line dirty
        tag_wstrb[cur_way]  = '1;
      end
    end else if (fill_done) begin
      data_en[way_q]    = 1'b1;
      data_wstrb[way_q] = '1;
      data_wdata        = fill_line;
      tag_en[way_q]     = 1'b1;
      tag_wstrb[way_q]  = '1;
      tag_wdata         = {req_we_q, 1'b1, req_tag};
      lru_en            = 1'b1;
    end
  end

  logic [CNT_W-1:0] target_now;
  assign target_now = (state_q == C_LOOKUP) ? CNT_W'(HIT_LATENCY) : target_q;

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      C_INIT:      if (init_set_q == SET_W'(SETS - 1)) state_d = C_IDLE;
      C_IDLE:      if (accept) state_d = C_LOOKUP;
      C_LOOKUP: begin
        if (hit_any) begin
          if (set_drowsy[hit_way])       state_d = C_WAKE;
          else if (cnt_q == target_now)  state_d = C_IDLE;
          else                           state_d = C_WAIT;
        end else if (valid_rd[victim_way] && dirty_rd[victim_way]) begin
          state_d = C_VICTIM;
        end else begin
          state_d = C_FILL_REQ;
        end
      end
      C_WAKE:      state_d = (cnt_q == target_q) ? C_IDLE : C_WAIT;
      C_WAIT:      if (cnt_q == target_q) state_d = C_IDLE;
      C_RESPOND:   state_d = C_IDLE;
      C_VICTIM:    state_d = C_WB_REQ;
      C_WB_REQ:    if (dn_req_ready) state_d = C_WB_RESP;
      C_WB_RESP:   if (dn_resp_valid) state_d = C_FILL_REQ;
      C_FILL_REQ:  if (dn_req_ready) state_d = C_FILL_RESP;
      C_FILL_RESP: if (dn_resp_valid) state_d = C_RESPOND;
      default:     state_d = C_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q       <= C_INIT;
      init_set_q    <= '0;
      req_we_q      <= 1'b0;
      req_addr_q    <= '0;
      req_wdata_q   <= '0;
      req_wstrb_q   <= '0;
      cnt_q         <= '0;
      target_q      <= '0;
      way_q         <= '0;
      rdata_q       <= '0;
      victim_data_q <= '0;
      victim_tag_q  <= '0;
    end else begin
      state_q <= state_d;
      if (state_q == C_INIT) init_set_q <= init_set_q + 1'b1;
      cnt_q   <= (cnt_q == '1) ? cnt_q : cnt_q + 1'b1;
      if (accept) begin
        req_we_q    <= up_req_we;
        req_addr_q  <= up_req_addr;
        req_wdata_q <= up_req_wdata;
        req_wstrb_q <= up_req_wstrb;
        cnt_q       <= CNT_W'(1);
      end
      if (state_q == C_LOOKUP) begin
        way_q        <= hit_any ? hit_way : victim_way;
        target_q     <= CNT_W'(HIT_LATENCY) + ((hit_any && set_drowsy[hit_way]) ? CNT_W'(1) : '0);
        victim_tag_q <= tag_rdata[victim_way];
      end
      if (state_q == C_VICTIM) victim_data_q <= data_gated[way_q];
      if (complete_hit) rdata_q <= hit_word;
      if (fill_done)    rdata_q <= fill_line[req_word*WORD_BITS +: WORD_BITS];
    end
  end

  // ---------------------------------------------------------------- outputs
  assign up_req_ready  = (state_q == C_IDLE);
  assign up_resp_valid = (complete_hit && cnt_q == target_now) ||
                         ((state_q == C_WAIT) && cnt_q == target_q) ||
                         (state_q == C_RESPOND);
  assign up_resp_rdata = complete_hit ? hit_word : rdata_q;

  assign dn_req_valid = (state_q == C_WB_REQ) || (state_q == C_FILL_REQ);
  assign dn_req_we    = (state_q == C_WB_REQ);
  assign dn_req_addr  = (state_q == C_WB_REQ) ?
                        {victim_tag_q, req_set, {OFF_W{1'b0}}} :
                        {req_tag, req_set, {OFF_W{1'b0}}};
  assign dn_req_wdata = victim_data_q;

  assign ev_access     = (state_q == C_LOOKUP);
  assign ev_hit        = (state_q == C_LOOKUP) && hit_any;
  assign ev_drowsy_hit = (state_q == C_LOOKUP) && hit_any && set_drowsy[hit_way];
  assign ev_miss       = (state_q == C_LOOKUP) && !hit_any;
  assign ev_sleep      = rd_sleep_valid;
  assign ev_writeback  = (state_q == C_WB_REQ) && dn_req_ready;

  // ------------------------------------------------------------- assertions
  // The awake lines are exactly those the RD buffer holds.
  a_rd_matches_drowsy: assert property (@(posedge clk) disable iff (!rst_n)
      (state_q == C_LOOKUP) |-> (rd_hit == !(hit_any ? set_drowsy[hit_way] : set_drowsy[victim_way])))
    else $error("drowsy_cache: RD buffer and drowsy bits disagree");
  a_one_hit: assert property (@(posedge clk) disable iff (!rst_n)
      (state_q == C_LOOKUP) |-> $onehot0(hit_vec))
    else $error("drowsy_cache: line present in two ways");
  a_dn_stable: assert property (@(posedge clk) disable iff (!rst_n)
      (dn_req_valid && !dn_req_ready) |=> (dn_req_valid && $stable(dn_req_addr) && $stable(dn_req_we)))
    else $error("drowsy_cache: downstream request changed before it was taken");

endmodule
