// elbow_ctrl: access sequencing and replacement for the 2-way elbow cache.
//
// A request reads both way-banks and both timestamp arrays at once, at the
// indices given by the two skewing functions. On a hit the current CAT
// timestamp is written to the hit line (a store also writes its bytes and
// sets the dirty bit). On a miss the alternate locations of the two primary
// candidates A and B are computed from their tags, and the blocks there (C,
// D) are read in the following cycle together with their timestamps. The
// victim is chosen from the four by CAT distance (victim_select, gated by
// the relocation window). A dirty victim is written back, then the block is
// requested from the next level. When it returns, the new block is written
// into its primary slot and, if a relocation was chosen, the displaced
// primary block (already read during the lookup) is written to its alternate
// slot in the other bank in the same cycle; the moved block keeps its
// timestamp and dirty bit. Every fill advances the allocation counter.
//
// Timing: cpu_req_ready is high only when idle (blocking cache). A hit
// answers with cpu_rsp_valid one cycle after the request is taken. A miss
// takes lookup, candidate read, optional writeback handshake, fill request
// handshake and the fill latency; the response comes in the cycle the fill
// data arrives. Stores are write-allocate and write-back; a store answer
// carries the updated word. Relocation reads never compete with other
// accesses here because the cache is blocking, so they are never cancelled.
//
// Bank ports are packed [bank] arrays wired to way_bank / timestamp_array.
module elbow_ctrl #(
  parameter int unsigned ADDR_W    = elbow_pkg::ADDR_W,
  parameter int unsigned OFFSET_W  = elbow_pkg::OFFSET_W,
  parameter int unsigned PAGE_W    = elbow_pkg::PAGE_W,
  parameter int unsigned INDEX_W   = elbow_pkg::INDEX_W,
  parameter int unsigned TAG_W     = elbow_pkg::TAG_W,
  parameter int unsigned LINE_W    = elbow_pkg::LINE_W,
  parameter int unsigned WORD_W    = elbow_pkg::WORD_W,
  parameter int unsigned TS_W      = elbow_pkg::TS_W,
  parameter int unsigned CAT_W     = elbow_pkg::CAT_W,
  parameter int unsigned WINDOW    = elbow_pkg::RELOC_WINDOW,
  parameter int unsigned MAX_RELOC = elbow_pkg::RELOC_MAX,
  parameter int unsigned MAX_DIST  = elbow_pkg::RELOC_MAX_DIST
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // processor side
  input  logic                         cpu_req_valid,
  output logic                         cpu_req_ready,
  input  elbow_pkg::cpu_req_t                     cpu_req,
  output logic                         cpu_rsp_valid,
  output elbow_pkg::cpu_rsp_t                     cpu_rsp,
  // next level: block fill
  output logic                         l2_fill_req_valid,
  input  logic                         l2_fill_req_ready,
  output logic [ADDR_W-1:0]            l2_fill_addr,
  input  logic                         l2_fill_rsp_valid,
  input  logic [LINE_W-1:0]            l2_fill_data,
  // next level: writeback
  output logic                         l2_wb_valid,
  input  logic                         l2_wb_ready,
  output logic [ADDR_W-1:0]            l2_wb_addr,
  output logic [LINE_W-1:0]            l2_wb_data,
  // way-banks
  output logic [1:0]                   b_en,
  output logic [1:0]                   b_we,
  output logic [1:0][INDEX_W-1:0]      b_idx,
  output logic [1:0]                   b_wvalid,
  output logic [1:0]                   b_wdirty,
  output logic [1:0][TAG_W-1:0]        b_wtag,
  output logic [1:0][LINE_W-1:0]       b_wdata,
  input  logic [1:0]                   b_rvalid,
  input  logic [1:0]                   b_rdirty,
  input  logic [1:0][TAG_W-1:0]        b_rtag,
  input  logic [1:0][LINE_W-1:0]       b_rdata,
  // timestamp arrays
  output logic [1:0]                   t_en,
  output logic [1:0]                   t_we,
  output logic [1:0][INDEX_W-1:0]      t_idx,
  output logic [1:0][TS_W-1:0]         t_wts,
  input  logic [1:0][TS_W-1:0]         t_rts,
  // statistics
  output elbow_pkg::cache_events_t                events,
  output logic [CAT_W-1:0]             cat_count
);
  import elbow_pkg::cpu_req_t;
  import elbow_pkg::cand_e;
  import elbow_pkg::CAND_A;
  import elbow_pkg::CAND_B;
  import elbow_pkg::CAND_C;
  import elbow_pkg::CAND_D;

  localparam int unsigned WSEL_W = $clog2(LINE_W / WORD_W);
  localparam int unsigned BYTE_W = $clog2(WORD_W / 8);

  typedef enum logic [2:0] {
    S_IDLE, S_LOOKUP, S_SECOND, S_WB, S_FILL_REQ, S_FILL_WAIT
  } state_e;

  state_e state;

  // request
  cpu_req_t            req_q;
  logic [ADDR_W-1:0]   cur_addr;
  logic [INDEX_W-1:0]  x_idx0, x_idx1;
  logic [TAG_W-1:0]    x_tag;
  logic [WSEL_W-1:0]   x_wsel;

  // primary candidates, captured at lookup
  logic                a_valid_q, a_dirty_q, b_valid_q, b_dirty_q;
  logic [TAG_W-1:0]    a_tag_q, b_tag_q;
  logic [LINE_W-1:0]   a_data_q, b_data_q;
  logic [TS_W-1:0]     a_ts_q, b_ts_q;
  logic [INDEX_W-1:0]  c_idx_q, d_idx_q;   // alternate slots of A and B

  // decision, captured in S_SECOND
  logic                fill_bank_q, reloc_q;
  logic [ADDR_W-1:0]   vic_addr_q;
  logic [LINE_W-1:0]   vic_data_q;

  // timestamps and replacement
  logic [TS_W-1:0]     cur_ts;
  logic                alloc;
  logic                lim_miss, lim_allow;
  logic [$clog2(WINDOW+1)-1:0] lim_count;

  // ---------------------------------------------------------------- indices
  assign cur_addr = (state == S_IDLE) ? cpu_req.addr : req_q.addr;
  assign x_tag    = req_q.addr[ADDR_W-1:PAGE_W];
  assign x_wsel   = req_q.addr[OFFSET_W-1:BYTE_W];

  skew_index #(
    .ADDR_W(ADDR_W), .OFFSET_W(OFFSET_W), .PAGE_W(PAGE_W), .INDEX_W(INDEX_W)
  ) u_skew (
    .blk_addr(cur_addr), .idx0(x_idx0), .idx1(x_idx1)
  );

  // alternate locations / block addresses of the four candidates
  logic [TAG_W-1:0]   alt_a_tag, alt_b_tag;
  logic [ADDR_W-1:0]  a_addr, b_addr, c_addr, d_addr;
  logic [INDEX_W-1:0] a_alt, b_alt, c_alt_unused, d_alt_unused;

  assign alt_a_tag = (state == S_LOOKUP) ? b_rtag[0] : a_tag_q;
  assign alt_b_tag = (state == S_LOOKUP) ? b_rtag[1] : b_tag_q;

  alt_location #(.ADDR_W(ADDR_W), .OFFSET_W(OFFSET_W), .PAGE_W(PAGE_W),
                 .INDEX_W(INDEX_W), .TAG_W(TAG_W))
    u_alt_a (.bank(1'b0), .idx(x_idx0), .tag(alt_a_tag), .blk_addr(a_addr), .alt_idx(a_alt));
  alt_location #(.ADDR_W(ADDR_W), .OFFSET_W(OFFSET_W), .PAGE_W(PAGE_W),
                 .INDEX_W(INDEX_W), .TAG_W(TAG_W))
    u_alt_b (.bank(1'b1), .idx(x_idx1), .tag(alt_b_tag), .blk_addr(b_addr), .alt_idx(b_alt));
  alt_location #(.ADDR_W(ADDR_W), .OFFSET_W(OFFSET_W), .PAGE_W(PAGE_W),
                 .INDEX_W(INDEX_W), .TAG_W(TAG_W))
    u_alt_c (.bank(1'b1), .idx(c_idx_q), .tag(b_rtag[1]), .blk_addr(c_addr), .alt_idx(c_alt_unused));
  alt_location #(.ADDR_W(ADDR_W), .OFFSET_W(OFFSET_W), .PAGE_W(PAGE_W),
                 .INDEX_W(INDEX_W), .TAG_W(TAG_W))
    u_alt_d (.bank(1'b0), .idx(d_idx_q), .tag(b_rtag[0]), .blk_addr(d_addr), .alt_idx(d_alt_unused));

  // ---------------------------------------------------------------- CAT
  cat_counter #(.CAT_W(CAT_W), .TS_W(TS_W)) u_cat (
    .clk(clk), .rst_n(rst_n), .alloc(alloc), .count(cat_count), .ts(cur_ts)
  );

  logic [3:0]           cand_valid;
  logic [3:0][TS_W-1:0] cand_ts, cand_dist;

  always_comb begin
    cand_valid[CAND_A] = a_valid_q;
    cand_valid[CAND_B] = b_valid_q;
    cand_valid[CAND_C] = b_rvalid[1];   // bank 1 was read at A's alternate slot
    cand_valid[CAND_D] = b_rvalid[0];   // bank 0 was read at B's alternate slot
    cand_ts[CAND_A]    = a_ts_q;
    cand_ts[CAND_B]    = b_ts_q;
    cand_ts[CAND_C]    = t_rts[1];
    cand_ts[CAND_D]    = t_rts[0];
  end

  for (genvar i = 0; i < 4; i++) begin : g_dist
    cat_distance #(.TS_W(TS_W)) u_dist (
      .t_curr(cur_ts), .t_st(cand_ts[i]), .age(cand_dist[i])
    );
  end

  cand_e vs_victim;
  logic  vs_fill_bank, vs_relocate, vs_fill_invalid, vs_by_age, vs_by_window;

  victim_select #(.TS_W(TS_W), .MAX_DIST(MAX_DIST)) u_vsel (
    .valid(cand_valid), .age(cand_dist), .reloc_allowed(lim_allow),
    .victim(vs_victim), .fill_bank(vs_fill_bank), .relocate(vs_relocate),
    .fill_invalid(vs_fill_invalid), .reloc_by_age(vs_by_age),
    .reloc_by_window(vs_by_window)
  );

  assign lim_miss = (state == S_SECOND);

  reloc_limiter #(.WINDOW(WINDOW), .MAX_RELOC(MAX_RELOC)) u_lim (
    .clk(clk), .rst_n(rst_n), .miss(lim_miss), .relocated(vs_relocate),
    .allow(lim_allow), .in_window(lim_count)
  );

  // victim of the current decision
  logic               vic_valid, vic_dirty;
  logic [ADDR_W-1:0]  vic_addr;
  logic [LINE_W-1:0]  vic_data;

  always_comb begin
    unique case (vs_victim)
      CAND_A: begin vic_valid = a_valid_q;   vic_dirty = a_dirty_q;   vic_addr = a_addr; vic_data = a_data_q;   end
      CAND_B: begin vic_valid = b_valid_q;   vic_dirty = b_dirty_q;   vic_addr = b_addr; vic_data = b_data_q;   end
      CAND_C: begin vic_valid = b_rvalid[1]; vic_dirty = b_rdirty[1]; vic_addr = c_addr; vic_data = b_rdata[1]; end
      default: begin vic_valid = b_rvalid[0]; vic_dirty = b_rdirty[0]; vic_addr = d_addr; vic_data = b_rdata[0]; end
    endcase
  end

  // ---------------------------------------------------------------- data
  function automatic logic [LINE_W-1:0] merge_word(
    input logic [LINE_W-1:0]   line,
    input logic [WSEL_W-1:0]   wsel,
    input logic [WORD_W-1:0]   wdata,
    input logic [WORD_W/8-1:0] wstrb
  );
    logic [LINE_W-1:0] r;
    r = line;
    for (int i = 0; i < WORD_W / 8; i++)
      if (wstrb[i]) r[wsel*WORD_W + i*8 +: 8] = wdata[i*8 +: 8];
    return r;
  endfunction

  logic              hit0, hit1, hit;
  logic              hit_bank;
  logic [LINE_W-1:0] hit_line, hit_line_new, fill_line_new;

  assign hit0         = b_rvalid[0] && (b_rtag[0] == x_tag);
  assign hit1         = b_rvalid[1] && (b_rtag[1] == x_tag);
  assign hit          = hit0 || hit1;
  assign hit_bank     = !hit0;
  assign hit_line     = hit0 ? b_rdata[0] : b_rdata[1];
  assign hit_line_new = req_q.we ? merge_word(hit_line, x_wsel, req_q.wdata, req_q.wstrb)
                                 : hit_line;
  assign fill_line_new = req_q.we ? merge_word(l2_fill_data, x_wsel, req_q.wdata, req_q.wstrb)
                                  : l2_fill_data;

  logic fill_done;
  assign fill_done = (state == S_FILL_WAIT) && l2_fill_rsp_valid;
  assign alloc     = fill_done;

  // ---------------------------------------------------------------- control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      req_q       <= '0;
      a_valid_q   <= 1'b0;
      a_dirty_q   <= 1'b0;
      b_valid_q   <= 1'b0;
      b_dirty_q   <= 1'b0;
      a_tag_q     <= '0;
      b_tag_q     <= '0;
      a_data_q    <= '0;
      b_data_q    <= '0;
      a_ts_q      <= '0;
      b_ts_q      <= '0;
      c_idx_q     <= '0;
      d_idx_q     <= '0;
      fill_bank_q <= 1'b0;
      reloc_q     <= 1'b0;
      vic_addr_q  <= '0;
      vic_data_q  <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (cpu_req_valid) begin
          req_q <= cpu_req;
          state <= S_LOOKUP;
        end
        S_LOOKUP: begin
          if (hit) state <= S_IDLE;
          else begin
            a_valid_q <= b_rvalid[0];
            a_dirty_q <= b_rdirty[0];
            a_tag_q   <= b_rtag[0];
            a_data_q  <= b_rdata[0];
            a_ts_q    <= t_rts[0];
            b_valid_q <= b_rvalid[1];
            b_dirty_q <= b_rdirty[1];
            b_tag_q   <= b_rtag[1];
            b_data_q  <= b_rdata[1];
            b_ts_q    <= t_rts[1];
            c_idx_q   <= a_alt;
            d_idx_q   <= b_alt;
            state     <= S_SECOND;
          end
        end
        S_SECOND: begin
          fill_bank_q <= vs_fill_bank;
          reloc_q     <= vs_relocate;
          vic_addr_q  <= vic_addr;
          vic_data_q  <= vic_data;
          state       <= (vic_valid && vic_dirty) ? S_WB : S_FILL_REQ;
        end
        S_WB:        if (l2_wb_ready)       state <= S_FILL_REQ;
        S_FILL_REQ:  if (l2_fill_req_ready) state <= S_FILL_WAIT;
        S_FILL_WAIT: if (l2_fill_rsp_valid) state <= S_IDLE;
        default:     state <= S_IDLE;
      endcase
    end
  end

  // array and port drive
  always_comb begin
    cpu_req_ready     = (state == S_IDLE);
    cpu_rsp_valid     = 1'b0;
    cpu_rsp           = '0;
    l2_fill_req_valid = (state == S_FILL_REQ);
    l2_fill_addr      = {req_q.addr[ADDR_W-1:OFFSET_W], {OFFSET_W{1'b0}}};
    l2_wb_valid       = (state == S_WB);
    l2_wb_addr        = vic_addr_q;
    l2_wb_data        = vic_data_q;
    b_en     = '0;
    b_we     = '0;
    b_idx    = '0;
    b_wvalid = '0;
    b_wdirty = '0;
    b_wtag   = '0;
    b_wdata  = '0;
    t_en     = '0;
    t_we     = '0;
    t_idx    = '0;
    t_wts    = '0;
    events   = '0;

    unique case (state)
      S_IDLE: if (cpu_req_valid) begin
        // read both banks at their skewed indices
        b_en     = 2'b11;
        t_en     = 2'b11;
        b_idx[0] = x_idx0;
        b_idx[1] = x_idx1;
        t_idx[0] = x_idx0;
        t_idx[1] = x_idx1;
      end
      S_LOOKUP: begin
        if (hit) begin
          cpu_rsp_valid   = 1'b1;
          cpu_rsp.hit     = 1'b1;
          cpu_rsp.rdata   = hit_line_new[x_wsel*WORD_W +: WORD_W];
          events.hit      = 1'b1;
          t_en[hit_bank]  = 1'b1;
          t_we[hit_bank]  = 1'b1;
          t_idx[hit_bank] = hit_bank ? x_idx1 : x_idx0;
          t_wts[hit_bank] = cur_ts;
          if (req_q.we) begin
            b_en[hit_bank]     = 1'b1;
            b_we[hit_bank]     = 1'b1;
            b_idx[hit_bank]    = hit_bank ? x_idx1 : x_idx0;
            b_wvalid[hit_bank] = 1'b1;
            b_wdirty[hit_bank] = 1'b1;
            b_wtag[hit_bank]   = x_tag;
            b_wdata[hit_bank]  = hit_line_new;
          end
        end else begin
          // read the secondary candidates: A's alternate slot lies in bank 1,
          // B's in bank 0
          b_en     = 2'b11;
          t_en     = 2'b11;
          b_idx[1] = a_alt;
          t_idx[1] = a_alt;
          b_idx[0] = b_alt;
          t_idx[0] = b_alt;
        end
      end
      S_SECOND: begin
        events.miss            = 1'b1;
        events.fill_invalid    = vs_fill_invalid;
        events.relocation      = vs_relocate;
        events.reloc_by_age    = vs_by_age;
        events.reloc_by_window = vs_by_window;
      end
      S_WB: events.writeback = l2_wb_ready;
      S_FILL_WAIT: if (l2_fill_rsp_valid) begin
        cpu_rsp_valid = 1'b1;
        cpu_rsp.hit   = 1'b0;
        cpu_rsp.rdata = fill_line_new[x_wsel*WORD_W +: WORD_W];
        // new block into its primary slot
        b_en[fill_bank_q]     = 1'b1;
        b_we[fill_bank_q]     = 1'b1;
        b_idx[fill_bank_q]    = fill_bank_q ? x_idx1 : x_idx0;
        b_wvalid[fill_bank_q] = 1'b1;
        b_wdirty[fill_bank_q] = req_q.we;
        b_wtag[fill_bank_q]   = x_tag;
        b_wdata[fill_bank_q]  = fill_line_new;
        t_en[fill_bank_q]     = 1'b1;
        t_we[fill_bank_q]     = 1'b1;
        t_idx[fill_bank_q]    = fill_bank_q ? x_idx1 : x_idx0;
        t_wts[fill_bank_q]    = cur_ts;
        // displaced primary into its alternate slot, other bank, same cycle
        if (reloc_q) begin
          b_en[!fill_bank_q]     = 1'b1;
          b_we[!fill_bank_q]     = 1'b1;
          b_idx[!fill_bank_q]    = fill_bank_q ? d_idx_q : c_idx_q;
          b_wvalid[!fill_bank_q] = 1'b1;
          b_wdirty[!fill_bank_q] = fill_bank_q ? b_dirty_q : a_dirty_q;
          b_wtag[!fill_bank_q]   = fill_bank_q ? b_tag_q : a_tag_q;
          b_wdata[!fill_bank_q]  = fill_bank_q ? b_data_q : a_data_q;
          t_en[!fill_bank_q]     = 1'b1;
          t_we[!fill_bank_q]     = 1'b1;
          t_idx[!fill_bank_q]    = fill_bank_q ? d_idx_q : c_idx_q;
          t_wts[!fill_bank_q]    = fill_bank_q ? b_ts_q : a_ts_q;
        end
      end
      default: ;
    endcase
  end

  // ---------------------------------------------------------------- checks
  // a block is resident in at most one of its two possible slots
  a_single_copy: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_LOOKUP) |-> !(hit0 && hit1));
  // next-level handshakes hold their request until accepted
  a_fill_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (l2_fill_req_valid && !l2_fill_req_ready) |=> (l2_fill_req_valid && $stable(l2_fill_addr)));
  a_wb_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (l2_wb_valid && !l2_wb_ready) |=> (l2_wb_valid && $stable(l2_wb_addr)));
endmodule
