// tb_elbow_cache: end-to-end test of the elbow cache at its default size
// (32 KB, 2 x 256 blocks of 64 bytes), against two independent references:
//  - a flat word memory: every load and store answer must carry the latest
//    value written to that address, through fills, relocations and
//    writebacks;
//  - a model of the replacement policy (skewing, CAT timestamps, four
//    candidates, relocation rules, 16-in-64 window): every access must hit
//    or miss, relocate, be refused a relocation or write back exactly as the
//    model predicts.
// It also checks that a relocation is written in the fill cycle, into the
// other bank, and the hit latency (answer one cycle after the request is
// taken) and, with an unstalled next level, the miss latency
// (3 + writeback + fill latency). Phases: a small working set (hits), a set
// near the capacity with stores (writebacks, relocations), a conflict-heavy
// set (relocation window), a large set (counter wraps) and a phase with a
// randomly stalling next level. Each mechanism is counted and must occur.
module tb_elbow_cache;
  import elbow_pkg::*;

  localparam int unsigned L2_LAT = 4;

  logic          clk = 0, rst_n = 0;
  logic          cpu_req_valid = 0, cpu_req_ready, cpu_rsp_valid;
  cpu_req_t      cpu_req;
  cpu_rsp_t      cpu_rsp;
  logic          l2_fill_req_valid, l2_fill_req_ready, l2_fill_rsp_valid;
  logic [31:0]   l2_fill_addr, l2_wb_addr;
  logic [511:0]  l2_fill_data, l2_wb_data;
  logic          l2_wb_valid, l2_wb_ready;
  cache_events_t events;
  logic [10:0]   cat_count;

  elbow_cache dut (
    .clk, .rst_n, .cpu_req_valid, .cpu_req_ready, .cpu_req, .cpu_rsp_valid, .cpu_rsp,
    .l2_fill_req_valid, .l2_fill_req_ready, .l2_fill_addr, .l2_fill_rsp_valid, .l2_fill_data,
    .l2_wb_valid, .l2_wb_ready, .l2_wb_addr, .l2_wb_data, .events, .cat_count
  );

  l2_model #(.LATENCY(L2_LAT), .STALL_PCT(30)) u_l2 (
    .clk, .fill_req_valid(l2_fill_req_valid), .fill_req_ready(l2_fill_req_ready),
    .fill_addr(l2_fill_addr), .fill_rsp_valid(l2_fill_rsp_valid), .fill_data(l2_fill_data),
    .wb_valid(l2_wb_valid), .wb_ready(l2_wb_ready), .wb_addr(l2_wb_addr), .wb_data(l2_wb_data)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_inv = 0, n_reloc = 0, n_age = 0, n_win = 0, n_wb = 0;
  int n_store_hit = 0, n_store_miss = 0, n_wrap = 0, n_stall = 0;

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  // ------------------------------------------------------------ flat memory
  logic [63:0] flat [logic [31:0]];

  function automatic logic [63:0] init_word(input logic [31:0] word_addr);
    return {word_addr ^ 32'h5A5A_1234, ~word_addr * 32'd2654435761};
  endfunction

  function automatic logic [63:0] flat_rd(input logic [31:0] wa);
    return flat.exists(wa) ? flat[wa] : init_word(wa);
  endfunction

  // ------------------------------------------------------------ policy model
  bit          m_v  [2][256];
  bit          m_d  [2][256];
  logic [18:0] m_t  [2][256];
  int          m_ts [2][256];
  int          m_cat = 0;
  bit          m_hist[$];

  function automatic logic [7:0] skew(input logic [31:0] a, input int bank);
    logic [6:0] a1, b;
    a1 = a[20:14];
    b  = a[12:6];
    if (bank == 1) a1 = {a1[5:0], a1[6]};
    return {a[13], a1 ^ b};
  endfunction

  // block address of the line in (bank, idx) with tag t
  function automatic logic [31:0] home(input int bank, input logic [7:0] idx, input logic [18:0] t);
    logic [6:0] a1;
    a1 = t[7:1];
    if (bank == 1) a1 = {a1[5:0], a1[6]};
    return {t, idx[6:0] ^ a1, 6'b0};
  endfunction

  typedef struct {
    bit hit, inv, reloc, by_age, by_win, wb;
  } expect_t;

  function automatic expect_t model_access(input logic [31:0] a, input bit we);
    expect_t e;
    logic [7:0]  ix[2], alt[2];
    logic [18:0] tag;
    int          cur, age[4], vic, cnt;
    int          cb[4], ci[4];
    bit          allowed;
    e   = '{default: 0};
    tag = a[31:13];
    cur = (m_cat >> 6) & 31;
    ix[0] = skew(a, 0);
    ix[1] = skew(a, 1);
    for (int b = 0; b < 2; b++)
      if (m_v[b][ix[b]] && m_t[b][ix[b]] == tag) begin
        e.hit = 1;
        m_ts[b][ix[b]] = cur;
        if (we) m_d[b][ix[b]] = 1;
        return e;
      end
    // candidates: A=(0,ix0) B=(1,ix1) C=(1,alt of A) D=(0,alt of B)
    alt[0] = skew(home(0, ix[0], m_t[0][ix[0]]), 1);
    alt[1] = skew(home(1, ix[1], m_t[1][ix[1]]), 0);
    cb = '{0, 1, 1, 0};
    ci = '{int'(ix[0]), int'(ix[1]), int'(alt[0]), int'(alt[1])};
    for (int k = 0; k < 4; k++)
      age[k] = m_v[cb[k]][ci[k]] ? ((cur - m_ts[cb[k]][ci[k]] + 32) % 32) : 32;
    cnt = 0;
    foreach (m_hist[i]) cnt += m_hist[i];
    allowed = cnt < 16;
    if (age[0] == 32)      begin vic = 0; e.inv = 1; end
    else if (age[1] == 32) begin vic = 1; e.inv = 1; end
    else begin
      vic = 0;
      for (int k = 1; k < 4; k++) if (age[k] > age[vic]) vic = k;
      if (vic >= 2) begin
        if (age[vic - 2] > 3)  begin e.by_age = 1; vic = (age[1] > age[0]) ? 1 : 0; end
        else if (!allowed)     begin e.by_win = 1; vic = (age[1] > age[0]) ? 1 : 0; end
        else                   e.reloc = 1;
      end
    end
    e.wb = m_v[cb[vic]][ci[vic]] && m_d[cb[vic]][ci[vic]];
    if (e.reloc) begin
      int p;
      p = vic - 2;   // moved primary, its bank is p
      m_v[1-p][ci[vic]]  = 1;
      m_d[1-p][ci[vic]]  = m_d[p][ix[p]];
      m_t[1-p][ci[vic]]  = m_t[p][ix[p]];
      m_ts[1-p][ci[vic]] = m_ts[p][ix[p]];
      vic = p;
    end
    m_v[vic][ix[vic]]  = 1;
    m_d[vic][ix[vic]]  = we;
    m_t[vic][ix[vic]]  = tag;
    m_ts[vic][ix[vic]] = cur;
    m_cat = (m_cat + 1) % 2048;
    m_hist.push_front(e.reloc);
    if (m_hist.size() > 63) void'(m_hist.pop_back());
    return e;
  endfunction

  // ------------------------------------------------------------ driver
  bit check_lat = 0;

  task automatic access(input logic [31:0] a, input bit we);
    logic [63:0]  wd;
    logic [7:0]   st;
    logic [31:0]  wa;
    logic [63:0]  exp_word;
    expect_t      e;
    cache_events_t seen;
    int           cyc;
    bit           stalled;
    wa = a >> 3;
    wd = {$urandom, $urandom};
    st = we ? 8'($urandom | 1) : 8'h00;
    e  = model_access(a, we);
    exp_word = flat_rd(wa);
    if (we) begin
      for (int i = 0; i < 8; i++) if (st[i]) exp_word[i*8 +: 8] = wd[i*8 +: 8];
      flat[wa] = exp_word;
    end
    // request
    cpu_req       = '{we: we, addr: a, wdata: wd, wstrb: st};
    cpu_req_valid = 1;
    do @(posedge clk); while (!cpu_req_ready);
    #1 cpu_req_valid = 0;
    seen = '0;
    cyc = 0;
    stalled = 0;
    forever begin
      cyc++;
      seen |= events;
      if (l2_fill_req_valid && !l2_fill_req_ready) stalled = 1;
      if (l2_wb_valid && !l2_wb_ready) stalled = 1;
      if (cpu_rsp_valid) begin
        // a relocation is written in the same cycle as the fill, into the
        // other bank; without one only the fill bank is written
        if (!e.hit) begin
          checks++;
          if (e.reloc ? (dut.b_we !== 2'b11) : !$onehot(dut.b_we))
            fail($sformatf("fill-cycle bank writes %b (relocation %0d)", dut.b_we, e.reloc));
        end
        break;
      end
      if (cyc > 1000) begin fail("no response"); break; end
      @(posedge clk); #1;
    end
    // compare
    checks++;
    if (cpu_rsp.rdata !== exp_word)
      fail($sformatf("data a=%h we=%0d got %h exp %h", a, we, cpu_rsp.rdata, exp_word));
    checks++;
    if (cpu_rsp.hit !== e.hit || seen.hit !== e.hit || seen.miss !== !e.hit)
      fail($sformatf("hit a=%h got %0d exp %0d", a, cpu_rsp.hit, e.hit));
    checks++;
    if (seen.relocation !== e.reloc || seen.reloc_by_age !== e.by_age ||
        seen.reloc_by_window !== e.by_win || seen.fill_invalid !== e.inv ||
        seen.writeback !== e.wb)
      fail($sformatf("events a=%h got r%0d a%0d w%0d i%0d wb%0d exp r%0d a%0d w%0d i%0d wb%0d",
                     a, seen.relocation, seen.reloc_by_age, seen.reloc_by_window,
                     seen.fill_invalid, seen.writeback, e.reloc, e.by_age, e.by_win, e.inv, e.wb));
    if (e.hit) begin
      checks++;
      if (cyc != 1) fail($sformatf("hit latency %0d", cyc));
    end else if (check_lat) begin
      checks++;
      if (cyc != 3 + int'(e.wb) + int'(L2_LAT)) fail($sformatf("miss latency %0d wb=%0d", cyc, e.wb));
    end
    n_hit        += e.hit;
    n_miss       += !e.hit;
    n_inv        += e.inv;
    n_reloc      += e.reloc;
    n_age        += e.by_age;
    n_win        += e.by_win;
    n_wb         += e.wb;
    n_store_hit  += we && e.hit;
    n_store_miss += we && !e.hit;
    n_stall      += stalled;
    @(posedge clk); #1;
  endtask

  // addresses from a pool: NT translated-part values x NB page-offset blocks
  logic [18:0] pool_tag [64];

  function automatic logic [31:0] pick(input int nt, input int nb);
    logic [31:0] a;
    a = {pool_tag[$urandom % nt], 7'($urandom % nb), 3'($urandom), 3'b000};
    return a;
  endfunction

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned last_cat;
    for (int i = 0; i < 64; i++) pool_tag[i] = 19'($urandom);
    for (int b = 0; b < 2; b++) for (int i = 0; i < 256; i++) begin m_v[b][i] = 0; m_d[b][i] = 0; end
    cpu_req = '0;
    u_l2.stall_en = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;

    // 1: small working set, unstalled next level: hits and exact latencies
    check_lat = 1;
    for (int n = 0; n < 3000; n++) access(pick(4, 16), ($urandom % 4) == 0);
    // 2: near capacity with stores
    for (int n = 0; n < 8000; n++) access(pick(32, 16), ($urandom % 3) == 0);
    // 3: conflict heavy: many translated values over few page-offset blocks
    for (int n = 0; n < 8000; n++) access(pick(64, 4), ($urandom % 3) == 0);
    // 4: large set, high miss rate: the allocation counter wraps
    last_cat = 0;
    for (int n = 0; n < 6000; n++) begin
      access(pick(64, 128), ($urandom % 5) == 0);
      if (int'(cat_count) < int'(last_cat)) n_wrap++;
      last_cat = cat_count;
    end
    // 5: stalling next level
    check_lat = 0;
    u_l2.stall_en = 1;
    for (int n = 0; n < 4000; n++) access(pick(32, 32), ($urandom % 3) == 0);

    $display("hits=%0d misses=%0d fill_invalid=%0d relocations=%0d refused_age=%0d refused_window=%0d writebacks=%0d store_hit=%0d store_miss=%0d cat_wraps=%0d l2_stalls=%0d",
             n_hit, n_miss, n_inv, n_reloc, n_age, n_win, n_wb, n_store_hit, n_store_miss, n_wrap, n_stall);
    checks++; if (n_hit == 0)        fail("no hit");
    checks++; if (n_miss == 0)       fail("no miss");
    checks++; if (n_inv == 0)        fail("no fill into an empty slot");
    checks++; if (n_reloc == 0)      fail("no relocation");
    checks++; if (n_age == 0)        fail("no relocation refused by age");
    checks++; if (n_win == 0)        fail("no relocation refused by the window");
    checks++; if (n_wb == 0)         fail("no writeback");
    checks++; if (n_store_hit == 0)  fail("no store hit");
    checks++; if (n_store_miss == 0) fail("no store miss");
    checks++; if (n_wrap == 0)       fail("allocation counter never wrapped");
    checks++; if (n_stall == 0)      fail("next level never stalled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
