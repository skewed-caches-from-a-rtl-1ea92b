// tb_elbow_scenarios: directed walk-throughs of the two situations that
// define the design.
//  1. Skewing: three blocks that share their bank-0 index (a 2-way
//     set-associative cache could hold only two of them) all stay resident,
//     because their bank-1 indices differ.
//  2. Elbow relocation: X misses; its primary slots hold A (bank 0) and B
//     (bank 1); A's alternate slot in bank 1 holds C, B's alternate slot in
//     bank 0 holds D. C is made the oldest and A young, so A must move to C's
//     slot and X take A's old slot: afterwards X, A, B and D hit and C
//     misses. The same set-up with A made old must instead evict the older
//     primary without a relocation.
// Ages are produced by filling unrelated empty slots, each fill advancing
// the allocation counter (timestamp period = 64 fills).
module tb_elbow_scenarios;
  import elbow_pkg::*;

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

  l2_model #(.LATENCY(2), .STALL_PCT(0)) u_l2 (
    .clk, .fill_req_valid(l2_fill_req_valid), .fill_req_ready(l2_fill_req_ready),
    .fill_addr(l2_fill_addr), .fill_rsp_valid(l2_fill_rsp_valid), .fill_data(l2_fill_data),
    .wb_valid(l2_wb_valid), .wb_ready(l2_wb_ready), .wb_addr(l2_wb_addr), .wb_data(l2_wb_data)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  bit used0 [256];   // bank-0 slots taken or reserved
  bit used1 [256];   // bank-1 slots taken or reserved

  function automatic logic [7:0] skew(input logic [31:0] a, input int bank);
    logic [6:0] a1;
    a1 = a[20:14];
    if (bank == 1) a1 = {a1[5:0], a1[6]};
    return {a[13], a1 ^ a[12:6]};
  endfunction

  // a fresh block whose index in `bank` is idx
  function automatic logic [31:0] make(input int bank, input logic [7:0] idx);
    logic [18:0] t;
    logic [6:0]  a1;
    t    = 19'($urandom);
    t[0] = idx[7];
    a1   = t[7:1];
    if (bank == 1) a1 = {a1[5:0], a1[6]};
    return {t, idx[6:0] ^ a1, 6'b0};
  endfunction

  task automatic access(input logic [31:0] a, output bit hit, output cache_events_t seen);
    cpu_req       = '{we: 1'b0, addr: a, wdata: '0, wstrb: '0};
    cpu_req_valid = 1;
    do @(posedge clk); while (!cpu_req_ready);
    #1 cpu_req_valid = 0;
    seen = '0;
    while (!cpu_rsp_valid) begin
      seen |= events;
      @(posedge clk); #1;
    end
    seen |= events;
    hit = cpu_rsp.hit;
    @(posedge clk); #1;
  endtask

  task automatic expect_hit(input string name, input logic [31:0] a, input bit exp);
    bit h; cache_events_t s;
    access(a, h, s);
    checks++;
    if (h !== exp) begin
      failures++;
      $display("FAIL %s %h: hit=%0d expected %0d", name, a, h, exp);
    end
  endtask

  // n fills of blocks into empty, unreserved slots: bank 0 first; once bank 0
  // is full, blocks whose bank-1 slot is still empty
  task automatic age_by(input int n);
    bit h; cache_events_t s;
    for (int k = 0; k < n; k++) begin
      logic [31:0] f;
      logic [7:0]  i;
      int          free0;
      free0 = 0;
      foreach (used0[j]) free0 += !used0[j];
      if (free0 > 0) begin
        do i = 8'($urandom); while (used0[i]);
        used0[i] = 1;
        f = make(0, i);
      end else begin
        do i = 8'($urandom); while (used1[i]);
        used1[i] = 1;
        f = make(1, i);
      end
      access(f, h, s);
      if (h || !s.fill_invalid) begin failures++; $display("FAIL filler did not use an empty slot"); end
    end
  endtask

  task automatic reset_cache();
    rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    foreach (used0[i]) begin used0[i] = 0; used1[i] = 0; end
    @(posedge clk); #1;
  endtask

  // build X, A, B, C, D (plus P, which holds C's bank-0 slot) and return them
  task automatic build(input bit a_young,
                       output logic [31:0] x, output logic [31:0] a, output logic [31:0] b,
                       output logic [31:0] c, output logic [31:0] p, output logic [31:0] q);
    bit ok;
    do begin
      x = make(0, 8'($urandom));
      a = make(0, skew(x, 0));
      b = make(1, skew(x, 1));
      c = make(1, skew(a, 1));
      p = make(0, skew(c, 0));
      q = make(0, skew(b, 0));   // becomes D, B's alternate slot
      ok = skew(a, 1) != skew(x, 1) && skew(c, 0) != skew(x, 0) &&
           skew(b, 0) != skew(x, 0) && skew(c, 0) != skew(b, 0) &&
           skew(c, 0) != skew(a, 0) && skew(p, 1) != skew(x, 1) &&
           skew(q, 1) != skew(x, 1) && skew(q, 1) != skew(a, 1) &&
           skew(p, 1) != skew(a, 1) && skew(b, 0) != skew(a, 0);
    end while (!ok);
    used0[skew(x, 0)] = 1;
    used0[skew(c, 0)] = 1;
    used0[skew(b, 0)] = 1;
    used1[skew(x, 1)] = 1;
    used1[skew(a, 1)] = 1;
    expect_hit("P fill", p, 0);     // bank 0 (empty)
    expect_hit("C fill", c, 0);     // bank 0 taken by P -> bank 1, A's alternate slot
    expect_hit("Q fill", q, 0);     // bank 0, B's alternate slot
    expect_hit("B fill", b, 0);     // bank 0 taken by Q -> bank 1, X's slot
    if (a_young) begin
      age_by(130);                  // C, B now 2 periods old
      expect_hit("B touch", b, 1);
      expect_hit("Q touch", q, 1);
      age_by(70);
      expect_hit("A fill", a, 0);   // bank 0, X's slot; newest block
      expect_hit("P touch", p, 1);
    end else begin
      age_by(70);                   // C one period older than A
      expect_hit("A fill", a, 0);
      age_by(130);
      expect_hit("B touch", b, 1);
      expect_hit("Q touch", q, 1);
      expect_hit("P touch", p, 1);
      age_by(200);                  // A ages past the relocation limit
      expect_hit("B touch", b, 1);
      expect_hit("Q touch", q, 1);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] x, a, b, c, p, q, s1, s2, s3;
    bit h;
    cache_events_t ev;
    cpu_req = '0;
    u_l2.stall_en = 0;
    reset_cache();

    // 1: three blocks with one bank-0 index
    s1 = make(0, 8'h2A);
    do s2 = make(0, 8'h2A); while (skew(s2, 1) == skew(s1, 1));
    do s3 = make(0, 8'h2A); while (skew(s3, 1) == skew(s1, 1) || skew(s3, 1) == skew(s2, 1));
    expect_hit("S1", s1, 0);
    expect_hit("S2", s2, 0);
    expect_hit("S3", s3, 0);
    expect_hit("S1 again", s1, 1);
    expect_hit("S2 again", s2, 1);
    expect_hit("S3 again", s3, 1);

    // 2a: relocation
    reset_cache();
    build(1, x, a, b, c, p, q);
    access(x, h, ev);
    checks++;
    if (h || !ev.relocation || ev.writeback) begin
      failures++;
      $display("FAIL X miss: hit=%0d relocation=%0d", h, ev.relocation);
    end
    expect_hit("X after", x, 1);
    expect_hit("A moved", a, 1);
    expect_hit("B kept", b, 1);
    expect_hit("D kept", q, 1);
    expect_hit("P kept", p, 1);
    expect_hit("C evicted", c, 0);

    // 2b: same shape, A too old to move: the older primary (A) is evicted
    reset_cache();
    build(0, x, a, b, c, p, q);
    access(x, h, ev);
    checks++;
    if (h || ev.relocation || !ev.reloc_by_age) begin
      failures++;
      $display("FAIL X miss (old A): relocation=%0d refused_by_age=%0d", ev.relocation, ev.reloc_by_age);
    end
    expect_hit("X after", x, 1);
    expect_hit("B kept", b, 1);
    expect_hit("C kept", c, 1);
    expect_hit("A evicted", a, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
