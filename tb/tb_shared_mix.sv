// tb_shared_mix: a synthetic shared-cache workload in the spirit of four
// unrelated programs sharing one data cache. Four threads, each with its
// own 8 KB-aligned region and a working set of 160 blocks (640 in total
// against 512 frames), access their sets with a hot subset (80% of the
// accesses to a quarter of the blocks); a quarter of the accesses are
// stores. The threads are interleaved at random.
//
// The same access stream runs through two caches:
//  - the elbow cache at its default parameters;
//  - the same cache with MAX_RELOC = 0, i.e. a CAT-timestamp skewed cache
//    without relocation.
// Checked: every answer carries the latest data (flat memory reference);
// the elbow cache never makes more than 16 relocations in any 64 consecutive
// misses; the plain skewed cache never relocates. Reported: miss ratios and
// the fraction of misses that relocate.
module tb_shared_mix;
  import elbow_pkg::*;

  localparam int N = 40000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // stream
  logic [31:0] s_addr [N];
  bit          s_we   [N];
  logic [63:0] s_wd   [N];
  logic [7:0]  s_st   [N];

  int checks = 0, failures = 0;

  function automatic logic [63:0] init_word(input logic [31:0] word_addr);
    return {word_addr ^ 32'h5A5A_1234, ~word_addr * 32'd2654435761};
  endfunction

  // ---------------------------------------------------------------- two caches
  logic          rq_v [2], rq_r [2], rs_v [2];
  cpu_req_t      rq   [2];
  cpu_rsp_t      rs   [2];
  logic          fq_v [2], fq_r [2], fs_v [2], wb_v [2], wb_r [2];
  logic [31:0]   f_a  [2], wb_a [2];
  logic [511:0]  f_d  [2], wb_d [2];
  cache_events_t ev   [2];
  logic [10:0]   cc   [2];

  elbow_cache u_elbow (
    .clk, .rst_n, .cpu_req_valid(rq_v[0]), .cpu_req_ready(rq_r[0]), .cpu_req(rq[0]),
    .cpu_rsp_valid(rs_v[0]), .cpu_rsp(rs[0]),
    .l2_fill_req_valid(fq_v[0]), .l2_fill_req_ready(fq_r[0]), .l2_fill_addr(f_a[0]),
    .l2_fill_rsp_valid(fs_v[0]), .l2_fill_data(f_d[0]),
    .l2_wb_valid(wb_v[0]), .l2_wb_ready(wb_r[0]), .l2_wb_addr(wb_a[0]), .l2_wb_data(wb_d[0]),
    .events(ev[0]), .cat_count(cc[0])
  );

  elbow_cache #(.MAX_RELOC(0)) u_skewed (
    .clk, .rst_n, .cpu_req_valid(rq_v[1]), .cpu_req_ready(rq_r[1]), .cpu_req(rq[1]),
    .cpu_rsp_valid(rs_v[1]), .cpu_rsp(rs[1]),
    .l2_fill_req_valid(fq_v[1]), .l2_fill_req_ready(fq_r[1]), .l2_fill_addr(f_a[1]),
    .l2_fill_rsp_valid(fs_v[1]), .l2_fill_data(f_d[1]),
    .l2_wb_valid(wb_v[1]), .l2_wb_ready(wb_r[1]), .l2_wb_addr(wb_a[1]), .l2_wb_data(wb_d[1]),
    .events(ev[1]), .cat_count(cc[1])
  );

  for (genvar c = 0; c < 2; c++) begin : g_l2
    l2_model #(.LATENCY(6)) u_l2 (
      .clk, .fill_req_valid(fq_v[c]), .fill_req_ready(fq_r[c]), .fill_addr(f_a[c]),
      .fill_rsp_valid(fs_v[c]), .fill_data(f_d[c]),
      .wb_valid(wb_v[c]), .wb_ready(wb_r[c]), .wb_addr(wb_a[c]), .wb_data(wb_d[c])
    );
  end

  int  misses [2], relocs [2];
  bit  done   [2];

  task automatic run(input int c);
    logic [63:0] flat [logic [31:0]];
    bit          hist [$];
    int          inwin;
    for (int n = 0; n < N; n++) begin
      logic [31:0] wa;
      logic [63:0] exp_w;
      cache_events_t seen;
      wa    = s_addr[n] >> 3;
      exp_w = flat.exists(wa) ? flat[wa] : init_word(wa);
      if (s_we[n]) begin
        for (int i = 0; i < 8; i++) if (s_st[n][i]) exp_w[i*8 +: 8] = s_wd[n][i*8 +: 8];
        flat[wa] = exp_w;
      end
      rq[c]   = '{we: s_we[n], addr: s_addr[n], wdata: s_wd[n], wstrb: s_st[n]};
      rq_v[c] = 1;
      do @(posedge clk); while (!rq_r[c]);
      #1 rq_v[c] = 0;
      seen = '0;
      while (!rs_v[c]) begin seen |= ev[c]; @(posedge clk); #1; end
      seen |= ev[c];
      checks++;
      if (rs[c].rdata !== exp_w) begin
        failures++;
        if (failures < 10) $display("FAIL cache %0d data at %h", c, s_addr[n]);
      end
      if (seen.miss) begin
        misses[c]++;
        relocs[c] += seen.relocation;
        hist.push_back(seen.relocation);
        inwin += seen.relocation;
        if (hist.size() > 64) inwin -= hist.pop_front();
        checks++;
        if (inwin > 16) begin failures++; $display("FAIL cache %0d: %0d relocations in 64 misses", c, inwin); end
      end
      @(posedge clk); #1;
    end
    done[c] = 1;
  endtask

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // four threads, each in its own region, hot quarter takes 80%
    for (int n = 0; n < N; n++) begin
      int t, blk;
      t   = $urandom % 4;
      blk = (($urandom % 100) < 80) ? ($urandom % 40) : ($urandom % 160);
      // 160 blocks of a thread at a stride of 3 blocks, from a
      // thread-specific page-aligned base
      s_addr[n] = 32'(t) * 32'h0006_A000 + 32'(blk) * 32'd192 + {26'd0, 3'($urandom), 3'b000};
      s_we[n]   = ($urandom % 4) == 0;
      s_wd[n]   = {$urandom, $urandom};
      s_st[n]   = s_we[n] ? 8'($urandom | 1) : 8'h00;
    end
    for (int c = 0; c < 2; c++) begin
      rq_v[c] = 0; rq[c] = '0; misses[c] = 0; relocs[c] = 0; done[c] = 0;
      g_l2[0].u_l2.stall_en = 0;
      g_l2[1].u_l2.stall_en = 0;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    fork
      run(0);
      run(1);
    join
    $display("elbow:  miss ratio %0.4f, relocations per miss %0.3f",
             real'(misses[0]) / N, real'(relocs[0]) / (misses[0] > 0 ? misses[0] : 1));
    $display("skewed: miss ratio %0.4f, relocations per miss %0.3f",
             real'(misses[1]) / N, real'(relocs[1]) / (misses[1] > 0 ? misses[1] : 1));
    checks++;
    if (relocs[1] != 0) begin failures++; $display("FAIL the cache without relocation relocated"); end
    checks++;
    if (relocs[0] == 0) begin failures++; $display("FAIL no relocation in the elbow cache"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
