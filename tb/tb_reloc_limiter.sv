// tb_reloc_limiter: random miss/relocation streams, including bursts that
// exhaust the budget; `allow` must equal "fewer than 16 relocations among
// the last 63 misses", counted from a queue in the testbench.
module tb_reloc_limiter;
  logic clk = 0, rst_n = 0, miss = 0, relocated = 0, allow;
  logic [6:0] in_window;
  bit   q[$];
  int checks = 0, failures = 0, denied = 0;

  reloc_limiter dut (.clk(clk), .rst_n(rst_n), .miss(miss), .relocated(relocated),
                     .allow(allow), .in_window(in_window));

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 20000; n++) begin
      int cnt, p;
      cnt = 0;
      foreach (q[i]) cnt += q[i];
      #1;
      checks++;
      if (allow !== (cnt < 16) || in_window !== 7'(cnt)) begin
        failures++;
        $display("FAIL n=%0d allow=%0d count=%0d exp %0d", n, allow, in_window, cnt);
      end
      if (!allow) denied++;
      // phases of heavy and light relocation demand
      p = ((n / 500) % 2 == 0) ? 90 : 10;
      miss      = ($urandom % 4) != 0;
      relocated = allow && (($urandom % 100) < p);
      @(posedge clk);
      if (miss) begin
        q.push_front(relocated);
        if (q.size() > 63) void'(q.pop_back());
      end
    end
    checks++;
    if (denied == 0) begin failures++; $display("FAIL budget never exhausted"); end
    $display("denied cycles: %0d", denied);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
