// tb_cat_counter: random allocation pulses over more than one counter wrap;
// the count and the 5-bit timestamp (top bits) must track a reference count.
module tb_cat_counter;
  logic clk = 0, rst_n = 0, alloc = 0;
  logic [10:0] count;
  logic [4:0]  ts;
  int unsigned ref_cnt = 0;
  int checks = 0, failures = 0, wraps = 0;

  cat_counter dut (.clk(clk), .rst_n(rst_n), .alloc(alloc), .count(count), .ts(ts));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 6000; n++) begin
      alloc = ($urandom % 3) != 0;
      @(posedge clk);
      if (alloc) ref_cnt++;
      #1;
      checks++;
      if (count !== 11'(ref_cnt) || ts !== 5'(ref_cnt >> 6)) begin
        failures++;
        $display("FAIL n=%0d count=%0d ts=%0d ref=%0d", n, count, ts, ref_cnt);
      end
    end
    if (ref_cnt < 2048) begin failures++; $display("FAIL no wrap"); end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
