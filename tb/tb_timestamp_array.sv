// tb_timestamp_array: fills every entry, then random writes and reads
// against a reference copy (synchronous read, one cycle).
module tb_timestamp_array;
  logic clk = 0, en = 0, we = 0;
  logic [7:0] idx;
  logic [4:0] wts, rts;
  logic [4:0] m [256];
  int checks = 0, failures = 0;

  timestamp_array dut (.clk(clk), .en(en), .we(we), .idx(idx), .wts(wts), .rts(rts));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    idx = 0; wts = 0;
    @(posedge clk);
    for (int i = 0; i < 256; i++) begin
      en = 1; we = 1; idx = 8'(i); wts = 5'($urandom); m[i] = wts;
      @(posedge clk); #1;
    end
    for (int n = 0; n < 5000; n++) begin
      int i;
      i = $urandom % 256;
      en = 1; idx = 8'(i); we = ($urandom % 3) == 0;
      if (we) begin
        wts = 5'($urandom); m[i] = wts;
        @(posedge clk); #1;
      end else begin
        @(posedge clk); #1;
        checks++;
        if (rts !== m[i]) begin failures++; $display("FAIL entry %0d got %0d exp %0d", i, rts, m[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
