// tb_way_bank: after reset every line reads invalid; random whole-line
// writes and reads are then compared with a reference copy of the bank, with
// the synchronous one-cycle read latency.
module tb_way_bank;
  logic clk = 0, rst_n = 0, en = 0, we = 0;
  logic [7:0]   idx;
  logic         wvalid, wdirty, rvalid, rdirty;
  logic [18:0]  wtag, rtag;
  logic [511:0] wdata, rdata;
  logic         m_valid [256];
  logic         m_dirty [256];
  logic [18:0]  m_tag   [256];
  logic [511:0] m_data  [256];
  int checks = 0, failures = 0;

  way_bank dut (.clk(clk), .rst_n(rst_n), .en(en), .we(we), .idx(idx),
                .wvalid(wvalid), .wdirty(wdirty), .wtag(wtag), .wdata(wdata),
                .rvalid(rvalid), .rdirty(rdirty), .rtag(rtag), .rdata(rdata));

  always #5 clk = ~clk;

  function automatic logic [511:0] rnd_line();
    logic [511:0] l;
    for (int i = 0; i < 16; i++) l[i*32 +: 32] = $urandom;
    return l;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin m_valid[i] = 0; m_dirty[i] = 0; end
    wvalid = 0; wdirty = 0; wtag = 0; wdata = 0; idx = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // reset state: all invalid
    for (int i = 0; i < 256; i += 17) begin
      en = 1; we = 0; idx = 8'(i);
      @(posedge clk); #1;
      checks++;
      if (rvalid !== 0 || rdirty !== 0) begin failures++; $display("FAIL reset line %0d", i); end
    end
    for (int n = 0; n < 6000; n++) begin
      int i;
      i = (n < 512) ? (n % 256) : ($urandom % 256);
      en = 1; idx = 8'(i);
      we = (n < 512) ? (n < 256) : (($urandom % 2) == 0);
      if (we) begin
        wvalid = $urandom; wdirty = $urandom; wtag = 19'($urandom); wdata = rnd_line();
        m_valid[i] = wvalid; m_dirty[i] = wdirty; m_tag[i] = wtag; m_data[i] = wdata;
        @(posedge clk); #1;
      end else begin
        @(posedge clk); #1;
        checks++;
        if (rvalid !== m_valid[i] || rdirty !== m_dirty[i] || rtag !== m_tag[i] || rdata !== m_data[i]) begin
          failures++;
          $display("FAIL read line %0d", i);
        end
      end
    end
    // idle cycle keeps the read outputs
    en = 0; we = 0;
    @(posedge clk); #1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
