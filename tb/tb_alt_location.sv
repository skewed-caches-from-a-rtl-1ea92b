// tb_alt_location: places random blocks in bank 0 and bank 1 at their skewed
// index and checks that the block address is recovered from (bank, index,
// tag) and that the alternate index equals the other bank's skewed index.
module tb_alt_location;
  logic        bank;
  logic [7:0]  idx, alt_idx, e0, e1;
  logic [18:0] tag;
  logic [31:0] addr, blk_addr;
  int checks = 0, failures = 0;

  alt_location dut (.bank(bank), .idx(idx), .tag(tag), .blk_addr(blk_addr), .alt_idx(alt_idx));

  function automatic logic [7:0] f(input logic [31:0] a, input bit second);
    logic [6:0] a1, b;
    a1 = a[20:14];
    b  = a[12:6];
    if (second) a1 = {a1[5:0], a1[6]};
    return {a[13], a1 ^ b};
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      addr = $urandom & 32'hFFFF_FFC0;
      e0 = f(addr, 0);
      e1 = f(addr, 1);
      tag  = addr[31:13];
      bank = n[0];
      idx  = bank ? e1 : e0;
      #1;
      checks++;
      if (blk_addr !== addr || alt_idx !== (bank ? e0 : e1)) begin
        failures++;
        $display("FAIL bank=%0d addr=%h got %h alt=%h", bank, addr, blk_addr, alt_idx);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
