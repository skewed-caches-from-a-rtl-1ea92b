// tb_skew_index: checks both skewing functions bit by bit against a
// reference built from the address-bit names (b_12..b_6, a_7..a_0), for
// directed and random addresses.
module tb_skew_index;
  logic [31:0] addr;
  logic [7:0]  idx0, idx1, e0, e1;
  int checks = 0, failures = 0;

  skew_index dut (.blk_addr(addr), .idx0(idx0), .idx1(idx1));

  task automatic expect_idx();
    logic [6:0] a1, b, rot;
    for (int i = 0; i < 7; i++) begin
      b[i]  = addr[6 + i];
      a1[i] = addr[14 + i];
    end
    for (int i = 0; i < 7; i++) rot[i] = a1[(i + 6) % 7];
    e0 = {addr[13], a1 ^ b};
    e1 = {addr[13], rot ^ b};
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // directed: only b bits -> both indices equal the b field
    addr = 32'h0000_1FC0; #1; expect_idx();
    checks++; if (idx0 != 8'h7F || idx1 != 8'h7F) begin failures++; $display("FAIL b-only %h %h", idx0, idx1); end
    // a_1 alone: bank0 bit0, bank1 bit1 (rotated)
    addr = 32'h0000_4000; #1;
    checks++; if (idx0 != 8'h01 || idx1 != 8'h02) begin failures++; $display("FAIL a1 %h %h", idx0, idx1); end
    // a_7 alone: bank0 bit6, bank1 wraps to bit0
    addr = 32'h0010_0000; #1;
    checks++; if (idx0 != 8'h40 || idx1 != 8'h01) begin failures++; $display("FAIL a7 %h %h", idx0, idx1); end
    // a_0 is the index MSB in both banks
    addr = 32'h0000_2000; #1;
    checks++; if (idx0 != 8'h80 || idx1 != 8'h80) begin failures++; $display("FAIL a0 %h %h", idx0, idx1); end
    for (int n = 0; n < 2000; n++) begin
      addr = $urandom;
      #1; expect_idx();
      checks++;
      if (idx0 !== e0 || idx1 !== e1) begin
        failures++;
        $display("FAIL addr=%h idx0=%h/%h idx1=%h/%h", addr, idx0, e0, idx1, e1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
