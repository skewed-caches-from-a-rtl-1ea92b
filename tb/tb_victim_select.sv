// tb_victim_select: directed cases for each rule (empty primary, oldest
// primary, relocation, refusal by age of the moved block, refusal by the
// window) and random candidates against a reference written as a sort of
// the four candidates by age.
module tb_victim_select;
  import elbow_pkg::*;

  logic [3:0]      valid;
  logic [3:0][4:0] age;
  logic            allowed;
  cand_e           victim;
  logic            fill_bank, relocate, fill_invalid, by_age, by_window;
  int checks = 0, failures = 0;

  victim_select dut (
    .valid(valid), .age(age), .reloc_allowed(allowed), .victim(victim),
    .fill_bank(fill_bank), .relocate(relocate), .fill_invalid(fill_invalid),
    .reloc_by_age(by_age), .reloc_by_window(by_window)
  );

  // reference: rank candidates A,B,C,D (empty secondary = age 32, ties by
  // candidate order), take the oldest, fall back to the oldest primary when
  // a secondary cannot be used
  task automatic reference(output int v, output bit fb, output bit rl,
                           output bit fi, output bit ba, output bit bw);
    int a[4];
    int best;
    v = 0; fb = 0; rl = 0; fi = 0; ba = 0; bw = 0;
    if (!valid[0]) begin v = 0; fi = 1; return; end
    if (!valid[1]) begin v = 1; fb = 1; fi = 1; return; end
    for (int i = 0; i < 4; i++) a[i] = valid[i] ? int'(age[i]) : 32;
    best = 0;
    for (int i = 1; i < 4; i++) if (a[i] > a[best]) best = i;
    if (best >= 2) begin
      int moved;
      moved = best - 2;       // C moves A, D moves B
      if (a[moved] > 3)      begin ba = 1; best = (a[1] > a[0]) ? 1 : 0; end
      else if (!allowed)     begin bw = 1; best = (a[1] > a[0]) ? 1 : 0; end
      else                   begin rl = 1; end
    end
    v  = best;
    fb = (best == 1 || best == 3);
  endtask

  task automatic check(input string what);
    int v; bit fb, rl, fi, ba, bw;
    #1;
    reference(v, fb, rl, fi, ba, bw);
    checks++;
    if (int'(victim) != v || fill_bank != fb || relocate != rl || fill_invalid != fi
        || by_age != ba || by_window != bw) begin
      failures++;
      $display("FAIL %s valid=%b age=%0d,%0d,%0d,%0d allow=%0d: got v=%0d fb=%0d rl=%0d fi=%0d ba=%0d bw=%0d exp v=%0d fb=%0d rl=%0d",
               what, valid, age[0], age[1], age[2], age[3], allowed,
               victim, fill_bank, relocate, fill_invalid, by_age, by_window, v, fb, rl);
    end
  endtask

  task automatic set(input logic [3:0] v, input int a0, input int a1, input int a2,
                     input int a3, input logic al);
    valid = v; age[0] = 5'(a0); age[1] = 5'(a1); age[2] = 5'(a2); age[3] = 5'(a3);
    allowed = al;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    set(4'b1110, 9, 9, 9, 9, 1); check("empty A");
    if (victim != CAND_A || !fill_invalid) begin failures++; $display("FAIL empty A literal"); end
    set(4'b1101, 1, 9, 9, 9, 1); check("empty B");
    set(4'b1111, 5, 8, 2, 1, 1); check("oldest primary B");
    if (victim != CAND_B || relocate) begin failures++; $display("FAIL primary B literal"); end
    set(4'b1111, 2, 6, 20, 1, 1); check("relocate A to C");
    if (victim != CAND_C || !relocate || fill_bank != 0) begin failures++; $display("FAIL C literal"); end
    set(4'b1111, 7, 3, 2, 20, 1); check("relocate B to D");
    if (victim != CAND_D || !relocate || fill_bank != 1) begin failures++; $display("FAIL D literal"); end
    set(4'b1111, 4, 6, 20, 1, 1); check("moved block too old");
    if (relocate || !by_age || victim != CAND_B) begin failures++; $display("FAIL age literal"); end
    set(4'b1111, 2, 6, 20, 1, 0); check("window full");
    if (relocate || !by_window) begin failures++; $display("FAIL window literal"); end
    set(4'b1011, 3, 1, 0, 0, 1); check("empty C");
    if (victim != CAND_C || !relocate) begin failures++; $display("FAIL empty C literal"); end
    set(4'b1111, 5, 5, 5, 5, 1); check("all tied");
    if (victim != CAND_A) begin failures++; $display("FAIL tie literal"); end
    checks += 8;
    for (int n = 0; n < 20000; n++) begin
      valid   = 4'($urandom) | (n % 4 != 0 ? 4'b0011 : 4'b0000);
      for (int i = 0; i < 4; i++) age[i] = 5'($urandom % ((n % 3 == 0) ? 6 : 32));
      allowed = ($urandom % 4) != 0;
      check("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
