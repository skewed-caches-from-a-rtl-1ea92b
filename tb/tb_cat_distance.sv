// tb_cat_distance: all 32x32 timestamp pairs against the number of steps
// needed to count from the stored timestamp up to the current one.
module tb_cat_distance;
  logic [4:0] t_curr, t_st, age;
  int checks = 0, failures = 0;

  cat_distance dut (.t_curr(t_curr), .t_st(t_st), .age(age));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 32; c++)
      for (int s = 0; s < 32; s++) begin
        int steps;
        steps = 0;
        while (((s + steps) % 32) != c) steps++;
        t_curr = 5'(c);
        t_st   = 5'(s);
        #1;
        checks++;
        if (age !== 5'(steps)) begin
          failures++;
          $display("FAIL curr=%0d st=%0d age=%0d exp=%0d", c, s, age, steps);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
