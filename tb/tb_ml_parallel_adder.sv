// tb_ml_parallel_adder -- compares the 127-input multi-level adder with a
// population count on corner vectors and random vectors of varied density.
module tb_ml_parallel_adder;
  logic [126:0] bits;
  logic [6:0]   sum;
  int           checks = 0, failures = 0;

  ml_parallel_adder #(.LEVELS(6)) dut (.bits, .sum);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(logic [126:0] v);
    int exp;
    bits = v;
    #1;
    exp = 0;
    for (int i = 0; i < 127; i++) exp += int'(v[i]);
    checks++;
    if (int'(sum) != exp) begin
      failures++;
      if (failures < 10) $display("FAIL ones=%0d sum=%0d", exp, sum);
    end
  endtask

  initial begin
    try('0);
    try('1);
    for (int i = 0; i < 127; i++) try(127'(1) << i);
    for (int i = 0; i < 127; i++) try(~(127'(1) << i));
    for (int k = 0; k < 4000; k++) begin
      logic [126:0] v;
      int dens;
      dens = k % 9;
      for (int i = 0; i < 127; i++) v[i] = ($urandom % 8) < dens;
      try(v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
