// tb_corr_threshold -- sweeps every 11-bit count through the threshold
// circuit with and without valid and compares flag/data with the margins.
module tb_corr_threshold;
  localparam int unsigned LOW = 384, HIGH = 639;
  logic [10:0] count;
  logic        valid, flag, data;
  int          checks = 0, failures = 0;

  corr_threshold #(.W(11), .LOW(LOW), .HIGH(HIGH)) dut (.count, .valid, .flag, .data);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2; v++)
      for (int c = 0; c < 2048; c++) begin
        bit ef, ed;
        count = 11'(c);
        valid = v[0];
        #1;
        ef = v[0] && (c <= 384 || c >= 639);
        ed = v[0] && (c >= 639);
        checks++;
        if (flag !== ef || data !== ed) begin
          failures++;
          if (failures < 10) $display("FAIL count=%0d valid=%0d flag=%b data=%b", c, v, flag, data);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
