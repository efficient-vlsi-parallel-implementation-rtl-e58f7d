// tb_f_function: exhaustive test of the combinational f-function.
// All 1024 operand pairs are compared with a sign-XOR / smaller-magnitude
// reference written from integers; zero magnitudes must give +0.
module tb_f_function;
  logic [4:0] a, b, y;
  int checks = 0, failures = 0;

  f_function dut (.a, .b, .y);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ma, mb, m;
    logic [4:0] exp_y;
    for (int i = 0; i < 32; i++) begin
      for (int k = 0; k < 32; k++) begin
        a = 5'(i);
        b = 5'(k);
        #1;
        ma = i % 16;
        mb = k % 16;
        m = (ma < mb) ? ma : mb;
        exp_y = (m == 0) ? 5'd0 : {1'((i / 16) ^ (k / 16)), 4'(m)};
        checks++;
        if (y !== exp_y) begin
          failures++;
          if (failures < 10) $display("f(%b,%b) = %b, expected %b", a, b, y, exp_y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
