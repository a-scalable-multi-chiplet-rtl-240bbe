// tb_scaling_unit: random operands, multipliers and shifts of the lane-wise
// int8 rescale, against a reference with rounding and saturation.
module tb_scaling_unit;
  logic [63:0] a, y;
  logic [7:0] mult;
  logic [3:0] shift;
  int checks = 0, failures = 0;
  scaling_unit dut (.*);
  initial begin
    for (int i = 0; i < 2000; i++) begin
      a = {$urandom(), $urandom()}; mult = 8'($urandom()); shift = 4'($urandom_range(0, 9));
      #1;
      for (int l = 0; l < 8; l++) begin
        int p;
        p = int'($signed(a[l*8 +: 8])) * int'($signed(mult));
        if (shift != 0) p = (p + (1 << (shift - 1))) >>> shift;
        p = (p > 127) ? 127 : (p < -128) ? -128 : p;
        checks++;
        if (y[l*8 +: 8] !== 8'(p)) begin failures++; $display("%h * %h >> %0d -> %h", a[l*8 +: 8], mult, shift, y[l*8 +: 8]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
