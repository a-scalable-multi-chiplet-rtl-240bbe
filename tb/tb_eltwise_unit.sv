// tb_eltwise_unit: random and saturating cases of the lane-wise int8 add.
module tb_eltwise_unit;
  logic [63:0] a, b, y;
  int checks = 0, failures = 0;
  eltwise_unit dut (.*);
  initial begin
    for (int i = 0; i < 2000; i++) begin
      a = {$urandom(), $urandom()}; b = {$urandom(), $urandom()};
      if (i < 4) begin a = {8{8'h7f}}; b = {8{8'(i)}}; end
      #1;
      for (int l = 0; l < 8; l++) begin
        int s;
        s = int'($signed(a[l*8 +: 8])) + int'($signed(b[l*8 +: 8]));
        s = (s > 127) ? 127 : (s < -128) ? -128 : s;
        checks++;
        if (y[l*8 +: 8] !== 8'(s)) begin failures++; $display("%h + %h -> %h", a[l*8 +: 8], b[l*8 +: 8], y[l*8 +: 8]); end
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
