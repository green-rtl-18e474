// tb_green_add_slice: exhaustive check of the 8-bit adder slice, including
// carry in and carry out, against integer addition.
module tb_green_add_slice;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [7:0] a, b, s; logic cin, cout;
  green_add_slice dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));
  initial begin
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++)
        for (int c = 0; c < 2; c++) begin
          int e;
          a = 8'(x); b = 8'(y); cin = c[0];
          #1;
          e = x + y + c;
          checks++;
          if ({cout, s} != 9'(e)) begin
            failures++;
            if (failures < 10) $display("FAIL %0d+%0d+%0d got %0d", x, y, c, {cout, s});
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
