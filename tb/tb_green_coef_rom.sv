// tb_green_coef_rom: checks every coefficient the ROM returns against the
// cell average of the exact Mitchell correction, integrated numerically here
// with real arithmetic (tolerance 2 LSB of Q0.16), and checks that the
// multiply lookup is symmetric in its operands.
module tb_green_coef_rom;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        is_div [2];
  logic [2:0]  ia [2], ib [2];
  logic [15:0] coef [2];
  green_coef_rom #(.PORTS(2)) dut (.is_div(is_div), .ia(ia), .ib(ib), .coef(coef));

  function automatic real cm(real a, real b);
    return ((1.0 + a) * (1.0 + b) < 2.0) ? a * b : (1.0 - a) * (1.0 - b) / 2.0;
  endfunction
  function automatic real cd(real a, real b);
    real r = (1.0 + a) / (1.0 + b);
    return (r >= 1.0) ? (a - b) - (r - 1.0) : (1.0 + a - b) - (2.0 * r - 1.0);
  endfunction
  function automatic real cell_avg(bit div, int i, int j);
    real s = 0.0;
    for (int u = 0; u < 32; u++)
      for (int v = 0; v < 32; v++) begin
        real x1 = (i + (u + 0.5) / 32.0) / 8.0;
        real x2 = (j + (v + 0.5) / 32.0) / 8.0;
        s += div ? cd(x1, x2) : cm(x1, x2);
      end
    return s / 1024.0;
  endfunction

  initial begin
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        real expd, expm;
        int  hi, lo, lo2;
        // divide: exact cell
        is_div[0] = 1; ia[0] = 3'(i); ib[0] = 3'(j);
        // multiply: port 0 and swapped port 1
        is_div[1] = 0; ia[1] = 3'(j); ib[1] = 3'(i);
        #1;
        expd = cell_avg(1, i, j) * 65536.0;
        checks++;
        if (real'(coef[0]) - expd > 2.0 || expd - real'(coef[0]) > 2.0) begin
          failures++; $display("FAIL div coef (%0d,%0d) got %0d exp %f", i, j, coef[0], expd);
        end
        hi = (i > j) ? i : j; lo = (i > j) ? j : i;
        lo2 = lo ^ 1;   // other cell sharing the folded entry
        expm = cell_avg(0, hi, lo);
        if (lo2 <= hi) expm = (expm + cell_avg(0, hi, lo2)) / 2.0;
        expm *= 65536.0;
        is_div[0] = 0; ia[0] = 3'(i); ib[0] = 3'(j);
        #1;
        checks += 2;
        if (real'(coef[0]) - expm > 2.0 || expm - real'(coef[0]) > 2.0) begin
          failures++; $display("FAIL mul coef (%0d,%0d) got %0d exp %f", i, j, coef[0], expm);
        end
        if (coef[0] != coef[1]) begin
          failures++; $display("FAIL mul coef not symmetric (%0d,%0d)", i, j);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
