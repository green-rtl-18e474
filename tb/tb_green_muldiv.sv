// tb_green_muldiv: checks the 4-, 8- and 16-bit approximate multiplier-divider
// lanes (each with its own coefficient ROM port).
//   * 4- and 8-bit lanes exhaustively, 16-bit lanes on 20000 random pairs,
//     bit-exact against the reference model green_ref_pkg::ref_md;
//   * the worked example 58 x 18 and 58 / 18 of Mitchell's method;
//   * accuracy: the relative error of every 8-bit product stays within the
//     bound of Mitchell's method (11.2 %), quotients >= 1 within 13 %, and
//     the mean product error of the 16-bit lane is below 2 % (plain Mitchell:
//     about 3.8 %), which shows the correction at work.
module tb_green_muldiv;
  import green_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [3:0]  a4, b4;   logic [7:0]  r4;
  logic [7:0]  a8, b8;   logic [15:0] r8;
  logic [15:0] a16, b16; logic [31:0] r16;
  logic div;
  logic        rd [3];
  logic [2:0]  ia [3], ib [3];
  logic [15:0] cf [3];

  assign rd = '{div, div, div};
  green_coef_rom #(.PORTS(3)) u_rom (.is_div(rd), .ia(ia), .ib(ib), .coef(cf));
  green_muldiv #(.W(4))  u4  (.a(a4),  .b(b4),  .div(div), .ia(ia[0]), .ib(ib[0]), .coef(cf[0]), .res(r4));
  green_muldiv #(.W(8))  u8  (.a(a8),  .b(b8),  .div(div), .ia(ia[1]), .ib(ib[1]), .coef(cf[1]), .res(r8));
  green_muldiv #(.W(16)) u16 (.a(a16), .b(b16), .div(div), .ia(ia[2]), .ib(ib[2]), .coef(cf[2]), .res(r16));

  task automatic chk(string what, longint unsigned got, longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 12) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  real err, sum_err, max_err;
  int  n_err;

  initial begin
    a4 = 0; b4 = 0; a8 = 0; b8 = 0; a16 = 0; b16 = 0;
    for (int d = 0; d < 2; d++) begin
      div = d[0];
      max_err = 0.0;
      for (int x = 0; x < 256; x++)
        for (int y = 0; y < 256; y++) begin
          a8 = 8'(x); b8 = 8'(y); a4 = 4'(x); b4 = 4'(y);
          #1;
          chk($sformatf("md8 %0d %0d div=%0d", x, y, d), r8, ref_md(8, x, y, div));
          if (x < 16 && y < 16)
            chk($sformatf("md4 %0d %0d div=%0d", x, y, d), r4, ref_md(4, x, y, div));
          if (!div && x > 0 && y > 0) begin
            err = (real'(r8) - real'(x * y)) / real'(x * y);
            if (err < 0) err = -err;
            if (err > max_err) max_err = err;
          end
          if (div && y > 0 && x >= y) begin
            err = (real'(r8) / 256.0 - real'(x) / real'(y)) / (real'(x) / real'(y));
            if (err < 0) err = -err;
            if (err > max_err) max_err = err;
          end
        end
      checks++;
      if (max_err > (div ? 0.13 : 0.112)) begin
        failures++; $display("FAIL 8-bit max relative error %f (div=%0d)", max_err, d);
      end
      $display("8-bit %s: max relative error %f", div ? "div" : "mul", max_err);
    end
    // 16-bit random, plus mean error
    sum_err = 0.0; n_err = 0;
    for (int t = 0; t < 20000; t++) begin
      div = t[0];
      a16 = 16'($urandom); b16 = 16'($urandom);
      if (t % 7 == 0) b16 = b16 >> ($urandom % 16);
      #1;
      chk($sformatf("md16 %0d %0d div=%0d", a16, b16, div), r16, ref_md(16, a16, b16, div));
      if (!div && a16 > 0 && b16 > 0) begin
        err = (real'(r16) - real'(a16) * real'(b16)) / (real'(a16) * real'(b16));
        sum_err += (err < 0) ? -err : err; n_err++;
      end
    end
    checks++;
    if (sum_err / n_err > 0.02) begin
      failures++; $display("FAIL mean 16-bit product error %f", sum_err / n_err);
    end
    $display("16-bit mul: mean relative error %f", sum_err / n_err);
    // worked example: 58 x 18 (exact 1044, plain Mitchell 992), 58 / 18 = 3.22
    div = 0; a8 = 58; b8 = 18; #1;
    chk("58x18", r8, ref_md(8, 58, 18, 0));
    checks++;
    if (!(r8 > 992 && r8 <= 1044)) begin failures++; $display("FAIL 58x18 = %0d", r8); end
    div = 1; #1;
    checks++;
    if (r8[15:8] != 8'd3) begin failures++; $display("FAIL 58/18 int part %0d", r8[15:8]); end
    // special cases
    a16 = 0; b16 = 5; div = 0; #1; chk("0*5", r16, 0);
    a16 = 5; b16 = 0; div = 1; #1; chk("5/0", r16, 32'hffff_ffff);
    a16 = 16'hffff; b16 = 16'hffff; div = 0; #1;
    checks++;
    if (r16 < 32'hE000_0000) begin failures++; $display("FAIL max product %h", r16); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
