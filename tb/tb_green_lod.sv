// tb_green_lod: exhaustive check of the 16-bit and 8-bit leading-one
// detectors against a loop that finds the highest set bit.
module tb_green_lod;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [15:0] d16; logic [3:0] p16; logic f16;
  logic [7:0]  d8;  logic [2:0] p8;  logic f8;
  green_lod #(.W(16)) u16 (.d(d16), .pos(p16), .found(f16));
  green_lod #(.W(8))  u8  (.d(d8),  .pos(p8),  .found(f8));

  function automatic int hib(int v);
    int k = 0;
    for (int i = 0; i < 32; i++) if (v[i]) k = i;
    return k;
  endfunction

  initial begin
    for (int v = 0; v < 65536; v++) begin
      d16 = 16'(v); d8 = 8'(v);
      #1;
      checks++;
      if (f16 != (v != 0) || (v != 0 && int'(p16) != hib(v))) begin
        failures++;
        if (failures < 10) $display("FAIL lod16 d=%h pos=%0d found=%0d", d16, p16, f16);
      end
      if (v < 256) begin
        checks++;
        if (f8 != (v != 0) || (v != 0 && int'(p8) != hib(v))) begin
          failures++;
          if (failures < 10) $display("FAIL lod8 d=%h pos=%0d", d8, p8);
        end
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
