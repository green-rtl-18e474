// tb_green_alu: checks all 16 opcodes of the MIMD ALU on random and corner
// operands against green_ref_pkg::ref_alu, a few hand-worked results, and the
// opcode restriction of the SISD and SIMD variants.
module tb_green_alu;
  import green_pkg::*;
  import green_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [15:0] a, b;
  opcode_e     op;
  logic [31:0] y, y_sisd, y_simd;
  logic        ill, ill_sisd, ill_simd;
  green_alu #(.VARIANT(VAR_MIMD)) dut   (.a(a), .b(b), .op(op), .y(y), .illegal(ill));
  green_alu #(.VARIANT(VAR_SISD)) u_sisd (.a(a), .b(b), .op(op), .y(y_sisd), .illegal(ill_sisd));
  green_alu #(.VARIANT(VAR_SIMD)) u_simd (.a(a), .b(b), .op(op), .y(y_simd), .illegal(ill_simd));

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 12) $display("FAIL %s a=%h b=%h got %h exp %h", what, a, b, got, exp);
    end
  endtask

  localparam logic [15:0] CORNER [6] = '{16'h0000, 16'hffff, 16'h8000, 16'h7fff, 16'h0001, 16'h8888};

  initial begin
    for (int o = 0; o < 16; o++) begin
      op = opcode_e'(o);
      for (int t = 0; t < 3000; t++) begin
        a = 16'($urandom); b = 16'($urandom);
        if (t < 36) begin a = CORNER[t % 6]; b = CORNER[t / 6]; end
        #1;
        chk($sformatf("op %s", op.name()), y, ref_alu(4'(o), a, b));
        checks++;
        if (ill) begin failures++; $display("FAIL MIMD flags %s illegal", op.name()); end
        chk("SISD variant", y_sisd, (o <= 2) ? y : 32'd0);
        chk("SIMD variant", y_simd, (o <= 9) ? y : 32'd0);
      end
    end
    // hand-worked: signed 16-bit add, 0x7fff + 0x0001 = 32768, -1 + -1 = -2
    op = OP_ADD32; a = 16'h7fff; b = 16'h0001; #1; chk("ADD32 hand", y, 32'h0000_8000);
    a = 16'hffff; b = 16'hffff; #1; chk("ADD32 neg", y, 32'hffff_fffe);
    // four independent 4-bit adds: 7+1, -8+-8, 3+4, -1+1
    op = OP_ADD8x4; a = 16'h783f; b = 16'h1841; #1; chk("ADD8x4 hand", y, 32'h08f0_0700);
    // MUL4x4: 2*4, 1*1, 8*2, 0*5 are exact in Mitchell's method
    op = OP_MUL4x4; a = 16'h2180; b = 16'h4125; #1; chk("MUL4x4 hand", y, 32'h0801_1000);
    // ADD16_MUL8: upper 8-bit add 0x10+0x20, lower 8-bit multiply 16*4 = 64
    op = OP_ADD16_MUL8; a = 16'h1010; b = 16'h2004; #1; chk("ADD16_MUL8 hand", y, 32'h0030_0040);
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
