// green_alu: the SISD/SIMD/MIMD ALU of a GREEN processing element.
//
// The two 16-bit operands are cut into four 4-bit slices (slice 3 holds bits
// 15:12). The 4-bit opcode groups the slices into sub-operations, listed in
// the opcode name from slice 3 downward (see green_pkg::decode_op):
//   ADDn   accurate signed addition over n/8 slices. The group's 4*(n/8)-bit
//          operand fields are sign-extended to n bits and added on the
//          slices' 8-bit adders, whose carry chain is cut by a multiplexer
//          at the group's lowest slice, so the n-bit sum is exact.
//   MULn   approximate unsigned multiplication of the n-bit fields
//          (n/4 slices), 2n-bit product.
//   DIVn   approximate unsigned division of the n-bit fields, 2n-bit
//          quotient with n fraction bits.
// Each slice writes the byte of the 32-bit result that lies under it
// (slice i -> y[8i+7:8i]), so a group of s slices returns an 8s-bit result.
//
// Mode 16 uses one 16-bit multiplier-divider lane, mode 8 the 8-bit lanes at
// slices 3:2, 2:1 or 1:0, mode 4 the four 4-bit lanes; all lanes share one
// eight-port coefficient ROM. Unused lanes see zero operands so they do not
// toggle. The VARIANT parameter restricts the opcode set to the SISD (3),
// SIMD (10) or MIMD (16) variant; an unsupported opcode returns 0 and raises
// illegal. In the MIMD variant every opcode is supported, so illegal is a
// constant 0 there and synthesis removes its logic.
//
// Opcode list, slice widths and the chained carry follow the architecture.
// The slice placement of mixed opcodes, signed addition with a double-width
// result and the use of separate lanes per precision (rather than one lane
// whose shifters and detectors are re-partitioned) are this design's choices;
// the results are the same. Combinational.
module green_alu
  import green_pkg::*;
#(
  parameter alu_variant_e VARIANT = VAR_MIMD
) (
  input  logic [15:0] a,
  input  logic [15:0] b,
  input  opcode_e     op,
  output logic [31:0] y,
  output logic        illegal
);
  alu_cfg_t cfg;
  always_comb cfg = decode_op(op);

  // ------------------------------------------------------------ adder chain
  logic [3:0][7:0] add_a, add_b, add_s;
  logic [3:0]      add_cin, add_cout;

  // Byte `o` of the sign-extended operand field of a group of `span` slices
  // whose lowest slice is `j`.
  function automatic logic [7:0] ext_byte(logic [15:0] v, int unsigned j,
                                          logic [2:0] span, int unsigned o);
    logic [31:0] e;
    unique case (span)
      3'd1:    e = 32'(signed'(v[4*j +: 4]));
      3'd2:    e = 32'(signed'(v[4*j +: 8]));
      default: e = 32'(signed'(v));
    endcase
    return e[8*o +: 8];
  endfunction

  for (genvar i = 0; i < 4; i++) begin : g_add
    int unsigned j, o;
    always_comb begin
      // lowest slice of this slice's group and offset inside the group
      if (cfg[i].span == 3'd4)      j = 0;
      else if (cfg[i].base)         j = i;
      else                          j = (i > 0) ? i - 1 : 0;
      o = i - j;
      if (cfg[i].fn == FN_ADD) begin
        add_a[i] = ext_byte(a, j, cfg[i].span, o);
        add_b[i] = ext_byte(b, j, cfg[i].span, o);
      end else begin
        add_a[i] = '0;
        add_b[i] = '0;
      end
    end
    // carry multiplexer: cut the chain at the lowest slice of a group
    if (i == 0) begin : g_c0
      assign add_cin[i] = 1'b0;
    end else begin : g_cn
      assign add_cin[i] = cfg[i].base ? 1'b0 : add_cout[i-1];
    end
    green_add_slice u_slice (
      .a(add_a[i]), .b(add_b[i]), .cin(add_cin[i]), .s(add_s[i]), .cout(add_cout[i])
    );
  end

  // ------------------------------------------------ multiplier-divider lanes
  // ROM ports: 0 = 16-bit lane, 1..3 = 8-bit lanes at slices 1:0, 2:1, 3:2,
  // 4..7 = 4-bit lanes at slices 0..3.
  logic        rom_div  [8];
  logic [2:0]  rom_ia   [8];
  logic [2:0]  rom_ib   [8];
  logic [15:0] rom_coef [8];

  green_coef_rom #(.PORTS(8)) u_rom (
    .is_div(rom_div), .ia(rom_ia), .ib(rom_ib), .coef(rom_coef)
  );

  // 16-bit lane
  logic        use16;
  logic [31:0] r16;
  always_comb use16 = (cfg[0].span == 3'd4) && (cfg[0].fn != FN_ADD);
  assign rom_div[0] = cfg[0].fn == FN_DIV;
  green_muldiv #(.W(16)) u_md16 (
    .a(use16 ? a : 16'd0), .b(use16 ? b : 16'd0), .div(rom_div[0]),
    .ia(rom_ia[0]), .ib(rom_ib[0]), .coef(rom_coef[0]), .res(r16)
  );

  // 8-bit lanes, lowest slice j = 0, 1, 2
  logic [2:0]       use8;
  logic [2:0][15:0] r8;
  for (genvar j = 0; j < 3; j++) begin : g_md8
    always_comb use8[j] = (cfg[j].span == 3'd2) && cfg[j].base && (cfg[j].fn != FN_ADD);
    assign rom_div[1+j] = cfg[j].fn == FN_DIV;
    green_muldiv #(.W(8)) u_md8 (
      .a(use8[j] ? a[4*j +: 8] : 8'd0), .b(use8[j] ? b[4*j +: 8] : 8'd0),
      .div(rom_div[1+j]), .ia(rom_ia[1+j]), .ib(rom_ib[1+j]),
      .coef(rom_coef[1+j]), .res(r8[j])
    );
  end

  // 4-bit lanes, one per slice
  logic [3:0]      use4;
  logic [3:0][7:0] r4;
  for (genvar i = 0; i < 4; i++) begin : g_md4
    always_comb use4[i] = (cfg[i].span == 3'd1) && (cfg[i].fn != FN_ADD);
    assign rom_div[4+i] = cfg[i].fn == FN_DIV;
    green_muldiv #(.W(4)) u_md4 (
      .a(use4[i] ? a[4*i +: 4] : 4'd0), .b(use4[i] ? b[4*i +: 4] : 4'd0),
      .div(rom_div[4+i]), .ia(rom_ia[4+i]), .ib(rom_ib[4+i]),
      .coef(rom_coef[4+i]), .res(r4[i])
    );
  end

  // ------------------------------------------------------- result assembly
  always_comb begin
    illegal = !op_supported(VARIANT, op);
    for (int i = 0; i < 4; i++) begin
      if (cfg[i].fn == FN_ADD) begin
        y[8*i +: 8] = add_s[i];
      end else if (cfg[i].span == 3'd1) begin
        y[8*i +: 8] = r4[i];
      end else if (cfg[i].span == 3'd2) begin
        if (cfg[i].base && i < 3) y[8*i +: 8] = r8[i][7:0];
        else if (!cfg[i].base && i > 0) y[8*i +: 8] = r8[i-1][15:8];
        else y[8*i +: 8] = 8'd0;
      end else begin
        y[8*i +: 8] = r16[8*i +: 8];
      end
    end
    if (illegal) y = '0;
  end
endmodule
