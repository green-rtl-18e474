// green_pkg: types and constants shared by the GREEN CGRA modules.
//
// GREEN is a coarse-grained reconfigurable array whose processing elements (PEs)
// each hold one SIMD/MIMD ALU. The ALU splits its 16-bit operands into four
// 4-bit lanes ("slices"); an opcode groups the slices into one to four
// sub-operations (add, approximate multiply, approximate divide) of 4, 8 or 16
// bits. This package holds:
//   * the 16 ALU opcodes and the slice-group decode table derived from them,
//   * the layout of the 32-bit PE context word (immediate, operand selects,
//     write target, opcode),
//   * the operand-source and write-target encodings,
//   * the Mitchell error-correction coefficient tables (32 multiply entries,
//     64 divide entries, 16 bits each),
//   * the memory request structure used between the array and the shared
//     data memory.
//
// Opcode values, context-word bit positions and the ROM shapes (32x16, 64x16)
// follow the published architecture. Operand-source codes, write-target codes,
// the placement of sub-operations on slices and the coefficient values are this
// design's own choices, documented next to each item.
package green_pkg;

  // ------------------------------------------------------------------ opcodes
  // Name = list of sub-operations from the most significant slice down.
  // ADDn uses n/8 slices (each slice owns an 8-bit adder); MULn / DIVn use n/4
  // slices (each slice owns 4 bits of each operand).
  typedef enum logic [3:0] {
    OP_ADD32             = 4'b0000,
    OP_MUL16             = 4'b0001,
    OP_DIV16             = 4'b0010,
    OP_ADD16_ADD16       = 4'b0011,
    OP_ADD16_ADD8_ADD8   = 4'b0100,
    OP_ADD8x4            = 4'b0101,
    OP_MUL8_MUL8         = 4'b0110,
    OP_MUL4x4            = 4'b0111,
    OP_DIV8_DIV8         = 4'b1000,
    OP_DIV4x4            = 4'b1001,
    OP_ADD8_MUL4_MUL4_MUL4 = 4'b1010,
    OP_ADD8_ADD8_DIV8    = 4'b1011,
    OP_ADD8_MUL8_DIV4    = 4'b1100,
    OP_ADD8_MUL4_DIV8    = 4'b1101,
    OP_MUL8_DIV4_DIV4    = 4'b1110,
    OP_ADD16_MUL8        = 4'b1111
  } opcode_e;

  // ALU build variants: SISD supports the three full-width opcodes, SIMD the
  // ten uniform opcodes 0000-1001, MIMD all sixteen.
  typedef enum logic [1:0] {
    VAR_SISD = 2'd0,
    VAR_SIMD = 2'd1,
    VAR_MIMD = 2'd2
  } alu_variant_e;

  typedef enum logic [1:0] {
    FN_ADD = 2'd0,
    FN_MUL = 2'd1,
    FN_DIV = 2'd2
  } slice_fn_e;

  // Per-slice decode: the function the slice takes part in, how many slices
  // its group spans (1, 2 or 4) and whether the slice is the lowest of its
  // group (the group's result starts there).
  typedef struct packed {
    slice_fn_e  fn;
    logic [2:0] span;
    logic       base;
  } slice_cfg_t;

  typedef slice_cfg_t [3:0] alu_cfg_t;   // index = slice number, 3 = MS slice

  function automatic slice_cfg_t sc(slice_fn_e fn, logic [2:0] span, bit base);
    slice_cfg_t c;
    c.fn   = fn;
    c.span = span;
    c.base = base;
    return c;
  endfunction

  // Decode an opcode into the per-slice configuration. Sub-operations are
  // placed from slice 3 downward in the order of the opcode's name.
  function automatic alu_cfg_t decode_op(opcode_e op);
    alu_cfg_t c;
    unique case (op)
      OP_ADD32:   c = '{sc(FN_ADD,4,0), sc(FN_ADD,4,0), sc(FN_ADD,4,0), sc(FN_ADD,4,1)};
      OP_MUL16:   c = '{sc(FN_MUL,4,0), sc(FN_MUL,4,0), sc(FN_MUL,4,0), sc(FN_MUL,4,1)};
      OP_DIV16:   c = '{sc(FN_DIV,4,0), sc(FN_DIV,4,0), sc(FN_DIV,4,0), sc(FN_DIV,4,1)};
      OP_ADD16_ADD16:
                  c = '{sc(FN_ADD,2,0), sc(FN_ADD,2,1), sc(FN_ADD,2,0), sc(FN_ADD,2,1)};
      OP_ADD16_ADD8_ADD8:
                  c = '{sc(FN_ADD,2,0), sc(FN_ADD,2,1), sc(FN_ADD,1,1), sc(FN_ADD,1,1)};
      OP_ADD8x4:  c = '{sc(FN_ADD,1,1), sc(FN_ADD,1,1), sc(FN_ADD,1,1), sc(FN_ADD,1,1)};
      OP_MUL8_MUL8:
                  c = '{sc(FN_MUL,2,0), sc(FN_MUL,2,1), sc(FN_MUL,2,0), sc(FN_MUL,2,1)};
      OP_MUL4x4:  c = '{sc(FN_MUL,1,1), sc(FN_MUL,1,1), sc(FN_MUL,1,1), sc(FN_MUL,1,1)};
      OP_DIV8_DIV8:
                  c = '{sc(FN_DIV,2,0), sc(FN_DIV,2,1), sc(FN_DIV,2,0), sc(FN_DIV,2,1)};
      OP_DIV4x4:  c = '{sc(FN_DIV,1,1), sc(FN_DIV,1,1), sc(FN_DIV,1,1), sc(FN_DIV,1,1)};
      OP_ADD8_MUL4_MUL4_MUL4:
                  c = '{sc(FN_ADD,1,1), sc(FN_MUL,1,1), sc(FN_MUL,1,1), sc(FN_MUL,1,1)};
      OP_ADD8_ADD8_DIV8:
                  c = '{sc(FN_ADD,1,1), sc(FN_ADD,1,1), sc(FN_DIV,2,0), sc(FN_DIV,2,1)};
      OP_ADD8_MUL8_DIV4:
                  c = '{sc(FN_ADD,1,1), sc(FN_MUL,2,0), sc(FN_MUL,2,1), sc(FN_DIV,1,1)};
      OP_ADD8_MUL4_DIV8:
                  c = '{sc(FN_ADD,1,1), sc(FN_MUL,1,1), sc(FN_DIV,2,0), sc(FN_DIV,2,1)};
      OP_MUL8_DIV4_DIV4:
                  c = '{sc(FN_MUL,2,0), sc(FN_MUL,2,1), sc(FN_DIV,1,1), sc(FN_DIV,1,1)};
      default:    // OP_ADD16_MUL8
                  c = '{sc(FN_ADD,2,0), sc(FN_ADD,2,1), sc(FN_MUL,2,0), sc(FN_MUL,2,1)};
    endcase
    return c;
  endfunction

  function automatic logic op_supported(alu_variant_e v, opcode_e op);
    unique case (v)
      VAR_SISD: return op inside {OP_ADD32, OP_MUL16, OP_DIV16};
      VAR_SIMD: return op <= OP_DIV4x4;
      default:  return 1'b1;
    endcase
  endfunction

  // ------------------------------------------------------------ context word
  // Bit layout of the 32-bit PE context word:
  //   [31:28] opcode, [27:24] write target, [23:20] operand-A select,
  //   [19:16] operand-B select, [15:0] immediate.
  typedef struct packed {
    opcode_e     op;
    logic [3:0]  wr;
    logic [3:0]  sel_a;
    logic [3:0]  sel_b;
    logic [15:0] imm;
  } pe_ctx_t;

  // Operand sources of MUX A / MUX B. The four register-file entries occupy
  // codes 10-13 (the two muxes are the two read ports of the register file).
  localparam logic [3:0] SRC_IMM = 4'd0;
  localparam logic [3:0] SRC_N   = 4'd1;
  localparam logic [3:0] SRC_NE  = 4'd2;
  localparam logic [3:0] SRC_E   = 4'd3;
  localparam logic [3:0] SRC_SE  = 4'd4;
  localparam logic [3:0] SRC_S   = 4'd5;
  localparam logic [3:0] SRC_SW  = 4'd6;
  localparam logic [3:0] SRC_W   = 4'd7;
  localparam logic [3:0] SRC_NW  = 4'd8;
  localparam logic [3:0] SRC_BUS = 4'd9;
  localparam logic [3:0] SRC_REG = 4'd10;   // 10 + entry number

  // Write targets: 0-7 one neighbour output (N, NE, E, SE, S, SW, W, NW),
  // 8 the bus output, 12-15 register-file entry 0-3, others: no write.
  localparam logic [3:0] WR_N    = 4'd0;
  localparam logic [3:0] WR_OUT  = 4'd8;
  localparam logic [3:0] WR_REG  = 4'd12;   // 12 + entry number

  // Direction index used for neighbour ports of a PE.
  typedef enum logic [2:0] {
    DIR_N = 3'd0, DIR_NE = 3'd1, DIR_E = 3'd2, DIR_SE = 3'd3,
    DIR_S = 3'd4, DIR_SW = 3'd5, DIR_W = 3'd6, DIR_NW = 3'd7
  } dir_e;

  // --------------------------------------------------- correction coefficients
  // Unsigned Q0.16 fractions. They are cell averages of the exact log-domain
  // correction of Mitchell's method over the 8x8 grid formed by the three
  // MSBs of the two operands' fractions x1, x2 (cell i covers [i/8,(i+1)/8)):
  //   multiply:  c = x1*x2                  if (1+x1)(1+x2) <  2
  //              c = (1-x1)(1-x2)/2         otherwise           (added)
  //   divide:    r = (1+x1)/(1+x2)
  //              c = (x1-x2) - (r-1)        if r >= 1
  //              c = (1+x1-x2) - (2r-1)     otherwise           (subtracted)
  // The multiply correction is symmetric in x1, x2, so only 32 entries are
  // kept: address {max(i1,i2), min(i1,i2)[2:1]}, each the average of the
  // (at most two) cells it covers; addresses with min > max are unused (0).
  localparam logic [15:0] MUL_COEF [32] = '{
    16'h0100, 16'h0000, 16'h0000, 16'h0000, 16'h0600, 16'h0000, 16'h0000, 16'h0000,
    16'h0a00, 16'h1900, 16'h0000, 16'h0000, 16'h0e00, 16'h2534, 16'h0000, 16'h0000,
    16'h11fd, 16'h224d, 16'h1880, 16'h0000, 16'h13e8, 16'h1900, 16'h0f00, 16'h0000,
    16'h0fd0, 16'h0f00, 16'h0900, 16'h0480, 16'h064d, 16'h0500, 16'h0300, 16'h0100
  };
  // Address {i1, i2} (dividend cell, divisor cell).
  localparam logic [15:0] DIV_COEF [64] = '{
    16'h0495, 16'h1579, 16'h2136, 16'h2554, 16'h23a7, 16'h1d7b, 16'h13be, 16'h0721,
    16'h018d, 16'h0424, 16'h1069, 16'h18c7, 16'h1aac, 16'h178a, 16'h106b, 16'h0616,
    16'h0366, 16'h04ca, 16'h03c7, 16'h0c3a, 16'h11b1, 16'h1198, 16'h0d18, 16'h050a,
    16'h053f, 16'h09d2, 16'h0768, 16'h0378, 16'h08b5, 16'h0ba7, 16'h09c5, 16'h03ff,
    16'h0718, 16'h0ed9, 16'h0f02, 16'h0990, 16'h0336, 16'h05b6, 16'h0672, 16'h02f4,
    16'h08f1, 16'h13e0, 16'h169c, 16'h134a, 16'h0b5f, 16'h02fc, 16'h031f, 16'h01e9,
    16'h0aca, 16'h18e7, 16'h1e35, 16'h1d04, 16'h16e2, 16'h0ce9, 16'h02ca, 16'h00de,
    16'h0ca3, 16'h1dee, 16'h25cf, 16'h26bd, 16'h2264, 16'h19f1, 16'h0e3c, 16'h029f
  };

  // ------------------------------------------------------------ data memory
  // One request from a requester (a PE column or the host) to the shared
  // data memory. Addresses are 16-bit-word addresses.
  localparam int unsigned DADDR_W = 13;

  typedef struct packed {
    logic               valid;
    logic               we;
    logic [DADDR_W-1:0] addr;
    logic [15:0]        wdata;
  } mem_req_t;

  // Per-bank power state.
  typedef enum logic [1:0] {
    PWR_ON   = 2'd0,
    PWR_RET  = 2'd1,   // retention: contents kept, no access
    PWR_OFF  = 2'd2    // off: contents lost, no access
  } bank_pwr_e;

  // Per-column memory operation, one 32-bit word per column and step:
  //   [31:30] kind (0 none, 1 load, 2 store), [29:27] row whose bus output
  //   is stored, [12:0] word address.
  typedef enum logic [1:0] {
    MOP_NONE  = 2'd0,
    MOP_LOAD  = 2'd1,
    MOP_STORE = 2'd2
  } mem_op_e;

  typedef struct packed {
    mem_op_e            kind;
    logic [2:0]         row;
    logic [13:0]        rsvd;
    logic [DADDR_W-1:0] addr;
  } col_mop_t;

endpackage
