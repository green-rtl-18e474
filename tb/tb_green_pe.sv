// tb_green_pe: drives one PE with random contexts and neighbour/bus values
// and checks every output register and, through later reads, the register
// file against a model built on green_ref_pkg::ref_alu: operand selection for
// all sources, the write demultiplexer for all targets, that nothing changes
// without exec, and the illegal flag of a SISD PE.
module tb_green_pe;
  import green_pkg::*;
  import green_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, ctx_load, exec;
  pe_ctx_t ctx_in;
  logic [31:0] nb_in [8], bus_in, nb_out [8], bus_out, nb_out2 [8], bus_out2;
  logic ill, ill2;
  green_pe #(.VARIANT(VAR_MIMD)) dut (.clk(clk), .rst_n(rst_n), .ctx_load(ctx_load), .ctx_in(ctx_in),
    .exec(exec), .nb_in(nb_in), .bus_in(bus_in), .nb_out(nb_out), .bus_out(bus_out), .illegal(ill));
  green_pe #(.VARIANT(VAR_SISD)) u_sisd (.clk(clk), .rst_n(rst_n), .ctx_load(ctx_load), .ctx_in(ctx_in),
    .exec(exec), .nb_in(nb_in), .bus_in(bus_in), .nb_out(nb_out2), .bus_out(bus_out2), .illegal(ill2));

  logic [31:0] m_out [8], m_bus, m_rf [4];

  function automatic logic [15:0] src(logic [3:0] s, logic [15:0] imm);
    if (s == 0) return imm;
    if (s <= 8) return nb_in[s - 1][15:0];
    if (s == 9) return bus_in[15:0];
    if (s <= 13) return m_rf[s - 10][15:0];
    return 16'd0;
  endfunction

  initial begin
    rst_n = 0; ctx_load = 0; exec = 0; ctx_in = '0; bus_in = 0;
    for (int d = 0; d < 8; d++) begin nb_in[d] = 0; m_out[d] = 0; end
    for (int i = 0; i < 4; i++) m_rf[i] = 0;
    m_bus = 0;
    #12 rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      logic [31:0] y;
      @(negedge clk);
      ctx_in = pe_ctx_t'($urandom);
      ctx_load = 1;
      @(negedge clk);
      ctx_load = 0;
      for (int d = 0; d < 8; d++) nb_in[d] = $urandom;
      bus_in = $urandom;
      exec = ($urandom % 8) != 0;
      #1;
      checks++;
      if (ill2 != !(ctx_in.op inside {OP_ADD32, OP_MUL16, OP_DIV16})) begin
        failures++; $display("FAIL SISD illegal flag op %0d", ctx_in.op);
      end
      y = ref_alu(ctx_in.op, src(ctx_in.sel_a, ctx_in.imm), src(ctx_in.sel_b, ctx_in.imm));
      @(posedge clk); #1;
      if (exec) begin
        if (ctx_in.wr < 8) m_out[ctx_in.wr[2:0]] = y;
        else if (ctx_in.wr == 8) m_bus = y;
        else if (ctx_in.wr >= 12) m_rf[ctx_in.wr - 12] = y;
      end
      exec = 0;
      for (int d = 0; d < 8; d++) begin
        checks++;
        if (nb_out[d] !== m_out[d]) begin
          failures++;
          if (failures < 10) $display("FAIL out %0d got %h exp %h (ctx %h)", d, nb_out[d], m_out[d], ctx_in);
        end
      end
      checks++;
      if (bus_out !== m_bus) begin failures++; $display("FAIL bus_out got %h exp %h", bus_out, m_bus); end
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
