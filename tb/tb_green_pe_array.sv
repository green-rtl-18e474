// tb_green_pe_array: checks the mesh and diagonal wiring of a 5 x 7 array
// (non-square on purpose). For each direction e, every PE first writes
// 2*(its index + 1) towards the opposite direction, then every PE copies its
// input from direction e to its bus output; the testbench compares each bus
// output with the value of the neighbour in direction e, or 0 at the array
// edge. It also checks that each column bus reaches every PE of its column.
module tb_green_pe_array;
  import green_pkg::*;
  localparam int R = 5, C = 7;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, ctx_load, exec;
  pe_ctx_t ctx_in [R*C];
  logic [31:0] bus_in [C];
  logic [31:0] bus_out [R][C];
  logic [R*C-1:0] ill;
  green_pe_array #(.ROWS(R), .COLS(C)) dut (.clk(clk), .rst_n(rst_n), .ctx_load(ctx_load),
    .ctx_in(ctx_in), .exec(exec), .bus_in(bus_in), .bus_out(bus_out), .illegal(ill));

  localparam int DR [8] = '{-1, -1, 0, 1, 1, 1, 0, -1};
  localparam int DC [8] = '{ 0,  1, 1, 1, 0, -1, -1, -1};

  task automatic step();
    @(negedge clk); ctx_load = 1;
    @(negedge clk); ctx_load = 0; exec = 1;
    @(negedge clk); exec = 0;
  endtask

  initial begin
    rst_n = 0; ctx_load = 0; exec = 0;
    for (int c = 0; c < C; c++) bus_in[c] = 32'h100 + c;
    for (int i = 0; i < R*C; i++) ctx_in[i] = '0;
    #12 rst_n = 1;
    for (int e = 0; e < 8; e++) begin
      for (int i = 0; i < R*C; i++)
        ctx_in[i] = '{op: OP_ADD32, wr: 4'((e + 4) % 8), sel_a: SRC_IMM, sel_b: SRC_IMM, imm: 16'(i + 1)};
      step();
      for (int i = 0; i < R*C; i++)
        ctx_in[i] = '{op: OP_ADD32, wr: WR_OUT, sel_a: 4'(SRC_N + e), sel_b: SRC_IMM, imm: 16'd0};
      step();
      for (int r = 0; r < R; r++)
        for (int c = 0; c < C; c++) begin
          int nr, nc;
          logic [31:0] exp;
          nr = r + DR[e]; nc = c + DC[e];
          exp = (nr >= 0 && nr < R && nc >= 0 && nc < C) ? 32'(2 * (nr * C + nc + 1)) : 32'd0;
          checks++;
          if (bus_out[r][c] !== exp) begin
            failures++;
            if (failures < 10) $display("FAIL dir %0d PE(%0d,%0d) got %h exp %h", e, r, c, bus_out[r][c], exp);
          end
        end
    end
    // column bus: each PE adds its bus input to 0
    for (int i = 0; i < R*C; i++)
      ctx_in[i] = '{op: OP_ADD32, wr: WR_OUT, sel_a: SRC_BUS, sel_b: SRC_IMM, imm: 16'd0};
    step();
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        checks++;
        if (bus_out[r][c] !== 32'h100 + c) begin
          failures++; $display("FAIL bus PE(%0d,%0d) got %h", r, c, bus_out[r][c]);
        end
      end
    checks++;
    if (ill !== '0) begin failures++; $display("FAIL illegal flags %h", ill); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
