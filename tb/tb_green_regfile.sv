// tb_green_regfile: writes random words to random entries, checks both read
// ports against a shadow copy, that reset clears the entries and that a
// write without we changes nothing.
module tb_green_regfile;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n, we;
  logic [1:0] waddr, ra, rb;
  logic [31:0] wdata, da, db;
  logic [31:0] shadow [4];
  green_regfile #(.DEPTH(4), .DW(32)) dut (.clk(clk), .rst_n(rst_n), .we(we), .waddr(waddr),
    .wdata(wdata), .raddr_a(ra), .rdata_a(da), .raddr_b(rb), .rdata_b(db));
  initial begin
    rst_n = 0; we = 0; waddr = 0; wdata = 0; ra = 0; rb = 0;
    #12 rst_n = 1;
    for (int i = 0; i < 4; i++) shadow[i] = 0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      ra = 2'($urandom); rb = 2'($urandom);
      #1;
      checks += 2;
      if (da !== shadow[ra]) begin failures++; $display("FAIL port A entry %0d %h exp %h", ra, da, shadow[ra]); end
      if (db !== shadow[rb]) begin failures++; $display("FAIL port B entry %0d %h exp %h", rb, db, shadow[rb]); end
      we = ($urandom % 3) != 0; waddr = 2'($urandom); wdata = $urandom;
      @(posedge clk); #1;
      if (we) shadow[waddr] = wdata;
      we = 0;
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
