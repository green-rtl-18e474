// green_data_bank: one bank of the shared on-chip data memory.
//
// A dual-ported memory of WORDS 16-bit words. Each port has an enable, a
// write enable, an address and write data; a read returns its word in the
// cycle after the request (registered output). If both ports write the same
// word in one cycle, port 1 wins. A read and a write of the same word in one
// cycle return the old word.
//
// pwr selects the bank's power state: PWR_ON allows access; PWR_RET
// (retention) keeps the contents but ignores accesses (reads return 0);
// PWR_OFF ignores accesses and loses the contents, modelled by a valid bit
// per word that is cleared while the bank is off, so a word that has not been
// written since reads as 0.
//
// Dual porting, per-bank on/off/retention control and the bank size of
// 12 KiB / 4 = 3 KiB (1536 words) follow the architecture. The array is
// written as synthesizable RTL standing in for the SRAM macro; the port
// conflict rules and the zero read-out of inaccessible or lost words are this
// design's choices.
module green_data_bank
  import green_pkg::*;
#(
  parameter int unsigned WORDS = 1536
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  bank_pwr_e                pwr,
  input  logic [1:0]               en,
  input  logic [1:0]               we,
  input  logic [$clog2(WORDS)-1:0] addr  [2],
  input  logic [15:0]              wdata [2],
  output logic [15:0]              rdata [2]
);
  logic [15:0]      mem   [WORDS];
  logic [WORDS-1:0] valid;
  logic             on;

  assign on = (pwr == PWR_ON);

  always_ff @(posedge clk) begin
    for (int p = 0; p < 2; p++)
      if (on && en[p] && we[p] && 32'(addr[p]) < WORDS) mem[addr[p]] <= wdata[p];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0;
    end else if (pwr == PWR_OFF) begin
      valid <= '0;
    end else begin
      for (int p = 0; p < 2; p++)
        if (on && en[p] && we[p] && 32'(addr[p]) < WORDS) valid[addr[p]] <= 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rdata[0] <= '0;
      rdata[1] <= '0;
    end else begin
      for (int p = 0; p < 2; p++)
        if (en[p] && !we[p])
          rdata[p] <= (on && 32'(addr[p]) < WORDS && valid[addr[p]]) ? mem[addr[p]] : 16'd0;
    end
  end
endmodule
