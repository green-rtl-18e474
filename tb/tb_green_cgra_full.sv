// tb_green_cgra_full: the design at its default size with no parameter
// changed, taken through complete kernels: host loads the data memory, the
// context memory is written, random kernels run and the results are read
// back and compared with a step-level model. The checks are those of
// tb_green_cgra_body.svh, with fewer kernels and without the illegal-opcode
// test, which needs the reduced SISD variant (see tb_green_cgra).
module tb_green_cgra_full;
  localparam int RUNS = 3;
  localparam bit CHECK_ILLEGAL = 1'b0;
  task automatic extra_checks();
  endtask
`include "tb_green_cgra_body.svh"
endmodule
