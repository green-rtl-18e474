// green_col_port: memory port of one array column.
//
// Each step carries one memory operation per column (green_pkg::col_mop_t,
// loaded with the PE contexts by ctx_load): none, a load of one 16-bit word
// onto the column bus, or a store of the low 16 bits of one PE's bus output.
// While the array runs (active), the port requests the shared memory until
// it is granted. ready tells the controller that this column's operation of
// the current step is complete: at once for none, in the grant cycle for a
// store, and in the cycle the read data returns for a load. The controller
// ends the step (exec) only when every column is ready, so bank conflicts
// and load latency stall the whole array.
//
// Timing: the loaded word is held in a data register when it returns and is
// written, zero-extended, into the column bus register at the end of the
// step (exec), so the PEs see it from the next step on whatever the number
// of stall cycles; the bus keeps the value until the next load. A store writes the value the
// selected PE's bus output held at the start of the step.
//
// The architecture loads data from the shared memory into the array over a
// crossbar; the per-column operation word and this handshake are this
// design's own.
module green_col_port
  import green_pkg::*;
#(
  parameter int unsigned ROWS = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ctx_load,
  input  col_mop_t    mop_in,
  input  logic        active,
  input  logic        exec,
  input  logic [31:0] pe_bus_out [ROWS],
  output mem_req_t    req,
  input  logic        gnt,
  input  logic        rvalid,
  input  logic [15:0] rdata,
  output logic        ready,
  output logic [31:0] bus
);
  col_mop_t    mop;
  logic        granted, finished, lpend;
  logic [15:0] ldata;
  logic [31:0] src;

  always_comb begin
    src = (int'(mop.row) < int'(ROWS)) ? pe_bus_out[mop.row] : 32'd0;
    req.valid = active && (mop.kind == MOP_LOAD || mop.kind == MOP_STORE) && !granted;
    req.we    = (mop.kind == MOP_STORE);
    req.addr  = mop.addr;
    req.wdata = src[15:0];
    unique case (mop.kind)
      MOP_LOAD:  ready = finished || rvalid;
      MOP_STORE: ready = finished || gnt;
      default:   ready = 1'b1;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mop      <= '0;
      granted  <= 1'b0;
      finished <= 1'b0;
      bus      <= '0;
      lpend    <= 1'b0;
      ldata    <= '0;
    end else begin
      if (ctx_load) mop <= mop_in;
      if (exec || ctx_load) begin
        granted  <= 1'b0;
        finished <= 1'b0;
      end else begin
        if (gnt) granted <= 1'b1;
        if ((mop.kind == MOP_STORE && gnt) || (mop.kind == MOP_LOAD && rvalid))
          finished <= 1'b1;
      end
      // returned load data reaches the bus only at the end of the step
      if (exec) begin
        if (rvalid)     bus <= {16'd0, rdata};
        else if (lpend) bus <= {16'd0, ldata};
        lpend <= 1'b0;
      end else if (rvalid) begin
        ldata <= rdata;
        lpend <= 1'b1;
      end
    end
  end
endmodule
