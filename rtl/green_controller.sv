// green_controller: the CGRA controller that sequences configuration steps.
//
// After start it runs steps 0 .. num_steps-1 of the context memory. The
// context memory is read one step ahead: step 0 is fetched in the start
// cycle and loaded into the PE context registers in the next (PRIME); from
// then on, the cycle that ends a step (exec) also loads the already fetched
// next step and fetches the one after it. A step ends in the first cycle in
// which every column memory port reports ready, so a step without memory
// conflicts takes one cycle and each cycle spent waiting is counted as a
// stall. The last step loads nothing, so the PEs keep the context of the
// step that ran last (and its illegal flag) after the run. done pulses for one cycle after the last step; busy is high from
// start to done. cycles and stalls count the cycles and stall cycles of the
// current or last run.
//
// The architecture names a CGRA controller next to the context memory and
// the arbiter; this step sequencing, prefetch and stall rule are this
// design's own.
module green_controller #(
  parameter int unsigned DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic [$clog2(DEPTH):0]   num_steps,
  input  logic                     all_ready,
  output logic                     ctx_re,
  output logic [$clog2(DEPTH)-1:0] ctx_raddr,
  output logic                     ctx_load,
  output logic                     exec,
  output logic                     active,
  output logic                     busy,
  output logic                     done,
  output logic [$clog2(DEPTH):0]   pc,
  output logic [31:0]              cycles,
  output logic [31:0]              stalls
);
  typedef enum logic [1:0] {S_IDLE, S_PRIME, S_RUN} state_e;
  state_e state;

  always_comb begin
    ctx_re    = 1'b0;
    ctx_raddr = '0;
    ctx_load  = 1'b0;
    exec      = 1'b0;
    active    = (state == S_RUN);
    busy      = (state != S_IDLE);
    unique case (state)
      S_IDLE: begin
        ctx_re = start;
      end
      S_PRIME: begin
        ctx_load  = 1'b1;
        ctx_re    = 1'b1;
        ctx_raddr = $clog2(DEPTH)'(1);
      end
      default: begin
        exec = all_ready;
        if (all_ready && pc != num_steps - 1) begin
          ctx_load  = 1'b1;
          ctx_re    = 1'b1;
          ctx_raddr = $clog2(DEPTH)'(pc + 2);
        end
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      pc     <= '0;
      done   <= 1'b0;
      cycles <= '0;
      stalls <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          cycles <= 32'd1;
          stalls <= '0;
          pc     <= '0;
          if (num_steps == 0) done <= 1'b1;
          else state <= S_PRIME;
        end
        S_PRIME: begin
          cycles <= cycles + 1;
          state  <= S_RUN;
        end
        default: begin
          cycles <= cycles + 1;
          if (all_ready) begin
            if (pc == num_steps - 1) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              pc <= pc + 1;
            end
          end else begin
            stalls <= stalls + 1;
          end
        end
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) exec |-> active);
endmodule
