// ky_fsm: control of the Knuth-Yao sampler.
//
// A sampling is a fixed number of ROM reads, STEPS = THETA / RAND_BITS (72 for
// the FALCON distribution with one random bit per cycle), whatever path the
// random bits take, so every sample costs the same time. The FSM has two
// states, IDLE and READ, and a read counter.
//
// Interface and timing (cycle 0 = the cycle in which start is seen in IDLE):
//   load_root  high in cycle 0 only: the index multiplexer then feeds the
//              root index to the ROM, and read 1 of STEPS happens in cycle 0.
//   cycles 1..STEPS-1: the ROM reads with its own last output as index.
//   ready      high for exactly one cycle, cycle STEPS, when the ROM output
//              holds the leaf reached by the walk.
// ready and IDLE coincide, so a start in the ready cycle begins the next
// sampling at once: back-to-back samples take STEPS cycles each. start while
// READ is ignored. The two-state encoding, the synchronous active-high reset
// and ignoring start while busy are this design's choices; the fixed read
// count, the single-cycle ready pulse and the root selection follow the
// architecture this sampler implements.
module ky_fsm #(
  parameter int unsigned STEPS = ky_pkg::FALCON_THETA
) (
  input  logic clk,
  input  logic rst,        // synchronous, active high
  input  logic start,      // request a sample
  output logic load_root,  // select the root index for this cycle's read
  output logic ready       // one-cycle pulse: sample available
);

  localparam int unsigned CW = (STEPS > 1) ? $clog2(STEPS) : 1;

  typedef enum logic {IDLE, READ} state_t;

  state_t        state;
  logic [CW-1:0] count;  // reads already done in this sampling

  assign load_root = (state == IDLE) && start;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= IDLE;
      count <= '0;
      ready <= 1'b0;
    end else begin
      ready <= 1'b0;
      unique case (state)
        IDLE: begin
          if (start) begin
            if (STEPS == 1) begin
              ready <= 1'b1;
            end else begin
              state <= READ;
              count <= CW'(1);
            end
          end
        end
        READ: begin
          if (count == CW'(STEPS - 1)) begin
            state <= IDLE;
            count <= '0;
            ready <= 1'b1;
          end else begin
            count <= count + 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  // ready only ever follows the last read of a sampling.
  property p_ready_after_last_read;
    @(posedge clk) disable iff (rst)
      ready |-> $past(state == READ && count == CW'(STEPS - 1)) || (STEPS == 1);
  endproperty
  assert property (p_ready_after_last_read);

endmodule
