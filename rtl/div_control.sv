// div_control: sequencer of one division, ceil(N/B) + 4 cycles.
//
// Cycle 1 (start seen in IDLE): the scale factor M is computed from d and registered, and d is
//   loaded into the multiplicand register.
// Cycle 2 (MD):   M*d into the residual register W; x loaded into the multiplicand register.
// Cycle 3 (MX):   M*x into W (the initial residual w[0]); the adder assimilates M*d and the
//   scaled divisor z is loaded into the multiplicand register; quotient forms cleared.
// Cycles 4 .. NITER+3 (ITER): one quotient digit per cycle, W <= r*W - q*z.
// Cycle NITER+4 (POST): sign of the last residual, correction and rounding of the quotient.
// The cycle sequence follows the design; the state encoding and the start/busy handshake are
// this design's own. start is ignored while busy. Outputs are decoded from the state.
module div_control
  import div_pkg::*;
#(
  parameter int unsigned B = B_DEF,
  parameter int unsigned N = N_DEF
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  output div_state_e state,
  output logic       load_m,     // register M, load d (cycle 1)
  output logic       first,      // first iteration
  output logic       last,       // last iteration
  output logic       busy
);

  localparam int unsigned NIT = niter(B, N);
  localparam int unsigned CW  = $clog2(NIT + 1);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_IDLE;
      cnt   <= '0;
    end else begin
      unique case (state)
        ST_IDLE: if (start) state <= ST_MD;
        ST_MD:   state <= ST_MX;
        ST_MX: begin
          state <= ST_ITER;
          cnt   <= '0;
        end
        ST_ITER: begin
          cnt <= cnt + 1'b1;
          if (cnt == CW'(NIT - 1)) state <= ST_POST;
        end
        ST_POST: state <= ST_IDLE;
        default: state <= ST_IDLE;
      endcase
    end
  end

  assign load_m = (state == ST_IDLE) && start;
  assign first  = (state == ST_ITER) && (cnt == '0);
  assign last   = (state == ST_ITER) && (cnt == CW'(NIT - 1));
  assign busy   = (state != ST_IDLE);

endmodule
