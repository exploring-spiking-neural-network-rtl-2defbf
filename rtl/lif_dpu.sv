// lif_dpu: datapath unit in neuron mode, a leaky integrate-and-fire neuron.
// On each step pulse it evaluates the discrete form of dV/dt = I + a - bV:
//   V' = V + I + A_BIAS - (V >>> B_SHIFT)
// where the leak coefficient b is 2^-B_SHIFT so that the product is a shift.
// The sum is formed at full width and saturated to a signed DATA_W word. If
// V' reaches THETA the neuron fires: fire is high for the one cycle after the
// step and V returns to V_RESET; otherwise V takes V'. All values are signed
// fixed point with FRAC fractional bits (Q8.8 by default). The equation and
// the reset-on-threshold behaviour follow the neuron model; the discretisation,
// the number format and all constants are this design's choices.
module lif_dpu #(
  parameter int unsigned     DATA_W  = 16,
  parameter logic signed [15:0] A_BIAS  = 16'sd16,   // a, equilibrium term (1/16 in Q8.8)
  parameter int unsigned     B_SHIFT = 3,            // b = 1/8
  parameter logic signed [15:0] THETA   = 16'sd256,  // firing threshold (1.0)
  parameter logic signed [15:0] V_RESET = 16'sd0
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     step,     // evaluate one time step
  input  logic signed [DATA_W-1:0] i_syn,    // input current I for this step
  output logic signed [DATA_W-1:0] v,        // membrane potential
  output logic                     fire      // one-cycle pulse after a firing step
);
  localparam logic signed [DATA_W+2:0] MAXV = (DATA_W+3)'(2**(DATA_W-1) - 1);
  localparam logic signed [DATA_W+2:0] MINV = -(DATA_W+3)'(2**(DATA_W-1));

  logic signed [DATA_W+2:0] v_sum;
  logic signed [DATA_W-1:0] v_next;

  always_comb begin
    v_sum = (DATA_W+3)'(v) + (DATA_W+3)'(i_syn) + (DATA_W+3)'(A_BIAS)
          - (DATA_W+3)'(v >>> B_SHIFT);
    if (v_sum > MAXV)      v_next = MAXV[DATA_W-1:0];
    else if (v_sum < MINV) v_next = MINV[DATA_W-1:0];
    else                   v_next = v_sum[DATA_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v    <= V_RESET;
      fire <= 1'b0;
    end else begin
      fire <= 1'b0;
      if (step) begin
        if (v_next >= (DATA_W)'(THETA)) begin
          v    <= V_RESET;
          fire <= 1'b1;
        end else begin
          v <= v_next;
        end
      end
    end
  end
endmodule
