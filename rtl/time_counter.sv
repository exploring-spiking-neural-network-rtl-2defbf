// time_counter: time-step counter of a neuron cell. It holds the number of the
// time step being computed plus one: it resets to 1 and advances by one on
// every step pulse, saturating at the largest value. A neuron that fires in
// step k is stamped with (count - 1) = k after the step edge, so stamp 0 never
// names a real spike and means "no spike". The counter itself is required by
// the design; its reset value and saturation are this design's choice.
module time_counter #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,  // synchronous restart at 1
  input  logic         step,   // advance one time step
  output logic [W-1:0] count
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 count <= W'(1);
    else if (clear)             count <= W'(1);
    else if (step && count != '1) count <= count + W'(1);
  end
endmodule
