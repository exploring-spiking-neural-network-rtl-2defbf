// stdp_unit: spike-timing-dependent plasticity rule. Given the spike time
// difference dt = T_post - T_pre (in time steps) it returns the weight change
//   dt > 0 (pre before post):  dw = +A_PLUS  * exp(-dt/TAU_PLUS)
//   dt < 0 (post before pre):  dw = -A_MINUS * exp(-|dt|/TAU_MINUS)
//   dt = 0:                    dw = 0
// How it works: |dt| is converted to an IEEE double and divided by tau (also a
// double) in the dedicated fp64_div. The quotient x is truncated to fixed
// point with 4 fractional bits; x >= 8 gives dw = 0. exp(-x) is then the
// product of two small tables in Q1.15,
//   EXP_INT[n]  = round(32768 * exp(-n)),     n = 0..7
//   EXP_FRAC[k] = round(32768 * exp(-k/16)),  k = 0..15
// and dw = round(A * EXP_INT[n] * EXP_FRAC[k] / 2^30), in weight units.
// Interface: start with dt; done pulses with dw valid. Latency is 60 cycles
// when the divider is used and 2 cycles for dt = 0. The rule, the use of a
// double-precision divider and the constants' roles follow the design; the
// table method for exp and all constant values are this design's choices.
module stdp_unit #(
  parameter int unsigned A_PLUS    = 64,   // maximal potentiation (0.25 in Q8.8)
  parameter int unsigned A_MINUS   = 64,   // maximal depression
  parameter int unsigned TAU_PLUS  = 20,   // time constants in time steps
  parameter int unsigned TAU_MINUS = 20
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic signed [15:0] dt,
  output logic signed [15:0] dw,
  output logic               busy,
  output logic               done
);
  // Positive integer (below 2^31) to IEEE double, for constants and operands.
  function automatic logic [63:0] int_to_f64(input logic [31:0] val);
    int p;
    logic [51:0] frac;
    p = 0;
    for (int i = 0; i < 32; i++) if (val[i]) p = i;
    if (val == 0) return 64'h0;
    frac = 52'({32'h0, val} << (52 - p));
    return {1'b0, 11'(1023 + p), frac};
  endfunction

  localparam logic [63:0] TAU_P_F = int_to_f64(TAU_PLUS);
  localparam logic [63:0] TAU_M_F = int_to_f64(TAU_MINUS);

  localparam logic [16:0] EXP_INT  [8]  = '{17'd32768, 17'd12055, 17'd4435, 17'd1631,
                                            17'd600, 17'd221, 17'd81, 17'd30};
  localparam logic [16:0] EXP_FRAC [16] = '{17'd32768, 17'd30783, 17'd28918, 17'd27166,
                                            17'd25520, 17'd23974, 17'd22521, 17'd21157,
                                            17'd19875, 17'd18671, 17'd17539, 17'd16477,
                                            17'd15479, 17'd14541, 17'd13660, 17'd12832};

  typedef enum logic [1:0] {ST_IDLE, ST_DIV, ST_MUL} st_e;
  st_e st;

  logic        neg_r;
  logic [15:0] mag;
  logic        div_start, div_busy, div_done;
  logic [63:0] div_q, div_a, div_b;

  assign mag   = dt[15] ? 16'(-dt) : 16'(dt);
  assign div_a = int_to_f64({16'h0, mag});
  assign div_b = dt[15] ? TAU_M_F : TAU_P_F;
  assign div_start = start && (st == ST_IDLE) && (dt != 0);

  fp64_div u_div (
    .clk, .rst_n, .start(div_start), .a(div_a), .b(div_b),
    .q(div_q), .busy(div_busy), .done(div_done)
  );

  // Quotient to fixed point x16 = floor(16 * x), x16 >= 128 means x >= 8.
  logic signed [12:0] qexp;
  logic [52:0]        qsig;
  logic [7:0]         x16;
  logic               x_big;
  always_comb begin
    qexp  = 13'(div_q[62:52]) - 13'sd1023;
    qsig  = {1'b1, div_q[51:0]};
    x_big = (div_q[62:52] != 0) && (qexp >= 13'sd3);
    if (div_q[62:52] == 0 || qexp < -13'sd4) x16 = 8'd0;
    else if (x_big)                           x16 = 8'd128;
    else                                      x16 = 8'(qsig >> (48 - qexp));
  end

  logic [7:0]  x16_r;
  logic [33:0] e_prod;     // Q2.30 product of the two tables
  logic [16:0] e_q15;
  logic [15:0] dw_mag;
  logic [16:0] amp;
  always_comb begin
    e_prod = EXP_INT[x16_r[6:4]] * EXP_FRAC[x16_r[3:0]];
    e_q15  = 17'((e_prod + 34'd16384) >> 15);
    amp    = neg_r ? 17'(A_MINUS) : 17'(A_PLUS);
    dw_mag = (x16_r[7]) ? 16'd0 : 16'((amp * e_q15 + 34'd16384) >> 15);
  end

  assign busy = (st != ST_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= ST_IDLE; neg_r <= 1'b0; x16_r <= '0; dw <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        ST_IDLE: if (start) begin
          neg_r <= dt[15];
          if (dt == 0) begin
            x16_r <= 8'd128;   // forces dw = 0
            st    <= ST_MUL;
          end else begin
            st <= ST_DIV;
          end
        end
        ST_DIV: if (div_done) begin
          x16_r <= x16;
          st    <= ST_MUL;
        end
        ST_MUL: begin
          dw   <= neg_r ? -dw_mag : dw_mag;
          done <= 1'b1;
          st   <= ST_IDLE;
        end
        default: st <= ST_IDLE;
      endcase
    end
  end

  // The divider is only started when idle, and |dt| / tau is never negative.
  a_div_idle: assert property (@(posedge clk) disable iff (!rst_n) div_start |-> !div_busy);
  a_div_pos:  assert property (@(posedge clk) disable iff (!rst_n) div_done |-> !div_q[63]);
endmodule
