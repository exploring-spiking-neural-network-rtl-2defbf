// fp64_div: IEEE 754 double-precision floating-point divider, q = a / b.
// The STDP unit uses it to form dt/tau. It is a sequential restoring divider:
// after a start pulse the 53-bit significands are divided one quotient bit per
// cycle (56 bits: 53 result bits, guard and two more for the sticky bit), then
// one cycle normalises and rounds to nearest-even. done pulses for one cycle
// with q valid, 58 cycles after start; busy is high in between and start is
// ignored while busy. Special cases: NaN in, 0/0 or inf/inf give the quiet
// NaN; x/0 and inf/x give infinity; 0/x and x/inf give zero. Subnormal inputs
// are flushed to zero and results that would be subnormal flush to zero.
// A dedicated double-precision divider is what the design calls for; the
// restoring algorithm and the flush-to-zero handling are this design's choice.
module fp64_div (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [63:0] a,
  input  logic [63:0] b,
  output logic [63:0] q,
  output logic        busy,
  output logic        done
);
  localparam logic [63:0] QNAN = 64'h7FF8_0000_0000_0000;

  logic        sign_r;
  logic signed [12:0] exp_r;     // unbiased-sum exponent ea - eb + 1023
  logic [54:0] rem_r;            // partial remainder
  logic [52:0] div_r;            // divisor significand
  logic [55:0] quo_r;            // quotient bits
  logic [5:0]  cnt_r;
  logic        run_r, fin_r;

  // Operand fields
  logic [10:0] ea, eb;
  logic [51:0] fa, fb;
  logic a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
  always_comb begin
    ea = a[62:52]; fa = a[51:0];
    eb = b[62:52]; fb = b[51:0];
    a_zero = (ea == 11'd0);           // zero or flushed subnormal
    b_zero = (eb == 11'd0);
    a_inf  = (ea == 11'h7FF) && (fa == '0);
    b_inf  = (eb == 11'h7FF) && (fb == '0);
    a_nan  = (ea == 11'h7FF) && (fa != '0);
    b_nan  = (eb == 11'h7FF) && (fb != '0);
  end

  // Rounding of the finished quotient
  logic [52:0] mant;
  logic        guard, sticky;
  logic [53:0] mant_rnd;
  logic signed [12:0] exp_fin;
  logic [63:0] q_fin;
  always_comb begin
    if (quo_r[55]) begin
      mant    = quo_r[55:3];
      guard   = quo_r[2];
      sticky  = (quo_r[1:0] != 2'b00) || (rem_r != '0);
      exp_fin = exp_r;
    end else begin
      mant    = quo_r[54:2];
      guard   = quo_r[1];
      sticky  = quo_r[0] || (rem_r != '0);
      exp_fin = exp_r - 13'sd1;
    end
    mant_rnd = {1'b0, mant} + 54'(guard && (sticky || mant[0]));
    if (mant_rnd[53]) begin
      mant_rnd = mant_rnd >> 1;
      exp_fin  = exp_fin + 13'sd1;
    end
    if (exp_fin >= 13'sd2047)    q_fin = {sign_r, 11'h7FF, 52'h0};
    else if (exp_fin <= 13'sd0)  q_fin = {sign_r, 63'h0};
    else                         q_fin = {sign_r, exp_fin[10:0], mant_rnd[51:0]};
  end

  assign busy = run_r || fin_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sign_r <= 1'b0; exp_r <= '0; rem_r <= '0; div_r <= '0; quo_r <= '0;
      cnt_r <= '0; run_r <= 1'b0; fin_r <= 1'b0; q <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        sign_r <= a[63] ^ b[63];
        if (a_nan || b_nan || (a_zero && b_zero) || (a_inf && b_inf)) begin
          q <= QNAN; done <= 1'b1;
        end else if (a_inf || b_zero) begin
          q <= {a[63] ^ b[63], 11'h7FF, 52'h0}; done <= 1'b1;
        end else if (a_zero || b_inf) begin
          q <= {a[63] ^ b[63], 63'h0}; done <= 1'b1;
        end else begin
          exp_r <= 13'(ea) - 13'(eb) + 13'sd1023;
          rem_r <= {2'b00, 1'b1, fa};
          div_r <= {1'b1, fb};
          quo_r <= '0;
          cnt_r <= 6'd0;
          run_r <= 1'b1;
        end
      end else if (run_r) begin
        if (rem_r >= {2'b00, div_r}) begin
          rem_r <= (rem_r - {2'b00, div_r}) << 1;
          quo_r <= {quo_r[54:0], 1'b1};
        end else begin
          rem_r <= rem_r << 1;
          quo_r <= {quo_r[54:0], 1'b0};
        end
        cnt_r <= cnt_r + 6'd1;
        if (cnt_r == 6'd55) begin
          run_r <= 1'b0;
          fin_r <= 1'b1;
        end
      end else if (fin_r) begin
        fin_r <= 1'b0;
        q     <= q_fin;
        done  <= 1'b1;
      end
    end
  end
endmodule
