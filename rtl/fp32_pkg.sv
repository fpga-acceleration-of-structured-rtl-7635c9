// fp32_pkg: IEEE-754 single-precision arithmetic shared by the stencil and
// tridiagonal datapaths.
//
// The solvers work in FP32, as all of the evaluated designs do. On the target
// device these operations map to hardened floating-point DSP blocks; here they
// are plain combinational functions so that each kernel can place them in its
// own pipeline registers. Simplifications (a choice of this design, not of the
// published design): subnormal inputs and results are flushed to zero,
// results are truncated (round toward zero) instead of rounded to nearest,
// overflow saturates to infinity and NaN is not propagated specially.
// Relative error of each operation is below 2^-23.
package fp32_pkg;

  typedef logic [31:0] fp32_t;

  localparam fp32_t FP_ZERO  = 32'h0000_0000;
  localparam fp32_t FP_ONE   = 32'h3f80_0000;

  function automatic fp32_t fp_neg(input fp32_t a);
    return {~a[31], a[30:0]};
  endfunction

  function automatic fp32_t fp_mul(input fp32_t a, input fp32_t b);
    logic        s;
    logic [47:0] p;
    logic signed [10:0] e;
    logic [22:0] f;
    s = a[31] ^ b[31];
    if (a[30:23] == 8'd0 || b[30:23] == 8'd0) return {s, 31'd0};
    p = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    e = 11'(signed'({3'b000, a[30:23]})) + 11'(signed'({3'b000, b[30:23]})) - 11'sd127;
    if (p[47]) begin
      f = p[46:24];
      e = e + 11'sd1;
    end else begin
      f = p[45:23];
    end
    if (e <= 0) return {s, 31'd0};
    if (e >= 255) return {s, 8'hff, 23'd0};
    return {s, e[7:0], f};
  endfunction

  function automatic fp32_t fp_add(input fp32_t a, input fp32_t b);
    fp32_t       x, y;
    logic [7:0]  d;
    logic [26:0] mx, my;
    logic [27:0] sum;
    logic signed [10:0] e;
    int          lz;
    if (b[30:23] == 8'd0) return (a[30:23] == 8'd0) ? FP_ZERO : a;
    if (a[30:23] == 8'd0) return b;
    if (a[30:0] >= b[30:0]) begin x = a; y = b; end
    else begin x = b; y = a; end
    d  = x[30:23] - y[30:23];
    mx = {1'b1, x[22:0], 3'b000};
    my = (d > 8'd26) ? 27'd0 : ({1'b1, y[22:0], 3'b000} >> d);
    if (x[31] == y[31]) sum = {1'b0, mx} + {1'b0, my};
    else                sum = {1'b0, mx} - {1'b0, my};
    if (sum == 28'd0) return FP_ZERO;
    e = 11'(signed'({3'b000, x[30:23]}));
    if (sum[27]) begin
      sum = sum >> 1;
      e   = e + 11'sd1;
    end else begin
      lz = 0;
      for (int i = 0; i <= 26; i++) begin
        if (sum[i]) lz = 26 - i;   // the highest set bit wins
      end
      sum = sum << lz;
      e   = e - 11'(lz);
    end
    if (e <= 0) return FP_ZERO;
    if (e >= 255) return {x[31], 8'hff, 23'd0};
    return {x[31], e[7:0], sum[25:3]};
  endfunction

  function automatic fp32_t fp_sub(input fp32_t a, input fp32_t b);
    return fp_add(a, fp_neg(b));
  endfunction

  // a / b
  function automatic fp32_t fp_div(input fp32_t a, input fp32_t b);
    logic        s;
    logic [48:0] num;
    logic [25:0] q;
    logic signed [10:0] e;
    logic [22:0] f;
    s = a[31] ^ b[31];
    if (b[30:23] == 8'd0) return {s, 8'hff, 23'd0};
    if (a[30:23] == 8'd0) return {s, 31'd0};
    num = {1'b1, a[22:0], 25'd0};
    q   = 26'(num / {25'd0, 1'b1, b[22:0]});
    e   = 11'(signed'({3'b000, a[30:23]})) - 11'(signed'({3'b000, b[30:23]})) + 11'sd127;
    if (q[25]) begin
      f = q[24:2];
    end else begin
      f = q[23:1];
      e = e - 11'sd1;
    end
    if (e <= 0) return {s, 31'd0};
    if (e >= 255) return {s, 8'hff, 23'd0};
    return {s, e[7:0], f};
  endfunction

endpackage
