// fp32_pkg: single-precision floating-point arithmetic used by the FP units.
//
// The document gives the FP units only by name and latency, so the number
// format and its arithmetic are this design's choices: IEEE-754 single
// precision layout, results truncated (round toward zero), denormal inputs
// and results flushed to zero, overflow saturating to infinity. NaN and
// infinity inputs are not treated specially.
package fp32_pkg;

  function automatic logic [31:0] fp_pack(input logic s, input int e, input logic [22:0] m);
    if (e <= 0)        return {s, 31'd0};
    else if (e >= 255) return {s, 8'hFF, 23'd0};
    else               return {s, 8'(e), m};
  endfunction

  function automatic logic [31:0] fp_add(input logic [31:0] a, input logic [31:0] b);
    logic        sa, sb, s;
    logic [7:0]  ea, eb;
    logic [26:0] ma, mb, t;     // hidden bit, 23 fraction bits, 3 guard bits
    logic [27:0] sum;
    int          e, d;
    sa = a[31]; ea = a[30:23]; ma = (ea == 0) ? '0 : {1'b1, a[22:0], 3'b000};
    sb = b[31]; eb = b[30:23]; mb = (eb == 0) ? '0 : {1'b1, b[22:0], 3'b000};
    if (ea == 0) return (eb == 0) ? 32'd0 : {sb, b[30:0]};
    if (eb == 0) return {sa, a[30:0]};
    if ({eb, mb} > {ea, ma}) begin
      t = ma; ma = mb; mb = t;
      {sa, sb} = {sb, sa};
      {ea, eb} = {eb, ea};
    end
    d  = int'(ea) - int'(eb);
    mb = (d > 26) ? '0 : (mb >> d);
    e  = int'(ea);
    s  = sa;
    if (sa == sb) begin
      sum = {1'b0, ma} + {1'b0, mb};
      if (sum[27]) begin sum = sum >> 1; e = e + 1; end
    end else begin
      sum = {1'b0, ma} - {1'b0, mb};
      if (sum == '0) return 32'd0;
      for (int i = 0; i < 27; i++)
        if (!sum[26]) begin sum = sum << 1; e = e - 1; end
    end
    return fp_pack(s, e, sum[25:3]);
  endfunction

  function automatic logic [31:0] fp_mul(input logic [31:0] a, input logic [31:0] b);
    logic [47:0] p;
    int          e;
    logic        s;
    s = a[31] ^ b[31];
    if (a[30:23] == 0 || b[30:23] == 0) return {s, 31'd0};
    p = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    e = int'(a[30:23]) + int'(b[30:23]) - 127;
    if (p[47]) return fp_pack(s, e + 1, p[46:24]);
    else       return fp_pack(s, e, p[45:23]);
  endfunction

  function automatic logic [31:0] fp_div(input logic [31:0] a, input logic [31:0] b);
    logic [47:0] q;
    int          e;
    logic        s;
    s = a[31] ^ b[31];
    if (b[30:23] == 0) return {s, 8'hFF, 23'd0};
    if (a[30:23] == 0) return {s, 31'd0};
    q = {1'b1, a[22:0], 24'd0} / {24'd0, 1'b1, b[22:0]};
    e = int'(a[30:23]) - int'(b[30:23]) + 127;
    if (q[24]) return fp_pack(s, e, q[23:1]);
    else       return fp_pack(s, e - 1, q[22:0]);
  endfunction

endpackage
